// line_ram: simple dual-port block RAM holding one grid line as DEPTH words
// of DW bits (one memory burst per word).
//
// Port A writes on `wclk`; port B reads on `rclk` with one cycle of latency
// (registered output, the block-RAM style the line buffers rely on). The two
// clocks may be unrelated. Reading and writing the same address in the same
// cycle is not used by the buffers.
module line_ram #(
  parameter int unsigned DW    = 128,
  parameter int unsigned DEPTH = 120,
  localparam int unsigned AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic          wclk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          rclk,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_ff @(posedge rclk)
    rdata <= mem[raddr];
endmodule
