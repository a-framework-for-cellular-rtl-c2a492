// write_back: moves finished bursts from the write-back FIFO into external
// memory and keeps the write address.
//
// Whenever the FIFO is not empty, a write request is raised with the oldest
// burst and the address {segment, burst number, 3'b000} (bursts are eight
// 16-bit words, so addresses step by 8). Each grant pops the FIFO, so with a
// free memory port one burst is written per clock. After Y*BL bursts - one
// whole generation - the segment bit (the address MSB) flips: generations
// alternate between the two halves of the double buffer. Generation 0 is
// expected in segment 0, so writing starts in segment 1. `gens_written`
// counts finished generations.
// Follows the original's description; the request/grant handshake is this
// design's own (see mem_arbiter).
module write_back #(
  parameter int unsigned Y      = 1080,
  parameter int unsigned BL     = 120,
  parameter int unsigned B      = 128,
  parameter int unsigned ADDR_W = 27
) (
  input  logic              clk,
  input  logic              rst,
  // FIFO (first-word fall-through)
  input  logic              fifo_empty,
  input  logic [B-1:0]      fifo_data,
  output logic              fifo_rd_en,
  // request to the arbiter
  output logic              req,
  output logic [ADDR_W-1:0] addr,
  output logic [B-1:0]      wdata,
  input  logic              gnt,
  // status
  output logic              seg,
  output logic [31:0]       gens_written
);
  localparam int unsigned FB  = Y * BL;                 // bursts per frame
  localparam int unsigned FBW = $clog2(FB);

  logic [FBW-1:0] burst;

  assign req        = !fifo_empty;
  assign wdata      = fifo_data;
  assign fifo_rd_en = gnt;
  always_comb begin
    addr = ADDR_W'({burst, 3'b000});
    addr[ADDR_W-1] = seg;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      burst        <= '0;
      seg          <= 1'b1;
      gens_written <= '0;
    end else if (gnt) begin
      if (burst == FBW'(FB - 1)) begin
        burst        <= '0;
        seg          <= ~seg;
        gens_written <= gens_written + 1;
      end else begin
        burst <= burst + 1'b1;
      end
    end
  end

  gnt_needs_req: assert property (@(posedge clk) disable iff (rst) gnt |-> req)
    else $error("write_back: grant without request");
endmodule
