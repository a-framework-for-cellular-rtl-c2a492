// graphics_line_buffer: the graphics subsystem's copy of the grid rows being
// shown, and the pixel fetch from it.
//
// Two halves of BL bursts each (ping-pong): the loader writes row r into half
// r mod 2 on the memory clock while the screen, on the pixel clock, reads row
// r-1 from the other half. The loader starts at 75% of the line, so a single
// line would be overwritten ahead of the beam; the second half avoids that
// (this design's choice). Pixel (h, v) of the visible area is cell h of row
// v: word h / CB of half v mod 2, cell h mod CB. `cell_out` and the delayed
// `active_out`, `hsync_out`, `vsync_out` appear two pixel clocks after the
// timing inputs. Only bit 0 of `vcount` is needed (it picks the half), so
// lint reports the upper bits as unused.
module graphics_line_buffer #(
  parameter int unsigned X  = 1920,
  parameter int unsigned C  = 8,
  parameter int unsigned B  = 128,
  parameter int unsigned HW = 12,
  parameter int unsigned VW = 11,
  localparam int unsigned CB = B / C,
  localparam int unsigned BL = X / CB,
  localparam int unsigned AW = (BL <= 2) ? 1 : $clog2(BL),
  localparam int unsigned OW = (CB <= 2) ? 1 : $clog2(CB)
) (
  // write port, memory clock
  input  logic          wclk,
  input  logic          we,
  input  logic [AW:0]   waddr,
  input  logic [B-1:0]  wdata,
  // pixel side
  input  logic          pclk,
  input  logic [HW-1:0] hcount,
  input  logic [VW-1:0] vcount,
  input  logic          active,
  input  logic          hsync,
  input  logic          vsync,
  output logic [C-1:0]  cell_out,
  output logic          active_out,
  output logic          hsync_out,
  output logic          vsync_out
);
  logic [B-1:0]  mem [2*BL];
  logic [B-1:0]  q;
  logic [OW-1:0] off_d;
  logic [2:0]    tim_d1;
  logic [AW:0]   raddr;

  always_ff @(posedge wclk)
    if (we) mem[waddr] <= wdata;

  always_comb begin
    raddr = {vcount[0], AW'(hcount / HW'(CB))};
    if (!active) raddr[AW-1:0] = '0;
  end

  always_ff @(posedge pclk) begin
    q      <= mem[raddr];
    off_d  <= OW'(hcount % HW'(CB));
    tim_d1 <= {active, hsync, vsync};
    cell_out <= q[off_d*C +: C];
    {active_out, hsync_out, vsync_out} <= tim_d1;
  end
endmodule
