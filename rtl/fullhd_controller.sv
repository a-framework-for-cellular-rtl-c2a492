// fullhd_controller: video timing generator for the VGA output, and the
// time base of the whole system.
//
// Counts pixels (hcount) and lines (vcount) over H_TOTAL x V_TOTAL clocks
// and drives positive sync pulses. Defaults are the 1920x1080 at 60 Hz
// timing (2200 x 1125 clocks at 148.5 MHz); the porch and pulse widths are
// the standard values of that mode. `active` is high over the visible area.
// `load_req` pulses for one clock when three quarters of the visible part of
// a line have been drawn, on each line whose next line is visible: during
// line v it asks for grid row v+1, and during the last blanking line it asks
// for row 0 (`load_row_zero` high). The loader fetches the row then, so the
// 75% point paces the whole machine, as in the original.
module fullhd_controller #(
  parameter int unsigned H_ACTIVE = 1920,
  parameter int unsigned H_FP     = 88,
  parameter int unsigned H_SYNC   = 44,
  parameter int unsigned H_BP     = 148,
  parameter int unsigned V_ACTIVE = 1080,
  parameter int unsigned V_FP     = 4,
  parameter int unsigned V_SYNC   = 5,
  parameter int unsigned V_BP     = 36,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW      = $clog2(H_TOTAL),
  localparam int unsigned VW      = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          active,
  output logic          hsync,
  output logic          vsync,
  output logic          load_req,
  output logic          load_row_zero,
  output logic          frame_start
);
  localparam int unsigned LOAD_AT = (H_ACTIVE * 3) / 4;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == HW'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  always_comb begin
    active        = (hcount < HW'(H_ACTIVE)) && (vcount < VW'(V_ACTIVE));
    hsync         = (hcount >= HW'(H_ACTIVE + H_FP)) && (hcount < HW'(H_ACTIVE + H_FP + H_SYNC));
    vsync         = (vcount >= VW'(V_ACTIVE + V_FP)) && (vcount < VW'(V_ACTIVE + V_FP + V_SYNC));
    load_row_zero = (vcount == VW'(V_TOTAL - 1));
    load_req      = !rst && (hcount == HW'(LOAD_AT)) &&
                    ((vcount < VW'(V_ACTIVE - 1)) || load_row_zero);
    frame_start   = !rst && (hcount == '0) && (vcount == '0);
  end
endmodule
