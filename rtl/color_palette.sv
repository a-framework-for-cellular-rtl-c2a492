// color_palette: maps a cell state to a 12-bit VGA colour {R[3:0], G[3:0], B[3:0]}.
//
// PAL_WINDOWS uses the 16-colour palette of early Windows versions, indexed
// by the four most significant bits of the cell; PAL_GRADIENT is a grey ramp
// on the same four bits. The output is registered: one clock of latency.
// The original names the two palettes only; the colours and the 4-bit-per-
// channel output (the VGA port of the evaluation board) are this design's.
// With 8-bit cells lint reports the low four bits as unused: only sixteen
// colours are shown.
module color_palette
  import ca_pkg::*;
#(
  parameter int unsigned C       = 8,
  parameter palette_e    PALETTE = PAL_WINDOWS
) (
  input  logic         clk,
  input  logic [C-1:0] cell_in,
  input  logic         active,
  output logic [11:0]  rgb
);
  logic [3:0]  idx;
  logic [11:0] colour;

  assign idx = cell_in[C-1 -: 4];

  always_comb begin
    if (PALETTE == PAL_GRADIENT) begin
      colour = {idx, idx, idx};
    end else begin
      case (idx)
        4'd0:  colour = 12'h000;  4'd1:  colour = 12'h800;
        4'd2:  colour = 12'h080;  4'd3:  colour = 12'h880;
        4'd4:  colour = 12'h008;  4'd5:  colour = 12'h808;
        4'd6:  colour = 12'h088;  4'd7:  colour = 12'hCCC;
        4'd8:  colour = 12'h888;  4'd9:  colour = 12'hF00;
        4'd10: colour = 12'h0F0;  4'd11: colour = 12'hFF0;
        4'd12: colour = 12'h00F;  4'd13: colour = 12'hF0F;
        4'd14: colour = 12'h0FF;  default: colour = 12'hFFF;
      endcase
    end
  end

  always_ff @(posedge clk)
    rgb <= active ? colour : 12'h000;

  initial assert (C >= 4) else $error("color_palette: cells need at least 4 bits");
endmodule
