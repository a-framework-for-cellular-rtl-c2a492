// tb_color_palette: every 8-bit cell value through both palettes, compared
// with the 16-colour table and the grey ramp, one clock later; blanking must
// give black.
module tb_color_palette;
  import ca_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] cell_in; logic active; logic [11:0] rgb_w, rgb_g;
  color_palette #(.C(8), .PALETTE(PAL_WINDOWS))  u_w (.clk, .cell_in, .active, .rgb(rgb_w));
  color_palette #(.C(8), .PALETTE(PAL_GRADIENT)) u_g (.clk, .cell_in, .active, .rgb(rgb_g));

  const logic [11:0] WIN [16] = '{12'h000, 12'h800, 12'h080, 12'h880, 12'h008, 12'h808,
      12'h088, 12'hCCC, 12'h888, 12'hF00, 12'h0F0, 12'hFF0, 12'h00F, 12'hF0F, 12'h0FF, 12'hFFF};
  int checks = 0, failures = 0;

  initial begin
    for (int v = 0; v < 512; v++) begin
      @(negedge clk);
      cell_in = 8'(v); active = (v < 256);
      @(negedge clk);
      checks += 2;
      if (rgb_w != (active ? WIN[v[7:4]] : 12'h000)) failures++;
      if (rgb_g != (active ? {3{4'(v >> 4)}} : 12'h000)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
