// tb_graphics_line_buffer: writes two rows into the two halves on a 12 ns
// clock, then sweeps the pixel side over both rows on a 7 ns clock and
// checks each visible pixel's cell, and the sync delay, two clocks later.
module tb_graphics_line_buffer;
  localparam int X = 16, C = 8, B = 32, CB = B / C, BL = X / CB, HW = 6, VW = 4;
  logic wclk = 0, pclk = 0;
  always #6 wclk = ~wclk;
  always #3.5 pclk = ~pclk;

  logic we; logic [$clog2(BL):0] waddr; logic [B-1:0] wdata;
  logic [HW-1:0] hcount; logic [VW-1:0] vcount; logic active, hsync, vsync;
  logic [C-1:0] cell_out; logic active_out, hsync_out, vsync_out;
  graphics_line_buffer #(.X(X), .C(C), .B(B), .HW(HW), .VW(VW)) dut (.*);

  int rows [2][X];
  int checks = 0, failures = 0;
  int exp_q [$];

  initial begin
    we = 0; hcount = '0; vcount = '0; active = 0; hsync = 0; vsync = 0;
    for (int r = 0; r < 2; r++) for (int x = 0; x < X; x++) rows[r][x] = $urandom_range(0, 255);
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < BL; a++) begin
        @(negedge wclk);
        we = 1; waddr = {1'(r), 2'(a)};
        for (int k = 0; k < CB; k++) wdata[k*C +: C] = C'(rows[r][a*CB + k]);
      end
    @(negedge wclk) we = 0;
    for (int v = 0; v < 2; v++)
      for (int h = 0; h < X + 4; h++) begin
        @(negedge pclk);
        hcount = HW'(h); vcount = VW'(v + 2); active = (h < X); hsync = (h == X + 1); vsync = (v == 1);
        exp_q.push_back((h < X) ? rows[v][h] : -1);
        exp_q.push_back({29'b0, active, hsync, vsync});
      end
    repeat (4) @(negedge pclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare two clocks after the inputs
  int pipe_c [1]; int pipe_t [1];
  initial begin pipe_c[0] = -2; pipe_t[0] = -2; end
  always @(posedge pclk) begin
    #1;
    // pipe[0] holds what was driven before the previous rising edge
    if (pipe_c[0] != -2) begin
      checks++;
      if ({active_out, hsync_out, vsync_out} != 3'(pipe_t[0])) failures++;
      if (pipe_c[0] >= 0) begin
        checks++;
        if (int'(cell_out) != pipe_c[0]) begin
          failures++;
          if (failures < 8) $display("cell %0d expected %0d", cell_out, pipe_c[0]);
        end
      end
    end
    if (exp_q.size() >= 2) begin pipe_c[0] = exp_q.pop_front(); pipe_t[0] = exp_q.pop_front(); end
    else begin pipe_c[0] = -2; pipe_t[0] = -2; end
  end

  initial begin
    repeat (2000) @(posedge pclk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
