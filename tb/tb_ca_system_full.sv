// tb_ca_system_full: the accelerator at its default size - 1920x1080 grid,
// 8-bit cells, 29x29 weighted Hodgepodge neighbourhood, toroidal grid,
// 1080p60 video timing with the original clock frequencies - taken through
// one complete operation: the priming frame, then one frame that computes
// generation 1. Generation 1 is then read from memory segment 1 and compared
// cell by cell with a reference computed here, and the time the generation
// took is checked against two video frames.
module tb_ca_system_full;
  import ca_pkg::*;

  localparam int X = 1920, Y = 1080, C = 8, N = 29, B = 128, ADDR_W = 27;
  localparam int CB = B / C, BL = X / CB, H = (N - 1) / 2;
  localparam int SEG1 = (1 << (ADDR_W - 1)) >> 3;
  localparam int HP_K = 5, HP_G = 105;

  logic ui_clk = 0, eng_clk = 0, pix_clk = 0;
  logic ui_rst = 1, eng_rst = 1, pix_rst = 1, start = 0;
  always #6.154 ui_clk = ~ui_clk;     // 81.25 MHz
  always #2.5 eng_clk = ~eng_clk;     // 200 MHz
  always #3.367 pix_clk = ~pix_clk;   // 148.5 MHz

  logic app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [2:0] app_cmd; logic [ADDR_W-1:0] app_addr; logic [B-1:0] app_wdf_data, app_rd_data;
  logic vga_hsync, vga_vsync, error, loading; logic [11:0] vga_rgb;
  logic uart_rx = 1'b1;   // serial line idle: the grid is preloaded
  logic [31:0] generations, frames, stall_ca, stall_wb;

  ca_system dut (.*);

  ddr_model #(.B(B), .ADDR_W(ADDR_W), .RD_LAT(10), .NOT_RDY_PCT(5)) u_mem (
    .clk(ui_clk), .app_en, .app_cmd, .app_addr, .app_rdy, .app_wdf_data,
    .app_wdf_wren, .app_wdf_end, .app_wdf_rdy, .app_rd_data, .app_rd_data_valid);

  byte unsigned g0 [Y][X];
  int wt [N][N];
  int checks = 0, failures = 0;

  // Hodgepodge Machine, written out from its definition.
  function automatic int next_cell(int y, int x);
    int sum = 0, inf = 0, ill = 0, centre, q;
    centre = g0[y][x];
    for (int i = 0; i < N; i++) begin
      int yy;
      yy = (y - H + i + Y) % Y;
      for (int j = 0; j < N; j++) begin
        int v;
        v = g0[yy][(x - H + j + X) % X];
        sum += wt[i][j] * v;
        if (v == 255) ill++;
        else if (v != 0) inf++;
      end
    end
    if (centre == 0) begin q = (inf + ill) / HP_K; return q > 255 ? 255 : q; end
    if (centre == 255) return 0;
    q = sum / (inf == 0 ? 1 : inf) + HP_G;
    return q > 255 ? 255 : q;
  endfunction

  realtime t_start, t_gen;

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) wt[i][j] = int'(nb_weight(RULE_HODGEPODGE, 1'b1, N, i, j));
    // random spots of states on a healthy background
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) begin
        int r;
        r = $urandom_range(0, 99);
        g0[y][x] = (r < 50) ? 8'd0 : (r < 60) ? 8'd255 : 8'($urandom_range(1, 254));
      end
    for (int y = 0; y < Y; y++)
      for (int a = 0; a < BL; a++) begin
        logic [B-1:0] w;
        for (int k = 0; k < CB; k++) w[k*C +: C] = g0[y][a*CB + k];
        u_mem.mem[y * BL + a] = w;
      end
    repeat (5) @(posedge ui_clk);
    ui_rst = 0; eng_rst = 0; pix_rst = 0;
    @(negedge ui_clk) start = 1;
    t_start = $realtime;
    wait (generations == 32'd1);
    t_gen = $realtime - t_start;
    $display("generation 1 written after %0.3f ms, %0d frames, stalls %0d/%0d", t_gen / 1.0e6, frames, stall_ca, stall_wb);
    // priming frame + computing frame: at most 2 frames plus the part of a
    // frame before the first row-0 request (16.67 ms per frame)
    checks++;
    if (t_gen > 3 * 16.7e6) begin failures++; $display("generation took too long"); end
    checks++;
    if (error) begin failures++; $display("error flag raised"); end
    for (int y = 0; y < Y; y++)
      for (int a = 0; a < BL; a++) begin
        logic [B-1:0] w;
        w = u_mem.mem.exists(SEG1 + y * BL + a) ? u_mem.mem[SEG1 + y * BL + a] : '0;
        for (int c = 0; c < CB; c++) begin
          int e;
          e = next_cell(y, a * CB + c);
          checks++;
          if (int'(w[c*C +: C]) != e) begin
            failures++;
            if (failures < 10) $display("cell (%0d,%0d) = %0d expected %0d", y, a*CB + c, w[c*C +: C], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #60ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
