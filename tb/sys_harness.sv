// sys_harness: one complete accelerator (ca_system) with a behavioural DDR
// model, run for GENS generations at a reduced grid. The initial generation
// is placed in memory segment 0 (directly, or with UART_LOAD sent over the
// serial line to the built-in loader); after each generation is written, the
// whole segment is compared cell by cell with a reference evolution computed
// here from the rule definition. It also counts how often each mechanism of
// the design occurred (loader winning the memory over write-back, memory
// back-pressure, segment swaps, priming, display-only frames, wrap-around
// lines from the poloidal buffers, window pre-load columns, stalls) and
// counts a failure for each expected one that never happened.
module sys_harness
  import ca_pkg::*;
  import tb_ca_ref_pkg::*;
#(
  parameter grid_e       GRID      = GRID_TORUS,
  parameter rule_e       RULE      = RULE_HODGEPODGE,
  parameter int unsigned C         = 8,
  parameter int unsigned N         = 5,
  parameter int unsigned SPEED     = 1,
  parameter bit          WEIGHTED  = 1'b1,
  parameter real         ENG_HALF  = 2.5,
  parameter bit          EXPECT_STALL = 1'b0,
  parameter int unsigned GENS      = 3,
  parameter bit          UART_LOAD = 1'b0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int X = 32, Y = 16, B = 32, ADDR_W = 16;
  localparam int CB = B / C, BL = X / CB, H = (N - 1) / 2;
  localparam int SEG1 = (1 << (ADDR_W - 1)) >> 3;
  localparam int HP_K = 5, HP_G = 30, GH_T = 3;
  localparam bit TOR = (GRID == GRID_TORUS);

  logic ui_clk = 0, eng_clk = 0, pix_clk = 0;
  logic ui_rst = 1, eng_rst = 1, pix_rst = 1, start = 0;
  logic uart_rx = 1'b1, loading;
  localparam int CPB = 4;   // serial bit time in ui_clk cycles
  always #6.155 ui_clk = ~ui_clk;
  always #(ENG_HALF) eng_clk = ~eng_clk;
  always #3.365 pix_clk = ~pix_clk;

  logic app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy, app_rd_data_valid;
  logic [2:0] app_cmd; logic [ADDR_W-1:0] app_addr; logic [B-1:0] app_wdf_data, app_rd_data;
  logic vga_hsync, vga_vsync, error; logic [11:0] vga_rgb;
  logic [31:0] generations, frames, stall_ca, stall_wb;

  ca_system #(
    .X(X), .Y(Y), .C(C), .N(N), .B(B), .ADDR_W(ADDR_W), .GRID(GRID), .RULE(RULE),
    .WEIGHTED(WEIGHTED), .HP_K(HP_K), .HP_G(HP_G), .GH_THRESH(GH_T), .SPEED(SPEED),
    .FIFO_DEPTH(16), .UART_CLKS_PER_BIT(CPB), .H_FP(8), .H_SYNC(8), .H_BP(16), .V_FP(2), .V_SYNC(2), .V_BP(6)
  ) dut (.*);

  ddr_model #(.B(B), .ADDR_W(ADDR_W), .RD_LAT(6), .NOT_RDY_PCT(10)) u_mem (
    .clk(ui_clk), .app_en, .app_cmd, .app_addr, .app_rdy, .app_wdf_data,
    .app_wdf_wren, .app_wdf_end, .app_wdf_rdy, .app_rd_data, .app_rd_data_valid);

  int g [GENS+1][Y][X];

  function automatic int init_cell();
    int r;
    r = $urandom_range(0, 99);
    case (RULE)
      RULE_APHYSICS:  return (r < 40) ? 1 : 0;
      RULE_GREENBERG: return (r < 60) ? 0 : (r < 75) ? 1 : $urandom_range(2, 15);
      default:        return (r < 30) ? 0 : (r < 40) ? 255 : $urandom_range(1, 254);
    endcase
  endfunction

  function automatic int at(int k, int y, int x);
    if (x < 0 || x >= X) begin
      if (GRID == GRID_RECT) return 0;
      x = (x + X) % X;
    end
    if (y < 0 || y >= Y) begin
      if (!TOR) return 0;
      y = (y + Y) % Y;
    end
    return g[k][y][x];
  endfunction

  task automatic evolve(int k);
    int win[];
    win = new[N * N];
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) begin
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            win[i * N + j] = at(k, y - H + i, x - H + j);
        g[k+1][y][x] = ref_next(RULE, WEIGHTED, N, C, HP_K, HP_G, GH_T, win);
      end
  endtask

  // ---------------- mechanism counters ----------------
  int m_conflict = 0, m_notrdy = 0, m_seg = 0, m_prime = 0, m_skip = 0;
  int m_poloidal = 0, m_preload = 0, m_uart = 0;
  logic seg_q = 1'b1;
  always @(posedge ui_clk) begin
    m_conflict += int'(dut.ld_req && dut.wb_req);
    m_uart     += int'(dut.in_req && dut.in_gnt);
    m_notrdy   += int'(app_en && !app_rdy);
    m_prime    += int'(dut.ca_wvalid && dut.ca_prime);
    m_skip     += int'(app_rd_data_valid && !dut.ca_wvalid);
    m_seg      += int'(dut.wb_seg != seg_q);
    seg_q      <= dut.wb_seg;
  end
  always @(posedge eng_clk) begin
    m_poloidal += int'(TOR && dut.u_glb.col_valid && dut.u_glb.r_row < H);
    m_preload  += int'(dut.u_glb.s1_on && !dut.u_glb.s1_v);
  end

  task automatic need(string what, int count, bit expected);
    checks++;
    if (expected && count == 0) begin
      failures++;
      $display("GRID %0d RULE %0d: %s never happened", GRID, RULE, what);
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    for (int y = 0; y < Y; y++)
      for (int x = 0; x < X; x++) g[0][y][x] = init_cell();
    for (int y = 0; y < Y; y++)
      for (int a = 0; a < BL; a++) begin
        logic [B-1:0] w;
        for (int k = 0; k < CB; k++) w[k*C +: C] = C'(g[0][y][a*CB + k]);
        if (!UART_LOAD) u_mem.mem[y * BL + a] = w;
      end
    repeat (5) @(posedge ui_clk);
    ui_rst = 0; eng_rst = 0; pix_rst = 0;
    if (UART_LOAD) begin
      // send the grid over the serial line, 8N1, first byte = low bits of burst 0
      repeat (3) @(posedge ui_clk);
      for (int y = 0; y < Y; y++)
        for (int a = 0; a < BL; a++) begin
          logic [B-1:0] w;
          for (int k = 0; k < CB; k++) w[k*C +: C] = C'(g[0][y][a*CB + k]);
          for (int by = 0; by < B / 8; by++) begin
            logic [9:0] frame;
            frame = {1'b1, w[by*8 +: 8], 1'b0};
            for (int i = 0; i < 10; i++) begin
              uart_rx = frame[i];
              repeat (CPB) @(posedge ui_clk);
            end
          end
        end
      repeat (20) @(posedge ui_clk);
      checks++;
      if (loading) begin failures++; $display("GRID %0d: serial loader still busy", GRID); end
    end else begin
      @(negedge ui_clk) start = 1;
    end
    for (int k = 1; k <= GENS; k++) begin
      int base, bad;
      evolve(k - 1);
      wait (generations == 32'(k));
      base = (k % 2) ? SEG1 : 0;
      bad = 0;
      for (int y = 0; y < Y; y++)
        for (int a = 0; a < BL; a++) begin
          logic [B-1:0] w;
          w = u_mem.mem.exists(base + y * BL + a) ? u_mem.mem[base + y * BL + a] : '0;
          for (int c = 0; c < CB; c++) begin
            checks++;
            if (int'(w[c*C +: C]) != g[k][y][a*CB + c]) begin
              failures++; bad++;
              if (bad < 6) $display("GRID %0d RULE %0d gen %0d: cell (%0d,%0d) = %0d expected %0d",
                                    GRID, RULE, k, y, a*CB + c, w[c*C +: C], g[k][y][a*CB + c]);
            end
          end
        end
    end
    need("serial grid load", m_uart, UART_LOAD);
    checks++;
    if (UART_LOAD && m_uart != Y * BL) begin
      failures++; $display("GRID %0d: %0d bursts loaded over the serial line, expected %0d", GRID, m_uart, Y * BL);
    end
    need("loader/write-back conflict", m_conflict, !EXPECT_STALL);
    need("memory back-pressure", m_notrdy, 1);
    need("segment swap", m_seg, 1);
    need("window pre-load column", m_preload, 1);
    need("priming frame", m_prime, TOR);
    need("wrap-around from poloidal lines", m_poloidal, TOR);
    need("display-only frame", m_skip, SPEED > 1);
    need("engine stall", int'(stall_ca), EXPECT_STALL);
    need("write-back wait", int'(stall_wb), EXPECT_STALL);
    checks++;
    if (error && !EXPECT_STALL) begin failures++; $display("GRID %0d: error flag raised", GRID); end
    $display("GRID %0d RULE %0d: %0d generations, %0d frames; conflicts %0d back-pressure %0d swaps %0d preload %0d prime %0d poloidal %0d skip %0d serial %0d stall_ca %0d stall_wb %0d",
             GRID, RULE, generations, frames, m_conflict, m_notrdy, m_seg, m_preload, m_prime, m_poloidal, m_skip, m_uart, stall_ca, stall_wb);
    done = 1;
  end
endmodule
