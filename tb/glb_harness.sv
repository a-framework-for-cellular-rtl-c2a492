// glb_harness: drives one grid_lines_buffer of a given topology through four
// frames and checks every centre-valid column it sends, plus the padding or
// wrap-around column just before and just after each line. On the torus the
// first frame only primes and the next generation's cells are fed back
// through the capture port, as the engine would; the harness checks that the
// lines above row 0 are then taken from the captured generation.
module glb_harness
  import ca_pkg::*;
#(
  parameter grid_e GRID = GRID_TORUS
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  localparam int X = 16, Y = 10, C = 8, N = 5, B = 32;
  localparam int CB = B / C, BL = X / CB, H = (N - 1) / 2;
  localparam int F = 4;
  localparam bit TOR = (GRID == GRID_TORUS);

  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #6 wclk = ~wclk;
  always #2.5 rclk = ~rclk;

  logic wr_valid, wr_prime, wr_ready, wr_overrun, col_valid, cap_valid;
  logic [B-1:0] wr_data;
  logic [N-1:0][C-1:0] col_out, prev_col;
  logic [C-1:0] cap_cell;
  logic [31:0] rd_lines;

  grid_lines_buffer #(.X(X), .Y(Y), .C(C), .N(N), .B(B), .GRID(GRID)) dut (
    .wr_clk(wclk), .wr_rst(wrst), .wr_valid, .wr_data, .wr_prime, .wr_ready,
    .wr_overrun, .rd_clk(rclk), .rd_rst(rrst), .col_out, .col_valid,
    .cap_cell, .cap_valid, .rd_lines);

  int grid [F+1][Y][X];

  // Grid written in frame f, and grid processed in the p-th processed frame.
  function automatic int wr_grid(int f);
    return TOR ? ((f == 0) ? 0 : f - 1) : f;
  endfunction

  function automatic int expect_cell(int g, int row, int x, int i);
    int yy, xx;
    yy = row - H + i;
    xx = x;
    if (xx < 0 || xx >= X) begin
      if (GRID == GRID_RECT) return 0;
      xx = (xx + X) % X;
    end
    if (yy < 0 || yy >= Y) begin
      if (!TOR) return 0;
      yy = (yy + Y) % Y;
    end
    return grid[g][yy][xx];
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0; stalls = 0;
    for (int g = 0; g <= F; g++)
      for (int y = 0; y < Y; y++)
        for (int x = 0; x < X; x++)
          grid[g][y][x] = $urandom_range(1, 255);
  end

  // ---------------- writer ----------------
  initial begin
    wr_valid = 0; wr_prime = 0; wr_data = '0;
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    for (int f = 0; f < F; f++) begin
      for (int q = 0; q < Y; q++) begin
        @(negedge wclk);
        while (!wr_ready) begin
          stalls++;
          @(negedge wclk);
        end
        for (int a = 0; a < BL; a++) begin
          while ($urandom_range(0, 3) == 0) begin
            wr_valid = 0;
            @(negedge wclk);
          end
          wr_valid = 1;
          wr_prime = TOR && (f == 0);
          for (int k = 0; k < CB; k++)
            wr_data[k*C +: C] = C'(grid[wr_grid(f)][q][a*CB + k]);
          @(negedge wclk);
        end
        wr_valid = 0;
      end
    end
  end

  // ---------------- reader check ----------------
  int pframe = 0, prow = 0, px = 0;
  bit check_next = 0;

  always @(posedge rclk) begin
    if (!rrst && !done) begin
      if (check_next) begin
        check_next <= 0;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (int'(col_out[i]) != expect_cell(pframe_grid(), prow_prev(), X, i)) begin
            failures++;
            if (failures < 10) $display("GRID %0d: trailing column row %0d i %0d wrong", GRID, prow_prev(), i);
          end
        end
      end
      if (col_valid) begin
        for (int i = 0; i < N; i++) begin
          checks++;
          if (int'(col_out[i]) != expect_cell(pframe_grid(), prow, px, i)) begin
            failures++;
            if (failures < 10) $display("GRID %0d: frame %0d row %0d x %0d i %0d got %0d exp %0d", GRID, pframe, prow, px, i, col_out[i], expect_cell(pframe_grid(), prow, px, i));
          end
          if (px == 0) begin
            checks++;
            if (int'(prev_col[i]) != expect_cell(pframe_grid(), prow, -1, i)) begin
              failures++;
              if (failures < 10) $display("GRID %0d: leading column row %0d i %0d wrong", GRID, prow, i);
            end
          end
        end
        if (px == X - 1) begin
          check_next <= 1;
          px = 0;
          if (prow == Y - 1) begin prow = 0; pframe++; end
          else prow++;
        end else px++;
      end
      prev_col <= col_out;
    end
  end

  function automatic int pframe_grid();
    return check_next ? ((prow == 0) ? pframe - 1 : pframe) : pframe;
  endfunction
  function automatic int prow_prev();
    return (prow == 0) ? Y - 1 : prow - 1;
  endfunction

  // engine stand-in: the next generation comes back on the capture port
  always_comb begin
    cap_valid = col_valid;
    cap_cell  = C'(grid[pframe + 1][prow][px]);
  end

  // end of test
  initial begin
    wait (!rrst);
    wait (pframe == (TOR ? F - 1 : F));
    repeat (10) @(posedge rclk);
    checks++;
    if (wr_overrun) begin failures++; $display("GRID %0d: overrun", GRID); end
    checks++;
    if (rd_lines != 32'(F * Y)) begin
      failures++; $display("GRID %0d: %0d lines processed", GRID, rd_lines);
    end
    done = 1;
  end
endmodule
