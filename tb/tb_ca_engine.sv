// tb_ca_engine: drives three engines (Hodgepodge weighted 5x5 with 8-bit
// cells, Greenberg-Hastings 5x5 with 4-bit cells, Artificial Physics 11x11
// with binary cells) with random columns and random valid flags, and checks
// every result against the reference rule and the fixed pipeline latency.
module tb_ca_engine;
  import ca_pkg::*;
  import tb_ca_ref_pkg::*;

  localparam int T = 1500;          // driven cycles
  localparam int NMAX = 11;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  // ---------------- one engine per rule ----------------
  localparam int N0 = 5,  C0 = 8;   // Hodgepodge
  localparam int N1 = 5,  C1 = 4;   // Greenberg-Hastings
  localparam int N2 = 11, C2 = 4;   // Artificial Physics

  logic [N0-1:0][C0-1:0] col0; logic v0; logic [C0-1:0] o0; logic ov0;
  logic [N1-1:0][C1-1:0] col1; logic v1; logic [C1-1:0] o1; logic ov1;
  logic [N2-1:0][C2-1:0] col2; logic v2; logic [C2-1:0] o2; logic ov2;

  ca_engine #(.N(N0), .C(C0), .RULE(RULE_HODGEPODGE), .WEIGHTED(1'b1), .HP_K(5), .HP_G(30))
    e0 (.clk, .rst, .col_in(col0), .valid_in(v0), .cell_out(o0), .valid_out(ov0));
  ca_engine #(.N(N1), .C(C1), .RULE(RULE_GREENBERG), .GH_THRESH(3))
    e1 (.clk, .rst, .col_in(col1), .valid_in(v1), .cell_out(o1), .valid_out(ov1));
  ca_engine #(.N(N2), .C(C2), .RULE(RULE_APHYSICS))
    e2 (.clk, .rst, .col_in(col2), .valid_in(v2), .cell_out(o2), .valid_out(ov2));

  function automatic int lat(int n);
    return (n - 1) / 2 + 1 + $clog2(n * n) + 3;
  endfunction

  // column and valid history, per engine
  int hist [3][T+64][NMAX];
  bit vh   [3][T+64];
  int rule_hits [3][4];

  function automatic int pick(int e);
    int r;
    r = $urandom_range(0, 99);
    case (e)
      0: return (r < 25) ? 0 : (r < 40) ? 255 : (r < 50) ? 1 : $urandom_range(0, 255);
      1: return (r < 40) ? 0 : (r < 75) ? 1 : $urandom_range(0, 15);
      default: return (r < ((cyc / 100) % 10) * 10 + 5) ? 1 : 0;
    endcase
  endfunction

  task automatic check(int e, int n, int c, int got, bit gotv);
    int t, win[], exp;
    bit expv;
    t = cyc - lat(n);
    expv = (t >= 0 && t < T) ? vh[e][t] : 1'b0;
    checks++;
    if (gotv !== expv) begin
      failures++;
      if (failures < 10) $display("engine %0d cycle %0d: valid %0b expected %0b", e, cyc, gotv, expv);
      return;
    end
    if (!expv) return;
    win = new[n * n];
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        int tc;
        tc = t - (n - 1) / 2 + j;
        win[i * n + j] = (tc >= 0) ? hist[e][tc][i] : 0;
      end
    case (e)
      0: exp = ref_next(RULE_HODGEPODGE, 1'b1, n, c, 5, 30, 0, win);
      1: exp = ref_next(RULE_GREENBERG, 1'b0, n, c, 0, 0, 3, win);
      default: exp = ref_next(RULE_APHYSICS, 1'b0, n, c, 0, 0, 0, win);
    endcase
    rule_hits[e][exp == 0 ? 0 : (exp == (1 << c) - 1 ? 1 : 2)]++;
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("engine %0d cycle %0d: cell %0d expected %0d", e, cyc, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < T + 64; t++) begin
      for (int e = 0; e < 3; e++) begin
        vh[e][t] = 0;
        for (int i = 0; i < NMAX; i++) hist[e][t][i] = 0;
      end
    end
    col0 = '0; col1 = '0; col2 = '0; v0 = 0; v1 = 0; v2 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    // make the histories line up with cycle 0 = first cycle after reset
    for (cyc = 0; cyc < T + 40; cyc++) begin
      @(negedge clk);
      if (cyc > 0) begin
        check(0, N0, C0, int'(o0), ov0);
        check(1, N1, C1, int'(o1), ov1);
        check(2, N2, C2, int'(o2), ov2);
      end
      // drive the columns sampled at the coming rising edge (cycle `cyc`)
      for (int e = 0; e < 3; e++) begin
        vh[e][cyc] = (cyc >= NMAX) && (cyc < T) && ($urandom_range(0, 9) < 8);
        for (int i = 0; i < NMAX; i++) hist[e][cyc][i] = (cyc < T) ? pick(e) : 0;
      end
      for (int i = 0; i < N0; i++) col0[i] = C0'(hist[0][cyc][i]);
      for (int i = 0; i < N1; i++) col1[i] = C1'(hist[1][cyc][i]);
      for (int i = 0; i < N2; i++) col2[i] = C2'(hist[2][cyc][i]);
      v0 = vh[0][cyc]; v1 = vh[1][cyc]; v2 = vh[2][cyc];
      // histories before the reset release are zero, as is the window
    end
    // every rule must have produced zero and non-zero states
    for (int e = 0; e < 3; e++) begin
      checks++;
      if (rule_hits[e][0] == 0 || (rule_hits[e][1] + rule_hits[e][2]) == 0) begin
        failures++;
        $display("engine %0d: rule outcomes not all exercised", e);
      end
    end
    $display("outcomes hp=%0d/%0d/%0d gh=%0d/%0d/%0d ap=%0d/%0d/%0d",
             rule_hits[0][0], rule_hits[0][1], rule_hits[0][2],
             rule_hits[1][0], rule_hits[1][1], rule_hits[1][2],
             rule_hits[2][0], rule_hits[2][1], rule_hits[2][2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T * 4) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
