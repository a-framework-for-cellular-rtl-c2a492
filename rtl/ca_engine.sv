// ca_engine: one new CA cell per clock from a stream of neighbourhood columns.
//
// Structure (follows the original design): an N x N window of shift
// registers receives one column of N cells per clock and shifts the whole
// window one place west; every cell of the window is multiplied by its
// 4-bit weight; a pipelined adder tree forms the weighted sum; a transition
// stage computes the new state of the centre cell. Two more adder trees
// count the neighbours that fall in two state ranges, which the Greenberg-
// Hastings and Hodgepodge rules need; the rule is chosen by parameter, as
// the original engine is rewritten per rule.
//
// Interface: `col_in[i]` is window row i (row 0 is the northernmost line)
// of the column entering at the east edge. There is no input enable: a column
// is taken every clock. `valid_in` marks the centre cell (row (N-1)/2) of
// the entering column as a cell to be computed; it follows that cell to the
// window centre and through the pipeline, and `valid_out` marks `cell_out`
// as a result to be written back. Columns with `valid_in` low pre-load the
// window with padding or wrapped-around cells.
//
// Timing: cell_out for the column entered at cycle t appears at
// t + LATENCY, LATENCY = (N-1)/2 + 1 (window) + 1 (weights) +
// adder tree (1 + ceil(log2 N*N)) + 1 (transition).
//
// Design choices of this implementation: the transition is computed by
// logic (thresholds, a divider) rather than a look-up table, since the
// tree output is 22 bits wide; counts are unweighted and include the centre.
module ca_engine
  import ca_pkg::*;
#(
  parameter int unsigned N         = 29,
  parameter int unsigned C         = 8,
  parameter int unsigned W         = 4,
  parameter rule_e       RULE      = RULE_HODGEPODGE,
  parameter bit          WEIGHTED  = 1'b1,
  parameter int unsigned HP_K      = 5,
  parameter int unsigned HP_G      = 105,
  parameter int unsigned GH_THRESH = 6
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [N-1:0][C-1:0]   col_in,
  input  logic                  valid_in,
  output logic [C-1:0]          cell_out,
  output logic                  valid_out
);
  localparam int unsigned H      = (N - 1) / 2;
  localparam int unsigned NN     = N * N;
  localparam int unsigned TREE_L = 1 + ((NN <= 1) ? 0 : $clog2(NN));
  localparam int unsigned SUM_W  = C + W + $clog2(NN);
  localparam int unsigned CNT_W  = $clog2(NN + 1);
  localparam int unsigned PROD_W = C + W;
  localparam int unsigned LATENCY = H + 1 + 1 + TREE_L + 1;
  localparam logic [C-1:0] SMAX  = '1;

  // State ranges counted by the two counting trees.
  // Range A: excited (state 1) for Greenberg-Hastings, infected
  // (1 .. max-1) for Hodgepodge. Range B: ill (maximum state).
  localparam int unsigned A_HI = (RULE == RULE_GREENBERG) ? 1 : (2**C) - 2;

  // ---------------- neighbourhood window ----------------
  logic [C-1:0] win  [N][N];   // [row][column], column N-1 is the east edge
  logic [N-1:0] vwin;          // valid flag of the centre cell of each column

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned k = 0; k + 1 < N; k++)
        win[r][k] <= win[r][k+1];
      win[r][N-1] <= col_in[r];
    end
    if (rst) vwin <= '0;
    else     vwin <= {valid_in, vwin[N-1:1]};
  end

  // ---------------- weights and range tests ----------------
  logic [NN-1:0][PROD_W-1:0] prod;
  logic [NN-1:0][0:0]        in_a, in_b;
  logic [C-1:0]              centre_p;
  logic                      valid_p;

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned k = 0; k < N; k++) begin
        prod[r*N+k] <= PROD_W'(win[r][k]) * PROD_W'(nb_weight(RULE, WEIGHTED, N, r, k));
        in_a[r*N+k] <= (win[r][k] != '0) && (win[r][k] <= C'(A_HI));
        in_b[r*N+k] <= (win[r][k] == SMAX);
      end
    end
    centre_p <= win[H][H];
    valid_p  <= rst ? 1'b0 : vwin[H];
  end

  // ---------------- adder trees ----------------
  logic [SUM_W-1:0] wsum;
  logic [CNT_W-1:0] cnt_a, cnt_b;

  adder_tree #(.NUM(NN), .IN_W(PROD_W), .OUT_W(SUM_W)) u_sum (
    .clk(clk), .operands(prod), .sum(wsum));
  adder_tree #(.NUM(NN), .IN_W(1), .OUT_W(CNT_W)) u_cnt_a (
    .clk(clk), .operands(in_a), .sum(cnt_a));
  adder_tree #(.NUM(NN), .IN_W(1), .OUT_W(CNT_W)) u_cnt_b (
    .clk(clk), .operands(in_b), .sum(cnt_b));

  // Centre cell and valid flag travel alongside the trees.
  logic [C-1:0] centre_d [TREE_L];
  logic [TREE_L-1:0] valid_d;
  always_ff @(posedge clk) begin
    centre_d[0] <= centre_p;
    for (int unsigned s = 1; s < TREE_L; s++) centre_d[s] <= centre_d[s-1];
    if (rst) valid_d <= '0;
    else     valid_d <= {valid_d[TREE_L-2:0], valid_p};
  end

  // ---------------- transition function ----------------
  logic [C-1:0]     next_state;
  logic [C-1:0]     centre_t;
  logic [SUM_W-1:0] quot;
  logic [SUM_W:0]   hp_inf;

  assign centre_t = centre_d[TREE_L-1];

  always_comb begin
    next_state = '0;
    quot       = '0;
    hp_inf     = '0;
    case (RULE)
      RULE_APHYSICS: begin
        if ((wsum >= 20 && wsum <= 23) || (wsum >= 59 && wsum <= 100))
          next_state = C'(1);
        else
          next_state = '0;
      end
      RULE_GREENBERG: begin
        if (centre_t == '0)
          next_state = (cnt_a > CNT_W'(GH_THRESH)) ? C'(1) : '0;
        else
          next_state = centre_t + C'(1);        // wraps modulo 2**C
      end
      default: begin                            // Hodgepodge Machine
        if (centre_t == '0) begin
          quot = (SUM_W'(cnt_a) + SUM_W'(cnt_b)) / SUM_W'(HP_K);
          next_state = (quot > SUM_W'(SMAX)) ? SMAX : C'(quot);
        end else if (centre_t == SMAX) begin
          next_state = '0;
        end else begin
          // The centre itself is infected, so cnt_a >= 1.
          quot   = wsum / SUM_W'((cnt_a == '0) ? CNT_W'(1) : cnt_a);
          hp_inf = {1'b0, quot} + (SUM_W+1)'(HP_G);
          next_state = (hp_inf > (SUM_W+1)'(SMAX)) ? SMAX : C'(hp_inf);
        end
      end
    endcase
  end

  always_ff @(posedge clk) begin
    cell_out  <= next_state;
    valid_out <= rst ? 1'b0 : valid_d[TREE_L-1];
  end

  // Latency bookkeeping used by the testbenches.
  initial assert (LATENCY == H + TREE_L + 3)
    else $error("ca_engine: latency bookkeeping mismatch");
endmodule
