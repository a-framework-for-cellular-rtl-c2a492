// adder_tree: pipelined sum of NUM unsigned operands.
//
// Level 0 registers the operands; each following level adds neighbouring
// pairs and registers the result, so the sum of the operands presented at
// cycle t appears on `sum` at cycle t + LATENCY, where
// LATENCY = 1 + ceil(log2(NUM)). One new set of operands is accepted every
// clock; there is no stall. Operands are zero-extended to OUT_W bits, which
// the instantiating module sizes so that the sum cannot overflow.
module adder_tree #(
  parameter int unsigned NUM   = 841,
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 22
) (
  input  logic                       clk,
  input  logic [NUM-1:0][IN_W-1:0]   operands,
  output logic [OUT_W-1:0]           sum
);
  localparam int unsigned LEVELS = (NUM <= 1) ? 0 : $clog2(NUM);

  // Number of partial sums at a level.
  function automatic int unsigned count_at(int unsigned lvl);
    return (NUM + (1 << lvl) - 1) >> lvl;
  endfunction

  logic [OUT_W-1:0] part [LEVELS+1][NUM];

  for (genvar k = 0; k < NUM; k++) begin : g_in
    always_ff @(posedge clk) part[0][k] <= OUT_W'(operands[k]);
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar k = 0; k < count_at(l + 1); k++) begin : g_add
      if (2*k + 1 < count_at(l)) begin : g_pair
        always_ff @(posedge clk) part[l+1][k] <= part[l][2*k] + part[l][2*k+1];
      end else begin : g_pass
        always_ff @(posedge clk) part[l+1][k] <= part[l][2*k];
      end
    end
  end

  assign sum = part[LEVELS][0];
endmodule
