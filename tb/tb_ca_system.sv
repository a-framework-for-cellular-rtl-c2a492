// tb_ca_system: end-to-end runs of the whole accelerator at a reduced grid
// (32x16): a weighted Hodgepodge Machine on a torus, Greenberg-Hastings on a
// cylinder with a new generation every second frame and an engine clock too
// slow for the display (forcing the stalls), its initial grid sent over the
// serial line, and Artificial Physics with an
// 11x11 neighbourhood on a zero-padded rectangle.
module tb_ca_system;
  import ca_pkg::*;
  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;

  sys_harness #(.GRID(GRID_TORUS), .RULE(RULE_HODGEPODGE), .C(8), .N(5), .SPEED(1),
                .WEIGHTED(1'b1), .GENS(3)) h_hp (.done(d0), .checks(c0), .failures(f0));
  sys_harness #(.GRID(GRID_CYL), .RULE(RULE_GREENBERG), .C(4), .N(5), .SPEED(2),
                .WEIGHTED(1'b0), .ENG_HALF(12.0), .EXPECT_STALL(1'b1), .GENS(2),
                .UART_LOAD(1'b1))
    h_gh (.done(d1), .checks(c1), .failures(f1));
  sys_harness #(.GRID(GRID_RECT), .RULE(RULE_APHYSICS), .C(4), .N(11), .SPEED(1),
                .WEIGHTED(1'b0), .GENS(2)) h_ap (.done(d2), .checks(c2), .failures(f2));

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
  initial begin
    #5ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
