// tb_grid_lines_buffer: runs the line-buffer harness for the torus, the
// cylinder and the zero-padded rectangle, and requires the writer to have
// been held off (line not yet drained) at least once in each.
module tb_grid_lines_buffer;
  import ca_pkg::*;
  logic d0, d1, d2;
  int c0, c1, c2, f0, f1, f2, s0, s1, s2;

  glb_harness #(.GRID(GRID_TORUS)) h_tor (.done(d0), .checks(c0), .failures(f0), .stalls(s0));
  glb_harness #(.GRID(GRID_CYL))   h_cyl (.done(d1), .checks(c1), .failures(f1), .stalls(s1));
  glb_harness #(.GRID(GRID_RECT))  h_rec (.done(d2), .checks(c2), .failures(f2), .stalls(s2));

  int checks, failures;
  initial begin
    wait (d0 && d1 && d2);
    checks = c0 + c1 + c2 + 3;
    failures = f0 + f1 + f2 + int'(s0 == 0) + int'(s1 == 0) + int'(s2 == 0);
    $display("writer stalls: torus %0d cylinder %0d rectangle %0d", s0, s1, s2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
