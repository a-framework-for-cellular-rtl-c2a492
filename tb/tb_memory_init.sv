// tb_memory_init: sends a small grid (32x4 cells of 8 bits, 8 bursts) over
// the serial line at 8 clocks per bit, with random gaps between bytes and
// one byte whose stop bit is missing, and grants the write requests after
// random delays. Checks every burst's address and data against the bytes
// sent, that `done` pulses exactly once after the last burst, that the bad
// byte is counted and not stored, and that bytes sent after completion
// cause no further writes. Watchdog: 200000 clocks.
module tb_memory_init;
  localparam int X = 32, Y = 4, C = 8, B = 128, ADDR_W = 27, CPB = 8;
  localparam int BYTES = B / 8, BL = X / (B / C), TOTAL = Y * BL;

  logic clk = 0, rst = 1, rx = 1, gnt = 0;
  logic req, done, busy;
  logic [ADDR_W-1:0] addr;
  logic [B-1:0] data;
  logic [15:0] frame_errors;
  int checks = 0, failures = 0, writes = 0, dones = 0;
  logic [7:0] sent [$];

  always #5 clk = ~clk;

  memory_init #(.X(X), .Y(Y), .C(C), .B(B), .ADDR_W(ADDR_W), .CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic send_byte(input logic [7:0] b, input bit good_stop);
    rx = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (CPB) @(posedge clk); end
    rx = good_stop; repeat (CPB) @(posedge clk);
    rx = 1; repeat ($urandom_range(0, 3 * CPB)) @(posedge clk);
    if (!good_stop) repeat (2 * CPB) @(posedge clk);
  endtask

  // grant with random delay; compare with the expected burst
  always @(posedge clk) begin
    if (!rst) begin
      gnt <= req && ($urandom_range(0, 3) == 0);
      if (req && gnt) begin
        logic [B-1:0] exp;
        for (int k = 0; k < BYTES; k++) exp[k*8 +: 8] = sent[writes * BYTES + k];
        check(addr == ADDR_W'(writes * 8), $sformatf("burst %0d address %0h", writes, addr));
        check(data == exp, $sformatf("burst %0d data %h exp %h", writes, data, exp));
        writes++;
      end
      if (done) begin
        dones++;
        check(writes == TOTAL, "done before the last burst");
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < TOTAL * BYTES; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      if (n == 21) send_byte(8'hA5, 1'b0);   // framing error, dropped
      sent.push_back(b);
      send_byte(b, 1'b1);
    end
    repeat (20 * CPB) @(posedge clk);
    check(writes == TOTAL, $sformatf("writes %0d", writes));
    check(dones == 1, $sformatf("done pulses %0d", dones));
    check(frame_errors == 16'd1, $sformatf("frame errors %0d", frame_errors));
    check(!busy, "busy after done");
    for (int n = 0; n < BYTES; n++) send_byte(8'($urandom), 1'b1);
    repeat (20 * CPB) @(posedge clk);
    check(writes == TOTAL && !req, "write after completion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
