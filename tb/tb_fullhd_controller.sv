// tb_fullhd_controller: runs a reduced video timing (40x6 visible) for three
// frames and checks, cycle by cycle against counters kept by the testbench,
// the sync pulses, the visible area, the 75% row requests (which row, how
// many per frame) and the frame period.
module tb_fullhd_controller;
  localparam int HA = 40, HF = 4, HS = 6, HB = 10, VA = 6, VF = 1, VS = 2, VB = 3;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [$clog2(HT)-1:0] hcount;
  logic [$clog2(VT)-1:0] vcount;
  logic active, hsync, vsync, load_req, load_row_zero, frame_start;
  fullhd_controller #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
                      .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);

  int checks = 0, failures = 0, reqs = 0, row0 = 0, starts = 0, last_start = -1;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < HT * VT * 3; t++) begin
      int h, v;
      h = t % HT; v = (t / HT) % VT;
      #1;
      checks += 6;
      if (int'(hcount) != h || int'(vcount) != v) failures++;
      if (active != (h < HA && v < VA)) failures++;
      if (hsync != (h >= HA + HF && h < HA + HF + HS)) failures++;
      if (vsync != (v >= VA + VF && v < VA + VF + VS)) failures++;
      if (load_req != (h == HA * 3 / 4 && (v < VA - 1 || v == VT - 1))) failures++;
      if (load_req && (load_row_zero != (v == VT - 1))) failures++;
      reqs += int'(load_req); row0 += int'(load_req && load_row_zero);
      if (frame_start) begin
        checks++;
        if (last_start >= 0 && t - last_start != HT * VT) failures++;
        last_start = t; starts++;
      end
      @(negedge clk);
    end
    checks += 2;
    if (reqs != 3 * VA) failures++;
    if (row0 != 3 || starts != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (HT * VT * 4) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
