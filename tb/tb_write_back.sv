// tb_write_back: a queue stands in for the FIFO; grants arrive at random.
// Checks that every granted write carries the next burst and the address
// {segment, burst number, 000}, that the segment starts at 1 and flips after
// Y*BL bursts, and that finished generations are counted.
module tb_write_back;
  localparam int Y = 3, BL = 4, B = 16, AW = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic fifo_empty, fifo_rd_en, req, gnt, seg;
  logic [B-1:0] fifo_data, wdata;
  logic [AW-1:0] addr;
  logic [31:0] gens_written;
  write_back #(.Y(Y), .BL(BL), .B(B), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0;
  int q [$];
  int n = 0;
  localparam int TOTAL = Y * BL * 3 + 5;

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : B'(q[0]);

  initial begin
    for (int i = 0; i < TOTAL; i++) q.push_back($urandom_range(0, 65535));
    gnt = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    while (q.size() > 0) begin
      @(negedge clk);
      gnt = req && ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (gnt) begin
        int exp_seg, exp_burst;
        exp_seg   = 1 - ((n / (Y * BL)) % 2);
        exp_burst = n % (Y * BL);
        checks += 3;
        if (!fifo_rd_en) begin failures++; $display("no pop on grant"); end
        if (int'(wdata) != q[0]) begin failures++; $display("write %0d: data", n); end
        if (addr != {1'(exp_seg), (AW-1)'(exp_burst * 8)}) begin
          failures++; $display("write %0d: address %0h", n, addr);
        end
        #1 void'(q.pop_front());
        n++;
      end
    end
    @(negedge clk); gnt = 0;
    checks++;
    if (gens_written != 32'(TOTAL / (Y * BL))) begin failures++; $display("generations %0d", gens_written); end
    checks++;
    if (seg != 1'b0) begin failures++; $display("segment %0b after 3 generations", seg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
