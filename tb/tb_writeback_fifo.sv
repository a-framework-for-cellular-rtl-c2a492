// tb_writeback_fifo: pushes random cells at an irregular rate on a 5 ns
// clock and pops bursts with random stalls on a 12 ns clock; every burst
// must hold the next CB cells in order, cell 0 in the low bits. A second
// phase stops popping until the FIFO overflows and checks the sticky flag.
module tb_writeback_fifo;
  localparam int C = 8, B = 32, CB = B / C, DEPTH = 8, NB = 300;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #2.5 wclk = ~wclk;
  always #6 rclk = ~rclk;

  logic [C-1:0] cell_in; logic cell_valid, overflow, rd_en, rd_empty;
  logic [B-1:0] rd_data;
  writeback_fifo #(.C(C), .B(B), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  int cells [NB*CB];
  bit hold_reads = 0;

  initial begin
    for (int i = 0; i < NB*CB; i++) cells[i] = $urandom_range(0, 255);
    cell_valid = 0; cell_in = '0;
    repeat (3) @(posedge rclk);
    wrst = 0; rrst = 0;
    while (sent < NB*CB) begin
      @(negedge wclk);
      cell_valid = ($urandom_range(0, 3) != 0);
      if (cell_valid) begin cell_in = C'(cells[sent]); sent++; end
    end
    @(negedge wclk) cell_valid = 0;
  end

  always @(negedge rclk) rd_en <= !rrst && !hold_reads && !rd_empty && ($urandom_range(0, 2) != 0);

  always @(posedge rclk) begin
    if (!rrst && rd_en && !rd_empty) begin
      for (int k = 0; k < CB; k++) begin
        checks++;
        if (int'(rd_data[k*C +: C]) != cells[got*CB + k]) begin
          failures++;
          if (failures < 10) $display("burst %0d cell %0d: %0h expected %0h", got, k, rd_data[k*C +: C], cells[got*CB + k]);
        end
      end
      got++;
    end
  end

  initial begin
    wait (got == NB);
    checks++;
    if (overflow) begin failures++; $display("unexpected overflow"); end
    // overflow phase
    hold_reads = 1;
    repeat (2) @(negedge rclk);
    for (int i = 0; i < (DEPTH + 2) * CB; i++) begin
      @(negedge wclk); cell_valid = 1; cell_in = '0;
    end
    @(negedge wclk); cell_valid = 0;
    repeat (4) @(posedge wclk);
    checks++;
    if (!overflow) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge rclk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
