// tb_graphics_data_loader: a 4-row, 3-burst grid on a torus with a new
// generation every second frame (SPEED = 2). Row requests come at fixed
// intervals; a memory stand-in answers reads after 3 clocks with data
// derived from the address and drops app_rdy at random; the engine's
// `ca_ready` is withheld at random. Checked for 7 frames: the read address
// sequence (segment, row, burst), the graphics and engine copies of every
// burst, the frame modes (prime, skip, process), the wait for write-back
// before a new generation is read, and the stall counters.
module tb_graphics_data_loader;
  localparam int Y = 4, BL = 3, B = 16, AW = 12, F = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic start, line_req, line_req_row0, req, gnt, rd_valid, gfx_we, ca_valid, ca_prime, ca_ready, missed_req;
  logic [AW-1:0] addr; logic [B-1:0] rd_data, gfx_data, ca_data;
  logic [2:0] gfx_addr;
  logic [31:0] wb_gens, frames, gens_started, stall_ca, stall_wb;
  graphics_data_loader #(.Y(Y), .BL(BL), .B(B), .ADDR_W(AW), .SPEED(2), .TORUS(1'b1)) dut (.*);

  int checks = 0, failures = 0;
  int a_f = 0, a_r = 0, a_k = 0;   // next expected address
  int d_f = 0, d_r = 0, d_k = 0;   // next expected data
  logic [AW-1:0] lat_a [3]; bit lat_v [3];

  function automatic int seg_of(int f);
    return (f >= 1) ? ((f - 1) / 2) % 2 : 0;
  endfunction
  function automatic int mode_of(int f);   // 0 skip, 1 process, 2 prime
    return (f == 0) ? 2 : ((f % 2 == 0) ? 1 : 0);
  endfunction
  function automatic logic [B-1:0] mem_word(logic [AW-1:0] a);
    return B'(a) ^ 16'hA5C3;
  endfunction

  // memory stand-in
  always @(negedge clk) gnt <= req && ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (req && gnt) begin
      logic [AW-1:0] e;
      e = AW'({(a_f < F ? 1'(seg_of(a_f)) : 1'b0), (AW-1)'((a_r * BL + a_k) * 8)});
      checks++;
      if (addr != e) begin failures++; $display("frame %0d row %0d burst %0d: address %0h expected %0h", a_f, a_r, a_k, addr, e); end
      if (++a_k == BL) begin a_k = 0; if (++a_r == Y) begin a_r = 0; a_f++; end end
    end
    lat_v[2] <= lat_v[1]; lat_a[2] <= lat_a[1];
    lat_v[1] <= lat_v[0]; lat_a[1] <= lat_a[0];
    lat_v[0] <= req && gnt; lat_a[0] <= addr;
  end
  assign rd_valid = lat_v[2];
  assign rd_data  = mem_word(lat_a[2]);

  // data check
  always @(posedge clk) begin
    if (rd_valid) begin
      checks += 4;
      if (!gfx_we || gfx_addr != {1'(d_r), 2'(d_k)} || gfx_data != rd_data) failures++;
      if (ca_valid != (mode_of(d_f) != 0)) begin failures++; $display("frame %0d: ca_valid %0b", d_f, ca_valid); end
      if (ca_prime != (mode_of(d_f) == 2)) begin failures++; $display("frame %0d: ca_prime %0b", d_f, ca_prime); end
      if (ca_data != rd_data) failures++;
      if (++d_k == BL) begin d_k = 0; if (++d_r == Y) begin d_r = 0; d_f++; end end
    end
  end

  // engine readiness and write-back progress
  always @(negedge clk) ca_ready <= ($urandom_range(0, 4) != 0);
  initial begin
    wb_gens = 0;
    forever begin
      @(posedge clk);
      // a generation is written some time after its PROCESS frame was read
      if (d_f >= 3 && wb_gens == 0) begin repeat (200) @(posedge clk); wb_gens = 1; end
      if (d_f >= 5 && wb_gens == 1) begin repeat (200) @(posedge clk); wb_gens = 2; end
    end
  end

  initial begin
    start = 0; line_req = 0; line_req_row0 = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk) start = 1;
    // two requests before the first row-0 request must be ignored
    for (int i = 0; i < 2 + (F + 1) * Y; i++) begin
      repeat (60) @(negedge clk);
      line_req = 1; line_req_row0 = ((i - 2) % Y == 0) && (i >= 2);
      if (i < 2) line_req_row0 = 0;
      @(negedge clk) line_req = 0;
    end
    repeat (300) @(negedge clk);
    checks += 4;
    if (d_f < F) begin failures++; $display("only %0d frames loaded", d_f); end
    if (stall_ca == 0) begin failures++; $display("no engine stall seen"); end
    if (stall_wb == 0) begin failures++; $display("no write-back wait seen"); end
    if (frames < 32'(F)) failures++;
    $display("frames %0d generations started %0d engine stalls %0d write-back waits %0d missed %0b",
             frames, gens_started, stall_ca, stall_wb, missed_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
