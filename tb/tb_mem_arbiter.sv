// tb_mem_arbiter: random requests from both sides and random controller
// readiness. Each cycle the expected command, address, grants and write
// strobes are worked out from the priority rule and compared; both grant
// kinds and a write-back request held off by the loader must occur.
module tb_mem_arbiter;
  import ca_pkg::*;
  localparam int B = 16, AW = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ld_req, ld_gnt, wb_req, wb_gnt, app_en, app_rdy, app_wdf_wren, app_wdf_end, app_wdf_rdy;
  logic [AW-1:0] ld_addr, wb_addr, app_addr;
  logic [B-1:0] wb_data, app_wdf_data;
  mem_cmd_e app_cmd;
  mem_arbiter #(.B(B), .ADDR_W(AW)) dut (.*);

  int checks = 0, failures = 0, n_ld = 0, n_wb = 0, n_held = 0;

  initial begin
    {ld_req, wb_req, app_rdy, app_wdf_rdy} = '0;
    ld_addr = '0; wb_addr = '0; wb_data = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    repeat (2000) begin
      @(negedge clk);
      ld_req = $urandom_range(0, 2) == 0;
      wb_req = $urandom_range(0, 1) == 0;
      app_rdy = $urandom_range(0, 3) != 0;
      app_wdf_rdy = $urandom_range(0, 3) != 0;
      ld_addr = AW'($urandom); wb_addr = AW'($urandom); wb_data = B'($urandom);
      #1;
      begin
        bit e_ld, e_wb;
        e_ld = ld_req && app_rdy;
        e_wb = !ld_req && wb_req && app_rdy && app_wdf_rdy;
        checks += 4;
        if (ld_gnt != e_ld) failures++;
        if (wb_gnt != e_wb) failures++;
        if (ld_req && (app_cmd != MEM_READ || app_addr != ld_addr || !app_en)) failures++;
        if (e_wb && (app_cmd != MEM_WRITE || app_addr != wb_addr || !app_wdf_wren ||
                     !app_wdf_end || app_wdf_data != wb_data)) failures++;
        n_ld += int'(e_ld); n_wb += int'(e_wb);
        n_held += int'(ld_req && wb_req && app_rdy);
      end
    end
    checks += 3;
    if (n_ld == 0) failures++;
    if (n_wb == 0) failures++;
    if (n_held == 0) failures++;
    $display("loader grants %0d, write-back grants %0d, write-back held off %0d", n_ld, n_wb, n_held);
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
