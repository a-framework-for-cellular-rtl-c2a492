// ddr_model: behavioural stand-in for the DDR memory controller and its
// memory, with the controller's user-interface ports. Not synthesizable.
// One command moves one B-bit burst; the burst index is app_addr / 8.
// Reads return in order RD_LAT clocks after acceptance. `app_rdy` and
// `app_wdf_rdy` drop at random (NOT_RDY_PCT percent of clocks) to model
// refresh and controller back-pressure. The array is reached from the
// testbench through `mem`.
module ddr_model #(
  parameter int unsigned B           = 128,
  parameter int unsigned ADDR_W      = 27,
  parameter int unsigned RD_LAT      = 6,
  parameter int unsigned NOT_RDY_PCT = 10
) (
  input  logic              clk,
  input  logic              app_en,
  input  logic [2:0]        app_cmd,
  input  logic [ADDR_W-1:0] app_addr,
  output logic              app_rdy,
  input  logic [B-1:0]      app_wdf_data,
  input  logic              app_wdf_wren,
  input  logic              app_wdf_end,
  output logic              app_wdf_rdy,
  output logic [B-1:0]      app_rd_data,
  output logic              app_rd_data_valid
);
  logic [B-1:0] mem [int unsigned];
  longint unsigned cyc = 0;
  typedef struct { longint unsigned due; logic [B-1:0] data; } rd_t;
  rd_t rq [$];
  int unsigned not_ready = 0;

  initial begin
    app_rdy = 1; app_wdf_rdy = 1; app_rd_data = '0; app_rd_data_valid = 0;
  end

  always @(posedge clk) begin
    int unsigned idx;
    cyc++;
    idx = int'(app_addr >> 3);
    if (app_en && app_rdy) begin
      if (app_cmd == 3'b001) begin
        rd_t r;
        r.due  = cyc + RD_LAT;
        r.data = mem.exists(idx) ? mem[idx] : '0;
        rq.push_back(r);
      end else if (app_wdf_rdy && app_wdf_wren && app_wdf_end) begin
        mem[idx] = app_wdf_data;
      end
    end
    if (rq.size() > 0 && rq[0].due <= cyc) begin
      app_rd_data       <= rq[0].data;
      app_rd_data_valid <= 1'b1;
      void'(rq.pop_front());
    end else begin
      app_rd_data_valid <= 1'b0;
    end
    app_rdy     <= ($urandom_range(0, 99) >= NOT_RDY_PCT);
    app_wdf_rdy <= ($urandom_range(0, 99) >= NOT_RDY_PCT);
    if (app_en && !app_rdy) not_ready++;
  end
endmodule
