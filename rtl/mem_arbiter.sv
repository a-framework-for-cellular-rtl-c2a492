// mem_arbiter: gives the single user port of the DDR memory controller to
// either the graphics data loader (reads) or write-back (writes).
//
// Fixed priority, as in the original: the loader always wins, so the screen
// never misses a line; write-back uses the remaining cycles. Arbitration is
// per command and combinational. A read is accepted when the controller
// shows `app_rdy`; a write, which carries its data in the same cycle, when
// both `app_rdy` and `app_wdf_rdy` are high. Nothing is issued while `rst`
// is high. `ld_gnt` / `wb_gnt` tell the
// requester that its command was taken this cycle.
module mem_arbiter
  import ca_pkg::*;
#(
  parameter int unsigned B      = 128,
  parameter int unsigned ADDR_W = 27
) (
  input  logic              clk,
  input  logic              rst,
  // graphics data loader (reads)
  input  logic              ld_req,
  input  logic [ADDR_W-1:0] ld_addr,
  output logic              ld_gnt,
  // write-back (writes)
  input  logic              wb_req,
  input  logic [ADDR_W-1:0] wb_addr,
  input  logic [B-1:0]      wb_data,
  output logic              wb_gnt,
  // memory controller user interface
  output logic              app_en,
  output mem_cmd_e          app_cmd,
  output logic [ADDR_W-1:0] app_addr,
  input  logic              app_rdy,
  output logic [B-1:0]      app_wdf_data,
  output logic              app_wdf_wren,
  output logic              app_wdf_end,
  input  logic              app_wdf_rdy
);
  logic ld_sel, wb_sel;

  // No command leaves while in reset, whatever the requesters show.
  assign ld_sel       = ld_req && !rst;
  assign wb_sel       = !ld_req && wb_req && app_wdf_rdy && !rst;
  assign app_en       = ld_sel || wb_sel;
  assign app_cmd      = ld_req ? MEM_READ : MEM_WRITE;
  assign app_addr     = ld_req ? ld_addr : wb_addr;
  assign app_wdf_data = wb_data;
  assign app_wdf_wren = wb_sel && app_rdy;
  assign app_wdf_end  = wb_sel && app_rdy;
  assign ld_gnt       = ld_sel && app_rdy;
  assign wb_gnt       = wb_sel && app_rdy;

  one_grant: assert property (@(posedge clk) disable iff (rst) !(ld_gnt && wb_gnt))
    else $error("mem_arbiter: two grants in one cycle");
  loader_first: assert property (@(posedge clk) disable iff (rst) ld_req |-> !wb_gnt)
    else $error("mem_arbiter: write-back granted while the loader requests");
endmodule
