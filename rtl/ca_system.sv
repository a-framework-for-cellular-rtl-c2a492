// ca_system: real-time cellular-automaton accelerator with Full-HD output.
//
// The grid (X x Y cells of C bits) lives twice in external DDR memory: the
// current generation in one segment, the next one being written into the
// other. The video timing paces everything. Once per screen line, at 75% of
// the visible part, the graphics data loader reads one grid row. That row
// goes to the graphics line buffer for display and, in the same pass, into
// the grid lines buffer, which keeps the last N rows and feeds the CA engine
// one N-cell column per engine clock. The engine produces one new cell per
// clock; the cells are packed into bursts by the write-back FIFO and written
// to the other segment by write-back, which yields the memory to the loader
// whenever both want it. A whole generation is thus computed while one frame
// is displayed, each cell is read from and written to DDR exactly once, and
// the N x N neighbourhood comes from on-chip RAM.
//
// Clock domains: `ui_clk` (memory controller user interface, 81.25 MHz in
// the original), `eng_clk` (engine and buffer reader, 200 MHz) and
// `pix_clk` (148.5 MHz pixel clock). Each has its own synchronous reset.
// The clock generators and the DDR controller are outside this module: its
// `app_*` ports connect to the user interface of the memory controller (one
// 128-bit burst per command; write data travel with the write command).
// `start` (ui_clk, held high) tells that the initial generation is in
// segment 0. The built-in serial loader (`uart_rx`, 8N1) does the same once
// it has written the whole grid there; `loading` is high meanwhile, and
// `error` also reports serial framing errors.
// Lint lists a few sub-module outputs as unused here (`frame_start`,
// `gens_started`, `wb_seg`, `rd_lines`): they are status values that the
// sub-modules provide for observation and testing, and this top does not
// need them.
// Module-level structure follows the original; cross-domain handshakes,
// frame modes and status outputs are this design's own.
module ca_system
  import ca_pkg::*;
#(
  parameter int unsigned X          = 1920,
  parameter int unsigned Y          = 1080,
  parameter int unsigned C          = 8,
  parameter int unsigned N          = 29,
  parameter int unsigned B          = 128,
  parameter int unsigned ADDR_W     = 27,
  parameter grid_e       GRID       = GRID_TORUS,
  parameter rule_e       RULE       = RULE_HODGEPODGE,
  parameter bit          WEIGHTED   = 1'b1,
  parameter int unsigned HP_K       = 5,
  parameter int unsigned HP_G       = 105,
  parameter int unsigned GH_THRESH  = 6,
  parameter palette_e    PALETTE    = PAL_WINDOWS,
  parameter int unsigned SPEED      = 1,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned UART_CLKS_PER_BIT = 705,
  parameter int unsigned H_FP       = 88,
  parameter int unsigned H_SYNC     = 44,
  parameter int unsigned H_BP       = 148,
  parameter int unsigned V_FP       = 4,
  parameter int unsigned V_SYNC     = 5,
  parameter int unsigned V_BP       = 36
) (
  input  logic              ui_clk,
  input  logic              ui_rst,
  input  logic              eng_clk,
  input  logic              eng_rst,
  input  logic              pix_clk,
  input  logic              pix_rst,
  input  logic              start,
  input  logic              uart_rx,
  output logic              loading,
  // memory controller user interface
  output logic              app_en,
  output logic [2:0]        app_cmd,
  output logic [ADDR_W-1:0] app_addr,
  input  logic              app_rdy,
  output logic [B-1:0]      app_wdf_data,
  output logic              app_wdf_wren,
  output logic              app_wdf_end,
  input  logic              app_wdf_rdy,
  input  logic [B-1:0]      app_rd_data,
  input  logic              app_rd_data_valid,
  // VGA
  output logic              vga_hsync,
  output logic              vga_vsync,
  output logic [11:0]       vga_rgb,
  // status (ui_clk)
  output logic [31:0]       generations,
  output logic [31:0]       frames,
  output logic [31:0]       stall_ca,
  output logic [31:0]       stall_wb,
  output logic              error
);
  localparam int unsigned CB      = B / C;
  localparam int unsigned BL      = X / CB;
  localparam int unsigned AW      = (BL <= 2) ? 1 : $clog2(BL);
  localparam int unsigned H_TOTAL = X + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = Y + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW      = $clog2(H_TOTAL);
  localparam int unsigned VW      = $clog2(V_TOTAL);

  // ---------------- video timing (pix_clk) ----------------
  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic          active, hsync, vsync, load_req, load_row0, frame_start;

  fullhd_controller #(
    .H_ACTIVE(X), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(Y), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_video (
    .clk(pix_clk), .rst(pix_rst), .hcount(hcount), .vcount(vcount),
    .active(active), .hsync(hsync), .vsync(vsync), .load_req(load_req),
    .load_row_zero(load_row0), .frame_start(frame_start));

  // Row requests cross to ui_clk as a toggle; the row-zero flag is held
  // stable for a whole line, long after the toggle has been seen.
  logic       req_tog, row0_hold;
  logic [2:0] req_tog_s;
  logic [1:0] row0_s;
  logic       line_req_ui;

  always_ff @(posedge pix_clk) begin
    if (pix_rst) begin
      req_tog   <= 1'b0;
      row0_hold <= 1'b0;
    end else if (load_req) begin
      req_tog   <= ~req_tog;
      row0_hold <= load_row0;
    end
  end

  always_ff @(posedge ui_clk) begin
    if (ui_rst) begin
      req_tog_s <= '0;
      row0_s    <= '0;
    end else begin
      req_tog_s <= {req_tog_s[1:0], req_tog};
      row0_s    <= {row0_s[0], row0_hold};
    end
  end
  assign line_req_ui = req_tog_s[2] ^ req_tog_s[1];

  // ---------------- memory side (ui_clk) ----------------
  logic              ld_req, ld_gnt, wb_req, wb_gnt;
  logic [ADDR_W-1:0] ld_addr, wb_addr;
  logic [B-1:0]      wb_data;
  logic              in_req, in_gnt, in_done, mw_req, mw_gnt, go;
  logic [ADDR_W-1:0] in_addr, mw_addr;
  logic [B-1:0]      in_data, mw_data;
  logic [15:0]       in_frame_errors;

  // Initial grid over the serial line; it shares the arbiter's write port
  // with write-back, which has nothing to write before the first frame.
  memory_init #(
    .X(X), .Y(Y), .C(C), .B(B), .ADDR_W(ADDR_W),
    .CLKS_PER_BIT(UART_CLKS_PER_BIT)
  ) u_init (
    .clk(ui_clk), .rst(ui_rst), .rx(uart_rx), .req(in_req), .addr(in_addr),
    .data(in_data), .gnt(in_gnt), .done(in_done), .busy(loading),
    .frame_errors(in_frame_errors));

  // `start` is a level; the loader's `done` is a pulse, so remember it
  logic loaded;
  always_ff @(posedge ui_clk) begin
    if (ui_rst)       loaded <= 1'b0;
    else if (in_done) loaded <= 1'b1;
  end
  assign go      = start || loaded;
  assign mw_req  = in_req || wb_req;
  assign mw_addr = in_req ? in_addr : wb_addr;
  assign mw_data = in_req ? in_data : wb_data;
  assign in_gnt  = in_req && mw_gnt;
  assign wb_gnt  = !in_req && mw_gnt;
  logic              gfx_we;
  logic [AW:0]       gfx_addr;
  logic [B-1:0]      gfx_data;
  logic              ca_wvalid, ca_prime, ca_ready, ca_overrun;
  logic [B-1:0]      ca_wdata;
  logic [31:0]       wb_gens, gens_started;
  logic              fifo_empty, fifo_rd_en, fifo_overflow, missed_req, wb_seg;
  logic [B-1:0]      fifo_data;
  mem_cmd_e          cmd;

  graphics_data_loader #(
    .Y(Y), .BL(BL), .B(B), .ADDR_W(ADDR_W), .SPEED(SPEED),
    .TORUS(GRID == GRID_TORUS)
  ) u_loader (
    .clk(ui_clk), .rst(ui_rst), .start(go),
    .line_req(line_req_ui), .line_req_row0(row0_s[1]),
    .req(ld_req), .addr(ld_addr), .gnt(ld_gnt),
    .rd_data(app_rd_data), .rd_valid(app_rd_data_valid),
    .gfx_we(gfx_we), .gfx_addr(gfx_addr), .gfx_data(gfx_data),
    .ca_valid(ca_wvalid), .ca_data(ca_wdata), .ca_prime(ca_prime),
    .ca_ready(ca_ready), .wb_gens(wb_gens),
    .frames(frames), .gens_started(gens_started), .stall_ca(stall_ca),
    .stall_wb(stall_wb), .missed_req(missed_req));

  write_back #(.Y(Y), .BL(BL), .B(B), .ADDR_W(ADDR_W)) u_wb (
    .clk(ui_clk), .rst(ui_rst), .fifo_empty(fifo_empty),
    .fifo_data(fifo_data), .fifo_rd_en(fifo_rd_en), .req(wb_req),
    .addr(wb_addr), .wdata(wb_data), .gnt(wb_gnt), .seg(wb_seg),
    .gens_written(wb_gens));

  mem_arbiter #(.B(B), .ADDR_W(ADDR_W)) u_arb (
    .clk(ui_clk), .rst(ui_rst),
    .ld_req(ld_req), .ld_addr(ld_addr), .ld_gnt(ld_gnt),
    .wb_req(mw_req), .wb_addr(mw_addr), .wb_data(mw_data), .wb_gnt(mw_gnt),
    .app_en(app_en), .app_cmd(cmd), .app_addr(app_addr), .app_rdy(app_rdy),
    .app_wdf_data(app_wdf_data), .app_wdf_wren(app_wdf_wren),
    .app_wdf_end(app_wdf_end), .app_wdf_rdy(app_wdf_rdy));
  assign app_cmd = cmd;

  // ---------------- CA datapath (eng_clk) ----------------
  logic [N-1:0][C-1:0] col;
  logic                col_valid;
  logic [C-1:0]        new_cell;
  logic                new_valid;
  logic [31:0]         rd_lines;

  grid_lines_buffer #(
    .X(X), .Y(Y), .C(C), .N(N), .B(B), .GRID(GRID)
  ) u_glb (
    .wr_clk(ui_clk), .wr_rst(ui_rst), .wr_valid(ca_wvalid), .wr_data(ca_wdata),
    .wr_prime(ca_prime), .wr_ready(ca_ready), .wr_overrun(ca_overrun),
    .rd_clk(eng_clk), .rd_rst(eng_rst), .col_out(col), .col_valid(col_valid),
    .cap_cell(new_cell), .cap_valid(new_valid), .rd_lines(rd_lines));

  ca_engine #(
    .N(N), .C(C), .RULE(RULE), .WEIGHTED(WEIGHTED), .HP_K(HP_K),
    .HP_G(HP_G), .GH_THRESH(GH_THRESH)
  ) u_engine (
    .clk(eng_clk), .rst(eng_rst), .col_in(col), .valid_in(col_valid),
    .cell_out(new_cell), .valid_out(new_valid));

  writeback_fifo #(.C(C), .B(B), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(eng_clk), .wrst(eng_rst), .cell_in(new_cell), .cell_valid(new_valid),
    .overflow(fifo_overflow), .rclk(ui_clk), .rrst(ui_rst), .rd_en(fifo_rd_en),
    .rd_data(fifo_data), .rd_empty(fifo_empty));

  // ---------------- display (pix_clk) ----------------
  logic [C-1:0] pix_cell;
  logic         pix_active, pix_hs, pix_vs;

  graphics_line_buffer #(.X(X), .C(C), .B(B), .HW(HW), .VW(VW)) u_gfx (
    .wclk(ui_clk), .we(gfx_we), .waddr(gfx_addr), .wdata(gfx_data),
    .pclk(pix_clk), .hcount(hcount), .vcount(vcount), .active(active),
    .hsync(hsync), .vsync(vsync), .cell_out(pix_cell),
    .active_out(pix_active), .hsync_out(pix_hs), .vsync_out(pix_vs));

  color_palette #(.C(C), .PALETTE(PALETTE)) u_pal (
    .clk(pix_clk), .cell_in(pix_cell), .active(pix_active), .rgb(vga_rgb));

  always_ff @(posedge pix_clk) begin
    vga_hsync <= pix_hs;
    vga_vsync <= pix_vs;
  end

  // ---------------- status ----------------
  logic fifo_overflow_ui;
  always_ff @(posedge ui_clk) fifo_overflow_ui <= fifo_overflow;  // sticky flag
  assign generations = wb_gens;
  assign error       = ca_overrun || fifo_overflow_ui || missed_req ||
                       (in_frame_errors != '0);
endmodule
