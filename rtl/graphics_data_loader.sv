// graphics_data_loader: the only module that reads the grid from external
// memory. Each request from the video timing loads one grid row (BL bursts)
// and hands every returned burst both to the graphics line buffer and to the
// grid lines buffer of the CA engine, so the engine needs no reads of its
// own.
//
// Operation (memory-interface clock):
//  * After `start` (memory initialised) it waits for a request for row 0,
//    then follows the rows of the display, Y per frame.
//  * At the start of every frame it chooses the frame's mode. PROCESS: the
//    rows also feed the CA engine, which computes the next generation. SKIP:
//    display only, used when SPEED > 1 (a new generation every SPEED frames).
//    PRIME (torus only, first frame after start): rows feed the grid lines
//    buffer, which keeps the last rows for the wrap-around and computes
//    nothing.
//  * The read segment (address MSB) flips at the start of the frame after a
//    PROCESS frame; that frame waits until write-back has finished the
//    generation (`wb_gens`). Before a row that feeds the engine it waits for
//    `ca_ready`, so it never overwrites a line that is still needed. Both
//    waits are stalls that, at the default sizes and clocks, do not occur.
//  * Read data return in order; burst k of row r goes to graphics buffer
//    half r mod 2, word k.
// The 75% request point and the alternation of segments follow the original;
// the frame modes, stalls and ping-pong graphics buffer are this design's.
module graphics_data_loader #(
  parameter int unsigned Y      = 1080,
  parameter int unsigned BL     = 120,
  parameter int unsigned B      = 128,
  parameter int unsigned ADDR_W = 27,
  parameter int unsigned SPEED  = 1,
  parameter bit          TORUS  = 1'b1,
  localparam int unsigned AW    = (BL <= 2) ? 1 : $clog2(BL)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  // row requests from the video timing, already in this clock domain
  input  logic              line_req,
  input  logic              line_req_row0,
  // memory read requests (to the arbiter) and returned data
  output logic              req,
  output logic [ADDR_W-1:0] addr,
  input  logic              gnt,
  input  logic [B-1:0]      rd_data,
  input  logic              rd_valid,
  // graphics line buffer write port
  output logic              gfx_we,
  output logic [AW:0]       gfx_addr,
  output logic [B-1:0]      gfx_data,
  // grid lines buffer write port
  output logic              ca_valid,
  output logic [B-1:0]      ca_data,
  output logic              ca_prime,
  input  logic              ca_ready,
  // write-back progress
  input  logic [31:0]       wb_gens,
  // status
  output logic [31:0]       frames,
  output logic [31:0]       gens_started,
  output logic [31:0]       stall_ca,
  output logic [31:0]       stall_wb,
  output logic              missed_req
);
  typedef enum logic [1:0] {M_SKIP, M_PROCESS, M_PRIME} mode_e;
  typedef enum logic [2:0] {L_IDLE, L_WAIT, L_FRAME, L_CHECK, L_ISSUE, L_RECV} lstate_e;

  localparam int unsigned FB  = Y * BL;
  localparam int unsigned FBW = $clog2(FB + 1);
  localparam int unsigned YW  = $clog2(Y + 1);
  localparam int unsigned SW  = $clog2(SPEED + 1);

  lstate_e        st;
  mode_e          mode;
  logic           seg;
  logic           synced;      // first row-0 request seen
  logic           first;       // next frame is the first one
  logic           pend;        // a request arrived and is not yet served
  logic [YW-1:0]  row;
  logic [FBW-1:0] row_base;    // row * BL
  logic [AW-1:0]  issued, recvd;
  logic [SW-1:0]  sp;

  always_comb begin
    addr = ADDR_W'({row_base + FBW'(issued), 3'b000});
    addr[ADDR_W-1] = seg;
  end
  assign req      = (st == L_ISSUE);
  assign gfx_we   = rd_valid;
  assign gfx_addr = {row[0], recvd};
  assign gfx_data = rd_data;
  assign ca_valid = rd_valid && (mode != M_SKIP);
  assign ca_data  = rd_data;
  assign ca_prime = (mode == M_PRIME);

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= L_IDLE;
      mode         <= M_SKIP;
      seg          <= 1'b0;
      synced       <= 1'b0;
      first        <= 1'b1;
      pend         <= 1'b0;
      row          <= '0;
      row_base     <= '0;
      issued       <= '0;
      recvd        <= '0;
      sp           <= '0;
      frames       <= '0;
      gens_started <= '0;
      stall_ca     <= '0;
      stall_wb     <= '0;
      missed_req   <= 1'b0;
    end else begin
      if (line_req && start && (synced || line_req_row0)) begin
        synced <= 1'b1;
        if (pend) missed_req <= 1'b1;
        pend <= 1'b1;
      end
      case (st)
        L_IDLE: if (start) st <= L_WAIT;
        L_WAIT: if (pend) begin
          pend <= 1'b0;
          st   <= (row == '0) ? L_FRAME : L_CHECK;
        end
        L_FRAME: begin
          // choose the mode of the new frame; after a PROCESS frame wait for
          // the generation to be in memory, then read it
          if (!first && mode == M_PROCESS && wb_gens != gens_started) begin
            stall_wb <= stall_wb + 1;
          end else begin
            if (!first && mode == M_PROCESS) seg <= ~seg;
            first <= 1'b0;
            if (first && TORUS) begin
              mode <= M_PRIME;
            end else if (sp == SW'(SPEED - 1)) begin
              mode <= M_PROCESS;
              sp   <= '0;
              gens_started <= gens_started + 1;
            end else begin
              mode <= M_SKIP;
              sp   <= sp + 1'b1;
            end
            st <= L_CHECK;
          end
        end
        L_CHECK: begin
          if (mode != M_SKIP && !ca_ready) stall_ca <= stall_ca + 1;
          else begin
            issued <= '0;
            recvd  <= '0;
            st     <= L_ISSUE;
          end
        end
        L_ISSUE: if (gnt) begin
          if (issued == AW'(BL - 1)) st <= L_RECV;
          else issued <= issued + 1'b1;
        end
        default: ; // L_RECV
      endcase
      if (rd_valid) begin
        if (recvd == AW'(BL - 1)) begin
          recvd <= '0;
          st    <= L_WAIT;
          if (row == YW'(Y - 1)) begin
            row      <= '0;
            row_base <= '0;
            frames   <= frames + 1;
          end else begin
            row      <= row + 1'b1;
            row_base <= row_base + FBW'(BL);
          end
        end else begin
          recvd <= recvd + 1'b1;
        end
      end
    end
  end

  data_only_when_reading: assert property (@(posedge clk) disable iff (rst)
      rd_valid |-> (st == L_ISSUE || st == L_RECV))
    else $error("graphics_data_loader: unexpected read data");
endmodule
