// grid_lines_buffer: on-chip line store that turns one pass over the grid in
// external memory into a stream of N-cell neighbourhood columns, one per
// engine clock.
//
// How it works (the structure follows the original design; the control
// details are this implementation's own):
//  * N+1 line RAMs ("slots") form a ring. Grid line g of the stream (counted
//    over all frames) is written into slot g mod (N+1), so while line r is
//    processed the N lines r-H..r+H (H = (N-1)/2) stay resident and the
//    spare slot takes the next incoming line. Rotating the slot index plays
//    the role of "shifting the window down" one line.
//  * The writer runs on the memory-interface clock and stores one burst
//    (B bits, CB = B/C cells) per `wr_valid`. The reader runs on the engine
//    clock. They exchange their line counters through recirculation-mux
//    synchronizers: the reader starts line r once lines up to r+H have been
//    written, and the writer reports `wr_ready` for a new line only once the
//    slot it will overwrite has been drained.
//  * For every line the reader sends X+N-1 columns: H columns before the
//    first cell and H after the last one pre-load and flush the engine
//    window. Outside the grid those columns are zero (rectangular grid) or
//    the cells of the opposite edge (cylinder and torus). `col_valid` marks
//    the columns whose centre cell is a real grid cell.
//  * Torus only: lines above line 0 are the last H lines of the same
//    generation. They are captured from the engine's output stream
//    (`cap_*`) while the previous generation is computed, and kept in H
//    "top poloidal" RAMs. Lines below line Y-1 are the first H lines, kept in
//    H "bottom poloidal" RAMs as they are loaded at the start of the frame.
//    Total storage is 2N lines, as in the original.
//  * Priming (torus only): the first frame after start-up has no previous
//    generation to capture from. In a frame written with `wr_prime` set the
//    reader computes nothing and copies the last H lines into the top
//    poloidal RAMs instead. This step is this implementation's addition.
//
// Timing: a column leaves `col_out` three engine clocks after its address is
// formed; a line takes X+N-1 column clocks plus about 6 clocks of control.
module grid_lines_buffer
  import ca_pkg::*;
#(
  parameter int unsigned X    = 1920,
  parameter int unsigned Y    = 1080,
  parameter int unsigned C    = 8,
  parameter int unsigned N    = 29,
  parameter int unsigned B    = 128,
  parameter grid_e       GRID = GRID_TORUS,
  localparam int unsigned CB  = B / C,
  localparam int unsigned BL  = X / CB,
  localparam int unsigned AW  = (BL <= 2) ? 1 : $clog2(BL)
) (
  // writer side, memory-interface clock
  input  logic                wr_clk,
  input  logic                wr_rst,
  input  logic                wr_valid,
  input  logic [B-1:0]        wr_data,
  input  logic                wr_prime,   // level: the frame being written only primes
  output logic                wr_ready,   // a new line may be written
  output logic                wr_overrun, // sticky: a line arrived while not ready
  // reader side, engine clock
  input  logic                rd_clk,
  input  logic                rd_rst,
  output logic [N-1:0][C-1:0] col_out,
  output logic                col_valid,
  input  logic [C-1:0]        cap_cell,   // engine output stream (torus capture)
  input  logic                cap_valid,
  output logic [31:0]         rd_lines    // lines processed since reset
);
  localparam int unsigned H     = (N - 1) / 2;
  localparam int unsigned NS    = N + 1;
  localparam bit          TOR   = (GRID == GRID_TORUS);
  localparam bit          WRAPX = (GRID != GRID_RECT);
  localparam int unsigned NP    = TOR ? H : 1;           // poloidal RAMs per side
  localparam int unsigned NSRC  = NS + 2 * NP;
  localparam int unsigned SW    = $clog2(NSRC);
  localparam int unsigned OW    = (CB <= 2) ? 1 : $clog2(CB);
  localparam int unsigned SLW   = $clog2(NS);
  localparam int unsigned YW    = $clog2(Y + 1);
  localparam int unsigned XW    = $clog2(X + N + 1);

  // ------------------------------------------------------------------
  // Writer (wr_clk)
  // ------------------------------------------------------------------
  logic [31:0]    w_lines;      // lines completely written, all frames
  logic [SLW-1:0] w_slot;       // slot of the line being written
  logic [YW-1:0]  w_row;        // row of that line within its frame
  logic [AW-1:0]  w_addr;       // burst within the line
  logic           w_prime;      // mode of the frame being written
  logic [31:0]    p_lines_w;    // reader's processed-line count, synchronized
  logic           w_cond;

  always_comb begin
    // The slot to be overwritten holds line w_lines-N-1, last needed by line
    // w_lines-H-2, so lines up to that one must be finished. The first H
    // lines of a frame also overwrite the bottom poloidal RAMs, still needed
    // until the previous frame is finished.
    w_cond = (p_lines_w + 32'(H) + 1 >= w_lines);
    if (32'(w_row) < 32'(H) && p_lines_w + 32'(w_row) < w_lines)
      w_cond = 1'b0;
  end
  assign wr_ready = w_cond && (w_addr == '0);

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      w_lines    <= '0;
      w_slot     <= '0;
      w_row      <= '0;
      w_addr     <= '0;
      w_prime    <= 1'b0;
      wr_overrun <= 1'b0;
    end else if (wr_valid) begin
      if (w_addr == '0 && !w_cond) wr_overrun <= 1'b1;
      if (w_addr == '0 && w_row == '0) w_prime <= wr_prime;
      if (w_addr == AW'(BL - 1)) begin
        w_addr  <= '0;
        w_lines <= w_lines + 1;
        w_slot  <= (w_slot == SLW'(NS - 1)) ? '0 : w_slot + 1'b1;
        w_row   <= (w_row == YW'(Y - 1)) ? '0 : w_row + 1'b1;
      end else begin
        w_addr <= w_addr + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // Counter exchange between the domains
  // ------------------------------------------------------------------
  logic [32:0] w_info_r;        // {prime, lines written} seen by the reader
  logic [31:0] p_lines;         // reader's processed-line count

  mux_sync #(.W(33)) u_sync_w2r (
    .sclk(wr_clk), .srst(wr_rst), .sdata({w_prime, w_lines}),
    .dclk(rd_clk), .drst(rd_rst), .ddata(w_info_r));

  mux_sync #(.W(32)) u_sync_r2w (
    .sclk(rd_clk), .srst(rd_rst), .sdata(p_lines),
    .dclk(wr_clk), .drst(wr_rst), .ddata(p_lines_w));

  assign rd_lines = p_lines;

  // ------------------------------------------------------------------
  // Storage
  // ------------------------------------------------------------------
  logic [AW-1:0] r_addr;                 // read address, all RAMs
  logic [B-1:0]  ram_q [NSRC];           // ring, top poloidal, bottom poloidal
  logic          top_we;
  logic [AW-1:0] top_waddr;
  logic [B-1:0]  top_wdata;
  logic [$clog2(NP+1)-1:0] top_sel;

  for (genvar s = 0; s < NS; s++) begin : g_ring
    line_ram #(.DW(B), .DEPTH(BL)) u_ram (
      .wclk(wr_clk), .we(wr_valid && w_slot == SLW'(s)), .waddr(w_addr),
      .wdata(wr_data), .rclk(rd_clk), .raddr(r_addr), .rdata(ram_q[s]));
  end

  if (TOR) begin : g_pol
    for (genvar p = 0; p < NP; p++) begin : g_line
      // Top poloidal: last H lines of the generation, written on rd_clk.
      line_ram #(.DW(B), .DEPTH(BL)) u_top (
        .wclk(rd_clk), .we(top_we && top_sel == p), .waddr(top_waddr),
        .wdata(top_wdata), .rclk(rd_clk), .raddr(r_addr),
        .rdata(ram_q[NS + p]));
      // Bottom poloidal: first H lines of the frame, written on wr_clk.
      line_ram #(.DW(B), .DEPTH(BL)) u_bot (
        .wclk(wr_clk), .we(wr_valid && w_row == YW'(p)), .waddr(w_addr),
        .wdata(wr_data), .rclk(rd_clk), .raddr(r_addr),
        .rdata(ram_q[NS + NP + p]));
    end
  end else begin : g_nopol
    for (genvar p = NS; p < NSRC; p++) begin : g_zero
      assign ram_q[p] = '0;
    end
  end

  // ------------------------------------------------------------------
  // Reader (rd_clk)
  // ------------------------------------------------------------------
  typedef enum logic [2:0] {R_WAIT, R_SETUP, R_STREAM, R_COPY, R_DRAIN, R_DONE} rstate_e;
  rstate_e        rs;
  logic [SLW-1:0] r_slot;        // slot of the line being processed
  logic [YW-1:0]  r_row;         // its row in the frame
  logic           r_prime;       // mode of the frame being read
  logic [XW-1:0]  r_k;           // column counter, 0 .. X+N-2
  logic [1:0]     r_drain;
  logic [SW-1:0]  src   [N];     // source RAM of each window row
  logic [N-1:0]   src_z;         // window row lies outside the grid: zeros
  logic           cur_prime;
  logic [31:0]    need;

  // stream pipeline
  logic           s0_v, s0_on, s0_pad;
  logic [OW-1:0]  s0_off;
  logic           s1_v, s1_on, s1_pad;
  logic [OW-1:0]  s1_off;
  // copy pipeline
  logic           c0_v, c1_v;
  logic [AW-1:0]  c0_a, c1_a;

  assign cur_prime = (r_row == '0) ? w_info_r[32] : r_prime;

  always_comb begin
    if (TOR && cur_prime)
      need = p_lines + 1;
    else if (32'(r_row) + 32'(H) + 1 >= 32'(Y))
      need = p_lines - 32'(r_row) + 32'(Y);
    else
      need = p_lines + 32'(H) + 1;
  end

  // Column address for the stream: x = k - H, wrapped or padded.
  logic signed [XW:0] sx;
  logic [XW-1:0]      wx;
  logic               xin;
  always_comb begin
    sx  = $signed({1'b0, r_k}) - (XW+1)'(H);
    xin = (sx >= 0) && (sx < (XW+1)'(X));
    if (sx < 0)                 wx = XW'(sx + (XW+1)'(X));
    else if (sx >= (XW+1)'(X))  wx = XW'(sx - (XW+1)'(X));
    else                        wx = XW'(sx);
  end

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rs      <= R_WAIT;
      p_lines <= '0;
      r_slot  <= '0;
      r_row   <= '0;
      r_prime <= 1'b0;
      r_k     <= '0;
      r_drain <= '0;
      r_addr  <= '0;
      s0_v <= 1'b0; s0_on <= 1'b0; s0_pad <= 1'b0; s0_off <= '0;
      s1_v <= 1'b0; s1_on <= 1'b0; s1_pad <= 1'b0; s1_off <= '0;
      c0_v <= 1'b0; c0_a <= '0; c1_v <= 1'b0; c1_a <= '0;
      for (int i = 0; i < N; i++) src[i] <= '0;
      src_z <= '0;
    end else begin
      s0_on <= 1'b0;
      s0_v  <= 1'b0;
      c0_v  <= 1'b0;
      c1_v   <= c0_v;   c1_a   <= c0_a;
      s1_v   <= s0_v;   s1_on  <= s0_on;
      s1_pad <= s0_pad; s1_off <= s0_off;
      case (rs)
        R_WAIT: begin
          if (w_info_r[31:0] >= need) begin
            r_prime <= cur_prime;
            if (TOR && cur_prime) begin
              r_k <= '0;
              rs  <= (32'(r_row) + 32'(H) >= 32'(Y)) ? R_COPY : R_DONE;
            end else begin
              rs <= R_SETUP;
            end
          end
        end
        R_SETUP: begin
          for (int i = 0; i < N; i++) begin
            int q;
            q = int'(r_row) - int'(H) + i;
            if (q < 0) begin
              src[i]   <= SW'(NS + (q + int'(H)));
              src_z[i] <= !TOR;
            end else if (q >= int'(Y)) begin
              src[i]   <= SW'(NS + NP + (q - int'(Y)));
              src_z[i] <= !TOR;
            end else begin
              src[i]   <= SW'((int'(r_slot) + i - int'(H) + int'(NS)) % int'(NS));
              src_z[i] <= 1'b0;
            end
          end
          r_k <= '0;
          rs  <= R_STREAM;
        end
        R_STREAM: begin
          r_addr <= AW'(wx / XW'(CB));
          s0_off <= OW'(wx % XW'(CB));
          s0_pad <= !xin && !WRAPX;
          s0_v   <= xin;
          s0_on  <= 1'b1;
          if (r_k == XW'(X + N - 2)) begin
            r_drain <= '0;
            rs      <= R_DRAIN;
          end
          r_k <= r_k + 1'b1;
        end
        R_COPY: begin
          r_addr <= AW'(r_k);
          c0_a   <= AW'(r_k);
          c0_v   <= 1'b1;
          if (r_k == XW'(BL - 1)) begin
            r_drain <= '0;
            rs      <= R_DRAIN;
          end
          r_k <= r_k + 1'b1;
        end
        R_DRAIN: begin
          r_drain <= r_drain + 1'b1;
          if (r_drain == 2'd2) rs <= R_DONE;
        end
        default: begin // R_DONE
          p_lines <= p_lines + 1;
          r_slot  <= (r_slot == SLW'(NS - 1)) ? '0 : r_slot + 1'b1;
          r_row   <= (r_row == YW'(Y - 1)) ? '0 : r_row + 1'b1;
          rs      <= R_WAIT;
        end
      endcase
    end
  end

  // Column assembly: pick each window row's RAM, then the cell in the burst.
  always_ff @(posedge rd_clk) begin
    for (int i = 0; i < N; i++) begin
      if (!s1_on || s1_pad || src_z[i])
        col_out[i] <= '0;
      else
        col_out[i] <= ram_q[src[i]][s1_off*C +: C];
    end
    col_valid <= rd_rst ? 1'b0 : s1_v;
  end

  // ------------------------------------------------------------------
  // Top poloidal capture (torus): copy in a priming frame, otherwise pack
  // the engine's output cells into bursts for the last H lines.
  // ------------------------------------------------------------------
  logic [XW-1:0]       cap_x;
  logic [YW-1:0]       cap_row;
  logic [CB-1:0][C-1:0] cap_pack;

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      cap_x   <= '0;
      cap_row <= '0;
    end else if (cap_valid) begin
      cap_pack[cap_x % XW'(CB)] <= cap_cell;
      if (cap_x == XW'(X - 1)) begin
        cap_x   <= '0;
        cap_row <= (cap_row == YW'(Y - 1)) ? '0 : cap_row + 1'b1;
      end else begin
        cap_x <= cap_x + 1'b1;
      end
    end
  end

  always_comb begin
    top_we    = 1'b0;
    top_waddr = c1_a;
    top_wdata = ram_q[SW'(r_slot)];
    top_sel   = ($clog2(NP+1))'(32'(r_row) + 32'(H) - 32'(Y));
    if (c1_v) begin
      top_we = TOR;
    end else if (cap_valid && (cap_x % XW'(CB)) == XW'(CB - 1) &&
                 32'(cap_row) + 32'(H) >= 32'(Y)) begin
      top_we    = TOR;
      top_waddr = AW'(cap_x / XW'(CB));
      top_sel   = ($clog2(NP+1))'(32'(cap_row) + 32'(H) - 32'(Y));
      top_wdata = cap_pack;
      top_wdata[B-1 -: C] = cap_cell;
    end
  end

  // synthesis-neutral checks
  initial begin
    assert (CB * C == B) else $error("burst width must be a multiple of the cell width");
    assert (BL * CB == X) else $error("grid width must be a whole number of bursts");
    assert (N % 2 == 1 && N >= 3) else $error("neighbourhood size must be odd and >= 3");
    assert (Y > 2 * H) else $error("grid must be taller than the neighbourhood");
  end
endmodule
