// writeback_fifo: packs the engine's output cells into memory bursts and
// carries them from the engine clock to the memory-interface clock.
//
// Write side (engine clock): each `cell_valid` adds the C-bit `cell_in`; cell k
// of a burst occupies bits [k*C +: C], so cell 0 is the least significant,
// as in the grid's memory layout. When CB = B/C cells have been gathered the
// burst enters a DEPTH-entry asynchronous FIFO with Gray-coded pointers.
// Read side (memory clock): `rd_data` shows the oldest burst while `rd_empty`
// is low (first-word fall-through); `rd_en` removes it.
// `overflow` is sticky and reports a burst lost because the FIFO was full.
// The original only states that the FIFO parcels cells into bursts; its
// depth (64 bursts here) and pointer scheme are this design's choice.
module writeback_fifo #(
  parameter int unsigned C     = 8,
  parameter int unsigned B     = 128,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned CB   = B / C
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic [C-1:0]  cell_in,
  input  logic          cell_valid,
  output logic          overflow,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rd_en,
  output logic [B-1:0]  rd_data,
  output logic          rd_empty
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned OW = (CB <= 2) ? 1 : $clog2(CB);

  logic [B-1:0] mem [DEPTH];

  // ---------------- packing (wclk) ----------------
  logic [CB-1:0][C-1:0] pack;
  logic [OW-1:0]        pidx;
  logic                 push;
  logic [B-1:0]         push_data;

  always_comb begin
    push_data = pack;
    push_data[B-1 -: C] = cell_in;
    push = cell_valid && (pidx == OW'(CB - 1));
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      pidx <= '0;
    end else if (cell_valid) begin
      pack[pidx] <= cell_in;
      pidx <= (pidx == OW'(CB - 1)) ? '0 : pidx + 1'b1;
    end
  end

  // ---------------- pointers ----------------
  logic [PW:0] wbin, wgray, rbin, rgray;
  logic [PW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic        full;

  function automatic logic [PW:0] bin2gray(logic [PW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign full = (wgray == {~rgray_w2[PW:PW-1], rgray_w2[PW-2:0]});

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
      overflow <= 1'b0;
    end else begin
      rgray_w1 <= rgray; rgray_w2 <= rgray_w1;
      if (push) begin
        if (full) begin
          overflow <= 1'b1;
        end else begin
          mem[wbin[PW-1:0]] <= push_data;
          wbin  <= wbin + 1'b1;
          wgray <= bin2gray(wbin + 1'b1);
        end
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray; wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[PW-1:0]];

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("writeback_fifo: DEPTH must be a power of two >= 4");
endmodule
