// memory_init: loads the initial grid (generation 0) from a host over a
// serial line into memory segment 0, then starts the accelerator.
//
// How it works: a UART receiver (8 data bits, no parity, one stop bit, least
// significant bit first) samples `rx` through a two-flop synchronizer, finds
// the falling edge of the start bit and samples each bit in its middle,
// CLKS_PER_BIT clocks apart. Each byte holds 8/C cells, the first cell in
// the low bits (with C = 4 the low nibble is the cell to the left). Bytes
// are packed into B-bit bursts, first byte in the low bits, which is the
// cell order of a burst in memory. Each full burst is written to word
// address {0, burst index, 000} through a request/grant handshake that
// shares the write port of the memory arbiter. After the Y*BL-th burst
// `done` pulses for one clock and the block ignores the line until reset.
// A byte that ends without a stop bit is dropped and counted in
// `frame_errors`.
//
// Interface and timing: everything runs on `clk`. `req` stays high with
// `addr`/`data` stable until `gnt`; one burst is pending at most, and a new
// byte can complete only after 10 bit times, far longer than a grant takes.
//
// The original loads the grid from a computer over UART before operation;
// the byte format, the bit rate (115200 bit/s at an 81.25 MHz clock, from
// CLKS_PER_BIT = 705) and running it in the memory clock domain instead of
// a separate 100 MHz domain are this design's choices. Reading frames back
// to the host is not part of this block.
module memory_init #(
  parameter int unsigned X            = 1920,
  parameter int unsigned Y            = 1080,
  parameter int unsigned C            = 8,
  parameter int unsigned B            = 128,
  parameter int unsigned ADDR_W       = 27,
  parameter int unsigned CLKS_PER_BIT = 705,
  localparam int unsigned CB          = B / C,
  localparam int unsigned BL          = X / CB,
  localparam int unsigned BYTES       = B / 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rx,
  output logic              req,
  output logic [ADDR_W-1:0] addr,
  output logic [B-1:0]      data,
  input  logic              gnt,
  output logic              done,
  output logic              busy,
  output logic [15:0]       frame_errors
);
  localparam int unsigned DW    = $clog2(CLKS_PER_BIT + 1);
  localparam int unsigned TOTAL = Y * BL;
  localparam int unsigned BIW   = (BYTES <= 2) ? 1 : $clog2(BYTES);
  localparam int unsigned NBW   = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {U_IDLE, U_START, U_DATA, U_STOP} ustate_e;

  logic          rx_s1, rx_s2;
  ustate_e       ust;
  logic [DW-1:0] tick;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic          byte_v;
  logic [7:0]    byte_d;

  logic [BIW-1:0] bidx;
  logic [B-9:0]   pack;
  logic [NBW-1:0] nburst;
  logic           finished;

  // ---------------------------------------------------------------- receiver
  always_ff @(posedge clk) begin
    if (rst) begin
      rx_s1 <= 1'b1; rx_s2 <= 1'b1;
      ust <= U_IDLE; tick <= '0; bitn <= '0; shreg <= '0;
      byte_v <= 1'b0; byte_d <= '0; frame_errors <= '0;
    end else begin
      rx_s1  <= rx;
      rx_s2  <= rx_s1;
      byte_v <= 1'b0;
      case (ust)
        U_IDLE: if (!rx_s2) begin
          ust  <= U_START;
          tick <= DW'(CLKS_PER_BIT / 2);
        end
        U_START: begin
          if (tick != 0) tick <= tick - 1'b1;
          else if (rx_s2) ust <= U_IDLE;          // glitch, not a start bit
          else begin
            ust  <= U_DATA;
            tick <= DW'(CLKS_PER_BIT - 1);
            bitn <= '0;
          end
        end
        U_DATA: begin
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            shreg <= {rx_s2, shreg[7:1]};
            tick  <= DW'(CLKS_PER_BIT - 1);
            if (bitn == 3'd7) ust <= U_STOP;
            bitn <= bitn + 1'b1;
          end
        end
        U_STOP: begin
          if (tick != 0) tick <= tick - 1'b1;
          else begin
            ust <= U_IDLE;
            if (rx_s2) begin
              byte_v <= 1'b1;
              byte_d <= shreg;
            end else begin
              frame_errors <= frame_errors + 1'b1;
            end
          end
        end
        default: ust <= U_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ packer and writer
  always_ff @(posedge clk) begin
    if (rst) begin
      bidx <= '0; pack <= '0; nburst <= '0; finished <= 1'b0;
      req <= 1'b0; data <= '0; done <= 1'b0; busy <= 1'b0;
    end else begin
      done <= 1'b0;
      if (req && gnt) begin
        req <= 1'b0;
        nburst <= nburst + 1'b1;
        if (nburst == NBW'(TOTAL - 1)) begin
          finished <= 1'b1;
          done     <= 1'b1;
          busy     <= 1'b0;
        end
      end
      if (byte_v && !finished) begin
        busy <= 1'b1;
        if (bidx == BIW'(BYTES - 1)) begin
          bidx <= '0;
          req  <= 1'b1;
          data <= {byte_d, pack[B-9:0]};
        end else begin
          pack[bidx*8 +: 8] <= byte_d;
          bidx <= bidx + 1'b1;
        end
      end
    end
  end

  always_comb begin
    addr = '0;
    addr[ADDR_W-2:0] = (ADDR_W - 1)'({nburst, 3'b000});
  end

  req_held: assert property (@(posedge clk) disable iff (rst)
      req && !gnt |=> req && $stable(data) && $stable(addr))
    else $error("memory_init: request dropped before grant");
endmodule
