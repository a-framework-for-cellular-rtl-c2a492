// mux_sync: recirculation-multiplexer synchronizer for a multi-bit value.
//
// The source side samples `sdata` into a holding register and toggles a
// request bit. The request crosses into the destination clock through two
// flip-flops; when the destination sees it change, its recirculation
// multiplexer loads the (by then stable) holding register into `ddata` and
// toggles an acknowledge bit, which crosses back the same way. Only after the
// acknowledge arrives does the source sample again, so the holding register
// never changes while it is being captured. `ddata` therefore shows a
// consistent, slightly old copy of `sdata`, refreshed every few cycles.
// Both resets must be asserted together.
module mux_sync #(
  parameter int unsigned W = 32
) (
  input  logic         sclk,
  input  logic         srst,
  input  logic [W-1:0] sdata,
  input  logic         dclk,
  input  logic         drst,
  output logic [W-1:0] ddata
);
  logic [W-1:0] hold;
  logic         req, ack;
  logic [1:0]   ack_s;     // ack in the source domain
  logic [2:0]   req_d;     // req in the destination domain (2 sync + edge)

  always_ff @(posedge sclk) begin
    if (srst) begin
      hold  <= '0;
      req   <= 1'b0;
      ack_s <= '0;
    end else begin
      ack_s <= {ack_s[0], ack};
      if (ack_s[1] == req) begin
        hold <= sdata;
        req  <= ~req;
      end
    end
  end

  always_ff @(posedge dclk) begin
    if (drst) begin
      req_d <= '0;
      ack   <= 1'b0;
      ddata <= '0;
    end else begin
      req_d <= {req_d[1:0], req};
      if (req_d[2] != req_d[1]) begin
        ddata <= hold;
        ack   <= req_d[1];
      end
    end
  end
endmodule
