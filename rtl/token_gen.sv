// token_gen: acknowledge-token generator.
//
// Divides the bit clock (250 MHz) by DIV = 14 into token periods of 17.86 MHz.
// At the start of each period it samples the synchronised root request (rq);
// if a request is present the token is active for the first ACTIVE_TICKS bit
// clocks of the period and inactive for the rest, which is the bus-access
// frame. The token active time is also the window in which a channel that
// has finished hands the token on to the next one. Without a request no
// token is issued. frame_last marks the last bit clock of an access frame
// that followed a token, when the data on the bus is to be latched.
//
// The period and the 82 % limit on the inactive share follow the design
// description; generating the token from a divided bit clock and the
// 3-of-14 split (78.6 % inactive) are this design's choices. tok comes from
// a flip-flop, so it is glitch-free. Synchronous to clk, asynchronous
// active-low reset.
`timescale 1ns/1ps
module token_gen #(
  parameter int unsigned DIV          = edward_pkg::TOK_DIV_DEF,
  parameter int unsigned ACTIVE_TICKS = edward_pkg::TOK_ACTIVE_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rq,          // synchronised root request
  output logic tok,         // token, active high
  output logic frame_last,  // last bit clock of an access frame
  output logic period_end   // last bit clock of every period
);
  localparam int unsigned TW = $clog2(DIV);

  logic [TW-1:0] tick;
  logic          tok_en;     // a token was issued this period

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick   <= '0;
      tok_en <= 1'b0;
      tok    <= 1'b0;
    end else if (tick == TW'(DIV - 1)) begin
      tick   <= '0;
      tok_en <= rq;
      tok    <= rq;
    end else begin
      tick <= tick + 1'b1;
      if (tick + 1'b1 == TW'(ACTIVE_TICKS)) tok <= 1'b0;
    end
  end

  assign period_end = (tick == TW'(DIV - 1));
  assign frame_last = period_end && tok_en;

  initial begin
    assert (ACTIVE_TICKS > 0 && ACTIVE_TICKS < DIV) else $error("bad token split");
  end
endmodule
