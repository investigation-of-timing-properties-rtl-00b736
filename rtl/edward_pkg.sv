// edward_pkg: constants shared by the EDWARD pixel-array readout.
//
// The array size (8x8 = 64 channels) and the 17.86 MHz token clock derived
// from a 250 Mbps serial link follow the design description. 250e6 / 17.86e6
// = 14, so one token period carries one 14-bit word per link; the token clock
// is produced here by dividing the 250 MHz bit clock by 14. The bus-access
// (token inactive) part of each period must not exceed 82 %; 11 of 14 bit
// clocks (78.6 %) is the largest whole number below that, leaving 3 clocks
// (21.4 %, 12 ns) of token-active time for token redistribution (< 9.6 ns
// worst case observed). Packets per readout, the idle word and the
// data-valid settling time are this design's own choices.
`timescale 1ns/1ps
package edward_pkg;
  localparam int unsigned N_CH_DEF         = 64;   // 8x8 pixel array
  localparam int unsigned DATA_W_DEF       = 14;   // bits per token period: 250 Mbps / 17.86 MHz
  localparam int unsigned N_PACKETS_DEF    = 2;    // data packets per readout (own choice)
  localparam int unsigned TOK_DIV_DEF      = 14;   // bit clocks per token period
  localparam int unsigned TOK_ACTIVE_DEF   = 3;    // bit clocks with the token active
  localparam logic [DATA_W_DEF-1:0] IDLE_WORD_DEF = 14'h2AAA; // default bus state
endpackage
