// edward_readout: EDWARD (Event Driven with Access and Reset Decoder) readout
// of an 8x8 pixel array.
//
// Every pixel has an in_channel block. A pixel with data raises rdy; its
// channel raises a request that climbs the asynchronous arbitration tree
// (arb_tree) without any clock reaching the array. The root request is
// synchronised in sync_mgmt, which then issues one acknowledge token per
// 17.86 MHz token period. The tree routes each token down to the single
// channel that won the arbitration; that channel drives one packet per
// period onto the shared bus (shared_bus) during the token-inactive part of
// the period, returns the token after its last packet, resets its pixel and
// lets the tree pass the token, in the same token pulse, to the next waiting
// channel. data_validator flags when the bus data has settled; sync_mgmt
// latches one word per period, or the idle word when no channel holds the
// bus.
//
// Interface: clk is the 250 MHz bit clock of one serial output link; rst_n is
// an asynchronous active-low reset. Per pixel: en (request enable), rdy
// (data ready), pix_data (its packets) in, pix_rst (pixel reset) out. Out:
// word_o / word_valid / word_stb, one word per token period; tok and rqo (root
// token and request), bus, busy and dval are brought out for observation.
// The analog bus, its transmission gates and buffers, the pixels themselves
// and the serializer are outside this RTL.
`timescale 1ns/1ps
module edward_readout #(
  parameter int unsigned       N_CH         = edward_pkg::N_CH_DEF,
  parameter int unsigned       DATA_W       = edward_pkg::DATA_W_DEF,
  parameter int unsigned       N_PACKETS    = edward_pkg::N_PACKETS_DEF,
  parameter int unsigned       DIV          = edward_pkg::TOK_DIV_DEF,
  parameter int unsigned       ACTIVE_TICKS = edward_pkg::TOK_ACTIVE_DEF,
  parameter logic [DATA_W-1:0] IDLE_WORD    = edward_pkg::IDLE_WORD_DEF
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  logic [N_CH-1:0]                            en,
  input  logic [N_CH-1:0]                            rdy,
  input  logic [N_CH-1:0][N_PACKETS-1:0][DATA_W-1:0] pix_data,
  output logic [N_CH-1:0]                            pix_rst,
  output logic [DATA_W-1:0]                          word_o,
  output logic                                       word_valid,
  output logic                                       word_stb,
  output logic                                       tok,
  output logic                                       rqo,
  output logic [DATA_W-1:0]                          bus,
  output logic                                       busy,
  output logic                                       dval
);
  logic [N_CH-1:0]             req, ack, drive;
  logic [N_CH-1:0][DATA_W-1:0] chan_data;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    in_channel #(.DATA_W(DATA_W), .N_PACKETS(N_PACKETS)) u_ch (
      .rst_n, .en(en[c]), .rdy(rdy[c]), .pix_data(pix_data[c]),
      .req(req[c]), .ack(ack[c]), .drive(drive[c]), .data_o(chan_data[c]),
      .pix_rst(pix_rst[c])
    );
  end

  arb_tree #(.N_CH(N_CH)) u_tree (
    .req, .ack, .rqo, .acki(tok)
  );

  shared_bus #(.N_CH(N_CH), .DATA_W(DATA_W), .IDLE_WORD(IDLE_WORD)) u_bus (
    .drive, .data(chan_data), .bus, .busy
  );

  data_validator #(.DATA_W(DATA_W)) u_dval (
    .busy, .bus, .dval
  );

  sync_mgmt #(.DATA_W(DATA_W), .DIV(DIV), .ACTIVE_TICKS(ACTIVE_TICKS),
              .IDLE_WORD(IDLE_WORD)) u_sync (
    .clk, .rst_n, .rqo, .tok, .bus, .dval, .word_o, .word_valid, .word_stb
  );

  // one channel on the bus and the token at one channel at most, checked at
  // every bit clock
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drive))
    else $error("several channels drive the bus");
  a_one_token: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack))
    else $error("token at several channels");
endmodule
