// sync_mgmt: synchronisation and management circuitry of the readout.
//
// The root request of the arbitration tree (rqo) arrives asynchronously; a
// two-flip-flop synchroniser brings it into the bit-clock domain, where
// token_gen issues one acknowledge token per token period while requests are
// pending. At the last bit clock of every period one word leaves on word_o
// with word_stb: the bus word, flagged by word_valid, if a token was issued
// and the data validator reported valid data, otherwise IDLE_WORD. The word
// stream therefore never pauses, as a serializer needs. word_o and
// word_valid are registered and stay constant for a whole period.
// Synchronising the request and a continuous word stream follow the design
// description; the synchroniser depth and the latch point are this design's
// choices.
`timescale 1ns/1ps
module sync_mgmt #(
  parameter int unsigned       DATA_W       = edward_pkg::DATA_W_DEF,
  parameter int unsigned       DIV          = edward_pkg::TOK_DIV_DEF,
  parameter int unsigned       ACTIVE_TICKS = edward_pkg::TOK_ACTIVE_DEF,
  parameter logic [DATA_W-1:0] IDLE_WORD    = edward_pkg::IDLE_WORD_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rqo,        // root request, asynchronous
  output logic              tok,        // root token
  input  logic [DATA_W-1:0] bus,
  input  logic              dval,
  output logic [DATA_W-1:0] word_o,
  output logic              word_valid,
  output logic              word_stb
);
  logic [1:0] rq_sync;
  logic       frame_last, period_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rq_sync <= '0;
    else        rq_sync <= {rq_sync[0], rqo};
  end

  token_gen #(.DIV(DIV), .ACTIVE_TICKS(ACTIVE_TICKS)) u_tok (
    .clk, .rst_n, .rq(rq_sync[1]), .tok, .frame_last, .period_end
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_o     <= IDLE_WORD;
      word_valid <= 1'b0;
      word_stb   <= 1'b0;
    end else begin
      word_stb <= period_end;
      if (period_end) begin
        if (frame_last && dval) begin
          word_o     <= bus;
          word_valid <= 1'b1;
        end else begin
          word_o     <= IDLE_WORD;
          word_valid <= 1'b0;
        end
      end
    end
  end
endmodule
