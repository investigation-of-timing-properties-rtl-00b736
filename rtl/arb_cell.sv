// arb_cell: arbitration cell, the building element of the arbitration tree.
//
// Three parts, as in the EDWARD arbitration cell:
//  * a request guard (first stage): the token is only passed to a child whose
//    own request is still active, so a child that has withdrawn its request
//    loses the token at once, before the arbiter has switched - this keeps
//    two children from ever holding the token together while the path moves;
//  * the arbiter (second stage, arb_mutex): first-come selection between the
//    two child requests, held while the winning request stays active;
//  * the commuting circuit: passes the winning request up the tree (rqo) and
//    routes the parent's token (acki) to the winning child (ack_a / ack_b).
// The exact form of the guard stage is this design's reading of its stated
// purpose.
//
// Polarity: IN_ACTIVE_LOW = 0 is the NOR flavour, with active-high child
// requests and acknowledges and active-low rqo / acki towards the parent;
// IN_ACTIVE_LOW = 1 is the NAND flavour with everything inverted. Stacking
// the two flavours level by level needs no inverters. Fully asynchronous, no
// clock and no reset.
`timescale 1ns/1ps
module arb_cell #(
  parameter bit IN_ACTIVE_LOW = 1'b0
) (
  input  logic req_a,   // child a request   (polarity IN_ACTIVE_LOW)
  input  logic req_b,   // child b request
  output logic ack_a,   // token to child a  (polarity IN_ACTIVE_LOW)
  output logic ack_b,   // token to child b
  output logic rqo,     // request to parent (inverted polarity)
  input  logic acki     // token from parent (inverted polarity)
);
  logic ga_n, gb_n;             // arbiter grants, child polarity
  logic ra, rb, ga, gb, tok;    // active-high internal views

  arb_mutex #(.ACTIVE_LOW(IN_ACTIVE_LOW)) u_arb (
    .r_a(req_a), .r_b(req_b), .g_a(ga_n), .g_b(gb_n)
  );

  assign ra  = req_a ^ IN_ACTIVE_LOW;
  assign rb  = req_b ^ IN_ACTIVE_LOW;
  assign ga  = ga_n  ^ IN_ACTIVE_LOW;
  assign gb  = gb_n  ^ IN_ACTIVE_LOW;
  assign tok = acki  ^ ~IN_ACTIVE_LOW;

  // commuting circuit, with the guard stage on the token path
  assign rqo   = (ga | gb) ^ ~IN_ACTIVE_LOW;
  assign ack_a = (tok & ga & ra) ^ IN_ACTIVE_LOW;
  assign ack_b = (tok & gb & rb) ^ IN_ACTIVE_LOW;
endmodule
