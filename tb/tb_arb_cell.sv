// tb_arb_cell: self-checking test of the arbitration cell, both flavours.
//
// Two cells are driven with the same active-high stimulus, one of each
// flavour, with polarity converted at the ports. Checked against an
// independent reference: rqo follows the owning request, the parent token
// reaches only the owning child and only while its request is active, and
// ownership passes without a gap to a waiting request.
`timescale 1ns/1ps
module tb_arb_cell;
  int checks = 0, failures = 0;

  logic ra, rb, tk;                                   // active-high stimulus
  logic a0, b0, q0, a1, b1, q1;                       // raw outputs

  arb_cell #(.IN_ACTIVE_LOW(1'b0)) dut0 (.req_a(ra),  .req_b(rb),  .ack_a(a0), .ack_b(b0), .rqo(q0), .acki(~tk));
  arb_cell #(.IN_ACTIVE_LOW(1'b1)) dut1 (.req_a(~ra), .req_b(~rb), .ack_a(a1), .ack_b(b1), .rqo(q1), .acki(tk));

  logic ma, mb;   // reference ownership

  task automatic check(input string what);
    logic eq, ea, eb;
    #1;
    eq = ma | mb;
    ea = tk & ma & ra;
    eb = tk & mb & rb;
    checks += 2;
    if ({~q0, a0, b0} !== {eq, ea, eb}) begin
      failures++; $display("FAIL NOR  %s: rqo=%b ack=%b%b exp %b %b%b", what, ~q0, a0, b0, eq, ea, eb);
    end
    if ({q1, ~a1, ~b1} !== {eq, ea, eb}) begin
      failures++; $display("FAIL NAND %s: rqo=%b ack=%b%b exp %b %b%b", what, q1, ~a1, ~b1, eq, ea, eb);
    end
  endtask

  task automatic step(input logic na, input logic nb, input logic nt, input string what);
    ra = na; rb = nb; tk = nt;
    if (!na) ma = 0;
    if (!nb) mb = 0;
    if (na && !ma && !mb) ma = 1;
    if (nb && !ma && !mb) mb = 1;
    check(what);
  endtask

  int handovers = 0;
  initial begin
    ma = 0; mb = 0;
    step(0, 0, 0, "idle");
    step(1, 0, 0, "a requests");
    step(1, 0, 1, "token to a");
    step(1, 1, 1, "b arrives, token stays at a");
    step(0, 1, 1, "a returns token, b gets it in the same pulse");
    checks++;
    if (!(~q0) || !b0) begin failures++; $display("FAIL no gapless handover"); end
    step(0, 1, 0, "token inactive");
    step(0, 0, 0, "b done");
    step(0, 0, 1, "token without request reaches nobody");
    repeat (500) begin
      logic na, nb, nt;
      logic pa, pb;
      na = ra; nb = rb; nt = tk;
      case ($urandom_range(2, 0))
        0: na = ~na;
        1: nb = ~nb;
        default: nt = ~nt;
      endcase
      pa = ma; pb = mb;
      step(na, nb, nt, "random");
      if ((pa && mb) || (pb && ma)) handovers++;
    end
    checks++;
    if (handovers == 0) begin failures++; $display("FAIL no random handover seen"); end
    $display("handovers=%0d", handovers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
