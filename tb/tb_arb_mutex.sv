// tb_arb_mutex: self-checking test of the two-input arbiter, both flavours.
//
// For each flavour (NOR: active high, NAND: active low) it drives request
// sequences with distinct arrival times and checks the grants against a
// reference worked out in the testbench: first come first served, grant held
// while the request stays, handover to a waiting request on withdrawal, never
// two grants, exact tie to side a.
`timescale 1ns/1ps
module tb_arb_mutex;
  int checks = 0, failures = 0;

  logic ra_h, rb_h;                       // active-high stimulus
  logic r_a0, r_b0, g_a0, g_b0;           // NOR flavour
  logic r_a1, r_b1, g_a1, g_b1;           // NAND flavour

  assign r_a0 = ra_h;  assign r_b0 = rb_h;
  assign r_a1 = ~ra_h; assign r_b1 = ~rb_h;

  arb_mutex #(.ACTIVE_LOW(1'b0)) dut0 (.r_a(r_a0), .r_b(r_b0), .g_a(g_a0), .g_b(g_b0));
  arb_mutex #(.ACTIVE_LOW(1'b1)) dut1 (.r_a(r_a1), .r_b(r_b1), .g_a(g_a1), .g_b(g_b1));

  task automatic expect_g(input logic ea, input logic eb, input string what);
    #1;
    checks += 2;
    if (g_a0 !== ea || g_b0 !== eb) begin
      failures++; $display("FAIL NOR  %s: g=%b%b exp %b%b", what, g_a0, g_b0, ea, eb);
    end
    if (g_a1 !== ~ea || g_b1 !== ~eb) begin
      failures++; $display("FAIL NAND %s: g=%b%b exp %b%b", what, ~g_a1, ~g_b1, ea, eb);
    end
  endtask

  // random sequence checked against a reference model
  logic ma, mb;
  initial begin
    ra_h = 0; rb_h = 0;
    expect_g(0, 0, "idle");
    ra_h = 1;           expect_g(1, 0, "a first");
    rb_h = 1;           expect_g(1, 0, "b waits");
    ra_h = 0;           expect_g(0, 1, "handover to b");
    ra_h = 1;           expect_g(0, 1, "a waits");
    rb_h = 0;           expect_g(1, 0, "handover to a");
    ra_h = 0;           expect_g(0, 0, "idle again");
    rb_h = 1;           expect_g(0, 1, "b first");
    rb_h = 0;           expect_g(0, 0, "b done");
    ra_h = 1; rb_h = 1; expect_g(1, 0, "tie goes to a");
    ra_h = 0; rb_h = 0; expect_g(0, 0, "both released");

    ma = 0; mb = 0;
    repeat (400) begin
      logic na, nb;
      na = ra_h; nb = rb_h;
      if ($urandom_range(1, 0)) na = ~na; else nb = ~nb;   // one change at a time
      ra_h = na; rb_h = nb;
      if (!na) ma = 0;
      if (!nb) mb = 0;
      if (na && !ma && !mb) ma = 1;
      if (nb && !ma && !mb) mb = 1;
      expect_g(ma, mb, "random");
      checks++;
      if (g_a0 && g_b0) begin failures++; $display("FAIL two grants"); end
    end
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
