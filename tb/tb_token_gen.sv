// tb_token_gen: self-checking test of the acknowledge-token generator.
//
// A 250 MHz bit clock is applied. With a request present, the token must be
// active for 3 of every 14 bit clocks (period 56 ns, 17.86 MHz; inactive
// share 78.6 %, within the 82 % limit) and frame_last must mark the last bit
// clock of each period that carried a token; without a request no token may
// appear. The request is toggled at random and every cycle is compared with
// an independent reference counter.
`timescale 1ns/1ps
module tb_token_gen;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, rq = 0;
  logic tok, frame_last, period_end;

  token_gen dut (.clk, .rst_n, .rq, .tok, .frame_last, .period_end);

  always #2 clk = ~clk;   // 250 MHz

  int ref_tick = 0;
  bit ref_en = 0;
  int tok_cycles = 0, cycles_with_req = 0, periods = 0;
  realtime t_rise_prev = 0, t_rise;
  int period_checks = 0;

  always @(posedge tok) begin
    t_rise = $realtime;
    if (t_rise_prev > 0 && t_rise - t_rise_prev < 57.0) begin
      checks++;
      if (t_rise - t_rise_prev != 56.0) begin failures++; $display("FAIL token period %0t", t_rise - t_rise_prev); end
      period_checks++;
    end
    t_rise_prev = t_rise;
  end

  initial begin
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) begin
      @(posedge clk);
      // reference update mirrors what the flops take at this edge
      if (ref_tick == 13) begin ref_tick = 0; ref_en = rq; end
      else ref_tick++;
      #0.5;
      checks += 3;
      if (tok !== (ref_en && ref_tick < 3)) begin failures++; $display("FAIL tok %b tick %0d", tok, ref_tick); end
      if (period_end !== (ref_tick == 13)) begin failures++; $display("FAIL period_end"); end
      if (frame_last !== (ref_tick == 13 && ref_en)) begin failures++; $display("FAIL frame_last"); end
      if (ref_en) begin cycles_with_req++; if (tok) tok_cycles++; end
      if (ref_tick == 13) periods++;
      if ($urandom_range(60, 0) == 0) rq = ~rq;
    end
    checks += 2;
    if (tok_cycles * 14 != cycles_with_req * 3 && cycles_with_req % 14 == 0) begin
      failures++; $display("FAIL duty %0d/%0d", tok_cycles, cycles_with_req);
    end
    if (period_checks == 0) begin failures++; $display("FAIL no back-to-back tokens"); end
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
