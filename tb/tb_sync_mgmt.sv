// tb_sync_mgmt: self-checking test of the synchronisation and management
// circuitry.
//
// An asynchronous root request (changing off the clock grid) must produce
// tokens only after synchronisation; one word leaves per 14-bit-clock
// period: the bus word with word_valid when a token was issued and dval is
// high at the end of the frame, the idle word otherwise. The testbench plays
// a channel: after each token it drives a fresh word and raises dval.
`timescale 1ns/1ps
module tb_sync_mgmt;
  int checks = 0, failures = 0;
  localparam int W = 14;

  logic clk = 0, rst_n = 1, rqo = 0, dval = 0;
  logic tok, word_valid, word_stb;
  logic [W-1:0] bus = 14'h2AAA, word_o;

  sync_mgmt dut (.clk, .rst_n, .rqo, .tok, .bus, .dval, .word_o, .word_valid, .word_stb);

  always #2 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // channel model: drive a word after the token, hold until the next token
  logic [W-1:0] sent[$];
  bit           drop_dval = 0;
  always @(negedge tok) begin
    if (rqo) begin
      bus  = W'($urandom);
      dval = 0;
      #2.5 dval = !drop_dval;
      if (!drop_dval) sent.push_back(bus);
    end
  end
  always @(posedge tok) begin
    dval = 0; bus = 14'h2AAA;
  end

  int valid_words = 0, idle_words = 0, tokens = 0, t0;
  always @(posedge tok) tokens++;

  always @(posedge clk) if (word_stb) begin
    if (word_valid) begin
      valid_words++;
      chk(sent.size() > 0 && word_o == sent[0], "captured word");
      if (sent.size() > 0) void'(sent.pop_front());
    end else begin
      idle_words++;
      chk(word_o == 14'h2AAA, "idle word");
    end
  end

  initial begin
    #1 rst_n = 0;
    #9.3 rst_n = 1;
    #200;
    chk(tokens == 0 && tok == 0, "no token without request");
    #7.7 rqo = 1;                          // asynchronous to clk
    #(2 * 4 + 56 + 1);                     // synchroniser + at most one period
    chk(tokens == 1, "token after synchronised request");
    #(56 * 10);
    chk(tokens == 11, "one token per 56 ns period");
    drop_dval = 1;
    #(56 * 3);
    drop_dval = 0;
    #(56 * 3 + 1.3) rqo = 0;
    #(56 * 3);
    t0 = tokens;
    #(56 * 5);
    chk(tokens == t0, "tokens stop without request");
    chk(sent.size() == 0, "every validated word left");
    chk(valid_words > 10 && idle_words > 5, "both valid and idle words seen");
    $display("valid=%0d idle=%0d tokens=%0d", valid_words, idle_words, tokens);
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
