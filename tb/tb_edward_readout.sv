// tb_edward_readout: end-to-end test of the 8x8 EDWARD readout at its
// default parameters (64 channels, 2 packets per readout, 250 MHz bit clock,
// 17.86 MHz tokens).
//
// Every pixel is a model that raises data ready after a random, exponentially
// distributed wait (mean 20 us, a Poisson process per channel) and, once its
// readout has reset it, drops rdy after a 4 ns reset time and starts waiting
// for its next event. The run lasts 256 us. Pixel 63 is disabled and must
// never be read. Each packet carries {channel, packet index, event number}
// so the testbench can tell, for every word leaving the readout, which
// readout it belongs to.
//
// Checked: every word is the next expected packet of a channel with a
// pending readout, packets of a readout arrive in order in consecutive token
// periods, a pixel is reset only after all its packets were delivered, every
// event raised early enough is read out, idle periods carry the idle word,
// and words leave at one per 56 ns period. Counted, and required at least
// once: contention (a request while the token is held elsewhere), gapless
// token handover between channels, idle periods with the default bus word,
// multi-packet readouts, pixel resets, and the disabled channel's request
// being held off.
`timescale 1ns/1ps
module tb_edward_readout;
  import edward_pkg::*;
  localparam int N  = N_CH_DEF;
  localparam int W  = DATA_W_DEF;
  localparam int NP = N_PACKETS_DEF;
  localparam real MEAN_NS  = 20000.0;
  localparam real RUN_NS   = 256000.0;
  localparam int  DISABLED = N - 1;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1;
  logic [N-1:0] en, rdy, pix_rst;
  logic [N-1:0][NP-1:0][W-1:0] pix_data;
  logic [W-1:0] word_o, bus;
  logic word_valid, word_stb, tok, rqo, busy, dval;

  edward_readout dut (
    .clk, .rst_n, .en, .rdy, .pix_data, .pix_rst,
    .word_o, .word_valid, .word_stb, .tok, .rqo, .bus, .busy, .dval
  );

  always #2 clk = ~clk;   // 250 MHz bit clock

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  // ---- pixel models ------------------------------------------------------
  int  ev_num   [N];     // event number of the current readout
  int  next_pkt [N];     // next packet index expected from channel
  bit  pending  [N];     // rdy raised, readout not finished
  int  raised = 0, read_done = 0, resets = 0;
  realtime t_rdy [N];    // when rdy rose
  bit  from_idle[N];     // readout started with the array idle
  int  idle_starts = 0;
  bit  stop_events = 0;

  function automatic real exp_wait(real mean);
    real u;
    u = (real'($urandom_range(1000000, 1))) / 1000001.0;
    return -mean * $ln(u);
  endfunction

  for (genvar c = 0; c < N; c++) begin : g_pix
    initial begin
      rdy[c] = 0;
      pix_data[c] = '0;
      ev_num[c] = 0; next_pkt[c] = 0; pending[c] = 0;
      @(posedge rst_n);
      forever begin
        #(exp_wait(MEAN_NS));
        if (stop_events) break;
        ev_num[c]++;
        for (int p = 0; p < NP; p++)
          pix_data[c][p] = W'({6'(c), 1'(p), 7'(ev_num[c])});
        pending[c] = 1; next_pkt[c] = 0; raised++;
        t_rdy[c] = $realtime;
        from_idle[c] = !rqo && (dut.req == '0);
        rdy[c] = 1;
        @(posedge pix_rst[c]);
        resets++;
        if (c == DISABLED) fail("disabled pixel reset");
        #4 rdy[c] = 0;                     // pixel reset time
        // the last word was latched at the token edge that reset the pixel
        // and is reported one bit clock later
        #2;
        checks += 2;
        if (next_pkt[c] != NP) fail($sformatf("pixel %0d reset after %0d packets", c, next_pkt[c]));
        else read_done++;
        pending[c] = 0;
        if (pix_rst[c] !== 0) fail("pix_rst not released");
      end
    end
  end

  // ---- word checker ------------------------------------------------------
  int words = 0, idle_words = 0, handovers = 0, multi = 0;
  int last_ch = -1;
  int stb_count = 0, last_stb_cycle = -1, cycle = 0;
  always @(posedge clk) cycle++;

  always @(posedge clk) if (word_stb) begin
    // one word per 14 bit clocks
    if (last_stb_cycle >= 0) begin
      checks++;
      if (cycle - last_stb_cycle != TOK_DIV_DEF) fail("word period");
    end
    last_stb_cycle = cycle;
    if (word_valid) begin
      int c, p, e;
      c = int'(word_o[13:8]); p = int'(word_o[7]); e = int'(word_o[6:0]);
      words++;
      checks++;
      if (!pending[c] || p != next_pkt[c] || e != (ev_num[c] % 128)) begin
        fail($sformatf("unexpected word ch %0d pkt %0d ev %0d (exp pkt %0d ev %0d pend %0b)",
                       c, p, e, next_pkt[c], ev_num[c], pending[c]));
      end else begin
        next_pkt[c]++;
        // from an idle array: at most synchroniser (2 bit clocks), wait for
        // the next period (14), one period (14), word register (1); at least
        // the access part of a period (11) and the word register (1), for a
        // request that arrives while a token pulse is still active
        if (p == 0 && from_idle[c]) begin
          realtime lat;
          lat = $realtime - t_rdy[c];
          idle_starts++;
          checks++;
          if (lat < 4.0 * (11 + 1) || lat > 4.0 * (2 + 14 + 14 + 1) + 4.0)
            fail($sformatf("latency from idle %0.1f ns", lat));
        end
      end
      // the packets of one readout are in consecutive periods
      if (p > 0) begin
        checks++;
        if (last_ch != c) fail("packets of a readout interleaved");
        multi++;
      end else if (last_ch >= 0 && last_ch != c) handovers++;
      last_ch = c;
    end else begin
      idle_words++;
      last_ch = -1;
      checks++;
      if (word_o !== IDLE_WORD_DEF) fail("idle word");
    end
  end

  // contention: a new request while another channel holds the token
  int contention = 0;
  for (genvar c = 0; c < N; c++) begin : g_cont
    always @(posedge dut.req[c]) if ((dut.req & ~(N'(1) << c)) != 0) contention++;
  end

  // disabled channel: its request must stay low
  int held_off = 0;
  always @(posedge rdy[DISABLED]) begin
    #1; checks++;
    if (dut.req[DISABLED]) fail("disabled channel requested");
    held_off++;
  end

  // ---- run ------------------------------------------------------------
  initial begin
    en = '1; en[DISABLED] = 0;
    #1 rst_n = 0;
    #10 rst_n = 1;
    #(RUN_NS);
    stop_events = 1;
    #5000;    // drain: every raised event must be read out
    for (int c = 0; c < N; c++) begin
      checks++;
      if (c != DISABLED && pending[c]) fail($sformatf("pixel %0d never read", c));
    end
    checks += 8;
    if (idle_starts == 0) fail("no readout from an idle array");
    if (contention == 0) fail("no contention");
    if (handovers == 0)  fail("no gapless handover");
    if (idle_words == 0) fail("no idle period");
    if (multi == 0)      fail("no multi-packet readout");
    if (resets == 0)     fail("no pixel reset");
    if (held_off == 0)   fail("disabled channel never raised rdy");
    if (words != read_done * NP) fail($sformatf("words %0d for %0d readouts", words, read_done));
    $display("readouts=%0d words=%0d idle=%0d handovers=%0d contention=%0d multi=%0d held_off=%0d idle_starts=%0d",
             read_done, words, idle_words, handovers, contention, multi, held_off, idle_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
