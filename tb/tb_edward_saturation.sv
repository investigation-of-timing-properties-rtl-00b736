// tb_edward_saturation: the 8x8 tile at its default parameters under
// overload.
//
// Every pixel raises data ready with a mean interval of 2 us (Poisson), ten
// times the nominal rate, so requests are always waiting: 64 pixels ask for
// about 32 readouts per microsecond against a capacity of one readout per
// two 56 ns periods. The run lasts 50 us.
//
// Checked: every output word is the next packet of a pending readout and the
// packets of one readout arrive in consecutive periods; once the array is
// loaded every period carries a data word (token handover costs no period);
// the readout rate equals one per N_PACKETS periods. Reported, not checked:
// how many channels were never served, which time-of-arrival arbitration
// allows under sustained overload.
`timescale 1ns/1ps
module tb_edward_saturation;
  import edward_pkg::*;
  localparam int N  = N_CH_DEF;
  localparam int W  = DATA_W_DEF;
  localparam int NP = N_PACKETS_DEF;
  localparam real MEAN_NS = 2000.0;
  localparam real RUN_NS  = 50000.0;

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

  always #2 clk = ~clk;

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s at %0t", what, $time);
  endtask

  int ev_num [N], next_pkt [N], served [N];
  bit pending [N];
  int read_done = 0;

  function automatic real exp_wait(real mean);
    real u;
    u = (real'($urandom_range(1000000, 1))) / 1000001.0;
    return -mean * $ln(u);
  endfunction

  for (genvar c = 0; c < N; c++) begin : g_pix
    initial begin
      rdy[c] = 0; pix_data[c] = '0;
      ev_num[c] = 0; next_pkt[c] = 0; pending[c] = 0; served[c] = 0;
      @(posedge rst_n);
      forever begin
        #(exp_wait(MEAN_NS));
        ev_num[c]++;
        for (int p = 0; p < NP; p++)
          pix_data[c][p] = W'({6'(c), 1'(p), 7'(ev_num[c])});
        pending[c] = 1; next_pkt[c] = 0;
        rdy[c] = 1;
        @(posedge pix_rst[c]);
        #4 rdy[c] = 0;
        #2;
        checks++;
        if (next_pkt[c] != NP) fail("reset before all packets");
        pending[c] = 0; served[c]++; read_done++;
      end
    end
  end

  int words = 0, idle_in_window = 0, periods_in_window = 0, last_ch = -1;
  bit window = 0;
  always @(posedge clk) if (word_stb) begin
    if (window) periods_in_window++;
    if (word_valid) begin
      int c, p, e;
      c = int'(word_o[13:8]); p = int'(word_o[7]); e = int'(word_o[6:0]);
      words++;
      checks++;
      if (!pending[c] || p != next_pkt[c] || e != (ev_num[c] % 128)) fail("unexpected word");
      else next_pkt[c]++;
      if (p > 0) begin
        checks++;
        if (last_ch != c) fail("packets of a readout interleaved");
      end
      last_ch = c;
    end else begin
      last_ch = -1;
      if (window) idle_in_window++;
    end
  end

  initial begin
    int starved = 0, r0;
    en = '1;
    #1 rst_n = 0;
    #10 rst_n = 1;
    #5000 window = 1;              // loaded by now
    r0 = read_done;
    #(RUN_NS - 5000);
    window = 0;
    for (int c = 0; c < N; c++) if (served[c] == 0) starved++;
    checks += 2;
    if (idle_in_window != 0) fail($sformatf("%0d idle periods under load", idle_in_window));
    // one readout per NP periods, allow one readout of slack at each end
    if ((read_done - r0) < periods_in_window / NP - 2 || (read_done - r0) > periods_in_window / NP + 2)
      fail($sformatf("rate %0d readouts in %0d periods", read_done - r0, periods_in_window));
    $display("periods=%0d readouts=%0d idle=%0d never_served=%0d",
             periods_in_window, read_done - r0, idle_in_window, starved);
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
