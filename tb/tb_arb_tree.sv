// tb_arb_tree: self-checking test of the arbitration tree.
//
// Two trees are tested with the same reference model: the default 64-channel
// tree (6 levels, even: root active high without inversion) and an 8-channel
// tree (3 levels, odd: exercises the root inversion). The reference holds the
// owner of every cell and recomputes the root request and the token path
// after each single change of one request or of the root token. Besides the
// exact match it counts gapless handovers (the token moving to another
// channel within one active token) and contention (a second request arriving
// while another channel holds the token).
`timescale 1ns/1ps
module tb_arb_tree;
  int checks = 0, failures = 0;
  int handovers = 0, contention = 0;

  localparam int N64 = 64;
  localparam int N8  = 8;

  logic [N64-1:0] req64, ack64;  logic rqo64, tok64;
  logic [N8-1:0]  req8,  ack8;   logic rqo8,  tok8;

  arb_tree                dut64 (.req(req64), .ack(ack64), .rqo(rqo64), .acki(tok64));
  arb_tree #(.N_CH(N8))   dut8  (.req(req8),  .ack(ack8),  .rqo(rqo8),  .acki(tok8));

  // reference: own[node] 0 none, 1 side a, 2 side b; heap numbering per level
  class tree_ref;
    int n, lv;
    int own[7][64];
    bit nreq[8][64];
    bit nack[8][64];
    function new(int n_);
      n = n_; lv = $clog2(n_);
      foreach (own[l, i]) own[l][i] = 0;
    endfunction
    function void update(logic [63:0] req, bit tok);
      for (int i = 0; i < n; i++) nreq[0][i] = req[i];
      for (int l = 0; l < lv; l++)
        for (int i = 0; i < (n >> (l + 1)); i++) begin
          bit ra, rb;
          ra = nreq[l][2*i]; rb = nreq[l][2*i+1];
          if (own[l][i] == 1 && !ra) own[l][i] = 0;
          if (own[l][i] == 2 && !rb) own[l][i] = 0;
          if (own[l][i] == 0) begin
            if (ra) own[l][i] = 1; else if (rb) own[l][i] = 2;
          end
          nreq[l+1][i] = (own[l][i] != 0);
        end
      nack[lv][0] = tok & nreq[lv][0];
      for (int l = lv - 1; l >= 0; l--)
        for (int i = 0; i < (n >> (l + 1)); i++) begin
          nack[l][2*i]   = nack[l+1][i] && own[l][i] == 1 && nreq[l][2*i];
          nack[l][2*i+1] = nack[l+1][i] && own[l][i] == 2 && nreq[l][2*i+1];
        end
    endfunction
    function bit root_req(); return nreq[lv][0]; endfunction
    function logic [63:0] acks();
      logic [63:0] a = '0;
      for (int i = 0; i < n; i++) a[i] = nack[0][i];
      return a;
    endfunction
  endclass

  tree_ref m64, m8;

  task automatic run(int steps);
    logic [63:0] prev_ack64 = '0;
    for (int s = 0; s < steps; s++) begin
      int c;
      // one change per step: a request or the token
      if ($urandom_range(3, 0) == 0) begin
        tok64 = ~tok64; tok8 = ~tok8;
      end else begin
        c = $urandom_range(N64 - 1, 0);
        // a channel holding the token withdraws only while the token is active
        if (!(req64[c] && !tok64 && ack64[c])) begin
          if (!req64[c] && |req64) contention++;
          req64[c] = ~req64[c];
        end
        c = c % N8;
        req8[c] = ~req8[c];
      end
      m64.update({req64}, tok64);
      m8.update({56'b0, req8}, tok8);
      #1;
      checks += 4;
      if (rqo64 !== m64.root_req()) begin failures++; $display("FAIL rqo64 %b", rqo64); end
      if (ack64 !== m64.acks())     begin failures++; $display("FAIL ack64 %h exp %h", ack64, m64.acks()); end
      if (rqo8 !== m8.root_req())   begin failures++; $display("FAIL rqo8 %b", rqo8); end
      if (ack8 !== m8.acks()[7:0])  begin failures++; $display("FAIL ack8 %h exp %h", ack8, m8.acks()); end
      if (tok64 && prev_ack64 != 0 && ack64 != 0 && ack64 != prev_ack64) handovers++;
      prev_ack64 = ack64;
    end
  endtask

  initial begin
    req64 = '0; tok64 = 0; req8 = '0; tok8 = 0;
    m64 = new(N64); m8 = new(N8);
    #1;
    // directed: channel 5 first, then 40; 5 keeps the path until it withdraws
    req64[5] = 1; m64.update(req64, 0); #1;
    req64[40] = 1; m64.update(req64, 0); #1;
    tok64 = 1; m64.update(req64, 1); #1;
    checks++; if (ack64 !== 64'(1) << 5) begin failures++; $display("FAIL first come"); end
    req64[5] = 0; m64.update(req64, 1); #1;
    checks++; if (ack64 !== 64'(1) << 40) begin failures++; $display("FAIL handover"); end
    req64[40] = 0; tok64 = 0; m64.update(req64, 0); #1;
    checks++; if (rqo64 !== 0 || ack64 !== 0) begin failures++; $display("FAIL idle"); end
    run(20000);
    checks += 2;
    if (handovers == 0)  begin failures++; $display("FAIL no handover seen"); end
    if (contention == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("handovers=%0d contention=%0d", handovers, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
