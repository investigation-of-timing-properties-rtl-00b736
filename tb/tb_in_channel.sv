// tb_in_channel: self-checking test of the in-channel readout logic.
//
// Two channels, with the default 2 packets per readout and with 4, are taken
// through complete readouts: data ready raises the request, each token edge
// opens the next access frame in which the expected packet (and nothing in
// the token-active part) is driven, the token edge after the last packet
// clears the request and resets the pixel, and the pixel reset ends when rdy
// falls. A disabled channel must not request. Token edges per readout are
// counted against N_PACKETS + 1.
`timescale 1ns/1ps
module tb_in_channel;
  int checks = 0, failures = 0;

  localparam int W = 14;

  logic rst_n, en, rdy2, rdy4, ack2, ack4;
  logic [1:0][W-1:0] pd2;
  logic [3:0][W-1:0] pd4;
  logic req2, req4, drv2, drv4, rst2, rst4;
  logic [W-1:0] d2, d4;

  in_channel dut2 (.rst_n, .en, .rdy(rdy2), .pix_data(pd2), .req(req2), .ack(ack2),
                   .drive(drv2), .data_o(d2), .pix_rst(rst2));
  in_channel #(.N_PACKETS(4)) dut4 (.rst_n, .en, .rdy(rdy4), .pix_data(pd4), .req(req4), .ack(ack4),
                   .drive(drv4), .data_o(d4), .pix_rst(rst4));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one readout of the 2-packet channel
  task automatic readout2();
    int edges = 0;
    pd2[0] = W'($urandom); pd2[1] = W'($urandom);
    rdy2 = 1; #5;
    chk(req2 == 1 && drv2 == 0 && d2 == 0, "req after rdy");
    while (req2) begin
      ack2 = 1; edges++; #10;
      chk(drv2 == 0 && d2 == 0, "no drive while token active");
      if (!req2) break;
      ack2 = 0; #40;
      chk(drv2 == 1 && d2 == pd2[edges-1], "packet driven");
    end
    ack2 = 0; #5;
    chk(edges == 3, "token edges per readout");
    chk(rst2 == 1 && drv2 == 0, "pixel reset after readout");
    rdy2 = 0; #5;
    chk(rst2 == 0 && req2 == 0, "reset released with rdy");
  endtask

  task automatic readout4();
    int edges = 0;
    foreach (pd4[i]) pd4[i] = W'($urandom);
    rdy4 = 1; #5;
    chk(req4 == 1, "req4 after rdy");
    while (req4) begin
      ack4 = 1; edges++; #10;
      if (!req4) break;
      ack4 = 0; #40;
      chk(drv4 == 1 && d4 == pd4[edges-1], "packet4 driven");
    end
    ack4 = 0; #5;
    chk(edges == 5, "token edges per 4-packet readout");
    chk(rst4 == 1, "pixel4 reset");
    rdy4 = 0; #5;
    chk(rst4 == 0, "pixel4 reset released");
  endtask

  initial begin
    rst_n = 1; #1 rst_n = 0; en = 1; rdy2 = 0; rdy4 = 0; ack2 = 0; ack4 = 0; pd2 = '0; pd4 = '0;
    #5 rst_n = 1; #5;
    chk(req2 == 0 && rst2 == 0 && drv2 == 0, "idle after reset");
    repeat (20) begin
      readout2();
      readout4();
    end
    // disabled channel does not request
    en = 0; rdy2 = 1; #5;
    chk(req2 == 0, "disabled channel silent");
    ack2 = 1; #5; ack2 = 0; #5;
    chk(drv2 == 0 && rst2 == 0, "disabled channel ignores tokens");
    rdy2 = 0; en = 1; #5;
    readout2();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
