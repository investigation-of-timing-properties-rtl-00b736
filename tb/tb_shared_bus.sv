// tb_shared_bus: self-checking test of the shared bus and its default state.
//
// With no driver the bus must show the idle word and busy low; with one
// driver the bus carries exactly that channel's word (other channels' words
// are zero, as the channels present them). Random drivers over the default
// 64 channels.
`timescale 1ns/1ps
module tb_shared_bus;
  int checks = 0, failures = 0;
  localparam int N = 64, W = 14;

  logic [N-1:0]        drive;
  logic [N-1:0][W-1:0] data;
  logic [W-1:0]        bus;
  logic                busy;

  shared_bus dut (.drive, .data, .bus, .busy);

  initial begin
    drive = '0; data = '0; #1;
    checks++;
    if (bus !== 14'h2AAA || busy !== 0) begin failures++; $display("FAIL idle %h", bus); end
    repeat (2000) begin
      int c;
      logic [W-1:0] w;
      drive = '0; data = '0;
      if ($urandom_range(3, 0) != 0) begin
        c = $urandom_range(N - 1, 0);
        w = W'($urandom);
        drive[c] = 1; data[c] = w;
        #1;
        checks += 2;
        if (bus !== w)   begin failures++; $display("FAIL ch %0d bus %h exp %h", c, bus, w); end
        if (busy !== 1)  begin failures++; $display("FAIL busy"); end
      end else begin
        #1;
        checks += 2;
        if (bus !== 14'h2AAA) begin failures++; $display("FAIL idle word %h", bus); end
        if (busy !== 0)       begin failures++; $display("FAIL idle busy"); end
      end
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
