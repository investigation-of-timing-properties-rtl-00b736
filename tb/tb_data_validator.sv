// tb_data_validator: self-checking test of the data-valid model.
//
// dval must stay low for the settling time after the bus is driven or its
// word changes, then rise; it must fall as soon as the bus is released; a
// driven pulse shorter than the settling time (2 ns) must give no dval.
`timescale 1ns/1ps
module tb_data_validator;
  int checks = 0, failures = 0;
  localparam int W = 14;

  logic         busy;
  logic [W-1:0] bus;
  logic         dval;

  data_validator dut (.busy, .bus, .dval);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    busy = 0; bus = 14'h2AAA; #10;
    chk(dval == 0, "idle");
    repeat (20) begin
      busy = 1; bus = W'($urandom | 1);
      #1.5 chk(dval == 0, "not yet settled");
      #1.0 chk(dval == 1, "settled");
      bus = bus ^ 14'h0001;
      #1.0 chk(dval == 0, "word changed, settling again");
      #1.5 chk(dval == 1, "settled again");
      busy = 0; bus = 14'h2AAA;
      #0.1 chk(dval == 0, "released");
      #5;
      busy = 1; bus = W'($urandom);
      #1.0 busy = 0; bus = 14'h2AAA;
      #0.5 chk(dval == 0, "short pulse ignored");
      #5   chk(dval == 0, "short pulse never validated");
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
