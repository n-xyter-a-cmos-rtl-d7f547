// tb_pdh_model -- self-checking test of the peak-detector-and-hold model.
//
// Applies slow-shaper-like pulses (rise to a random peak, then decay) and
// checks that while armed the output ends at the pulse maximum and stays there
// as the input falls, that an unarmed detector does not follow the input,
// and that the reset clears the held value.
`timescale 1ns/1ps
module tb_pdh_model;
  logic [11:0] in = 0, held;
  logic arm = 0, rst = 0;
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;

  pdh_model dut (.slow_in(in), .arm(arm), .hold_reset(rst), .held(held));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s held=%0d", what, held); end
  endtask

  task automatic pulse(input int peak);
    for (int i = 0; i <= 14; i++) begin in = 12'(peak * i / 14); #10; end
    for (int i = 14; i >= 0; i--) begin in = 12'(peak * i / 14); #10; end
  endtask

  initial begin
    #5 rst = 0; #5;
    check(held == 0, "reset value");
    for (int k = 0; k < 20; k++) begin
      int peak;
      peak = 100 + int'($urandom_range(0, 3900));
      arm = 1;
      pulse(peak);
      check(held == 12'(peak), "peak held");
      in = 12'(peak / 3); #10;
      check(held == 12'(peak), "held while input lower");
      arm = 0; #10;
      pulse(4095);
      check(held == 12'(peak), "unarmed does not follow");
      rst = 1; #10;
      check(held == 0, "reset clears");
      rst = 0; #10;
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
