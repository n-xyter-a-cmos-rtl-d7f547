// tb_event_counters -- self-checking test of the latched/rejected counters.
//
// Applies random pulse patterns over all 128 channels (including all-ones
// cycles) and compares both counters with sums kept here.
`timescale 1ns/1ps
module tb_event_counters;
  logic clk = 0, rst = 0;
  logic [127:0] lat = 0, rej = 0;
  logic [31:0] cl, cr;
  longint sl = 0, sr = 0;
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;

  event_counters dut (.clk, .rst, .latched(lat), .rejected(rej), .cnt_latched(cl), .cnt_rejected(cr));

  always #15.625 clk = ~clk;

  initial begin
    #40 rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++;
      if (cl != 32'(sl) || cr != 32'(sr)) begin
        failures++; $display("FAIL n=%0d %0d/%0d vs %0d/%0d", n, cl, cr, sl, sr);
      end
      for (int w = 0; w < 4; w++) begin
        lat[w*32 +: 32] = (n % 50 == 0) ? '1 : $urandom;
        rej[w*32 +: 32] = $urandom & $urandom;
      end
      sl += $countones(lat);
      sr += $countones(rej);
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
