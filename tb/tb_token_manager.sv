// tb_token_manager -- self-checking test of the token manager.
//
// Checks that the manager owns the token after reset and injects it on the
// first rising edge, that it parks (re-latches) the token only when every
// channel is empty and the token reaches it, and that it lets the token pass
// (does not latch) as soon as any single channel has data.
`timescale 1ns/1ps
module tb_token_manager;
  logic clk = 0, rst = 0, tok = 0, inject, all_empty, parked;
  logic [127:0] empty = '1;
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;

  token_manager dut (.clk, .rst, .tok_in(tok), .empty, .inject, .all_empty, .parked);

  always #15.625 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  initial begin
    #40;
    check(parked && !inject, "owns token at reset");
    rst = 0;
    @(posedge clk); #1;
    check(inject, "injects on first rising edge");
    for (int n = 0; n < 300; n++) begin
      logic exp;
      @(posedge clk); #2;
      tok = 1'($urandom);
      empty = '1;
      if ($urandom_range(0, 1)) empty[$urandom_range(0, 127)] = 1'b0;
      #3 check(all_empty == (empty == '1), "AND of empties");
      exp = tok && (empty == '1);
      @(negedge clk); #1;
      check(parked == exp, "parks only when all empty");
      @(posedge clk); #1;
      check(inject == exp, "injects what it parked");
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
