// tb_token_cell -- self-checking test of one token-ring cell.
//
// Drives random token and data-available inputs and checks that the cell
// latches the token only on a falling edge and only when it has data, and
// that the grant on the following rising edge equals what was latched.
`timescale 1ns/1ps
module tb_token_cell;
  logic clk = 0, rst = 0, tok = 0, avail = 0, cap, grant;
  logic exp_cap = 0;
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;

  token_cell dut (.clk, .rst, .tok_in(tok), .avail, .cap, .grant);

  always #15.625 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  initial begin
    #40 rst = 0;
    check(!cap && !grant, "reset");
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); #2;
      check(grant == exp_cap, "grant follows latched token");
      tok = 1'($urandom); avail = 1'($urandom);
      #5;
      check(cap == exp_cap, "no capture outside falling edge");
      @(negedge clk); exp_cap = tok && avail; #2;
      check(cap == exp_cap, "capture on falling edge");
      tok = 1'($urandom); avail = 1'($urandom);
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
