// tb_channel_fifo -- self-checking test of the four-stage channel FIFO.
//
// Random writes and reads (never writing when full without a read, never
// reading when empty) against a queue model; checks the head entry and both
// flags every cycle, that exactly four entries fit, and that reset empties
// the FIFO.
`timescale 1ns/1ps
module tb_channel_fifo;
  logic clk = 0, rst = 0, wr = 0, rd = 0, full, empty;
  logic [25:0] din = 0, dout;
  logic [25:0] q[$];
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;

  channel_fifo dut (.clk, .rst, .wr, .din, .rd, .dout, .full, .empty);

  always #15.625 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t size=%0d", what, $time, q.size()); end
  endtask

  initial begin
    #40 rst = 0;
    // Fill to four.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); wr = 1; din = 26'(i + 7);
      @(posedge clk); q.push_back(din);
    end
    @(negedge clk); wr = 0;
    check(full && !empty, "full after four writes");
    check(dout == 26'd7, "oldest first");
    // Random traffic.
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 4), "full flag");
      if (q.size() > 0) check(dout == q[0], "head data");
      rd  = (q.size() > 0) && ($urandom_range(0, 1) == 1);
      wr  = (q.size() < 4 || rd) && ($urandom_range(0, 1) == 1);
      din = 26'($urandom);
      @(posedge clk);
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(din);
    end
    @(negedge clk); wr = 0; rd = 0;
    rst = 1; #1;
    check(empty && !full, "reset empties");
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
