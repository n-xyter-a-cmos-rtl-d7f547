// tb_ro_mux -- self-checking test of the read-out clock divider and output multiplexer.
//
// Drives the 128 MHz clock, checks that clk32 is the clock divided by four,
// presents a new random word and amplitude after every rising edge of clk32
// (as the read-out register does), deserialises the 8 output lines using the
// frame flag and checks every word and amplitude in order.
`timescale 1ns/1ps
module tb_ro_mux;
  import nx_pkg::*;
  logic clk = 0, rst = 0, clk32, frame;
  out_word_t word = '0;
  logic [AMP_W-1:0] amp = '0, amp_out;
  logic [LINES-1:0] data;
  logic [WORD_W-1:0] sent_w[$];
  logic [AMP_W-1:0]  sent_a[$];
  logic [WORD_W-1:0] rx;
  int slot = -1, words = 0;
  int checks = 0, failures = 0;
  realtime t_rise = 0, period = 0;

  initial #1 rst = 1;  // an edge, so asynchronous resets act

  ro_mux dut (.clk128(clk), .rst, .clk32, .word, .amp, .data, .frame, .amp_out);

  always #3.906 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  // Source in the 32 MHz domain.
  always @(posedge clk32) if (!rst) begin
    period = $realtime - t_rise; t_rise = $realtime;
    word <= '{valid: 1'($urandom), ch: 7'($urandom), ts: 14'($urandom), spare: '0};
    amp  <= AMP_W'($urandom);
    #1 sent_w.push_back(word); sent_a.push_back(amp);
  end

  // Receiver in the 128 MHz domain.
  always @(posedge clk) if (!rst) begin
    #0.5;
    if (frame) begin
      rx = {data, 24'b0}; slot = 1;
      check(sent_a.size() > 0 && amp_out == sent_a[0], "amplitude with its word");
    end else if (slot > 0 && slot < 4) begin
      rx[WORD_W-1-8*slot -: 8] = data; slot++;
      if (slot == 4) begin
        check(sent_w.size() > 0 && rx == sent_w[0], "word");
        void'(sent_w.pop_front()); void'(sent_a.pop_front());
        words++;
      end
    end
  end

  initial begin
    #50 rst = 0;
    #20000;
    check(words > 600, "words received");
    check(period > 31.2 && period < 31.3, "clk32 period");
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
