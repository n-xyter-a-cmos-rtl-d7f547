// tb_timestamp_gen -- self-checking test of the time-stamp generator.
//
// Drives the 256 MHz clock (3.906 ns) and a copy delayed by 0.5 ns, then
// checks after every rising edge that the upper 13 bits equal the Gray code
// of the number of edges since reset (worked out here from an independent
// counter), that successive values differ in exactly one bit (also across the
// 8191 -> 0 wrap), that the LSB is the OR of the two clocks at several points
// of the period, and that the global reset zeroes the count.
`timescale 1ns/1ps
module tb_timestamp_gen;
  logic clk = 0, clk_d = 0, rst = 0;
  logic [13:0] ts;
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;
  int unsigned n = 0;
  logic [12:0] prev;

  timestamp_gen dut (.clk256(clk), .clk256_dly(clk_d), .rst(rst), .ts(ts));

  always #1.953 clk = ~clk;
  always @(clk) clk_d <= #0.5 clk;

  function automatic logic [12:0] gray(input int unsigned k);
    logic [12:0] b = 13'(k);
    return b ^ (b >> 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t ts=%h", what, $time, ts); end
  endtask

  initial begin
    #20 rst = 0;
    prev = ts[13:1];
    repeat (8300) begin
      @(posedge clk); n++;
      #0.2;
      check(ts[13:1] == gray(n), "gray count");
      check($countones(ts[13:1] ^ prev) == 1, "one bit change");
      prev = ts[13:1];
      check(ts[0] == 1'b1, "lsb high after edge");
      #1.0;   // clock still high
      check(ts[0] == 1'b1, "lsb while clock high");
      #1.0;   // clock low, delayed copy still high (t = 2.2 ns)
      check(ts[0] == 1'b1, "lsb from delayed copy");
      #0.5;   // both low (t = 2.7 ns)
      check(ts[0] == 1'b0, "lsb low");
    end
    // Global reset zeroes the counter.
    rst = 1; #1;
    check(ts[13:1] == '0, "reset zeroes");
    #10 rst = 0;
    @(posedge clk); #0.2;
    check(ts[13:1] == gray(1), "count restarts");
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
