// tb_roc -- self-checking test of the channel read-out controller.
//
// A queue stands in for the channel FIFO. Random token arrivals and random
// refills; checks that the controller latches the token only when the FIFO
// has data, reads exactly one entry per grant, drives {ID, entry} on the bus
// during the grant cycle and zeros otherwise.
`timescale 1ns/1ps
module tb_roc;
  import nx_pkg::*;
  logic clk = 0, rst = 0, tok = 0, rd, cap, grant;
  event_t q[$];
  event_t head;
  logic empty;
  bus_word_t bus;
  event_t exp_ev;
  int checks = 0, failures = 0, grants = 0;

  initial #1 rst = 1;  // an edge, so asynchronous resets act

  assign empty = (q.size() == 0);
  assign head  = empty ? '0 : q[0];

  roc dut (.clk, .rst, .ch_id(7'd93), .tok_in(tok), .fifo_dout(head), .fifo_empty(empty),
           .fifo_rd(rd), .cap, .grant, .bus_out(bus));

  always #15.625 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  initial begin
    #40 rst = 0;
    for (int n = 0; n < 500; n++) begin
      bit exp_cap;
      // Before the falling edge: set the token and maybe add data.
      @(posedge clk); #2;
      if (q.size() < 4 && $urandom_range(0, 2) == 0) q.push_back(event_t'($urandom));
      tok = 1'($urandom);
      #1;
      exp_cap = tok && !empty;
      @(negedge clk); #1;
      check(cap == exp_cap, "latch only with data");
      check(rd == cap, "read strobe equals latched token");
      if (cap) exp_ev = q[0];
      @(posedge clk); #1;
      if (rd) void'(q.pop_front());
      check(grant == exp_cap, "grant for one cycle");
      if (grant) begin
        grants++;
        check(bus.ch == 7'd93 && bus.ev == exp_ev, "bus word");
      end else begin
        check(bus == '0, "bus idle");
      end
    end
    check(grants > 50, "enough grants");
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
