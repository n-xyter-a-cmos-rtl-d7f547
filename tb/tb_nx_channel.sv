// tb_nx_channel -- self-checking test of one channel's digital part.
//
// With the token withheld, six hits fill the four-stage FIFO and the last two
// are rejected. With the token offered every cycle the channel then sends its
// four events in four consecutive cycles (a lone channel gets the whole bus).
// Then random hits with a randomly offered token: every latched event must
// come out on the bus in order with the channel ID, the time stamp present at
// its trigger and the amplitude held by the peak detector.
`timescale 1ns/1ps
module tb_nx_channel;
  import nx_pkg::*;
  logic clk = 0, rst = 0, trig = 0, tok = 0;
  logic [TS_W-1:0] ts = 0;
  logic [AMP_W-1:0] held = 0;
  logic arm, pres, empty, full, cap, grant, lat, rej;
  bus_word_t bus;
  event_t exp_q[$];
  int checks = 0, failures = 0, nlat = 0, nrej = 0, nout = 0, run = 0, maxrun = 0;

  initial #1 rst = 1;  // an edge, so asynchronous resets act

  nx_channel dut (.trig, .ts, .clk, .rst, .ch_id(7'd42), .pdh_held(held), .tok_in(tok),
                  .pdh_arm(arm), .pdh_reset(pres), .empty, .full, .cap, .grant,
                  .bus_out(bus), .latched(lat), .rejected(rej));

  always #15.625 clk = ~clk;
  always #3.906 ts = ts + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  always @(posedge clk) begin
    #1;
    if (lat) nlat++;
    if (rej) nrej++;
    if (grant) begin
      run++; if (run > maxrun) maxrun = run;
      nout++;
      check(exp_q.size() > 0, "no spurious read");
      if (exp_q.size() > 0) begin
        check(bus.ch == 7'd42 && bus.ev == exp_q[0], "event on bus");
        void'(exp_q.pop_front());
      end
    end else begin
      run = 0;
      check(bus == '0, "bus idle");
    end
  end

  // One hit; the held amplitude is set after the trigger. Expect it stored
  // if `store`.
  task automatic hit(input bit store);
    event_t ev;
    @(negedge clk); #3;
    trig = 1; ev.ts = ts; #4 trig = 0;
    ev.amp = AMP_W'($urandom);
    #50 held = ev.amp;
    wait (!arm);
    if (store) exp_q.push_back(ev);
  endtask

  initial begin
    #40 rst = 0; #100;
    for (int i = 0; i < 6; i++) hit(i < 4);
    repeat (2) @(posedge clk);
    check(nlat == 4 && nrej == 2, "four stored, two rejected");
    check(full, "FIFO full");
    @(posedge clk); #2 tok = 1;
    repeat (8) @(posedge clk);
    check(maxrun == 4 && nout == 4, "four reads in four consecutive cycles");
    check(empty && exp_q.size() == 0, "drained");
    for (int i = 0; i < 200; i++) begin
      fork
        hit(1'b1);
        repeat (12) begin @(posedge clk); #2 tok = ($urandom_range(0, 3) == 0); end
      join
      // A hit that found the FIFO full was rejected: drop it from the model.
      if (nlat + nrej != i + 7) check(0, "every hit latched or rejected");
      if (rej_seen()) void'(exp_q.pop_back());
    end
    tok = 1;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all latched events read");
    check(nout == nlat, "one read per latched event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rej_last = 2;
  function automatic bit rej_seen();
    bit r = (nrej != rej_last);
    rej_last = nrej;
    return r;
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
