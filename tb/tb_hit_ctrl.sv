// tb_hit_ctrl -- self-checking test of the per-channel hit logic.
//
// Fires asynchronous triggers half-way between clock edges, with a time stamp
// and an amplitude chosen here, and checks: the peak detector is armed at
// once; the FIFO write comes exactly 8 clock edges after the trigger (2 for
// the synchroniser, 5 for the peak, 1 for the write) carrying the time stamp
// present at the trigger and the held amplitude; a second trigger while the
// channel is busy is ignored; a full FIFO gives a `rejected` pulse and no
// write; the peak detector is reset before the channel is released.
`timescale 1ns/1ps
module tb_hit_ctrl;
  import nx_pkg::*;
  logic clk = 0, rst = 0, trig = 0, full = 0;
  logic [TS_W-1:0] ts = 0;
  logic [AMP_W-1:0] held = 0;
  logic arm, pres, wr, lat, rej;
  event_t din;
  initial #1 rst = 1;  // an edge, so asynchronous resets act
  int checks = 0, failures = 0;
  int edges = 0;

  hit_ctrl dut (.trig, .ts, .clk, .rst, .pdh_held(held), .fifo_full(full),
                .pdh_arm(arm), .pdh_reset(pres), .fifo_wr(wr), .fifo_din(din),
                .latched(lat), .rejected(rej));

  always #15.625 clk = ~clk;
  always @(posedge clk) edges++;
  always #3.906 ts = ts + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  // One hit; returns after the channel is free again.
  task automatic hit(input bit fifo_full, input bit extra_trigger);
    logic [TS_W-1:0] ts_exp;
    logic [AMP_W-1:0] amp_exp;
    int e0, nwr = 0, nrej = 0, nlat = 0, nres = 0, lat_edges = -1;
    @(negedge clk);
    full = fifo_full;
    e0 = edges;
    trig = 1; ts_exp = ts; #5 trig = 0;
    check(arm, "armed by trigger");
    amp_exp = AMP_W'($urandom);
    #40 held = amp_exp;
    if (extra_trigger) begin
      #30 ts = ts + 14'd100; trig = 1; #5 trig = 0;
    end
    while (arm) begin
      @(posedge clk); #1;
      if (wr) begin
        nwr++; lat_edges = edges - e0;
        check(din.ts == ts_exp && din.amp == amp_exp, "written event");
      end
      if (rej) nrej++;
      if (lat) nlat++;
      if (pres) nres++;
    end
    check(nwr == (fifo_full ? 0 : 1) && nlat == nwr, "one write unless full");
    check(nrej == (fifo_full ? 1 : 0), "rejected when full");
    check(nres == 1, "peak detector reset once");
    if (!fifo_full) check(lat_edges == 2 + 5 + 1, $sformatf("latency %0d", lat_edges));
    check(edges - e0 == 2 + 5 + 2, "busy time");
    repeat (3) @(posedge clk);
    #1 check(!wr && !rej && !arm, "idle afterwards");
  endtask

  initial begin
    #40 rst = 0;
    #100;
    check(!arm && !wr, "idle after reset");
    for (int i = 0; i < 30; i++) hit(i % 7 == 3, i % 5 == 2);
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
