// tb_nxyter_top -- end-to-end test of the whole chip at its default size (128 channels).
//
// Stands in for the analogue front end: a hit on channel c pulses trig[c]
// and drives slow_amp[c] through a slow-shaper-like pulse (rise in 140 ns to
// a chosen peak, then decay). The output lines are deserialised with the
// frame flag; every valid word, with its amplitude, is matched against the
// hits fired on that channel. Expected time stamps come from the testbench's
// own count of 256 MHz edges since reset (Gray coded) and from where in the
// clock period the trigger was placed. Phases:
//   A  configuration over I2C and read-back
//   B  one hit on the last channel: data, and latency trigger -> output frame
//   C  saturation: all channels hit twice, channel 5 twice more; reads must
//      go 0..127, 0..127 (fair sharing), then channel 5 in consecutive cycles
//   D  overflow: all channels hit six times, faster than the bus drains them;
//      rejected hits must match the rejected counter read over I2C
//   E  dead time: a second trigger while the channel is busy is ignored
//   F  time-stamp LSB through the delay line (delay set over I2C)
//   G  random hits for long enough to wrap the time-stamp counter
//   H  global reset with data pending: FIFOs emptied, counters cleared
// Each mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_nxyter_top;
  import nx_pkg::*;

  localparam logic [6:0] DEV = 7'h08;

  logic clk256 = 0, clk128 = 0, rst = 0;
  logic [N_CH-1:0] trig = '0;
  logic [AMP_W-1:0] slow_amp [N_CH];
  logic scl, m_low, sda, s_oe, clk32, frame;
  logic [LINES-1:0] data;
  logic [AMP_W-1:0] amp_out;
  logic [7:0] trim [N_CH];
  logic [N_CH-1:0] tp_mask;
  logic [7:0] dac [16];
  logic polarity, tp_enable;
  logic [1:0] tp_inject;
  logic [7:0] tp_amp;

  int checks = 0, failures = 0;

  nxyter_top dut (.clk256, .clk128, .rst, .trig, .slow_amp, .scl, .sda_in(sda), .sda_oe(s_oe),
                  .clk32, .data, .frame, .amp_out, .trim, .tp_mask, .dac, .polarity,
                  .tp_enable, .tp_inject, .tp_amp);

  assign sda = !(m_low || s_oe);
  i2c_master_bfm m (.scl, .sda_low(m_low), .sda);

  always #1.953 clk256 = ~clk256;
  always #3.906 clk128 = ~clk128;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  // ---- time-stamp model ---------------------------------------------------
  int unsigned n256 = 0;
  always @(posedge clk256) n256++;
  always @(negedge rst) n256 = 0;

  function automatic logic [TS_W-1:0] exp_ts(input bit lsb);
    logic [12:0] b = 13'(n256);
    return {b ^ (b >> 1), lsb};
  endfunction

  // ---- stimulus -----------------------------------------------------------
  typedef struct { logic [TS_W-1:0] ts; logic [AMP_W-1:0] amp; realtime t; } hit_t;
  hit_t sent [N_CH][$];
  int   fired = 0;

  initial for (int c = 0; c < N_CH; c++) slow_amp[c] = '0;

  task automatic shape(input int c, input logic [AMP_W-1:0] peak);
    for (int i = 1; i <= 14; i++) begin #10; slow_amp[c] = AMP_W'(int'(peak) * i / 14); end
    for (int i = 9; i >= 0; i--)  begin #20; slow_amp[c] = AMP_W'(int'(peak) * i / 10); end
  endtask

  // Fire the channels in `chs` together, `late` selects the trigger position
  // in the 256 MHz period (0.5 ns after the rising edge, or 3.0 ns).
  task automatic fire(input int chs[$], input bit late, input bit expect_lsb);
    logic [TS_W-1:0] t;
    @(posedge clk256);
    #(late ? 3.0 : 0.5);
    t = exp_ts(expect_lsb);
    foreach (chs[i]) begin
      automatic int c = chs[i];
      automatic logic [AMP_W-1:0] pk = AMP_W'(200 + $urandom_range(0, 3800));
      trig[c] = 1'b1;
      sent[c].push_back('{ts: t, amp: pk, t: $realtime});
      fired++;
      fork shape(c, pk); join_none
    end
    #4 foreach (chs[i]) trig[chs[i]] = 1'b0;
  endtask

  function automatic void all_ch(ref int q[$]);
    q = {};
    for (int c = 0; c < N_CH; c++) q.push_back(c);
  endfunction

  // ---- receiver -----------------------------------------------------------
  logic [WORD_W-1:0] rx;
  int slot = 0;
  int rx_ch[$];           // channel of every received word, in order
  realtime rx_t[$];
  int received = 0, skipped = 0;
  int prev_ch = -1, same_ch_run = 0;
  int n_consecutive = 0, n_ts_wrap = 0;
  logic [TS_W-1:0] last_ts = 0;

  always @(posedge rst) slot = 0;   // a word cut by the reset is dropped

  always @(posedge clk128) begin
    logic [AMP_W-1:0] a;
    #0.5;
    if (frame) begin
      rx = {data, 24'b0}; slot = 1; a = amp_out;
    end else if (slot > 0 && slot < 4) begin
      rx[WORD_W-1-8*slot -: 8] = data; slot++;
      if (slot == 4 && rx[31]) got(int'(rx[30:24]), rx[23:10], a);
    end
  end

  task automatic got(input int c, input logic [TS_W-1:0] ts, input logic [AMP_W-1:0] a);
    bit found = 0;
    logic [TS_W-1:0] dbg_q[$];
    foreach (sent[c][i]) dbg_q.push_back(sent[c][i].ts);
    received++;
    rx_ch.push_back(c); rx_t.push_back($realtime);
    // Same channel in back-to-back read-out cycles.
    if (c == prev_ch && rx_t.size() > 1 && $realtime - rx_t[rx_t.size()-2] < 31.3) n_consecutive++;
    prev_ch = c;
    while (sent[c].size() > 0) begin
      hit_t h = sent[c].pop_front();
      if (h.ts == ts) begin
        found = 1;
        check(h.amp == amp_out_q(a), $sformatf("amplitude ch %0d: %0d vs %0d", c, a, h.amp));
        break;
      end
      skipped++;
    end
    check(found, $sformatf("word for ch %0d ts %h matches a hit", c, ts));
    if (!found) begin
      $display("  n256=%0d", n256);
      foreach (dbg_q[i]) $display("  queued %h", dbg_q[i]);
    end
  endtask

  function automatic logic [AMP_W-1:0] amp_out_q(input logic [AMP_W-1:0] a);
    return a;
  endfunction

  // Track the last word seen on the read-out bus to detect inactivity.
  int grant_cycles = 0, bypass_cycles = 0, parked_cycles = 0, busy_ignored = 0;
  always @(posedge clk32) begin
    #1;
    if (|dut.grant) grant_cycles++;
    if (|dut.group_bypass && !dut.all_empty) bypass_cycles++;
    if (dut.mgr_parked) parked_cycles++;
  end

  task automatic wait_idle();
    // Until every FIFO is empty and the pipeline to the pins has drained.
    do @(posedge clk32); while (!dut.all_empty || (|dut.pdh_arm));
    repeat (6) @(posedge clk32);
  endtask

  // Hits never matched by a word (rejected at the FIFO): count and forget.
  function automatic int leftovers();
    int n = 0;
    for (int c = 0; c < N_CH; c++) begin n += sent[c].size(); sent[c] = {}; end
    return n;
  endfunction

  task automatic read_counter(input logic [7:0] a, output logic [31:0] v);
    logic [7:0] d[];
    bit ok;
    m.read_regs(DEV, a, 4, d, ok);
    check(ok, "counter read acknowledged");
    v = {d[3], d[2], d[1], d[0]};
  endtask

  int n_fair = 0, n_overflow = 0, n_deadtime = 0, n_lsb = 0, n_reset = 0, n_latency = 0;

  initial begin
    int q[$];
    bit ok;
    logic [7:0] d[];
    logic [31:0] cl, cr;
    int r0, sk0, f0;

    #1 rst = 1;
    #300.3 rst = 0;

    // A: configuration.
    d = new[3]; d[0] = 8'h01; d[1] = 8'h40; d[2] = 8'h00;
    m.write_regs(DEV, 8'hA0, d, ok);
    check(ok && polarity == 1 && tp_amp == 8'h40, "configuration written");
    m.read_regs(DEV, 8'hA0, 3, d, ok);
    check(ok && d[0] == 8'h01 && d[1] == 8'h40 && d[2] == 8'h00, "configuration read back");

    // B: one hit on the last channel; latency to the output frame.
    q = {127};
    fire(q, 0, 1);
    wait_idle();
    check(received == 1 && rx_ch[0] == 127, "single hit on channel 127");
    begin
      realtime lat;
      lat = rx_t[0] - sent_t0 - 3 * 7.812;  // frame seen at slot 3
      check(lat >= 10.5 * 31.248 - 1 && lat <= 11.5 * 31.248 + 1,
            $sformatf("latency %0.1f ns", lat));
      n_latency++;
    end

    // C: saturation and fair sharing, then one channel alone.
    r0 = received;
    all_ch(q);
    fire(q, 0, 1);
    #400;
    fire(q, 1, 0);
    #400; q = {5}; fire(q, 0, 1);
    #400; fire(q, 0, 1);
    wait_idle();
    check(received - r0 == 2 * 128 + 2, $sformatf("saturation words %0d", received - r0));
    begin
      bit fair = 1;
      for (int k = 0; k < 256; k++) if (rx_ch[r0 + k] != k % 128) fair = 0;
      check(fair, "round-robin order over two rounds");
      if (fair) n_fair++;
      check(rx_ch[r0 + 256] == 5 && rx_ch[r0 + 257] == 5 &&
            rx_t[r0 + 257] - rx_t[r0 + 256] < 31.3, "lone channel read in consecutive cycles");
    end

    // D: overflow.
    read_counter(8'hAC, cr);
    check(cr == 0, "no rejections yet");
    r0 = received; sk0 = skipped; f0 = fired;
    all_ch(q);
    repeat (6) begin fire(q, 0, 1); #400; end
    wait_idle();
    read_counter(8'hAC, cr);
    read_counter(8'hA8, cl);
    check(cr > 0, "overflow rejected hits");
    skipped += leftovers();
    check(skipped - sk0 == int'(cr), $sformatf("rejected %0d = missing words %0d", cr, skipped - sk0));
    check(int'(cl) == received, "latched counter = words received");
    check(int'(cl + cr) == fired, "every hit latched or rejected");
    if (cr > 0) n_overflow++;

    // E: dead time.
    r0 = received;
    q = {9};
    fire(q, 0, 1);
    #60 trig[9] = 1; #4 trig[9] = 0;
    wait_idle();
    check(received - r0 == 1, "second trigger during busy ignored");
    read_counter(8'hA8, cl);
    read_counter(8'hAC, cr);
    check(int'(cl + cr) == fired, "ignored trigger not counted");
    if (received - r0 == 1) n_deadtime++;

    // F: LSB with the delay line at 1.6 ns: 3.0 ns after the edge the delayed
    // copy is still high.
    d = new[1]; d[0] = 8'h0F;
    m.write_regs(DEV, 8'hA2, d, ok);
    r0 = received;
    q = {64};
    fire(q, 1, 1);
    wait_idle();
    check(received - r0 == 1, "LSB via delay line");
    if (received - r0 == 1) n_lsb++;
    d[0] = 8'h00;
    m.write_regs(DEV, 8'hA2, d, ok);

    // G: random hits until the time-stamp counter has wrapped.
    r0 = received;
    f0 = int'(n256);
    while (int'(n256) - f0 < 9000) begin
      q = {};
      for (int k = 0; k < 8; k++) begin
        int c;
        c = int'($urandom_range(0, N_CH - 1));
        if (!(c inside {q}) && !dut.pdh_arm[c]) q.push_back(c);
      end
      if (q.size() > 0) begin
        bit late;
        late = 1'($urandom);
        fire(q, late, !late);
      end
      #($urandom_range(300, 900));
    end
    wait_idle();
    read_counter(8'hA8, cl);
    read_counter(8'hAC, cr);
    check(int'(cl) == received && int'(cl + cr) == fired, "random phase accounted");
    check(int'(n256) - f0 >= 8192, "time stamp wrapped during random hits");
    check(received - r0 > 200, $sformatf("random hits read: %0d", received - r0));

    // H: global reset with data pending.
    all_ch(q);
    fire(q, 0, 1);
    repeat (14) @(posedge clk32);
    check(!dut.all_empty, "data pending before reset");
    rst = 1; #100.3; rst = 0;
    r0 = received;
    for (int c = 0; c < N_CH; c++) sent[c] = {};
    #2000;
    check(dut.all_empty && received == r0, "reset emptied the FIFOs");
    read_counter(8'hA8, cl);
    read_counter(8'hAC, cr);
    check(cl == 0 && cr == 0, "reset cleared the counters");
    if (dut.all_empty && received == r0) n_reset++;

    // Mechanisms.
    $display("mechanisms: bypass=%0d parked=%0d fair=%0d consecutive=%0d overflow=%0d deadtime=%0d lsb=%0d reset=%0d latency=%0d",
             bypass_cycles, parked_cycles, n_fair, n_consecutive, n_overflow, n_deadtime, n_lsb, n_reset, n_latency);
    check(bypass_cycles > 0, "token bypass used");
    check(parked_cycles > 0, "token parked at the manager");
    check(n_fair > 0 && n_consecutive > 0 && n_overflow > 0 && n_deadtime > 0 &&
          n_lsb > 0 && n_reset > 0 && n_latency > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime sent_t0;
  always @(posedge trig[127]) if (sent_t0 == 0) sent_t0 = $realtime;

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
