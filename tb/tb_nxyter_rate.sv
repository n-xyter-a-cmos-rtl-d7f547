// tb_nxyter_rate -- rate test of the whole chip at its default size: random
// hits at 20 Mevents/s spread evenly over the 128 channels.
//
// That is the per-chip share of a 100 MHz event rate on a detector read out
// by five chips per coordinate (640 strips), where at most 10% of the events
// may be lost to dead time. Arrivals are drawn per 256 MHz period: with
// probability 20e6 x 3.906 ns one channel, picked at random, is hit in that
// period, 0.5 ns after the rising clock edge. That is a close stand-in for a
// Poisson stream. A hit pulses trig[c] and drives slow_amp[c] through a
// shaper-like pulse with a random peak.
//
// The testbench decides for each hit, from the channel's hit latch, whether
// the chip must ignore it (dead time). Every other hit must come out as a
// word with the right time stamp and amplitude, in per-channel order, or be
// counted as rejected at a full FIFO. At the end the latched and rejected
// counters are read over I2C and compared. The loss (ignored plus rejected)
// must stay under 10%; with a 281 ns channel dead time the expected loss is
// about 156 kHz x 281 ns = 4.4%. The 20 Mevents/s share, the even spread and
// the Bernoulli stand-in are this testbench's own choices.
`timescale 1ns/1ps
module tb_nxyter_rate;
  import nx_pkg::*;

  localparam logic [6:0] DEV = 7'h08;
  localparam real RATE_HZ = 20.0e6;
  localparam real T256_NS = 3.906;
  localparam int  RUN_NS  = 50_000;

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

  // ---- time-stamp model: Gray count of 256 MHz edges since reset ----------
  int unsigned n256 = 0;
  always @(posedge clk256) n256++;
  always @(negedge rst) n256 = 0;

  function automatic logic [TS_W-1:0] exp_ts();
    logic [12:0] b;
    b = 13'(n256);
    return {b ^ (b >> 1), 1'b1};   // 0.5 ns after the edge: both clocks high
  endfunction

  // ---- stimulus -----------------------------------------------------------
  typedef struct { logic [TS_W-1:0] ts; logic [AMP_W-1:0] amp; } hit_t;
  hit_t sent [N_CH][$];
  int   gen  [N_CH];
  int   fired = 0, ignored = 0;

  initial for (int c = 0; c < N_CH; c++) begin slow_amp[c] = '0; gen[c] = 0; end

  // Shaper-like pulse; a newer pulse on the same channel takes over.
  task automatic shape(input int c, input int g, input logic [AMP_W-1:0] peak);
    for (int i = 1; i <= 14; i++) begin
      #10; if (gen[c] == g) slow_amp[c] = AMP_W'(int'(peak) * i / 14);
    end
    for (int i = 9; i >= 0; i--) begin
      #20; if (gen[c] == g) slow_amp[c] = AMP_W'(int'(peak) * i / 10);
    end
  endtask

  task automatic pulse_trig(input int c);
    trig[c] = 1'b1;
    #4 trig[c] = 1'b0;
  endtask

  task automatic hit(input int c);
    logic [AMP_W-1:0] pk;
    fired++;
    if (dut.pdh_arm[c] || trig[c]) begin
      ignored++;                      // channel busy: the chip must drop it
      if (!trig[c]) fork pulse_trig(c); join_none
      return;
    end
    pk = AMP_W'(200 + $urandom_range(0, 3800));
    gen[c]++;
    slow_amp[c] = '0;
    sent[c].push_back('{ts: exp_ts(), amp: pk});
    fork
      pulse_trig(c);
      shape(c, gen[c], pk);
    join_none
  endtask

  // ---- receiver -----------------------------------------------------------
  logic [WORD_W-1:0] rx;
  logic [AMP_W-1:0] rx_amp;
  int slot = 0, received = 0, skipped = 0;

  always @(posedge clk128) begin
    #0.5;
    if (frame) begin
      rx = {data, 24'b0}; slot = 1; rx_amp = amp_out;
    end else if (slot > 0 && slot < 4) begin
      rx[WORD_W-1-8*slot -: 8] = data; slot++;
      if (slot == 4 && rx[31]) got(int'(rx[30:24]), rx[23:10], rx_amp);
    end
  end

  // Words of one channel come out in trigger order; hits passed over were
  // rejected at a full FIFO.
  task automatic got(input int c, input logic [TS_W-1:0] ts, input logic [AMP_W-1:0] a);
    bit found;
    hit_t h;
    found = 0;
    received++;
    while (sent[c].size() > 0) begin
      h = sent[c].pop_front();
      if (h.ts == ts) begin
        found = 1;
        check(h.amp == a, $sformatf("amplitude ch %0d: %0d vs %0d", c, a, h.amp));
        break;
      end
      skipped++;
    end
    check(found, $sformatf("word for ch %0d ts %h matches a hit", c, ts));
  endtask

  task automatic read_counter(input logic [7:0] a, output logic [31:0] v);
    logic [7:0] d[];
    bit ok;
    m.read_regs(DEV, a, 4, d, ok);
    check(ok, "counter read acknowledged");
    v = {d[3], d[2], d[1], d[0]};
  endtask

  int qmax = 0;
  always @(posedge clk32) begin
    int q;
    #1;
    q = 0;
    for (int c = 0; c < N_CH; c++) q += int'(!dut.empty[c]);
    if (q > qmax) qmax = q;
  end

  initial begin
    logic [31:0] cl, cr;
    int left, lost, cycles;
    real p, loss;

    #1 rst = 1;
    #300.3 rst = 0;
    repeat (4) @(posedge clk32);

    p = RATE_HZ * T256_NS * 1.0e-9;
    cycles = int'(RUN_NS / T256_NS);
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk256);
      #0.5;
      if (real'($urandom_range(0, 999_999)) < p * 1.0e6) hit(int'($urandom_range(0, N_CH - 1)));
    end

    // Drain: every FIFO empty, every hit written, words out of the pins.
    do @(posedge clk32); while (!dut.all_empty || (|dut.pdh_arm));
    repeat (8) @(posedge clk32);

    left = skipped;
    for (int c = 0; c < N_CH; c++) begin left += sent[c].size(); sent[c] = {}; end
    read_counter(8'hA8, cl);
    read_counter(8'hAC, cr);
    check(int'(cl) == received, $sformatf("latched counter %0d = words received %0d", cl, received));
    check(int'(cr) == left, $sformatf("rejected counter %0d = hits with no word %0d", cr, left));
    check(received + left + ignored == fired, "every hit received, rejected or ignored");

    lost = ignored + left;
    loss = real'(lost) / real'(fired);
    check(fired > 700, $sformatf("enough hits fired (%0d)", fired));
    check(ignored > 0, "dead time occurred");
    check(loss < 0.10, $sformatf("loss %0.3f under 10%%", loss));
    $display("rate: fired=%0d received=%0d ignored=%0d rejected=%0d loss=%0.2f%% peak non-empty FIFOs=%0d",
             fired, received, ignored, left, 100.0 * loss, qmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(RUN_NS + 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
