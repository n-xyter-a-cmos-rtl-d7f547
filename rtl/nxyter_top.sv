// nxyter_top -- digital read-out of the 128-channel n-XYTER neutron detector chip.
//
// Every channel triggers on its own: the time-walk-compensated discriminator
// output latches the 14-bit time stamp and arms the peak detector on the slow
// shaper. After the peak the event {time stamp, amplitude} is written into the
// channel's four-stage FIFO, synchronous to the 32 MHz read-out clock. A token
// ring with one cell per channel and a token manager shares one read-out bus:
// each cycle the token moves to the next channel that has data, which drives
// {channel ID, time stamp, amplitude} on the bus for one cycle. Empty groups
// of 16 channels are bypassed. The digital part of the bus word leaves the
// chip on 8 lines at 128 MHz, the amplitude on an analogue output in step with
// the 32 MHz clock. An I2C slow control holds the analogue settings and reads
// the counters of latched and rejected events. This architecture is the
// chip's; the analogue parts are outside this RTL: the preamplifier, shapers
// and discriminator are represented by the inputs `trig` and `slow_amp`, the
// DACs and test-pulse generator by the setting outputs. The peak detectors
// and the time-stamp delay line are behavioural models (pdh_model,
// ts_delay_line), the rest is synthesizable. Deriving the 32 MHz clock from
// the 128 MHz clock, the output word layout and the register map are this
// design's choices.
//
// Ports: clk256 (time-stamp clock), clk128 (read-out multiplexer clock), rst
// (global reset: zeroes the time-stamp counter, empties the FIFOs, clears the
// settings), trig[ch], slow_amp[ch], I2C (scl, sda_in, sda_oe), outputs
// data[8], frame, amp_out, clk32 and the analogue settings.
// Timing: one event per 32 MHz cycle at most; a hit reaches the bus
// 2..3 + PEAK_CYCLES + 2 read-out cycles after its trigger if the token is free.
`timescale 1ns/1ps

module nxyter_top
  import nx_pkg::*;
#(
  parameter int PEAK_CYCLES = 5,
  parameter int N_DAC       = 16
) (
  input  logic              clk256,
  input  logic              clk128,
  input  logic              rst,
  input  logic [N_CH-1:0]   trig,
  input  logic [AMP_W-1:0]  slow_amp [N_CH],
  input  logic              scl,
  input  logic              sda_in,
  output logic              sda_oe,
  output logic              clk32,
  output logic [LINES-1:0]  data,
  output logic              frame,
  output logic [AMP_W-1:0]  amp_out,
  output logic [7:0]        trim [N_CH],
  output logic [N_CH-1:0]   tp_mask,
  output logic [7:0]        dac [N_DAC],
  output logic              polarity,
  output logic              tp_enable,
  output logic [1:0]        tp_inject,
  output logic [7:0]        tp_amp
);

  logic [TS_W-1:0]  ts;
  logic             clk256_dly;
  logic [3:0]       ts_dly_code;

  logic [N_CH-1:0]  empty, full, cap, grant, tok_in, latched, rejected;
  logic [N_CH-1:0]  pdh_arm, pdh_reset;
  logic [AMP_W-1:0] pdh_held [N_CH];
  bus_word_t        ch_bus   [N_CH];
  bus_word_t        bus;
  logic             bus_valid;

  logic             mgr_inject, mgr_tok_in, all_empty, mgr_parked;
  logic [N_CH/GROUP-1:0] group_bypass;

  out_word_t        word_q;
  logic [AMP_W-1:0] amp_q;
  logic [31:0]      cnt_latched, cnt_rejected;

  // Time stamp ----------------------------------------------------------
  ts_delay_line u_dly (
    .clk_in   (clk256),
    .dly_code (ts_dly_code),
    .clk_out  (clk256_dly)
  );

  timestamp_gen u_ts (
    .clk256     (clk256),
    .clk256_dly (clk256_dly),
    .rst        (rst),
    .ts         (ts)
  );

  // Channels -------------------------------------------------------------
  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    pdh_model u_pdh (
      .slow_in    (slow_amp[c]),
      .arm        (pdh_arm[c]),
      .hold_reset (pdh_reset[c] | rst),
      .held       (pdh_held[c])
    );

    nx_channel #(.PEAK_CYCLES(PEAK_CYCLES)) u_ch (
      .trig      (trig[c]),
      .ts        (ts),
      .clk       (clk32),
      .rst       (rst),
      .ch_id     (CH_W'(c)),
      .pdh_held  (pdh_held[c]),
      .tok_in    (tok_in[c]),
      .pdh_arm   (pdh_arm[c]),
      .pdh_reset (pdh_reset[c]),
      .empty     (empty[c]),
      .full      (full[c]),
      .cap       (cap[c]),
      .grant     (grant[c]),
      .bus_out   (ch_bus[c]),
      .latched   (latched[c]),
      .rejected  (rejected[c])
    );
  end

  // Token ring -------------------------------------------------------------
  token_manager #(.N(N_CH)) u_mgr (
    .clk       (clk32),
    .rst       (rst),
    .tok_in    (mgr_tok_in),
    .empty     (empty),
    .inject    (mgr_inject),
    .all_empty (all_empty),
    .parked    (mgr_parked)
  );

  token_ring #(.N(N_CH), .GROUP(GROUP)) u_ring (
    .grant        (grant),
    .empty        (empty),
    .mgr_inject   (mgr_inject),
    .all_empty    (all_empty),
    .tok_in       (tok_in),
    .mgr_tok_in   (mgr_tok_in),
    .group_bypass (group_bypass)
  );

  // Read-out bus: at most one channel drives it (AND-OR bus).
  always_comb begin
    bus = '0;
    for (int c = 0; c < N_CH; c++) bus |= ch_bus[c];
  end
  assign bus_valid = |grant;

  always_ff @(posedge clk32 or posedge rst) begin
    if (rst) begin
      word_q <= '0;
      amp_q  <= '0;
    end else begin
      word_q <= '{valid: bus_valid, ch: bus.ch, ts: bus.ev.ts, spare: '0};
      amp_q  <= bus.ev.amp;
    end
  end

  ro_mux u_mux (
    .clk128  (clk128),
    .rst     (rst),
    .clk32   (clk32),
    .word    (word_q),
    .amp     (amp_q),
    .data    (data),
    .frame   (frame),
    .amp_out (amp_out)
  );

  // Slow control and monitoring -------------------------------------------
  event_counters #(.N(N_CH), .CNT_W(32)) u_cnt (
    .clk          (clk32),
    .rst          (rst),
    .latched      (latched),
    .rejected     (rejected),
    .cnt_latched  (cnt_latched),
    .cnt_rejected (cnt_rejected)
  );

  slow_control #(.N_DAC(N_DAC)) u_sc (
    .clk          (clk32),
    .rst          (rst),
    .scl          (scl),
    .sda_in       (sda_in),
    .sda_oe       (sda_oe),
    .cnt_latched  (cnt_latched),
    .cnt_rejected (cnt_rejected),
    .trim         (trim),
    .tp_mask      (tp_mask),
    .dac          (dac),
    .polarity     (polarity),
    .tp_enable    (tp_enable),
    .tp_inject    (tp_inject),
    .tp_amp       (tp_amp),
    .ts_dly_code  (ts_dly_code)
  );

endmodule
