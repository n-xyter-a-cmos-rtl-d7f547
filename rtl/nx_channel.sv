// nx_channel -- digital part of one n-XYTER channel.
//
// One channel of the chip: the hit logic (time-stamp latch, peak-detector
// arming, synchronisation to the read-out clock), the four-stage channel FIFO
// and the read-out controller with its token cell. The analogue front end
// (preamplifier, shapers, discriminator with time-walk compensation) and the
// peak detector sit outside: the channel takes the discriminator output
// `trig` and the held amplitude `pdh_held`, and returns `pdh_arm` and
// `pdh_reset` to the peak detector. The split into these three parts follows
// the chip's channel diagram.
//
// Ports: trig, ts, clk (32 MHz), rst, ch_id, pdh_held, tok_in; outputs
// pdh_arm, pdh_reset, empty, full, cap, grant, bus_out, latched, rejected.
// Timing: see hit_ctrl (trigger to FIFO) and roc (FIFO to bus).
`timescale 1ns/1ps

module nx_channel
  import nx_pkg::*;
#(
  parameter int PEAK_CYCLES = 5
) (
  input  logic             trig,
  input  logic [TS_W-1:0]  ts,
  input  logic             clk,
  input  logic             rst,
  input  logic [CH_W-1:0]  ch_id,
  input  logic [AMP_W-1:0] pdh_held,
  input  logic             tok_in,
  output logic             pdh_arm,
  output logic             pdh_reset,
  output logic             empty,
  output logic             full,
  output logic             cap,
  output logic             grant,
  output bus_word_t        bus_out,
  output logic             latched,
  output logic             rejected
);

  logic   fifo_wr, fifo_rd;
  event_t fifo_din, fifo_dout;

  hit_ctrl #(.PEAK_CYCLES(PEAK_CYCLES)) u_hit (
    .trig      (trig),
    .ts        (ts),
    .clk       (clk),
    .rst       (rst),
    .pdh_held  (pdh_held),
    .fifo_full (full),
    .pdh_arm   (pdh_arm),
    .pdh_reset (pdh_reset),
    .fifo_wr   (fifo_wr),
    .fifo_din  (fifo_din),
    .latched   (latched),
    .rejected  (rejected)
  );

  channel_fifo #(.DEPTH(FIFO_DEPTH), .W($bits(event_t))) u_fifo (
    .clk   (clk),
    .rst   (rst),
    .wr    (fifo_wr),
    .din   (fifo_din),
    .rd    (fifo_rd),
    .dout  (fifo_dout),
    .full  (full),
    .empty (empty)
  );

  roc u_roc (
    .clk        (clk),
    .rst        (rst),
    .ch_id      (ch_id),
    .tok_in     (tok_in),
    .fifo_dout  (fifo_dout),
    .fifo_empty (empty),
    .fifo_rd    (fifo_rd),
    .cap        (cap),
    .grant      (grant),
    .bus_out    (bus_out)
  );

endmodule
