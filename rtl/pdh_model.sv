// pdh_model -- behavioural model of the peak-detector-and-hold circuit.
//
// This is not synthesizable logic: the real part is an analogue circuit (an
// amplifier whose output charges a hold capacitor through a current mirror,
// with a reset switch across the capacitor, and a buffer on the capacitor
// voltage). The model keeps that behaviour with codes instead of voltages:
// while `arm` is high the held value follows `slow_in` upwards and never down,
// so it ends at the pulse's maximum; while `hold_reset` is high the capacitor
// is discharged to zero. The arming by the time-walk-compensated trigger and
// the reset switch follow the chip; representing the voltage as an AMP_W-bit
// code is this model's choice.
//
// The held value is state without a clock, so lint and synthesis report it
// as a latch with a feedback path through the comparison; that is the hold
// capacitor being modelled, and it stays.
//
// Ports: slow_in (slow shaper output as a code), arm, hold_reset, held.
// Timing: event driven, no clock; `held` changes in the same time step as
// the input that moves it.
`timescale 1ns/1ps

module pdh_model #(
  parameter int AMP_W = nx_pkg::AMP_W
) (
  input  logic [AMP_W-1:0] slow_in,
  input  logic             arm,
  input  logic             hold_reset,
  output logic [AMP_W-1:0] held
);

  logic [AMP_W-1:0] cap_v = '0;  // voltage on C_hold

  always @(slow_in, arm, hold_reset) begin
    if (hold_reset)
      cap_v = '0;
    else if (arm && slow_in > cap_v)
      cap_v = slow_in;
  end

  assign held = cap_v;

endmodule
