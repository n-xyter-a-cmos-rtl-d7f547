// ts_delay_line -- behavioural model of the adjustable clock delay line.
//
// Not synthesizable: the real part is an analogue delay line that produces a
// delayed copy of the 256 MHz time-stamp clock; the OR of the clock and this
// copy gives the time stamp's least significant bit. The chip makes the delay
// adjustable; the range and the step are this model's choice: the delay is
// (dly_code + 1) * STEP_PS picoseconds, i.e. 100 ps to 1.6 ns with the
// defaults. The model waits for each input edge, lets the set delay pass and
// copies the input level; this is exact as long as the delay stays below half
// a clock period (1.95 ns at 256 MHz), which the default range does.
//
// Ports: clk_in (256 MHz), dly_code (delay setting), clk_out (delayed copy).
// Timing: the output follows each input edge after the set delay.
`timescale 1ns/1ps

module ts_delay_line #(
  parameter int STEP_PS = 100,
  parameter int CODE_W  = 4
) (
  input  logic              clk_in,
  input  logic [CODE_W-1:0] dly_code,
  output logic              clk_out
);

  logic q;

  initial q = 1'b0;

  always begin
    @(clk_in);
    #((dly_code + 1) * STEP_PS * 1ps);
    q = clk_in;
  end

  assign clk_out = q;

endmodule
