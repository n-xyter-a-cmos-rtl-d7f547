// timestamp_gen -- 14-bit time-stamp generator.
//
// The 13 most significant bits are a Gray-coded counter clocked by the 256 MHz
// time-stamp clock; the least significant bit is the logic OR of that clock
// and a delayed copy of it (from the adjustable delay line), which splits each
// 3.9 ns period so that the resolution is 2 ns or better. The global reset
// zeroes the counter. These are the chip's rules. The counter is kept in
// binary and the Gray value is registered from the next binary value, so the
// bus that the channels latch at arbitrary times has at most one bit changing
// per clock edge; that register is this design's choice.
//
// Ports: clk256, clk256_dly (delayed copy), rst (global, asynchronous, high),
// ts = {gray[12:0], clk256 | clk256_dly}.
// Timing: the Gray part changes on every rising edge of clk256; the LSB is
// combinational from the two clocks.
`timescale 1ns/1ps

module timestamp_gen #(
  parameter int MSB_W = nx_pkg::TS_W - 1
) (
  input  logic             clk256,
  input  logic             clk256_dly,
  input  logic             rst,
  output logic [MSB_W:0]   ts
);

  logic [MSB_W-1:0] bin_q, gray_q;
  logic [MSB_W-1:0] bin_d;

  assign bin_d = bin_q + 1'b1;

  always_ff @(posedge clk256 or posedge rst) begin
    if (rst) begin
      bin_q  <= '0;
      gray_q <= '0;
    end else begin
      bin_q  <= bin_d;
      gray_q <= bin_d ^ (bin_d >> 1);
    end
  end

  assign ts = {gray_q, clk256 | clk256_dly};

endmodule
