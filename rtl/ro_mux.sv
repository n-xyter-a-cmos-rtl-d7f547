// ro_mux -- read-out clock divider and 4:1 output multiplexer.
//
// The chip reads one event per 32 MHz cycle; the digital part of it (time
// stamp, channel number and other flags) leaves the chip on 8 output lines
// multiplexed at 128 MHz, and the amplitude leaves on a differential analogue
// buffer in step with the 32 MHz clock. Those rates and the 8 lines are the
// chip's. This design derives the 32 MHz read-out clock by dividing the
// 128 MHz clock by four (so both stay in phase), sends the 32-bit word most
// significant byte first in four 128 MHz slots, marks the first slot with
// `frame`, and holds the amplitude code for the four slots of its word.
//
// Ports: clk128, rst; clk32 (generated read-out clock); word and amp (from
// the 32 MHz domain, stable from one rising edge of clk32 to the next);
// data[8], frame, amp_out (128 MHz domain).
// Timing: clk32 rises on the clk128 edge after which the divider reads 2.
// The word registered on that clk32 edge is loaded two clk128 edges later
// (the edge on which clk32 falls) and goes out in slots 0..3 on that edge and
// the three following ones.
`timescale 1ns/1ps

module ro_mux
  import nx_pkg::*;
(
  input  logic              clk128,
  input  logic              rst,
  output logic              clk32,
  input  out_word_t         word,
  input  logic [AMP_W-1:0]  amp,
  output logic [LINES-1:0]  data,
  output logic              frame,
  output logic [AMP_W-1:0]  amp_out
);

  logic [1:0]        div;
  logic [WORD_W-1:0] sh;

  always_ff @(posedge clk128 or posedge rst) begin
    if (rst) div <= '0;
    else     div <= div + 1'b1;
  end

  assign clk32 = div[1];

  always_ff @(posedge clk128 or posedge rst) begin
    if (rst) begin
      sh      <= '0;
      data    <= '0;
      frame   <= 1'b0;
      amp_out <= '0;
    end else if (div == 2'd3) begin
      sh      <= {word[WORD_W-LINES-1:0], {LINES{1'b0}}};
      data    <= word[WORD_W-1 -: LINES];
      frame   <= 1'b1;
      amp_out <= amp;
    end else begin
      sh      <= {sh[WORD_W-LINES-1:0], {LINES{1'b0}}};
      data    <= sh[WORD_W-1 -: LINES];
      frame   <= 1'b0;
    end
  end

endmodule
