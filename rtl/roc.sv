// roc -- read-out controller of one channel.
//
// The read-out controller couples the channel FIFO to the shared read-out
// bus. It contains the channel's token cell, whose data input is "FIFO not
// empty". When the cell has latched the token on a falling edge, the next
// rising edge pops the oldest FIFO entry into an output register, and for
// that clock cycle (grant high) the channel drives {channel ID, time stamp,
// amplitude} onto the bus. The token cell and the one-cycle grant follow the
// chip; reading the FIFO at the start of the grant cycle (so that the empty
// flag seen at the next falling edge already counts the read) and the AND-OR
// bus instead of tri-state drivers are this design's choices.
//
// Ports: clk, rst, ch_id, tok_in, fifo_dout, fifo_empty; outputs fifo_rd,
// cap, grant, bus_out (all zeros while not granted).
// Timing: token latched on falling edge n, FIFO read on rising edge n+1, data
// on the bus from that edge for one cycle.
`timescale 1ns/1ps

module roc
  import nx_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [CH_W-1:0] ch_id,
  input  logic            tok_in,
  input  event_t          fifo_dout,
  input  logic            fifo_empty,
  output logic            fifo_rd,
  output logic            cap,
  output logic            grant,
  output bus_word_t       bus_out
);

  bus_word_t out_q;

  token_cell #(.HOLD_AT_RESET(1'b0)) u_cell (
    .clk    (clk),
    .rst    (rst),
    .tok_in (tok_in),
    .avail  (!fifo_empty),
    .cap    (cap),
    .grant  (grant)
  );

  assign fifo_rd = cap;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      out_q <= '0;
    else if (cap) out_q <= '{ch: ch_id, ev: fifo_dout};
  end

  assign bus_out = grant ? out_q : '0;

endmodule
