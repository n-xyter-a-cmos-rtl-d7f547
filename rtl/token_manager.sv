// token_manager -- injects the read-out token and parks it when there is no data.
//
// The manager is a token cell whose data input is the AND of all channels'
// empty flags: it latches the token only when no channel has data, and while
// it holds it, it re-injects it into the ring on every rising edge. As soon as
// any channel has data, the token passes the manager and is latched by the
// first non-empty channel. This follows the chip. The manager owns the token
// after reset (this design's choice).
//
// Ports: clk, rst, tok_in (end of the ring), empty (all channels' empty
// flags); out: inject (token driven into the ring this cycle), all_empty,
// parked (manager latched the token on the last falling edge).
// Timing: as token_cell.
`timescale 1ns/1ps

module token_manager #(
  parameter int N = nx_pkg::N_CH
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         tok_in,
  input  logic [N-1:0] empty,
  output logic         inject,
  output logic         all_empty,
  output logic         parked
);

  assign all_empty = &empty;

  token_cell #(.HOLD_AT_RESET(1'b1)) u_cell (
    .clk    (clk),
    .rst    (rst),
    .tok_in (tok_in),
    .avail  (all_empty),
    .cap    (parked),
    .grant  (inject)
  );

endmodule
