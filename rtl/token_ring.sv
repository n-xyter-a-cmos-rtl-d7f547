// token_ring -- the token path through the manager and all channels, with group bypasses.
//
// On the chip the token leaves its holder on the rising clock edge and
// ripples through every empty channel until it reaches a channel with data
// (which latches it on the falling edge) or the token manager. To keep the
// ripple short, a bypass skips a whole group of 16 channels when all of them
// are empty, so the worst case is 7 bypasses plus 15 cells instead of 127
// cells. Both are the chip's scheme.
//
// A closed ring is a combinational loop. Because exactly one token exists,
// the ring can be cut at the manager and walked twice: the first pass starts
// with the manager's own injection and ends with whatever reaches the manager
// from any holder; the second pass starts from the manager's output fed with
// that end value and gives every cell input its true value. This unrolling is
// this design's way of writing the ring; it is acyclic and gives the same
// values as the ring for a single token. A cell passes the token when it is
// empty, and drives it when it holds the grant:
//   out(i) = grant(i) | (in(i) & empty(i)).
// The group bypass is a multiplexer that selects the group input when the
// whole group is empty; logically it equals the chain it skips, on the chip
// it cuts the delay. A group whose cell holds the grant is never bypassed,
// even if that cell has just sent its last event and is empty: the token
// starts inside that group (this condition is this design's addition).
//
// Ports: grant/empty of every channel, mgr_inject, all_empty; outputs tok_in
// for every channel, mgr_tok_in, and group_bypass (which groups' bypass is
// active).
// Timing: purely combinational.
`timescale 1ns/1ps

module token_ring #(
  parameter int N     = nx_pkg::N_CH,
  parameter int GROUP = nx_pkg::GROUP
) (
  input  logic [N-1:0]       grant,
  input  logic [N-1:0]       empty,
  input  logic               mgr_inject,
  input  logic               all_empty,
  output logic [N-1:0]       tok_in,
  output logic               mgr_tok_in,
  output logic [N/GROUP-1:0] group_bypass
);

  localparam int NG = N / GROUP;

  // A group is bypassed when all its channels are empty and none of them
  // holds the grant (a holder that has just sent its last event is empty but
  // must still send the token on).
  function automatic logic bypass(input logic [N-1:0] g, input logic [N-1:0] e, input int k);
    return (&e[k*GROUP +: GROUP]) && !(|g[k*GROUP +: GROUP]);
  endfunction

  // One walk from the manager's output to the manager's input.
  function automatic logic walk(input logic start, input logic [N-1:0] g,
                                input logic [N-1:0] e, output logic [N-1:0] ins);
    logic t, c;
    t = start;
    for (int k = 0; k < NG; k++) begin
      c = t;
      for (int j = 0; j < GROUP; j++) begin
        ins[k*GROUP+j] = c;
        c = g[k*GROUP+j] | (c & e[k*GROUP+j]);
      end
      t = bypass(g, e, k) ? t : c;
    end
    return t;
  endfunction

  always_comb begin
    logic          end1, start2;
    logic [N-1:0]  ins1;
    end1       = walk(mgr_inject, grant, empty, ins1);
    // Manager output: its own injection, or the token passing through it
    // while some channel has data.
    start2     = mgr_inject | (end1 & ~all_empty);
    mgr_tok_in = walk(start2, grant, empty, tok_in);
  end

  always_comb
    for (int k = 0; k < NG; k++) group_bypass[k] = bypass(grant, empty, k);

endmodule
