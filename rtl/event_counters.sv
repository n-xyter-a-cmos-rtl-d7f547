// event_counters -- chip-wide counters of latched and rejected events.
//
// The chip counts latched and rejected events so that the efficiency of the
// system can be measured. Here every channel's hit logic gives a one-cycle
// pulse when it writes an event into its FIFO (latched) or drops one because
// the FIFO was full (rejected); each cycle the counters add the number of
// pulses (a population count over all channels). The two counters are the
// chip's; their width, wrap-around and chip-wide scope are this design's
// choice.
//
// Ports: clk (32 MHz), rst (asynchronous, high), latched[N], rejected[N];
// outputs cnt_latched, cnt_rejected.
// Timing: a pulse is counted at the next rising edge.
`timescale 1ns/1ps

module event_counters #(
  parameter int N     = nx_pkg::N_CH,
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N-1:0]     latched,
  input  logic [N-1:0]     rejected,
  output logic [CNT_W-1:0] cnt_latched,
  output logic [CNT_W-1:0] cnt_rejected
);

  function automatic logic [CNT_W-1:0] popcount(input logic [N-1:0] v);
    logic [CNT_W-1:0] s = '0;
    for (int i = 0; i < N; i++) s += CNT_W'(v[i]);
    return s;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt_latched  <= '0;
      cnt_rejected <= '0;
    end else begin
      cnt_latched  <= cnt_latched  + popcount(latched);
      cnt_rejected <= cnt_rejected + popcount(rejected);
    end
  end

endmodule
