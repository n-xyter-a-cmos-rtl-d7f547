// channel_fifo -- four-stage derandomising FIFO of one channel.
//
// Each channel buffers up to four events (14-bit time stamp plus amplitude)
// until the token ring grants it the read-out bus. Depth four and the purpose
// are the chip's; on the chip the amplitude sits in analogue hold cells next
// to the digital time-stamp cells, here both are one register array of W bits
// (the amplitude as a code). Pointers and the occupancy count are this
// design's choice. Both ports run on the 32 MHz read-out clock; a read and a
// write in the same cycle are allowed, also when full (the read frees the
// stage the write takes). The global reset empties the FIFO.
//
// Ports: clk, rst (asynchronous, high), wr/din, rd/dout (dout is the oldest
// entry, valid while !empty), full, empty.
// Timing: a write is visible at dout (if the FIFO was empty) and in the flags
// right after the rising edge that takes it.
`timescale 1ns/1ps

module channel_fifo #(
  parameter int DEPTH = nx_pkg::FIFO_DEPTH,
  parameter int W     = $bits(nx_pkg::event_t)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] din,
  input  logic         rd,
  output logic [W-1:0] dout,
  output logic         full,
  output logic         empty
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_rd = rd && !empty;
  assign do_wr = wr && (!full || do_rd);
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_wr) begin
        mem[wp] <= din;
        wp      <= inc(wp);
      end
      if (do_rd) rp <= inc(rp);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // Handshake rules: the hit logic never writes a full FIFO and the read-out
  // controller never reads an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr && full && !rd));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd && empty));

endmodule
