// token_cell -- one cell of the read-out token ring.
//
// The token travels the ring within a read-out clock cycle. On the falling
// clock edge a cell whose `avail` input is high latches the token if it is
// present at `tok_in`; on the following rising edge the cell holds the grant
// for one clock cycle (`grant`), and during that cycle the token leaves the
// cell again, travelling on to the next cell that has data. Cells without
// data pass the token straight through; that pass-through gate lives in
// token_ring so that the closed ring can be described without a
// combinational loop. This falling-edge capture and rising-edge hand-over
// is the chip's scheme; the reset value (HOLD_AT_RESET) is this design's
// choice: the token manager starts with the token, every channel without.
//
// Ports: clk (32 MHz), rst (asynchronous, high), tok_in, avail;
// outputs cap (token latched on the last falling edge) and grant.
// Timing: cap changes on falling edges, grant on rising edges (grant = cap of
// the preceding falling edge).
`timescale 1ns/1ps

module token_cell #(
  parameter bit HOLD_AT_RESET = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic tok_in,
  input  logic avail,
  output logic cap,
  output logic grant
);

  always_ff @(negedge clk or posedge rst) begin
    if (rst) cap <= HOLD_AT_RESET;
    else     cap <= tok_in && avail;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) grant <= 1'b0;
    else     grant <= cap;
  end

endmodule
