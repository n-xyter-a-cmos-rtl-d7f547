// hit_ctrl -- per-channel hit logic between the trigger and the channel FIFO.
//
// The time-walk-compensated discriminator output (`trig`) is asynchronous. Its
// rising edge latches the time-stamp bus and sets the channel's hit latch,
// which arms the peak detector (`pdh_arm`). That much follows the chip. The
// latch is built from two toggles: `req_t` flips on an accepted trigger, `ack_t`
// flips in the read-out clock domain when the hit has been handled, and the
// latch output is their XOR. A trigger that arrives while the latch is set is
// ignored (channel dead time). The hit is passed into the 32 MHz read-out
// clock domain through a two-flop synchroniser; then the logic waits
// PEAK_CYCLES clocks for the slow shaper to peak (about 150 ns on the chip,
// i.e. 5 cycles), writes {time stamp, held amplitude} into the channel FIFO
// and pulses `latched`, or drops the hit and pulses `rejected` when the FIFO is
// full. In the cycle after that it resets the peak detector and releases the
// latch. The synchroniser, the wait count and the full-FIFO rule are this
// design's own choices.
//
// Ports: trig (asynchronous), ts (time-stamp bus), clk (32 MHz), rst
// (asynchronous, high), pdh_held (PDH output), fifo_full; outputs pdh_arm,
// pdh_reset, fifo_wr, fifo_din, latched, rejected.
// Timing: a trigger is written 2 + PEAK_CYCLES + 1 rising clock edges after
// it (give or take one for synchroniser phase); the channel accepts a new
// trigger PEAK_CYCLES + 4 cycles after the previous one at the earliest.
`timescale 1ns/1ps

module hit_ctrl
  import nx_pkg::*;
#(
  parameter int PEAK_CYCLES = 5
) (
  input  logic             trig,
  input  logic [TS_W-1:0]  ts,
  input  logic             clk,
  input  logic             rst,
  input  logic [AMP_W-1:0] pdh_held,
  input  logic             fifo_full,
  output logic             pdh_arm,
  output logic             pdh_reset,
  output logic             fifo_wr,
  output event_t           fifo_din,
  output logic             latched,
  output logic             rejected
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_DONE} state_t;

  logic            req_t, ack_t;
  logic [TS_W-1:0] ts_q;
  logic            busy;
  logic [1:0]      req_sync;
  state_t          state;
  logic [$clog2(PEAK_CYCLES+1)-1:0] cnt;

  assign busy = req_t ^ ack_t;

  // Trigger domain: latch the time stamp and set the hit latch.
  always_ff @(posedge trig or posedge rst) begin
    if (rst) begin
      req_t <= 1'b0;
      ts_q  <= '0;
    end else if (!busy) begin
      req_t <= ~req_t;
      ts_q  <= ts;
    end
  end

  // Read-out clock domain.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) req_sync <= '0;
    else     req_sync <= {req_sync[0], req_t};
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      ack_t    <= 1'b0;
      fifo_wr  <= 1'b0;
      fifo_din <= '0;
      latched  <= 1'b0;
      rejected <= 1'b0;
    end else begin
      fifo_wr  <= 1'b0;
      latched  <= 1'b0;
      rejected <= 1'b0;
      unique case (state)
        S_IDLE: if (req_sync[1] != ack_t) begin
          state <= S_WAIT;
          cnt   <= '0;
        end
        S_WAIT: begin
          cnt <= cnt + 1'b1;
          if (cnt == PEAK_CYCLES[$bits(cnt)-1:0] - 1'b1) begin
            state <= S_DONE;
            if (fifo_full) begin
              rejected <= 1'b1;
            end else begin
              fifo_wr     <= 1'b1;
              fifo_din.ts  <= ts_q;
              fifo_din.amp <= pdh_held;
              latched     <= 1'b1;
            end
          end
        end
        S_DONE: begin
          // Peak detector is reset during this cycle; release the latch.
          ack_t <= ~ack_t;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign pdh_arm   = busy;
  assign pdh_reset = (state == S_DONE);

endmodule
