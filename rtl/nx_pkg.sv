// nx_pkg -- constants and types shared by the n-XYTER read-out logic.
//
// The chip has 128 self-triggered channels. Each hit produces a 14-bit time
// stamp and an amplitude; both wait in a four-stage per-channel FIFO until a
// token ring grants the channel the read-out bus for one 32 MHz cycle. The
// channel count, the time-stamp width, the FIFO depth and the bypass group of
// 16 channels are the chip's own numbers. The 7-bit channel ID follows from
// 128 channels. The amplitude is an analogue sample on the chip; here it is a
// 12-bit code (AMP_W, this design's choice) standing in for that sample. The
// 32-bit output word is 8 output lines times 4 slots of 128 MHz per 32 MHz
// read-out cycle.
`timescale 1ns/1ps

package nx_pkg;

  localparam int N_CH       = 128;  // channels per chip
  localparam int CH_W       = 7;    // channel ID width, log2(N_CH)
  localparam int TS_W       = 14;   // time stamp: 13 Gray MSBs + 1 LSB
  localparam int FIFO_DEPTH = 4;    // channel FIFO stages
  localparam int GROUP      = 16;   // channels per token-bypass group
  localparam int AMP_W      = 12;   // amplitude code width (stand-in for the analogue value)
  localparam int WORD_W     = 32;   // read-out word, 8 lines x 4 slots
  localparam int LINES      = 8;    // output data lines
  localparam int SLOTS      = WORD_W / LINES;

  // One stored event: time stamp and peak amplitude.
  typedef struct packed {
    logic [TS_W-1:0]  ts;
    logic [AMP_W-1:0] amp;
  } event_t;

  // What a granted channel puts on the read-out bus.
  typedef struct packed {
    logic [CH_W-1:0]  ch;
    event_t           ev;
  } bus_word_t;

  // Digital word sent over the output lines each 32 MHz cycle.
  typedef struct packed {
    logic             valid;   // a channel was read this cycle
    logic [CH_W-1:0]  ch;      // channel ID (spatial coordinate)
    logic [TS_W-1:0]  ts;      // time stamp
    logic [WORD_W-1-CH_W-TS_W-1:0] spare; // reserved, sent as zero
  } out_word_t;

endpackage
