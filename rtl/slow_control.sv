// slow_control -- I2C-accessible settings and monitoring of the chip.
//
// Through a standard I2C slave the chip's settings are written and its
// monitoring counters are read: the DACs (bias currents, discriminator
// threshold), a per-channel threshold correction, the test-pulse generator's
// amplitude, channel mask and injection point, the signal polarity, and the
// counters of latched and rejected events. Those functions are the chip's;
// the register map, the widths and the reset values (all zero) are this
// design's own:
//   0x00-0x7F  trim[ch]         per-channel threshold correction
//   0x80-0x8F  tp_mask          test-pulse channel mask, byte k = channels 8k..8k+7
//   0x90-0x9F  dac[0..15]       DAC settings
//   0xA0       config           [0] polarity, [1] tp_enable, [3:2] tp_inject
//   0xA1       tp_amp           test-pulse amplitude
//   0xA2       ts_dly_code      [3:0] time-stamp delay-line setting
//   0xA8-0xAB  latched counter  read-only, least significant byte first
//   0xAC-0xAF  rejected counter read-only, least significant byte first
// Reading the lowest byte of a counter returns it live and freezes the other
// three bytes, so a four-byte read is consistent. Other addresses read 0.
//
// Ports: clk, rst, scl, sda_in, sda_oe, cnt_latched, cnt_rejected; settings
// as outputs. Timing: a written byte takes effect one clock after the I2C
// acknowledge bit starts.
`timescale 1ns/1ps

module slow_control
  import nx_pkg::*;
#(
  parameter int         N_DAC    = 16,
  parameter logic [6:0] DEV_ADDR = 7'h08
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  input  logic [31:0] cnt_latched,
  input  logic [31:0] cnt_rejected,
  output logic [7:0]  trim [N_CH],
  output logic [N_CH-1:0] tp_mask,
  output logic [7:0]  dac [N_DAC],
  output logic        polarity,
  output logic        tp_enable,
  output logic [1:0]  tp_inject,
  output logic [7:0]  tp_amp,
  output logic [3:0]  ts_dly_code
);

  localparam logic [7:0] A_MASK = 8'h80, A_DAC = 8'h90, A_CFG = 8'hA0,
                         A_AMP  = 8'hA1, A_DLY = 8'hA2,
                         A_CNTL = 8'hA8, A_CNTR = 8'hAC;
  localparam int REG_N = 'hA3;

  logic [7:0]  ptr, wdata, rdata;
  logic        wr_en, rd_load;
  logic [7:0]  regs [REG_N];
  logic [31:0] snap_l, snap_r;

  i2c_slave #(.DEV_ADDR(DEV_ADDR)) u_i2c (
    .clk     (clk),
    .rst     (rst),
    .scl     (scl),
    .sda_in  (sda_in),
    .sda_oe  (sda_oe),
    .ptr     (ptr),
    .wr_en   (wr_en),
    .wdata   (wdata),
    .rdata   (rdata),
    .rd_load (rd_load)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < REG_N; i++) regs[i] <= '0;
      snap_l <= '0;
      snap_r <= '0;
    end else begin
      if (wr_en && int'(ptr) < REG_N) regs[ptr] <= wdata;
      if (rd_load && ptr == A_CNTL) snap_l <= cnt_latched;
      if (rd_load && ptr == A_CNTR) snap_r <= cnt_rejected;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(ptr) < REG_N)               rdata = regs[ptr];
    else if (ptr == A_CNTL)              rdata = cnt_latched[7:0];
    else if (ptr == A_CNTR)              rdata = cnt_rejected[7:0];
    else if (ptr > A_CNTL && ptr < A_CNTR)
      rdata = snap_l[8*(ptr - A_CNTL) +: 8];
    else if (ptr > A_CNTR && ptr <= A_CNTR + 8'd3)
      rdata = snap_r[8*(ptr - A_CNTR) +: 8];
  end

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      trim[c]    = regs[c];
      tp_mask[c] = regs[int'(A_MASK) + c/8][c%8];
    end
    for (int d = 0; d < N_DAC; d++) dac[d] = regs[int'(A_DAC) + d];
  end

  assign polarity    = regs[A_CFG][0];
  assign tp_enable   = regs[A_CFG][1];
  assign tp_inject   = regs[A_CFG][3:2];
  assign tp_amp      = regs[A_AMP];
  assign ts_dly_code = regs[A_DLY][3:0];

endmodule
