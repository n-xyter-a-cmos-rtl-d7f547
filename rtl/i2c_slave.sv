// i2c_slave -- I2C slave giving byte access to a register space.
//
// The chip's slow control is reached through a standard I2C interface. This
// slave implements the usual register protocol with 7-bit addressing, which
// is this design's choice of "standard": after its address with the write
// bit, the first byte sets the register pointer and every further byte is
// written to the pointer, which then advances. After its address with the
// read bit, it returns the byte at the pointer and advances after every byte
// the master acknowledges; a not-acknowledge ends the read. A repeated start
// is accepted anywhere, a stop returns to idle. SCL and SDA are sampled with
// the system clock through two-flop synchronisers, so the clock must run at
// least about 20 times the SCL rate (32 MHz against 100 or 400 kHz).
//
// Ports: clk, rst, scl, sda_in (bus level), sda_oe (1 = pull SDA low);
// register side: ptr (current register address), wr_en/wdata (one-cycle
// write of wdata to ptr), rdata (byte at ptr, read combinationally),
// rd_load (high in the cycle whose clock edge takes the byte at ptr for
// sending).
// Timing: SDA is changed one system clock after SCL was seen low, and bits
// are sampled one system clock after SCL was seen high.
`timescale 1ns/1ps

module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h08
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe,
  output logic [7:0] ptr,
  output logic       wr_en,
  output logic [7:0] wdata,
  input  logic [7:0] rdata,
  output logic       rd_load
);

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_ACK_ADDR, S_WR, S_ACK_WR, S_RD, S_ACK_RD
  } state_t;

  logic [2:0] scl_s, sda_s;     // synchronisers plus one stage for edges
  logic       scl_rise, scl_fall, start_c, stop_c;
  state_t     state;
  logic [3:0] bitcnt;
  logic [7:0] sh;
  logic       rw, first, nack, wrote;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_in};
    end
  end

  assign scl_rise = scl_s[1] && !scl_s[2];
  assign scl_fall = !scl_s[1] && scl_s[2];
  assign start_c  = scl_s[1] && scl_s[2] && !sda_s[1] && sda_s[2];
  assign stop_c   = scl_s[1] && scl_s[2] && sda_s[1] && !sda_s[2];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= S_IDLE;
      bitcnt  <= '0;
      sh      <= '0;
      rw      <= 1'b0;
      first   <= 1'b0;
      nack    <= 1'b0;
      wrote   <= 1'b0;
      sda_oe  <= 1'b0;
      ptr     <= '0;
      wr_en   <= 1'b0;
      wdata   <= '0;
    end else begin
      wr_en   <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_ADDR, S_WR: begin
            if (scl_rise) begin
              sh     <= {sh[6:0], sda_s[1]};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              bitcnt <= '0;
              if (state == S_ADDR) begin
                if (sh[7:1] == DEV_ADDR) begin
                  sda_oe <= 1'b1;
                  rw     <= sh[0];
                  first  <= 1'b1;
                  state  <= S_ACK_ADDR;
                end else begin
                  state  <= S_IDLE;
                end
              end else begin
                sda_oe <= 1'b1;
                state  <= S_ACK_WR;
                wrote  <= !first;
                if (first) begin
                  ptr   <= sh;
                  first <= 1'b0;
                end else begin
                  wr_en <= 1'b1;
                  wdata <= sh;
                end
              end
            end
          end
          S_ACK_ADDR: if (scl_fall) begin
            if (rw) begin
              sh      <= rdata;
              sda_oe  <= !rdata[7];
              bitcnt  <= '0;
              state   <= S_RD;
            end else begin
              sda_oe  <= 1'b0;
              state   <= S_WR;
            end
          end
          S_ACK_WR: if (scl_fall) begin
            sda_oe <= 1'b0;
            state  <= S_WR;
            if (wrote) ptr <= ptr + 1'b1;  // advance after a data byte
          end
          S_RD: if (scl_fall) begin
            if (bitcnt == 4'd7) begin
              sda_oe <= 1'b0;          // release SDA for the master's ACK
              state  <= S_ACK_RD;
            end else begin
              sh     <= {sh[6:0], 1'b0};
              sda_oe <= !sh[6];
              bitcnt <= bitcnt + 1'b1;
            end
          end
          S_ACK_RD: begin
            if (scl_rise) begin
              nack <= sda_s[1];
              if (!sda_s[1]) ptr <= ptr + 1'b1;
            end else if (scl_fall) begin
              if (nack) begin
                state <= S_IDLE;
              end else begin
                sh      <= rdata;
                sda_oe  <= !rdata[7];
                  bitcnt  <= '0;
                state   <= S_RD;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The byte at ptr is taken for sending in this cycle.
  assign rd_load = !start_c && !stop_c && scl_fall &&
                   ((state == S_ACK_ADDR && rw) || (state == S_ACK_RD && !nack));

endmodule
