// i2c_master_bfm -- I2C bus master for testbenches (400 kHz, 7-bit addresses).
//
// Drives SCL and pulls SDA low through `sda_low`; `sda` is the bus level
// (pull-up AND all open-drain drivers), assembled by the testbench. Tasks:
//   write_regs(dev, ptr, data[], ok)   register-pointer write with auto-increment
//   read_regs(dev, ptr, n, data[], ok) pointer write, repeated start, read n bytes
// `ok` is 0 if any address or data byte was not acknowledged.
`timescale 1ns/1ps
module i2c_master_bfm (
  output logic scl,
  output logic sda_low,
  input  logic sda
);
  localparam realtime Q = 625ns;   // quarter of the 2.5 us SCL period

  initial begin scl = 1'b1; sda_low = 1'b0; end

  task automatic start_c();
    sda_low = 1'b0; #(Q); scl = 1'b1; #(Q);
    sda_low = 1'b1; #(Q); scl = 1'b0; #(Q);
  endtask

  task automatic stop_c();
    sda_low = 1'b1; #(Q); scl = 1'b1; #(Q);
    sda_low = 1'b0; #(2*Q);
  endtask

  task automatic send_byte(input logic [7:0] b, output bit ack);
    for (int i = 7; i >= 0; i--) begin
      sda_low = !b[i]; #(Q); scl = 1'b1; #(2*Q); scl = 1'b0; #(Q);
    end
    sda_low = 1'b0; #(Q); scl = 1'b1; #(Q);
    ack = (sda == 1'b0);
    #(Q); scl = 1'b0; #(Q);
  endtask

  task automatic recv_byte(input bit ack, output logic [7:0] b);
    sda_low = 1'b0;
    for (int i = 7; i >= 0; i--) begin
      #(Q); scl = 1'b1; #(Q); b[i] = sda; #(Q); scl = 1'b0; #(Q);
    end
    sda_low = ack; #(Q); scl = 1'b1; #(2*Q); scl = 1'b0; #(Q);
    sda_low = 1'b0;
  endtask

  task automatic write_regs(input logic [6:0] dev, input logic [7:0] ptr,
                            input logic [7:0] data[], output bit ok);
    bit a;
    ok = 1'b1;
    start_c();
    send_byte({dev, 1'b0}, a); ok &= a;
    send_byte(ptr, a);         ok &= a;
    foreach (data[i]) begin send_byte(data[i], a); ok &= a; end
    stop_c();
  endtask

  task automatic read_regs(input logic [6:0] dev, input logic [7:0] ptr, input int n,
                           output logic [7:0] data[], output bit ok);
    bit a;
    ok = 1'b1;
    data = new[n];
    start_c();
    send_byte({dev, 1'b0}, a); ok &= a;
    send_byte(ptr, a);         ok &= a;
    sda_low = 1'b0; #(Q); scl = 1'b1; #(Q);   // repeated start
    sda_low = 1'b1; #(Q); scl = 1'b0; #(Q);
    send_byte({dev, 1'b1}, a); ok &= a;
    for (int i = 0; i < n; i++) recv_byte(i != n - 1, data[i]);
    stop_c();
  endtask
endmodule
