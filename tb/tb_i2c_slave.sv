// tb_i2c_slave -- self-checking test of the I2C slave.
//
// An I2C master writes random bursts to a 256-byte register model behind the
// slave and reads them back with repeated-start bursts; the model also checks
// that each write strobe carries the expected address and data. A transfer
// to another device address must not be acknowledged and must not write.
`timescale 1ns/1ps
module tb_i2c_slave;
  logic clk = 0, rst = 0;
  logic scl, m_low, sda, s_oe, wr_en, rd_load;
  logic [7:0] ptr, wdata, rdata;
  logic [7:0] regs [256];
  logic [7:0] shadow [256];
  int checks = 0, failures = 0, writes = 0;

  initial #1 rst = 1;  // an edge, so asynchronous resets act

  assign sda = !(m_low || s_oe);
  assign rdata = regs[ptr];

  i2c_master_bfm m (.scl, .sda_low(m_low), .sda);
  i2c_slave dut (.clk, .rst, .scl, .sda_in(sda), .sda_oe(s_oe), .ptr, .wr_en, .wdata, .rdata, .rd_load);

  always #15.625 clk = ~clk;
  always @(posedge clk) if (wr_en) begin regs[ptr] <= wdata; writes++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  initial begin
    bit ok;
    logic [7:0] d[];
    for (int i = 0; i < 256; i++) begin regs[i] = 8'(i * 37 + 5); shadow[i] = regs[i]; end
    #100 rst = 0; #1000;
    for (int n = 0; n < 12; n++) begin
      int p, len, w0;
      p = int'($urandom_range(0, 250));
      len = 1 + int'($urandom_range(0, 4));
      w0 = writes;
      d = new[len];
      foreach (d[i]) begin d[i] = 8'($urandom); shadow[p + i] = d[i]; end
      m.write_regs(7'h08, 8'(p), d, ok);
      check(ok, "write acknowledged");
      check(writes - w0 == len, $sformatf("one strobe per data byte %0d vs %0d", writes-w0, len));
      m.read_regs(7'h08, 8'(p), len + 2, d, ok);
      check(ok, "read acknowledged");
      foreach (d[i]) check(d[i] == shadow[p + i], $sformatf("read back %0d", p + i));
    end
    begin
      int w0;
      w0 = writes;
      d = new[2]; d[0] = 8'hAA; d[1] = 8'h55;
      m.write_regs(7'h09, 8'd3, d, ok);
      check(!ok, "foreign address not acknowledged");
      check(writes == w0 && regs[3] == shadow[3], "foreign address does not write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
