// tb_slow_control -- self-checking test of the slow-control register file.
//
// Over I2C: writes threshold trims, the test-pulse channel mask, DACs, the
// configuration, the test amplitude and the delay setting, and checks the
// decoded outputs and the read-back. The event counters are driven here with
// a value whose four bytes are equal and change every clock, so a consistent four-byte read
// has four equal bytes; a torn read would not.
`timescale 1ns/1ps
module tb_slow_control;
  import nx_pkg::*;
  logic clk = 0, rst = 0;
  logic scl, m_low, sda, s_oe;
  logic [31:0] cl = 0, cr = 0;
  logic [7:0] trim [N_CH];
  logic [N_CH-1:0] tp_mask;
  logic [7:0] dac [16];
  logic pol, tpe;
  logic [1:0] tpi;
  logic [7:0] tpa;
  logic [3:0] dly;
  logic [7:0] exp_trim [N_CH];
  int checks = 0, failures = 0;

  initial #1 rst = 1;  // an edge, so asynchronous resets act

  assign sda = !(m_low || s_oe);

  i2c_master_bfm m (.scl, .sda_low(m_low), .sda);
  slow_control dut (.clk, .rst, .scl, .sda_in(sda), .sda_oe(s_oe), .cnt_latched(cl),
                    .cnt_rejected(cr), .trim, .tp_mask, .dac, .polarity(pol),
                    .tp_enable(tpe), .tp_inject(tpi), .tp_amp(tpa), .ts_dly_code(dly));

  always #15.625 clk = ~clk;
  logic [7:0] k = 0;
  always @(posedge clk) if (!rst) begin
    k  <= k + 1'b1;
    cl <= {4{k}};
    cr <= {4{k[6:0], 1'b0}};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%t", what, $time); end
  endtask

  initial begin
    bit ok;
    logic [7:0] d[];
    logic [N_CH-1:0] mask;
    #100 rst = 0; #1000;
    check(pol == 0 && tpe == 0 && tp_mask == '0 && trim[5] == 0, "reset values");
    // Trims: channels 0..127 in one burst.
    d = new[N_CH];
    foreach (d[i]) begin d[i] = 8'($urandom); exp_trim[i] = d[i]; end
    m.write_regs(7'h08, 8'h00, d, ok);
    check(ok, "trim burst acknowledged");
    for (int c = 0; c < N_CH; c++) check(trim[c] == exp_trim[c], $sformatf("trim %0d", c));
    // Mask, DACs, config, amplitude, delay.
    mask = {$urandom, $urandom, $urandom, $urandom};
    d = new[16];
    foreach (d[i]) d[i] = mask[8*i +: 8];
    m.write_regs(7'h08, 8'h80, d, ok);
    check(ok && tp_mask == mask, "test-pulse mask");
    foreach (d[i]) d[i] = 8'(3 * i + 1);
    m.write_regs(7'h08, 8'h90, d, ok);
    for (int i = 0; i < 16; i++) check(dac[i] == 8'(3 * i + 1), "DAC");
    d = new[3]; d[0] = 8'b0000_1011; d[1] = 8'hC3; d[2] = 8'h07;
    m.write_regs(7'h08, 8'hA0, d, ok);
    check(pol == 1 && tpe == 1 && tpi == 2'b10 && tpa == 8'hC3 && dly == 4'h7, "config");
    // Read back a stretch across the DAC and config registers.
    m.read_regs(7'h08, 8'h9E, 5, d, ok);
    check(ok && d[0] == 8'(3*14+1) && d[1] == 8'(3*15+1) && d[2] == 8'h0B && d[3] == 8'hC3 && d[4] == 8'h07, "read back");
    // Counters: four-byte reads must be consistent.
    for (int k = 0; k < 4; k++) begin
      m.read_regs(7'h08, 8'hA8, 4, d, ok);
      check(ok && d[0] == d[1] && d[1] == d[2] && d[2] == d[3], $sformatf("latched counter consistent %h %h %h %h", d[0], d[1], d[2], d[3]));
      m.read_regs(7'h08, 8'hAC, 4, d, ok);
      check(ok && d[0] == d[1] && d[1] == d[2] && d[2] == d[3] && d[0][0] == 1'b0, "rejected counter consistent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
