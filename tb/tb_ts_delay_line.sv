// tb_ts_delay_line -- self-checking test of the delay-line model.
//
// For every delay setting, drives a 256 MHz clock and measures the time from
// each input edge to the matching output edge; it must be (code+1) x 100 ps
// within 1 ps, and the output must keep the input's level pattern.
`timescale 1ns/1ps
module tb_ts_delay_line;
  logic clk = 0, out;
  logic [3:0] code = 0;
  int checks = 0, failures = 0;
  realtime t_in;

  ts_delay_line dut (.clk_in(clk), .dly_code(code), .clk_out(out));

  initial begin
    for (int c = 0; c < 16; c++) begin
      code = 4'(c);
      #10;
      repeat (4) begin
        clk = ~clk; t_in = $realtime;
        @(out);
        checks++;
        if ($realtime - t_in > (c + 1) * 0.100 + 0.001 ||
            $realtime - t_in < (c + 1) * 0.100 - 0.001 || out != clk) begin
          failures++;
          $display("FAIL code %0d delay %f", c, $realtime - t_in);
        end
        #1.953;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
