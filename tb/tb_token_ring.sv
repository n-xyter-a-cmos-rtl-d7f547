// tb_token_ring -- self-checking test of the token path with group bypasses.
//
// Puts the single token at a random holder (a channel's grant or the
// manager's injection) over random empty patterns, including all-empty
// groups, the worst case of data only in the last channel, and all channels
// empty. The expected input of every cell is worked out here by walking
// around the ring from the holder: the token reaches a position if every
// channel between is empty, and passes the manager only if some channel has
// data. Also checks the per-group bypass flags.
`timescale 1ns/1ps
module tb_token_ring;
  localparam int N = 128, G = 16;
  logic [N-1:0] grant, empty, tok_in;
  logic mgr_inject, all_empty, mgr_tok_in;
  logic [N/G-1:0] byp;
  int checks = 0, failures = 0;

  token_ring dut (.grant, .empty, .mgr_inject, .all_empty, .tok_in, .mgr_tok_in, .group_bypass(byp));

  assign all_empty = &empty;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Ring positions: 0 = manager, 1..N = channels 0..N-1.
  task automatic run(input int holder);
    logic [N:0] exp;
    int p;
    exp = '0;
    p = holder;
    for (int step = 0; step < N + 1; step++) begin
      p = (p + 1) % (N + 1);
      exp[p] = 1'b1;
      // Does the token continue past position p?
      if (p == holder) break;
      if (p == 0 && all_empty) break;
      if (p != 0 && !empty[p-1]) break;
    end
    check(mgr_tok_in == exp[0], $sformatf("manager input, holder %0d", holder));
    for (int c = 0; c < N; c++)
      check(tok_in[c] == exp[c+1], $sformatf("cell %0d input, holder %0d", c, holder));
    for (int g = 0; g < N / G; g++)
      check(byp[g] == (empty[g*G +: G] == '1 && grant[g*G +: G] == '0), "bypass flag");
  endtask

  initial begin
    for (int n = 0; n < 600; n++) begin
      int holder;
      unique case (n % 4)
        0: empty = '1;
        1: begin empty = '1; empty[N-1] = 1'b0; end
        2: for (int w = 0; w < 4; w++) empty[w*32 +: 32] = $urandom | $urandom | $urandom;
        default: begin
          for (int w = 0; w < 4; w++) empty[w*32 +: 32] = $urandom;
          for (int g = 0; g < N / G; g++) if ($urandom_range(0, 1)) empty[g*G +: G] = '1;
        end
      endcase
      // The holder usually has data; sometimes it has just sent its last event.
      holder = (n % 3 == 0 || empty == '1) ? 0 : 1 + int'($urandom_range(0, N - 1));
      if (holder != 0 && n % 5 == 0) empty[holder-1] = 1'b1;
      grant = '0;
      mgr_inject = (holder == 0);
      if (holder != 0) grant[holder-1] = 1'b1;
      #1 run(holder);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
