// Self-checking test of carry_network: every operand pair and carry in.
// The bit propagate/generate are formed from the operands here, and the
// expected carries come from the integer sum: the carry into bit i+1 is
// bit i+1 of (a mod 2^(i+1)) + (b mod 2^(i+1)) + cin. The group signals
// are checked against their definitions: the block propagates when
// a + b = 15, and generates when a + b > 15.
module tb_carry_network;
  logic [3:0] a, b, p, g, c;
  logic cin, p_out, g_out;
  int checks = 0, failures = 0;

  assign p = a ^ b;
  assign g = a & b;

  carry_network dut (.p(p), .g(g), .cin(cin), .c(c), .p_out(p_out), .g_out(g_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          logic [3:0] exp_c;
          a = 4'(i); b = 4'(j); cin = 1'(ci);
          #1;
          for (int k = 0; k < 4; k++) begin
            int m, t;
            m = 1 << (k + 1);
            t = (i % m) + (j % m) + ci;
            exp_c[k] = (t >= m);
          end
          checks++;
          if (c !== exp_c || p_out !== (i + j == 15) || g_out !== (i + j > 15)) begin
            failures++;
            $display("FAIL a=%0d b=%0d cin=%0d: c=%b exp %b p_out=%b g_out=%b",
                     i, j, ci, c, exp_c, p_out, g_out);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
