// Self-checking test of pg_pre: all 256 pairs of 4-bit operands. The
// expected propagate is 1 where exactly one operand bit is 1, the expected
// generate is 1 where both are, worked out bit by bit from the operands.
module tb_pg_pre;
  logic [3:0] a, b, p, g;
  int checks = 0, failures = 0;

  pg_pre dut (.a(a), .b(b), .p(p), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        for (int k = 0; k < 4; k++) begin
          int ones;
          ones = int'(a[k]) + int'(b[k]);
          checks++;
          if (p[k] != (ones == 1) || g[k] != (ones == 2)) begin
            failures++;
            $display("FAIL a=%b b=%b bit %0d: p=%b g=%b", a, b, k, p[k], g[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
