// Self-checking test of pg_post: all propagate and carry patterns. A sum
// bit is expected to be 1 when exactly one of propagate and carry is 1.
module tb_pg_post;
  logic [3:0] p, c, z;
  int checks = 0, failures = 0;

  pg_post dut (.p(p), .c(c), .z(z));

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
        p = 4'(i); c = 4'(j);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (z[k] != (p[k] != c[k])) begin
            failures++;
            $display("FAIL p=%b c=%b bit %0d: z=%b", p, c, k, z[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
