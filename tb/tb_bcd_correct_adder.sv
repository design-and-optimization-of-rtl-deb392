// Self-checking test of bcd_correct_adder: every 4-bit input with the flag
// clear (output must equal input) and set (output must be input + 6,
// modulo 16).
module tb_bcd_correct_adder;
  logic [3:0] z, s;
  logic corr;
  int checks = 0, failures = 0;

  bcd_correct_adder dut (.z(z), .corr(corr), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int v = 0; v < 16; v++) begin
        logic [3:0] expected;
        z = 4'(v); corr = 1'(f);
        expected = 4'((v + 6 * f) % 16);
        #1;
        checks++;
        if (s !== expected) begin
          failures++;
          $display("FAIL z=%0d corr=%0d: s=%0d expected %0d", v, f, s, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
