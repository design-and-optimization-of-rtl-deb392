// Self-checking test of bcd_digit_adder: every pair of valid BCD digits
// with carry in 0 and 1 (200 cases). The expected result is the decimal
// sum t = a + b + cin: digit t mod 10, carry t / 10. Counts how often the
// decimal correction was needed, split into sums 10..15 (binary sum above
// 9) and 16..19 (binary carry out), and fails if either never happened.
module tb_bcd_digit_adder;
  import bcd_pkg::*;
  bcd_digit_t a, b, s;
  logic cin, co;
  int checks = 0, failures = 0;
  int corr_over9 = 0, corr_carry = 0, no_corr = 0;

  bcd_digit_adder dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++) begin
      for (int i = 0; i <= 9; i++) begin
        for (int j = 0; j <= 9; j++) begin
          int t;
          a = 4'(i); b = 4'(j); cin = 1'(ci);
          t = i + j + ci;
          #1;
          checks++;
          if (s !== 4'(t % 10) || co !== (t >= 10)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: s=%0d co=%0d", i, j, ci, s, co);
          end
          if (t >= 16) corr_carry++;
          else if (t >= 10) corr_over9++;
          else no_corr++;
        end
      end
    end
    $display("correction cases: sum 10..15 %0d, sum 16..19 %0d, none %0d",
             corr_over9, corr_carry, no_corr);
    checks++;
    if (corr_over9 == 0 || corr_carry == 0 || no_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
