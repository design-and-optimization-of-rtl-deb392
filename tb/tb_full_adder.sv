// Self-checking test of full_adder over its truth table: {co, s} must be
// the two-bit count of ones among a, b and ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, ci} = 3'(v);
      ones = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({co, s} !== 2'(ones)) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b: co=%b s=%b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
