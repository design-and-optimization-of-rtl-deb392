// Self-checking test of gray_cell over its whole truth table. The expected
// output is the carry out of a two-stage span: the upper stage generates,
// or it propagates a carry that the lower stage produced.
module tb_gray_cell;
  logic g, p, gin, gout;
  int checks = 0, failures = 0;

  gray_cell dut (.g(g), .p(p), .gin(gin), .gout(gout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expected;
      {g, p, gin} = 3'(v);
      expected = (v >= 4) ? 1'b1 : ((v == 3) ? 1'b1 : 1'b0);
      #1;
      checks++;
      if (gout !== expected) begin
        failures++;
        $display("FAIL g=%b p=%b gin=%b: gout=%b expected %b", g, p, gin, gout, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
