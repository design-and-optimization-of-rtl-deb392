// Self-checking test of black_cell over its whole truth table. The
// expected pair is that of two stacked spans: the joined span generates
// when the upper one generates, or it propagates a carry the lower one
// generates; it propagates only when both do.
module tb_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, gout, pout;
  int checks = 0, failures = 0;

  black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo),
                  .gout(gout), .pout(pout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      exp_g = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      exp_p = p_hi ? p_lo : 1'b0;
      #1;
      checks++;
      if (gout !== exp_g || pout !== exp_p) begin
        failures++;
        $display("FAIL g_hi=%b p_hi=%b g_lo=%b p_lo=%b: gout=%b pout=%b",
                 g_hi, p_hi, g_lo, p_lo, gout, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
