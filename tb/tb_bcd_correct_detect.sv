// Self-checking test of bcd_correct_detect over all 32 combinations of a
// 4-bit binary sum and its carry out. The flag is expected when the value
// 16*c4 + z is greater than 9. Also counts how many combinations raised it.
module tb_bcd_correct_detect;
  logic [3:0] z;
  logic c4, corr;
  int checks = 0, failures = 0, raised = 0;

  bcd_correct_detect dut (.z(z), .c4(c4), .corr(corr));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c4, z} = 5'(v);
      #1;
      checks++;
      if (corr) raised++;
      if (corr !== (v > 9)) begin
        failures++;
        $display("FAIL c4=%b z=%b: corr=%b", c4, z, corr);
      end
    end
    checks++;
    if (raised != 22) begin
      failures++;
      $display("FAIL flag raised %0d times, expected 22", raised);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
