// Self-checking test of the decimal adder widened to eight digits (32
// bits), showing that the digit chain extends by its DIGITS parameter
// alone. Operands are random valid BCD
// numbers plus directed corner cases. The expected sum is computed in
// integer arithmetic: both operands are decoded to 0..9999, added with
// cin, and the total is re-encoded as four BCD digits plus an overflow
// bit. The test counts how often each mechanism of the design was used and
// fails for any that never happened:
//   - a digit correction (+6) caused by a digit sum of 10..15,
//   - a digit correction caused by a binary carry (digit sum 16..19),
//   - a decimal carry passed through a digit whose own sum was 9,
//   - a carry rippling from digit 0 all the way to co (9999 + 0 + 1),
//   - overflow (co = 1),
//   - use of the carry in.
module tb_bcd_adder32;

  localparam int unsigned N = 8;
  localparam int RANDOM_CASES = 100000;

  logic [4*N-1:0] a, b, s;
  logic           cin, co;
  int checks = 0, failures = 0;
  int n_corr_over9 = 0, n_corr_carry = 0, n_pass9 = 0;
  int n_full_ripple = 0, n_overflow = 0, n_cin = 0;

  bcd_adder16 #(.DIGITS(N)) dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

  function automatic logic [4*N-1:0] to_bcd(input longint v);
    logic [4*N-1:0] r;
    for (int d = 0; d < N; d++) begin
      r[4*d +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic longint from_bcd(input logic [4*N-1:0] x);
    longint v = 0;
    for (int d = N - 1; d >= 0; d--) v = v * 10 + longint'(x[4*d +: 4]);
    return v;
  endfunction

  function automatic longint pow10(input int n);
    longint r = 1;
    repeat (n) r = r * 10;
    return r;
  endfunction

  // Apply one case, check it and count the mechanisms it exercises.
  task automatic run_case(input longint x, input longint y, input bit c);
    longint total, limit;
    int carry;
    logic [4*N-1:0] exp_s;
    logic exp_co;
    limit = pow10(N);
    a = to_bcd(x); b = to_bcd(y); cin = c;
    total = x + y + longint'(c);
    exp_s = to_bcd(total % limit);
    exp_co = (total >= limit);
    #1;
    checks++;
    if (s !== exp_s || co !== exp_co) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: s=%h co=%b, expected %h co=%b",
               x, y, c, s, co, exp_s, exp_co);
    end
    // Mechanism counts, from the operands alone.
    carry = int'(c);
    for (int d = 0; d < N; d++) begin
      int da, db, t;
      da = int'(a[4*d +: 4]); db = int'(b[4*d +: 4]);
      t = da + db + carry;
      if (t >= 16) n_corr_carry++;
      else if (t >= 10) n_corr_over9++;
      if (da + db == 9 && carry == 1) n_pass9++;
      carry = (t >= 10) ? 1 : 0;
    end
    if (exp_co) n_overflow++;
    if (c) n_cin++;
    if (c && x + y == limit - 1) n_full_ripple++;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint limit;
    limit = pow10(N);
    // Directed corner cases.
    run_case(0, 0, 1'b0);
    run_case(0, 0, 1'b1);
    run_case(limit - 1, 0, 1'b1);          // carry ripples through every digit
    run_case(0, limit - 1, 1'b1);
    run_case(limit - 1, limit - 1, 1'b1);  // largest sum
    run_case(limit - 1, limit - 1, 1'b0);
    run_case(limit / 2, limit / 2, 1'b0);  // exact overflow to zero
    run_case(12345678, 87654321, 1'b0);
    run_case(55555555, 44444444, 1'b1);
    run_case(49999999, 50000000, 1'b1);
    // Random valid BCD operands.
    for (int i = 0; i < RANDOM_CASES; i++) begin
      longint x, y;
      x = longint'($urandom_range(32'(limit - 1), 0));
      y = longint'($urandom_range(32'(limit - 1), 0));
      run_case(x, y, 1'($urandom_range(1, 0)));
    end
    $display("mechanisms: correct>9 %0d, correct on binary carry %0d, carry through a 9 %0d, full ripple %0d, overflow %0d, carry in %0d",
             n_corr_over9, n_corr_carry, n_pass9, n_full_ripple, n_overflow, n_cin);
    checks++;
    if (n_corr_over9 == 0 || n_corr_carry == 0 || n_pass9 == 0 ||
        n_full_ripple == 0 || n_overflow == 0 || n_cin == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
