// One decimal digit of the carry look-ahead decimal adder.
// Adds two BCD digits a, b (0..9) and a carry in, giving a BCD digit s and
// a decimal carry out co. It works in three steps:
//   1. a 4-bit binary lookahead add: pg_pre forms bit propagate/generate,
//      carry_network forms c1..c4 from them and cin with gray cells, and
//      pg_post forms the binary sum z;
//   2. bcd_correct_detect raises corr when z > 9 or c4 is set;
//   3. bcd_correct_adder adds 6 to z when corr is set.
// corr itself is the decimal carry out. The structure follows the design
// description; the group propagate/generate of the carry network are not
// used here because digits are chained through their decimal carry.
// Combinational; worst path: pre, two prefix levels, gray cell, post,
// detect, three full adders.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       co
);
  logic [3:0] p, g, c, z;
  logic       corr;
  logic       grp_p, grp_g;

  pg_pre #(.WIDTH(4)) u_pre (.a(a), .b(b), .p(p), .g(g));

  carry_network u_carry (
    .p(p), .g(g), .cin(cin), .c(c), .p_out(grp_p), .g_out(grp_g)
  );

  // Carry into bit i: cin for bit 0, c1..c3 above it.
  pg_post #(.WIDTH(4)) u_post (.p(p), .c({c[2:0], cin}), .z(z));

  bcd_correct_detect u_detect (.z(z), .c4(c[3]), .corr(corr));

  bcd_correct_adder u_fix (.z(z), .corr(corr), .s(s));

  assign co = corr;

  // With valid BCD inputs the corrected digit is always valid BCD.
  always_comb begin
    if (a <= 4'd9 && b <= 4'd9)
      assert final (s <= 4'd9)
        else $error("digit sum %0d + %0d + %0d gave invalid BCD %0d", a, b, cin, s);
  end
endmodule
