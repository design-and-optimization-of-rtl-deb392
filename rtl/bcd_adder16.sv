// Multi-digit carry look-ahead decimal (BCD) adder, four digits (16 bits)
// by default. a and b each hold DIGITS packed BCD digits, digit 0 in bits
// 3:0. Each digit is added by a bcd_digit_adder, which does a lookahead
// binary add and a +6 decimal correction inside the digit; the digits are
// chained so that the decimal carry out of digit i is the carry in of
// digit i+1. cin enters digit 0 and co, the carry out of the top digit,
// signals that the sum exceeds the DIGITS-digit range (overflow past 9999
// for four digits). Inputs must be valid BCD; every output digit is then
// valid BCD. Purely combinational: no clock, no reset, no latency.
// Four digits and the digit-to-digit carry chain follow the design
// description; DIGITS may be raised to widen the adder.
module bcd_adder16
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = DEFAULT_DIGITS
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [4*DIGITS-1:0] s,
  output logic                co
);
  logic [DIGITS:0] carry;   // carry[i] is the carry into digit i

  assign carry[0] = cin;

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    bcd_digit_adder u_digit (
      .a  (a[4*d +: 4]),
      .b  (b[4*d +: 4]),
      .cin(carry[d]),
      .s  (s[4*d +: 4]),
      .co (carry[d+1])
    );
  end

  assign co = carry[DIGITS];
endmodule
