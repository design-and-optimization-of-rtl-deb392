// Decimal correction adder: adds 0110 to the intermediate binary sum when
// corr is set and passes it unchanged otherwise. Bit 0 of 0110 is zero, so
// bit 0 passes straight through and full adders are needed only on bits
// 1..3, with addend bits corr, corr and 0. The carry out of bit 3 is
// dropped: when corr is set the decimal carry is already known to be 1.
// Result: s = (z + 6*corr) mod 16. Combinational, three full-adder levels.
// Adding 6 with full adders follows the design; leaving bit 0 without an
// adder is this implementation's simplification.
module bcd_correct_adder (
  input  logic [3:0] z,
  input  logic       corr,
  output logic [3:0] s
);
  import bcd_pkg::*;

  logic [3:0] addend;
  logic [3:1] carry;        // carry[i] is the carry out of bit i

  assign addend = BCD_CORRECTION & {4{corr}};
  assign s[0]   = z[0];

  full_adder u_fa1 (.a(z[1]), .b(addend[1]), .ci(1'b0),     .s(s[1]), .co(carry[1]));
  full_adder u_fa2 (.a(z[2]), .b(addend[2]), .ci(carry[1]), .s(s[2]), .co(carry[2]));
  full_adder u_fa3 (.a(z[3]), .b(addend[3]), .ci(carry[2]), .s(s[3]), .co(carry[3]));
endmodule
