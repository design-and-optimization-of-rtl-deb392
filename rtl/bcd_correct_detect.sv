// Decimal correction detector. A 4-bit binary digit sum needs the +6
// correction when it is 10..15 or when the binary adder carried out (sums
// 16..19). Numbering the sum bits z1..z4 from the least significant, the
// codes 10..15 are exactly those with z4 set and z2 or z3 set, so
//   corr = c4 | (z4 & z2) | (z4 & z3).
// z1 (z[0]) plays no part in the condition. The flag is also the digit's
// decimal carry out. Combinational, two gate
// levels.
module bcd_correct_detect (
  input  logic [3:0] z,    // z[3] is z4, the most significant sum bit
  input  logic       c4,   // binary carry out of the digit sum
  output logic       corr
);
  assign corr = c4 | (z[3] & z[1]) | (z[3] & z[2]);
endmodule
