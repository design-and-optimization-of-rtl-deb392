// One-bit full adder: s = a ^ b ^ ci, co = majority(a, b, ci).
// Building block of the +6 correction adder. Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic ab;
  assign ab = a ^ b;
  assign s  = ab ^ ci;
  assign co = (a & b) | (ab & ci);
endmodule
