// Post-processing stage of the lookahead adder: the binary sum bit is the
// propagate of the bit xor the carry into it, z[i] = p[i] ^ c[i], where
// c[0] is the digit's carry in and c[i] for i > 0 comes from the carry
// network. The result is the uncorrected binary sum of the digit.
// Combinational, one gate level.
module pg_post #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] z
);
  assign z = p ^ c;
endmodule
