// Pre-processing stage of the lookahead adder: per-bit propagate and
// generate. p[i] = a[i] ^ b[i] says a carry into bit i passes through it,
// g[i] = a[i] & b[i] says bit i makes a carry on its own. The exclusive-or
// form of propagate is this design's choice; it lets the post stage reuse
// p as the half sum. Purely combinational, one gate level.
module pg_pre #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);
  assign p = a ^ b;
  assign g = a & b;
endmodule
