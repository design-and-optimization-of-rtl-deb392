// Black cell of a prefix carry network: joins the (generate, propagate)
// pairs of two adjacent bit spans into the pair of the combined span.
// gout = g_hi | (p_hi & g_lo), pout = p_hi & p_lo. Used by the carry
// network to build group signals before the gray cells fold in the carry.
// The design names only gray cells; the black cell is this implementation's
// way of forming the span signals they need.
// Combinational, one and-or level.
module black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic gout,
  output logic pout
);
  assign gout = g_hi | (p_hi & g_lo);
  assign pout = p_hi & p_lo;
endmodule
