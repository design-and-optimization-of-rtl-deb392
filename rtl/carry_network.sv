// Lookahead carry network of one 4-bit digit. Instead of passing the carry
// bit by bit, it first forms group generate/propagate pairs over spans of
// bits in a two-level prefix tree (black cells for spans 1:0 and 3:2, then
// 3:0 and 2:0), and then folds the incoming carry into every span with one
// gray cell per bit. Every carry is therefore at most three cell levels
// from the inputs:
//   c[0] = c1 = G[0]   | P[0]   & cin
//   c[1] = c2 = G[1:0] | P[1:0] & cin
//   c[2] = c3 = G[2:0] | P[2:0] & cin
//   c[3] = c4 = G[3:0] | P[3:0] & cin   (binary carry out of the digit)
// p_out and g_out are the group propagate and generate of all four bits,
// for use by a higher-level lookahead unit. The use of gray cells follows
// the design; the particular tree shape is this implementation's choice.
// Combinational.
module carry_network (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       cin,
  output logic [3:0] c,
  output logic       p_out,
  output logic       g_out
);
  logic g10, p10, g32, p32, g30, p30, g20, p20;

  // Level 1: spans of two bits.
  black_cell u_b10 (.g_hi(g[1]), .p_hi(p[1]), .g_lo(g[0]), .p_lo(p[0]), .gout(g10), .pout(p10));
  black_cell u_b32 (.g_hi(g[3]), .p_hi(p[3]), .g_lo(g[2]), .p_lo(p[2]), .gout(g32), .pout(p32));
  // Level 2: spans reaching down to bit 0.
  black_cell u_b30 (.g_hi(g32),  .p_hi(p32),  .g_lo(g10),  .p_lo(p10),  .gout(g30), .pout(p30));
  black_cell u_b20 (.g_hi(g[2]), .p_hi(p[2]), .g_lo(g10),  .p_lo(p10),  .gout(g20), .pout(p20));

  // Gray cells: fold the incoming carry into each span.
  gray_cell u_c1 (.g(g[0]), .p(p[0]), .gin(cin), .gout(c[0]));
  gray_cell u_c2 (.g(g10),  .p(p10),  .gin(cin), .gout(c[1]));
  gray_cell u_c3 (.g(g20),  .p(p20),  .gin(cin), .gout(c[2]));
  gray_cell u_c4 (.g(g30),  .p(p30),  .gin(cin), .gout(c[3]));

  assign p_out = p30;
  assign g_out = g30;
endmodule
