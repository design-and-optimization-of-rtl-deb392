// Gray cell of a prefix carry network. It joins the (generate, propagate)
// pair of an upper span with the generate (or carry) of the span below it,
// giving the carry out of the joined span: gout = g | (p & gin).
// Unlike a black cell it produces no group propagate, so it sits at the
// end of a carry path where the incoming carry is folded in.
// Combinational, one and-or level.
module gray_cell (
  input  logic g,
  input  logic p,
  input  logic gin,
  output logic gout
);
  assign gout = g | (p & gin);
endmodule
