// Shared types and constants of the decimal adder.
// A BCD digit is a 4-bit binary code of 0..9. A digit sum above 9 (or one
// that carried out of the 4-bit binary adder) is corrected by adding 6,
// which skips the six unused codes 1010..1111. The digit count of the
// main configuration is four, giving a 16-bit operand.
package bcd_pkg;
  localparam int unsigned DIGIT_BITS     = 4;
  localparam int unsigned DEFAULT_DIGITS = 4;
  localparam logic [DIGIT_BITS-1:0] BCD_CORRECTION = 4'b0110;

  typedef logic [DIGIT_BITS-1:0] bcd_digit_t;
endpackage
