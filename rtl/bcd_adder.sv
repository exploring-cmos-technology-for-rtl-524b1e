// bcd_adder: DIGITS-digit BCD adder built as a ripple-carry chain.
//
// DIGITS copies of the correction-free one-digit adder are cascaded: digit
// i adds x digit i, y digit i and carry C_i and passes its decimal carry on
// as C_(i+1). C_0 is the carry in of the whole word and C_DIGITS its carry
// out. With a digit delay of T the worst-case delay grows as DIGITS*T, the
// carry travelling through every digit (for example 9999 + 0000 + 1).
//
// Interface: x, y packed BCD operands, digit i in bits [4i+3:4i]; c0 the
// carry in; r the BCD sum, same packing; cn the carry out. c brings out the
// whole carry chain C_0..C_DIGITS for observation (c[0] = c0,
// c[DIGITS] = cn).
// Timing: purely combinational, no clock and no registers.
//
// The ripple structure and the signal names X, Y, R, C follow the n-digit
// adder of the design; DIGITS defaults to 4, the widest adder evaluated.
// The packing of the digits and the carry-chain port are this design's own
// choice.
module bcd_adder
  import bcd_pkg::*;
#(
  parameter int unsigned DIGITS = DEFAULT_DIGITS
) (
  input  logic [4*DIGITS-1:0] x,
  input  logic [4*DIGITS-1:0] y,
  input  logic                c0,
  output logic [4*DIGITS-1:0] r,
  output logic                cn,
  output logic [DIGITS:0]     c
);

  assign c[0] = c0;

  for (genvar d = 0; d < DIGITS; d++) begin : g_digit
    bcd_digit_adder u_digit (
      .a    (x[4*d +: 4]),
      .b    (y[4*d +: 4]),
      .cin  (c[d]),
      .s    (r[4*d +: 4]),
      .cout (c[d+1])
    );
  end

  assign cn = c[DIGITS];

endmodule
