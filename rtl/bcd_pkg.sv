// bcd_pkg: types and constants shared by the BCD adder modules.
//
// A decimal digit is carried as four bits in 8-4-2-1 binary coded decimal
// (BCD): the codes 0000..1001 stand for 0..9 and the codes 1010..1111 are
// not digits. Operands of several digits are packed vectors, digit 0 in the
// least significant nibble. DEFAULT_DIGITS is the widest adder of the
// evaluated family (1, 2, 3 and 4 digits); the packing is this design's
// own choice.
package bcd_pkg;

  // One BCD digit, 0..9.
  typedef logic [3:0] bcd_digit_t;

  // Number of digits of the multi-digit adder by default.
  localparam int unsigned DEFAULT_DIGITS = 4;

  // Largest value a digit may hold.
  localparam bcd_digit_t BCD_MAX = 4'd9;

  // True when the 4-bit code is a decimal digit.
  function automatic logic is_bcd(input bcd_digit_t d);
    return d <= BCD_MAX;
  endfunction

endpackage
