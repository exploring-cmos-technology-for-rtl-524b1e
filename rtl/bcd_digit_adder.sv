// bcd_digit_adder: correction-free one-digit BCD adder.
//
// Adds two BCD digits and a carry: {cout, s} = a + b + cin in decimal, for
// a, b in 0..9. The idea is to split each digit into its upper three bits
// and its LSB, a = 2*J + a[0] and b = 2*I + b[0], so that
//   a + b + cin = 2*(J + I) + (a[0] + b[0] + cin).
// The first level (bcd_netlist1) forms 2*(J + I) already in BCD, the second
// level (bcd_netlist2) adds the 0..3 term and produces the final digit and
// carry. Neither level produces a binary intermediate that needs a later
// +6 correction, which is what makes the adder fast: two levels of logic
// from the operands to the outputs.
//
// Interface: a, b BCD digits; cin decimal carry in; s BCD sum; cout carry.
// Timing: purely combinational, no clock.
//
// The two-level structure and the signals between the levels follow the
// proposed adder; the gate-level content of each level is this design's
// own (see the two sub-blocks). Inputs above 9 are outside the adder's
// range and give no meaningful result.
module bcd_digit_adder
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       cout
);

  logic [3:0] k;   // 2*(J+I) in BCD: k[3] tens, k[2:0] halved units

  bcd_netlist1 u_netlist1 (
    .j (a[3:1]),
    .i (b[3:1]),
    .k (k)
  );

  bcd_netlist2 u_netlist2 (
    .k    (k),
    .a0   (a[0]),
    .b0   (b[0]),
    .cin  (cin),
    .s    (s),
    .cout (cout)
  );

endmodule
