// bcd_netlist1: first level of the correction-free one-digit BCD adder.
//
// A digit A is split as A = 2*J + A0 with J = A[3:1], and likewise
// B = 2*I + B0. Because A and B are at most 9, J and I lie in 0..4 and
// their sum K = J + I lies in 0..8. This block produces 2*K directly in
// BCD: 2*K is at most 16, so it is a tens digit of 0 or 1 and an even units
// digit. The tens digit comes out as k[3]; the units digit, whose LSB is
// always 0, comes out shifted right by one bit as k[2:0] (0..4). Hence
//   2*K = 10*k[3] + 2*k[2:0],  k[3] = (J+I >= 5),  k[2:0] = (J+I) mod 5.
// Example: J + I = 6 gives 2*K = 12 = (1 0010)BCD, so k = 4'b1001.
//
// Interface: j = A[3:1], i = B[3:1] (each 0..4); k = {K3, K2, K1, K0}.
// Timing: purely combinational, no clock.
//
// The split of the digit and the meaning of K3..K0 follow the proposed
// adder. The gate equations of this level are not reproduced; the block is
// written from its arithmetic and left to synthesis to reduce to two-level
// logic. For j or i above 4 (an operand that is not a digit) the same
// formula is applied and the result has no decimal meaning.
module bcd_netlist1 (
  input  logic [2:0] j,
  input  logic [2:0] i,
  output logic [3:0] k
);

  logic [3:0] sum_ji;   // J + I in binary, 0..8 for valid digits

  always_comb begin
    sum_ji = {1'b0, j} + {1'b0, i};
    if (sum_ji >= 4'd5) begin
      k[3]   = 1'b1;
      k[2:0] = 3'(sum_ji - 4'd5);
    end else begin
      k[3]   = 1'b0;
      k[2:0] = sum_ji[2:0];
    end
  end

endmodule
