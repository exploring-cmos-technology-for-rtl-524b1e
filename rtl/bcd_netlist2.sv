// bcd_netlist2: second level of the correction-free one-digit BCD adder.
//
// It adds the small term T = A0 + B0 + Cin (0..3) to 2*K, which arrives in
// BCD from the first level as a tens bit k[3] and a halved units digit
// k[2:0] (0..4). The units digit of the result is U = 2*k[2:0] + T, at most
// 11. When U reaches 10 it is reduced by 10 and a decimal carry is raised;
// otherwise it is the sum digit as it stands. Because k[3] = 1 implies
// 2*K >= 10 and so k[2:0] <= 3, U is then at most 9, and the two sources of
// carry never coincide: Cout = k[3] | (U >= 10). The correction is folded
// into this single level rather than done by a second adder after the fact.
//
// Interface: k from bcd_netlist1, a0 = A[0], b0 = B[0], cin the decimal
// carry in; s the BCD sum digit, cout the decimal carry out.
// Timing: purely combinational, no clock.
//
// The inputs, outputs and the function follow the proposed adder, which
// realises this level as an optimised two-level NAND-NAND network over
// k, a0, b0 and cin. That network is not reproduced here; the block states
// the function and leaves the two-level reduction to synthesis.
module bcd_netlist2 (
  input  logic [3:0] k,
  input  logic       a0,
  input  logic       b0,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  logic [1:0] t;        // A0 + B0 + Cin, 0..3
  logic [3:0] units;    // 2*K2K1K0 + T, 0..11 for valid inputs
  logic       wrap;     // units digit reached ten

  always_comb begin
    t     = {1'b0, a0} + {1'b0, b0} + {1'b0, cin};
    units = {k[2:0], 1'b0} + {2'b00, t};
    wrap  = (units >= 4'd10);
    s     = wrap ? units - 4'd10 : units;
    cout  = k[3] | wrap;
  end

endmodule
