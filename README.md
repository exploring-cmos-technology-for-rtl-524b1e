# Correction-free BCD adder

Decimal arithmetic done directly in binary coded decimal (BCD) avoids the
rounding errors and the conversion latency of working in binary. The usual
one-digit BCD adder is slow, though. It adds the two 4-bit digit codes in
binary, checks whether the result is above 9 or produced a carry, and then
adds 6 in a second binary adder to correct it. That is two adders in series
with a detector between them.

This RTL implements a one-digit BCD adder with **no correction step**. It
splits each digit differently, so that its two logic levels produce the
decimal result directly. It then cascades these digit adders into a
multi-digit ripple-carry adder. The default width is 4 digits, the widest
configuration this family of adders was evaluated at (1, 2, 3 and 4 digits).

Everything is combinational: there is no clock, no register and no reset.

## The digit split

Write each operand digit as its upper three bits and its LSB:

    A = 2*J + A0,   J = A[3:1]
    B = 2*I + B0,   I = B[3:1]

A and B are at most 9, so J and I each lie in 0..4. The digit sum becomes

    {Cout, S} = A + B + Cin = 2*(J + I) + (A0 + B0 + Cin) = 2*K + T

with K = J + I in 0..8 and T in 0..3.

The key observation is that 2*K is even and at most 16. In BCD it is
therefore a tens digit of 0 or 1 followed by an even units digit (0, 2, 4, 6
or 8). The LSB of that units digit is always 0, so four wires carry 2*K
completely:

| wire     | meaning                                    |
|----------|--------------------------------------------|
| K3       | tens digit of 2*K (1 when J + I >= 5)      |
| K2 K1 K0 | units digit of 2*K divided by 2, 0..4      |

so 2*K = 10*K3 + 2*K2K1K0. For example, J + I = 6 gives 2*K = 12 =
(1 0010) in BCD, which is coded K3..K0 = 1001.

### First level: `bcd_netlist1`

This level takes J and I (six inputs) and produces K3..K0. It computes
K3 = (J+I >= 5) and K2K1K0 = (J+I) mod 5.

### Second level: `bcd_netlist2`

This level takes K3..K0, A0, B0 and Cin (seven inputs). It adds T to 2*K:

    U    = 2*K2K1K0 + T          (0..11)
    Cout = K3 | (U >= 10)
    S    = U >= 10 ? U - 10 : U

The two carry sources never coincide. K3 = 1 means 2*K >= 10, so
K2K1K0 <= 3 and U <= 9. The "correction" (subtracting 10) only ever happens
in one place, within one level. Both levels are small functions of at most
seven inputs, so each reduces to a two-level sum of products (NAND-NAND in
CMOS). The result is a digit adder that is two logic levels deep from
operands to outputs.

Both modules are written from these equations rather than as gate lists.
Synthesis is left to find the two-level form. No gate-level netlist for
either level is reproduced here.

### The digit adder: `bcd_digit_adder`

`bcd_digit_adder` wires the two levels together. `a[3:1]` and `b[3:1]` go to
the first level. Its `k`, together with `a[0]`, `b[0]` and `cin`, goes to
the second level.

| port | dir | width | meaning               |
|------|-----|-------|-----------------------|
| a, b | in  | 4     | BCD digits, 0..9      |
| cin  | in  | 1     | decimal carry in      |
| s    | out | 4     | BCD sum digit         |
| cout | out | 1     | decimal carry out     |

An input code of 10..15 is not a digit. The adder gives no meaningful result
for one, and nothing flags it; `bcd_pkg::is_bcd` is available if a caller
wants to check.

## Multi-digit adder: `bcd_adder` (top)

`DIGITS` digit adders form a ripple chain. Digit *i* adds `x[4i+3:4i]`,
`y[4i+3:4i]` and carry C*i*, and passes its carry out on as C*i+1*. The
delay therefore grows linearly with the number of digits. The worst case is
a carry that travels the full chain, for example 9999 + 0000 + 1.

| port | dir | width      | meaning                                         |
|------|-----|------------|-------------------------------------------------|
| x, y | in  | 4*DIGITS   | packed BCD operands, digit 0 in bits [3:0]      |
| c0   | in  | 1          | carry in                                        |
| r    | out | 4*DIGITS   | packed BCD sum                                  |
| cn   | out | 1          | carry out                                       |
| c    | out | DIGITS+1   | whole carry chain, c[0] = c0, c[DIGITS] = cn    |

| parameter | default | meaning                        |
|-----------|---------|--------------------------------|
| DIGITS    | 4       | number of BCD digits (>= 1)    |

The package `bcd_pkg` holds the digit type `bcd_digit_t`, `DEFAULT_DIGITS`
and `is_bcd`.

## Where this RTL makes its own choices

The split into J, I, A0, B0, the K3..K0 coding, the two levels and the
ripple cascade are those of the original design. The following are not:

- **Level contents.** Each level is written as arithmetic, not as the
  original optimised NAND-NAND gate network, which is not reproduced.
  The function is the same. The gate count and depth after synthesis depend
  on the tool.
- **Operand packing.** Operands are packed vectors, least significant
  digit in the low nibble.
- **Carry-chain port.** The port `c` exposes the internal carries for
  observation. It is an addition.
- **Timing model.** The original work measures delay and power at
  transistor level, in dynamic CMOS logic at 45, 65 and 180 nm. None of
  that is modelled here. The RTL is a logic description only. No
  propagation delays are given, and no circuit-level behaviour
  (precharge/evaluate phases of dynamic logic) is represented.
- **Comparison adders are not included.** These are the conventional
  binary-add-then-add-6 adder and the adders built from various binary
  adders. The conventional method appears only as the reference model in
  the digit-adder testbench.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and finishes. Each has a watchdog.

| testbench              | what it covers                                                           |
|------------------------|--------------------------------------------------------------------------|
| `tb_bcd_netlist1`      | all 25 (J, I) pairs, plus the 2K = 12 example                            |
| `tb_bcd_netlist2`      | every K code the first level can emit × all A0/B0/Cin                    |
| `tb_bcd_digit_adder`   | all 200 digit/carry combinations against binary-add-plus-6               |
| `tb_bcd_adder`         | default 4-digit top: 200 000 random sums, full-chain carries, carry chain compared digit by digit |
| `tb_bcd_adder_sizes`   | 1- and 2-digit instances exhaustively, 3- and 4-digit random             |

`tb_bcd_adder` also counts how often each mechanism occurred, and fails if
any never did:

- the first level's tens carry (K3)
- the second level's wrap at ten
- a carry passed between digits
- a carry through the whole chain
- carry out
- carry in

Inputs that are not digits (10..15) are not tested, since their result is
undefined.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bcd_pkg.sv tb/tb_bcd_adder.sv --top-module tb_bcd_adder
    ./obj_dir/Vtb_bcd_adder

Replace `tb_bcd_adder` with any testbench name. Every testbench runs in well
under a second.

## Changing the design

- **Width.** Set `DIGITS` on `bcd_adder`. The cost and delay grow linearly.
- **Gate-level levels.** To explore a hand-optimised gate network, replace
  the body of `bcd_netlist1` or `bcd_netlist2`. The exhaustive testbenches
  for those two modules check any replacement fully over its valid input
  codes.
- **Pipelining.** To pipeline a long adder, registers can be placed on the
  carry `c[i]` and the digits above it. No such stage exists in this RTL.
