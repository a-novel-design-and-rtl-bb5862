# Two-digit BCD adder from reversible gates

A reversible gate has as many outputs as inputs, and maps input patterns onto
output patterns one-to-one. No information is lost, and so in principle no
energy has to be dissipated. Circuits built from such gates follow two rules
that ordinary logic does not have. No signal may fan out: a second copy of a
bit must come from a copying gate. No output may feed back. Outputs that a
circuit never uses are called *garbage*, and one measure of a design is how
few of them it has.

This RTL builds a decimal adder under these rules. It adds two packed-BCD
numbers of two digits each plus a carry in, giving `00..199`. The only
building blocks are five reversible gates: Feynman, Toffoli, HNG, HNFG and a
5-input/5-output gate called MAS. Each gate is a small module of its own.
Every composite module wires gate outputs to gate inputs one-to-one. Every
unused gate output goes out on a `garbage` port, so the garbage count can be
read off the port widths.

The RTL is ordinary synthesizable SystemVerilog. In a CMOS flow it synthesizes
to plain XOR/AND logic. Its value is as an exact, checkable model of the
reversible netlist.

## The gates

| module     | inputs    | outputs |
|------------|-----------|---------|
| `fg`       | A B       | P = A, Q = A⊕B |
| `tg`       | A B C     | P = A, Q = B, R = AB⊕C |
| `hng`      | A B C D   | P = A, Q = B, R = A⊕B⊕C, S = (A⊕B)C ⊕ AB ⊕ D |
| `hnfg`     | A B C D   | P = A, Q = A⊕C, R = B, S = B⊕D |
| `mas_gate` | A B C D E | P = A, Q = A⊕B⊕C, R = (A⊕B)C ⊕ AB ⊕ D, S = A'B' ⊕ E', T = C'D' ⊕ E' |

How the design uses them:

- **FG with B = 0** and **HNFG with C = D = 0** are copying gates. FG makes
  one copy of a bit. HNFG makes one copy each of two bits.
- **HNG with D = 0** is a full adder. R is the sum and S is the carry.
- **TG with C = 0** is an AND gate.
- **MAS with E = 0** gives two OR gates: S = A + B and T = C + D. With
  D = 0, its Q and R outputs form a full adder, as in HNG.

The MAS equations above map the 32 input patterns onto only 24 distinct
output patterns. The gate as specified is therefore not strictly reversible.
None of the uses listed here depends on that property. The equations are kept
exactly as specified.

## One BCD digit (`bcd_digit_adder`)

This is the core of the design and the least obvious part.

**Stage 1.** `hng_rca4` is four HNG full adders in a ripple chain. It forms the
binary sum `s = a + b + cin` (0..19) with carry `c4`.

**Correction.** The binary result is a valid BCD digit only up to 9. Above 9,
adding 6 skips the six unused codes and produces the decimal carry. The
condition is

    k = c4  OR  s3·(s2 OR s1)

The first term covers sums of 16..19. The second covers 10..15.

Under the no-fan-out rule, every bit that feeds both the correction logic and
stage 2 has to be copied first. The correction is built as follows:

| gate    | inputs               | what is used |
|---------|----------------------|--------------|
| HNFG    | s2, s3, 0, 0         | two copies of s2 and of s3 |
| MAS_or  | s1, s2, s3, 0, 0     | P = s1 (passed on to stage 2), S = s1+s2, T = s3 (a copy) |
| TG      | s3, s1+s2, 0         | R = x = s3(s1+s2) |
| MAS_k   | x, c4, 0, 0, 0       | S = x + c4 = k, and Q = x⊕c4 = k too |
| FG      | k, 0                 | two more copies of k |

The MAS_k line relies on a fact about the inputs: `x` and `c4` are never both
1. When `c4` is 1 the sum is 16..19, so `s3` is 0. With the two terms mutually
exclusive, XOR equals OR. So one MAS gate yields `k` twice, once on S and once
on Q. The FG then supplies the two `k` bits for the correction word.

**Stage 2.** A second `hng_rca4` adds `{0, k, k, 0}` (that is, 6 or 0) to
`s[3:0]`, with carry in 0. Its 4-bit result is the BCD digit. Its carry out
is discarded as garbage. The decimal carry out is `k`, taken from MAS_k Q.

A digit uses 13 gates: 8 HNG, 1 HNFG, 2 MAS, 1 TG and 1 FG. It has 24 garbage
outputs: 16 from the two adders, the second adder's carry out, 2 from MAS_or,
2 from the TG and 3 from MAS_k.

## Chaining the digits (`bcd_2digit_reversible_adder`)

The top is a chain of `DIGITS` digit adders (default 2). Each digit's decimal
carry `k` is the carry into the next digit's first-stage adder.

The published schematic arranges the two digits side by side instead. There,
the low digit's *binary* carry `c4` goes to the high digit. Both corrections
are computed from the first-stage sums at the same time. The second-stage
carry of the low digit then enters the high digit's second stage.

That form is wrong when the high first-stage sum is exactly 9 and the low
digit produces its carry only in its second stage. An example is 45 + 55: the
low digit gives 10, and the high digit gives 4 + 5 = 9. In that case the high
digit needs the correction but has already been judged not to need it. This
design passes the decimal carry between digits, and so it is correct for all
inputs. The price is a longer path: the high digit's work starts only after
the low digit's correction. There is also one gate more per digit, and the
MAS gates cannot be shared between digits. A shared gate would feed its own
input through the high digit, which is feedback.

**Counts.** The two-digit adder uses 26 gates (16 HNG, 2 HNFG, 4 MAS, 2 TG,
2 FG) and has 48 garbage outputs. The published figures are 25 gates and 42
garbage outputs. The schematic's own gate list (16 HNG, 3 HNFG, 3 FG, 2 TG,
2 MAS) also totals 26.

**MAS full adder.** `mas_full_adder` is a separate circuit that sits in the
top beside the BCD adder, on its own `fa_*` ports. It is one MAS gate used as
a full adder: A and B are the operands, C is the carry in, and D = E = 0. Q is
the sum and R is the carry. Wired this way, P, S and T are unused and appear
as 3 garbage outputs. The BCD adder itself uses HNG adders.

## Interface and timing

Top module `bcd_2digit_reversible_adder`, parameter `DIGITS` (default 2):

| port             | dir | width        | meaning |
|------------------|-----|--------------|---------|
| `bcd_2digit_a`   | in  | 4·DIGITS     | addend, packed BCD, least significant digit in `[3:0]` |
| `bcd_2digit_b`   | in  | 4·DIGITS     | addend |
| `cin_2digit`     | in  | 1            | carry into the low digit |
| `bcd_2digit_sum` | out | 4·DIGITS     | sum, packed BCD |
| `cout_2digit`    | out | 1            | decimal carry out |
| `garbage`        | out | 24·DIGITS    | unused gate outputs, digit 0 in the low 24 bits |
| `fa_a`, `fa_b`, `fa_cin` | in | 1 each | operands and carry of the MAS full adder |
| `fa_sum`, `fa_cout`      | out | 1 each | its sum and carry |
| `fa_garbage`     | out | 3            | its unused outputs |

The circuit is purely combinational, with no clock and no reset. The
worst-case path through one digit goes through two 4-bit ripple chains and
the correction gates between them. Digits add in series.

Input digits above 9 are not checked. The outputs are then whatever the
circuit produces, not a BCD sum.

Shared types and the garbage widths are in the package `rev_pkg`:
`bcd_digit_t`, `RCA4_GARBAGE = 8` and `DIGIT_GARBAGE = 24`.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one computes its expected values independently, by integer arithmetic rather
than by repeating the gate equations. Each ends by printing
`TB_RESULT checks=N failures=M`.

- The gate testbenches apply every input pattern (up to 32).
- `tb_hng_rca4` applies all 512 operand and carry combinations and also checks
  the garbage outputs.
- `tb_bcd_digit_adder` applies all 200 digit pairs with carry in 0 and 1. It
  checks that all three correction paths occur: no correction, sums of
  10..15, and sums of 16..19.
- `tb_bcd_2digit_reversible_adder` runs the top at its default size. It first
  applies five reference additions: 13+12=25, 95+55=150, 33+20=53,
  99+99=198 and 82+90=172. It then applies all 20,000 combinations of
  operands and carry in, and checks the MAS full adder. It counts each
  mechanism and fails if one never occurs: low and high digit corrections of
  both kinds, the decimal carry between digits, the high-digit-equals-9 case
  above, and the carry out. The whole run takes well under a second.

Running one testbench with plain Verilator:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        rtl/rev_pkg.sv rtl/fg.sv rtl/tg.sv rtl/hng.sv rtl/hnfg.sv \
        rtl/mas_gate.sv rtl/mas_full_adder.sv rtl/hng_rca4.sv \
        rtl/bcd_digit_adder.sv rtl/bcd_2digit_reversible_adder.sv \
        tb/tb_bcd_2digit_reversible_adder.sv \
        --top-module tb_bcd_2digit_reversible_adder -Mdir obj
    ./obj/Vtb_bcd_2digit_reversible_adder

For another testbench, change the last file and `--top-module`. The package
must come first.

## Changing it

- **More digits.** Set `DIGITS`. The chain and the `garbage` width scale with
  it. The top's testbench is written for two digits.
- **Different gate assignments.** The pin-level choices in `bcd_digit_adder`
  are this design's own: which output of MAS_or carries the s3 copy, and
  using MAS_k's Q as a second `k`. The specified parts are the two-stage
  structure, the HNFG copying, and the MAS/Toffoli correction feeding a
  second HNG adder. To change the pin choices, update `DIGIT_GARBAGE` in
  `rev_pkg` to match the new count of unused outputs.

## Files

- `rtl/rev_pkg.sv`: shared digit type and garbage widths.
- `rtl/fg.sv`, `rtl/tg.sv`, `rtl/hng.sv`, `rtl/hnfg.sv`, `rtl/mas_gate.sv`:
  the gates.
- `rtl/mas_full_adder.sv`: the one-gate MAS full adder.
- `rtl/hng_rca4.sv`: the 4-bit HNG ripple-carry adder.
- `rtl/bcd_digit_adder.sv`: one BCD digit.
- `rtl/bcd_2digit_reversible_adder.sv`: the top.
- `tb/tb_*.sv`: one testbench per module.
