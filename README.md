# 16x16-bit Vedic multiplier with carry select adders

A combinational unsigned multiplier, 16 bits by 16 bits to a 32-bit product,
organised after the *Urdhva Tiryagbhyam* ("vertically and crosswise") rule of
Vedic arithmetic. The rule says that a product of two numbers written as
high and low halves is the sum of four independent partial products: the two
*vertical* ones (low x low, high x high) and the two *crosswise* ones
(low x high, high x low). All four can be formed at the same time. Applying the
rule again to each partial product gives a recursive tree:

```
vedic_16x16  = 4 x vedic_8x8  + one 16-bit and two 24-bit adders
vedic_8x8    = 4 x vedic_4x4  + one  8-bit and two 12-bit adders
vedic_4x4    = 4 x vedic_2x2  + one  4-bit and two  6-bit adders
vedic_2x2    = 4 AND gates + 2 half adders
```

Every adder in the tree is a carry select adder (CSLA). This is the variant
with the shortest delay among the ones the design was compared against (ripple
carry and BEC-based adders); those variants are not included here.

## The same idea in decimal

For 325 x 738 the digits are combined column by column: 5x8 (vertical),
2x8 + 5x3 (crosswise), 3x8 + 2x3 + 5x7 (crosswise and vertical), 3x3 + 2x7,
and 3x7. Each column's sum, plus the carry from the column to its right,
gives one digit of 239850. The hardware does the same in binary with halves of
the operands instead of digits; the end-to-end testbench multiplies 325 by 738
as one of its checks.

## How one level combines its four partial products

This is the part that takes the most care. Take an N x N level with H = N/2
and operands `a = {aH, aL}`, `b = {bH, bL}`. The four sub-multipliers give
N-bit products:

| name | product   | kind       | weight  |
|------|-----------|------------|---------|
| q0   | aL x bL   | vertical   | 2^0     |
| q1   | aH x bL   | crosswise  | 2^H     |
| q2   | aL x bH   | crosswise  | 2^H     |
| q3   | aH x bH   | vertical   | 2^N     |

Then `a x b = q0 + (q1 + q2) 2^H + q3 2^N`. The bottom H bits of the product
are the bottom H bits of q0 and need no adder. The rest is formed by three
adders:

1. **N-bit adder:** `q4 = q1 + (q0 >> H)`, the upper half of q0 placed under
   the crosswise product of the same weight.
2. **3H-bit adder:** `q5 = (q3 << H) + q2`, the high vertical product shifted
   to line up with the other crosswise product.
3. **3H-bit adder:** `q6 = q5 + q4`, which is `a x b >> H`.

The product is `{q6, q0[H-1:0]}`. None of the three adders can overflow:
`q4 <= (2^H-1)^2 + 2^H - 1 < 2^N`, and q5 and q6 are at most the product
shifted right by H, which fits in 3H bits. So the carry outs are left open,
and all carry ins are 0.

For N = 16 the adders are 16, 24 and 24 bits wide; for N = 8, 8, 12, 12; for
N = 4, 4, 6, 6.

The three levels use the same order of additions. One drawing of the 8x8 level
in the published design adds the two crosswise products first and then the
vertical ones. That order gives the same product with differently sized adders.
This RTL follows the stated rule of one N-bit and two 3N/2-bit adders per level,
as the 4x4 and 16x16 levels do.

## The 2x2 base cell

```
p[0] = a0 b0
{c1, p[1]} = a1 b0 + a0 b1          (half adder)
{p[3], p[2]} = a1 b1 + c1           (half adder)
```

Four AND gates and two half adders; a half adder is one XOR (sum) and one
AND (carry).

## The carry select adder

`csla_adder #(WIDTH, BLOCK)` cuts its operands into groups of BLOCK = 2 bits.

* Group 0 is a ripple carry adder (`rca_adder`, a chain of `full_adder`s) on
  the real carry in.
* Every higher group is computed twice, by one 2-bit ripple adder with carry
  in 0 and one with carry in 1. When the carry out of the group below arrives,
  `mux2` instances pick that group's two sum bits and its carry out.

For WIDTH = 4 this is exactly the published 4-bit CSLA: three 2-bit ripple
adders (RCA0 on bits 1:0, RCA1 and RCA2 on bits 3:2 with carry in 0 and 1)
and three one-bit multiplexers. The published design only describes the
4-bit adder. For the 6- to 24-bit adders that the tree needs, this RTL
repeats the duplicated 2-bit group and chains the selects from group to
group. That generalisation, and the 2-bit group size for wide adders, are this
RTL's choices. The group size is the package constant
`vedic_pkg::CSLA_BLOCK`. Each adder can also be given its own `BLOCK`
parameter; WIDTH must be a multiple of it. A 24-bit adder is therefore one
ripple group plus 11 select stages.

A full adder is built as two half adders and an OR. Only the function of the
full adder is fixed; this gate structure is a common choice.

## Modules

| file                 | module        | role |
|----------------------|---------------|------|
| `rtl/vedic_pkg.sv`   | package       | `CSLA_BLOCK` = 2 |
| `rtl/half_adder.sv`  | `half_adder`  | XOR/AND half adder |
| `rtl/full_adder.sv`  | `full_adder`  | two half adders + OR |
| `rtl/rca_adder.sv`   | `rca_adder`   | WIDTH-bit ripple carry adder (default 4) |
| `rtl/mux2.sv`        | `mux2`        | WIDTH-bit 2:1 select (default 1) |
| `rtl/csla_adder.sv`  | `csla_adder`  | WIDTH-bit carry select adder (default 4) |
| `rtl/vedic_2x2.sv`   | `vedic_2x2`   | base cell |
| `rtl/vedic_4x4.sv`   | `vedic_4x4`   | 4 x `vedic_2x2` + CSLAs 4, 6, 6 |
| `rtl/vedic_8x8.sv`   | `vedic_8x8`   | 4 x `vedic_4x4` + CSLAs 8, 12, 12 |
| `rtl/vedic_16x16.sv` | `vedic_16x16` | top: 4 x `vedic_8x8` + CSLAs 16, 24, 24 |

Top-level ports: `a[15:0]`, `b[15:0]` (unsigned) in, `p[31:0]` out.

## Timing and size

There is no clock, register or handshake. `p` follows `a` and `b` after the
combinational delay of the tree. The longest path runs through the 2x2 cells,
then through one 4-, 8- and 16-bit adder, and then through the two 3N/2-bit
adders of each level. If the multiplier is to be used in a clocked design,
register its inputs and outputs outside it.

For reference, the published FPGA implementation of this variant (Xilinx
Spartan-3E, ISE 12.2) reports a delay of 32.34 ns and 87.14 mW. It also lists
493 slice registers and 66 I/O blocks. No registers are described anywhere in
that design, so none are added here. The RTL does not model gate delays, and
none of these figures has been reproduced. Generic synthesis of `vedic_16x16`
gives about 1900 single-bit gates (AND, XOR, OR, NOT and 2:1 mux), with no
flip-flops.

## Departures from the published design and points to check

* Only the carry select adder variant is built. The ripple carry and BEC
  (binary to excess-1 converter) variants were only used for comparison.
  The BEC adder is never described in detail.
* The carry select adder is generalised from 4 bits to the wider adders as
  described above.
* The 8x8 level uses the same order of additions as the other levels, not the
  alternative order drawn for it. The product is the same either way.
* Which crosswise product is paired with the high vertical product differs
  between the published drawings. The two are interchangeable in the sum. Here
  `aL x bH` is paired with `aH x bH` at every level.
* Operands are unsigned. Signed multiplication is not covered.
* A 4-bit example in the published results gives a carry-in value of 1. The
  product there (1111 x 1010 = 10010110) does not depend on it. The
  multipliers have no carry-in port.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_half_adder`, `tb_full_adder`, `tb_vedic_2x2`: exhaustive.
* `tb_rca_adder`: all 512 inputs of the 4-bit adder. It confirms that a carry
  ripples through all four stages.
* `tb_mux2`: exhaustive at 1 bit, random at 8 bits.
* `tb_csla_adder`: all 512 inputs at 4 bits, plus random and all-ones cases at
  6 and 24 bits. From the operands alone it counts the groups whose result had
  to come from the carry-in-1 copy and those that needed the carry-in-0 copy.
  Both must occur.
* `tb_vedic_4x4`: all 256 operand pairs and the example 1111 x 1010.
* `tb_vedic_8x8`: all 65536 operand pairs.
* `tb_vedic_16x16` (end to end, default size):
  * corner operands, single bits against all-ones masks, 325 x 738, and
    200000 random pairs;
  * an independent model of the three combining adders, which checks that
    each adder selected a carry-in-1 group at least once;
  * a check that a carry crossed into the upper product bytes, and that the
    final adder saw a carry run through eight or more groups.

All testbenches pass. Breaking any single module, for example by swapping the
mux inputs or feeding the wrong half of q0, makes its testbench fail.

To run one with Verilator 5:

```
verilator --binary --timing -y rtl -y tb rtl/vedic_pkg.sv tb/tb_vedic_16x16.sv \
          --top-module tb_vedic_16x16 -Mdir obj
./obj/Vtb_vedic_16x16
```

The end-to-end test takes under a second. Substitute any other `tb_*` name to
run that module's test.
