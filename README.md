# 64-bit Vedic multiplier (Urdhva Tiryakbhyam)

A combinational 64 x 64-bit unsigned multiplier built on the Urdhva
Tiryakbhyam ("vertical and crosswise") method. Instead of generating 64 rows
of partial products and compressing them, the operands are split into two
halves (digits), the four digit products are formed in parallel, and they
are merged with one carry-save row and one carry-propagate adder. Each digit
product is in turn built the same way from smaller digits, down to 2-bit
digits, so the whole multiplier is a balanced tree of small, identical
stages.

## The idea: vertical and crosswise on two digits

Write each operand as two digits of H bits: `a = aH*2^H + aL`,
`b = bH*2^H + bL`. Then

    a*b = aH*bH * 2^(2H)                  (vertical, left column)
        + (aH*bL + aL*bH) * 2^H           (crosswise, middle column)
        + aL*bL                           (vertical, right column)

The two vertical products occupy disjoint bit ranges, so they need no adder
at all: `{aH*bH, aL*bL}` is already one 4H-bit number. What remains is the
sum of three aligned numbers:

    op_vert   = {aH*bH, aL*bL}
    op_cross1 = aH*bL << H
    op_cross2 = aL*bH << H

A single 3:2 carry-save row (one full adder per bit, no carry chain) reduces
the three to a sum and a carry vector, and one carry-propagate adder produces
the product. That is one level. For the 64-bit multiplier the top level works
on 32-bit digits (segments); each 32 x 32 segment product is made by four
more levels of the same kind, on 16-, 8-, 4- and 2-bit digits, above a bottom
layer of 2x2 products formed by the classic vertical-and-crosswise cell.

The stages of every level are therefore:

1. **Input decomposition** - cut both operands into a high and a low digit.
2. **Partial product generation** - four digit products in parallel.
3. **Summation** - one carry-save row over the three aligned operands.
4. **Final product assembly** - one carry-propagate addition.

## Module hierarchy

    vedic_mult64            top: 64-bit operands, 128-bit product
    ├── vedic_mult x4       32 x 32 segment multipliers
    │   ├── ut_mult_2x2     256 cells per segment (level 1)
    │   └── vedic_combine   levels 2..5 (64 + 16 + 4 + 1 per segment)
    │       ├── csa_3to2
    │       └── product_assembly
    └── vedic_combine       top-level summation and assembly (128 bits)
        ├── csa_3to2
        └── product_assembly

| Module | Parameter (default) | Function |
|---|---|---|
| `ut_mult_2x2` | - | 2x2 cell: `a0b0`; `a1b0 + a0b1` by a half adder; `a1b1` plus that carry by a second half adder |
| `csa_3to2` | `WIDTH` (128) | `sum = x^y^z`, `carry = maj(x,y,z)`; `x+y+z == sum + 2*carry` |
| `product_assembly` | `WIDTH` (128) | `result = sum + (carry << 1)` modulo `2^WIDTH` |
| `vedic_combine` | `WIDTH` (64) | one level's summation and assembly: four WIDTH-bit digit products in, 2*WIDTH-bit product out |
| `vedic_mult` | `WIDTH` (32) | WIDTH x WIDTH multiplier built level by level from 2x2 cells |
| `vedic_mult64` | `WIDTH` (64) | top: splits into 32-bit segments, four `vedic_mult`, one `vedic_combine` |

### How `vedic_mult` builds its levels

`vedic_mult` is written as a `generate` loop over levels `lv = 1 .. log2(WIDTH)`
rather than as a module that instantiates itself. At level `lv` the digits are
`DW = 2^lv` bits wide and each operand has `ND = WIDTH/DW` of them. The level
holds an `ND x ND` array `pp[i][j]`, the product of digit `i` of `a` and digit
`j` of `b`:

* level 1 fills `pp[i][j]` with `ut_mult_2x2` cells on `a[2i+:2]`, `b[2j+:2]`;
* level `lv > 1` makes `pp[i][j]` with a `vedic_combine` from the four
  level `lv-1` entries `pp[2i][2j]` (low*low), `pp[2i+1][2j]` (high*low),
  `pp[2i][2j+1]` (low*high) and `pp[2i+1][2j+1]` (high*high);
* the last level has a single entry, the product.

For WIDTH = 32 that is 256 cells and 64 + 16 + 4 + 1 = 85 combine stages; the
64-bit top has four such segments plus its own combine stage. The structure is
exactly that of the recursive quartering; only the code is flat.

### Why the final adder drops one carry bit

`product_assembly` shifts the carry vector left by one bit and drops the bit
that leaves the top column. Inside the multiplier this bit is always zero:
`sum + 2*carry` equals a product of two WIDTH/2-bit numbers, which is below
`2^WIDTH`, so `2*carry` is too. Lint reports the top carry bit as unused for
this reason. Used on its own, the module computes modulo `2^WIDTH`.

## Interface and timing

`vedic_mult64`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `a` | in | 64 | unsigned multiplicand |
| `b` | in | 64 | unsigned multiplier |
| `p` | out | 128 | `a * b`, exact |

There is no clock, no reset and no state: `p` follows `a` and `b` after the
combinational delay. The critical path runs through one 2x2 cell and, at each
of the five levels above it, one full adder and one carry-propagate adder
twice the digit width (8, 16, 32, 64 and finally 128 bits). Put registers on
the inputs and the output as the surrounding system's clock requires, or cut
the tree into pipeline stages between levels if a single cycle is too short.

`WIDTH` on `vedic_mult64` may be set to any power of two of 4 or more; the
split into two segments of WIDTH/2 bits is kept. After synthesis to generic
word-level cells the 64-bit multiplier is about 11,000 cells (AND/XOR gates,
full-adder rows and adders), with no flip-flops.

## Where this design makes its own choices

The multiplier's structure - 64-bit operands, 32-bit segments, four parallel
vertical-and-crosswise products, carry-save summation, final assembly - is
the method described above. The following points are choices of this RTL:

* **Full 128-bit product.** The method is sometimes described as assembling
  a "64-bit output". Here the exact 128-bit product is returned; take
  `p[63:0]` for the product truncated to 64 bits.
* **Unsigned operands.** Signed multiplication is not provided.
* **Digit recursion down to 2 bits.** Each 32-bit segment is multiplied by
  the same two-digit split applied level after level; the 2x2 cell is the
  leaf.
* **One carry-save row per level.** With the vertical products laid side by
  side, three operands remain, so one 3:2 row is all that is needed.
* **Final adder written as `+`.** The carry-propagate adder after each
  carry-save row is left to synthesis, so it maps to a carry chain on an FPGA
  or a prefix adder in a standard-cell flow. No ripple-carry adder is
  hand-built.
* **Purely combinational**, with no pipeline registers.

Performance figures for this kind of multiplier (speed, power and area
relative to Wallace-tree and Booth multipliers) depend on the target and the
tools; they are not reproduced or checked here.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog that fails the run if
it does not finish.

| Testbench | What it checks |
|---|---|
| `tb_ut_mult_2x2` | all 16 operand pairs |
| `tb_csa_3to2` | bitwise XOR and majority, and `sum + 2*carry == x+y+z`, on corner and 200 random triples (128 bits) |
| `tb_product_assembly` | full-width carry ripple and 500 random pairs (128 bits) |
| `tb_vedic_combine` | every 4-bit operand pair at WIDTH 4; corner and 2000 random operands at WIDTH 64 |
| `tb_vedic_mult` | exhaustive at WIDTH 4 and 8; corner and 2000 random operands at WIDTH 32, against a shift-and-add reference |
| `tb_vedic_mult64` | the top at its default size: corner operands and 20,000 random ones from six operand distributions, full 128-bit product and its low half |

`tb_vedic_mult64` also counts how often the cases that load the summation and
assembly stages occur, from the operands alone, and fails if any never does:
the two crosswise products summing past 64 bits, the crosswise terms carrying
into the high vertical product, a zero operand, and both operands all ones.

Each testbench has been shown to fail when its module is deliberately broken
(for example a crosswise product misaligned by one bit, a dropped majority
term, or a segment multiplier fed the wrong digit).

### Running with Verilator

From the directory holding `rtl/` and `tb/`:

    verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_vedic_mult64 tb/tb_vedic_mult64.sv -o sim
    ./obj_dir/sim

Replace the top module and file name to run another testbench. Every
testbench finishes in well under a second of simulation time once built.
To lint a module on its own:

    verilator --lint-only -Wall -y rtl +libext+.sv --top-module vedic_mult64 rtl/vedic_mult64.sv
