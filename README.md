# Vedic-multiplier ALU

A small combinational ALU for two 32-bit unsigned operands. It does AND, OR,
ADD, SUB and MUL. The multiplier is the interesting part. It does not use a
conventional array or Booth multiplier. It uses the *Urdhva-Tiryagbhyam*
("vertically and crosswise") rule of Vedic mathematics. The rule splits a
product into independent digit products. All of them are formed at once, and
then added column by column. In hardware this gives a regular tree: a 2x2-bit
cell is the leaf, and every wider multiplier is four half-width multipliers
plus a few adders. The selected result also drives two seven-segment digits
and one decimal point, as on a prototyping board.

```
            a[31:0]            b[31:0]
               |                  |
     +---------+--------+---------+---------+
     |                  |                   |
 logic_unit        addsub_unit          vedic_mul
 AND, OR           one adder            32x32 -> 64
     |             A+B / A+~B+1             |
     +---------+--------+---------+---------+
               |
          alu_select  <-- sel[2:0]
               |
        result[63:0], valid_op
               |
   +-----------+-----------+-----------------+
   |                       |                 |
 seg7_decoder          seg7_decoder       |result[63:8]
 (result[3:0])         (result[7:4])         |
   seg_lsd[6:0]          seg_msd[6:0]      dp_lsd
```

There is no clock and no register. Every output is valid one propagation
delay after `a`, `b` or `sel` changes.

## Multiplying vertically and crosswise

### The 2x2 cell (`vedic_mul2x2`)

Take operands `a = a1a0` and `b = b1b0`. Four AND gates form the bit products.

* **Vertical:** `a0b0` is product bit 0.
* **Crosswise:** a half adder sums `a0b1 + a1b0`. Its sum is bit 1 and its carry is `c1`.
* **Vertical:** a second half adder sums `a1b1 + c1`. Its sum is bit 2 and its carry is bit 3.

The delay after the AND gates is two half adders. At this size the cell is
the same as a 2x2 array multiplier. The method only pays off at larger widths.

### Merging four half-width products (`vedic_merge`)

Split 2H-bit operands into halves, `a = aH:aL` and `b = bH:bL`. There are four
H x H products:

| product | halves | role |
|---|---|---|
| q0 | aL * bL | vertical, low column |
| q1 | aH * bL | crosswise |
| q2 | aL * bH | crosswise |
| q3 | aH * bH | vertical, high column |

`a*b = q0 + (q1 + q2)*2^H + q3*2^(2H)`. Three adders evaluate this:

```
cross = q1 + q2                      2H+1 bits (keeps its carry)
mid   = cross + q0[2H-1:H]           2H+1 bits
p     = { q3 + mid[2H:H],  mid[H-1:0],  q0[H-1:0] }
```

The low H bits of `q0` pass straight through as the low H bits of `p`.
`mid[H-1:0]` is the middle column. Whatever `mid` holds above bit H-1 carries
into the high column. Neither `mid` nor the final add can overflow when the
inputs are real sub-products. A simulation assertion in `vedic_merge` checks
this.

### The tree (`vedic_mul`)

`vedic_mul #(N)` lays the tree out one level per generate loop, with no
module instantiating itself:

* Level 1 multiplies every 2-bit digit of `a` by every 2-bit digit of `b` in a 2x2 cell.
* Level *k* merges groups of four level *k-1* products into products of 2^k-bit digits.
* Level log2(N) holds the single NxN product.

At level k the digit width is `S = 2^k` and there are `D = N/S` digits per
operand. The product of digit `i` of `a` and digit `j` of `b` is stored as
`g_lvl[k].prod[i*D + j]`. For a merge at `(i, j)`, the four inputs are the
level below's products at digits `(2i, 2j)`, `(2i+1, 2j)`, `(2i, 2j+1)` and
`(2i+1, 2j+1)`. Every product on every level is used exactly once.

For N = 32 the tree has:

* 256 2x2 cells;
* merges at four levels: 64 for 4x4, 16 for 8x8, 4 for 16x16 and 1 for 32x32;
* 255 merges in all, with three adders each.

The digit products are independent, so all 256 cells work in parallel.
The critical path is one 2x2 cell plus the adders of four merge levels.

`N` must be a power of two, at least 2. The elaboration checks this.

## The rest of the ALU

**Add and subtract (`addsub_unit`, `adder`).** There is a single adder.
Subtraction is `A + ~B + 1`: B is inverted and the carry in is set to one.
The carry out is the unsigned overflow for ADD. For SUB it is the "no borrow"
flag: it is 1 exactly when `A >= B`. The same `adder` module is also the
building block of the multiplier's merge stages. Its architecture is left to
synthesis.

**Logic (`logic_unit`).** Bitwise AND and OR.

**Selection (`alu_select`, codes in `alu_pkg`).**

| sel | op | result[63:0] |
|---|---|---|
| 0 | AND | `{32'b0, a & b}` |
| 1 | OR  | `{32'b0, a \| b}` |
| 2 | ADD | `{31'b0, carry, a + b}` |
| 3 | SUB | `{31'b0, no_borrow, a - b}` |
| 4 | MUL | `a * b` (full 64 bits) |
| 5-7 | — | `0`, and `valid_op = 0` |

**Display (`seg7_decoder`).** Two decoders show result bits 3:0 (`seg_lsd`)
and 7:4 (`seg_msd`) as hexadecimal digits (0-9, A b C d E F). The segment
vector is `{g,f,e,d,c,b,a}` and is active high. The decimal point of the low
digit, `dp_lsd`, lights when any result bit above bit 7 is set. It warns that
the two digits do not show the whole result.

## What is specified and what is chosen here

These parts follow the design directly:

* the set of units (AND, OR, ADD, MUL) behind one selecting function with a 3-bit select;
* subtraction on the adder by inverting B and setting the carry in;
* the 2x2 cell of four AND gates and two half adders, wired as above;
* building wider multipliers from it;
* 32-bit operands with a 64-bit product;
* two seven-segment digit drivers and a decimal-point output.

A known data point is 252 x 846 = 213192. Both the multiplier test and the
ALU test apply it.

These are choices made for this RTL:

* **Merge structure.** Only the principle of building 4x4 and 8x8 from 2x2 is
  given. The three-adder merge is a common, simple form. A carry-save merge
  would be faster and would only change `vedic_merge`.
* **Operation codes** and the zero result for unused codes.
* **What the displays show** (the two low hex digits), the segment order and
  polarity, and the meaning of the decimal point.
* **Result layout.** There is one 64-bit result bus, with the add/sub carry in
  bit 32, instead of separate per-unit outputs.
* **Combinational design.** No clock or reset appears anywhere, so there is
  no pipeline register.
* **Unsigned operands only.** Signed multiplication is not provided.
* **No shifter.** Shift circuits are mentioned as something an ALU may
  combine, but none is described and the block diagram has none.

The seven-segment LEDs themselves are off-chip. Their drive lines are the
top's `seg_lsd`, `seg_msd` and `dp_lsd` ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `half_adder_tb`, `vedic_mul2x2_tb`, `seg7_decoder_tb` | every input |
| `vedic_mul_tb` | N = 4 and 8 on every operand pair; N = 16 and 32 on corner values (all ones, single high bits, long runs of ones) and about 22,000 random pairs |
| `adder_tb` | W = 4 on every input; W = 32 on corners and random values |
| `addsub_unit_tb`, `logic_unit_tb`, `alu_select_tb` | directed and random values; `addsub_unit_tb` also checks that both carry and borrow occurred |
| `vedic_alu_tb` | the full 32-bit ALU, see below |

`vedic_alu_tb` runs the full 32-bit ALU end to end over all eight select
codes. It checks the result, `valid_op`, both digits and the decimal point.
It also counts how often each mechanism occurred: every operation, the add
carry out, the subtract borrow, the undefined codes, and the decimal point
both lit and dark. A mechanism that never occurred counts as a failure. The
expected seven-segment patterns come from `tb/seg7_expect.svh`, which builds
each digit from the list of segments it lights. This is independent of the
decoder's table.

Every testbench has been shown to catch a deliberate fault in its module.
Examples: a dropped carry between merge columns, a missing carry-in on
subtract, and a wrong segment.

Running a test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/alu_pkg.sv tb/vedic_alu_tb.sv --top-module vedic_alu_tb
./obj_dir/Vvedic_alu_tb
```

Use the same command for any other testbench, with its name in place of
`vedic_alu_tb`. Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/alu_pkg.sv rtl/vedic_alu.sv`.

## Changing it

* **Width.** `vedic_alu #(.W(n))` sets the width. `n` must be a power of two,
  because the multiplier tree halves the operands at every level. All units
  and the result follow `W`.
* **Faster merges.** Replace the body of `vedic_merge`, keeping its ports.
  The testbenches check only products, not the structure, so they stay valid.
* **Operation codes.** Change them in `alu_pkg`. `vedic_alu_tb` and
  `alu_select_tb` use the numeric codes 0-7 in their reference models, so
  update those as well.
