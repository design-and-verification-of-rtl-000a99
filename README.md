# 32-bit modified Vedic multiplier

An unsigned 32 x 32-bit multiplier with a 64-bit product, built as a purely
combinational tree of *Urdhva Tiryakbhyam* ("vertically and crosswise")
units. The Vedic method forms all the partial products of a multiplication
in parallel by splitting each operand in halves. It then only has to add four
smaller products. The "modified" part is the adding: above the 4 x 4 level,
the four partial products are merged by one carry-save adder (CSA) and a
ripple-carry adder of half the usual width. There are no chains of
full-width ripple adders.

Top module: `modified_vedic` (`a[31:0]`, `b[31:0]` in, `z[63:0]` out).

## The vertically-and-crosswise idea

Split each operand into a high and a low half, `a = {ah, al}` and
`b = {bh, bl}`, each of `H` bits. Then

```
a*b = q0 + (q1 + q2) << H + q3 << 2H
q0 = al*bl   (vertical, right)
q1 = ah*bl   (crosswise)
q2 = al*bh   (crosswise)
q3 = ah*bh   (vertical, left)
```

The four products are independent, so they are computed side by side by four
multipliers of half the width. Applying the same split recursively gives the
tree:

| Level   | Module           | Built from                                      |
|---------|------------------|-------------------------------------------------|
| 2 x 2   | `vedic_2x2`      | 4 AND gates, 2 half adders                      |
| 4 x 4   | `vedic_4x4`      | 4 x `vedic_2x2`, 3 four-bit ripple-carry adders |
| 8 x 8   | `vedic_8x8`      | 4 x `vedic_4x4`, `vedic_merge` (H = 4)          |
| 16 x 16 | `vedic_16x16`    | 4 x `vedic_8x8`, `vedic_merge` (H = 8)          |
| 32 x 32 | `modified_vedic` | 4 x `vedic_16x16`, `vedic_merge` (H = 16)       |

Leaf cells: `half_adder`, `full_adder`, `rca` (N-bit ripple-carry adder), and
`csa` (N-bit three-operand carry-save adder).

## The 2 x 2 leaf

Here `a = a1a0` and `b = b1b0`. `p0 = a0b0` is the vertical product. The two
crosswise products `a1b0 + a0b1` go through a half adder, which gives `p1`
and a carry. A second half adder adds that carry to the left vertical product
`a1b1`, which gives `p2` and `p3`. A two-bit full-adder version is the same
circuit with its carry-ins at zero.

## The 4 x 4 unit and its OR gate

The 4 x 4 unit keeps plain ripple-carry adders:

```
adder 1:  q1 + q2                       -> s1, carry c1
adder 2:  s1 + {00, q0[3:2]}            -> s2, carry c2
adder 3:  q3 + {0, c1 | c2, s2[3:2]}    -> p[7:4]
p[3:2] = s2[1:0]      p[1:0] = q0[1:0]
```

Both carries `c1` and `c2` have weight 64, so the third adder would need
two inputs at the same bit. They are combined with an OR gate, which is exact
because the two can never both be 1. The only way to get `c1 = 1` is
`q1 = q2 = 9`. Then `s1 = 2`, and `s1 + q0[3:2] <= 4` cannot carry. The
third adder's own carry-out is always 0, so it is left open.

## The carry-save merge (`vedic_merge`)

This is the core of the design. For an `N x N` multiplier (`N = 2H`), the
product is `q0 + (q1 + q2) << H + q3 << N`, and the merge adds it in three
slices:

```
bits [H-1:0]    q0[H-1:0]                     no logic at all
bits [3H-1:H]   t[N-1:0], where
                t = CSA( q1, q2, {q3[H-1:0], q0[N-1:H]} )   (N+2 bits)
bits [4H-1:3H]  q3[N-1:H] + t[N+1:N]          H-bit ripple-carry adder
```

Why this works: above bit `H`, the terms to add are the upper half of `q0`,
all of `q1` and `q2`, and `q3` shifted up by `H`. The upper half of `q0` and
the lower half of `q3` do not overlap. Concatenated, they form one N-bit word.
So the whole middle section is a single three-operand addition of N-bit
words, which is what a carry-save adder does well. Its result has two bits of
overflow, `t[N+1:N]`. These are added to the upper half of `q3` by a final
ripple-carry adder only `H` bits wide. The product fits in `2N` bits, so that
adder cannot carry out.

The CSA (`csa`) has two steps. First, a row of full adders reduces the three
operands column by column, with no carry between columns. This gives a sum
vector `ps` and a carry vector `pc`. Second, an N-bit ripple-carry adder adds
`pc` to `ps` shifted down by one place, with a 0 in its top input. Its sum
and carry-out, together with `ps[0]` below them, make up the `N+2`-bit total.

The longest path in the 32 x 32 multiplier goes through one 2 x 2 leaf, the
three ripple adders of a 4 x 4 unit, and then one CSA plus its final adder at
each of the three merge levels. The CSA's internal ripple adder is N bits
wide: 8, 16 and 32 bits at those levels.

## Interface and timing

| Port | Dir | Width | Meaning            |
|------|-----|-------|--------------------|
| `a`  | in  | 32    | multiplicand       |
| `b`  | in  | 32    | multiplier         |
| `z`  | out | 64    | `a * b`, unsigned  |

There is no clock and no reset. `z` is valid one propagation delay after `a`
and `b` settle. In a clocked datapath, register the operands and the product
outside the multiplier. If its delay exceeds one cycle, treat it as a
multicycle path. Every level takes and returns plain unsigned vectors, so
any `vedic_NxN` module can be used on its own.

## How closely this follows the source design

Taken from the source design:
- the 2 x 2 leaf with half adders;
- the 4-bit ripple-carry adder and the 4-bit carry-save adder structure;
- the three-adder graph of the 4 x 4 unit;
- the recursive 2 x 2 / 4 x 4 / 8 x 8 construction;
- the top module's name and ports (`a`, `b`, `z`, 32/32/64 bits);
- the use of a CSA, a concatenation of unequal-size operands, a final adder
  of half size, and an OR gate.

Choices of this implementation:
- The exact operands of the CSA, and the placement of the half-width adder.
  The source says which parts exist but not how they are wired.
- Using the CSA merge at every level from 8 x 8 up, and putting the OR gate
  in the 4 x 4 unit, where two carries of equal weight meet.
- The gate-level form of the half and full adders.
- Unsigned operands.
- A purely combinational circuit with no registers.

The reported FPGA results of the original (1912 LUTs, about 21 ns and 28
logic levels from `a[0]` to `z[59]`) come from a vendor flow. They have not
been reproduced, and this RTL is not claimed to match them.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each
compares the module's outputs with integer arithmetic done in the testbench,
ends with a line `TB_RESULT checks=N failures=M`, and has a watchdog.

- `half_adder`, `full_adder`, `vedic_2x2`, `vedic_4x4`, `vedic_8x8`:
  exhaustive.
- `rca`: exhaustive at 4 bits; random and full-ripple cases at 16 bits.
- `csa`: exhaustive at 4 bits; random and all-ones cases at 32 bits.
- `vedic_merge`: exhaustive at H = 4 and random at H = 16, driven with real
  partial products.
- `vedic_16x16`: corner values and 20,000 random pairs.
- `modified_vedic_tb` tests the full 32 x 32 multiplier end to end:
  - the four operand pairs of the original's reference simulation, for
    example 1235 x 4556 = 5626660;
  - corner values;
  - 50,000 random pairs with mixed bit densities.

  It also counts how often the top CSA spills into the half-width adder, how
  often that CSA carries out, and how often each of the two OR-ed carries
  fires in a 4 x 4 unit. If any of these never happens, that counts as a
  failure.

Each testbench has also been run against a deliberately broken copy of its
module (for example, AND in place of the OR gate, or a dropped operand
slice). Each one reported failures.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    --top-module modified_vedic_tb tb/modified_vedic_tb.sv
./obj_dir/Vmodified_vedic_tb
```

Replace `modified_vedic_tb` with any other `<module>_tb` to test one level.
Each testbench runs in a few seconds.

## Changing it

- A wider multiplier (64 x 64): add a module like `vedic_16x16.sv` that
  instantiates four `modified_vedic` units and a `vedic_merge` with `H = 32`.
- A different adder inside the merge: `vedic_merge` only needs the total of
  the three operands and the top slice. Swapping `rca` there for a faster
  adder keeps the rest unchanged.
