# Exact and approximate 64-bit multipliers built from 8:2 compressor trees

An unsigned 64 × 64 multiplier spends almost all of its logic on one job: reducing 4096
partial-product bits to a single 128-bit number. This design does that reduction with
**high-order compressors**: XOR-MUX 8:2 compressors first, 4:2 compressors next, then a
carry-lookahead adder. An 8:2 compressor takes 8 bits of a column per pass instead of 3,
so the tree needs fewer levels.

There are two variants of the same structure:

- **Exact.** `z = a * b`.
- **Approximate.** In the less significant columns, the last carry of each 8:2 compressor
  is not computed. A carry-in is passed straight through in its place. This removes a
  multiplexer from every such compressor, at the price of a small error in the product.
  The more significant columns stay exact.

The 64-bit multiplier is not one big tree. It is built hierarchically: 64 bits from four
32-bit multipliers, 32 bits from four 16 × 16 compressor trees. The partial products are
merged with carry-lookahead adders and one half adder.

Everything is combinational: no clock, no reset and no pipeline registers. The outputs
follow the operands after the delay of the logic.

## Hierarchy

```
approx_mult64_top
├── mul64 (APPROX_COLS = 0)            exact 64x64  -> z_exact
├── mul64 (APPROX_COLS = 16)           approximate  -> z_approx
│     ├── 4 x mul32                    32x32
│     │     ├── 4 x mul16_comp         16x16 compressor tree
│     │     │     ├── comp82 (x52)     XOR-MUX 8:2 compressor, exact or approximate
│     │     │     │     └── fa_xm (x6) XOR-MUX full adder
│     │     │     ├── comp42 (x24)     exact 4:2 compressor (2 x fa_xm)
│     │     │     └── cla_adder #(32)  final adder
│     │     ├── 2 x cla_adder #(32), cla_adder #(16), half_adder
│     ├── 2 x cla_adder #(64), cla_adder #(32), half_adder
└── mul8_42                            8x8 example with 4:2 compressors -> z8
```

`mult_pkg` holds the shared constants: the tree width (16) and the default number of
approximate columns (16).

### Top-level ports

| port       | dir | width | meaning                                              |
|------------|-----|-------|------------------------------------------------------|
| `a`, `b`   | in  | 64    | unsigned operands, shared by both 64-bit multipliers |
| `z_exact`  | out | 128   | `a * b`                                              |
| `z_approx` | out | 128   | approximate product                                  |
| `a8`, `b8` | in  | 8     | operands of the 8 × 8 example                        |
| `z8`       | out | 16    | `a8 * b8`                                            |

The top has one parameter, `APPROX_COLS` (default 16). It sets the approximate
multiplier. The exact one is always built with 0.

## The XOR-MUX cells

**Full adder (`fa_xm`).** The full adder is built from two XORs and one 2:1 mux:

```
t    = a ^ b
sum  = t ^ cin
cout = t ? cin : a
```

If `a` and `b` differ, the carry equals `cin`. If they agree, it equals `a`. The truth
table is that of an ordinary full adder.

**8:2 compressor (`comp82`).** It has thirteen inputs of one weight: eight column bits
`a[7:0]` and five carry-ins `ci[4:0]`. A straight chain of six `fa_xm` cells handles them:

```
FA0 (a0, a1, a2)  -> co0        FA3 (s2, a7,  ci0) -> co3
FA1 (s0, a3, a4)  -> co1        FA4 (s3, ci1, ci2) -> co4
FA2 (s1, a5, a6)  -> co2        FA5 (s4, ci3, ci4) -> carry, sum
```

- `co[4:0]` and `carry` have double weight.
- `co[4:0]` feed the `ci[4:0]` of the compressor one column up.
- In exact mode: `popcount(inputs) = sum + 2·(co0+…+co4+carry)`.

None of `co0`–`co2` depends on a carry-in. `co3` depends only on `ci0`, and `co4` only on
`ci0`–`ci2`. So the carry wires between columns never form a long ripple path.

**Approximate 8:2 compressor (`APPROX = 1`).** The mux of FA5 is removed and
`carry = ci4`. `sum` is unchanged. The exact carry of FA5 is `(s4 ^ ci3) ? ci4 : s4`:

- When `s4 ^ ci3 = 1`, the exact carry is `ci4` anyway.
- Otherwise it is `s4`, which equals `ci4` half the time.

So the approximate compressor matches the exact one on 75 % of its 8192 input
combinations (6144). The testbench confirms this count exhaustively. Each wrong carry
changes the column's value by ±2.

**4:2 compressor (`comp42`).** It is exact, built from two `fa_xm` cells:
FA0 on `x[2:0]` gives `cout`, and FA1 on (`s0`, `x3`, `cin`) gives `sum` and `carry`.
`cout` does not depend on `cin`, so a row of these also chains safely.

## The 16 × 16 compressor tree (`mul16_comp`)

This is the hardest part to read, because `rtl/mul16_comp.sv` lists its cells one by one.
The placement follows a simple rule.

**Partial products.** `pp[i][j] = b[i] & a[j]` has weight `2^(i+j)`. Column `c` holds
`h(c) = min(c+1, 31-c)` bits, so the heights run 1, 2, …, 16, …, 1.

**Stage 1: 8:2 chains.** Column `c` gets `k(c)` compressors:

```
k(c) = max(ceil(max(0, h(c) - 2) / 8), k(c-1))
```

- Compressor `j` of column `c` takes 8 bits of the column.
- Its `ci[4:0]` are the `co[4:0]` of compressor `j` in column `c-1`, so compressor `j`
  forms a chain across the columns.
- A chain that starts in column `c` fills its five carry-ins with further bits of
  column `c`.
- Missing inputs are 0.

This gives two chains: one starting in column 2 and one in column 10. Both run to
column 31, for 52 compressors in total. Afterwards no column holds more than four bits.

**Stage 2: one 4:2 chain.** A compressor is placed in column `c` in either case:

- the column has at least three bits, counting the `cout` arriving from column `c-1`;
- a `cout` arrives and the column has at least one bit of its own.

Each compressor takes up to four bits on `x`, with the arriving `cout` on `cin`. This
uses 24 compressors, and afterwards every column holds at most two bits.

**Final addition.** The two remaining rows go into a 32-bit carry-lookahead adder.

Heights after each stage:

```
partial products  max 16   1 2 3 4 5 6 7 8 9 10 11 12 13 14 15 16 15 14 ... 2 1 0
after 8:2         max 4    1 2 1 2 2 2 2 2 3 4 3 4 4 4 ... 4
after 4:2         max 2    1 2 1 2 2 2 2 2 1 2 2 2 ... 2
```

A third, full-adder stage would come next if any column still had three bits. At this
size the 8:2 and 4:2 stages already leave two rows, so that stage is empty. Full adders
appear only inside the compressors.

**Spill and saturation.** The chains reach the top column, so a few compressor outputs
have weight 2^32, as does the carry-out of the final adder. The RTL collects them in
`spill`.

- For an exact product they are always 0: `a*b < 2^32`, and every wire carries a
  non-negative weight.
- In the approximate variant a wrong carry can push the value to 2^32 or beyond. If any
  of those wires is 1, `z` saturates to `32'hffffffff` instead of wrapping to a small
  number.

**Where the approximation sits.** `APPROX_COLS` selects the approximate compressor for
every 8:2 compressor in a column below it. The default is 16, the lower half of the
32-bit product; 0 gives the exact tree. The 4:2 stage and the adder are always exact.

## Assembling 32 and 64 bits (`mul32`, `mul64`)

Both levels use the same arrangement. For width `W` with halves `H = W/2`:

```
v1 = aL*bL   v2 = aH*bL   v3 = aL*bH   v4 = aH*bH        (W-bit products)
s1:  v2 + v3                          -> sum1, c1       (W-bit CLA)
s2:  sum1 + {v4[H-1:0], v1[W-1:H]}    -> sum2, c2       (W-bit CLA)
ha:  c1 + c2                          -> {hc, hs}       (half adder)
s3:  v4[W-1:H] + {hc, hs}             -> top            (H-bit CLA)
z  = {top, sum2, v1[H-1:0]}
```

The two carry-outs of the middle adders both have weight `2^(W+H)`. The half adder
merges them into a two-bit value that is added to the top quarter.

In the approximate variant a carry out of `s3` means the sum reached `2^(2W)`, and `z`
saturates to all ones. For the exact variant that carry is impossible, and the
saturation logic is not generated.

`APPROX_COLS` is passed unchanged down to all sixteen trees. So every tree of the
approximate 64-bit multiplier, including the one that forms `aH*bH`, approximates its
own low 16 columns.

## Accuracy of the approximate multiplier

All adders above the trees are exact. The error of a product is therefore the sum of the
tree errors, each shifted to its weight.

**Per 16 × 16 tree (default `APPROX_COLS = 16`):**

- The error is a multiple of 8.
- Its magnitude is below 2^18: the sum of `2^(c+1)` over the approximate compressors.
- A zero operand gives exactly 0.
- On about 28,000 random and structured operand pairs, 66 % of the products differ from
  `a*b`, with a mean error distance of about 22,400. For comparison, a typical product
  is around 2^30.

**For 64 × 64:** the error is bounded by `Σ_{i,j=0..3} 2^(18+16(i+j))`, which is below
2^115. Relative to the magnitude of `aH*bH` (up to 2^128) this is small. Products of
operands close to all ones saturate to all ones.

For a different trade-off, change `APPROX_COLS`. For example, 8 keeps the error of each tree
below 2^9.

## The 8 × 8 example (`mul8_42`)

This is the reduction principle on a small scale. Sixty-four partial products are reduced
in two stages, to at most four and then at most two bits per column, and then added by a
16-bit CLA. The cells are exact 4:2 compressors with chained `cout`, full adders and half
adders.

Within each stage the columns are visited from the bottom up. While a column would leave
the stage above its target height, the next cell is:

1. a 4:2 compressor, if at least four bits are left;
2. otherwise a full adder;
3. otherwise a half adder.

This gives 19 compressors, 4 full adders and 3 half adders. The example is exact and sits
beside the 64-bit multipliers on its own ports.

## What follows the source design and what does not

Taken from the published design:

- the AND-array partial products;
- the order of the stages: 8:2, then 4:2, then full adders, then a carry-lookahead adder;
- the XOR-MUX full adder and the six-adder 8:2 chain with its port names;
- the approximation by passing the fifth carry-in straight to `carry`, and its 75 %
  match rate;
- exact compressors in the more significant columns;
- the 64-bit assembly from four 32-bit multipliers, two 64-bit CLAs and a half adder;
- the 8 × 8 two-stage 4:2 example.

This design's own choices:

- **Compressor placement.** The column-by-column placement in both trees. Only the cell
  types and stage order are given, not a readable bit-level map.
- **Stage count.** The 16 × 16 tree needs two compressor stages. The source counts three
  reduction stages, the third made of full adders. Here that stage has no work to do.
- **Approximation boundary.** `APPROX_COLS = 16` per tree. The source only says the
  approximation goes in the less significant positions.
- **Saturation.** The source does not say what happens when an approximate sum
  overflows. Without saturation, operands near all ones would wrap to tiny products.
- **32-bit sub-multiplier insides.** The same assembly as the 64-bit level, from four
  16 × 16 trees. Only the sub-module's name and ports are given.
- **Adders.** The CLA structure: 4-bit lookahead groups, with the group carries passed in
  a row, and no carry-in. The third adder of each level is `H` bits wide, where the
  source draws a full-width adder with unused inputs.
- **Top level.** Putting the exact and approximate multipliers and the 8 × 8 example side
  by side in one top.
- **Signedness.** The operands are unsigned, which is what an AND-array multiplier is.

Not reproduced:

- **Published approximate products.** The approximate products printed for three example
  operand pairs differ from `a*b` in their top bits. That is far more error than a carry
  bypass in the low columns can produce, so this design does not match them; it keeps
  the bounded error described above. The published exact products are matched bit for
  bit.
- **Published delays.** The delay figures of the reference implementation (about 28.5 ns
  for either variant on an FPGA) are not claimed.
- **Approximate carry-select adder.** It is mentioned as an alternative final adder and
  is not built. Both published block diagrams use a carry-lookahead adder.

## Simulating

Each module is in `rtl/<module>.sv`, and `rtl/mult_pkg.sv` must be read first. Each
testbench `tb/tb_<module>.sv` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    --top-module tb_approx_mult64_top rtl/mult_pkg.sv tb/tb_approx_mult64_top.sv -y rtl
./obj_dir/Vtb_approx_mult64_top
```

Replace the top-module name to run any other testbench. All of them finish in well under
a second.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_fa_xm`, `tb_half_adder`, `tb_comp42` | exhaustive truth tables; `cout` of the 4:2 compressor independent of `cin` |
| `tb_comp82`            | all 8192 inputs, both variants: weighted count, sum parity, `carry = ci4`, exactly 6144 agreements |
| `tb_cla_adder`         | 64- and 32-bit: carry through every group, random operands |
| `tb_mul16_comp`        | exact tree against `a*b`; approximate tree against the error bound, the multiple-of-8 rule and a zero operand |
| `tb_mul32`, `tb_mul64` | exact against `a*b`; approximate against the saturated sum of separately instantiated 16 × 16 trees |
| `tb_mul8_42`           | all 65,536 operand pairs |
| `tb_approx_mult64_top` | full-size top at default parameters (see below) |

`tb_approx_mult64_top` runs the top at its default parameters. It checks:

- the published exact products;
- the approximate error bound, on about 5,000 operand pairs;
- every 8 × 8 pair.

It also fails unless each of these occurred at least once:

- an approximate product that differs from the exact one;
- an approximate product that equals it;
- a carry out of the cross-product adder;
- a carry out of the second adder;
- both carries at once, i.e. the half adder's carry;
- a saturated approximate product.

## Changing the design

- **Approximation extent:** set `APPROX_COLS` on the top (0–32). Values above 0 also
  generate the saturation logic.
- **Compressor placement:** the two trees are written out cell by cell from the placement
  rules above. To change the placement, regenerate the instance list from those rules,
  then re-run `tb_mul16_comp` / `tb_mul8_42`. Those testbenches check the arithmetic, not
  the wiring.
- **Other widths:** `mul32` and `mul64` share one pattern. A 128-bit multiplier would be
  four `mul64` instances with 128-bit CLAs in the same arrangement.
