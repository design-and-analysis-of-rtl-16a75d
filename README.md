# 4x4 Vedic multipliers: carry-save and vertical-adder versions

These are small combinational multipliers for two 4-bit unsigned numbers.
Each one gives the 8-bit product. They all use the *Urdhva-Tiryagbhyam*
("vertically and crosswise") rule of Vedic arithmetic, which builds a product
column by column. Column *k* collects every bit product `a_i * b_j` with
`i + j = k`, adds it to the carry left by column *k-1*, keeps the low bit as
product bit `p_k`, and passes the rest on.

The main idea is to build the 4x4 multiplier from four 2x2 multipliers of the
same kind. Two ways of adding their partial products are provided. One uses a
carry-save adder. The other uses a column-wise "vertical" adder. A third
module writes the seven crosswise steps out directly, as a reference
realisation of the same rule.

All modules are plain combinational logic. There is no clock, no register and
no reset. A product is valid one propagation delay after the operands change.

## The partial-product array

Split each operand into 2-bit halves: `a = {aH, aL}` and `b = {bH, bL}`. Four
2x2 Vedic multipliers (`vedic_mul2x2`) then give:

| name | product   | weight in a*b |
|------|-----------|---------------|
| Q0   | aL * bL   | 1             |
| Q1   | aH * bL   | 4             |
| Q2   | aL * bH   | 4             |
| Q3   | aH * bH   | 16            |

In product-bit columns this looks like:

```
column:      7     6     5     4     3     2     1     0
                               Q0[3] Q0[2] Q0[1] Q0[0]
                   Q1[3] Q1[2] Q1[1] Q1[0]
                   Q2[3] Q2[2] Q2[1] Q2[0]
       Q3[3] Q3[2] Q3[1] Q3[0]
```

Both 4x4 architectures handle the array in the same way at the edges:

- `p[1:0]` is `Q0[1:0]` unchanged, because nothing else falls into columns 0 and 1.
- The rest of the array is summed into `p[7:2]`.

The two architectures differ only in how they sum the rest.

Inside `vedic_mul2x2`, the crosswise rule is applied at two bits:

- `q0 = a0 b0`.
- A half adder on `a1 b0` and `a0 b1` gives `q1`.
- A second half adder on `a1 b1` and that carry gives `q3:q2`.

## Carry-save architecture (`vedic_mul4x4_csa`)

Once columns 0 and 1 are removed, the upper rows fit into three 6-bit words,
measured in units of 2^2:

```
x = {Q3, Q0[3:2]}     concatenation: Q3 sits four places above Q0[3:2]
y = {2'b00, Q1}       zero padded
z = {2'b00, Q2}       zero padded
p[7:2] = x + y + z
```

`carry_save_adder` (W = 6) adds the three words in two stages:

1. **No-carry stage.** A row of six full adders adds each bit column on its
   own. It gives a sum vector `s` and a carry vector `c`. Bit `c[i]` weighs
   2^(i+1). No carry moves sideways here.
2. **Merge stage.** A ripple of full adders adds `c`, shifted up one place, to `s`.

The adder also gives an `ovf` flag for a total that does not fit in W bits.
This cannot happen inside the multiplier, since 15 * 15 = 225 gives
225 >> 2 = 56 < 64. `vedic_mul4x4_csa` checks that with an immediate assertion.

## Vertical-adder architecture (`vedic_mul4x4_va`)

This architecture needs the most care. The vertical adder works on product
columns 2 to 5. Each column adds **four operands at once**:

- its bit of `Q0[3:2]` (in columns 2 and 3) or of `Q3[1:0]` (in columns 4 and 5)
- its bit of `Q1`
- its bit of `Q2`
- the **two-bit carry** from the column below, read as a number from 0 to 3

The column total is at most 6. Its low bit is the column's sum bit, which is
the product bit. The other two bits form the two-bit carry into the next
column. So every column gives one sum bit and a two-bit carry. A carry never
needs a third bit.

| column | operands                          | total at most | carry out at most |
|--------|-----------------------------------|---------------|-------------------|
| 2      | Q0[2], Q1[0], Q2[0]               | 3             | 1                 |
| 3      | Q0[3], Q1[1], Q2[1], carry        | 4             | 2                 |
| 4      | Q3[0], Q1[2], Q2[2], carry        | 5             | 2                 |
| 5      | Q3[1], Q1[3], Q2[3], carry        | 5             | 2                 |

These are bounds for any inputs to the stand-alone adder. For real partial
products the values are smaller.

The last column's two-bit carry `cout` is worth `cout * 2^6`. It goes to
`fa_ha_stage`, which adds it to `Q3[3:2]`:

- column 6: a half adder adds `Q3[2]` and `cout[0]`. Its sum is `p6`.
- column 7: a full adder adds `Q3[3]`, `cout[1]` and the half adder's carry.
  Its sum is `p7`.

The full adder's own carry out would be bit 8 of the product. It is always 0,
and `vedic_mul4x4_va` asserts that.

Compared with the carry-save version, the addition is done in one pass, with
no separate merge stage. That is the reason given for the vertical-adder
version being the smaller and slightly faster of the two. The FPGA figures
published for these two architectures are 15 LUTs and 2.496 ns for the vertical adder, against 20 LUTs and 2.5 ns for the
carry-save adder. These figures were not reproduced here.

## Direct crosswise steps (`vedic_mul4x4_ut`)

This module writes the seven steps of the 4-bit rule out directly:

| step | products added     |
|------|--------------------|
| 0    | a0b0               |
| 1    | a0b1, a1b0         |
| 2    | three products     |
| 3    | four products      |
| 4    | three products     |
| 5    | two products       |
| 6    | a3b3               |

Each step adds its products and the carry of the step before. The low bit of
the total is `p_k`, and the rest is the carry into the next step. The carry
left after step 6 is `p7`. Totals stay at 6 or below, so the carries are 3
bits wide. Each step is written as a single column count. No particular tree
of adder cells is given.

## Top level (`vedic_mul4x4_top`)

| port    | dir | width | meaning                             |
|---------|-----|-------|-------------------------------------|
| `a`     | in  | 4     | multiplicand                        |
| `b`     | in  | 4     | multiplier                          |
| `p_csa` | out | 8     | product, carry-save architecture    |
| `p_va`  | out | 8     | product, vertical-adder architecture |
| `p_ut`  | out | 8     | product, direct crosswise steps     |

All three multipliers share the operands. To use a single multiplier, take its
module on its own: `vedic_mul4x4_csa`, `vedic_mul4x4_va` or `vedic_mul4x4_ut`.
Each has ports `a[3:0]`, `b[3:0]` and `p[7:0]`.

## Module hierarchy

```
vedic_mul4x4_top
├── vedic_mul4x4_csa
│   ├── vedic_mul2x2 x4 ── half_adder x2
│   └── carry_save_adder (W=6) ── full_adder x(2W-1)
├── vedic_mul4x4_va
│   ├── vedic_mul2x2 x4
│   ├── vertical_adder
│   └── fa_ha_stage ── half_adder, full_adder
└── vedic_mul4x4_ut
```

`carry_save_adder` has one parameter, `W`, which defaults to 6. The other
modules have fixed sizes.

## What follows the published design and what does not

These parts follow the published design:

- the four 2x2 multipliers
- `Q0[1:0]` going straight to the output
- the concatenation and zero padding feeding a 6-bit two-stage carry-save adder
- the operand grouping of the vertical adder, with its one-bit sum and two-bit carry
- the final full/half adder stage
- the seven crosswise steps

These are choices made here, because the published description does not settle them:

- **Operands are unsigned.** Signed operation is not described.
- **The pairing of operand halves with the four 2x2 multipliers.** The
  published block diagrams label the four multipliers only loosely. The
  standard pairing shown in the table above is used. Swapping `Q1` and `Q2`
  changes nothing.
- **The six-bit intermediate word of the carry-save adder is a wire.** The
  published text calls it a register. It is treated as combinational, since
  the published timing is a pure input-to-output path.
- **The merge stage of the carry-save adder is a ripple of full adders.**
- **The two-bit carry of the vertical adder is a binary number** passed to the
  next column. Each column's total is written as a 3-bit addition. It is not
  built from named cells.
- **In the last stage, the half adder takes column 6 and the full adder column 7.**
- **The direct crosswise module is an extra.** The published work describes
  these steps as the method and does not synthesise them as an architecture.
  It is included as a third, independent realisation.
- **Extra outputs and assertions:** the `ovf` output of `carry_save_adder`,
  the `cout` output of `fa_ha_stage`, and the assertions that these stay 0
  inside the multipliers.

The published work also mentions building 8x8 and larger multipliers from 4x4
ones. It gives no structure for them, so none is provided.

## Verification

Every module has a self-checking testbench in `tb/`:

- `tb_<module>.sv` exercises its module exhaustively. That is 2^18 operand
  triples for the carry-save adder and all 256 operand pairs for each
  multiplier.
- `tb_vedic_mul4x4_top.sv` runs the top end to end with all 256 operand pairs
  and checks all three products.
- The top's testbench also counts how often each inner mechanism comes into
  play, and fails if one never does. The mechanisms are: stage-1 and stage-2
  carries of the carry-save adder, two-bit column carries, the carry into the
  full/half stage, the half-adder carry, and multi-bit crosswise carries.
- Each testbench has a watchdog.
- Each testbench ends with a line
  `TB_RESULT checks=N failures=M`.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/tb_vedic_mul4x4_top.sv \
          --top-module tb_vedic_mul4x4_top -Mdir obj_top -o sim
./obj_top/sim
```

Change the testbench and top-module names to run another test. To lint a
module, use `verilator --lint-only -Wall -Irtl rtl/<module>.sv`.
