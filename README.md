# Fixed-width modified Booth multiplier with sorting-network error compensation

Many DSP datapaths multiply two N-bit numbers and keep only an N-bit result.
A full multiplier builds the whole 2N-bit product and then throws away the
lower half. A *fixed-width* multiplier never builds most of that lower half.
This saves nearly half of the adder cells, but the carries that the dropped
columns would have sent upwards are lost. Simply cutting them off biases the
result by about half an output LSB and gives a large mean-square error.

This RTL implements a signed N x N radix-4 (modified) Booth multiplier with
an N-bit output. It keeps only one truncated column, the most significant
one. All the columns below it are replaced by a small *compensation*
estimate. The estimate depends only on how many Booth digits of the recoded
operand are nonzero. It is produced without any adder: a bit-level sorting
network sorts those digit flags, and a few fixed outputs of the sorted
vector are tapped.

The default is N = 8, the size the design was developed and measured at.
N is a parameter. N = 16 and N = 32 are also simulated.

## Arithmetic, step by step

### Booth recoding

The operand `x` is cut into N/2 overlapping 3-bit groups
`{x[2i+1], x[2i], x[2i-1]}`. The bit below `x[0]` is taken as 0. Each group
becomes one digit in {-2, -1, 0, +1, +2}:

| group | digit | group | digit |
|-------|-------|-------|-------|
| 000   | 0     | 100   | -2    |
| 001   | +1    | 101   | -1    |
| 010   | +1    | 110   | -1    |
| 011   | +2    | 111   | 0     |

`booth_encoder` turns a group into five control bits:

- `neg`: the top bit of the group.
- `one`: the digit is ±1.
- `two`: the digit is ±2.
- `zero`: the digit is 0.
- `cor`: the two's-complement correction. It equals `neg`, except for group
  111. That group is a "negative zero", and there the correction must add
  nothing.

### Partial-product rows

`pp_generator` makes one (N+1)-bit row for each digit:

1. It XORs every bit of `y` (sign-extended by one bit) with `neg`.
2. A selector then picks, bit by bit, one of 0, the same bit, or the bit
   one place lower (for ×2).

For a negative digit this gives the ones' complement of the multiple. The
missing +1 is the digit's `cor` bit, added in the row's lowest column.

Sign extension of the rows is removed in the usual way:

- The top bit of every row is inverted.
- One constant is added: −(2^N + 2^(N+2) + … + 2^(2N−2)) mod 2^(2N). For
  N = 8 this is `16'hAB00`.

### The matrix and what is kept (N = 8)

```
column:   15 14 13 12 11 10  9  8 |  7 |  6  5  4  3  2  1  0
row 0                          ~s0 |p07 | p06 p05 p04 p03 p02 p01 p00
row 1                   ~s1 p17 p16|p15 | p14 p13 p12 p11 p10
row 2             ~s2 p27 p26 p25 p24|p23 | p22 p21 p20
row 3       ~s3 p37 p36 p35 p34 p33 p32|p31 | p30
cor bits                           |    | c3      c2      c1      c0
constant   1  0  1  0  1  0  1  1 |    |
compens.                          | λ̄, α1 |
          <------ output p[7:0] ---->| major | <------ dropped (minor) ----->
```

The column groups are:

- **Columns 15..8** form the output.
- **Column 7** (N−1) is the *major* truncated column. Its bits are generated
  and summed, so the carry it sends into column 8 is exact with respect to
  the bits that exist. The column itself is then discarded.
- **Columns 6..0** (the *minor* part) are never generated. This covers every
  `cor` bit, because `cor_i` sits in column 2i ≤ N−2.

### Compensation: the SC-generator

The minor part would have sent a carry into column N−1. The dropped bits of
a row are all zero when its digit is zero. When the digit is nonzero, those
bits carry roughly half a unit of column N−1 on average. The carry is
therefore estimated from R, the number of nonzero digits, as

    floor((R − 1) / 2)   units of 2^(N−1)   (0 when R = 0)

`sc_generator` computes this without subtracting or counting:

1. The N/2 flags `~zero_i` go through an odd-even merge (Batcher) sorting
   network of bit comparators (max = OR, min = AND). The network moves the
   ones to the low indices.
2. The sorted vector `s` is then a thermometer code of R: `s[j] = 1` exactly
   when `R > j`.
3. The outputs are `α_k = s[2k]` for k = 1 … M, where
   M = floor((N/2 − 1) / 2).
4. Each α_k is 1 when R ≥ 2k+1, so the α bits add up to floor((R−1)/2).

For N = 8 there is a single output, `α1 = (R ≥ 3)`. For N = 16 there are
three. The network is written in generic loop form. Comparators that feed no
α output are removed by synthesis.

A further bit, `λ̄` (parameter `LAMBDA_BAR`, default 1), is added in column
N−1. With the value 1 it is the rounding half-LSB of the output. See
*Departures and choices* below.

### Summation: the CLA compression tree

`compression_tree` builds only the columns `LO` … 2N−1 (`LO` = N−1 in the
multiplier). This window is W = N+1 bits wide: 9 bits for N = 8.

- The N/2 rows are added pairwise, level by level, in W-bit carry look-ahead
  adders (`cla_adder`).
- A final CLA adds the *constant row* to the result. The constant row holds
  the sign-extension constant, with the `cor` bits and `λ̄` placed in its
  zero positions.
- `α1` is the final adder's carry-in, because it has the weight of the
  window's lowest bit.
- Any further α bits (N ≥ 16) enter the tree as extra one-bit rows.

For N = 8 the tree is exactly four adders: row0+row1, row2+row3, their sum,
and the constant adder. Carries out of the window are dropped (arithmetic
mod 2^(2N)).

With `LO = 0` and the compensation inputs tied to 0, the same module returns
the exact 2N-bit Booth product. The testbench uses this to verify the
matrix construction independently of the truncation.

`cla_adder` is a full look-ahead adder. Each carry is written directly as
an OR of generate terms, each ANDed with the run of propagates above it, and
of `cin` ANDed with all lower propagates. It is not a ripple chain.

## Interface and timing (`fwmbm`)

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1     | clock, rising edge |
| `rst_n` | in  | 1     | synchronous, active-low; clears `p` |
| `x`     | in  | N     | two's-complement operand, Booth recoded |
| `y`     | in  | N     | two's-complement operand, multiplied by the digits |
| `p`     | out | N     | ≈ x·y / 2^N, registered |

The datapath from `x`/`y` to the register is purely combinational. The
register stores the product at each rising edge, so the latency is one
cycle and a new operand pair can be applied every cycle.

| parameter    | default | meaning |
|--------------|---------|---------|
| `N`          | 8       | operand and output width; even, ≥ 6, ≤ 32 |
| `LAMBDA_BAR` | 1       | compensation bit in column N−1 (1 = rounding half-LSB) |

## Accuracy

Take the error as `e = p·2^N − x·y`, measured in output LSBs.

For N = 8 and `LAMBDA_BAR = 1`, over all 65536 operand pairs:

- mean error −0.133 LSB
- mean-square error 0.166 LSB²
- worst case |e| ≤ 1.5 LSB

For comparison, `LAMBDA_BAR = 0` gives a mean of −0.631 and a mean square of
0.548. The testbench checks these sums exactly.

On 20000 random pairs:

| N  | mean error | mean-square error | worst case |
|----|------------|-------------------|------------|
| 16 | −0.12 LSB  | 0.22 LSB²         | 2 LSB      |
| 32 | −0.13 LSB  | 0.34 LSB²         | 4 LSB      |

## Departures and choices

These points are implementation decisions rather than parts of the original
design:

- **Which operand is recoded.** The Booth table of the original recodes `x`
  and scales `y`, and that is followed here. The product is the same either
  way.
- **`λ̄`.** The original matrix shows a `λ̄` bit in the major column but does
  not define it. Here it is a parameter. The default of 1 acts as rounding
  and gives the accuracy figures above.
- **Output register and reset.** These are this implementation's choice:
  one register stage and a synchronous active-low reset. No pipeline is
  specified for the original.
- **Adder widths.** All tree adders are W bits wide. The original quotes
  9-, 12- and 16-bit adders, but those widths belong to its full 16-bit
  product tree.
- **Adder type.** The summation uses carry look-ahead adders throughout.
  This matches the original's description of its compression tree, not the
  carry-save tree plus parallel-prefix adder of its overview block diagram.
- **Sorting network.** The network is not hand-optimised into NAND/NOR/AOI/
  OAI gates. Logic synthesis does the equivalent pruning.
- **The application.** The 2-D DCT that motivates the multiplier is not
  part of this RTL.

## Files

| file | contents |
|------|----------|
| `rtl/fwmbm_pkg.sv` | `booth_digit_t` struct; sign-extension constant and size helper functions |
| `rtl/booth_encoder.sv` | one radix-4 digit: neg/one/two/zero/cor |
| `rtl/pp_generator.sv` | one (N+1)-bit partial-product row |
| `rtl/sc_generator.sv` | sorting-network compensation generator |
| `rtl/cla_adder.sv` | W-bit carry look-ahead adder |
| `rtl/compression_tree.sv` | windowed matrix assembly and CLA tree |
| `rtl/fwmbm.sv` | top level: encoders, rows, SC-generator, tree, output register |
| `tb/fwmbm_ref_pkg.sv` | arithmetic reference model shared by the testbenches |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `fwmbm_wide_tb` |

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. Each has a cycle-count watchdog. The
reference model in `tb/fwmbm_ref_pkg.sv` is written from the arithmetic
(Booth table, row values, bit-by-bit column sums). It does not follow the
RTL structure.

| testbench | what it checks |
|-----------|----------------|
| `booth_encoder_tb` | all 8 groups |
| `pp_generator_tb` | every 8-bit operand × every digit |
| `sc_generator_tb` | every input pattern for 4, 6 and 8 digits |
| `cla_adder_tb` | exhaustive at 9 bits; random plus carry-chain corners at 12 and 16 bits |
| `compression_tree_tb` | exact 16-bit product for all pairs (LO = 0); bit-exact window sums with random compensation inputs at N = 8 and 16 |
| `fwmbm_tb` | default N = 8: reset; all 65536 pairs back to back, bit-exact, one-cycle latency, error bound, exact error sums; counts every digit value, the 111 group, both compensation values and negative results |
| `fwmbm_wide_tb` | N = 16 and N = 32, random plus extreme operands |

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module fwmbm_tb \
    rtl/fwmbm_pkg.sv tb/fwmbm_ref_pkg.sv rtl/*.sv tb/fwmbm_tb.sv
./obj_dir/Vfwmbm_tb
```

Replace `fwmbm_tb` with any other testbench name. Every one finishes in
seconds. The N = 32 part of `fwmbm_wide_tb` takes the longest, at about
15 s.

## Changing it

- **Width.** Set `N`. It must be even and at least 6, so that the
  SC-generator has an output. `sign_ext_const` limits it to 32.
- **Rounding.** Set `LAMBDA_BAR = 0` to remove the rounding half-LSB, or
  change what is fed to `compression_tree.lambda_bar`.
- **More kept columns.** `compression_tree` can be instantiated with a
  smaller `LO` to keep more columns. In that case α_1 is no longer the
  final carry-in and all α bits enter as rows at column N−1. The top level
  assumes `LO = N−1` when it slices the output.
