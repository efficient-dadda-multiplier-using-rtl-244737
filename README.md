# Approximate Dadda multiplier with error correction, for alpha blending

An unsigned 8x8 multiplier that trades a little accuracy for a smaller and
shorter partial-product tree. It is a Dadda multiplier built from 4:2
compressors. In the low-order columns it uses an approximate 4:2 compressor,
which has no carry chain and is exact for 12 of its 16 input patterns. A few
AND gates watch the compressors at the top of that approximate region. When
those compressors see their worst pattern, the gates push a correction bit
into the exact part of the tree. Two of these multipliers form a pixel
datapath for alpha blending: a weighted mix of two 8-bit grayscale images.
That kind of workload tolerates small arithmetic errors.

```
 alpha ─┬──────────────► approx_dadda_mult ── alpha*F ──┐
 F ─────┼──────────────►                                 ├─► + ─► round(/255) ─► clip ─► reg ─► pix
        └─ 255-alpha ──► approx_dadda_mult ── (255-a)*B ─┘
 B ─────────────────────►
```

## The approximate 4:2 compressor (`approx_compressor_42`)

A 4:2 compressor takes four bits of the same weight. An exact one also takes
a carry-in and gives a sum, a carry and a carry-out. The approximate one drops
the carry-in and the carry-out:

| Q1 Q2 Q3 Q4 | Carry Sum | value | exact | error |
|---|---|---|---|---|
| 0000 | 00 | 0 | 0 | 0 |
| 0001, 0010 | 01 | 1 | 1 | 0 |
| 0011 | 01 | 1 | 2 | -1 |
| 0100, 1000 | 10 | 2 | 1 | +1 |
| 0101, 0110, 1001, 1010, 1100 | 10 | 2 | 2 | 0 |
| 0111, 1011, 1101, 1110 | 11 | 3 | 3 | 0 |
| 1111 | 11 | 3 | 4 | -1 |

In logic: `Carry = Q1 | Q2` and `Sum = (Q1 ^ Q2) ? (Q3 & Q4) : (Q3 | Q4)`.
The two patterns that read low (0011 and 1111) are exactly those with
Q3 = Q4 = 1. That is what the error-correction gate detects.

## The reduction tree (`approx_dadda_mult`, `dadda_plan_pkg`)

The multiplier runs in three phases:

1. **Partial products.** N*N AND gates make `a[i] & b[j]` in column `i+j`.
2. **Reduction.** Level by level, the column heights are brought down to a
   target. The targets halve each level (8 → 4 → 2 for N = 8; 16 → 8 → 4 → 2
   for N = 16). Each level walks the columns from LSB to MSB. In each column
   it places the smallest cell that still meets the target:
   - a 4:2 compressor when 3 or more bits are too many,
   - a full adder when 2 are too many,
   - a half adder when 1 is too many.

   Compressors in the `NA` lowest columns are approximate. The others are
   exact (two full adders). An exact compressor's carry-out feeds the carry-in
   of an exact compressor one column up in the same level. Carry-outs that
   no compressor takes, and unused bits, pass on to the next level.
3. **Final accumulation.** The two remaining rows are added by a
   ripple-carry adder (`final_adder`). The product is taken modulo 2^(2N).

The tree is not written out by hand. `dadda_plan_pkg::plan_query()` is a
constant function that runs the placement rule above at elaboration time and
returns, cell by cell, the cell's kind and the numbers of its input and output
nodes. `approx_dadda_mult` then makes one `generate` branch per cell, wired
through a node array. Node numbering is as follows:
- `i*N+j` is a partial product;
- `N*N` is constant 1;
- `N*N+1` is constant 0;
- cell outputs are numbered from `N*N+2` on.

So `N`, `NA`, `ECM` and `CORR` can be changed without editing any wiring.
For the default build (N = 8, NA = 8, ECM = 1) the tree holds:

| level | approximate 4:2 | exact 4:2 | full adders | half adders | correction ANDs |
|---|---|---|---|---|---|
| 1 (8 → 4) | 4 | 4 | 2 | 2 | 2 |
| 2 (4 → 2) | 5 | 5 | 1 | 1 | 1 |

### Error correction (`error_correction_module`, parameter `ECM`)

Each approximate compressor in column `NA-1` (the most significant column of
the approximate region) gets one AND gate, `err = Q3 & Q4`. The gate's output
is added to the carry-in candidates of column `NA` in the same level. There
it drives the otherwise unused carry-in of an exact compressor. With N = 8
and NA = 8 that gives two gates in the first level and one in the second.
`NA = 8` is the default for this reason.

The correction bit lands one column above the compressor it watches, so it
adds twice the weight of the unit that compressor missed. With this
compressor the net error is positive on average: 0100 and 1000 are far more
common than 0011 and 1111 when partial-product bits are 1 with probability
1/4. So in this build the correction **increases** the error slightly. Over
all 65,536 operand pairs:

| NA | ECM | wrong products | mean relative error | mean error | NMED |
|---|---|---|---|---|---|
| 4 | 0 | 25.00 % | 0.110 % | +1.4 | 0.0031 % |
| 4 | 1 | 27.34 % | 0.119 % | +2.4 | 0.0037 % |
| 6 | 0 | 64.45 % | 0.893 % | +14.5 | 0.029 % |
| 6 | 1 | 67.65 % | 0.968 % | +22.5 | 0.036 % |
| 8 | 0 | 87.02 % | 4.574 % | +102.1 | 0.207 % |
| 8 (default) | 1 | 88.34 % | 4.789 % | +156.7 | 0.247 % |
| 0 | any | 0 | 0 | 0 | 0 |

NMED is the mean absolute error divided by 255². `tb_mult_error_sweep`
computes this table and checks it against the reference model.

The correction is kept because it is part of the architecture this RTL
follows. Set `ECM = 0` to remove it, or lower `NA` to shrink the approximate
region. The original description of
this multiplier reports that the correction lowers its error measure (36.30 %
to 28.69 %). This implementation does not reproduce that result: the
placement of the correction bit, the column assignment of Q1..Q4 and the
exact tree layout behind it are not known.

### Constant correction (parameter `CORR`)

The set bits of `CORR` are added to the partial-product heap as constant
ones. A negative constant is written in two's complement. The default is 0.
Because the product is unsigned and wraps modulo 2^16, a negative constant
that centres the mean error makes small products wrap around to huge values.
It is therefore useful only together with saturation logic, which is not
built.

## Alpha blending datapath (`alpha_blend`, the top)

`pix = round((alpha*F + (255-alpha)*B) / 255)`, with alpha coded 0..255 for
0..1. The division uses no divider: `y = x + 128`, `pix = (y + (y >> 8)) >> 8`.
This is exactly the rounded quotient for every sum an exact multiplier can
produce (checked for all 0 ≤ x ≤ 65025). The approximate products can read
high, so the result is clipped to 255 and `sat_o` marks that.

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| in_valid, alpha, fg, bg | in | 1, 8, 8, 8 | one pixel pair and its alpha |
| out_valid, pix | out | 1, 8 | blended pixel, 1 clock after the input |
| sat_o | out | 1 | pixel was clipped to 255 |
| ecm_o | out | 1 | a correction gate fired in either multiplier (observation only) |

Throughput is one pixel per clock, with no stalls. A 256x256 image takes
65,536 cycles. No frame storage is needed, since pixels stream through.
Parameters: `NA` (default 8) and `ECM` (default 1), passed to both
multipliers.

## How far it can be trusted

- Every block has a self-checking testbench in `tb/`. Each testbench was also
  run against a deliberately broken copy of its block, and each one failed
  there.
- The approximate multiplier is compared bit for bit with a separate
  bit-level reference model of the same tree. There are 640 pairs for 8x8,
  with and without correction, and 480 pairs for 16x16. The precomputed
  results are in `tb/approx_mult_vectors.hex` and
  `tb/approx_mult16_vectors.hex`. Each line holds the operands, then the
  products, then the correction flag, in hex.
- With `NA = 0`, all 65,536 8x8 products are exact.
- `tb_alpha_blend` blends two 256x256 images at five alpha values, with idle
  cycles between pixels:
  - an exact instance is checked against the formula;
  - the approximate instance is checked against a blend of its own products;
  - the latency is checked;
  - it checks that correction, clipping, idle cycles and reset each occur.

  Against exact multipliers, the blended images have an MSE of 1.5 and a
  PSNR of 46.3 dB.
- `tb_alpha_blend_full` runs a single instance of the top with no parameter
  changed. It blends one full 256x256 image at alpha = 77 and short passes at
  alpha = 0 and 255. Against exact arithmetic this gives an MSE of 2.4 and a
  PSNR of 44.4 dB.
- The 8x8 products shown as examples for the original circuit
  (76 x 34 → 3120, and → 5168 with correction; 36 x 42 → 1576) are not
  reproduced. This design gives 2712 and 1544. Those numbers depend on a
  tree layout that is not specified.
- No timing or area figures are claimed. The tree is combinational, and the
  critical path runs through two compressor levels and a 16-bit ripple
  adder.

## Choices made here, not taken from the original description

- The cell placement rule and the Q1..Q4 order of each compressor. The
  original shows two 4:2 stages for 8x8 but not a bit-exact layout.
- `NA = 8`, and the correction bit driving the carry-in of column `NA`.
- Exact half and full adders, also inside the approximate region.
- `CORR = 0`.
- The whole blending datapath: alpha encoding, rounding, clipping, output
  register, valid signal and reset. The original runs the blending in
  software around the multiplier.
- The 16-bit size is reached through `N = 16`. The default build is 8-bit.

## Files and simulation

`rtl/`:
- `dadda_plan_pkg.sv`: the tree planner.
- `approx_dadda_mult.sv`
- `approx_compressor_42.sv`
- `exact_compressor_42.sv`
- `error_correction_module.sv`
- `final_adder.sv`
- `full_adder.sv`
- `half_adder.sv`
- `alpha_blend.sv`: the top.

`tb/` holds one `tb_<block>.sv` per block, plus `tb_approx_dadda_mult16.sv`,
`tb_alpha_blend_full.sv`, `tb_mult_error_sweep.sv` and the two vector files.

Run from the directory that holds `rtl/` and `tb/`. The vector files are read
by paths relative to it.

```
verilator --binary -j 0 -Irtl -Itb --top-module tb_alpha_blend rtl/dadda_plan_pkg.sv tb/tb_alpha_blend.sv
./obj_dir/Vtb_alpha_blend
```

Swap in any other testbench name the same way. Each prints
`TB_RESULT checks=<n> failures=<m>`. Elaboration runs the planner once per
cell:
- 8x8 builds take a few seconds;
- the 16x16 build takes a little over a minute.
