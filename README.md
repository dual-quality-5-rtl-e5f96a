# Dual-quality 5:2 compressor multiplier

A parallel multiplier spends most of its logic and delay in reducing the
partial products. This design builds that reduction from 5:2 compressors that
have two qualities. A single control input, `exact`, chooses the quality at
run time, and it can change on any clock cycle:

- **exact mode:** every compressor is a correct 5:2 compressor and the
  product is `a * b`.
- **approximate mode:** the compressors in the low-order columns use a short
  approximate circuit, and no carry passes between those columns. The
  product then comes out slightly too small, never too large.

The default build is an 8 × 8 unsigned multiplier with a registered 16-bit
product. The operand width is a parameter; 16 × 16 and 32 × 32 are tested.

## The dual-quality 5:2 compressor

A 5:2 compressor handles one column of the partial-product matrix. It takes
five data bits `x1..x5` from its column and two carries, `cin1` and `cin2`,
from the compressor one column lower. It produces:

- `sum`, which stays in the column;
- `carry`, a weight-2 bit for the next reduction level;
- `cout1` and `cout2`, weight-2 bits that feed `cin1` and `cin2` of the
  neighbouring compressor in the same level.

In exact mode it obeys

    x1 + x2 + x3 + x4 + x5 + cin1 + cin2 = sum + 2·(carry + cout1 + cout2)

It is built from three full adders in a chain:

| adder | inputs              | outputs                      |
|-------|---------------------|------------------------------|
| FA1   | x1, x2, x3          | s1, cout1                    |
| FA2   | s1, x4, cin1        | s2, cout2                    |
| FA3   | s2, x5, cin2        | sum, carry                   |

`cout1` depends only on the column's own data bits. `cout2` depends on
`cin1`, and `cin1` comes from the neighbour's FA1. So the carries travel only
one column sideways; there is no long ripple path.

The cell has two parts (`dq_compressor_5_2.sv`):

- **Approximate part** (`dq52_approx_part.sv`). It contains FA1, which both
  modes use, and a few extra gates:

      sum_a   = s1 | (x4 ^ x5) | (cin1 ^ cin2)
      carry_a = c1 | (x4 & x5) | (cin1 & cin2)

  where `c1` is FA1's carry. In approximate mode `sum`/`carry` are
  `sum_a`/`carry_a`, and `cout1 = cout2 = 0`. The value `sum_a + 2·carry_a`
  never exceeds the true count of ones. Inside the multiplier the carry
  inputs of approximate columns are always 0. Of the 32 patterns of five
  data bits, 12 then come out wrong, by 1 or 2, with a mean error of 0.5.
- **Supplementary part** (`dq52_supp_part.sv`). It contains FA2 and FA3 and
  completes the exact result from FA1's `s1`.

In silicon, the part a mode does not use would be power-gated, and a
tri-state buffer would disconnect the approximate outputs in exact mode. In
this RTL:

- The unused part's inputs are ANDed with the mode bit, so it sees constant
  zeros and does not toggle. This is operand isolation, the logical
  equivalent of cutting its supply.
- The output disconnect is a 2:1 multiplexer.

Supply switches are transistor-level structures, so they are not modelled.

## Reducing the partial products

`pp_gen` forms N partial-product rows with AND gates. Row i is `a & b[i]`,
shifted left by i and held as a 2N-bit vector. `dq_reduction_tree` then
reduces the rows in levels:

- A level takes its rows five at a time.
- Each group of five goes through `comp52_row`, a row of 2N compressors with
  the `cout`→`cin` links between neighbouring columns. The group comes out
  as a sum row and a carry row, the carry row shifted left by one.
- Rows left over pass to the next level unchanged, so they are compressed as
  late as possible, in the Dadda manner.
- When three to five rows remain, they form one group, padded with zero rows.
- Reduction stops at two rows. `final_adder` adds those two rows, and the
  result is registered.

The schedule is computed at elaboration time (`dq_mult_pkg.sv`):

| N  | rows per level        | compressor levels |
|----|-----------------------|-------------------|
| 8  | 8 → 5 → 2             | 2                 |
| 16 | 16 → 7 → 4 → 2        | 3                 |
| 32 | 32 → 14 → 8 → 5 → 2   | 4                 |

Every row is a full 2N bits wide. Compressors whose inputs are constant zero
(outside the triangle of partial products) are left for synthesis to remove.

Carries out of the top column are dropped, so each level keeps the sum of its
rows modulo 2^2N. Because an N × N product fits in 2N bits, nothing is lost.

The parameter `APPROX_COLS` limits approximation to columns 0 .. APPROX_COLS−1.
Its default is N, the lower half of the product; the upper columns are always
exact. Since an approximate column sends no `cout`, the first exact column
receives `cin1 = cin2 = 0`.

## Multiplier interface and timing

`dq_dadda_multiplier #(N = 8, APPROX_COLS = N)`:

| port    | dir | width | meaning                                              |
|---------|-----|-------|------------------------------------------------------|
| `clk`   | in  | 1     | clock                                                |
| `rst_n` | in  | 1     | asynchronous active-low reset; clears `p`            |
| `exact` | in  | 1     | 1: exact product; 0: approximate product             |
| `a`     | in  | N     | multiplicand, unsigned                               |
| `b`     | in  | N     | multiplier, unsigned                                 |
| `p`     | out | 2N    | product, registered                                  |

The whole datapath, from partial products to the final adder, is
combinational. `a`, `b` and `exact` present at a rising edge of `clk`
determine `p` right after that edge. The multiplier takes one operation per
cycle with a latency of one cycle, and `exact` may change from one operation
to the next.

## Accuracy of the approximate mode

These figures are for the default 8 × 8 build with approximation in columns
0–7, over all 65,536 operand pairs:

- error rate: 61.2 % of products differ from `a * b`;
- mean error distance: 84;
- mean relative error: 1.1 %;
- largest error: 808;
- the approximate product is never larger than `a * b`.

Wider builds with `APPROX_COLS = N` have far smaller relative errors, because
only the lower half of the product is affected:

- 16 × 16: about 4.5·10⁻⁴ on random operands;
- 32 × 32: about 3·10⁻⁸ on random operands.

Image multiplication was tested with two synthetic 128 × 128 8-bit images,
keeping the upper byte of each product. In approximate mode the result
differs from the exact image in 40 % of pixels, at a PSNR of about 51 dB.

## What follows the original description, and what is this design's own

The following come from the original description:

- the three-full-adder structure of the exact compressor and its port names;
- the split into a shared approximate part and a supplementary part that is
  switched off in approximate mode;
- run-time mode switching;
- AND-gate partial products;
- reduction of the partial products to two rows with 5:2 compressors;
- the 8 × 8 unsigned default.

The following are choices made for this implementation:

- **Approximate equations.** The original gives no logic for the approximate
  part. The equations above are new. They were picked so that the
  approximate part reuses FA1, cuts all sideways carries, and only
  under-estimates. They also match the one approximate-mode input/output
  vector known from a simulation of the original circuit.
- **Which columns approximate.** `APPROX_COLS = N`; the original does not say.
- **Reduction schedule.** Rows are grouped five at a time, as described
  above. The original shows a four-stage dot-diagram reduction for the 8 × 8
  case. With rows of 5:2 compressors, eight rows need only two levels. A
  bit-exact copy of that diagram's grouping is not attempted.
- **Final adder.** The final adder is a plain `+`, so synthesis chooses its
  architecture. The original mentions carry look-ahead adders for ordinary
  Dadda multipliers and is vague about the last stage.
- **Power gating and tri-state outputs.** They are modelled as operand
  isolation and a multiplexer.
- **Ports.** `p` is registered, and there are `rst_n` and `exact` pins. The
  original FPGA build had 33 pins: 8 + 8 + 16 data pins and a clock.
- **Not included.** An exact 4:2 compressor and a dual-quality 4:2
  compressor appear only as background and as the comparison point, so they
  are not part of this RTL.

## Files

| file                         | contents                                           |
|------------------------------|----------------------------------------------------|
| `rtl/full_adder.sv`          | full adder                                         |
| `rtl/dq52_approx_part.sv`    | approximate part (shared FA1 + approximate gates)  |
| `rtl/dq52_supp_part.sv`      | supplementary part (FA2, FA3)                      |
| `rtl/dq_compressor_5_2.sv`   | dual-quality 5:2 compressor                        |
| `rtl/comp52_row.sv`          | one row of compressors with sideways carries       |
| `rtl/dq_mult_pkg.sv`         | reduction schedule functions                       |
| `rtl/dq_reduction_tree.sv`   | N rows → 2 rows                                    |
| `rtl/pp_gen.sv`              | partial-product generation                         |
| `rtl/final_adder.sv`         | carry-propagate adder                              |
| `rtl/dq_dadda_multiplier.sv` | top: the registered multiplier                     |
| `tb/dq_ref_pkg.sv`           | integer reference models of the compressor and multiplier |
| `tb/tb_*.sv`                 | one self-checking testbench per module, plus the workload tests |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends a run that hangs. Build and run one testbench with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/dq_mult_pkg.sv tb/dq_ref_pkg.sv tb/tb_dq_dadda_multiplier.sv \
        --top-module tb_dq_dadda_multiplier
    ./obj_dir/Vtb_dq_dadda_multiplier

The packages must be listed ahead of the files that import them. Other
testbenches run the same way.

| testbench                 | what it covers                                                 |
|---------------------------|----------------------------------------------------------------|
| `tb_dq_dadda_multiplier`  | default 8 × 8 build, all operand pairs in both modes, mode toggled every cycle, reset, latency and throughput; counts each mechanism |
| `tb_dq_mult_widths`       | 16 × 16 and 32 × 32 builds, random operands, both modes        |
| `tb_dq_image_mult`        | pixel-wise multiplication of two synthetic images, PSNR        |
| `tb_dq_reduction_tree`    | all operand pairs through the tree alone                       |
| `tb_comp52_row`           | compressor row against the column model and the sum law        |
| `tb_dq_compressor_5_2` and below | exhaustive tests of each cell                           |

Lint (`verilator --lint-only -Wall`) reports unused bits in `comp52_row`:
these are the carries out of the top column, which are dropped as explained
above.

## How far to trust it

- **Exact mode:** verified exhaustively for 8 × 8 and on random operands for
  16 × 16 and 32 × 32.
- **Approximate mode:** verified against an independent integer model of the
  same scheme. That model confirms the RTL does what is described here. It
  cannot confirm that the approximate circuit equals the original's, whose
  logic is not published.
- **Not measured:** power, area and delay.
