# CSDA multi-standard transform core

Video codecs of different generations use different block transforms. MPEG-1/2/4
uses the 8-point DCT. H.264 and VC-1 use 8-point and 4-point integer
approximations of it. All of them share the same butterfly structure, so one
datapath can compute every one of them if the constant multiplications are
arranged to share adders.

This RTL is a 2-D forward transform engine built on that idea, called common
sharing distributed arithmetic (CSDA). Each coefficient is a sum of signed powers
of two, its canonical signed digit (CSD) form. Each output is therefore a sum of
shifted *shared words*: sums, differences and simple multiples of the inputs.
These words are computed once and reused by every output and every standard.
There are no multipliers anywhere: only adders, fixed shifts and multiplexers.

The 2-D core takes one row of eight 9-bit samples per clock and returns one line
of eight 14-bit results per clock, with no stalls between blocks.

```
X0..X7 (9 b) ─► 1-D core 1 ─(12 b)─► transpose memory ─(12 b)─► 1-D core 2 ─► Out0..Out7 (14 b)
                 (rows)               64 x 12 bit                 (columns)
```

## Modes

The mode is chosen by two inputs: `Std` (the standard) and `S` (the size).

| `Std` | standard | `S = 0`: one 8-point transform | `S = 1`: two 4-point transforms |
|---|---|---|---|
| 0 | H.264 | c1..c7 = 12, 8, 10, 8, 6, 4, 3 | (c4, c2, c6) = 1, 2, 1 |
| 1 | VC-1  | c1..c7 = 16, 16, 15, 12, 9, 6, 4 | (c4, c2, c6) = 17, 22, 10 |
| 2 | MPEG  | c1..c7 = round(64 cos(kπ/16)) = 63, 59, 53, 45, 36, 24, 12 | even half of the 8-point DCT: 45, 59, 24 |

`Std = 3` behaves as H.264. The 8-point matrix is the usual DCT pattern, with the
scaling factor left out:

```
row 0: c4  c4  c4  c4  c4  c4  c4  c4        row 4: c4 -c4 -c4  c4  c4 -c4 -c4  c4
row 1: c1  c3  c5  c7 -c7 -c5 -c3 -c1        row 5: c5 -c1  c7  c3 -c3 -c7  c1 -c5
row 2: c2  c6 -c6 -c2 -c2 -c6  c6  c2        row 6: c6 -c2  c2 -c6 -c6  c2 -c2  c6
row 3: c3 -c7 -c1 -c5  c5  c1  c7 -c3        row 7: c7 -c5  c3 -c1  c1 -c3  c5 -c7
```

The 4-point matrix is `[c4 c4 c4 c4; c2 c6 -c6 -c2; c4 -c4 -c4 c4; c6 -c2 c2 -c6]`.

In 4-point mode, a row carries two 4-point vectors: x0..x3 and x4..x7. An 8x8
block is then four 4x4 blocks, and the 2-D result is their four 2-D transforms,
in place.

The mode travels down the pipeline with its row. Core 2 uses the mode stored with
each block in the transpose memory. So the mode may change from one block to the
next without flushing the pipeline.

## The 1-D core (`csda_mst_1d`)

```
x ─► SBF ─┬─ a0..a3 ─► CSDA_E (2 stages) ─ DAe0..DAe9 ─┐
          └─ b0..b3 ─► CSDA_O (2 stages) ─ r0..3,b0..3 ─┴─► ECATs ─► permutation ─► T0..T7
```

* **Selected butterfly (`csda_sbf`).** In 8-point mode it forms a_i = x_i + x_(7−i)
  and b_i = x_i − x_(7−i). This splits the 8-point transform into an even
  4-point part (outputs Z0, Z2, Z4, Z6, from a) and an odd part (Z1, Z3, Z5, Z7,
  from b). In 4-point mode it bypasses the butterfly: a = (x0..x3), and
  (b3, b2, b1, b0) = (x4..x7).
* **Even part (`csda_even`).** The even part is itself a 4-point transform. Its
  first stage is a butterfly: A0 = a0 + a3, A1 = a1 + a2, B0 = a0 − a3,
  B1 = a1 − a2. Its second stage forms ten shared words:
  * P = A0 + A1 and Q = A0 − A1;
  * 1.5·P or 1.25·P (MUX-1 adds P>>1 or P>>2), and the same for Q;
  * B0 and B1;
  * M0 and M1, which are B or 1.5·B (MUX-2);
  * M1 − M0 and M0 + M1.

  Then Z0 = c4·P, Z4 = c4·Q, Z2 = c6·(B0 + B1) + (c2 − c6)·B0 and
  Z6 = −c6·(B1 − B0) − (c2 − c6)·B1. Each product is taken from whichever scaled
  word makes the remaining constant smallest. For example, VC-1's c4 = 12 is
  8 × (1.5·P): one shift in the adder tree.
* **Odd part (`csda_odd`).** Stage 1 forms q_n = b_n or 1.5·b_n (MUX-2). Stage 2
  forms r_n = q_n or q_n + b_n/16 (MUX-3). That gives words scaled by 1, 1.5 or
  17/16, next to the plain b_n. A coefficient that is a multiple of the word's
  scale uses the scaled word. Examples: H.264's 12, 6 and 3 become 8, 4 and 2
  times 1.5·b; VC-1's 4-point 17 becomes 16 times (17/16)·b.
* **Adder trees with error compensation (`csda_ecat`).** Each of the eight outputs
  adds the words, each multiplied by a small integer weight. Each weight is built
  from its CSD digits as shifted adds and subtracts. All words carry four
  fractional bits, so the >>1, >>2 and >>4 of the CSDA stages are exact, and the
  tree's sum is exactly 16 times the matrix product. The only rounding is the
  final scaling: half an output LSB is added before the shift (round half up),
  and the result saturates.
* **Permutation (`csda_perm`).** It interleaves (Z0, Z2, Z4, Z6) and (Z1, Z3, Z5, Z7)
  into T0..T7 for 8-point mode. In 4-point mode it outputs the two 4-point results
  one after the other.

All mux selects and tree weights are constants. Package functions
(`csda_pkg`) derive them at elaboration time from the coefficient tables above.
To change a coefficient set, edit `c8` / `c4pt` in `csda_pkg.sv`. The selects,
weights and output shifts then follow by themselves. The trees need weights
below 256 in magnitude.

### Scaling

Core k's output is `round(Σ C[r][n]·x_n / 2^s)`, saturated to its output width.
Here s is the smallest shift for which the largest row sum of |C| times the
largest input magnitude fits the output. The shift depends on the mode:

| mode | core 1 (9 → 12 bit) | core 2 (12 → 14 bit) |
|---|---|---|
| H.264 8-pt | 3 | 4 |
| VC-1 8-pt | 4 | 5 |
| MPEG 8-pt | 6 | 7 |
| H.264 4-pt | 0 | 1 |
| VC-1 4-pt | 4 | 5 |
| MPEG 4-pt | 5 | 6 |

The result is therefore a scaled forward transform. A codec's own normalisation
(quantiser scaling) must still be applied.

## Transpose memory (`csda_tmem`)

The transpose memory is a 64-word array of 12-bit registers, holding one 8x8
block. It can transpose back-to-back blocks with only one array, because each
new block is written into the lines that the previous block is being read from.

Once a block's eighth row is in, its eight columns are read out, one per clock.
Meanwhile the next block's row t goes into column t, in the same clock that
column t is read (read before write). The next block is thus stored
column-wise, so it is read out row-wise, and the orientation alternates from
block to block.

Reading starts right after the last row and advances one line per clock, while
writing is at most one row per clock. So a line is never overwritten before it
has been read. An assertion checks this.

With `SelTX = 0` the memory returns rows in the order written. The orientation
then stays the same, and the 2-D core applies the 1-D transform to rows twice.
`SelTX` and the mode tag are sampled with a block's last row. The top delays
`SelTX` by core 1's latency so that it stays aligned with its row.

## Timing

* One row in and one line out per clock. Input rows may have idle clocks
  between them (`InValid` low).
* 1-D core: two clocks of latency, from the two register stages of CSDA_E and
  CSDA_O. The butterfly, the adder trees and the permutation are combinational.
* Transpose memory: line 0 leaves two clocks after the block's last row, then one
  line per clock.
* 2-D core: line t of a block leaves 6 + t clocks after the block's last row. With
  consecutive rows, that is 13 + t clocks after its first row. Output line t is
  column t of the 2-D result (row t when `SelTX = 0`).
* Reset is synchronous and active high. It clears the pipelines and the memory's
  counters, but not the array.

At 8 samples per clock, a 4928 × 2048 frame at 24 Hz (242 Msample/s) needs a
clock of about 30 MHz. 1.28 Gsample/s needs 160 MHz.

## Where this RTL departs from the published CSDA-MST architecture

* **Coefficients.** The published architecture's CSD coefficient tables (chosen by a
  search with at most five nonzero digits) are not reproduced here. The
  coefficient sets are the standards' own integer transforms, plus a 6-bit DCT
  approximation for MPEG. The shared words are chosen to fit those sets.
* **Odd part, second stage.** Only the q/r words and their multiplexers are built.
  The original also has cross adders and a fourth multiplexer level. Here, those
  sums are formed inside the adder trees.
* **Adder trees.** One tree is built per mode and the mode selects among them.
  The original shares tree adders across standards, so this version is
  functionally the same but larger.
* **Error compensation.** The original truncates words inside the datapath and
  compensates in the trees. Here the words are kept exact, and the trees round
  once at the end.
* **Transpose memory latency.** The original memory has a latency of 52 cycles
  under its own scheduling. This memory returns a block two clocks after its
  last row.
* **Interface.** `Std`, `InValid` and `OutValid` are additions. The original core
  has only `S` and `SelTX` as controls. The meaning given to `SelTX` (transpose
  or not) is this design's reading of it.

## Files

| file | contents |
|---|---|
| `rtl/csda_pkg.sv` | mode types, coefficient tables, derived selects, weights and shifts |
| `rtl/csda_sbf.sv`, `csda_even.sv`, `csda_odd.sv`, `csda_ecat.sv`, `csda_perm.sv` | 1-D datapath blocks |
| `rtl/csda_mst_1d.sv` | 1-D core |
| `rtl/csda_tmem.sv` | transpose memory |
| `rtl/csda_mst_2d.sv` | 2-D top |
| `tb/tb_*.sv` | one self-checking testbench per block |
| `tb/csda_ref_pkg.sv` | reference model: full matrices, direct products, rounding |
| `tb/csda_words_pkg.sv` | expected shared words of the CSDA stages |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. For
example, for the 2-D core:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csda_pkg.sv tb/tb_csda_mst_2d.sv \
          --top-module tb_csda_mst_2d -Mdir obj_2d
./obj_2d/Vtb_csda_mst_2d
```

Replace the testbench name to run another block's test. Each run takes well under
a second.

The 2-D test runs the top at its default sizes. It covers:

* 240 blocks with random and extreme samples;
* all six modes, and mode changes between consecutive blocks;
* both `SelTX` values;
* back-to-back blocks and blocks with idle clocks.

The reference model is written independently of the datapath: full matrices and
direct products. Every output value is checked against it, and so is the clock
it appears on.

`tb_cinema_frame` streams a whole 4928 × 2048 frame, about 1.26 million rows,
through the top with no idle clocks. The mode changes from one band of 8 lines
to the next. The test checks all 10 million results, and checks that the frame
leaves in exactly rows + 13 clocks. It runs in about 15 seconds.

The 1-D, adder-tree, transpose-memory and stage testbenches check their blocks
the same way, including their latencies.
