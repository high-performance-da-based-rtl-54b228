# Multiplier-free DCT, Haar wavelet and Hartley transform cores

Image and video codecs spend much of their arithmetic on small fixed
transforms. JPEG uses the 8x8 DCT, JPEG2000 a wavelet transform, and some
schemes use the Hartley transform (DHT). Each one multiplies a short vector
by a constant matrix. This RTL computes these products with **distributed
arithmetic (DA)**, so it needs no multipliers:

1. Each constant coefficient is written in binary.
2. For every bit position, the inputs whose coefficient has a 1 there are
   added. This gives one *partial-sum word* per bit.
3. The words are added with their binary weights 1, 1/2, 1/4, ….

Step 3 is a single-cycle *optimized adder tree* (OAT). It keeps only the
integer part of the result, but it puts back, on average, the carry that
the dropped fraction bits would have produced. Without that correction the
result is always rounded down.

The design follows the paper *"High performance DA-based DCT, DWT and DHT"*
by K. Satya Sujith and M. Lavanya Latha. It has three independent cores that
share two building blocks:

| core | transform | input | output | rate | latency |
|---|---|---|---|---|---|
| `dct2d` | 8x8 2-D DCT, row-column, built on two `dct1d` | one row of 8 × 9-bit per clock | one column of 8 × 17-bit per clock | 8 samples/clock | 5 clocks from the last row to the first column |
| `haar_dwt8` | 8-point Haar transform (full 3-level H8 matrix) | 8 × 9-bit | 8 × 13-bit | 8 samples/clock | 2 clocks |
| `dht8` | 8-point discrete Hartley transform | 8 × 9-bit | 8 × 13-bit | 8 samples/clock | 2 clocks |

`da_transform_top` places the three cores side by side. Each core has its
own ports, and they share only the clock and reset.

## Distributed arithmetic in this design

Consider the inner product `Z = Σ c_i·u_i` with constant coefficients `c_i`.
Each `c_i` is a Q-bit two's-complement number. For the DCT and DWT, Q = 9 and
the bit weights are `-2^0, 2^-1, …, 2^-8`. Bit `j` of all coefficients
defines the word

    y_j = Σ { u_i : bit j of c_i is 1 }          (j = 0 is the sign bit)

and the result is `Z = -y_0 + Σ_{j≥1} y_j·2^-j`.

`da_pe` builds these words. It forms all 2^N sums of its N inputs once, in a
small adder network. Each word is then a fixed choice from that set, so the
selection is only wiring. Synthesis removes any sum that no coefficient
uses. For the DCT's even pairs the only sum ever needed is `u0 + u1`, so that
element costs a single adder.

All constants live in `rtl/da_pkg.sv`:

| constant | code | value | format |
|---|---|---|---|
| DCT `C_k = cos(kπ/16)` | `round(256·C_k)`: 251, 237, 213, 181, 142, 98, 50 | ±0.5/256 | 9 bits, weights -1, 2^-1…2^-8 |
| Haar `1/√8` | 90 = 0.01011010b | 0.3516 (exact 0.3536) | 9 bits |
| Haar `1/2`, `1/√2` | 128, 181 = 0.10110101b | 0.5, 0.7070 | 9 bits |
| DHT `1`, `√2` | 128, 181 = 1.0110101b | 1, 1.4141 | 9 bits, weights -2, 1, 2^-1…2^-7 |

The Haar value for `1/√8` is the truncated bit pattern the paper lists. The
rounded value, 91, would be slightly more accurate (see *Accuracy*).

## The optimized adder tree (`oat`)

This block needs the most care. It adds Q words of P bits, where word `j`
has weight `2^(E-j)`:

- For the DCT and DWT, E = 0.
- For the DHT, E = 1, because its coefficients reach ±√2 and need an
  integer bit.

Word 0 is subtracted. Written out in full, the sum spans P + Q − 1 columns.
The columns split into two parts:

- **Main part (MP):** the integer columns. These are kept and form the
  output `z` (OUT_W bits, same scale as the inputs).
- **Truncation part (TP):** the FRAC fraction columns below the MP. These
  are not output.

If the TP is simply dropped, its carries never reach the MP. The output is
then the floor of the true value, an average error of about −0.5 LSB or
worse. The tree avoids this in two ways:

1. The **KEEP = 2** most significant TP columns are added exactly. In RTL,
   each word is arithmetically shifted so that its bits below `2^-KEEP`
   fall away.
2. The remaining TP columns are replaced by a **constant**: the expected
   value of their bits, with each bit equal to 1 half of the time, plus half
   an LSB so the final truncation rounds to nearest. Column `c` (weight
   `2^-c`) holds `FRAC+1-c` bits, so the constant, in units of `2^-KEEP`, is

       COMP = round( (1/2 + Σ_{c=KEEP+1..FRAC} (FRAC+1-c)·2^-(c+1)) · 2^KEEP )

   The function `comp_const()` computes it during elaboration.

The output is `(Σ shifted words + COMP) >>> KEEP`. In RTL the tree is a
plain sum, so synthesis picks the compressor structure.

For the (P, Q) = (12, 6) example size on random words, the mean absolute
error is about 0.27 LSB with the compensated tree and 0.48 LSB with plain
truncation (`tb_oat` prints both). For Q = 9, any single result is within
(−1, +1.25] LSB of the exact sum of its words.

A side effect is worth knowing: when every word is zero, the output is
`COMP >> KEEP`, not zero. For Q = 9 this is 1. For example, the odd DCT
outputs of a flat input vector come out as 1, not 0. This is the price of
an unbiased average error, and the reference models in `tb/` reproduce it.

## 1-D DCT (`dct1d`, `dct_butterfly_matrix`, `dct_dae`, `dct_dao`)

`dct1d` computes `Z_n = k_n·Σ x_m·cos((2m+1)nπ/16)`, with `k_0 = 1/√2` and
`k_n = 1` otherwise. This is the DCT without its overall factor 1/2, i.e.
twice the orthonormal DCT. The **DA butterfly matrix** holds 12
adder/subtractors, two DA even elements and one DA odd element:

    a_m = x_m + x_(7-m),  b_m = x_m - x_(7-m)              m = 0..3
    A0 = a0 + a3,  A1 = a1 + a2,  B0 = a0 - a3,  B1 = a1 - a2
    DAE (C4, C4):  Z0 = C4·A0 + C4·A1,   Z4 = C4·A0 - C4·A1
    DAE (C2, C6):  Z2 = C2·B0 + C6·B1,   Z6 = C6·B0 - C2·B1
    DAO:  [Z1 Z3 Z5 Z7] = [[C1 C3 C5 C7],[C3 -C7 -C1 -C5],
                           [C5 -C1 C7 C3],[C7 -C5 C3 -C1]] · [b0 b1 b2 b3]

Widths for 9-bit inputs are as follows: `a`/`b` are 10 bits, `A`/`B` are 11
bits, and the DA words are P = 12 bits. The matrix's words go into a
register. Eight OATs, one per output, then finish all outputs in the next
clock, and their results are registered. A vector enters every clock and
leaves 2 clocks later. A shift-and-add DA design would need Q = 9 clocks per
vector instead.

## 2-D DCT (`dct2d`, `transpose_buffer`)

A row `dct1d` feeds `transpose_buffer`, which feeds a column `dct1d`. The
transpose buffer has two banks of 8x8 words:

- The 8 rows of a block are written into one bank.
- The block's 8 columns are read out on the next 8 clocks.
- Meanwhile, the next block fills the other bank.

So blocks can follow each other with no gap. An assertion checks that a
block never completes while its predecessor still has columns to read. This
cannot happen at one row per clock.

Word widths and output order:

- The row core's 13-bit outputs go to the column core without rounding.
- The column core uses 16-bit words and gives 17-bit results.
- The output is 4× the orthonormal 2-D DCT.
- Output vector `c` of a block holds coefficients `(u = 0..7, c)`: `u` is
  the vertical frequency and `c` the horizontal one.
- `out_last` marks the 8th column.

## Haar DWT (`haar_dwt8`)

This core computes `Z = H8·x`, with `H8` the orthonormal 8-point Haar
matrix. An adder stage forms:

- the pair sums `p_k = x(2k) + x(2k+1)` and the differences `d_k`;
- `p0 + p1 ± (p2 + p3)`;
- `p0 − p1` and `p2 − p3`.

Each output is one of these terms times one constant: `1/√8` for Z0 and Z1,
`1/2` for Z2 and Z3, and `1/√2` for Z4 to Z7. DA words and an OAT apply the
constant. The pipeline is the same as in `dct1d`.

## DHT (`dht8`)

This core computes `Y(k) = Σ x(n)·cas(2πnk/8)`, unscaled, where cas = cos + sin.

1. An ALU stage forms `e_n = x(n) + x(n+4)` and `f_n = x(n) − x(n+4)`. This
   gives 8 add/subtract results from 4 input pairs.
2. The even outputs are ±1 combinations of `e`:
   `Y0 = e0+e1+e2+e3`, `Y2 = e0+e1−e2−e3`, `Y4 = e0−e1+e2−e3`,
   `Y6 = e0−e1−e2+e3`.
3. The odd outputs use `f` and √2:
   `Y1 = f0 + √2·f1 + f2`, `Y3 = f0 − f2 + √2·f3`,
   `Y5 = f0 − √2·f1 + f2`, `Y7 = f0 − f2 − √2·f3`.

Two 4-input `da_pe`s and eight OATs with Q = 9 and FRAC = 7 finish the job.

## Interface and timing

Every core is fully pipelined and has no handshake back-pressure:

- `in_valid` marks a clock whose `x` is to be transformed.
- `out_valid` marks the matching result, a fixed number of clocks later.
- Idle clocks are allowed anywhere.
- `rst_n` is a synchronous, active-low reset. It clears only the valid
  flags and the transpose counters. Datapath registers are not reset,
  because they are only read when valid.
- All data is signed two's complement. Inputs are 9 bits, so 8-bit pixels
  can be fed either unsigned, as 0..255, or level-shifted.

## Accuracy

Errors against the exact real-valued transforms, from the testbenches:

| core | largest error seen, random 9-bit inputs | 256x256 test image: reconstruction MSE / largest pixel error |
|---|---|---|
| 1-D DCT | 2.4 | — |
| 2-D DCT | 8 (at 4× scale) | 0.07 / 2 |
| Haar DWT | 5.1 (from the truncated 1/√8 = 90/256) | 0.83 / 3 |
| DHT | 1.06 | 0.14 / 1 |

The reconstruction applies the exact inverse transform to the core's integer
outputs and rounds the result.

The paper also gives reconstruction errors for a 256x256 image: DCT 240,
DWT 82.92, DHT 25.68. It does not define the measure or the image, so those
numbers cannot be compared with the ones above.

## Where this RTL departs from, or adds to, the paper

- **OAT internals.** The paper splits the tree into a main part and a
  truncation part and compensates the truncation error, for the example
  size (P, Q) = (12, 6). The gate-level compensation circuit here is this
  design's own: KEEP exact columns plus an expected-value constant.
- **DA sum sharing.** The paper builds the DCT's odd words from 9 shared
  adders. Here the sums come from `da_pe`'s subset table, and synthesis
  keeps only the sums that are used. With the constants above, the odd
  words use 10 distinct sums of two or more inputs (all 6 pairs and 4
  triples of b0..b3). The paper counts 9 adders for this part.
- **DHT intermediate sums.** The paper names its DHT intermediate sums
  R1…R10 and its ALU1…ALU4 add/subtract pattern. The ALU pattern is
  implemented as described. The R sums themselves are not built as named
  signals; the subset table supplies the same sums.
- **2-D DCT.** The paper presents an 8x8 2-D DCT but details only the 1-D
  core. The row-column arrangement, transpose buffer, widths and output
  order are this design's choices.
- **Word widths and pipeline.** The paper states 9-bit inputs, 13-bit
  outputs, Q = 9 and P = 12. The rest is assumed: the DHT's widths, the
  pipeline registers (one after the butterfly/DA stage, one after the
  trees), reset and the valid signalling.
- **FPGA results.** The paper's slice counts and 380/389/571 Msample/s
  rates are for a Virtex-II Pro. They were not reproduced. At 8 samples per
  clock those rates need 47.5, 48.6 and 71.4 MHz.

## Files

`rtl/`:

- `da_pkg.sv`: coefficient constants and the OAT column count.
- `da_pe.sv`: DA word generator.
- `oat.sv`: optimized adder tree.
- `dct_dae.sv`, `dct_dao.sv`, `dct_butterfly_matrix.sv`, `dct1d.sv`: 1-D DCT.
- `transpose_buffer.sv`, `dct2d.sv`: 2-D DCT.
- `haar_dwt8.sv`: Haar DWT core.
- `dht8.sv`: DHT core.
- `da_transform_top.sv`: the three cores side by side.

`tb/`:

- `tb_da_pkg.sv` holds bit-level reference models and exact real-valued
  transforms.
- There is one self-checking testbench per module, named `tb_<module>.sv`.
- `tb_da_transform_top.sv` drives all three cores at once and counts the
  back-to-back blocks, idle clocks and compensated carries.
- `tb_image_workload.sv` streams a generated 256x256 image through all three
  cores.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

To simulate with Verilator 5, run from the folder that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/da_pkg.sv tb/tb_da_pkg.sv tb/tb_dct1d.sv --top-module tb_dct1d
    ./obj_dir/Vtb_dct1d

Replace `tb_dct1d` with any other testbench. All of them finish in seconds.

## Changing the design

- **Input width.** `IN_W` on the top or on a core sets the input width. P
  and OUT_W follow from it (P = IN_W + 3, OUT_W = P + 1, and for the 2-D
  DCT, MID_W = IN_W + 4 and OUT_W = MID_W + 4).
- **DA precision.** Change Q and FRAC together with the constants in
  `da_pkg`.
- **Rounding quality.** `KEEP` sets how many truncation columns the trees
  add exactly. Raising it lowers the error's spread and costs adder width.
  `KEEP = FRAC` adds the whole truncation part exactly, which gives
  round-to-nearest.
