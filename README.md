# Multiplierless HEVC integer transform from signed bit planes

HEVC codes prediction residuals with integer approximations of the DCT at
four sizes: 4, 8, 16 and 32 points. A direct 32-point implementation needs a
32x32 matrix of 7-bit constants (the largest magnitude is 90), which means
either many constant multipliers or wide adder networks.

This design takes another route. It splits the constant matrix into
**signed bit planes** (SBT matrices). Each plane holds only 0, +1 and -1,
so multiplying a plane by the input vector takes nothing but additions of
narrow data. The planes are recombined with weights 2^k. Across the rows of
the matrix, the additions are shared at the level of sample pairs
("2-SSBT adder reuse").

The RTL is a 1-D forward transform core:

- It takes 32 input samples per vector, as one 32-point vector or as 2, 4 or
  8 shorter vectors.
- It computes one bit plane per clock.
- It delivers 32 exact coefficients every 7 clocks, whatever the transform
  size.

## 1. Signed bit-plane decomposition

Let `D_N = (d_ij)` be the N-point HEVC matrix. Each element is written in
sign-magnitude form, with every bit carrying the element's sign:

    d_ij = sum_{k=0}^{K-1} b_kij 2^k,   b_kij in {0, sgn(d_ij)}

If the bits of plane `k` are collected into `B_{N,k}`, then

    D_N = sum_k B_{N,k} 2^k          and so     y = D_N x = sum_k 2^k (B_{N,k} x)

Because `max |d_ij| = 90 < 128`, **K = 7** planes are enough.
`B_{N,k} x` is a matrix with 0/±1 entries times the input vector. It needs
only additions, and its results are just `log2(N)+1` bits wider than the
samples. This keeps the adders in the inner loop narrow.

The coefficient table is not stored in a file. `sbt_pkg` generates it at
elaboration, in four steps:

1. The 31 distinct magnitudes of the 32-point HEVC matrix (90, 90, 90, 89,
   88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67, 64, 61, 57, 54, 50, 46, 43,
   38, 36, 31, 25, 22, 18, 13, 9, 4) give the first column of rows 1..31.
   Row 0 is all 64.
2. Element `(k, n)` of `D_32` is that magnitude at angle `m = k(2n+1) mod
   128` (in units of pi/64). The angle is folded into 0..32 and carries the
   sign of `cos(m*pi/64)`.
3. `D_N` row `r` is row `r*32/N` of `D_32`, cut to N columns. This is the
   HEVC rule.
4. Every element is binarised as above.

`sbt_code_rom` then becomes a constant decoder of (size, plane) that gives a
32x32 array of 2-bit codes (`00` = 0, `01` = +1, `11` = -1).

### Small sizes are packed, not padded

For N < 32, the matrix that is decomposed is **block-diagonal**: it holds
32/N copies of `D_N`. The 32 input samples are therefore 32/N independent
N-point vectors. Vector `s` sits in `in_x[s*N +: N]`, and coefficient `r` of
vector `s` comes out on `out_y[s*N + r]`. Every size thus uses the full
datapath, and throughput in samples is the same for all sizes. The size can
change from one vector to the next. The size travels with the data and comes
back on `out_size`.

## 2. 2-SSBT: sharing the pair additions

Take one row of one plane and split it into pairs of elements
`(b_j, b_{j+1})`. The product of such a pair with `(x_j, x_{j+1})` (a
"2-SSBT") has only nine possible values:

| b_j, b_j+1 | result            | b_j, b_j+1 | result    |
|------------|-------------------|------------|-----------|
| +1, +1     | x_j + x_j+1       | +1, 0      | x_j       |
| +1, -1     | x_j - x_j+1       | -1, 0      | -x_j      |
| -1, +1     | -(x_j - x_j+1)    | 0, +1      | x_j+1     |
| -1, -1     | -(x_j + x_j+1)    | 0, -1      | -x_j+1    |
|            |                   | 0, 0       | 0         |

`ssbt2` forms `x_j + x_j+1` and `x_j - x_j+1` **once per sample pair**, with
two adders. All 32 matrix rows then take their result from that pair by
selection and negation. Because the planes pass one per clock, the same two
adders also serve all seven planes.

There are sixteen `ssbt2` units, one per sample pair. Together they replace
the 32 x 16 x 7 pair additions of a direct bit-plane implementation. The
output is two bits wider than a sample, so `-(x_j + x_j+1)` with both
samples at -2^15 is still exact.

## 3. M-SSBT: hierarchical joins

An M-element row segment is the sum of two M/2-element segments, so a 4-SSBT
is two 2-SSBTs plus one adder, and so on up to the 32-SSBT. That is the full
dot product `B_{N,k}[row] · x`. `mssbt_tree` is this binary tree for one row:

- 16 leaves, 15 join adders, 4 levels.
- The node array is in heap order: node 1 is the 32-SSBT, nodes 2-3 are the
  two 16-SSBTs, and so on.
- Its width grows by `log2(M/2)` bits, so no result can overflow.

There are 32 trees, one per matrix row. This adder tree is the widest
combinational path: the pair adder, then 4 join levels, then the
accumulator adder.

## 4. Folding over the planes, and recombination

The datapath handles one bit plane per clock. When a vector is accepted, it
goes into an input register. For the next 7 clocks, `sbt_ctrl` counts the
plane from 6 down to 0. The ROM supplies `B_{N,k}`, and the 2-SSBT units and
the trees compute `p_k = B_{N,k} x` for all 32 rows.

`sbt_plane_acc` combines the planes by Horner's rule, most significant plane
first:

    acc <- p_6                       (plane 6, 'first')
    acc <- 2*acc + p_k               (planes 5..0)

After plane 0, `acc = sum_k 2^k p_k = D_N x`. No multiplier appears anywhere.
The final sum is loaded into the output register in the same clock as
plane 0.

Timeline for vectors sent back to back (clock numbers relative to the accept
of vector A):

    clock      0     1    2    3    4    5    6    7     8    ...  14   15
    accept     A                                  B                C
    plane            6    5    4    3    2    1    0     6    ...   0    6
    out_valid                                          A               B

- The input is ready again in the clock of plane 0. A new vector can
  therefore be taken every **7 clocks** with no bubble.
- **Latency** from accept to `out_valid` is **8 clocks**.
- If a result is still waiting in the output register (`out_valid` high,
  `out_ready` low) when the next vector reaches plane 0, the datapath
  **stalls** on plane 0. It resumes when the output is taken. The result on
  the output never changes while it waits.

## 5. Interface (`sbt_dct32_1d`)

| port        | dir | width   | meaning |
|-------------|-----|---------|---------|
| `clk`       | in  | 1       | clock, rising edge |
| `rst_n`     | in  | 1       | asynchronous reset, active low |
| `in_valid`  | in  | 1       | a vector is offered |
| `in_ready`  | out | 1       | the vector is taken in a clock where both are high |
| `in_size`   | in  | 2       | `sbt_pkg::tsize_e`: 0 = 4, 1 = 8, 2 = 16, 3 = 32 points |
| `in_x`      | in  | 32 x DW | samples, signed |
| `out_valid` | out | 1       | coefficients valid |
| `out_ready` | in  | 1       | coefficients taken in a clock where both are high |
| `out_size`  | out | 2       | size of the vector these coefficients came from |
| `out_y`     | out | 32 x OW | coefficients, signed, exact |

Parameters:

- `DW` is the sample width. The default is 16, the width of HEVC's
  intermediate data; 9-bit residuals fit too.
- `OW = DW + 12` is wide enough for the exact result,
  `|y| <= 32 * 90 * 2^(DW-1)`.

No rounding or right shift is applied. HEVC's per-stage scaling (for
example `>> (log2 N - 1 + bitDepth - 8)` after the first stage) belongs to
the surrounding pipeline. It can be taken from `out_y` by a shift.

## 6. Throughput against video formats

The core gives 32 coefficients per 7 clocks for every size. At 150 MHz that
is 685.7 M coefficients/s.

A 2-D transform built by row-column decomposition passes every sample twice
through a 1-D core. That assumes a transpose buffer, which is not part of
this RTL.

| format (4:2:0, 30 frames/s) | core vectors per frame | clocks per frame (measured) | at 150 MHz |
|-----------------------------|------------------------|-----------------------------|------------|
| 1920x1080                   | 194,400                | 1,360,812                   | 110.2 frames/s: fits the 5,000,000-clock budget with 3.7x headroom |
| 3840x2160                   | 777,600                | 5,443,212                   | 27.6 frames/s: does not fit; needs 164 MHz, or one core per pass |

The clock counts come from `tb_sbt_frame`. It runs both frames as a full
HEVC 2-D forward transform with one core used for both passes:

- a row pass;
- the HEVC first-stage rounding shift (`log2 N - 1` for 8-bit video);
- a transpose, done in the testbench;
- a column pass;
- the second-stage shift (`log2 N + 6`).

Each 32x32 region uses a random block size. Every final coefficient is
checked against a direct 2-D matrix product, and every intermediate value
must fit 16 bits. Each pass takes exactly `7 * vectors + 2` clocks.

## 7. What comes from the SBT architecture and what is this design's own

These parts follow the SBT architecture:

- the signed bit-plane decomposition `D_N = sum_k B_{N,k} 2^k`;
- the 2-SSBT unit with its nine combinations and shared pair adders;
- M-SSBT built by joining two M/2-SSBTs;
- a multisize 32x32 1-D transform as the top level;
- partial folding;
- the 150 MHz / 1080p target.

These choices belong to this design:

- The coefficient values themselves are taken from the HEVC standard.
- The folding is over the bit planes, one plane per clock.
- Small sizes are packed block-diagonally.
- Recombination is MSB-first by Horner's rule.
- The handshakes, the stall rule, the widths and exact (unscaled) outputs
  are chosen here.
- The join trees have no pipeline registers.

Not built:

- The inverse transform.
- A 2-D wrapper with a transpose memory.
- Sharing of adders beyond the pair level. Within one plane and one group of
  four columns, the 32 rows use at most 18 distinct 4-element patterns
  (counting a pattern and its negation once). Sharing 4-SSBT adders would
  therefore cut the first join level from 256 adders to 142. But in this
  folded datapath the patterns change every clock, so each row would need an
  18-way operand multiplexer. That costs more than the adders it saves, so
  every row keeps its own join tree. In an unfolded design with one set of
  adders per plane, that sharing would be fixed wiring and worth doing.

Size after coarse synthesis with yosys, at the defaults: about 5,200
word-level cells and 2,281 flip-flop bits. The flip-flops are the input,
accumulator and output registers plus control.

## 8. Files

| file | contents |
|------|----------|
| `rtl/sbt_pkg.sv`       | sizes, types, HEVC coefficient and SBT table functions |
| `rtl/sbt_code_rom.sv`  | bit-plane code ROM |
| `rtl/ssbt2.sv`         | 2-SSBT pair unit with shared adders |
| `rtl/mssbt_tree.sv`    | hierarchical M-SSBT join tree |
| `rtl/sbt_plane_acc.sv` | shift-add plane recombination |
| `rtl/sbt_ctrl.sv`      | plane counter, handshakes, stall |
| `rtl/sbt_dct32_1d.sv`  | top level |
| `tb/tb_ref_pkg.sv`     | reference HEVC matrices, written independently of `sbt_pkg` |
| `tb/tb_*.sv`           | one self-checking testbench per module, plus `tb_sbt_frame` (frame workload) |

## 9. Simulating

Each testbench checks itself and ends with the line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/sbt_pkg.sv tb/tb_ref_pkg.sv \
        rtl/sbt_code_rom.sv rtl/ssbt2.sv rtl/mssbt_tree.sv \
        rtl/sbt_plane_acc.sv rtl/sbt_ctrl.sv rtl/sbt_dct32_1d.sv \
        tb/tb_sbt_dct32_1d.sv --top-module tb_sbt_dct32_1d
    ./obj_dir/Vtb_sbt_dct32_1d

The other testbenches are built the same way with their own top module:
`tb_sbt_code_rom`, `tb_ssbt2`, `tb_mssbt_tree`, `tb_sbt_plane_acc` and
`tb_sbt_ctrl`, `tb_sbt_frame`.

What the testbenches cover:

- **`tb_sbt_dct32_1d`** runs the top at its default parameters. It sends
  about 700 vectors of all four sizes:
  - random 16-bit and 9-bit data;
  - all samples at -2^15, all at 2^15-1, and alternating extremes;
  - free-flowing and random or slow handshakes.

  Every coefficient is compared with a direct multiplication by the HEVC
  matrix. The test also checks the 7-clock accept interval and the 8-clock
  latency. It fails if no size switch, stall or back-to-back accept ever
  happened.
- **`tb_sbt_code_rom`** rebuilds every matrix from its seven planes and
  compares it with the reference. It also compares the 4-point matrix and
  two 8-point rows with literal HEVC values.
- **`tb_sbt_ctrl`** runs a cycle model beside the controller.
- **`tb_sbt_frame`** is the video-frame workload of section 6. It takes
  about 30 s.

All seven testbenches pass. Each was also run against a copy of its module with
one deliberate error, and each detected it.
