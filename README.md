# Reusable integer DCT engines for HEVC

HEVC codes residuals with integer approximations of the DCT-II in four
lengths: 4, 8, 16 and 32 points. This RTL computes all four with one
datapath, and it produces 32 coefficients every clock cycle whatever the
transform size. It uses multipliers nowhere. Every constant product is a
short sum of shifted copies of the input.

The design rests on the even/odd decomposition of the DCT. Fold an N-sample
vector about its centre. The sums `a(i) = x(i) + x(N-1-i)` carry the even
coefficients, and these are exactly the (N/2)-point DCT of `a`. The
differences `b(i) = x(i) - x(N-1-i)` carry the odd coefficients, which form a
constant (N/2)x(N/2) matrix times `b`. Applying this rule again to the
(N/2)-point DCT leads down to the 4-point transform.

From that rule come four pieces of hardware:

| unit | file | role |
|---|---|---|
| IAU, input adder unit | `rtl/dct_iau.sv` | forms `a(i)` and `b(i)` |
| SAU, shift-add unit | `rtl/dct_sau.sv` | multiplies one `b(i)` by the N/2 odd-row constants (for N=8: 89, 75, 50, 18) |
| OAU, output adder unit | `rtl/dct_oau.sv` | sums the signed products into `y(1), y(3), ...` with an adder tree of log2(N)-1 levels |
| (N/2)-point DCT | recursive | even coefficients |

`rtl/dct4.sv` is the leaf. There the products by 64 are plain wiring, and the
only true constants are 83 and 36.

## The HEVC matrix and where the constants come from

The 32-point matrix `c32[k][n]` uses fewer than 33 distinct magnitudes. Each one is
the value at "angle" `(2n+1)k mod 128`, folded into 0..32 by the symmetries of
the cosine. The N-point matrix is `cN[k][n] = c32[k*32/N][n]`. Everything the
hardware needs is derived from the table in `rtl/dct_pkg.sv` at elaboration
time:

* `sau_const(N, j)` is the j-th SAU constant, `cN[2j+1][0]`. `csd_pos`
  and `csd_neg` expand it into canonical signed digits. For example
  83 = 64 + 16 + 4 - 1, so the SAU uses four terms instead of five.
* `oau_sel(N, k, i)` and `oau_neg(N, k, i)` give the OAU entry
  `cN[2k+1][i]` as plus or minus one of the SAU products of `b(i)`.

Changing the table changes the transform, with no other edits.

## Generalized fixed-length unit: `dct_n`

`dct_n #(N)` is the direct form of the decomposition: one IAU, one
`dct_n #(N/2)` (or `dct4`), N/2 SAUs and one OAU. Its outputs come in natural
order, `y[k] = sum_n cN[k][n] x[n]`. It is purely combinational.

## Reusable unit: `dct_reusable`, and its lane order

`dct_reusable #(N)` computes, in one cycle, one N-point DCT, two (N/2)-point
DCTs, and so on down to N/4 4-point DCTs. The 2-bit mode input `m` selects the
size as `4 << m`. In the code, `dct_pkg::dct_mode_e` names the four modes.
Inside are:

* two reusable (N/2)-point units, recursively, down to `dct4`;
* N/2 2:1 multiplexers in front of the first unit. They pass the IAU sums
  `a(i)` in N-point mode and the raw samples `x(0..N/2-1)` otherwise;
* AND gates that force the second unit's input to zero in N-point mode. Other
  AND gates force the IAU's input to zero in the smaller modes. The unused
  half then sees constant zeros and does not toggle (data gating);
* an IAU, SAUs and an OAU that provide the odd coefficients in N-point mode.
  A multiplexer puts these on the upper output lanes in place of the second
  unit's outputs;
* `dct_ctrl`, which turns `m` into `sel1` and `sel2`. `sel1` means "this
  level computes N points". `sel2` is the mode for both sub-units: `m`
  itself, or the (N/2)-point mode when `sel1` is set.

**Output lanes are not in natural order.** No reordering network follows the
unit. Lanes 0..N/2-1 belong to the first sub-unit. Lanes N/2..N-1 are the odd
coefficients in N-point mode and the second sub-unit's lanes otherwise. The
order of each sub-unit follows the same rule. For N = 32:

| mode | lanes 0..31 carry (segment, coefficient) |
|---|---|
| 4-point | (0,0) (0,1) (0,2) (0,3) (1,0) ... (7,3), natural order |
| 8-point | (0,0) (0,2) (0,4) (0,6) (0,1) (0,3) (0,5) (0,7) (1,0) ... |
| 16-point | (0,0) (0,4) (0,8) (0,12) (0,2) (0,6) (0,10) (0,14) (0,1) (0,3) ... (0,15) (1,0) ... |
| 32-point | 0 8 16 24 4 12 20 28 2 6 10 ... 30 1 3 5 ... 31 |

A segment is a group of S consecutive input samples, where S is the
transform size. `dct_pkg::lane_seg(N, S, lane)` and
`dct_pkg::lane_coef(N, S, lane)` return this mapping, so a consumer can
reorder the output, or simply address its coefficient store with it.

## 2-D transforms

A 2-D N x N DCT is a 1-D pass over the columns, a transposition, and a 1-D
pass over the rows. The two engines differ in how they share the work and the
buffer between those passes. Both use `dct_reusable` for the 1-D passes, so
they serve every block size. With size S < 32, a 32x32 tile holds
(32/S)^2 independent SxS blocks. A block-diagonal 1-D transform keeps the
blocks apart, so all of them are transformed together with no extra logic.

Both engines take one tile column per accepted cycle: `in_col[n]` is tile row
n. Accepting a column takes `in_valid && in_ready`. `in_mode` is sampled with
the first column and kept for the whole tile. Output vector number i of a
tile gives

    out[p] = Y[r(i)][r(p)],   r(l) = lane_seg(N,S,l)*S + lane_coef(N,S,l)

where `Y` is the 2-D transform of the tile: row index = vertical frequency
(within the block row `r/S`), column index = horizontal frequency. So the
lane order applies in both directions. `out_last` marks the N-th vector and
`out_mode` repeats the tile's mode.

### Folded engine: `dct2d_folded` + `tbuf_folded`

This engine has one 1-D unit and one N x N register buffer.

1. **Column pass** (N accepted cycles). The unit transforms the column, and
   the result is written into buffer column j through the one-hot enable
   `EN_j`.
2. **Row pass** (N cycles, `in_ready` low). N multiplexers at the unit's input
   switch from the input to the buffer. Row i is read through the row
   multiplexers and transformed, and the result is registered to the output.

Each tile costs 2N cycles, which is N/2 coefficients per cycle on average.
The last output row is valid 2N cycles after the first column was accepted.

### Full-parallel engine: `dct2d_fullpar` + `tbuf_fullpar` + `tbuf_rc`

This engine has two 1-D units and a buffer of register cells. Each cell has a
2:1 input multiplexer, so a whole row or a whole column can be loaded in one
cycle. Output multiplexer p picks the cell of row p or of column p. In every
step, one *line* (a row or a column) is read and, in the same clock edge,
overwritten with the new result of the first unit.

The line direction alternates every N steps. A tile written column by column
is read back row by row, which returns its transpose. While it is read, the
next tile is written row by row into the same places. That tile is then read
column by column, and so on. No second buffer is needed. With a continuous
input the engine accepts one column and delivers one output vector every
cycle: N coefficients per cycle, one tile every N cycles. The last output
row of a tile is valid 2N cycles after its first column.

Because a tile leaves only while the next one arrives, the engine adds a
**drain pass**. A drain pass starts when the input is idle at a tile boundary
while a complete tile is still in the buffer. It runs N steps by itself,
writing zeros, with `in_ready` low after its first cycle. `drain_active`
shows when a drain pass is running.

## Word lengths and arithmetic

The input is W = 9 bits by default, which holds an 8-bit residual. Nothing is
rounded or truncated. A 32-point row has an absolute coefficient sum of at
most 2880 < 2^12, so each 1-D pass adds `GROW` = 12 bits:

| signal | width |
|---|---|
| 1-D input / 2-D tile input | W = 9 |
| 1-D output, transposition buffer | W + 12 = 21 |
| 2-D output | W + 24 = 33 |

Inside a 1-D unit all arithmetic runs at the output width. Intermediate sums
may wrap, but every final coefficient is exact. The results are therefore the
exact products `C x` and `C X C^T`. HEVC's normative intermediate right
shifts are not applied, and neither is any bit-pruning. A codec integration
would add rounding shifts after each pass, or prune the LSBs of the internal
adders, and narrow the buffer accordingly.

## Top level: `dct_top`

`dct_top #(N = 32, W = 9)` places three independent units side by side, each
with its own ports:

* `fo_*`: the folded 2-D engine;
* `fp_*`: the full-parallel 2-D engine, plus `fp_drain_active`;
* `g_x` / `g_y`: the generalized 32-point 1-D unit (`dct_n`).

All ports are plain signals and unpacked arrays. `clk` is the clock, and
`rst_n` is an active-low synchronous reset of the control state. The data
registers are not reset.

## Timing and size

Every 1-D unit is purely combinational. Registers sit only in the 2-D
engines: the transposition buffer, a small controller and the output register.
The critical path runs through one 32-point reusable unit: the IAU, SAU and
OAU tree, or the recursive sub-units and the final multiplexer. Add pipeline
registers there if a target clock requires it. No clock frequency is claimed.

Throughput versus video formats (4:2:0, 1.5 samples per pixel):

| format | samples/s | full-parallel clock needed | folded clock needed |
|---|---|---|---|
| 3840x2160 @ 30 | 373 M | 11.7 MHz | 23.3 MHz |
| 7680x4320 @ 60 | 2.99 G | 93.3 MHz | 186.6 MHz |

A coarse generic synthesis of `dct_top` gives about 6.3 k word-level cells and
23.6 k flip-flop bits. Two 32x32x21-bit buffers account for 21.5 k of those
bits.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against a reference model in `tb/dct_ref_pkg.sv`. The model builds the HEVC
matrix from the 32-point first-column constants and the cosine symmetries,
and it evaluates direct matrix products. It shares no code with the RTL. It
also has its own recursive derivation of the lane order.

| testbench | what it covers |
|---|---|
| `tb_dct_sau`, `tb_dct_iau`, `tb_dct_oau`, `tb_dct4`, `tb_dct_ctrl` | the building blocks, all sizes |
| `tb_dct_n` | the 8-, 16- and 32-point generalized units, corner and random vectors |
| `tb_dct_reusable` | the 8-, 16- and 32-point reusable units in every mode, lane by lane |
| `tb_dct_gating` | the data gating of the 32-point reusable unit and its first 16-point unit: the idle half sees all-zero inputs in every mode |
| `tb_tbuf_folded`, `tb_tbuf_fullpar` | transposition, idle cycles, alternating direction |
| `tb_dct2d_folded`, `tb_dct2d_fullpar` | 32x32 tiles in all four sizes, back-to-back timing (period and latency), random gaps, idle time, drain passes |
| `tb_workload_stream` | a 768x32 strip of 24 back-to-back tiles through both engines at full size. It checks that the full-parallel engine outputs on every cycle (32 coefficients/cycle) and the folded engine one tile per 64 cycles, and it prints the clock each needs for the formats above |
| `tb_dct_top` | the whole top at its default parameters. Both engines and the 1-D unit run concurrently (about 92 k checks). It fails if any mechanism never occurred: each size in each engine, mode switches, input held off, gaps, input/output overlap, drain passes |

`tb/tb_stream_agent.sv` is the shared driver and scoreboard for the 2-D
engines. Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. To run one with Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_top.sv --top-module tb_dct_top
    ./obj_dir/Vtb_dct_top

The same pattern works for every `tb/tb_*.sv`. All of them run in seconds.

## Where this RTL makes its own choices

The structures follow the published reusable integer-DCT architecture: the
IAU/SAU/OAU decomposition, the reusable unit with its multiplexers, gating
and control, and the folded and full-parallel transposition buffers. The
following points are this implementation's own:

* full-precision arithmetic, with no rounding and no bit-pruning (see above);
* 9-bit default input width;
* SAU constants in canonical signed digits, with no sharing of partial
  products between constants;
* the (2N-1):1 output multiplexers of the full-parallel buffer, built as a
  row pick and a column pick followed by a 2:1 choice;
* the 2-D engines built on the reusable 1-D unit, so they cover every size;
* the valid/ready handshake, the mode that travels with each tile, the drain
  pass and the output registers;
* the three units placed side by side in one top;
* no reordering of the reusable unit's output lanes.
