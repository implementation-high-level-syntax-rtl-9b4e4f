# Reusable HEVC integer DCT: 1-D unit, folded and full-parallel 2-D engines

HEVC codes prediction residuals with integer approximations of the DCT
at four block sizes: 4x4, 8x8, 16x16 and 32x32. A hardware encoder has to
handle all four. A separate datapath per size wastes area. A single 32-point
datapath used only for 32-point blocks runs the smaller sizes slowly. This
design uses one **reusable** 1-D transform unit. Each cycle it takes 32
samples and computes one of these:

- one 32-point DCT,
- two 16-point DCTs,
- four 8-point DCTs,
- eight 4-point DCTs.

The throughput is therefore the same for every block size. Two 2-D forward
transform engines are built around this unit:

| engine | 1-D units | transposition buffer | 32x32 tile every | samples/cycle |
|---|---|---|---|---|
| folded (`dct2d_folded`) | 1, shared by both passes | 32x32 words | 64 cycles | 16 |
| full-parallel (`dct2d_fullpar`) | 2, one per pass | 32x32 words (the same size) | 32 cycles | 32 |

At 16 samples per cycle, 8K video (7680x4320, 4:2:0, 60 frame/s) needs
7680·4320·60·1.5/16 ≈ 186.6 MHz. The full-parallel engine needs half of
that. The testbenches measure these cycle counts; no clock frequency has
been measured for this RTL.

The outputs match the HEVC reference encoder's forward transform bit for
bit, including its rounding shifts. The testbenches compare every output
with a plain matrix product.

## The transform matrices

`C_N[k][n]` is the N-point HEVC matrix. It is an integer approximation of
64·√2·cos((2n+1)kπ/2N), except for row 0, which is all 64. Two properties
matter here:

1. **Embedding.** Every smaller matrix sits inside the 32-point one:
   `C_N[k][n] = C_32[k·32/N][n]`. So `C_32` gives every coefficient.
2. **Even/odd split.** Entry `C_32[k][n]` depends only on
   m = (2n+1)·k mod 128. It equals ±`mag[m']`, where m' is m folded into
   0..32 by the cosine symmetries. `mag` has 33 entries: 64, then 90, 90,
   90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67, 64, 61, 57, 54, 50,
   46, 43, 38, 36, 31, 25, 22, 18, 13, 9, 4, 0.

`hevc_dct_pkg` uses this rule to compute every coefficient at elaboration
time (`cos_mag`, `c32`, `cmat`). The RTL stores no coefficient matrix.

Because of the even/odd split, an N-point DCT breaks into three parts:

- **Butterfly.** a[n] = x[n] + x[N−1−n] and b[n] = x[n] − x[N−1−n], for
  n < N/2.
- **Even outputs.** y[2m] is the (N/2)-point DCT of a.
- **Odd outputs.** y[2m+1] = Σ_n C_N[2m+1][n]·b[n]. This is an (N/2)×(N/2)
  product with constant coefficients.

## The reusable 1-D unit (`dct1d_reuse`)

The unit is a chain of halving levels, 32 → 16 → 8, followed by a 4-point
core. Each level is a `dct_reuse_level`, which contains:

- an **input adder unit** with a bypass;
- an **odd-part block** (`dct_odd_sau`);
- an **output reorder** stage.

Let `size` be the transform length the level is asked for.

- **`size` equals the level length (full mode).** The adders form the
  butterfly. The sums go to the next level, which is then also in full
  mode. The differences go to the odd-part block, which applies the odd
  rows of `C_N`. The outputs interleave: the next level's results take the
  even positions and the odd-part results take the odd positions.
- **`size` is shorter (reuse mode).** The adders are bypassed. The lower
  half of the samples goes unchanged to the next level, which receives the
  same `size`. The upper half goes to the odd-part block. In this mode the
  block applies a block-diagonal matrix `diag(C_S, C_S, …)`, so it computes
  N/(2S) independent S-point DCTs. The two halves of the result sit side by
  side.

The odd-part block can switch matrices because every coefficient is a
compile-time constant. For each (output, input) pair the block forms up to
four constant products, one per possible size, and `size` picks one. Each
constant product maps to shifts and adds in synthesis. Sums are adder
trees.

Data layout: group g of S samples, `x[g·S .. g·S+S−1]`, gives coefficients
`y[g·S + k]`, k = 0..S−1, in natural order.

Widths:

- The input is WI = 16 bits.
- The output is WO = WI + 11 = 27 bits. No row of `C_32` has absolute
  values summing to more than 2048, so every exact result fits.
- Everything inside the unit is WO bits. Partial sums may wrap, but the
  final value fits in WO bits, so two's-complement arithmetic still gives
  the exact result.

The unit is purely combinational and has no pipeline registers.

## Tiles, and how smaller blocks are fed

Both 2-D engines work on **tiles** of 32x32 residuals. A tile holds one
32x32 block, or a 2x2, 4x4 or 8x8 grid of equal 16x16, 8x8 or 4x4 blocks.
All blocks in a tile have the same size.

- A 32-sample tile row crosses 32/S blocks, so one pass of the 1-D unit
  transforms one row of each of those blocks.
- A 32-sample tile column does the same for the vertical pass.

Every size therefore takes exactly one tile row (or column) per cycle.

Output coefficient (r, c) of a tile is vertical frequency r mod S and
horizontal frequency c mod S of the block in block row r/S and block
column c/S.

Scaling follows the HEVC reference encoder, with round-half-up after each
pass:

- after the horizontal pass, shift right by log2(S) − 1 + BIT_DEPTH − 8;
- after the vertical pass, shift right by log2(S) + 6.

Both results are saturated to 16 bits. The first-pass result goes into the
transposition buffer as a 16-bit word. For legal 9-bit residuals (8-bit
video) nothing saturates. The saturation only defines the behaviour for
larger inputs.

## Folded engine (`dct2d_folded`)

A tile goes through two phases, 32 cycles each:

1. **Row phase.** Each accepted input row goes through the 1-D unit and is
   rounded. It is then written into buffer row r.
2. **Column phase.** Buffer column c goes through the same 1-D unit, is
   rounded and is registered to the output.

`in_ready` is low during the column phase. `in_size` is sampled with the
tile's first row. Output column c leaves one clock after the cycle that
read it. A tile's first column therefore appears two clocks after its last
row was accepted. With continuous input a tile completes every 64 cycles.

## Full-parallel engine and the alternating buffer (`dct2d_fullpar`, `transpose_buf`)

The row unit writes tile t+1 into the buffer while the column unit reads
tile t out of it, every cycle. Only one 32x32 array is used, not two,
because of two rules:

1. **Read before write.** Reads are combinational and see the array before
   the same clock's write. So row i of tile t+1 can be written into exactly
   the array line that holds column i of tile t, in the cycle that column
   is read.
2. **Alternating orientation.** That line is an array column if tile t was
   stored row-wise, so tile t+1 ends up stored column-wise. The buffer takes
   an orientation bit for each side: 0 means tile row r is array row r, 1
   means it is array column r. The engine flips the write orientation after
   every tile. The read side uses the orientation the tile was written
   with.

Reading starts in the clock after a tile's last row is written and goes on
at one column per cycle. Writing never advances by more than one row per
cycle, so it can never overtake reading. `in_ready` is therefore always
high, and an assertion guards the rule. A tile still drains if no new tile
follows it. The first output column appears two clocks after the tile's
last row, about 33 cycles after its first row. After that the engine
produces 32 coefficients every cycle.

## Top level (`hevc_dct2d_top`)

The top places the two engines side by side. They share the clock and the
asynchronous active-low reset, and nothing else. Ports prefixed `f_` belong
to the folded engine and `p_` to the full-parallel engine. Parameters are
N = 32 (tile width), W = 16 (word width) and BIT_DEPTH = 8.

## Interfaces and timing summary

| signal | meaning |
|---|---|
| `in_valid` / `in_ready` | one tile row is transferred when both are high at a rising edge |
| `in_size` | `tsize_e` (log2 of block size: 2..5), taken with row 0 of a tile |
| `in_row[32]` | signed 16-bit residuals |
| `out_valid` | one output column this cycle; there is no back-pressure |
| `out_idx`, `out_last` | column index; `out_last` is high at column 31 |
| `out_size` | block size of the tile being output |
| `out_col[32]` | signed 16-bit coefficients of that column |

## Where this RTL departs from or goes beyond its source description

The following are supported by the description this design follows:

- the reusable 1-D unit and its equal throughput at every size;
- 16-bit input words;
- the folded structure with a 32x32 block every 64 cycles;
- the full-parallel structure with two 1-D units, one transposition buffer
  of similar cost, and 32 samples per cycle after about 32 cycles.

These are choices of this design:

- The **mux placement** in the reusable unit and the block-diagonal reuse
  mode of the odd-part block.
- The **tile layout** for blocks smaller than 32x32.
- The **valid/ready handshake**, the lack of output back-pressure and the
  reset scheme.
- The **alternating-orientation buffer** in the full-parallel engine.
- The **register** implementation of the buffer.
- The use of the HEVC reference encoder's **rounding shifts**, and the
  16-bit **saturation**.
- **No pipeline registers** inside the 1-D unit. A 187 MHz implementation
  would probably need some. Adding them shifts the latencies above by the
  number of stages.

Not built:

- **Pruned adders** ("architecture-2"), which drop low-order bits in the
  odd-part adders to save area. The exact pruning is not specified, so only
  the exact, unpruned unit is provided.
- **Inverse transform and dequantizer.** An inverse transform engine with
  zero-column skipping, an SRAM-based transpose memory and a dequantizer are
  mentioned alongside this design. Their structure is not specified, and no
  RTL is given for them.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare
against `tb_dct_ref_pkg`, a direct matrix-product reference. That package
derives each coefficient's sign from a floating-point cosine and takes its
magnitude from the standard table, independently of the RTL package.

- `tb_dct1d_reuse`: literal matrix rows (impulse responses), extreme
  inputs, and random 16-bit and 9-bit inputs in all four size modes.
- `tb_dct_odd_sau`: the odd rows of `C_32`, and the block-diagonal reuse
  modes.
- `tb_transpose_buf`: transposition, and back-to-back tiles with
  alternating orientation written into the lines being read.
- `tb_dct2d_folded`, `tb_dct2d_fullpar`: every size, a saturating tile and
  random input gaps. They also check the tile rate (64 or 32 cycles), the
  two-clock latency, stalls (folded), no stalls (full-parallel) and
  overlapped write/read.
- `tb_hevc_dct2d_top`: both engines at their default parameters on one
  stream of tiles. It counts each mechanism and fails if any never occurs:
  each block size on each engine, folded input stall, full-parallel overlap
  and drain. It finishes in seconds.

To run one testbench with Verilator (from the directory above `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/hevc_dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_hevc_dct2d_top.sv \
  --top-module tb_hevc_dct2d_top -o sim && ./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`.

Verilator warnings that remain, left in deliberately:

- `SYNCASYNCNET` on `rst_n`: the reset is asynchronous for the flops, and
  an assertion's `disable iff` uses it as well.
- `PINCONNECTEMPTY` on the last level's unused `size_out`: the 4-point core
  needs no size.
