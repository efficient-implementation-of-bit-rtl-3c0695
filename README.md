# Bit-slice butterfly processing unit for a 64-point FFT

This is a 64-point FFT butterfly processing unit (BPU) that processes its data
in **bit slices**. Bit-serial arithmetic is small but slow. Fully parallel
arithmetic is fast but large. This unit sits in between. Every 4-bit real
number is carried as two 2-bit slices, least significant slice first, one slice
per clock. So every adder is a 2-bit adder with a carry flip-flop, and a whole
64-point transform enters in 16 clocks and leaves in 16 clocks.

The design follows the bit-slice BPUs of the article *"Efficient Implementation
of Bit Slice Butterfly for FFT Processors Using Parallel Prefix Adder"*. That
article targets superconducting (RSFQ) logic, and its adders are prefix
(carry look-ahead) adders. This RTL is the same architecture written as
ordinary synchronous CMOS logic. Where the article gives no detail, the choices
made here are stated below.

## The 8 x 8 decomposition

The 64 inputs x(n) are split as n = i + 8m, and the outputs X(k) as
k = k1 + 8k2, with i, m, k1, k2 all in 0..7. Then

```
X(k1 + 8 k2) = sum_i W8^(i k2) * [ W64^(i k1) * sum_m x(i + 8m) W8^(m k1) ]
                                   \____ twiddle ____/ \____ block 1 ____/
               \____ block 2 ____/
```

The unit computes this with four blocks in a row:

| stage | block | what it does | latency (clocks) |
|---|---|---|---|
| 0 | input register in `bpu_top` | registers the pins, makes the slice tags | 1 |
| 1 | `bfly_block8` (block 1) | 8-point DFT of input slice i = {x(i), x(i+8), ..., x(i+56)} | 10 |
| 2 | `twiddle_block` | point k1 of slice i times W64^(i k1) | 3 |
| 3 | `shuffle_block` | 8 x 8 transpose: slice k1 collects point k1 of slices 0..7 | 16 |
| 4 | `bfly_block8` (block 2) | 8-point DFT of each transposed slice | 10 |

Output slice k1 holds X(k1), X(k1+8), ..., X(k1+56). This has the same layout
as the input slices. Both butterfly blocks are the same module, as in the
source design. That way block 1 can work on frame f+1 while block 2 works on
frame f.

## Bit-slice arithmetic and the tag that travels with it

This is the least obvious part of the design. Nothing in the datapath holds a
whole word, except inside the multipliers and the shuffling block. What moves
through the pipeline each clock is one slice of every value, plus a 3-bit tag
(`fft_pkg::tag_t`):

- `valid`: a real slice is present on this clock.
- `lsd`: this is the least significant slice of a word.
- `sof`: this is the first clock of a 64-point frame.

Every arithmetic unit registers its result and passes the tag on, delayed by
its own latency. A downstream unit therefore always knows which slice it is
looking at. It never depends on a global phase counter.

- **`ppa_adder`** is a Kogge-Stone parallel prefix adder, 2 bits wide by
  default. It uses generate g = a&b and propagate p = a^b, with prefix
  operator (G,P)o(G',P') = (G+PG', PP'). The result is s_i = p_i ^ c_i, with
  carry c_{i+1} = G_i + P_i c_i, and the carry in folded into bit 0.
- **`bs_adder`** feeds one slice per clock through `ppa_adder`. It keeps the
  carry out in a flip-flop. On a slice tagged `lsd` the carry in is 0;
  otherwise it is the stored carry. After two clocks the two sum slices make
  exactly the 4-bit sum, which wraps modulo 16. Latency 1.
- **`bs_subtractor`** computes a + ~b + 1 the same way. The first slice's
  carry in is 1. Latency 1.
- **`bs_mult`** multiplies a data word by a 4-bit twiddle component. A product's
  top bits depend on every input bit, so the multiplier cannot work slice by
  slice. It shifts the slices into a 4-bit register. On the last slice it forms
  the full signed 8-bit product and keeps 4 bits of it. It then shifts the kept
  word out again, least significant slice first. Latency NDIG = 2 clocks. It
  accepts words back to back. The twiddle is sampled together with the last
  slice.
- **`bs_cmult`** is a complex multiplier made of four `bs_mult`, one
  subtractor and one adder. Latency 3.
- **`bs_caddsub`** is a complex add or subtract. Its `SWAP_B` option also
  gives a - j*b and a + j*b. Multiplying by ±j costs no hardware, only wiring
  and a choice of add or subtract.
- **`bs_delay`** is a chain of flip-flops. It delays the short paths of a cell
  (for example its plain sums) so that all of the cell's outputs leave on the
  same clock.

Idle clocks (`valid` = 0) may appear between words in every arithmetic unit.
The carry and the multiplier's slice counter restart at each `lsd`. The
shuffling block is stricter: a frame must be 16 valid clocks in a row (see
below).

## Fixed-point behaviour

- Data are 4-bit two's complement. Every sum and difference wraps, as a plain
  4-bit adder would. There is no scaling between stages.
- Twiddle factors are 4-bit two's complement with 2 fraction bits, so they
  range from -1 to +1 in steps of 1/4. This makes 1, -1, j and -j exact.
  Other factors are rounded to the nearest quarter. For example
  W8^1 = 0.75 - 0.75j.
- A product keeps bits [5:2] of the 8-bit result. These are the bits at the
  data's own scale: the most significant 4 bits once the redundant sign bits
  are dropped. The rest is truncated, not rounded.

So the unit's output is the exact result of this fixed-point schedule. For
general data it is *not* the exact DFT, and with full-scale random inputs most
bins wrap. It is exact when nothing wraps and only exact twiddles are used,
for example for an impulse at x(0) (flat spectrum) or an all-zero frame. The
testbenches use such frames as a check that does not depend on the reference
model.

## Butterfly cells

All cells work in decimation in frequency (DIF). Each one has its twiddle
factors as input ports, so the same cell serves at every position.

- **`r2_cell`** (radix-2): y0 = a + b, y1 = (a - b) w. It has 4 multipliers,
  3 adders and 3 subtractors. Latency 4.
- **`r4_cell`** (radix-4):
  - y0 = (a+c) + (b+d)
  - y1 = ((a-c) - j(b-d)) w1
  - y2 = ((a+c) - (b+d)) w2
  - y3 = ((a-c) + j(b-d)) w3

  It has 12 multipliers, 11 adders and 11 subtractors. Latency 5.
- **`sr_cell`** (split-radix "L" butterfly), with inputs a, b, c, d =
  x(n), x(n+N/4), x(n+N/2), x(n+3N/4):
  - u0 = a + c
  - u1 = b + d
  - z1 = ((a-c) - j(b-d)) W^n
  - z3 = ((a-c) + j(b-d)) W^3n

  It has 8 multipliers, 8 adders and 8 subtractors. Latency 5.

## The eight-point block and its three algorithms

`bfly_block8` takes eight points in natural order and returns their 8-point DFT
in natural order. Any reordering the algorithm needs is done by wiring. The
`ALGO` parameter (also on `bpu_top`) chooses the cells:

- **`ALG_SPLIT`** (default: split-radix, the cheapest and fastest of the
  three):
  - Two `sr_cell` (n = 0, 1, twiddles W8^n and W8^3n) act on
    (x(n), x(n+2), x(n+4), x(n+6)).
  - Their u outputs go to an `r4_cell` with twiddles 1, giving bins 0, 2, 4, 6.
  - Their z1 and z3 outputs go to two `r2_cell` with twiddle 1, giving bins
    1, 5 and 3, 7. These are padded by one clock.
  - Latency 10.
- **`ALG_MIXED`** (mixed-radix): four `r2_cell` (twiddle W8^n), then two
  `r4_cell` with twiddles 1. Latency 9.
- **`ALG_RADIX2`**: twelve `r2_cell` in three ranks (twiddles W8^n, W4^m, 1).
  The outputs come out bit-reversed and are unscrambled by wiring. Latency 12.

Multipliers whose twiddle is the constant 1 are still instantiated, so the
cell counts are those of the cells described. Synthesis folds them.

Hardware count of the split-radix unit:

- The two butterfly blocks have 72 multipliers, 66 adders and 66 subtractors.
- The twiddle factor block has 32 multipliers, 8 adders and 8 subtractors.

## Twiddle factor block

`twiddle_block` has eight complex bit-slice multipliers, one per point. It
counts slices from the tags: the word tagged `sof` is slice 0, and the count
steps at each `lsd` after it. Multiplier k of slice i uses W64^(i k). The
factors come from a constant 8 x 8 table, built at elaboration. The build
starts from a 17-entry quarter-wave table of cos(2πk/64)·2^14 in `fft_pkg` and
rounds each value to 2 fraction bits: round(v / 2^12), half up.

## Shuffling block

`shuffle_block` is a double-buffered transposer. It has two banks of 8 slices
× 8 points × 2 bit slices of complex 4-bit data, 1024 flip-flops in all:

- While one frame is written row by row (one input slice per word), the
  previous frame is read from the other bank column by column.
- The banks swap when a frame's last slice is written. Reading that frame
  starts on the next clock, so its latency is exactly one frame (16 clocks).
- Frames may follow back to back, or with any gap between them.
- Inside a frame, `valid` must stay high for all 16 clocks. An assertion
  reports a gap.

## Interface and timing of `bpu_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (resets control and tags only) |
| `in_valid` | in | 1 | an input slice is on `in_pt` |
| `in_sof` | in | 1 | first clock of a frame |
| `in_pt[0:7]` | in | 8 × `cdig_t` | `in_pt[m]` = 2-bit slice of x(i+8m), real and imaginary |
| `out_valid` | out | 1 | an output slice is on `out_pt` |
| `out_sof` | out | 1 | first clock of an output frame |
| `out_lsd` | out | 1 | `out_pt` carries low slices this clock |
| `out_pt[0:7]` | out | 8 × `cdig_t` | `out_pt[m]` = 2-bit slice of X(k+8m) |

The input frame takes 16 clocks. Clock 2i carries bits [1:0] of slice i, and
clock 2i+1 carries bits [3:2]. `in_sof` is high on clock 0 of the frame and
`in_valid` stays high for all 16 clocks. The output frame comes 40 clocks
later in the same format (38 for mixed-radix, 44 for radix-2). One 64-point
transform can start every 16 clocks.

## Where this departs from the source design

- **Technology.** The source is RSFQ logic built from a superconducting cell
  library (AND, XOR, NOT, DFF, NDRO, splitters, confluence buffers) with
  concurrent-flow clocking. Here it is plain synchronous logic. The source
  pipelines at gate level (173 stages, so 189 clocks per 64-point frame); this
  RTL registers once per bit-slice unit (40 clocks of latency, 56 clocks per
  frame). The 16-clock input and output frames are the same.
- **Flow.** The source says the 64-point FFT takes 12 steps. Here block 2
  starts one full frame after block 1, because a transpose cannot emit its
  first column before the last row arrives.
- **Split-radix cell count.** The source gives 8 multipliers, 6 adders and
  6 subtractors for the split-radix cell. The L-butterfly needs 8 adders and
  8 subtractors, and with that count the two blocks reach exactly the
  66 adders and 66 subtractors the source reports for the whole unit. The
  source's total of 86 multipliers is not reached (104 here), because its
  twiddle factor block is not described.
- **This design's own choices**, not taken from the source:
  - the twiddle format, rounding and product bit selection (above);
  - wrap-around on overflow;
  - least-significant-slice-first order;
  - the tag signals and the reset;
  - the Kogge-Stone prefix network;
  - the inner structure of the multiplier, the twiddle factor block and the
    shuffling block;
  - the cell arrangement inside the eight-point blocks (textbook DIF
    split-radix, mixed-radix and radix-2);
  - the order of radices in the mixed-radix block.
- The source says the scheme extends to any n²-point FFT. The RTL is written
  for 8 × 8: the widths W = 4 and D = 2 are package constants (NDIG = W/D
  may be changed), but the eight-point blocks are fixed at eight points.

## Files

- `rtl/fft_pkg.sv`: constants (W = 4, D = 2, R = 8, NPT = 64, TWF = 2), types,
  latencies, the `algo_e` enum and the twiddle function.
- `rtl/ppa_adder.sv`, `bs_adder.sv`, `bs_subtractor.sv`, `bs_mult.sv`,
  `bs_cmult.sv`, `bs_caddsub.sv`, `bs_delay.sv`: the bit-slice arithmetic.
- `rtl/r2_cell.sv`, `r4_cell.sv`, `sr_cell.sv`: the butterfly cells.
- `rtl/bfly_block8.sv`, `twiddle_block.sv`, `shuffle_block.sv`: the blocks.
- `rtl/bpu_top.sv`: the unit.
- `tb/fft_model_pkg.sv`: a word-level reference model of the same fixed-point
  arithmetic. Its twiddles come independently from `$cos`/`$sin`.
- `tb/tb_*.sv`: one self-checking testbench per block, plus variants for the
  mixed-radix and radix-2 blocks and units. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

Every testbench checks every output word against the reference model and
checks the latency of every word or frame. Each has a watchdog. The unit
testbenches (`tb_bpu_top`, `tb_bpu_top_mixed`, `tb_bpu_top_radix2`) run 24
frames at default sizes, back to back and after random gaps, including the
exact-DFT frames. Each takes a few seconds. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bpu_top \
  -y rtl -y tb +libext+.sv rtl/fft_pkg.sv tb/fft_model_pkg.sv tb/tb_bpu_top.sv
./obj_dir/Vtb_bpu_top
```

Replace `tb_bpu_top` with any other testbench name. The simulator starts
uninitialised flip-flops at random values; only control and tag flip-flops are
reset, and data flip-flops are never read before valid data reach them.
