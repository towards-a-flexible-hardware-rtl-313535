# Streaming mixed-radix DFT with a matrix-style prime-size kernel

Hardware FFTs are usually built for power-of-two sizes. Sizes such as 20, 28,
88 or 96 need a prime factor (3, 5, 7, 11, ...). The usual ways to compute a
prime-size DFT are Rader's and Bluestein's algorithms. Both turn the DFT into a
circular convolution, which needs extra transforms, padding and buffering.

This RTL takes a different route. A prime-size DFT is computed straight from the
symmetry of its matrix. Outputs come in conjugate pairs, so the kernel needs only
real multiplications, arranged as a small systolic array of multiply-accumulate
(MAC) groups. The kernel is then placed in a streaming mixed-radix pipeline for
N = 2^K * P. The radix-2 stages come first, then a twiddle scaling, a
transposition and the prime kernel. The default build is a DFT of size
20 = 4 x 5 that takes two complex samples per clock; other builds take four or
eight, for sizes up to 192 and beyond.

The architecture follows the paper "Towards a Flexible Hardware Implementation
for Mixed-Radix Fourier Transforms". That work generates its designs with a Chisel
generator and uses floating-point operators. This RTL is a separate SystemVerilog
implementation. It uses fixed-point arithmetic, and it has its own buffers, timing
and interfaces; the section "Where this RTL departs from the published design"
lists the differences.

## The prime-size kernel (`prime_dft`)

### The arithmetic

For an odd prime P, with M = (P-1)/2 and w = exp(-j 2 pi / P):

    y_0     = x_0 + sum_{m=1..M} (x_m + x_{P-m})
    y_k     = tr_k - j * ti_k          k = 1..M
    y_{P-k} = tr_k + j * ti_k
    tr_k    = x_0 + sum_{m=1..M} cos(2 pi k m / P) * (x_m + x_{P-m})
    ti_k    =       sum_{m=1..M} sin(2 pi k m / P) * (x_m - x_{P-m})

This holds because w^(km) and w^(-km) are complex conjugates. The input sums and
differences are a butterfly, and so is the recombination of tr and ti. Between
the two butterflies there are only real coefficients times complex data. For P =
5 that is 8 real multiplications per transform (4 per MAC group, 2 groups).

### The pipeline

    frame in ─► P (forward adjustment) ─► DFT2 ─► MAC array ─► x(-j) on ti ─► DFT2 ─► Q (inverse adjustment) ─► frame out
                prime_adj_in             dft2    prime_mac_array               dft2    prime_adj_out

* **Frames.** The stream is two samples wide. A frame is P samples plus one pad
  slot, so it takes (P+1)/2 cycles. For P = 5: `(x0,x1) (x2,x3) (x4,pad)`.
* **P** reorders a frame into `(x0, 0) (x1, x4) (x2, x3)`. In general it emits
  `(x0, 0)`, then `(x_m, x_{P-m})` for m = 1..M. Pairing x0 with an inserted zero
  lets x0 pass the butterfly unchanged as (x0, x0). Every MAC group then picks
  it up as its starting value (coefficient cos 0 = 1, sin 0 = 0), so x0 needs no
  separate path. This zero is also the reason the kernel needs (P+1)/2 cycles
  per transform instead of P/2.
* **DFT2** produces `(sum_m, diff_m)`, one pair per cycle.
* **MAC array** (`prime_mac_array`, the hardest part, described below) produces
  `(tr_k, ti_k)` for k = 0..M, one group per cycle. Group 0 is y0 with ti = 0.
* **x(-j), DFT2.** The second butterfly gets `(tr, -j*ti)` and produces
  `(y_k, y_{P-k})`. For group 0 it gives `(y0, y0)`.
* **Q** puts `(y0,-) (y1,y4) (y2,y3)` back into `(y0,y1) (y2,y3) (y4,0)`.

P and Q are double-buffered frame stores (see `stream_perm`). A transform can
therefore enter every (P+1)/2 cycles, and its first output sample comes P + 7
cycles after its last input sample (12 cycles for P = 5).

### The MAC array (`prime_mac_array`)

The array has M + 1 groups. Group 0 is a plain accumulator for y0. Group k
(1..M) holds four accumulators: re and im of tr_k and of ti_k. Each group has two
real-by-complex multipliers, one for the sum lane and one for the difference
lane.

* **Systolic timing.** The `(sum, diff)` pair and its pair index m move down a
  register chain, one group per cycle. Group g therefore sees pair m of a frame
  g cycles after group 0 sees it. Each group picks its coefficients
  cos(2 pi g m / P) and sin(2 pi g m / P) from a small table by the index that
  travels with the data. The tables are built while elaborating.
* **Restart without a gap.** At pair 0 the feedback input of every accumulator
  is replaced by zero. The next frame can therefore follow on the very next
  cycle.
* **One output port.** Group g finishes its last pair at cycle T + g, where T is
  the cycle group 0 finishes. The groups finish in consecutive cycles, so a
  single multiplexer forwards them in turn: group 0, 1, ..., M. That is exactly
  one `(tr, ti)` pair per cycle, the same rate as the input. An assertion checks
  that two groups never finish in the same cycle.
* **Cost.** The array has 2(P-1) real multipliers and 2(P-1) + 2 accumulating
  adders. The two butterflies add 8 more adders, and the -j rotation is only
  wiring. For P = 5 that makes 18 adders and 8 multipliers; for P = 13 it
  makes 34 and 24. A Bluestein kernel padded to a power of two needs several
  times as many.
* **Precision.** Products are accumulated at full width (DW + CW + log2 groups
  + 1 bits) and rounded once, at the multiplexer.

Group 0 starts putting out a frame 2 cycles after the frame's last pair enters.

## The mixed-radix pipeline (`mixed_radix_dft`)

### Factorization

N = R * P with R = 2^K. The input x is viewed as a P x R matrix whose row r is
`x[r], x[r+P], ..., x[r+(R-1)P]`. The pipeline then does four things:

1. A DFT of size R on every row (K radix-2 decimation-in-frequency stages).
2. It multiplies element k1 of row r by w_N^(r*k1) (twiddle).
3. It transposes the matrix, so that column k1 becomes one prime frame.
4. A DFT of size P on every column. Element k2 of column k1 is y[k1 + R*k2].

### Streaming width 2 (default, `SW = 2`)

    stream_perm(rows in) ─► DFT2 ─► twiddle ─► stream_perm ─► DFT2 ─► twiddle ─► stream_perm(transpose) ─► prime_dft ─► stream_perm(out)
                            └────── stage 0 ──────┘            └─── stage 1 (last) ──┘

* **Stage s butterflies.** Stage s pairs the row positions i and i + h, with
  h = R >> (s+1). Slot 2q of a row carries the upper input of butterfly q and
  slot 2q+1 the lower input.
* **Twiddle after a stage that is not the last.** This is the radix-2 internal
  factor w_{2h}^j. For R = 4 it is 1 or -j.
* **Twiddle after the last stage.** This is the mixed-radix factor w_N^(r*k1).
  Here k1 is the bit-reversed row position, because the radix-2 stages leave
  their outputs in bit-reversed order.
* **Permutation units.** A `stream_perm` sits before every stage except the
  first. Another one performs the transposition and inserts one zero pad per
  prime frame. The last one restores natural order.

**Rate and pacing.** The input supplies a transform every N/2 = 10 cycles. The
prime kernel needs R * (P+1)/2 = 12 cycles per transform, because each of its R
frames carries a zero pad. The input permutation spaces its output frames by 12
cycles and drops `in_ready` when both of its banks are full. Every later unit
receives frames at that spacing, and none of them needs back-pressure.
Assertions check that each double buffer always has a free bank when a frame
arrives.

### Streaming width 4 (`SW = 4`, K = 2 only)

    stream_perm(one row per cycle) ─► dft4 ─► twiddle ─► stream_perm(transpose, 2 x 2 lanes) ─► 2 x prime_dft ─► stream_perm(merge, natural order)

* A whole row of 4 samples enters `dft4` (a parallel DFT of size 4) each cycle.
* The transposition feeds two prime kernels side by side. Lanes 0-1 carry
  columns 0 and 1, one after the other. Lanes 2-3 carry columns 2 and 3.
* The output permutation merges the two kernels back into natural order, four
  samples per cycle.

The transform period is P + 1 cycles (6 for N = 20), against N/4 = P cycles of
input. The pad still costs one cycle per transform.

### Wider streams with more radix-2 stages (`SW` = 4 or 8, 2^K > 4)

The width-2 pipeline above scales to any even width SW that divides R:

* Every radix-2 stage gets SW/2 butterflies side by side. Lanes 2q and 2q+1 of
  a cycle feed butterfly q. The slot layouts are unchanged, because each slot
  pair (2q, 2q+1) is already one butterfly's pair of inputs.
* The transposition feeds SW/2 prime kernels side by side. Kernel g takes
  lanes 2g and 2g+1, and gets the columns g*F .. g*F + F - 1 one after the
  other, where F = 2R/SW.
* The output permutation merges the kernels back into natural order.
* The input is paced to R*(P+1)/SW cycles per transform.

The width-2 case is just the case with one butterfly and one kernel. The
layout of the prime frames for all widths is `fft_pkg::prime_slot`.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `P` | 5 | odd prime factor |
| `K` | 2 | log2 of the power-of-two factor R |
| `SW` | 2 | samples per cycle: an even number that divides 2^K (the DFT_4 variant when SW = 4 and K = 2) |
| `fft_pkg::DW` | 16 | bits of each real and imaginary part of a sample |
| `fft_pkg::CW`, `CFRAC` | 16, 14 | coefficient bits, of which fractional (1.0 is exact) |

Each size is a separate build of the same RTL, with its own parameters. The
default build is N = 20 at width 2. Every size and width evaluated for the
published design has been simulated with this RTL:

* N = 20, 28, 88 (8 x 11), 96 (32 x 3) and 192 (64 x 3) at width 2;
* N = 20, 28 and 88 at width 4;
* N = 96 and 192 at width 8.

## Interface and timing

All units use the same stream convention:

* `in_valid` / `in_data[SW]` (or `in_sop` for the units without a frame buffer)
  carry the input beats.
* `out_valid`, `out_sop` and `out_data[SW]` carry the output beats. They are
  registered.
* Samples are `fft_pkg::cplx_t`, a packed `{re, im}` of two signed DW-bit
  integers.

`mixed_radix_dft` ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `in_valid`, `in_data[SW]` | in | input samples in natural order, slots SW*c.. in cycle c |
| `in_ready` | out | a new frame may start; while it is low, do not start one |
| `out_valid`, `out_sop`, `out_data[SW]` | out | output in natural order; the cycles of a frame are contiguous |
| `overflow` | out | sticky: a frame arrived while no buffer bank was free |

The cycles of an input frame may have idle cycles between them. `in_ready` only
needs checking before the first beat of a frame.

Measured timing:

| configuration | cycles per transform | latency (last input beat to first output beat) |
|---|---|---|
| prime_dft, P | (P+1)/2 | P + 7 |
| N = 20, SW = 2 | 12 | 55 |
| N = 20, SW = 4 | 6 | 31 |
| N = 28, SW = 2 / 4 | 16 / 8 | 70 / 38 |
| N = 88, 96, 192 (SW = 2) | 48, 64, 128 | 215, 333, 736 |
| N = 88 (SW = 4) | 24 | 125 |
| N = 96, 192 (SW = 8) | 16, 32 | 105, 208 |

Each `stream_perm` costs one frame time plus two cycles. `dft2`, `dft4` and
`twiddle_mult` take one cycle each.

## Number format and accuracy

* **No scaling.** Samples are plain integers and nothing is scaled between
  stages, so a DFT of size N grows values by up to N. All adders wrap at DW
  bits. Keep the real and imaginary parts of the input below 2^(DW-1)/N (about
  1600 for N = 20).
* **Coefficients.** Cosines, sines and twiddle factors are rounded to 14
  fractional bits. Every product is rounded to the nearest integer.
* **Measured error.** Against a floating-point DFT, with random inputs at half
  that bound, the largest errors per component are within 4 LSB for N = 20 and
  within 24 LSB for N = 192. These are the test tolerances. Without scaling,
  the error grows with the number of rounding stages.
* **Changing the widths.** To change the word length, edit `DW`, `CW` and `CFRAC`
  in `rtl/fft_pkg.sv`.

## Where this RTL departs from the published design

* **Fixed point instead of floating point.** The published units are
  floating-point with a selectable precision. The latencies and resource counts
  reported for them (for example 124 cycles for the P = 5 kernel, or 436 cycles
  for N = 20 at width 2) do not apply here.
* **Extra permutation.** A permutation unit sits between each pair of
  consecutive radix-2 stages. A streaming radix-2 stage needs outputs of two
  different cycles, so the data must be reordered there. The published N = 20
  drawing shows none.
* **x0 and y0.** The published design handles x0 and y0 apart from the
  pairs. Here they travel as the pair (x0, 0) through the same butterflies and
  multiplexer as the other pairs, and come out unchanged.
* **MAC timing.** Each MAC group multiplies and accumulates in one cycle. There
  are no pipeline registers inside the multiplier or adder.
* **Permutation units.** They are generic double-buffered register banks with
  constant read tables. They are not minimal-memory switch-memory-switch
  networks, and the adjustment units are not merged with the neighbouring
  permutations.
* **Pacing.** The pacing of the input to the prime kernel's rate is this
  design's own solution to the zero-pad bubble. At widths 4 and 8, R/SW bubble
  cycles per transform remain, although the published design duplicates the
  prime kernel to avoid bubbles.
* **Radix-2 stages at wider streams.** The published design moves from radix-2
  to radix-4 stages as the width grows, and shows the radix-4 form only for
  N = 20. Here the DFT_4 form is built for R = 4 only. For larger R at width 4
  or 8, the radix-2 stages are widened instead (several butterflies side by
  side).
* **Supported configurations.** Only N = 2^K * P with a single odd prime is
  supported, with a width that divides 2^K.

## Files

| file | contents |
|---|---|
| `rtl/fft_pkg.sv` | sample and coefficient types, widths, permutation orders, cos/sin tables (all evaluated while elaborating) |
| `rtl/mixed_radix_dft.sv` | top: the whole N-point pipeline, any supported width |
| `rtl/prime_dft.sv` | prime-size kernel |
| `rtl/prime_adj_in.sv`, `rtl/prime_adj_out.sv` | P and Q adjustment units |
| `rtl/prime_mac_array.sv` | accumulator and MAC groups |
| `rtl/dft2.sv`, `rtl/dft4.sv` | butterfly, parallel 4-point DFT |
| `rtl/twiddle_mult.sv` | twiddle multiplication |
| `rtl/stream_perm.sv` | double-buffered streaming permutation |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus end-to-end tests |
| `tb/prime_dft_check.sv`, `tb/mixed_radix_check.sv` | reusable drivers/checkers used by those tests |

Each permutation order is one case of `fft_pkg::perm_src`. It maps an output slot
to the input slot it copies, or to -1 for an inserted zero. To add a layout, add
a case there.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/fft_pkg.sv tb/tb_mixed_radix_dft.sv --top-module tb_mixed_radix_dft -o sim
    ./obj_dir/sim

| testbench | what it covers |
|---|---|
| `tb_mixed_radix_dft` | default N = 20, width 2, top at its default parameters: data against a floating-point DFT, latency 55, period 12, pacing stalls, gapped input, zero-pad and prime-frame counts |
| `tb_mixed_radix_sizes` | N = 28, 88, 96, 192 at width 2 |
| `tb_mixed_radix_sw4` | N = 20 and 28 at width 4 (DFT_4 variant) |
| `tb_mixed_radix_wide` | N = 88 at width 4, N = 96 and 192 at width 8 |
| `tb_prime_dft` | prime kernel for P = 3, 5, 7, 11, 13: data, latency P + 7, one frame per (P+1)/2 cycles |
| `tb_prime_mac_array`, `tb_prime_adj_in`, `tb_prime_adj_out`, `tb_stream_perm`, `tb_twiddle_mult`, `tb_dft2`, `tb_dft4` | unit tests |

Every testbench finishes in seconds.
