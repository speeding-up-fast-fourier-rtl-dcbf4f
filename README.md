# Hardware-friendly radix-2 SDF FFT with MVR CORDIC rotators

A pipelined FFT multiplies by twiddle factors. A CORDIC can do that with
shift-and-add micro-rotations instead of multipliers, and the fastest CORDIC
variants skip or repeat micro-rotations. MVR (modified vector rotational)
CORDIC is one of them. Its drawback is that the gain of a rotation
(`prod sqrt(1+2^-2t)`) then depends on the angle. A conventional FFT would
need a gain-correcting multiplier after every rotator.

This design removes that multiplier by changing the twiddles. It uses the
hardware-friendly (HW-F) FFT idea: a butterfly's result only depends on the
*phase difference* between its two inputs. The conventional radix-2 butterfly
applies `1` to the upper input and `W` to the lower one. Here each butterfly
gets a pair of rotations instead:

* the two rotations have the same CORDIC gain and differ in phase by `arg W`;
* whatever they share (gain `K` and a common phase) is a complex factor that
  multiplies the whole sub-FFT downstream.

That shared factor is called the propagating twiddle factor (PTF). Every
butterfly of a group uses the same pair, so the PTFs are identical across a
sub-FFT. Because the FFT is linear, they ride along to the output. There each
output bin carries one known complex constant, which a single complex multiply
per bin removes. A downstream channel equaliser could absorb it instead. No
rotator needs gain compensation.

The RTL is a streaming radix-2 single-path delay-feedback (R2SDF) FFT. Its
defaults are N = 1024, 16-bit words and 3 MVR micro-rotations per rotator.

## Pipeline

```
x(n) natural order, 1 sample/clock
  -> BF1 (delay N/2)
  -> [x1 / x(-j)] -> BF2 (delay N/4)
  -> MVR rotator  -> BF3 (delay N/8)
  -> ...
  -> MVR rotator  -> BFlog2N (delay 1)
  -> PTF equaliser -> X(k)/N, bit-reversed order
```

| module | role |
|---|---|
| `hwf_r2sdf_fft` | top; generate loop over the log2 N stages |
| `r2sdf_bf` | butterfly with its feedback delay line; halves both outputs |
| `sdf_fifo` | the delay line: a D-word circular buffer |
| `quad_rotator` | stage-2 rotator; its twiddles are only 1 and -j, so no adders |
| `mvr_rotator` | stages 3..log2 N; ITER pipelined micro-rotations, control from `twiddle_rom` |
| `mvr_microrot` | one micro-rotation: two barrel shifters, two add/subtract units, or a skip |
| `twiddle_rom` | one control word per butterfly group of a stage, computed at elaboration |
| `ptf_equalizer` | multiplies output point p by 1/c(p); also outputs the uncorrected value |
| `hwf_fft_pkg` | control-word types and the elaboration-time functions that fill the ROMs |

### The flow graph

The flow graph has natural-order input and bit-reversed output, with the
twiddle in front of the lower butterfly input. Stage s (1-based) works on
blocks of `L = N / 2^(s-1)` samples and pairs sample `i` with `i + L/2`.

Every butterfly of block `b` at stage `s >= 2` needs the same twiddle
`W_N^e`, where `e = bitrev_{s-1}(b) * N / 2^s`. For N = 8 this gives
`W^0, W^2` in front of stage 2 and `W^0, W^2, W^1, W^3` in front of stage 3.
Such a block is one butterfly group, so each ROM holds one word per block:
`2^(s-1)` words.

The twiddles in front of stage 2 are only 1 and -j. That stage therefore
gets the free `quad_rotator`. Stages 3..log2 N get CORDIC rotators, which
makes log2 N - 2 CORDICs in total.

## The rotation rule (the part to understand)

Let the twiddle angle of a block be `th`. Split it as `th = q*90deg + d`, with
`d` in [-45deg, 45deg). The rotator acts on the two inputs of a butterfly as
follows:

| input | quadrant | CORDIC | total |
|---|---|---|---|
| lower | `j^q` (swap / negate, free) | micro-rotations with the ROM signs | `q*90 + d/2` |
| upper | none | the **same** micro-rotations with all signs inverted | `-d/2` |

* **Equal gain.** Both inputs use the same shifts, so they get exactly the
  same gain `K`.
* **Right phase difference.** The lower input leads the upper one by `th`,
  which is what the butterfly needs.
* **Small CORDIC angle.** The CORDIC only covers `|d/2| <= 22.5deg`. Three
  micro-rotations reach it with a residual of a fraction of a degree.
* **PTF.** The common factor `K*exp(-j*d/2)` is the propagating factor.

The micro-rotations (`op` is skip, +atan(2^-t) or -atan(2^-t); shift t is
0..15) are chosen greedily. Each step takes the shift and sign that most
reduce the remaining angle. `hwf_fft_pkg::mvr_select` does this at
elaboration.

**Gain normalisation.** MVR gains are at least 1, so they pile up over the
stages. The package tracks the gain accumulated along each chain of blocks.
When a block's gain would exceed 4/3, its ROM word sets `norm` and the
rotator halves the block. The carried gain therefore stays in (2/3, 4/3].
Both inputs of a butterfly always share the decision.

**Equaliser.** For output position p, `hwf_fft_pkg::ptf_coef` multiplies
together, in real arithmetic, the upper-input factors `prod(1 - j*sigma*2^-t)`
and the halvings of the blocks that feed position p. The inverse of that
product, rounded to 18 bits with 16 fractional bits, is the coefficient. The
two points of the last butterfly share one coefficient, so the table has N/2
entries.

## Interface and timing (`hwf_r2sdf_fft`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `in_valid` | in | 1 | sample valid; **the whole pipeline advances only when it is high** |
| `in_re`, `in_im` | in | W | input sample, natural order, frames back to back |
| `out_valid` | out | 1 | output valid |
| `out_bin` | out | log2 N | frequency index k of the output (bit-reversed sequence) |
| `out_re`, `out_im` | out | W | X(k)/N |
| `out_raw_re`, `out_raw_im` | out | W | the same point before equalisation (X(k)/N * c) |

* **Latency.** Sample x(n) leaves as output position n after
  `(log2N-2)*ITER + log2N + N - 1 + 1` advancing clocks. That is one clock per
  butterfly, ITER per MVR rotator, none for the -j rotator and one for the
  equaliser: 1058 clocks at the defaults. Without the equaliser it is the
  usual R2SDF figure with `T_PC = ITER`.
* **Stalls.** A gap in `in_valid` freezes every register. The last frame
  comes out while the next frame (or padding) goes in.
* **Scaling.** Every butterfly halves its outputs, so the butterflies never
  overflow.
* **Headroom.** The rotators work with 2 guard bits and saturate on output.
  Keep input magnitudes `|x|` below about `0.7 * 2^(W-1)` to stay clear of
  saturation after rotation.
* **Rounding.** Shifts truncate.

Parameters: `N` (power of two, at least 8; default 1024), `W` (word length;
default 16) and `ITER` (micro-rotations per rotator, 1..8; default 3).

## Accuracy

Results from the end-to-end test at the defaults:

| frame | SQNR |
|---|---|
| Gaussian-like noise (sigma about 3000 LSB) | 34.7-35.0 dB |
| single tone | 41 dB |
| two tones | 43 dB |

* The single tone lands in its bin with the right amplitude.
* The raw outputs carry scale factors between 0.65 and 1.38.
* The noise figure is limited by two things together:
  * the truncation of ten halving stages, with outputs around 180 LSB;
  * the residual angle of the greedy 3-step rotations. An ideal-arithmetic
    model of the same rotation rule gives about 43 dB at N = 1024.
* With ITER = 4 the rotation residual alone drops to about 56 dB.

Results of the sweep test (Gaussian noise; they vary by about 1 dB from seed
to seed):

| N | ITER = 1 | 2 | 3 | 4 |
|---|---|---|---|---|
| 8 | | | 59 dB | |
| 16 | | | 51 dB | |
| 32 | | | 49 dB | |
| 64 | 16 dB | 29 dB | 45 dB | 49 dB |
| 128 | | | 43 dB | |
| 256 | | | 40 dB | |
| 512 | | | 38 dB | |
| 1024 | | | 35 dB | |

Above 3 iterations the 16-bit datapath, not the rotation, limits the result.

This rotation scheme is a deliberately simple member of the HW-F family. The
two rotations of a pair are forced to be mirror images, and their parameters
are chosen greedily. A full HW-F design searches offline for *any* two
reachable CORDIC points with equal gain and the right phase difference, and
reports much higher SQNR for the same iteration count (about 71 dB at
N = 1024 with 3 MVR iterations). That search is software. Its results would
replace the ROM contents and the equaliser table without changing the
hardware structure, provided that the two micro-rotation sets of a pair were
both stored.

## Where this departs from, or adds to, the source algorithm

* Only the radix-2 R2SDF pipeline with MVR micro-rotations is built.
  Radix-3/4/8, and the EEAS and MSR CORDIC variants, are not.
* The trivial -j rotator sits in front of the second butterfly and the
  CORDICs follow it. The mirror-image ordering of an R2SDF, with a CORDIC
  after the first butterfly and the -j rotator before the last, needs the
  same number of rotators and has the same latency.
* Micro-rotation parameters come from the greedy choice described above, not
  from a joint optimisation.
* Scaling is a fixed halving per stage, not dynamic per-stage scaling.
  Normalisation shifts are right shifts only, because MVR gains are at least 1.
* The PTF compensation is a complex multiplier with a table computed at
  elaboration. This is one of several possible places for it; the raw output
  is provided for the others.
* The equaliser adds one clock of latency. With ITER = 2 the latency without
  it is 1049 clocks, the usual R2SDF figure for 2-iteration rotators; a
  two-clock multiplier, as is common, would make it 1051.
* Not built: an FFT that adapts its number of iterations to the channel SNR,
  or one with a separate residual (refinement) FFT. These are extensions
  that follow naturally from the freedom this scheme gives.
* Reset, the stall-on-gap flow control, the control-word format, guard bits,
  saturation and truncation are this design's own choices.

## Simulating

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. For example, the end-to-end test at the
default size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hwf_r2sdf_fft \
  -y rtl -y tb +libext+.sv -Irtl rtl/hwf_fft_pkg.sv tb/tb_hwf_r2sdf_fft.sv
./obj_dir/Vtb_hwf_r2sdf_fft
```

Elaboration takes some seconds because the ROM and equaliser tables are
computed by constant functions. The end-to-end test checks the following:

* the latency;
* the bit-reversed bin order;
* the SQNR of every frame against a direct DFT;
* the tone amplitude;
* the range of the raw scale factors;
* that stalls, -j rotations, quadrant rotations, skipped micro-rotations and
  gain halvings all occurred.

`tb_fft_sweep` builds ten FFTs side by side, one per configuration of the
table above. It checks latency, bin order and an SQNR floor for each. It also
checks that accuracy improves with every added micro-rotation and falls with
length.

The unit testbenches check each block against arithmetic worked out in the
testbench:

| testbench | checks against |
|---|---|
| `tb_mvr_microrot` | integer shift-and-add |
| `tb_sdf_fifo` | a queue model |
| `tb_r2sdf_bf` | the butterfly schedule |
| `tb_twiddle_rom` | twiddle angles |
| `tb_mvr_rotator` | pair phase difference and equal gains |
| `tb_quad_rotator` | the -j rule |
| `tb_ptf_equalizer` | the rebuilt scale factors |

To change the FFT size or the iteration count, override `N` and `ITER` on
`hwf_r2sdf_fft`. The tables follow automatically.
