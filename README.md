# Radix-2² feed-forward FFT with multi-path delay commutators

This is a pipelined FFT that takes **P complex samples per clock cycle** and
produces P frequency bins per cycle, with no stalls and no feedback loops. It
is built for the case where one cycle at one sample per clock is too slow, for
example in wideband OFDM receivers.

The design has three ideas:

* **Radix-2² arithmetic.** The FFT runs as log₂N radix-2 butterfly stages, as
  in a plain radix-2 decimation-in-frequency (DIF) FFT. The rotations
  ("twiddle factors") are moved so that every other stage needs only a
  rotation by −j. A −j rotation is a swap and a negation, so only every
  second stage needs real complex multipliers.
* **Feed-forward, multi-path.** P lanes carry P samples side by side. Data
  flow only forward from stage to stage, so the pipeline never holds a
  butterfly partly used.
* **Delay commutators.** A butterfly's two inputs must arrive in the same
  cycle on two paired lanes. When they arrive on different cycles instead,
  a delay commutator regroups them. It is a buffer, a 2×2 switch and another
  buffer.

The default configuration is N = 16 points with P = 4 lanes. P = 2 and P = 8
also work, as does any N that is a power of 4 (tested up to N = 64).

## The flow graph being implemented

For N = 16 the pipeline has four butterfly stages. Stage *s* pairs the sample
in row *r* with the sample in row *r* + 2^(4−s): stage 1 pairs rows 8 apart,
stage 4 pairs neighbouring rows. Each butterfly puts the sum on the upper row
and the difference on the lower row. After stages 1–3 each row is multiplied
by W₁₆^e, where W₁₆ = e^(−j2π/16):

| after stage | rows 0–3 | rows 4–7 | rows 8–11 | rows 12–15 | kind |
|---|---|---|---|---|---|
| 1 | 0 0 0 0 | 0 0 0 0 | 0 0 0 0 | 4 4 4 4 | −j only |
| 2 | 0 0 0 0 | 0 2 4 6 | 0 1 2 3 | 0 3 6 9 | general |
| 3 | 0 0 0 4 | 0 0 0 4 | 0 0 0 4 | 0 0 0 4 | −j only |

(W₁₆⁴ = −j.) Write the 4-bit row number as b3 b2 b1 b0. The rules for these
exponents are:

* after stage 1, apply −j when b3 = b2 = 1;
* after stage 3, apply −j when b1 = b0 = 1;
* after stage 2, use exponent (b3 + 2·b2) · (b1 b0).

Row *r* ends up holding bin X[bitreverse(r)], so the bins come out in
bit-reversed order.

The RTL applies the same rules for any N = 4^m: −j after odd stages and a
general rotation after even stages. After stage *s*, the exponent in units of
W_N is (b[n−s+1] + 2·b[n−s]) · (r mod 2^(n−s)) · 2^(s−2). This formula is in
`twiddle_exp` in `mdc_pkg.sv`.

## Lanes, time and where each sample is

This section explains the one part that is not obvious: which sample sits on
which wire, and when.

A frame takes N/P cycles. Each index bit of a sample is held either by a
**lane bit** (which of the P wires carries the sample) or by a **time bit**
(in which cycle of the frame it passes).

**Input order.** Lane *l* carries x[l·N/P + t] in cycle *t* of the frame.
The top log₂P index bits are lane bits and the rest are time bits.

**Stages that need no buffer.** While a stage's butterfly bit is a lane bit,
its two inputs are on two lanes in the same cycle. The stage only wires the
right pair of lanes to each butterfly.

**Stages that need a delay commutator.** Once the butterfly bit is a time
bit, a delay commutator goes in front of the stage. It exchanges lane bit 0,
which is already used up, with that time bit.

With time bit K it works like this, for each lane pair (u, v):

1. Lane v is delayed 2^K cycles.
2. Both lanes meet at a switch. The switch crosses when the sample on lane u
   has time bit K set.
3. The upper switch output is delayed another 2^K cycles.

Each sample waits 0, 2^K or 2·2^K cycles, depending on its path. The frame
as a whole is delayed by exactly 2^K.

Rows on each lane at the input of each stage, for the default N = 16, P = 4
(one line per cycle of the frame, lanes 0–3):

| cycle | stages 1 and 2 | stage 3 (after 2-cycle commutator) | stage 4 (after 1-cycle commutator) | output bins |
|---|---|---|---|---|
| 0 | 0 4 8 12 | 0 2 8 10 | 0 1 8 9 | X0 X8 X1 X9 |
| 1 | 1 5 9 13 | 1 3 9 11 | 2 3 10 11 | X4 X12 X5 X13 |
| 2 | 2 6 10 14 | 4 6 12 14 | 4 5 12 13 | X2 X10 X3 X11 |
| 3 | 3 7 11 15 | 5 7 13 15 | 6 7 14 15 | X6 X14 X7 X15 |

The butterflies of stage 1 pair lanes (0,2) and (1,3). Stage 2 pairs (0,1)
and (2,3), and stages 3 and 4 pair (0,1) and (2,3) after the shuffle.

With P = 2 there are commutators in front of stages 2, 3 and 4 (4, 2 and
1 cycles). With P = 8 there is one, in front of stage 4 (1 cycle).

**Tags.** Every sample carries a valid flag and its time index, the **tag**.
The switch decides from the tag, and each rotator rebuilds the sample's row
from its lane number and tag to pick its rotation. The commutator rewrites the
tag bit it exchanges. The last tag gives the `out_index` of each lane.

An assertion in every commutator and butterfly pair checks that paired lanes
carry the same tag.

## Interface and timing (`mdc_fft`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | this cycle carries P input samples |
| `in_re[P]`, `in_im[P]` | in | IW | lane *l* = x[l·N/P + t] |
| `out_valid` | out | 1 | this cycle carries P bins |
| `out_re[P]`, `out_im[P]` | out | OW | bin values |
| `out_index[P]` | out | log₂N | which bin X[k] each lane carries |

**Parameters.** N = 16, P = 4, IW = 16 (input width of each part) and TW = 16
(twiddle width).

**Frames.** A frame is N/P consecutive cycles with `in_valid` high. Any
number of idle cycles may separate frames, but a frame may not be split.
Frames can be sent back to back without limit, so throughput is P samples
per cycle.

**Latency.** The first bins of a frame leave a fixed number of cycles after
its first samples. That number is 1 per butterfly stage, plus 1 per rotator
stage, plus the commutator delays:

| N | P | commutators | latency (cycles) |
|---|---|---|---|
| 16 | 2 | 4 + 2 + 1 | 14 |
| 16 | 4 | 2 + 1 | 10 |
| 16 | 8 | 1 | 8 |
| 64 | 4 | 8 + 4 + 2 + 1 | 26 |

The rest of the frame follows one cycle per cycle. An assertion in `mdc_fft` checks this latency in simulation.

**Output order.** The bins leave in the bit-reversed order of the flow
graph. No reordering buffer is included; use `out_index` to tell which bin is
on which lane.

## Number format

Inputs are signed IW-bit integers. Nothing is scaled, and the words grow as
they go:

* each butterfly adds 1 bit;
* each general rotator adds 1 bit, because a rotation can raise one component
  by up to √2;
* the −j rotator keeps the width. It is applied only to butterfly
  differences, whose range is symmetric, so negating them cannot overflow.

Outputs are OW = IW + log₂N + (number of general rotator stages) bits wide,
which is 21 bits for N = 16. They equal the unnormalised DFT, Σ x[n]·W_N^(nk).

Twiddles are signed TW-bit values with TW−2 fraction bits, so 1.0 = 2^(TW−2)
and ±1 and ±j are exact. The table is computed at elaboration from
cos/sin. After a multiplication the result is rounded by adding half an LSB
and shifting. The only error source is this rounding and the twiddle
quantisation. With full-scale random 16-bit inputs, the outputs stay within
4 LSB of the exact DFT.

**Hardware for N = 16, P = 4.**

* 8 butterflies.
* 3 complex multipliers with 4 real multipliers each. Lane 0 after stage 2
  always sees W⁰, so it gets none; this is detected at elaboration.
* −j multiplexers.
* 4 commutators: 2 with 2-cycle buffers and 2 with 1-cycle buffers.

## Files

| file | content |
|---|---|
| `rtl/mdc_pkg.sv` | elaboration helpers: bit positions per stage, widths, latency, twiddle exponents |
| `rtl/mdc_fft.sv` | top: input time counter, log₂N stages, output bin numbers |
| `rtl/mdc_stage.sv` | one stage: commutators (if any), P/2 butterflies, P rotators, registers |
| `rtl/delay_commutator.sv` | buffer–switch–buffer shuffle for one lane pair |
| `rtl/delay_line.sv` | shift-register buffer |
| `rtl/r2_butterfly.sv` | radix-2 butterfly |
| `rtl/rot_minus_j.sv` | trivial −j rotator |
| `rtl/twiddle_rom.sv` | W_N^m table |
| `rtl/cmult.sv` | rounding complex multiplier |
| `tb/mdc_fft_chk.sv` | shared stimulus and DFT checker for the full pipeline |
| `tb/tb_*.sv` | self-checking testbenches; each prints `TB_RESULT checks=… failures=…` |

## Simulating

Each testbench is self-contained. For example, the default configuration:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mdc_fft \
    rtl/mdc_pkg.sv rtl/*.sv tb/mdc_fft_chk.sv tb/tb_mdc_fft.sv
./obj_dir/Vtb_mdc_fft
```

The other pipeline testbenches work the same way:

* `tb_mdc_fft_p2` and `tb_mdc_fft_p8`: P = 2 and P = 8;
* `tb_mdc_fft_n64`: N = 64.

The unit testbenches (`tb_r2_butterfly`, `tb_rot_minus_j`, `tb_twiddle_rom`,
`tb_cmult`, `tb_delay_commutator`) need only the `rtl/` files and their own
file.

**What the pipeline tests check.** Each one sends 24 frames: impulses, a
constant, and full-scale random data. Frames go both back to back and with
idle cycles in between. Each test checks:

* every bin against a floating-point DFT, to within 16 LSB;
* that every bin of a frame appears exactly once;
* that a frame's output cycles are consecutive;
* the exact latency from the table above.

The tests also count commutator crossings, −j rotations, non-trivial twiddle
products, frames after idle cycles and back-to-back frames. A mechanism that
never occurs counts as a failure.

To change the size, set N, P, IW and TW on `mdc_fft`. The checks reject an
N that is not a power of 4 and a P outside 2…N.

## What follows the source and what is this design's own

**Taken from the source design:**

* the radix-2² DIF algorithm and its rotation pattern (the exponent table
  above);
* the feed-forward multi-path delay commutator structure;
* support for 2, 4 and 8 parallel samples;
* the bit-reversed output order;
* the use of hardware multipliers for the complex products.

**Choices made here:**

* placing the commutators as the classic MDC arrangement;
* the natural input order;
* word widths, full bit growth, rounding and coefficient format;
* the valid/tag handshake that allows idle cycles between frames;
* reset behaviour;
* the `out_index` port;
* removing multipliers on lanes that only see W⁰;
* generalising to N = 4^m.

**Differences from the source, and limits:**

* Only the radix-2² form is provided. Radix-2³ and radix-2⁴ placements of
  the rotations are not included.
* A variant for real-valued inputs, which skips the redundant half of the
  computation, is not included. The pipeline computes complex FFTs only.
* There is no output reordering, so bins come out bit-reversed.
* The source reports an FPGA implementation of 1629 slices, 3202 LUTs,
  1280 I/O pins and 12.198 ns. That result was not reproduced here. The
  device named for it is a small Spartan-3 part with fewer resources and
  pins than reported, so those figures cannot be taken at face value. At its
  defaults this RTL has 316 I/O pins, and it targets no particular device.
* Within a frame, input must be contiguous. No back-pressure is provided.
