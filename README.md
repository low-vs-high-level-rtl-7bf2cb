# Streaming DSP units for beam-instrumentation data acquisition

Three independent FPGA signal-processing units. Each one processes a sample
stream at one input word per clock:

| unit | module | what it computes | throughput | latency |
|---|---|---|---|---|
| ADC linearization | `linearization` | `y = a0 + a1*x + a2*x^2` on every ADC sample, to suppress harmonic spurs | 8 samples (one 128-bit beat) per clock | 6 clocks |
| Beam-spot statistics | `two_dim_stdev` | centre (mean) and size (standard deviation) in X and Y of a 512 x 512 image | 4 pixels per clock | frame + about 68 clocks |
| Biquad filter | `biquad_iir` | second-order IIR filter | 1 sample per clock | 4 clocks |

All three are built to hit the same target: full throughput with no
stalls. For the two feed-forward units this comes from deep pipelining. The
statistics unit and the filter carry state from sample to sample, so the
arithmetic had to be arranged to close the recursive loop in one clock (the
filter) or to push the costly operations out of the per-sample path (the
statistics).

`fpga_dsp_examples_top` places the three units side by side. They share
only `clk` and the active-low synchronous reset `rst_n`, and each unit's
ports appear with a prefix (`lin_`, `st_`, `iir_`).

## ADC linearization (`linearization`, `lin_horner_lane`, `lin_pkg`)

The ADC produces 12-bit samples at 800 MSPS. A front-end interface hands
them over as a 128-bit AXI4-Stream. The unit has an AXI4-Stream slave port
and a master port with the same format, so it can sit between the ADC
interface and a DMA or any later DSP stage, and neither downstream logic
nor software needs to know whether it is there.

**Beat format.** A beat has 8 lanes of 16 bits. Each lane holds a 12-bit
two's-complement sample, right-aligned. The upper 4 bits of an input slot
are ignored. On the output, each slot holds the result sign-extended to 16
bits.

**Polynomial.** Each lane has its own `lin_horner_lane`, which evaluates
Horner's form `y = a0 + x*(a1 + x*a2)`. Every multiplication and every
addition gets its own register stage:

```
stage 1  x1 = x                      (input register)
stage 2  p1 = x1 * a2
stage 3  t1 = p1 + a1
stage 4  p2 = x3 * t1                (x3 = sample delayed to line up with t1)
stage 5  t2 = p2 + a0
stage 6  y  = sat12(round(t2 / 2^20))
```

The sample is a signed integer. The coefficients are signed Q4.20 numbers in
25 bits. The defaults are 2.2854652782872233, 0.9962862193648518 and
-2.506094726425692e-3, stored as 2396484, 1044682 and -2628, and each can
be overridden as a parameter. The result is rounded half up and saturated
to -2048..2047. With these coefficients and integer samples, the
polynomial stays in range only for about -728 <= x <= 1126. Outside that
range the output saturates.

**Bypass.** `bypass` is sampled with each beat. A bypassed beat travels
through the same six registers unchanged, so switching the bypass never
changes the latency or the beat order. This lets the effect of the
correction be compared on a running system.

**Flow control.** The eight lanes share a single clock enable,
`ce = !m_tvalid || m_tready`, and `s_tready = ce`. The whole pipeline
freezes while the output holds a beat that has not been taken. No beat is
lost or duplicated. Throughput is one beat per clock whenever the output is
ready. `tlast` travels with its beat. An assertion checks the AXI4-Stream
rule that a beat, once presented, stays unchanged until it is taken.

## Beam-spot statistics (`two_dim_stdev` and its parts)

The unit measures a camera image of a beam spot and computes, for each
axis, the intensity-weighted mean position and standard deviation.

**Why a one-pass formula.** The textbook method makes two passes: it finds
the mean first and then the squared deviations, so the frame must be
stored. Welford-style running updates avoid the storage but divide on
every sample. This unit instead uses

```
S = sum p      mean_x = sum(x*p) / S      var_x = sum(x^2*p) / S - mean_x^2
```

(and the same for y). Each pixel then costs only multiplications and
additions. Only four divisions and two square roots are needed, once per
frame.

**Data path.**

```
AXI4-Stream -> axis_reg_slice -> frame_accumulator -> 4 x seq_divider -> variance -> 2 x int_sqrt -> result registers
 4 px/clock                       S, Sx, Sy, Sx2, Sy2    (in parallel)     clamp >= 0    (in parallel)     + stats_axil_regs
```

* `axis_reg_slice` registers the pixel stream in both directions
  (`m_tvalid`, `m_tdata` and `s_tready` all come from flip-flops). A
  two-entry skid buffer keeps one beat per clock, at one clock of latency.
* `frame_accumulator` counts beats to find each pixel's position: N/4
  beats per row, N rows, starting from reset. It has four pipeline stages:
  1. register the beat and its position;
  2. form `x*p` and `x^2*p` for each pixel and sum them over the beat;
  3. form the row terms `y*sum(p)` and `y^2*sum(p)`;
  4. accumulate. The first beat of a frame loads the accumulators instead
     of adding.

  The accumulators are 30 bits (S), 38 bits (Sx, Sy) and 45 bits (Sx2,
  Sy2). They cannot overflow for a 512 x 512 frame of 8-bit pixels. The
  largest sums are 6.7e7 < 2^30, 1.7e10 < 2^38 and 5.8e12 < 2^45.
* Four `seq_divider`s (radix-2 restoring, 45 steps) compute `mean_x`,
  `mean_y`, `E[x^2]` and `E[y^2]` as truncated integer quotients.
* The variance is `E[x^2] - mean_x^2`. Both terms are truncated integers,
  so the difference can come out negative; it is then clamped to 0. The
  variance is kept in 18 bits.
* Two `int_sqrt`s (digit by digit, 9 steps) give `floor(sqrt(var))`.

**What the integer rules imply.** The variance subtracts the square of the
truncated mean, `floor(m)^2`, rather than `m^2`. This overestimates the
variance by up to `2m+1`, which matters for a narrow spot far from the
origin. For example, a spot centred near x = 300 with a true sigma of 5
pixels can be reported with a sigma of up to about 25, depending on the
fractional part of its mean. This is part of the algorithm
as specified, and it is kept. To avoid the bias, compute the means with
fractional bits (a wider quotient) before squaring.

**Timing.** A 512 x 512 frame takes 65536 beats. The results appear about
68 clocks after the frame's last beat: 1 clock in the input slice, 4 in the accumulator pipeline,
about 47 for the divisions, 10 for the square roots and a few control
states. `result_valid` then pulses for one clock and `frame_cnt`
increments. The next frame can stream in during the post-processing. An
input stall occurs only when a frame is shorter than the post-processing
(about 64 beats): then the last beat of the next frame is held back
(`s_tready` low) until the unit is free. A frame whose pixels are all zero
reports zeros.

**Register map (`stats_axil_regs`, AXI4-Lite, read-only results).**

| offset | register |
|---|---|
| 0x00 | meanx |
| 0x04 | stdx |
| 0x08 | meany |
| 0x0C | stdy |
| 0x10 | frames completed |

Other offsets read as 0. Writes are answered with OKAY and ignored. The
unit handles one read and one write at a time. The same four results are
also available as plain 16-bit outputs.

## Biquad IIR filter (`biquad_iir`)

The filter computes `H(z) = (b0 + b1 z^-1 + b2 z^-2) / (1 + a1 z^-1 + a2 z^-2)`
in transposed direct form I. The pole section comes first and the zero
section second, both transposed. They share the value `w = x + s1`:

```
s1' = -a1*w + s2      s2' = -a2*w
s3' =  b1*w + s4      s4' =  b2*w
y   =  b0*w + s3
```

**Formats.** Samples and coefficients are signed Q2.16 in 18 bits (range
[-2, 2)). The state `s1` is 25 bits with 16 fraction bits, and `s2..s4`
are 48 bits with 39 fraction bits. These widths match the 25 x 18 x 48-bit
multiply-add structure of common FPGA DSP slices. Every product is exact.
When a value is stored, its low fraction bits are dropped (rounding toward
minus infinity), and it wraps on overflow. The coefficients are inputs.
They should be held constant while samples flow.

**Pipeline (latency 4, interval 1).**

1. Register the input.
2. Form `w` and update all four states in one clock. This is the only
   recursive loop (add, multiply, add), and keeping it within one clock is
   what allows one sample per clock.
3. Form `b0*w + s3`.
4. Register the output.

States change only for samples with `data_in_vld` set. `data_out_vld`
follows each sample 4 clocks later.

## Own choices and departures

These points are not fixed by the algorithms above; they were chosen for
this RTL:

* **Linearization.** The coefficient format (Q4.20), the rounding and the
  saturation are own choices. So are the slot layout (right-aligned,
  signed), the back-pressure scheme and the bypass that keeps the latency.
  An 800 MSPS ADC read at 200 MHz delivers only 4 samples per clock, but
  the 128-bit beat has room for 8 samples of 16 bits. This RTL processes
  all 8 lanes of each beat, which covers both uses.
* **Statistics, accumulators.** The reference algorithm spreads the sums
  over four interleaved accumulators, so that an adder with several clocks
  of latency can still take one beat per clock. Here a single accumulator
  per sum follows an adder tree, with the same results.
* **Statistics, formats.** The pixel width (8 bits) is an own choice. So are
  the 18-bit variance (a 16-bit signed variance would wrap for a spot
  spread over the whole 0..511 range), the clamping of negative variances,
  the zero result for an empty frame and the register map.
* **Statistics, timing.** Frames overlap with post-processing. In the
  reference the next frame waits until the results are out.
* **Filter.** A hand-optimized version of this filter that uses five DSP
  blocks in a B*(D-A)+C arrangement is not reproduced. This RTL follows the
  equations above and leaves DSP mapping to synthesis.
* **Not included.** The ADC interface core, the camera (GigE Vision)
  interface, the DMA and any processor are external and are not part of
  this RTL.
* **Not measured.** Clock frequency and FPGA resources have not been
  measured. Only simulation and generic synthesis have been run.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. It
ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_lin_horner_lane`: random and extreme samples with a random clock
  enable and bypass. Compared bit-exactly with an integer model and,
  where unsaturated, within 1 LSB of the real-valued polynomial. The
  6-stage latency is checked.
* `tb_linearization`: random traffic with gaps, back-pressure and bypass.
  Every beat is checked in order. Latency 6 and one beat per clock are
  checked.
* `tb_frame_accumulator`: 16 x 16 frames (random, full-scale), random
  gaps and `hold`. All five sums are checked, and two frames must pass in
  2 x 64 clocks.
* `tb_seq_divider`, `tb_int_sqrt`: corner cases and random operands at
  the default widths, with exact step counts.
* `tb_axis_reg_slice`: random gaps and back-pressure. Every beat must
  arrive once and in order, and a burst must pass at one beat per clock.
* `tb_stats_axil_regs`: reads with delayed and immediate ready, an
  unmapped address, and a write.
* `tb_two_dim_stdev`: 8 x 8 frames (which force input stalls) and 64 x 64
  Gaussian spots. Results are checked against the integer rules and the
  means against the exact centroid. Results are also read over AXI4-Lite.
* `tb_biquad_iir`: low-pass, resonant and FIR coefficient sets, with
  impulses, steps and noise. Outputs are compared bit-exactly with a
  64-bit integer model and within 2^-10 of a real-valued filter. Latency 4
  and one sample per clock are checked.
* `tb_fpga_dsp_examples_top`: all three units at their default sizes at
  once. This includes two full 512 x 512 frames (a Gaussian spot and a
  two-spot image). It counts bypass, back-pressure, saturation, frame
  completion, register reads and filter outputs, and fails if any of them
  never happens.

## Simulating

The packages must be compiled before the modules that use them. For
example, for the full design:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fpga_dsp_examples_top \
  -y rtl -y tb +libext+.sv rtl/lin_pkg.sv rtl/stats_pkg.sv tb/tb_fpga_dsp_examples_top.sv
./obj_dir/Vtb_fpga_dsp_examples_top
```

`-Wno-fatal` keeps the testbenches' width warnings from stopping the
build. Replace the testbench name to run any other test. The full-size top-level
test runs in a few seconds.

## Changing it

* Linearization coefficients: the `A0`/`A1`/`A2` parameters of
  `linearization` (Q4.20 integers, i.e. `round(c * 2^20)`). The number of
  lanes: `LANES`.
* Frame size: `N` of `two_dim_stdev` (a multiple of `INPUT_W`, at most
  512 with the default accumulator widths). Larger frames or wider pixels
  need wider sums in `stats_pkg`.
* Filter formats: `FIX_W`/`FIX_I`, `S1_W`/`S1_I`, `S_W`/`S_I` of
  `biquad_iir`. `s1` must keep the sample's number of fraction bits.
