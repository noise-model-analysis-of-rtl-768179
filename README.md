# 32-point mixed-radix 4-4-2 pipelined FFT for pulsed OFDM

Pulsed OFDM (P-OFDM) is an ultra-wideband variant of multi-band OFDM. Its
transmitter and receiver each need a 32-point FFT at a high sample rate. This
RTL implements that FFT as a **buffered mixed-radix multi-path delay
commutator pipeline with radices 4, 4 and 2** (BMRMDC442):

* Four complex samples enter per clock, so one 32-point frame takes 8 clocks.
  Frames can follow each other with no gap.
* It has three butterfly stages: radix-4, radix-4, then a pair of radix-2s.
  A radix-2 design would need five.
* Twiddle multipliers sit after the first two stages.
* Delay-and-switch networks (commutators) between the stages move the
  samples each butterfly needs onto parallel lanes.

Arithmetic follows one rule, chosen to keep hardware small at a known noise
level:

* Butterflies never round. They grow the word by 2 bits (radix-4) or 1 bit
  (radix-2).
* Only non-trivial twiddle multipliers round, back to their input
  wordlength.
* Trivial twiddles (1, -j, -1, +j) are done exactly, by swapping and negating
  components, with no multiplier.

The defaults are 10-bit input samples and 12-bit twiddle coefficients, which
gives 15-bit outputs.

This design is based on the architecture in *Noise Model Analysis of
Optimized Mixed-Radix Structures for Pulsed OFDM*. That paper gives the
architecture's block diagram, its wordlength rules and its default
wordlengths. The control logic, the buffer organisation, the exact index
mapping, the rounding mode and the overflow handling are choices made here.
They are listed under [Departures and own choices](#departures-and-own-choices).

## The algorithm

Write the input frame as `x[n]`, `n = 0..31`. The pipeline computes the
forward DFT

    X[k] = sum_n x[n] * W^(n*k),    W = exp(-j*2*pi/32)

with no scaling. It uses decimation in frequency with the index split
`n = t + 8*l`, where `t = 0..7` and `l = 0..3`.

1. **Stage 1 (R4BF + WB0).** Each clock `t` takes a 4-point DFT over
   `x[t], x[t+8], x[t+16], x[t+24]`. Output lane `m` is then multiplied by
   `W^(m*t)`. The result `y_m[t]` is an 8-point sequence for each `m`, and
   `X[m + 4k'] = DFT8(y_m)[k']`.
2. **Stage 2 (R4BF + WB1).** Each 8-point DFT is split again with
   `t = t' + 2*l`, where `t' = 0..1`. Take a 4-point DFT over
   `y_m[t'], y_m[t'+2], y_m[t'+4], y_m[t'+6]`, then multiply lane `q` by
   `W8^(q*t')`.
3. **Stage 3 (2 x R2BF).** A 2-point DFT over `t' = 0, 1` gives
   `X[m + 4q]` and `X[m + 4q + 16]`.

Only some of the twiddles are non-trivial. In stage 1, 20 of the 32 factors
`W^(m*t)` are non-trivial (5/8). In stage 2, 8 of 32 are (1/4): `W8^1` and
`W8^3`. So multipliers exist only on WB0 lanes 1-3 and on WB1 lanes 1 and 3.

## Dataflow and the commutators

The hard part of an MDC pipeline is getting the right samples side by side
at each butterfly. Stage 1's butterfly combines samples that arrive
*together*, one per lane. Stage 2's butterfly needs samples that arrived at
*different times on the same lane*. A commutator turns the one arrangement
into the other with three steps:

* **Skew:** delay input lane `i` by `BLK*i` clocks.
* **Switch:** each output lane `j` has an `NL:1` multiplexer.
* **Deskew:** delay output lane `j` by `BLK*(NL-1-j)` clocks.

The net effect is a transpose of lanes against blocks of `BLK` samples. What
was on lane `m` in block `b` leaves on lane `b` in block `m`.

| commutator | lanes per group | block | delays in | delays out | muxes | latency |
|---|---|---|---|---|---|---|
| SB0 | 4 | 2 samples | 0, 2, 4, 6 | 6, 4, 2, 0 | 4:1 per lane | 6 |
| SB1 | 2 (two groups) | 1 sample | 0, 1 | 1, 0 | 2:1 per lane | 1 |

After SB0, lane `j` at frame clock `2m + t'` carries `y_m[t' + 2j]`. That is
exactly the four inputs the second radix-4 butterfly needs. After SB1, each
radix-2 butterfly sees the two `t'` values of one `(m, q)` pair.

Mux selects must line up with the skewed data. The rule is simple: output
`j`'s select is the frame index of the sample currently on skewed input lane
`j`, divided by `BLK`. The control unit gets this from a delayed copy of the
sample index (next section), so no select depends on when the previous frame
ended.

### Output order

The pipeline does not reorder its output. At output clock `c` (`c = 0..7`;
`vout2` marks `c = 0`), let `m = c/2` and `r = c%2`. Then:

| output | `out_re/out_im[0]` | `[1]` | `[2]` | `[3]` |
|---|---|---|---|---|
| bin | `X[m+4r]` | `X[m+4r+16]` | `X[m+4r+8]` | `X[m+4r+24]` |

For example, clock 0 gives bins 0, 16, 8 and 24, and clock 1 gives bins 4,
20, 12 and 28. A downstream block that needs natural order must buffer one
frame.

## Control

`mrmdc442_cu` numbers the samples of each frame (`0..7`, one per clock while
`vin` is high). It pushes the tag `{valid, index}` into a 12-stage shift
register. Each control signal is a tap of that register, taken at the delay
where its stage sees the frame:

| control | tap (clocks after input) | value |
|---|---|---|
| `wb0_sel` | 1 | index `t` (exponent `m*t`) |
| `sb0_sel[j]` | 2 + 2j | index / 2 |
| `wb1_sel` | 9 | index; bit 0 is `t'` |
| `sb1_sel[j]` | 10 + j | index bit 0 |
| `vout1`, `vout2` | 12 | valid, and valid with index 0 |

Because every control travels with its data, frames may be separated by gaps
of any length, odd or even. Inside a frame, `vin` must stay high for 8
consecutive clocks. An assertion in the control unit checks this.

## Input buffer

The first butterfly needs `x[t], x[t+8], x[t+16], x[t+24]` on the same
clock, but samples arrive in natural order: `x[4c..4c+3]` at clock `c`. So
`input_buffer` stores each frame before passing it on:

* **Size:** 4 banks x 16 words, which is two 32-sample halves. One half is
  written while the other is read (ping-pong).
* **Placement:** sample `n` goes to bank `(n + n/8) mod 4`, row `n/4`. With
  this skew, the four samples written together and the four read together
  always sit in different banks. Each bank then needs only one write port and
  one read port.
* **Timing:** reading starts the clock after a frame's last write and lasts 8
  clocks. A frame takes at least 8 clocks to write, so a read always finishes
  before its half is overwritten.

## Arithmetic

| point | width at DW = 10 | rule |
|---|---|---|
| input | 10 | |
| after R4BF 1 / WB0 | 12 | +2 bits; WB0 rounds back to 12 |
| after R4BF 2 / WB1 | 14 | +2 bits; WB1 rounds back to 14 |
| output (R2BF) | 15 | +1 bit |

**Coefficients.** Twiddle coefficients are `round(2^(TW-1) * cos)` and
`round(-2^(TW-1) * sin)`: one sign bit and `TW-1` fraction bits. They are
computed during elaboration (`twiddle_rom`), so changing `TW` regenerates
the table.

**Multiplier.** `cmult` forms `xr*wr - xi*wi` and `xr*wi + xi*wr` exactly.
It then drops `TW-1` bits with round-half-to-even, which is unbiased, and
saturates to the data width.

**Saturation.** Saturation is needed because the multiplier keeps its input
width. A full-scale stage-1 sample such as `2044 + 2044j`, rotated by 45
degrees, has a real part of about 2890, which does not fit in 12 bits.
Negating the most negative code in a trivial rotation also saturates. The
`sat` output flags multiplier saturations.

**Measured error.** Defaults, one million frames of uniform random
full-range input, compared with an exact DFT:

* About 67.4 dB signal-to-error ratio, or 1.0 output-LSB² of error per bin,
  on frames where nothing saturated.
* About 56.4 dB over all frames. About 1 frame in 270 saturates, and each
  saturation costs far more than rounding does.

Saturation cannot happen with about 3 dB of input back-off, that is, with
each input component within `±0.7 * 2^(DW-1)`. Every sample's magnitude
then stays below the range of the next stage, even after rotation.

**Wordlength sweep.** Signal-to-error ratio in dB (400 frames per point,
frames with a saturation left out):

| DW \ TW | 8 | 10 | 12 | 14 |
|---|---|---|---|---|
| 8 | 47.8 | 55.5 | 55.7 | 55.8 |
| 10 | 48.4 | 64.8 | 67.4 | 67.8 |
| 12 | 48.5 | 67.4 | 75.8 | 79.0 |
| 14 | 48.5 | 67.8 | 77.7 | 84.9 |

Each row and each column flattens out: the error stops improving once one
wordlength is well past the other. Twiddle rounding sets a hard floor.
With 8-bit coefficients, no amount of data precision gets past about 48 dB.

## Interface and timing

Top module `bmrmdc442_fft #(DW = 10, TW = 12)`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset |
| `in_valid` | in | 1 | high for 8 consecutive clocks per frame |
| `in_re[4]`, `in_im[4]` | in | DW | `x[4c+j]` on lane `j` at frame clock `c` |
| `out_re[4]`, `out_im[4]` | out | DW+5 | four bins per clock, order above |
| `vout1` | out | 1 | output valid (8 clocks per frame) |
| `vout2` | out | 1 | first output clock of a frame |
| `sat` | out | 1 | a twiddle multiplier saturated |

Latencies count from the clock an input is presented to the clock the result
is presented:

* input buffer: 2 clocks, from the frame's last input clock to the pipeline's
  first input clock;
* pipeline (`mrmdc442_core`): 12 clocks, `vin` to `vout1`;
* whole design: 14 clocks, from the last input clock to `vout2`.

Throughput is one frame per 8 clocks. Back-to-back input frames give
back-to-back output frames.

`mrmdc442_core` can be used without the buffer. It takes `vin` and the
decimated order `x[t + 8l]` on lane `l` at frame clock `t`.

## Module hierarchy

    bmrmdc442_fft          top: buffer + pipeline
      input_buffer         ping-pong 4 x 16 reorder RAM
      mrmdc442_core        the pipeline
        mrmdc442_cu        sample tags and stage controls
        r4bf               radix-4 butterfly (x2)
        twiddle_stage      WB0 / WB1 (STEP, KMASK select which)
          twiddle_rom      elaboration-time coefficient table
          cmult            rounding, saturating complex multiplier
        commutator         SB0 / SB1
          delay_line       register delay chains
        r2bf               radix-2 butterfly (x2)
    fft442_pkg             FFT size, stage latencies, coefficient function

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Testbenches share a bit-exact frame model,
`tb/fft442_ref_pkg.sv`. It is written as plain loops with no pipeline, so it
checks the dataflow as well as the arithmetic. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/fft442_pkg.sv tb/fft442_ref_pkg.sv tb/tb_bmrmdc442_fft.sv \
      --top-module tb_bmrmdc442_fft -o sim
    ./obj_dir/sim

| testbench | what it covers |
|---|---|
| `tb_bmrmdc442_fft` | See below. |
| `tb_computation_error` | One million random frames at the defaults, bit-exact; reports the error figures above (about a minute). |
| `tb_wordlength_sweep` | Sixteen pipelines (DW, TW in 8..14), each bit-exact; checks the trends and the floor above. |
| `tb_mrmdc442_core` | Pipeline alone, bit-exact, 12-clock latency, with gaps. |
| `tb_input_buffer` | Reorder, ping-pong overlap, 2-clock latency. |
| `tb_mrmdc442_cu` | Every control tap against frame timing, with gaps. |
| `tb_commutator` | SB0 and SB1 transposes with labelled samples. |
| `tb_twiddle_stage` | WB0 and WB1, all indices and lanes, trivial and non-trivial. |
| `tb_cmult` | Rounding ties and saturation against an integer model. |
| `tb_r4bf`, `tb_r2bf` | Butterflies, including full-scale inputs. |

`tb_bmrmdc442_fft` runs the full design at its default parameters:

* 200 frames, back to back and with odd and even gaps;
* bit-exact checks on every output;
* latency and throughput checks;
* it counts trivial twiddles, multiplications, saturations, back-to-back
  frames and gaps, and fails if any of them never happens.

## Departures and own choices

* **Variant.** Only the 4-4-2 variant is built. The radix-2 (BR2MDC) and
  radix-8/4 (BMRMDC84) pipelines were only compared against in the source
  paper. The other transceiver blocks around the FFT are not included:
  encoder, interleavers, QPSK mapping, CP/GI insertion, the x4 upsampler, the
  diversity combiner and the analog front end.
* **Twiddle wordlength.** "Twiddle wordlength 12" is read as 12 bits in
  total. The paper's result plots label formats like `Fix14-12`, which may
  mean 12 *fraction* bits. To get that reading, set `TW = 13`.
* **Transform direction.** The transform is the forward DFT. For an inverse
  transform, swap real and imaginary parts at the input and at the output.
* **Invented here.** The following are not taken from the source:
  * the input format (four samples per clock, natural order);
  * the index mapping and output order;
  * the buffer's bank skew;
  * the tag-based control unit. The source shows a single 2-bit SB0 control
    and a single WB1/SB1 control. Here they are per-lane taps.
  * the meanings of `vout1`/`vout2`;
  * round-half-to-even rounding;
  * saturation;
  * one register per stage;
  * asynchronous reset.
* **SB1 output delays.** The source drawing of the delays after SB1 could not
  be matched. The delays used (1 clock on the first lane of each pair) are
  the ones the 2x2 transpose requires.
* **Output order.** No output reordering is done.
* **Resources.** This RTL has five complex multipliers, which is 20 real
  multipliers. The published FPGA figures for this variant list 24 DSP
  blocks, four more than here; where those four sit is not stated. Here the
  delay lines are plain resettable registers. The `delay_line` module is the
  place to map them onto shift-register or RAM primitives.
