# Crosstalk-resistant adaptive decorrelator

Two microphones a few centimetres apart each pick up two talkers (or a talker
and a radio). Each microphone signal is its own source plus a filtered copy of
the other source, leaking in through the room. This design removes that
leakage in real time. It does not filter either signal. It estimates the two
cross paths and subtracts them, leaving two outputs that are decorrelated
from each other. Each output is an estimate of one source.

The method is the *crosstalk-resistant adaptive noise canceller* (CRANC), also
called the *symmetric adaptive decorrelator*: two LMS adaptive filters,
cross-coupled so that each is driven by the other's output. The RTL is written
for an FPGA that samples both channels at about 33 kHz from a 40 MHz clock. It
runs the decorrelator as a pipelined cascade of shorter stages.

## The algorithm

Write `s1(k)`, `s2(k)` for the two microphone samples. Write `e1(k)`, `e2(k)`
for the two outputs. Each channel has a weight vector of N taps. Each channel
also has a delay line holding the other channel's last N outputs:

    X1(k) = [e2(k-1), e2(k-2), ..., e2(k-N)]
    X2(k) = [e1(k-1), e1(k-2), ..., e1(k-N)]

    e1(k) = s1(k) - X1(k)^T w1(k)
    e2(k) = s2(k) - X2(k)^T w2(k)

    w1(k+1) = w1(k) + mu * e1(k) * X1(k)
    w2(k+1) = w2(k) + mu * e2(k) * X2(k)

The model behind it assumes that the forward path of each source to its own
microphone is unity (or is absorbed into the source). It also assumes the
cross paths are strictly causal: the cross filters have no tap at lag 0. At
convergence, w1 approximates the path from source 2 into microphone 1, and
w2 the path from source 1 into microphone 2.
The estimate is known to be biased. It is not the least-squares optimum, but
it is cheap and separates speech well.

The step size is a power of two, `mu = 2^-7`, so the update needs a shift and
no multiplier. All data are signed fixed point: 24 bits with 4 integer bits
(sign included) and 20 fraction bits (Q4.20) by default.

## Splitting the work for speed

Every sample costs about 4N multiplications and 4N additions. Two
tricks reduce the time per sample without touching the feedback loop:

**Split dot products.** Each vector is cut into a first half and a second
half of `M = N/2` entries:

    X^T w = X_first^T w_first + X_second^T w_second

The two halves run as two multiply-accumulate loops in parallel, one entry
per clock, and are added at the end. The weight update walks both halves in
parallel the same way. Both channels run at once as well. One stage therefore
has eight memories: first and second half of `w1`, `w2`, `X1`, `X2`.

**Cascade of stages.** A decorrelator with two inputs also has two outputs,
so a long decorrelator can be cut into several short ones in cascade. The
feedback loop inside a stage must not be pipelined, because an extra delay in
the loop would destabilise the adaptation. Between stages, however, a
register is harmless. Every stage keeps its last result in output registers.
On each new sample all stages start together:

- stage 0 works on the new sample;
- stage i works on the result that stage i-1 left from the previous sample.

The stages run concurrently, and each extra stage adds one sample of delay.
The default build has two stages:

| stage | weights per channel | storage |
|-------|---------------------|---------|
| 1 | 50 | flip-flops (`USE_BRAM = 0`) |
| 2 | 42 | block RAM (`USE_BRAM = 1`) |

That gives 92 weights per channel in total. Counting all 92 as reach,
they would span 92 × 30 µs at 33.3 kHz, about 0.94 m of acoustic path at
340 m/s.

**The cascade does not add reach for a single long path.** Each stage
models cross-path lags only up to its own length. A cross path whose delay
exceeds the longest stage is not cancelled by any stage. Simulation of the
default build with a single cross path shows this:

| cross-path lag (samples) | crosstalk reduction |
|--------------------------|---------------------|
| 3 | 14 dB |
| 45 | 14 dB |
| 60 | none |
| 75 | none |

The lags are measured in samples. So size the longest stage, not the total,
for the longest path to be removed. A single stage of 92 weights would cover
all 92 lags, at twice the time per sample.

A second configuration of three stages of 100 weights in 16-bit Q3.13 is
reached by parameters (see below).

## Inside one stage (`cranc_stage`)

Per sample the stage controller runs through these states:

| state | cycles | work |
|-------|--------|------|
| `ST_DOT` | M+1 | both channels, both halves: read `w[i]` and `X[i]`, accumulate products (memory reads are registered, hence the +1) |
| `ST_ERR` | 1 | `e = sat(s - round((accFirst + accSecond) / 2^F))` |
| `ST_UPD` | M+1 | read `w[i]`, `X[i]`; write `w[i] + round(e * X[i] / 2^(F+7))`, saturated |
| `ST_SH0`, `ST_SH1` | 2 | shift the delay lines |

`done` pulses `2M + 5` cycles after `start` was taken. That is 55 cycles for
N = 50, against 1200 clock cycles in one 33.3 kHz sample period at 40 MHz.

**The delay line** is the least obvious part. Shifting 2 × N words every
sample is cheap in flip-flops but impossible in a RAM. So each half is a
circular buffer of M words, and both halves share one base pointer `ptr`.
Lag `i` of a half sits at address `(ptr + i) mod M`. To push a new value:

1. Move `ptr` back by one. The new `ptr` addresses the oldest entry of each half.
2. Read the oldest entry of the first half (lag M-1, which is about to become lag M).
3. Write it into the second half at the same address. That overwrites lag N-1,
   which leaves the line.
4. Write the new error into the first half there.

X1 receives `e2` and X2 receives `e1`: this is the cross-coupling.

**Rounding.** Every rescale by `2^-F` (and by `2^-(F+7)` in the update) rounds
to nearest, half up. This matters. Near convergence the update term
`mu * e * x` is only a few LSBs. Truncation would pull every weight down by
half an LSB per sample. In the 16-bit build that bias is as large as the
gradient, and the separation then vanished completely in simulation.
Everything that is stored saturates to W bits. `sat` reports a saturated
error value.

**Clearing.** After reset, and whenever `clear` is seen while idle, the stage
writes zeros to all addresses in M cycles and zeroes its outputs.

## The full path (`cranc_top`)

    adc1/adc2 -> x adc_scale -> AGC (optional) -> stage 0 -> ... -> stage NSTAGES-1 -> x dac_scale -> dac1/dac2

- `sample_valid` / `ready`: a sample is taken when both are high. A sample
  offered while busy is dropped and `overrun` pulses.
- `dac_valid` pulses with the result `2 * max(TAPS)/2 + 7` cycles after the
  sample was taken. That is 57 cycles by default.
- `straight_through` skips the decorrelator. The scaled (and AGC'd) input goes
  to the DAC one cycle later. This is how the effect of the decorrelator can be
  compared on and off.
- `reset_weights` clears every stage. While it is high, samples also go straight
  through, which is what a cleared decorrelator outputs anyway.
- `adc_scale`, `dac_scale`: fixed-point gain factors for the converter words.
- `agc_en`, `agc_setpoint`: the input AGCs; `agc_gain1/2` show their gains.

### Automatic gain control (`agc`)

Each input can be passed through an AGC that protects against saturation. It is
a loop of four parts:

- a multiplier acting as the variable-gain amplifier;
- an absolute-value envelope detector;
- a set point (normally 1.0);
- a leaky integrator `(1-alpha)/(1-alpha z^-1)` with `alpha = 2^-1`.

The loop equations are:

    y(k) = x(k) * g(k-1)
    g(k) = alpha * g(k-1) + (1-alpha) * (setpoint - |y(k)|)

A larger envelope lowers the gain. The leak keeps the gain bounded when the
input is silent. The price is a steady-state error: for a constant envelope
`|x|` the gain settles at `setpoint / (1 + |x|)`. A pure integrator would
remove this error but would run away on a silent input. The gain resets to
1.0. With `agc_en` low the input passes unchanged and the gain holds.

## Parameters

`cranc_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| `NSTAGES` | 2 | stages in the cascade |
| `TAPS[NSTAGES]` | `'{50, 42}` | weights per channel in each stage; must be even |
| `USE_BRAM[NSTAGES]` | `'{0, 1}` | storage of each stage: flip-flops or block RAM |
| `W`, `F` | 24, 20 | word and fraction width |
| `MU_SHIFT` | 7 | step size `mu = 2^-MU_SHIFT` |
| `ALPHA_SHIFT` | 1 | AGC filter pole `alpha = 2^-ALPHA_SHIFT` |

The three-stage, 300-weight, 16-bit build:

    cranc_top #(.NSTAGES(3), .TAPS(T3), .USE_BRAM(B3), .W(16), .F(13))

Here `T3 = '{100,100,100}` and `B3 = '{0,0,0}` are local parameter arrays.
Pass named arrays, not literal patterns: some tools size a literal against
the default `NSTAGES`. This build needs 107 cycles per sample.

With the default stages, the design cancels cross paths up to 50 samples
long, the length of its longest stage. Longer filters, e.g. 111 to 150
weights at lower sample rates, need larger `TAPS`. The cycle budget is never the limit: even
150 weights (`TAPS = '{76, 74}`, tested) need only 83 cycles.

## Files

| file | content |
|------|---------|
| `rtl/cranc_pkg.sv` | default sizes, step size, stage controller states |
| `rtl/vec_mem.sv` | one half-vector memory: one write port, registered read port |
| `rtl/cranc_stage.sv` | one cross-coupled LMS stage |
| `rtl/agc.sv` | automatic gain control |
| `rtl/cranc_top.sv` | scaling, AGCs, cascade, controls |
| `tb/tb_vec_mem.sv` | memory test, both storage styles |
| `tb/tb_cranc_stage.sv` | stage against a bit-exact reference model |
| `tb/tb_agc.sv` | AGC against a reference model, settled gain, pass-through |
| `tb/tb_cranc_top.sv` | whole design at default parameters |
| `tb/tb_cranc_top_3x100.sv` | three 100-weight stages, Q3.13 |
| `tb/tb_cranc_top_150.sv` | 150 weights (76 + 74), for low sample rates |

## Verification

Every testbench checks the design against a reference model written with
64-bit integers in the testbench. Every output word is compared bit for bit,
and the latencies above are checked cycle by cycle.

The two top-level tests mix two independent random sources through these
cross paths:

    s1(k) = t1(k) + 0.6 t2(k-1) + 0.25 t2(k-3)
    s2(k) = t2(k) + 0.5 t1(k-1)

They then measure how much of source 2 is left in output 1 after adaptation:

| build | crosstalk reduction | test requires |
|-------|---------------------|---------------|
| default | about 15 dB | 10 dB |
| 16-bit, 3 × 100 | about 9 dB | 6 dB |
| 76 + 74 weights | about 12 dB | 10 dB |

With 300 weights and 13 fraction bits, the weight noise near convergence
leaves more crosstalk behind. The same tests exercise straight-through mode,
weight reset, an overrun, the AGC and saturation, and check that each occurred.

To simulate with Verilator, for example the top-level test:

    verilator --binary --timing --assert -Irtl rtl/cranc_pkg.sv rtl/vec_mem.sv \
        rtl/cranc_stage.sv rtl/agc.sv rtl/cranc_top.sv tb/tb_cranc_top.sv \
        --top-module tb_cranc_top
    ./obj_dir/Vtb_cranc_top

Each test prints `TB_RESULT checks=<n> failures=<m>`. The default top-level
test runs about 30,000 samples in a couple of seconds.

## Where this RTL departs from, or goes beyond, the original design

The original design was drawn in a graphical data-flow language and compiled
for an FPGA board. This RTL follows its structure but decides what that
description leaves open:

- The delay-line storage, the handshake (`start`/`done`, `sample_valid`/`ready`,
  `overrun`) and the exact cycle schedule are this design's own.
- Rounding to nearest and saturation are chosen here; the original's modes are
  unknown.
- Both storage styles use the same registered-read memory model. `USE_BRAM`
  only changes the synthesis hint (`ram_style`); flip-flop storage is not
  faster here.
- Straight-through and weight-reset behaviour, the order of A/D scaling and
  AGC, and the one-sample delay of the gain inside the AGC loop are
  interpretations.
- The AGC pole `alpha = 1/2` is the stated value. It gives a loop far faster
  than the "few Hz" bandwidth the AGC was meant to have. `ALPHA_SHIFT` is a
  parameter for that reason.
- Not included:
  - a run-time control for the number of weights (it is a parameter here);
  - an output volume control;
  - start/stop of the acquisition loop;
  - the converters, the host link and the board itself. The converters are
    reached through `adc1/adc2/sample_valid` and `dac1/dac2/dac_valid`.
