# Hybrid polyphase/Farrow sampling rate converter, 8 kHz to 44.1 kHz

Going from 8 kHz to 44.1 kHz means changing the rate by 441/80. A plain
polyphase resampler for that ratio needs one coefficient set per output
phase: hundreds to thousands of stored coefficients. A Farrow resampler
needs very few coefficients. But if its input is band-limited only to the
8 kHz Nyquist band, it needs a long, high-order polynomial filter to keep
the images out.

This converter splits the ratio so that each filter type does what it is
good at:

```
 8 kHz, 12 bit          32 kHz, 12 bit                     44.1 kHz, 12 bit
 ───────────► polyphase ──────────────► Farrow resampler ─────────────►
              interpolator x4           ratio 441/320, cubic in mu
              (20 taps, 4 branches)     (4x4 sub-filter coefficients)
```

1. **Polyphase interpolator, factor 4.** It raises the rate to 32 kHz. An
   integer factor is where a polyphase filter is cheapest: 20 coefficients,
   split into 4 branches of 5.
2. **Farrow resampler.** It covers the remaining fractional factor
   441/320. It interpolates the 32 kHz stream at any fractional position mu
   with a cubic polynomial whose coefficients are 4 fixed FIR sub-filters.
   The stage 1 low-pass already removes everything above 4 kHz, so the
   signal is heavily oversampled at 32 kHz, and a short cubic interpolator
   is enough.

In all, 36 coefficients are stored. Every stage boundary carries 12-bit
two's-complement samples, so word lengths cannot grow from stage to stage.
The Farrow ratio is a run-time input. The same hardware therefore converts
to any other output rate, including ratios that are not rational, to
2^-32 precision.

## Stage 1: polyphase interpolator (`polyphase_interpolator`, `polyphase_branch`)

The textbook interpolator inserts three zeros after every input sample and
low-pass filters at 32 kHz. Three out of four multiplications then hit a
zero. The polyphase form avoids them. It writes the filter as
`H(z) = sum_k z^-k E_k(z^4)`, where branch `E_k` holds every fourth
coefficient starting at `h[k]`. All four branches work on the same
5-sample delay line of *input* samples. Output `4m+k` is simply
`E_k` evaluated after input `m`:

```
y[4m+k] = sum_{n=0..4} h[4n+k] * x[m-n]        k = 0, 1, 2, 3
```

In the hardware:

- The four `polyphase_branch` instances are combinational dot products.
  They are all evaluated in parallel from the registered delay line.
- A 2-bit commutator (`phase`) selects which branch result goes out, `E_0`
  first.
- Each result carries 14 fractional bits. It is rounded half up and
  saturated to 12 bits (`src_pkg::requant`).

**Coefficients.** The prototype is a 20-tap Hamming-windowed sinc with its
cut-off at 4 kHz. Each branch is then scaled to a DC gain of exactly 1:
every branch sums to 16384 in Q2.14. The full formula is in `src_pkg.sv`.
Equal branch gains keep a DC input from leaving an 8 kHz image in the
32 kHz stream. Computed from the quantised taps, the gain of the 32 kHz
stream relative to the input is:

| frequency | 1 kHz  | 3 kHz  | 5 kHz  | 7 kHz (image of 1 kHz) | 9 kHz   |
|-----------|--------|--------|--------|------------------------|---------|
| gain      | 0.996  | 0.79   | 0.21   | 0.0038 (-48 dB)        | 0.0003  |

With only 20 taps the filter is gentle. The passband droops by about 2 dB
at 3 kHz, and the nearest image is only 48 dB down. That limits the
quality of the whole converter (see *Accuracy*). To get a sharper filter,
give a longer table through the `H` and `TPP` parameters.

## Stage 2: Farrow resampler (`farrow_resampler`, `farrow_subfilters`, `farrow_horner`)

This stage is the heart of the design and the least obvious part.

### What it computes

A Farrow filter approximates a fractional-delay FIR whose taps change
with the delay mu. Each tap is a polynomial in mu:
`h_mu(i) = sum_n b_n(i) mu^n`. Reordering the sums gives a fixed-FIR
form:

```
v_n = sum_{i=0..3} b_n(i) * x[k-i]          (4 fixed sub-filters, n = 0..3)
y   = ((v_3*mu + v_2)*mu + v_1)*mu + v_0    (Horner's rule, 3 multipliers)
```

The `b_n(i)` are the cubic Lagrange interpolator. Its output for
mu = 0 to 1 runs from `x[k-2]` to `x[k-1]`:

```
b_0 = [   0,    0,    1,    0 ]        i = 0 is the newest sample x[k]
b_1 = [-1/6,    1, -1/2, -1/3 ]
b_2 = [   0,  1/2,   -1,  1/2 ]
b_3 = [ 1/6, -1/2,  1/2, -1/6 ]
```

### Sub-filters in transposed form

`farrow_subfilters` does not keep a delay line of samples. Instead, each
new sample is multiplied at once by all 16 constants. The products go into
a chain of partial-sum registers per sub-filter:

- `v_n <= b_n(0)x + s_n1`
- `s_n1 <= b_n(1)x + s_n2`
- and so on down the chain.

The products are all by constants, so they reduce to shifts and adds (7 of
the 16 coefficients are 0 or ±1). The `v_n` are registered. They change
only when an input is loaded.

### Where the output falls: the phase accumulator

`farrow_resampler` keeps the time of the next output on the input time
axis in two registers:

- `frac`: 32 bits, the fractional part, i.e. mu.
- `owed`: the number of input samples still to be taken before that output
  can be formed.

The stage alternates between two states:

- **`owed != 0`**: `in_ready` is high. Each accepted sample updates the
  sub-filters and decrements `owed`.
- **`owed == 0`**: `out_valid` is high. The output is Horner's rule on the
  held `v_n` with `mu = frac[31:16]`. When it is taken, `{owed, frac}` is
  set to `frac + step`.

`step` is the output period measured in input periods (f_in/f_out), in
unsigned 4.32 fixed point. For 32 kHz to 44.1 kHz it is `32000/44100 = 0.7256`. Each
input is therefore followed by one or two outputs: 441 outputs per 320
inputs. A step above 1 makes one output consume several inputs
(decimation). The constant `src_pkg::STEP_32K_TO_44K1` is
`ceil(2^32 * 32000/44100)`. Rounding up makes each 10 ms block give exactly
441 outputs. Rounding down would give an occasional 442nd output at a block
boundary.

With `k` inputs taken so far (the newest is `x[k-1]`), output `n` lies at
position `P_n = n*step` and is formed from `x[floor(P_n)-i]`. It
interpolates between `x[floor(P_n)-2]` and `x[floor(P_n)-1]`. The Farrow
stage therefore delays the signal by 2 intermediate samples. Together with
the 9.5-sample delay of the stage 1 filter, output `n` approximates the
input signal at time `(n*step/2^32 - 11.5) / 32000` s, where input `m` is
at `m/8000` s.

`step` is read only when an output is taken. Changing it between outputs
switches the output rate without a glitch. After reset, one input is owed
and mu = 0.

## Interfaces and timing

All modules use one clock and an asynchronous active-low reset `rst_n`.
Reset clears the delay lines and partial sums to zero.

`hybrid_src` ports:

| port          | dir | width | meaning                                              |
|---------------|-----|-------|------------------------------------------------------|
| `in_valid/in_ready/in_data`    | in/out/in | 1/1/12 | input stream (8 kHz samples)  |
| `out_valid/out_ready/out_data` | out/in/out | 1/1/12 | output stream (44.1 kHz samples) |
| `phase_step`  | in  | 36    | Farrow step, unsigned 4.32 (`src_pkg::STEP_32K_TO_44K1`) |
| `out_clipped` | out | 1     | the offered output was saturated                     |

Both streams are valid/ready. A transfer happens on a clock edge where
both are high. Offered data stays stable until it is taken (there are
assertions for this). Sample rates are not generated inside: the producer
offers samples at 8 kHz, the consumer (for example a DAC interface) takes
them at 44.1 kHz, and the core back-pressures in between.

The core's timing:

- **Stage 1 latency.** The first of the four intermediate samples is
  offered the cycle after an input is accepted. A new input is accepted
  in the same cycle as the last of the four is taken.
- **Stage 2 latency.** An output is offered the cycle after its last owed
  input is accepted.
- **Throughput.** Stage 2 handles at most one input or one output per
  clock: 320 + 441 = 761 clocks per 10 ms. Any clock above about 76 kHz
  keeps up.
- **Buffering.** There is no FIFO. Stage 1 holds one input sample, so the
  producer is held up if the consumer falls behind. With free-running
  8 kHz and 44.1 kHz timing derived from one clock, the producer is never
  held up (checked by `tb_hybrid_src_sine`).

## Number formats

| quantity                 | format                                        |
|--------------------------|-----------------------------------------------|
| samples (all boundaries) | 12-bit two's complement                       |
| coefficients             | 16-bit Q2.14                                  |
| branch and sub-filter sums | 32-bit, 14 fractional bits                  |
| Horner intermediate      | 48-bit, products by mu truncated (floor)      |
| mu                       | unsigned 16-bit fraction (top of a 32-bit phase) |
| step                     | unsigned 4.32                                 |

Rounding to 12 bits is round half up, then saturation. A full-scale input
step overshoots in both stages, so saturation does happen. The output
saturation is visible on `out_clipped`.

## Accuracy

Converting a 1 kHz tone of amplitude 1500 LSB, every output after the
filters have settled lies within 8 LSB of the ideal tone (gain 0.996,
delay 11.5 intermediate samples). That is about -45 dB relative to the
tone. Most of the error is the 7 kHz image that the 20-tap stage 1 filter
leaves at -48 dB, plus the rounding at two 12-bit boundaries.

## What follows the method and what is this design's own

The following come from the method: the two-stage split (integer
polyphase interpolation by 4 to 32 kHz, then Farrow to 44.1 kHz), the
polyphase branch/commutator structure, the transposed Farrow sub-filters,
a 3rd-order polynomial, 36 coefficients in total, and 12-bit samples at
every stage input.

These are this implementation's choices:

- the coefficient values (windowed sinc, cubic Lagrange) and their 16-bit
  Q2.14 format;
- the 20/16 split of the 36 coefficients;
- Horner evaluation;
- the 32-bit phase accumulator, with mu truncated to 16 bits;
- round-half-up with saturation;
- the valid/ready handshake and the reset behaviour.

Operation count. Per 8 kHz input sample the design as written performs:

- 20 multiplications in the four polyphase branches;
- 64 constant multiplications in the Farrow sub-filters (16 for each of
  the 4 intermediate samples);
- 16.5 multiplications by mu (3 for each of the 5.51 outputs).

That is about 100 in total, against a published figure of 92 for this
two-stage scheme. 7 of the 16 Farrow constants are 0 or ±1, so the
sub-filters in fact need 36 real multiplications: about 73 in all.

The Horner products by mu are computed 48 bits wide. That is more
multiplier area than an FPGA mapping needs, and a place to trim.

No sample-rate tracking is included: `phase_step` is fixed by the user. If
the real 8 kHz and 44.1 kHz clocks come from independent oscillators, a
rate estimator must adjust `phase_step`, or the stream will eventually
stall or run dry.

## Changing it

- **Sizes and tables** are in `rtl/src_pkg.sv`: data width, coefficient
  format, the two coefficient tables and the default step.
- **Filter parameters.** `polyphase_interpolator` takes `L`, `TPP` and `H`
  (a table of `L*TPP` taps). `farrow_resampler` and `farrow_subfilters`
  take `ORDER`, `TAPS` and `B` (an `[ORDER+1][TAPS]` table). The requant
  helpers assume 14 fractional coefficient bits and 12-bit samples.
- **Other output rates.** Set `phase_step = round(2^32 * 32000 / f_out)`.
  For example, 2863311531 gives 48 kHz; `tb_hybrid_src` switches to it
  mid-stream.

## Simulation

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a hung run.
With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/src_pkg.sv tb/tb_hybrid_src.sv --top-module tb_hybrid_src
obj_dir/Vtb_hybrid_src
```

| testbench | what it checks |
|-----------|----------------|
| `tb_polyphase_branch` | each branch against the prototype filter on a zero-stuffed input; impulses, full scale, random |
| `tb_polyphase_interpolator` | every output against a direct-form filter of the zero-stuffed input; 4 outputs per input; one-cycle latency; back-pressure; saturation |
| `tb_farrow_subfilters` | transposed sums against direct-form sums over the last 4 samples |
| `tb_farrow_horner` | polynomial evaluation against a 64-bit integer model; saturation flag |
| `tb_farrow_resampler` | every output against an absolute-time model (`P_n = sum of steps`); 320 inputs give exactly 441 outputs; steps 0.7256, 1, 1.5 and random; output one cycle after its last input |
| `tb_hybrid_src` | the whole converter against a chained reference model; 80 inputs give exactly 441 outputs; random gaps and back-pressure; a switch to 48 kHz and to a decimating step; counts input stalls, output stalls, two outputs from one intermediate sample, skipped intermediate samples, saturation in each stage and ratio switches, and fails if any never happens |
| `tb_hybrid_src_response` | passband gain of the whole converter at 0.5, 1, 2 and 3 kHz, from 40 ms of each tone, within 1.5 % of the stage 1 low-pass gain (measured 0.9963, 0.9513 and 0.7892 at 1, 2 and 3 kHz); output count per input |
| `tb_hybrid_src_sine` | 20 ms of a 1 kHz tone at real-time pacing (32 MHz clock), default configuration; compares with the ideal tone within 10 LSB; 882 outputs; producer never held up |

The testbenches draw random numbers with `$urandom`. Every register of the
design is reset, so the results do not depend on the simulator's initial
values.
