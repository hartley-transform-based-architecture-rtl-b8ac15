# Hartley-transform S-method analyzer and time-varying filter

This design analyzes a real-valued sample stream in time and frequency in real
time, and filters it with a time-varying filter. It is built on the short-time
Hartley transform (HT) rather than the short-time Fourier transform (STFT).
For a real signal the Hartley transform is real. Every frequency channel
therefore needs one datapath instead of separate real and imaginary ones.

For every input sample the hardware delivers three results for all N
frequency channels at once:

* the Hartley coefficients HT(n;k) of the length-N window centred on sample n;
* the S-method SM(n;k). This is a time-frequency distribution with
  Wigner-like concentration and without the Wigner cross-terms. It is built
  from products of neighbouring Hartley coefficients;
* one filtered output sample. Each channel is kept or dropped, depending on
  whether its S-method reaches a spectral floor R.

One sample can be accepted per clock. Nothing in the datapath is
time-multiplexed.

## Signal flow

```
 x_in ─► frame_diff ─F(n)─► ht_cell[0..N-1] ─HT(n;k)─► sm_cell[0..N-1] ─SM+─► average ─► SM reg ─┐
         (N-word delay)       (HT registers)   │                                                  │
                                               └──────────────► HT reg ──────────────► tv_filter ◄┘
                                                                                     (c_k, adder tree) ─► y_out
```

`tf_analyzer` holds everything left of `tv_filter`. `smht_tvf_top` joins the
two.

## The recursive Hartley channel (`ht_cell`, `frame_diff`)

The window covers samples n-N/2+1 … n+N/2. The channel-k coefficient is

    HT(n;k) = Σ_{i=-N/2+1..N/2} f(n+i) · (cos(2πik/N) − sin(2πik/N))

It is not recomputed from scratch. Sliding the window by one sample rotates
the previous coefficients, adds the entering sample and removes the leaving
one:

    HT(n;k) = (−1)^k F(n) + c(k)·HT(n−1;k) + s(k)·HT(n−1;N−k)
    F(n)    = f(n+N/2) − f(n−N/2),   c(k) = cos(2πk/N),  s(k) = sin(2πk/N)

This is the part of the design that is hardest to follow:

* **Channels are coupled in pairs.** The rotation of channel k needs the
  previous value of channel N−k, read from that channel's register. Channels 0
  and N/2 are their own mirrors. The Hartley transform has no imaginary part,
  and this coupling takes its place.
* **One shared difference.** `frame_diff` forms F(n) once for all channels.
  It is a circular buffer of N words. The word read at the pointer is the
  sample that leaves the window, and the new sample overwrites it. Until the
  buffer has filled once, the leaving sample is taken as 0. Each channel needs
  only the sign (−1)^k, so odd channels subtract F instead of adding it.
* **Kernel sign.** The recursion above holds for the kernel cos − sin. With
  the kernel cos + sin the roles of k and N−k swap. SM(n;k) and the filter
  output are symmetric in k and N−k, so they do not depend on this choice.
* **Fixed point.** Samples and HT registers are 16-bit Q15 words.
  * c(k) and s(k) are Q15 constants. They are held in 17 bits so that ±1.0 is
    exact. They are computed at elaboration with `$cos`/`$sin` and rounded to
    nearest.
  * Each coefficient product is rounded to nearest.
  * The HT register wraps on overflow, so the caller must scale the input to
    keep |HT| below 1, roughly |f| < 1/(N·√2). For a sinusoid the limit is
    about 0.9/N of full scale.
  * The recursion has its poles on the unit circle. Rounding errors therefore
    accumulate slowly in every channel except k = 0, N/4, N/2 and 3N/4, whose
    coefficients are exact. In the tests the error against the exact
    windowed sum stayed below 12 LSB over about 200 samples at N = 16. A long-running system would
    need periodic re-initialisation, which this design does not have.

## The S-method (`sm_cell`, `q15_mult`, averaging in `tf_analyzer`)

With a rectangular frequency window of half-width L_d (LD, default 2), the
S-method is SM(n;k) = [SM+(n;k) + SM+(n;N−k)] / 2, where

    SM+(n;k) = HT²(n;k) + 2 · Σ_{i=1..L_d} HT(n;k+i)·HT(n;k−i)    (indices mod N)

Each channel has one `sm_cell`, with L_d+1 multipliers and L_d adders. The
second half-sum does not need hardware of its own. It is SM+ of the mirror
channel, so one adder and a one-bit arithmetic right shift finish SM(n;k).

`q15_mult` multiplies two Q15 words. The 32-bit product has two sign bits.
Dropping the upper one is the one-bit left shift, and the next 16 bits are
kept: a truncation toward −∞. (−1)·(−1) wraps to −1.

The S-method sum carries guard bits: SW = W + clog2(2·LD+1) + 1 = 20 bits,
still Q15, so that it cannot overflow.

Since SM(n;k) = SM(n;N−k), synthesis merges the mirrored SM registers.

## The time-varying filter (`tv_filter`)

Channel k is kept when its S-method reaches the floor R:

    c_k = (SM(n;k) ≥ R)        y = (1/N) · Σ_{k: c_k=1} HT(n;k)

`r_floor` is R, a signed SW-bit run-time input in the same Q15 format as SM.

The gated coefficients are summed by a pairwise tree of log2 N adder levels:
adjacent channels first, then adjacent sums. The tree is W + log2 N bits wide
and cannot overflow. The sum of all N Hartley coefficients of a window equals
N times the centre sample. The tree output is therefore shifted right by
log2 N. With R at its minimum every channel passes and y reproduces the
centre sample f(n), N/2 samples behind the newest input.

Small R keeps the whole region the signal occupies. Larger R narrows the
filter toward the instantaneous frequency and removes more noise, at the cost
of some signal (the rectangular window leaks part of each component's energy
into channels that fall below the floor).

## Interface and timing (`smht_tvf_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears HT, SM, pointers) |
| `in_valid`, `x_in` | in | 1, W | sample strobe and sample f(n+N/2), Q15 |
| `r_floor` | in | SW | spectral floor R |
| `ht_out[N]`, `sm_out[N]` | out | W, SW | HT(n;k), SM(n;k) |
| `sm_valid` | out | 1 | pulses one clock after `in_valid` |
| `ck_out` | out | N | c_k for the values on `sm_out` (combinational from them) |
| `y_out`, `y_valid` | out | W, 1 | filtered f(n); `y_valid` one clock after `sm_valid` |
| `wrapped` | out | 1 | the delay line has filled; HT values are complete windows from here on |

There is no back-pressure: `in_valid` may be high on every clock. The clock
may also run faster than the sample rate. Between samples all values hold.

Parameters, with their defaults:

* W = 16, Q15 arithmetic.
* LD = 2.
* N = 64. It must be a power of two and at least 2·LD+1.
* SW is derived from W and LD.

The longest register-to-register path runs from the HT registers of the
previous sample to the SM registers. It passes two multipliers, L_d adders
and five further adders:

* one rounding adder;
* two recursion adders;
* one S-method adder;
* one averaging adder.

The filter adds one more pipeline stage: its comparators and adder tree sit
between the HT/SM registers and the output register.

## What is taken from the architecture and what is chosen here

Taken from the architecture:

* the HT recursion and its coupling of channel pairs;
* the S-method written in terms of HT, with the mirror-channel half-sum and
  the one-bit averaging shift;
* the multiplier with its built-in shift;
* L_d = 2 and 16-bit Q15 arithmetic;
* the comparator rule for c_k;
* the pairwise log2 N adder tree;
* the resource counts per channel: L_d+3 multipliers and about L_d+4 adders.

Chosen here:

* N = 64. The architecture leaves N open.
* The window range −N/2+1 … N/2 and the cos − sin kernel, the two for which
  the recursion is exact.
* 17-bit coefficients, rounding of the coefficient products, and guard bits
  on the S-method.
* The 1/N scaling of the filter output, and its output register.
* The `in_valid` strobe and the latencies.
* Zero history at start-up.

Not built:

* **A signal-dependent S-method**, which would stop the summation outside
  each auto-term. Its control rule is not specified.
* **Windows other than rectangular**, for the HT or for P(i).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `q15_mult_tb` | products against floor(a·b/2^15) |
| `frame_diff_tb` | F(n) against a sample-history model, with random idle cycles |
| `ht_cell_tb` | the one-step recursion bit-exactly, and the register against the direct windowed Hartley sum in floating point (±24 LSB) |
| `sm_cell_tb` | SM+ against an integer model |
| `tf_analyzer_tb` | N = 16: every HT against the direct sum; every SM bit-exactly against the S-method of the analyzer's own HT; every SM against a floating-point S-method; the one-clock latency |
| `tv_filter_tb` | c_k and y against an integer model, with R at both extremes and random |
| `smht_tvf_top_tb` (N = 16) and `smht_tvf_top_full_tb` (all defaults, N = 64) | end to end, described below |

The two end-to-end testbenches stream a noisy linear-FM chirp with random
idle cycles. They check:

* the strobes;
* c_k and y bit-exactly;
* that y equals the centre input sample in the all-pass phase;
* that in the filtering phase the output is closer to the clean chirp than
  the input is.

At N = 64 the filtering phase reduces the mean squared error about threefold.
Each testbench counts a failure if any of these events never happens:

* the delay line wraps;
* idle input cycles occur;
* some channels are passed and some stopped;
* the testbench runs in both the all-pass and the filtering mode.

To simulate one with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/smht_pkg.sv tb/smht_tvf_top_full_tb.sv \
          --top-module smht_tvf_top_full_tb -y rtl -y tb
./obj_dir/Vsmht_tvf_top_full_tb
```
