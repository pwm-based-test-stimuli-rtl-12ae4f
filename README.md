# Self-test of a sigma-delta ADC with a purely digital PWM stimulus

A sigma-delta converter does not follow the shape of its input within a
sample period. It integrates: what it reports for one sample is, to a very
good approximation, the average of the input over that sample period. So a
binary waveform with the same period as the converter's sample clock looks
to the converter like a DC level. Let the waveform switch between the two
references VrefL and VrefH, and let it be high for a fraction η of the
period. The converter then sees

    V = VrefL + (VrefH − VrefL) · η

If the duty cycle η changes from one sample period to the next, the
converter sees a sampled analog signal: a ramp, a triangle or a sine.
Nothing analog has to be built on chip except a 1-bit switch between two
references the converter already has. The test signal is exact because the
duty cycle is a count of master-clock cycles. Its own quantisation is fully
known, so it can be subtracted from the result rather than filtered out.

This RTL contains the digital half of such a built-in self-test:

- the duty-cycle sequence and the synchronous PWM;
- the alignment of each converter word with the period that produced it;
- the error sample e = Y − Y_ideal;
- two evaluations of that error:
  - sums for a third-order least-squares fit (the *linear test*);
  - the spectrum of one period of a sine (the *sine test*).

Together they give the converter's offset, gain error, second and third
harmonic distortion, and noise from a few hundred samples. The method was
shown on a 20-bit audio codec with test sequences of N = 16, 64 and 256
samples. At its rate of about 23.9 kHz those take 0.66, 2.66 and 10.7 ms.

```
            start/mode/log2n/settle/delta           fit_s[4], fit_g[7]
                 |                                        ^
            +----v------+   gen_en, clear,          +-----+-----+
            | bist_ctrl |---capture, finish ------->| poly_fit  |<--+
            +----+------+                           +-----------+   |
                 | gen_en                                           | e, x, fit
            +----v------+ duty  +---------+  pwm_out  (1-bit DAC,   |
            | duty_gen  |------>| pwm_gen |-------->  converter  ---+-- adc_valid/adc_data
            +-----------+<------+---------+  fs_strobe under test)  |
                  ^ tag (i, h, fit, capture)  load                  v
                  +------------------------------------------> err_extract
                                                                    | e, i
                                                            +-------v-----+
                                                            | dft_engine  |--> bins, p_dc,
                                                            +-------------+    p_fund, p_hd2,
                                                                               p_hd3, p_noise
```

Everything runs on one clock: the master clock, 2^LOG_R = 256 times the
sample rate. It has an asynchronous active-low reset.

## The PWM stimulus (`pwm_gen`, `duty_gen`)

One PWM period is exactly one sample period of 2^LOG_R master clocks. It
starts high and stays high for h clocks, where 0 ≤ h ≤ 2^LOG_R, so
η = h / 2^LOG_R. At h = 0 the period is low throughout; at h = 2^LOG_R it is
high throughout. `fs_strobe` marks cycle 0 of every period, and the
converter must sample in step with it. `pwm_out` is a register output; it
drives the external switch between the references.

`duty_gen` supplies h for sample index i = 0 … N−1. N = 2^log2n is chosen at
run time, from 2 to 2^LOG_NMAX = 256. The sequence repeats for as long as
the run lasts.

| `mode` | high time h | use |
|---|---|---|
| `MODE_RAMP` (0) | i · R / N | linear test, η = i/N |
| `MODE_TRIANGLE` (1) | 2i · R / N up to i = N/2, then 2(N−i) · R / N | linear test, rising and falling |
| `MODE_SINE` (2) | R/2 + round(R/2 · sin(2πi/N)) | sine test |

Here R = 2^LOG_R. The sine values come from a table of 2^LOG_NMAX entries,
built at elaboration time by `bist_pkg::sin_round`. This function uses an
integer Taylor series, so every tool builds the same table. Entries are read
at index i · 2^LOG_NMAX / N.

The ramp leaves out the sample at i = 0 (η = 0): the fit uses only
0 < i < N. The triangle leaves it out the same way. The sine uses all N
samples.

## Pairing words with stimuli, and the error (`err_extract`)

Making the error sample is the delicate part. The converter's word for a
period comes back several whole sample periods later. The decimation filter
causes most of that delay, and it depends on the converter. The aligner
therefore keeps a short history of tags, one per PWM period. A tag holds:

- the capture flag;
- the fit flag;
- the index i;
- the high time h.

The history covers the running period and the last DELTA_MAX + 1 = 33
completed ones.

The run-time input `delta` gives the converter's latency in periods. A word
flagged by `adc_valid` belongs to the period that ended `delta` periods
before the most recent period boundary. With delta = 0, the word for
period p arrives during period p + 1. The word must not arrive in the cycle
of a period boundary: an assertion checks this.

For a word Y (n-bit two's complement, n = ADC_BITS = 20), the ideal code of
its period is

    Y_ideal = 2^n · η − 2^(n−1) = h · 2^(n − LOG_R) − 2^(n−1)

Here VrefL maps to the most negative code and VrefH to one step above the
most positive. The block outputs, one clock after `adc_valid`:

- e = Y − Y_ideal, in LSB, 22 bits;
- the centred duty x = 2h − R (so −R … R);
- the index i;
- the fit flag.

It does this only for periods tagged for capture.

Three properties follow from this definition:

- **The stimulus's own quantisation is already removed.** Y_ideal is the
  exact level the quantised PWM asked for. Any step pattern of a coarse ramp
  or sine therefore does not appear in e.
- **The offset is not absolute.** The rise and fall times of the real switch
  add a constant offset to every η. That offset cannot be told apart from the
  converter's own offset, so it ends up in the DC term of e. Gain and
  distortion are unaffected.
- **A fixed PWM artefact remains.** A PWM input differs slightly from a true
  analog level: about −70 dBc for a 20-bit audio converter. The difference
  is a smooth and predictable function of η. It stays in e and should be
  subtracted, as a known cubic from simulation, when the results are read.

## The run (`bist_ctrl`)

1. `start` (while idle) pulses `clear`. This empties the fit sums and starts
   a 129-clock sweep that zeroes the spectrum bins.
2. The stimulus starts in the next clock; the sweep ends long before the
   first word can come back. The stimulus first plays `settle` complete sequences (0 to
   15) that are not evaluated. These let the converter's filters reach a
   steady state.
3. It plays one more sequence that is tagged for capture. Its first tagged
   period is index 0.
4. The stimulus keeps running while the N error samples come back through
   the latency. Then `finish` starts the spectrum summary (N/2 + 2 clocks).
5. `done` rises, the stimulus stops, and all results are held until the next
   `start`.

A run takes (settle + 1) · N + delta + 1 sample periods, plus the summary.
At N = 64 and settle = 1 that is about 130 periods, or 5.5 ms at 23.9 kHz.

## The linear test (`poly_fit`)

The linear test models the converter error along a ramp (or triangle) as a
cubic plus zero-mean noise:

    e(x) ≈ c0 + c1·x + c2·x² + c3·x³

`poly_fit` accumulates, over the captured samples whose fit flag is set,
the eleven sums of the least-squares normal equations:

    S[k] = Σ e·x^k   (k = 0..3)  → fit_s[0..3]
    G[m] = Σ x^m     (m = 0..6)  → fit_g[0..6], G[0] = sample count

These are 64-bit exact integers. Solving the 4×4 symmetric system is left to
the reader of the results (a test host or a small processor):

    Σ_j G[j+k] · c_j = S[k],   k = 0..3

The parameter `FIT_ORDER` raises the order of the polynomial. With order K
there are K + 1 sums S and 2K + 1 sums G, and the system is
(K + 1) × (K + 1). The top then widens the sums so that they still cannot
overflow: 90 bits for order 5.

For the ramp, 255 of the 256 samples go into the fit; the centred x keeps
the system well conditioned. Double-precision Gaussian elimination is
enough: the testbenches do exactly that.

To turn the coefficients into specifications, rewrite the cubic in
u = x / R = 2η − 1, which runs from −1 to +1 over the full scale. Its
coefficients are a_k = c_k · R^k, in LSB. Suppose the converter were driven
by a sine of amplitude A on this scale (A = 1 is full scale). The cubic
then turns it into:

| term | amplitude in LSB | relative to the fundamental, A · 2^(n−1) |
|---|---|---|
| second harmonic | a2 · A² / 2 | HD2 = 20·log10(\|a2\| · A / 2^n) dBc |
| third harmonic | a3 · A³ / 4 | HD3 = 20·log10(\|a3\| · A² / 2^(n+1)) dBc |
| gain error | a1 (plus 3·a3·A²/4 at the fundamental) | a1 / 2^(n−1) |
| offset | a0 (plus a2·A²/2) | includes the switch's constant |

The noise is what the cubic does not explain: the residual sum of squares,
Σe² minus the fitted part. Σe² is not accumulated; only the spectrum gives
the noise.

## The sine test (`dft_engine`)

The sine test plays one full period of a full-scale sine over N samples and
looks at the error in the frequency domain. The error sequence is already
the converter output minus the exact ideal stimulus. Its spectrum therefore
holds only the converter's contribution:

- bin 0: offset;
- bin 1: gain error (the error in phase with the fundamental);
- bins 2 and 3: the second and third harmonic;
- bins 4 … N/2: noise, plus any higher harmonics.

**Running DFT.** The engine does not wait for the whole sequence. Each error
sample, as it arrives, is multiplied into every bin k = 0 … N/2, one bin per
clock:

    X_k += e_i · (cos(2πki/N) − j·sin(2πki/N))

The twiddles are 16-bit at a scale of 2^14, taken from a 256-entry table
built at elaboration time. The phase k·i mod N is kept by an adder, not a
multiplier. A sample keeps the engine busy for N/2 + 1 clocks, at most 129.
A sample period is 256 clocks, so the engine is always free before the next
sample arrives; an assertion checks this. The bins are two 48-bit arrays of
129 entries each, written as memories. One multiply-accumulate per clock and
per part replaces a full FFT, and no buffer for the sequence is needed.

**Summary pass.** After `finish`, one pass over the bins (N/2 + 1 clocks)
forms |X_k|² and latches these outputs:

- `p_dc` = |X_0|²;
- `p_fund` = |X_1|²;
- `p_hd2` = |X_2|²;
- `p_hd3` = |X_3|²;
- `p_noise` = Σ_{k=4}^{N/2−1} 2|X_k|² + |X_{N/2}|².

Any bin can also be read at `bin_addr` as `bin_re`, `bin_im` and `bin_pow`.

**Scaling.** All of these carry the twiddle scale: X_true = X / 2^14. With
N samples, a sinusoid of amplitude a (LSB) in bin 1 ≤ k < N/2 gives
|X_true| = a·N/2. Hence:

    amplitude_k = 2·sqrt(p_k) / (N · 2^14)                    [LSB]
    offset      = bin_re[0] / (N · 2^14)                      [LSB]
    gain error  = −bin_im[1] / (N/2 · 2^14) / 2^(n−1)         [fraction]
    HD2, HD3    = 20·log10(amplitude_2,3 / 2^(n−1))           [dBc]
    noise power = p_noise / (N² · 2^28)                       [LSB²]
    SNR         = 10·log10( (2^(n−1))² / 2 / noise power )    [dB]
    THD         = 10·log10( (P2 + P3) / ((2^(n−1))² / 2) )    [dBc]
    SINAD       = 10·log10( (2^(n−1))² / 2 / (noise power + P2 + P3) )

Here P2 and P3 are the one-sided powers 2·p_hd2 / (N² · 2^28) and
2·p_hd3 / (N² · 2^28), in LSB².

The noise band holds N − 7 of the N two-sided bins. Multiply the noise
power by N / (N − 7) for an estimate of the full white-noise power.
Harmonics above the third fall into the noise band, and so count as noise.

The stimulus sine is h = R/2 + R/2·sin, so its fundamental is 2^(n−1) LSB.
The gain-error sign follows from the sine phase: an error proportional to
the stimulus shows up in the imaginary part of bin 1. N must be at least 8
so that the third harmonic does not fold onto a lower bin.

## Top level (`pwm_bist`)

| parameter | default | meaning |
|---|---|---|
| `ADC_BITS` | 20 | converter word width n |
| `LOG_NMAX` | 8 | largest sequence N = 256 |
| `LOG_R` | 8 | master clocks per sample period = 256, duty step 1/256 |
| `DELTA_MAX` | 32 | largest converter latency, in sample periods |
| `TW_BITS` | 16 | twiddle width of the DFT |
| `FIT_ORDER` | 3 | order of the least-squares polynomial |

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | master clock; asynchronous active-low reset |
| `start` | in | 1 | begin a run when idle |
| `mode` | in | 2 | `MODE_RAMP`, `MODE_TRIANGLE`, `MODE_SINE` |
| `log2n` | in | 4 | N = 2^log2n (1 … LOG_NMAX; ≥ 3 for the sine test) |
| `settle` | in | 4 | unevaluated sequences before the captured one |
| `delta` | in | 6 | converter latency in whole sample periods |
| `busy`, `done` | out | 1 | run in progress; results valid (held until `start`) |
| `pwm_out` | out | 1 | stimulus, to the 1-bit DAC |
| `fs_strobe` | out | 1 | cycle 0 of each sample period, the converter's sample clock |
| `adc_valid`, `adc_data` | in | 1, 20 | converter word, two's complement, mid-period |
| `fit_s[FIT_ORDER+1]`, `fit_g[2·FIT_ORDER+1]` | out | 64 each (wider for orders above 3) | least-squares sums S[k], G[m] |
| `bin_addr` | in | 8 | bin to read, 0 … N/2 |
| `bin_re`, `bin_im` | out | 48 | that bin, twiddle scale 2^14 |
| `bin_pow` | out | 96 | its \|X\|² |
| `p_dc`, `p_fund`, `p_hd2`, `p_hd3` | out | 96 | bin powers 0 … 3 |
| `p_noise` | out | 105 | one-sided noise power, bins 4 … N/2 |

Both evaluations run on every capture, whatever the mode: the fit sums are
meaningful for ramp and triangle, and the spectrum for the sine.

The analog parts are not included:

- the 1-bit DAC, which connects VrefL or VrefH to the converter input as
  `pwm_out` directs;
- the converter under test, i.e. its modulator and decimation filter.

The testbenches use `tb/adc_model.sv` in their place. It is a behavioural
converter that:

- counts the high clocks of each period;
- adds a chosen cubic error and noise;
- returns the word after `delta` periods.

## Where this departs from the method, and limits

- **Triangle shape.** The method names a triangular stimulus among its
  measurements but does not define it. Here it rises and falls within one
  sequence of N samples.
- **Regression and post-processing.** The method fits a cubic on chip or
  off it without saying which. Here only the normal-equation sums are on
  chip. The 4×4 solve, the dB figures and the removal of the known PWM
  artefact are left to the reader of the results.
- **Spectrum.** The method asks for an FFT of the output with the known
  stimulus harmonics subtracted. Here that is done by transforming the error
  sequence with a running DFT of bins 0 … N/2. The result is the same
  information, without a sample buffer.
- **Sizes of this design's own choosing.** These are the 256 clocks per
  sample (duty resolution 1/256), latency up to 32 periods, 16-bit
  twiddles, and 48- and 64-bit accumulators.
  - The accumulators are wide enough for the worst case of 256 samples at
    full scale; nothing wraps.
  - Each 16-bit twiddle is rounded to within 2^−15 of its exact value. This
    adds to every bin an error of that relative size, measured against the
    error sequence itself. The error sequence is far below full scale, so
    this rounding is negligible next to the converter's own noise.
- **Full scale.** The triangle peak and the sine crest ask for η = 1. The
  ideal code for that is 2^(n−1), one step beyond the largest word, so a
  real converter clips there by at least 1 LSB. That sample's error then
  reads at least −1 LSB. To avoid it, use a longer sequence, for which the
  effect is smaller, or discount those samples.
- **Sequence length.** N is a power of two, from 2 to 256. The spectrum
  needs N ≥ 8.
- **Converter timing.** The converter must sample on `fs_strobe` and deliver
  its word away from the period boundary, with a fixed latency that is known
  beforehand.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
block against values worked out independently in the testbench, and prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_duty_gen` | every h of all three shapes, for every N from 2 to 256, wrap-around, fit flags |
| `tb_pwm_gen` | period length, high clocks per period for random h including 0 and full, `load` and `period_start` framing |
| `tb_err_extract` | e, x, i and fit flag of every captured period for latencies 0, 1, 7, 32; `clear` drops stored captures |
| `tb_poly_fit` | all eleven sums against 64-bit sums, a fifth-order instance against 128-bit sums, and recovery of a known cubic by solving the normal equations |
| `tb_dft_engine` | every bin exactly against an integer DFT with the same rounded twiddles, for N = 8, 64, 256 up to full-scale input; summary powers; busy and summary clock counts |
| `tb_bist_ctrl` | the run sequence: one `clear`, exactly N captured periods after `settle` sequences, `finish` after the last sample, `done` after the summary, `start` ignored while busy |
| `tb_pwm_bist` | the whole design at its default sizes with the behavioural converter, bit-exact |
| `tb_pwm_workloads` | the specifications read back as a test program would, for triangle and sine at N = 16, 64, 256 |

The top-level test `tb_pwm_bist` makes six runs:

- ramp, N = 64, settle 1, latency 3;
- triangle, N = 16, settle 0, latency 0;
- sine, N = 64, settle 2, latency 5;
- ramp, N = 256, settle 1, latency 32;
- sine, N = 256, settle 1, latency 17;
- sine, N = 16, settle 0, latency 0.

In each run it checks:

- every captured high time;
- the fit sums, and for ramps the solved cubic against the error injected;
- every DFT bin and the summary powers against a floating-point DFT;
- for sines, the HD2 and HD3 amplitudes against the injected cubic;
- the run length in sample periods.

It also counts that each shape, settling, zero and non-zero latency, and
full-scale clipping all occur.

`tb_pwm_workloads` gives the converter model a realistic audio-codec
error:
- a second harmonic of −74 dBc;
- a third harmonic of −80 dBc;
- ±20 LSB of uniform noise, which puts the SNR at 89.9 dB.

It then evaluates the results with the formulas above. These are typical
outcomes (settle 1, latency 3):

| run | HD2 (dBc) | HD3 (dBc) | SNR (dB) | SINAD (dB) |
|---|---|---|---|---|
| triangle, N = 16, fit | −73.3 | −79.4 | | |
| triangle, N = 64, fit | −73.8 | −80.6 | | |
| triangle, N = 256, fit | −74.0 | −80.1 | | |
| sine, N = 16, spectrum | −73.9 | −79.9 | 90.9 | 72.9 |
| sine, N = 64, spectrum | −74.0 | −79.7 | 90.8 | 72.9 |
| sine, N = 256, spectrum | −73.9 | −80.1 | 90.1 | 72.9 |
| injected | −74.0 | −80.0 | 89.9 | 72.9 |

The spread at N = 16 is mostly the noise of so few samples; the hardware
sums themselves are exact.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bist_pkg.sv \
    tb/tb_pwm_bist.sv --top-module tb_pwm_bist
./obj_dir/Vtb_pwm_bist
```

Replace `tb_pwm_bist` with any other testbench name to run it. Each
testbench finishes in under a second of simulation time on a desktop
machine.

To change sizes, override the parameters of `pwm_bist`; the defaults live
in `bist_pkg`. If LOG_R is reduced, keep 2^LOG_R ≥ 2^(LOG_NMAX−1) + 1, so
that the spectrum engine finishes a sample within one sample period. If
ADC_BITS is reduced, keep ADC_BITS ≥ LOG_R.
