# Arbitrary-factor decimator for 8-sample-per-clock streams

This RTL lowers the sample rate of a very fast stream by an arbitrary,
non-integer factor. An ADC delivers 8 samples every clock (2.5 GSa/s at
312.5 MHz). The design turns that stream into one at 1/(2R) of the rate, where
R ≥ 1 is any factor whose inverse fits in 16 fraction bits: 2.0, 3.45, 49.99 and
1040.25 are all valid.

Two filters in series do the work:

1. A **transposed Farrow filter** decimates by the variable factor R. It has 6
   polynomial branches of order 7. Only one control value changes from sample
   to sample: the fractional time offset μ. The coefficients stay fixed.
2. A fixed **halfband filter** (49 taps) decimates by 2. It takes over the hard
   part of the anti-aliasing. This lets the Farrow filter get by with order 7.
   The pair was designed together for 80 dB of stopband attenuation with 80 %
   of the output band usable. With the coefficients rounded to 16 bits, the
   measured attenuation is about 75 dB near the band edge; see
   [Measured frequency response](#measured-frequency-response).

The structure, coefficients, block partitioning and control scheme follow
F. Peterson, *Arbitrary Decimation for High Sample Rates, Algorithm Design and
FPGA implementation*, Lund University, 2019. The number formats, pipelining
and several control details are this implementation's own. They are listed
under [Departures and own choices](#departures-and-own-choices).

```
signal[0:7] ─► accumulate_top ──v_0..v_5[0:7], acc_valid──► farrow_top
  (input rate, 8/clk)   (variable rate → full words)      (output rate of stage 1)
                                                               │ out_farrow[0:7], farrow_valid
                                                               ▼
data_out[0:3], out_valid ◄── halfband_top ◄── scaled_data[0:7] ◄── scale_data (× S)
```

## The transposed Farrow filter and its parallel form

### What is computed

Let x(k) be the input samples and let the output instants fall at spacing
T_out = R·T_in. For each input sample, μ_k is the distance from the latest
output instant to that sample, measured in units of T_out:

    μ_k = frac(μ_{k-1} + 1/R)

The transposed Farrow filter weights each sample with (2μ_k − 1)^m, one
weight per branch m = 0..5. It then *integrates and dumps*: it sums the
weighted samples that fall between two output instants, which gives one value
v_m(l) per output instant l and per branch. Finally it runs an ordinary FIR
of order 7 on each branch, at the output rate, and adds the branches:

    y(l) = Σ_{n=0..7} Σ_{m=0..5} c_m(n) · v_m(l − 7 + n)

An output instant lies between samples k−1 and k exactly when the addition
μ_{k−1} + 1/R carries past 1. That carry is the "overflow" flag that drives
the dump. When it is set on sample k, the sum of the samples before k is
dumped, and sample k starts the new sum.

The filter has a gain of R. The accumulators divide by 2^D, with
D = ceil(log2 R), which costs only a shift. `scale_data` then multiplies by
S = 2^D/R, which lies in [1, 2), so the overall gain is 1.

### Why the parallel form is the hard part

Each clock brings 8 samples. Anywhere from 0 to 8 of them close an output
interval, and the pattern changes from clock to clock. `accumulate_top`
hides this variable rate from everything downstream:

* **`mu_calc`** would need a chain of 8 dependent additions per clock. It
  avoids the chain by adding the multiples (i+1)/R directly to the μ carried
  over from the previous clock. The multiples are formed one clock early,
  because r_inverse is static. Lane i's overflow flag is a change of integer
  part between lanes i−1 and i.
* **`u_calc_top`** contains 8 × `u_calculator`. Each one forms
  x(2μ−1)^m, m = 0..5, with a chain of 5 registered 27×16 multipliers.
  2μ−1 is μ with its top bit inverted. All six results of a sample leave in
  the same clock, 6 clocks after input.
* **`integrate_dump`** has one instance per branch. It shifts the 8 values
  right by D+1 and sums them in sample order. It dumps the running sum at
  every flagged position. The sum keeps 6 guard bits and is cut back to its
  27-bit format only at the dump. The open sum carries over to the next clock. Unflagged
  positions hold intermediate values that are never used.
* **`sort_samples`** and **`select_samples`** (one per branch) pack the
  scattered valid sums into complete words of 8, oldest at position 0. The
  packing works as follows:
  * A counter remembers how far the current word is filled.
  * The j-th flagged lane goes to position (counter + j) mod 8. The
    `select` output says which lane feeds each position.
  * Flags that wrap past position 7 belong to the next word. `select_samples`
    detects them because their position is already `filled`, and parks them.
  * `select_valid` and then `acc_valid` mark each completed word.

  For example, over three clocks:

  | counter | overflow (lane 7..0) | overflow_sorted | select (pos 7..0) | select_valid |
  |---|---|---|---|---|
  | 0 | 10101011 | 00011111 | x x x 7 5 3 1 0 | 0 |
  | 5 | 11010101 | 11100011 | 4 2 0 x x x 7 6 | 1 |
  | 2 | 10101010 | 00111100 | x x 7 5 3 1 x x | 0 |

After this point all 8 lanes of a word are always valid, so the rest of the
design is simply **data driven**. Its registers advance only when a word
arrives.

* **`farrow_top`** holds 8 × `farrow_filter`. Each `farrow_filter` computes,
  for the interval in its lane, the 8 tap-level sums
  p(l, n) = Σ_m c_m(n) v_m(l). It uses the symmetry
  c_m(7−n) = (−1)^m c_m(n), so only 24 products are needed per lane.

  Output lane i adds p(i−7+n, n) over n = 0..7. It takes indices < 0 from a
  one-word delay register, which is the FIR delay line of the transposed
  structure. A registered adder tree does the adding: 7 additions in
  3 levels per output.

  `set_valid_out` raises `farrow_valid` once 6 words have filled this
  pipeline. After that, each word comes out in the clock after the next
  `acc_valid`.

## The halfband stage

The halfband filter has 49 taps. Apart from the centre tap (0.5), all
even-index taps are zero. `halfband_top` uses the polyphase split this allows,
with 8 samples in and 4 out:

    y(4c+j) = Σ_{i=0..23} h[2i+1] · s(8c+2j−2i)  +  0.5 · s(8(c−3)+2j+1)

* **FIR branch** (`fir_halfband`): the even lanes 0, 2, 4, 6 feed a
  24-tap FIR on their 4 phases. It uses a 6-word history and pre-adders for
  the symmetric taps, so 48 multipliers serve the 4 outputs. Its latency is
  exactly 19 clocks.
* **Delay branch** (the centre tap): lanes 1, 3, 5, 7 are written to a
  96-bit × 32 FIFO (`hb_fifo`) on every word. Each output needs the
  odd-lane samples from 3 words earlier, which corresponds to the 12 zero
  taps before the centre. This offset is produced as follows:
  * `hb_counter` opens the read path only after 3 words.
  * The read request is delayed by the 19-clock FIR latency.
  * The FIFO word therefore comes out together with the matching FIR output.
  * The first 3 output words have no delay-branch term.

The two branches are added, rounded to the nearest value (half up) and
saturated to 16 bits. With `ROUNDING = RND_TRUNC` the sum is truncated
instead. `out_valid` marks each word of 4 outputs, 20 clocks
after its input word.

## Settings

Compute these outside the design and hold them static. Change them only while
`rst` is high, and keep r_inverse stable for a clock before releasing reset.

| port | value | format |
|---|---|---|
| `r_inverse` | round(2^16 / R) | unsigned Q1.16 (17 bits; 65536 for R = 1) |
| `shift` | D = smallest integer with 2^D ≥ 2^16 / r_inverse | 5 bits |
| `scale_factor` | round(2^(17+D) · r_inverse / 2^16) | unsigned Q1.17, in [1, 2) |

The effective factor is R' = 2^16 / r_inverse. The total decimation is 2R'.
Resolution is finest at small R. Examples:

| R asked | r_inverse | R' realised | D |
|---|---|---|---|
| 2.0 | 32768 | 2.0 | 1 |
| 3.45 | 18996 | 3.4499895 | 2 |
| 50 | 1311 | 49.98932113 | 6 |
| 107.89 | 607 | 107.96705107 | 7 |
| 1035.02 | 63 | 1040.25396825 | 11 |

## Interface and timing of the top, `decimation`

* `signal[0:7]`: 16-bit Q1.15 samples, lane 0 oldest. A new word is taken
  every clock; there is no input valid. The first word sampled after `rst`
  falls is sample 1 of the stream.
* `data_out[0:3]`, `out_valid`: 16-bit Q1.15 outputs, lane 0 oldest.
  On average the design gives one output word per R input words.
* **Latency.** Because the Farrow and halfband stages are data driven, an
  output appears only after later input has pushed it through. At start-up,
  6 Farrow words fill the pipeline; the first halfband outputs then follow.
  About 6R input words plus some 30 clocks pass before the first
  `out_valid`.
* **Reset.** `rst` is synchronous and active high. It clears all state. The
  filter histories start at zero.
* **Parameters.** `LANES` must stay 8. `ROUNDING` (default `RND_LAST`)
  is described under number formats.

## Number formats and rounding

Qi.f below means i integer bits, including the sign, and f fraction bits.
All formats are defined in `rtl/decim_pkg.sv`.

* Input and output samples are Q1.15.
* Multiplier data inputs are at most 27 bits, the width of one FPGA DSP
  slice port:
  * u values are Q1.26.
  * Branch sums v are Q2.25. The accumulators themselves keep 6 guard bits
    (Q2.31) and cut the sum back to Q2.25 once, at the dump.
  * The Farrow output is Q2.25.
* Halfband samples are Q2.22. Four of them (24 bits each) fill one 96-bit
  FIFO word.
* Coefficients are the designed values rounded to 16-bit Q1.15.
* The parameter `ROUNDING` of `decimation` selects how word lengths are
  reduced. The three choices are the three versions the reference design
  verified:

  | `ROUNDING` | Internal reductions | Final 16-bit output |
  |---|---|---|
  | `RND_TRUNC` (0) | truncate | truncate |
  | `RND_LAST` (1, default) | truncate | round half up |
  | `RND_ALL` (2) | round half up | round half up |

  Truncation leaves a DC offset of −½ LSB. Either rounding choice removes it.
  Rounding the internal steps as well changes almost nothing. The internal
  words are much wider than the output, so their errors rarely reach the
  output bits.

* **Why the guard bits.** The accumulators divide every u value by 2^(D+1)
  before summing. u₀ has only 11 fraction bits below the input LSB. For
  R > 1024 (D = 11), the shift would therefore drop the input LSB of every
  sample. The truncation bias of about 1000 summed samples then reaches
  ½ output LSB. With 6 guard bits, nothing is lost up to D = 16. The
  multiplier inputs stay at 27 bits.

### Measured accuracy

`tb_decimation_accuracy` drives a 0.9 full-scale sine at 0.13 of the output
rate. It compares the output with a floating-point model of the same
algorithm. The model uses the same quantised input, R and 16-bit
coefficients, so the difference is only the design's own rounding. Errors are
in units of 2^−15, the output LSB:

| R (realised) | truncate: mean / max | round last: mean / max | round all: mean / max |
|---|---|---|---|
| 2 | −0.50 / 0.99 | −0.01 / 0.50 | 0.00 / 0.50 |
| 3.44999 | −0.50 / 1.01 | 0.00 / 0.50 | 0.00 / 0.50 |
| 4 | −0.51 / 1.01 | 0.00 / 0.49 | 0.00 / 0.49 |
| 49.989 | −0.51 / 1.01 | −0.01 / 0.51 | 0.00 / 0.50 |
| 107.967 | −0.50 / 1.01 | −0.02 / 0.51 | −0.01 / 0.50 |
| 1040.254 | −0.53 / 1.01 | −0.01 / 0.51 | 0.00 / 0.50 |

These match the reference design's published errors: mean −½ LSB and max
1 LSB for truncation; mean near 0 and max ½ LSB for both rounding versions.
Measured against the model, the SNR is 90.6–91.1 dB for truncation and
96.9–98.0 dB for rounding.

### Measured frequency response

The filters were designed for these targets: 80 % of the output band
(0.4·F_out) usable, ±0.008 dB passband ripple, and 80 dB stopband
attenuation. `tb_decimation_sweep` measures the default design (`RND_LAST`)
against them at R = 2.3, 7.77 and 50.5. It fits a sine of known frequency to
the output.

| | R = 2.3 | R = 7.77 | R = 50.5 |
|---|---|---|---|
| gain error, 7 tones 0.013–0.397 F_out | within ±0.001 dB | within ±0.001 dB | within ±0.001 dB |
| SNR (tone vs. everything else) | 90.9–94.8 dB | 94.8–96.3 dB | 97.0–97.5 dB |
| SFDR (tone vs. largest spur) | 95.2–102.4 dB | 100.5–106.2 dB | 109.0–112.0 dB |
| worst alias of a stopband tone | −75.7 dB | −75.6 dB | −75.6 dB |

The stopband falls short of 80 dB. The cause is the halfband's coefficients
rounded to 16 bits, not the datapath. Computed from those taps alone, the
response rises to −74.7 dB near 0.72·F_out. It also exceeds −80 dB in a few
narrow bands between 0.60 and 0.89·F_out. The unrounded design coefficients
reach −81 dB. Meeting 80 dB needs more coefficient bits, which means wider
`COEF_W` products in `fir_halfband`.

## Verification

Every block has a self-checking testbench in `tb/`. They compare against a
bit-exact reference model, `tb/decim_ref_pkg.sv`. The model computes the same
arithmetic **serially**, one sample at a time, with 64-bit integers. It has
no lanes, no packing and no pipeline, so it checks the parallel structure
independently.

`tb_decimation` runs the whole design at its default size for:

* R = 1 (the minimum), 1.37, 2, 3.45, 4, 50, 107.89 and 1035.02;
* random input with full-scale values, followed by a constant.

It checks:

* every output bit for bit against the model;
* the output rate;
* that the settled output of a constant input equals the input within 0.1 %.
  This gain check does not depend on the model.

It also counts that each mechanism occurred: dumps, packing wrap-around,
fractional R, Farrow pipeline fill, delay-branch reads, and changes of R.

`tb_decimation_accuracy` runs one instance of each `ROUNDING` version side
by side. It checks each bit for bit against the model set to the same
rounding. It also checks the error bounds of the table above: max error
≤ 0.55 LSB and |mean| ≤ 0.05 LSB when rounding; max ≤ 1.1 LSB and mean in
[−0.6, −0.4] LSB when truncating.

`tb_decimation_sweep` runs the sine sweep behind the table above. It checks
a gain error within ±0.008 dB and an SNR of at least 80 dB for every
passband tone, and an SFDR of at least 80 dB. The spurs are found with a
DFT of the fit residual. For stopband tones it checks the alias is below −74 dB, the
level the rounded coefficients allow.

The unit testbenches also check the latencies: 6 clocks for `u_calculator`,
the 6-word fill for `set_valid_out`, 19 clocks for `fir_halfband` and
20 clocks for `halfband_top`. `tb_sort_samples` replays the three-clock
packing example above.

To run one testbench with Verilator (from the directory holding `rtl/` and
`tb/`):

```
verilator --binary --timing --assert rtl/decim_pkg.sv tb/decim_ref_pkg.sv \
    rtl/*.sv tb/tb_decimation.sv --top-module tb_decimation -o sim
./obj_dir/sim
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Departures and own choices

* **Vendor cores.** The reference design uses a generated FIR core and FIFO
  and hand-instantiated DSP slices. Here they are plain RTL:
  * `fir_halfband` is a pipelined FIR, padded to the same 19-clock latency.
  * `hb_fifo` is a register-array FIFO of the same 96 × 32 size.
  * Multiplies are written with `*`.
* **Delay branch gating.** The reference describes the counter as gating the
  FIFO *write* enable, but its block diagram gates the delayed *read* enable.
  The read side is gated here. This is what produces the 3-word offset.
* **Pipeline delays.** They follow this design's own pipeline: 1 clock on
  the input and 6 clocks on the dump flags. The reference used 1, 7, 11 and
  12 clocks.
* **Output valid.** `out_valid` and `scaled_valid` are added. A live bit
  keeps samples taken during reset out of the accumulators.
* **Accumulator guard bits.** The reference gives no accumulator width. The
  6 guard bits are this design's choice, explained under number formats.
* **Interval convention.** A flag on sample k closes the interval *before*
  k. This was derived from the definition of μ.
* **Lane count.** Only 8 lanes are supported: `halfband_top` is written for
  8. The reference names 16 lanes as the way to reach 5 GSa/s, but did not
  build it.
* **Timing and resources.** No FPGA timing or resource figures are claimed
  for this RTL.
* **Known signal limits.** These come from the algorithm, not the RTL:
  * Input tones near 1/3 and 1/4 of the output rate fold onto themselves.
    SNR is poor there.
  * The resolution of R is limited by the 16-bit r_inverse.
  * The stopband attenuation is about 75 dB near the band edge, limited by
    the 16-bit halfband coefficients (see measured frequency response).

## Files

`rtl/`: `decim_pkg` (formats, coefficients), `decimation` (top),
`accumulate_top`, `mu_calc`, `u_calc_top`, `u_calculator`, `integrate_dump`,
`sort_samples`, `select_samples`, `farrow_top`, `farrow_filter`,
`set_valid_out`, `scale_data`, `halfband_top`, `fir_halfband`, `hb_counter`,
`hb_fifo`, `delay_line` (helper).
`tb/`: `decim_ref_pkg` (reference model), `tb_<module>` for each module,
`tb_decimation_accuracy` and `tb_decimation_sweep`.
