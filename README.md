# Adaptive Stimulation Artifact Rejection (ASAR) in SystemVerilog

A closed-loop neural implant records brain activity while it stimulates. The
neural signals of interest are small: local field potentials (LFP, 1-200 Hz) are
around 1 mV, and spikes (200 Hz-5 kHz) are around 100 uV. Each stimulation pulse
couples into the recording electrodes as an artifact of tens of mV. That is up to
100 times larger than the signal, and its frequencies overlap the signal band.
Blanking the recording during stimulation throws away the response to the
stimulus, which is the most interesting part.

ASAR removes the artifact digitally and in real time, with no knowledge of the
stimulation waveform. Its central idea is the **blind template**. The engine
does not model the path from the stimulator through tissue to the electrode,
which is non-linear. Instead, it takes the artifact as it appears on an
*adjacent* recording channel `d_k'`. It keeps only the samples of that channel
that stand out from its normal neural activity. A short linear adaptive filter
then learns how the artifact on the adjacent channel maps onto the channel being
cleaned, `d_k`, and subtracts its estimate. Mapping one recording onto a nearby
recording is close to linear. So a 16-tap normalised LMS (NLMS) filter is
enough, where a filter driven by the stimulation pulse would need far more taps.

This repository holds:

* the ASAR engine (`asar_core`) and its parts;
* the two test-chip versions of it, with their bit-serial pin interface:
  * an **LFP design**: 16-bit samples at 6 kS/s;
  * a **Spike design**: 12-bit samples at 24 kS/s;
* the artifact-rejection section of a 64-electrode / 32-channel sensing chip,
  in which four LFP engines can be assigned to any channel.

`asar_top` places the three side by side.

## How one engine works

```
 ch_template (d_k') --+--> [ statistics, phase I ] --avg, std--+
                      |                                        v
                      +--------------------------> [ template detector ] --u_i (16 x W)--+
                                                                                         v
 ch_clean (d_k) ----------------------------------------------------------> [ 16-tap NLMS ] --> output_clean
```

### Phase I: learning what "no artifact" looks like (`asar_stats`)

After reset, or after a `calc_rst` pulse, the engine watches the template
channel for N = 2^13 samples while no stimulation is applied. It accumulates
`S = sum x` and `T = sum x^2`. On the next sample slot it stores:

* `avg = S / N`
* `std = sqrt((T - S^2/N) / N)`

N is a power of two, so both divisions are shifts. The variance divides by N
rather than N-1, a negligible difference at this N. Phase I therefore lasts N+1
sample slots. During phase I, `train_mode_id` is 1, the template is forced to
zero, and the output is the input delayed by 4 clocks.

Training takes 1.37 s at 6 kS/s. The front-end's offsets and noise drift over
time, so `calc_rst` re-runs phase I without a chip reset. It also clears the
filter weights, which is this implementation's choice.

### The square root (`asar_sqrt_lut`)

The threshold must be accurate for small neural signals, whose variance is a
tiny fraction of the datapath range. The square root is therefore done in
floating-point style:

1. The argument is normalised by an even shift: `x = 2^(2n) * x_n`, with
   `256 <= x_n < 1024`. Here n is negative for small arguments, which means a
   left shift.
2. `sqrt(x_n)` is looked up in a 769-entry table with 8 fraction bits. The
   table is computed at elaboration, entry j being `floor(sqrt((256+j)*2^16))`.
3. The entry is shifted back by n.

The relative error is bounded over the whole range. The result carries 4
fraction bits and is truncated, so it is within 1/16 + 0.4 % of the true root.

### Phase II: the blind template (`asar_template_detect`)

A delay line holds the last 15 samples of `d_k'`. Together with the current
sample they make 16 candidates. Each candidate is compared combinationally with
the stored statistics:

```
u_i(l) = d_k'(i-l)   if |d_k'(i-l) - avg| >= alpha * std
       = 0           otherwise            (l = 0 .. 15)
```

Without stimulation, the adjacent channel stays inside the band, so `u_i = 0`.
The filter then adds nothing, and the output equals the input bit for bit.
When an artifact arrives, its samples pass the threshold and become the
template. The comparison is combinational, so detection costs no clock cycle.

`thresh_scale[1:0]` selects alpha = 2, 3, 4 or 5. The encoding is this
implementation's choice.

### The NLMS filter (`asar_nlms`)

This is the part that decides the quality of the cleaning. For every sample it
computes:

```
e    = d(i) - u_i . w_{i-1}                      priori error
w_i  = w_{i-1} + mu / (||u_i||^2 + eps) * u_i^T * e
s(i) = d(i) - u_i . w_i                          posteriori error = output
```

Two choices distinguish it from the LMS cancellers used before:

* **Normalised step.** The step is divided by the energy of the current
  template at every sample. A large artifact and a small one therefore adapt
  equally fast. No fixed step has to trade convergence speed against accuracy.
* **Posteriori output.** The output is computed with the weights *just
  updated* by the current sample, not the previous ones. With an aggressive,
  varying step, this is less sensitive to the step size and removes more of
  each new artifact.

Implementation details:

* Steps 1 to 3 form one combinational path, so the weight recursion closes in
  a single clock. This path contains the dot product, the template norm, one
  divider and 16 multiply-accumulates. At a 6-288 kHz clock its depth is
  harmless.
* The division is done on magnitudes. Its quotient is
  `g = e * mu * 2^(WF+GB) / (||u||^2 + eps)`, and each weight then moves by
  `u(l) * g / 2^GB`.
* Because `||u||^2 >= u(l)^2`, a weight step is never larger than
  `mu * e / u(l)`. The arithmetic therefore stays bounded even for a template
  with a single non-zero entry.
* Step 4 uses the registered template and weights in the next cycle.

Fixed-point formats (all parameters):

| quantity        | format                                               |
|-----------------|------------------------------------------------------|
| `d`, `u`, `s`   | signed W-bit integers (16 for LFP, 12 for Spike)     |
| weights         | signed `WW`=24 bits, `WF`=16 fraction bits, saturating |
| priori error    | saturated to W+8 bits                                |
| step quotient   | `GB`=8 guard bits                                    |
| filter sums     | rounded to nearest                                   |
| output          | saturated to W bits                                  |
| mu, eps         | mu = 2^-`MU_SHIFT` = 1/2, eps = 2^16 (`EPS`)          |

These widths, mu and eps are this implementation's choices, not published
values (see "Where this departs").

### Pipeline and timing (`asar_core`)

| register | content                                          |
|----------|--------------------------------------------------|
| 1        | `ch_clean`, `ch_template` input registers        |
| 2        | statistics, template delay line, NLMS weights    |
| 3        | posteriori error                                 |
| 4        | `output_clean`                                   |

With `smp_en` held high, `output_clean` is the sample presented 4 clocks
earlier. `smp_en` marks a new sample, and the later stages follow it one clock
at a time. So an engine fed one sample every W clocks keeps the same 4-clock
latency. `train_mode_id` falls N+2 clocks after the first sample is presented:
one for the input register, then N+1 for phase I.

`artifact_det` is aligned with `output_clean` and tells whether the template
was non-zero for that sample.

## The test-chip designs (`asar_standalone`)

The two fabricated engines had too few pads for parallel data, so every
multi-bit recording input and output is bit-serial. The engine clock therefore
runs at W times the sample rate:

| design | W  | sample rate | clock   |
|--------|----|-------------|---------|
| LFP    | 16 | 6 kS/s      | 96 kHz  |
| Spike  | 12 | 24 kS/s     | 288 kHz |

Serial framing (chosen here):

* Words are sent MSB first.
* `frame_in` is high with the first bit of each input word. It is common to
  `ch_clean_sdi` and `ch_template_sdi`.
* `output_frame` is high with the first bit of each output word.

The first output bit of a sample appears 6 clocks after its last input bit:
1 for `asar_s2p`, 4 for the core and 1 for `asar_p2s`.

`calc_rst`, `thresh_scale`, `global_rst_n` (asynchronous) and `train_mode_id`
are plain pins.

## The sensing-chip array (`asar_sense_array`)

The sensing chip digitises 32 channels and corrects the non-linearity of its
VCO front-ends. Four LFP engines follow, running at the 6 kHz sample clock.
Each engine e has three settings:

* `eng_en[e]` enables it;
* `clean_sel[e]` picks the channel it cleans;
* `tmpl_sel[e]` picks the adjacent channel it takes its template from.

All 32 channels pass through a 4-stage delay, so they stay aligned with the
engines. At the output, each channel that an enabled engine cleans is replaced
by that engine's result. If two engines clean the same channel, the lower
number wins.

Two test paths are provided:

* `use_ext_data` takes the channels from `ext_in` instead of the non-linearity
  correction.
* `bypass_asar` passes all channels through, delayed, without cleaning.

The configuration is meant to be static while samples flow.

These blocks of the sensing chip are not in this RTL:

* the front-ends, oscillator, regulators and power-on reset, which are analog;
* the non-linearity correction;
* the decimation filters;
* the 3-wire SPI;
* the system controller.

For the digital ones, no function is defined precisely enough to implement.
`sns_ch_in` is where the non-linearity correction would connect, and
`sns_ch_out` is where the decimation filters would.

## Where this departs from, or goes beyond, the published design

* **Bit widths, mu and eps.** The published per-node bit widths of the filter
  are not reproduced. Weight format, guard bits, mu = 1/2 and eps = 2^16 are
  choices made here. With mu = 1/2, the posteriori output keeps about half of
  the remaining priori error at each sample. eps is large on purpose: when
  only a few small template samples pass the threshold, ||u||^2 is tiny, and
  with eps = 1 the step then follows the neural signal and template noise so
  hard that the weights never settle.
* **Convergence time.** The published engines converge in under 167 us (LFP)
  and 42 us (Spike), which is about one sample. This RTL has not been shown to
  match that. In the testbenches, with synthetic pulses, the residual reaches
  25-43 dB below the artifact after a few tens of pulses.
* **Variance divisor.** The variance divides by N instead of N-1.
* **Square-root table range.** The table covers x_n = 256..1024, which is
  769 entries.
* **Template history.** The template detector applies the current threshold to
  the whole history. This is exactly `u_i(l)` as defined above, even if
  `thresh_scale` changes mid-stream.
* **This implementation's own choices:**
  * the serial framing;
  * the `smp_en` strobe;
  * the `artifact_det` and `det_enable` outputs;
  * clearing the weights on `calc_rst`;
  * the sensing array's select registers, output replacement and priority.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|-----------|----------------|
| `tb_asar_sqrt_lut` | 5000 arguments against real `sqrt` |
| `tb_asar_stats` | exact mean; std within tolerance; phase I of exactly N+1 slots with a strobed `smp_en`; `calc_rst` mid-training |
| `tb_asar_template_detect` | every template entry against the blanking rule, for random statistics and threshold scales |
| `tb_asar_nlms` | sample by sample against a bit-true 64-bit integer model; weight convergence; clear |
| `tb_asar_core` | phase lengths; bit-exact pass-through without artifacts; at least 25 dB attenuation once converged; re-training |
| `tb_asar_s2p`, `tb_asar_p2s` | framing and timing |
| `tb_asar_standalone` | the serial Spike design end to end, including the 6-clock serial latency |
| `tb_asar_sense_array` | channel routing, alignment, bypass and external data |
| `tb_asar_top` | see below |
| `tb_asar_workloads` | pulse trains (130 Hz x 250 us, 300 Hz x 200 us, 50 Hz x 300 us) and theta-burst on an LFP engine (6 kS/s) and a Spike engine (24 and 30 kS/s), full training length; training and detection flags, at least 20 dB attenuation, exact pass-through between pulses |

`tb_asar_top` runs the whole top with every parameter at its default, including
N = 2^13. It exercises:

* both serial designs, on their own clocks;
* the 32-channel array with a 2-engine conflict;
* the bypass and external-data windows.

It counts that training, pass-through, template detection, re-training, engine
priority, bypass and external data each occurred. It runs in a few seconds.

`tb_asar_workloads` is closer to a use case than the block tests. One tissue
response (0.8 ms decay, mild quadratic distortion) reaches the template
electrode at once and the cleaned electrode 0.17 ms later, smeared over two
samples, on top of a neural tone 60 dB below the pulse. The residual ends up
29.2 / 28.3 dB (LFP, train / theta-burst), 27.9 / 26.8 dB (Spike, 24 kS/s)
and 28.7 / 25.4 dB (Spike, 30 kS/s) below the artifact. At the edges of the
usual pulse range (300 Hz x 200 us and 50 Hz x 300 us) it is 42.4 / 30.7 dB
(LFP) and 28.0 / 28.3 dB (Spike, 30 kS/s). It runs in a few seconds.

The artifacts in all testbenches are synthetic: biphasic pulses plus uniform
noise. Clinical recordings were not available, so the attenuation figures above
are not comparable with measurements on real data.

## Simulating

All files are SystemVerilog-2017. Modules use `asar_pkg`, which must be read
first. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/asar_pkg.sv tb/tb_asar_top.sv --top-module tb_asar_top
./obj_dir/Vtb_asar_top
```

Any other testbench builds the same way; replace `tb_asar_top` with its name.
`verilator --lint-only -Wall -Irtl rtl/asar_pkg.sv rtl/asar_top.sv` lints the
design.

Parameters to change:

* `W`: sample width;
* `LOG2N`: training length;
* `MU_SHIFT`, `EPS`: step and its regularisation;
* `WW`, `WF`: weight format;
* `NCH`, `NENG`: array size.

Testbenches that want short runs override `LOG2N`.

The remaining lint warnings are unused signals: the weight vector that
`asar_nlms` exposes for testing, and observation outputs that a parent does not
use.
