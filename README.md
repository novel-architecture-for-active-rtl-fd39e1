# Adaptive noise cancellation with a Q18 LMS line enhancer

This is an FPGA audio de-noiser. Audio comes in from an AC'97 codec. The chip adds
pseudo-random white noise to it, then removes that noise again with an adaptive
FIR filter trained by the least-mean-square (LMS) algorithm. The cleaned audio
goes back out through the codec's DAC. All arithmetic is 19-bit fixed point
(Q18: one sign bit and 18 fraction bits). There is no floating point. The only
multiplier that is a fixed scale factor, the LMS step size, is a barrel shifter.

The RTL follows the architecture in *"Novel Architecture for Active Noise
Cancellation System Using Least Mean Square Algorithm"* (a Spartan-6 / ATLYS
board design). That paper gives the block structure, the LMS equations, the
Q18 word and the filter order. It does not give the inner workings of most
blocks, so many details below are choices made here. The section
"Where this RTL departs from or goes beyond the paper" lists them.

## How noise is removed: the line enhancer

The filter sees two versions of the same noisy signal:

* the primary signal `d(k) = S(k) + N(k)`, where S is the audio and N the noise;
* the reference signal `x(k) = d(k-1)`, the same signal one sample later.

Audio is correlated from one sample to the next. White noise is not. A
predictor that estimates `d(k)` from `x(k), x(k-1), … x(k-28)` can therefore
predict only the audio part. Its output `y(k)` is the de-noised signal, and
the prediction error `e(k) = d(k) - y(k)` is mostly the noise. This set-up is
called an *adaptive line enhancer*. The system output is `y(k)`, not `e(k)`.

Per sample, with `N_TAPS = 29` weights `w(i)`:

```
y(k)    = sum_{i=0}^{28} w(i) * x(k-i)          fir_mac      (multiplier + adder arrays)
e(k)    = d(k) - y(k)                            ale          (subtractor)
w(i)   += mu * e(k) * x(k-i)   for all i         weight_update (multiplier array + weight registers)
```

The weights start at zero.

### Choosing the step size with a shifter

LMS converges only if `0 < mu < 2 / ||x(k)||^2`, where `||x(k)||^2` is the
energy of the 29 samples in the delay line. `step_size` keeps that energy as a
running sum. Each new sample adds `x_new^2` and removes `x_old^2`, the square of
the sample leaving the delay line. It then sets mu to a power of two:

```
P        = ||x||^2 in Q36,   msb(P) = position of its leading one
mu_shift = clamp(msb(P) - 36 + 1 + MU_MARGIN, MU_SHIFT_MIN, MU_SHIFT_MAX)
mu       = 2^-mu_shift      =>  mu * ||x||^2 < 2^-MU_MARGIN
```

With the defaults (`MU_MARGIN = 2`, shift range −8..15), mu stays below a
quarter of `1/||x||^2`, which is eight times inside the stability bound. This
makes the filter a power-normalised LMS with power-of-two steps. `mu*e` is a
shift of `e`, so no multiplier is needed.

The shift is signed, so mu can exceed 1 (up to 2^8). Quiet inputs need this.
A constant input of 2000 LSB (under 1 % of full scale) has `||x||^2` of about
1.7·10⁻³, so the normalised step is about 2^7. With mu capped at 1/16, that
input would move the weights by less than one LSB per sample, and the
output would never settle. With the signed shift it settles in about 46
samples (`tb_ale_step`).

Until 29 samples have entered the delay line, the step is held at its smallest
value (`2^-15`). In that period the energy estimate does not yet cover a full
window, and starting with mu near zero keeps the first updates harmless. The
`warm` output (`filter_warm` on the top) shows when this period is over.

`mu*e` leaves `step_size` as `e * 2^(15 - mu_shift)`, a left shift of e by
0 to 23 places. That is mu·e with 15 extra fraction bits, so small steps do
not truncate `e` to zero.
`weight_update` multiplies it by each tap and shifts the product back to Q18.

### Fixed-point rules

| quantity | format | how it is formed |
|---|---|---|
| samples, d, x, y, e, w | 19-bit Q18, range [-1, 1) | |
| products w·x | 38-bit Q36 | exact |
| filter sum | 43-bit Q36 | exact, then `>>> 18` (truncation toward −∞) and clamp to 19 bits |
| e = d − y | 19-bit | clamp |
| energy P | 43-bit unsigned Q36 | exact running sum |
| mu·e | 42-bit Q33 | shift of e |
| weight step | Q18 | `(mu·e · x) >>> 33`, added to w, clamp |

Every clamp sets a flag. In the top level, these flags together with the
noise-addition clamp drive the `clip` output.

## The signal chain (`audio_filter`)

```
 codec ADC ──► audio_driver ──► serial_adder ──► d(k) ──────────────┬──► ale (dk) ──► y(k) ──┐
 (AC-link)      left_in         (+ noise_gen)                        │                       │
                                                   sample_delay ◄────┘                       │
                                                        └── x(k)=d(k-1) ─► ale (x_in)        │
 codec DAC ◄── audio_driver ◄── selector (sel=0: y(k), sel=1: d(k)) ◄────────────────────────┘
```

One sample moves through the chain per AC'97 frame (48 kHz, about 20.8 µs).
Cycles are counted in the system clock from `sample_strobe`:

| cycle | event |
|---|---|
| 0 | `audio_driver` presents the left ADC sample with `sample_strobe`; `serial_adder` loads sample and noise word; `noise_gen` steps |
| 1–19 | bit-serial addition, one bit per cycle |
| 20 | `done`: d(k) is ready; `ale` accepts d(k) and x(k) = d(k−1), which `sample_delay` still holds |
| 21 | `ale` forms y(k) and e(k) |
| 22 | `filter_done`; weights update at the end of this cycle |
| 23 | `selector` holds the new output word |

The testbench checks the full 23-cycle strobe-to-`filter_done` latency. The
codec reads the output word at the start of the next frame, so each output
leaves one frame after its input arrived.

Only the left input channel is processed. The result goes to both DAC
channels. The `sel` switch plays either the cleaned signal or the noisy
signal, so the two can be compared by ear.

### Noise source (`noise_gen`)

The noise source is a 32-bit maximal-length LFSR (`x^32 + x^22 + x^2 + x + 1`,
seed `0xACE12468`). A plain LFSR stepped once per sample would produce words
that are shifted copies of each other. The predictor could then learn the
noise. The generator therefore steps 32 times per sample through an unrolled
network, so successive words share no state bits. The noise word is the low
19 bits, scaled by `2^-NOISE_AMP_SHIFT`. The default (3) gives noise uniform in
[−1/8, 1/8).

### Noise addition (`serial_adder`)

The noise is added by a bit-serial adder: one full adder and one carry
flip-flop walk the operands from the LSB up. At the end, a signed overflow is
replaced by the nearest full-scale value.

## Codec interface (`audio_driver`, `ac97_link`, `ac97_cmd`)

The codec drives the 12.288 MHz `ac97_bit_clk`. Everything that touches the
serial link runs on that clock.

* **`ac97_link`** frames the link. A frame is 256 bit periods: a 16-bit tag,
  then twelve 20-bit slots, MSB first. SYNC is high for 16 periods, starting
  one period before the tag. Output bits change on the rising edge, and input
  bits are sampled on the falling edge.
  * Slot 1 carries the register address (bit 19 = read).
  * Slot 2 carries the register data.
  * Slots 3 and 4 carry left and right PCM data.
  * After slot 4 has arrived (period 96), the ADC words and the codec-ready tag
    bit are latched, and `in_toggle` flips.
* **`ac97_cmd`** configures the codec. Once the codec reports ready, it writes
  one register per frame and repeats the list forever, so switch changes take
  effect within five frames:

  | register | value |
  |---|---|
  | 0x02 master volume | attenuation `31 - volume` on both sides |
  | 0x04 headphone volume | attenuation `31 - volume` on both sides |
  | 0x18 PCM-out volume | 0x0808 (0 dB) |
  | 0x1A record select | `source` on both sides (AC'97 codes: 0 mic, 1 CD, 4 line in, …) |
  | 0x1C record gain | 0 dB |

* **`audio_driver`** crosses between the bit-clock domain and the system
  domain:
  * A two-flop synchroniser and an edge detector on `in_toggle` produce
    `sample_strobe`, 3–4 system cycles after the link latches the ADC words.
    Those words then stay stable for a whole frame.
  * 20-bit codec words become Q18 by dropping the LSB.
  * The playback words are read by the link at period 255. That is about 13 µs
    after the strobe, long after the filter has finished. This timing margin,
    not a handshake, makes that crossing safe. Keep it in mind if the
    processing is ever made much slower.
  * The driver also drives the codec's reset from the system reset, and
    synchronises the release of the bit-clock domain's reset.
  * The codec stops its bit clock while it is held in reset. For that reason,
    `ac97_link` and `ac97_cmd` use a *synchronous* reset, which takes effect
    on the first two bit-clock edges. The system side ignores `in_toggle`
    until the synchronised bit-domain reset has been released. Whatever state
    the link held before then therefore cannot produce a false sample.

## Files

| file | contents |
|---|---|
| `rtl/anc_pkg.sv` | Q18 type, widths, AC-link constants, clamp helpers |
| `rtl/audio_filter.sv` | top level |
| `rtl/ale.sv` | adaptive line enhancer: sequencing, subtractor, sub-blocks |
| `rtl/tap_fifo.sv` | 29-sample delay line |
| `rtl/fir_mac.sv` | filter multiplier and adder arrays |
| `rtl/step_size.sv` | running input energy, mu shift, mu·e barrel shifter |
| `rtl/weight_update.sv` | update multipliers and weight registers |
| `rtl/sample_delay.sv` | z⁻¹ register forming the reference |
| `rtl/noise_gen.sv` | leap-forward LFSR noise source |
| `rtl/serial_adder.sv` | bit-serial saturating adder |
| `rtl/selector.sv` | output multiplexer |
| `rtl/audio_driver.sv` | codec driver and clock-domain crossing |
| `rtl/ac97_link.sv` | AC-link framing |
| `rtl/ac97_cmd.sv` | codec register command state machine |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ale_psnr.sv`, `tb/tb_ale_step.sv` | PSNR over 65536-sample blocks; convergence to a constant input |
| `tb/ac97_codec_model.sv` | behavioural AC'97 codec (bit clock, sine ADC, register and DAC capture) |
| `tb/lms_ref_pkg.sv` | integer reference model of the Q18 LMS filter |

### Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_TAPS` | 29 | top, `ale` and below | filter length |
| `DATA_W`, `FRAC` | 19, 18 | LMS blocks | Q18 word |
| `MU_SHIFT_MIN`, `MU_SHIFT_MAX` | −8, 15 | top, `ale`, `step_size` | mu range 2⁸ … 2⁻¹⁵ (signed shift) |
| `MU_MARGIN` | 2 | `ale`, `step_size` | mu·‖x‖² < 2^−MU_MARGIN |
| `NOISE_AMP_SHIFT` | 3 | top | noise amplitude 2^−3 |

## Simulating

The testbenches use delays and run with Verilator 5 in timing mode. Each one
prints `TB_RESULT checks=N failures=M` and stops by itself. From the
repository root, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/anc_pkg.sv tb/lms_ref_pkg.sv \
  tb/tb_audio_filter.sv --top-module tb_audio_filter -Mdir obj
./obj/Vtb_audio_filter
```

For the other testbenches, replace `tb_audio_filter`. `tb/lms_ref_pkg.sv` is
needed only by `tb_ale`, `tb_ale_psnr`, `tb_ale_step` and `tb_audio_filter`.

`tb_audio_filter` runs the whole system at its default parameters:

* 1500 frames (about 31 ms of audio), simulated in a few seconds;
* input: a 0.9 full-scale sine with a period of 24 frames (2 kHz), from the
  codec model.

It checks, for every sample:

* the noise word, the noisy sample, the filter output and the DAC word,
  against its own model of the chain;
* the 23-cycle latency;
* that the ADC and DAC words cross the AC-link unchanged and in order.

At the end it checks:

* the codec registers, including a volume change made during the run;
* that no command went out before the codec was ready;
* SYNC timing;
* convergence. In the last 300 samples, the filtered output's error against
  the clean sine is about a quarter of the added noise power (about −6.3 dB).

It also counts how often each mechanism fires: warm-up with the smallest
step, noise-addition clamping, both selector positions, commands waiting for
ready, and the command list wrapping. It fails if any of them never happens.

`tb_ale` runs 3000 samples of a noisy sine through the filter alone. It
compares y, e and the step shift with the reference model every sample.

`tb_ale_psnr` measures PSNR (peak = full scale) over two blocks of 65536
samples, with the filter alone at its default size:

* input: two tones (periods of 13.1 and 31.7 samples) plus uniform noise in
  [−1/8, 1/8), the same noise level the top level adds;
* every sample is compared bit for bit with the reference model;
* result: noisy input 22.8 dB, filtered output 27.8 dB in the first block and
  28.0 dB in the second. The test requires a gain of at least 3 dB.

For this signal, the best possible 29-tap predictor (the Wiener solution)
would give a gain of about 8.8 dB. The power-of-two step is fairly large
(`mu*||x||^2` up to 1/4), which trades steady-state accuracy for fast
tracking. Raising `MU_MARGIN` lowers the step and brings the gain closer to
that bound. The gain also depends on the signal. Two close, low tones
(periods of 37 and 102 samples) are hard to separate with 29 taps. They gain
only about 1.3 dB, against a Wiener bound of 3.6 dB.

`tb_ale_step` repeats a convergence experiment at the filter's default size:

* input: a constant 2000 LSB, then a step to −4000 LSB;
* result: the output is within 2 % of the input after 46 samples
  (137 clock cycles), and 44 samples after the step;
* it also checks every sample bit for bit, and that the shift went negative.

## Where this RTL departs from or goes beyond the paper

Choices made here where the paper says nothing:

* **Inner workings.** These are all this design's own: the 3-cycle filter
  sequence, truncation and clamping, the power-of-two step rule with its
  margin and limits, the warm-up hold, the LFSR polynomial, leap-forward and
  amplitude, the bit-serial adder's timing, the selector's inputs, the codec
  register list, and the clock-domain crossing.
* **Filter order 29** is implemented as 29 taps.
* **Word width.** The paper's Q18 word has 19 bits, and that is used
  throughout. A simulation waveform in the paper shows 18-bit filter ports
  (`x_in[17:0]`, `y_out[17:0]`). The 19-bit word of the text was followed.
* **Channels.** Only one channel is processed. The paper's top-level netlist
  shows a second serial-adder instance whose use is not described; it is not
  built.
* **"Frames of 64 audio samples".** The paper mentions these for the codec,
  but AC'97 carries one sample per channel per frame. No 64-sample buffering
  is built.
* **Status outputs.** `codec_ready`, `filter_warm` and `clip` are additions.

Known differences in implementation results:

* **Multipliers and speed.** The filter and update arrays are fully parallel:
  29 + 29 multipliers plus two squarers. The whole 29-product sum is formed in
  one clock cycle. The paper reports 48 DSP slices and 110 MHz on Spartan-6.
  This RTL has not been synthesised for that device. To reach such clock rates
  it would need pipelining in `fir_mac`, or sharing of multipliers over the
  many idle cycles of each 20.8 µs frame.
* **PSNR.** The paper plots PSNR measured over blocks of 65536 samples in a
  simulation environment, without stating the input. That measurement is not
  part of the hardware. `tb_ale_psnr` makes the same kind of measurement on a
  generated signal, so its numbers are not comparable with the paper's.

Outside the RTL:

* **Codec.** The AC'97 codec itself (ADC, DAC, bit-clock source) is an
  external chip. It exists here only as the behavioural model in
  `tb/ac97_codec_model.sv`.
* **Board clocking.** The board's clocking is not part of the RTL. `clk` is
  expected to be a system clock well above 12.288 MHz; 100 MHz was simulated.

## Things to know before changing it

* A new sample may enter `ale` at most every third cycle. An assertion flags
  a strobe that arrives while the filter is busy. In the top level,
  strobes are a frame apart.
* `MU_MARGIN = 1` or `0` makes adaptation faster but noisier
  (mu·‖x‖² < 1/2 or < 1). Larger values converge more slowly and leave less
  excess error. Raising `MU_SHIFT_MIN` to 0 or above caps mu at 1 or less,
  and then small inputs adapt very slowly.
* The testbenches' reference model (`lms_ref_pkg`) mirrors the rounding rules
  above. If the arithmetic changes, change both.
