# A time-multiplexed digital formant speech synthesizer

This synthesizer turns frames of formant control data into speech samples in
real time. A formant synthesizer models the vocal tract as a cascade of
resonators. Each resonator sits at a formant frequency with a given
bandwidth, and it is excited either by a pulse train at the pitch frequency
(voiced sounds) or by noise (unvoiced sounds).

The central idea is that all of the filtering is done by **one arithmetic
unit**: a subtractor, a multiplier and a three-input adder. That unit is
time-shared by ten second-order filter sections. A two-pole section needs
only two multiply-add steps per output sample, so a single unit can serve the
whole filter bank many times faster than the speech sampling rate. The
coefficients and the delayed filter values of all sections sit in two
circulating shift registers, which line up the right words for each step.

The RTL is a SystemVerilog rendering of a 1970s synthesizer built from TTL
logic. That machine was attached to a minicomputer and ran at sampling rates
up to 12.8 kHz, with 24-bit signals and 16-bit coefficients. The structure,
word widths and register sizes below follow that machine. The step schedule,
the control-word layout, the coefficient format and the handshakes are this
design's own choices; each is marked as such below.

## Signal paths

```
                 whisper
 pitch pulse ──►─┐ switch
                 ├──► ×A_V ─► R1 ─► R2 ─┬► R3 ─► R4 ─► R5 ─► R6 ─► Z7 ──► (+) ─► 16-bit digital return
 noise ───────►──┘                      │                                 ▲      12 selected bits ─► D/A
   │                                    ▼                                 │
   └────────────► ×A_N ─────► voiced fricative gate ─► U1 ─► U2 ─► UZ ────┘
```

* **Voiced path**: six two-pole resonators (R1–R6), then one two-zero filter
  (Z7).
  * R1–R4 (five of them during non-nasal sounds) carry the vocal-tract
    formants.
  * One resonator gives the fixed spectral compensation. It uses two real
    poles for glottal shape and radiation.
  * R6 and Z7 are the nasal pole-zero pair. Setting them to the same
    frequency and bandwidth makes them cancel exactly, which in digital
    arithmetic is easy.
* **Unvoiced path**: two two-pole filters (U1, U2), then one two-zero filter
  (UZ). One pole and the zero shape the fricative spectrum. The other pole is
  this path's own spectral compensation.
* **Whisper switch**: feeds the noise into the voiced path instead of the
  pulse.
* **Voiced fricative gate** (for *z*, *v*, *zh*, voiced *th*): lets the noise
  through only during part of each pitch period, so the unvoiced path is
  excited by pitch-synchronous bursts. It is controlled by the signal after
  R2.
  * Only this behaviour is given for the original, not its circuit.
  * This design's gate is open while the top 16 bits of the R2 output exceed
    a threshold word. With the mode bit off, the noise passes unchanged.

Each filter is built to have unit gain at zero frequency, whatever its
coefficients. This keeps the vocal tract's DC transmission at one.

## The section equation and its coefficients

Every section, pole or zero, computes

```
y = x + k_old·(x − d2) + k_new·(x − d1)
```

Here `x` is the section input. `d1` and `d2` are the section's delayed
values from one and two samples back.

* **Two-pole section**: `d` are past *outputs*. This is
  `y = G·x + B·y1 − C·y2` with `G = 1 − B + C`, which is unity-gain
  normalized. For a pole pair at radius `r = exp(−π·BW/fs)` and angle
  `θ = 2π·F/fs`, `B = 2r·cos θ` and `C = r²`. Program
  `k_new = −B` and `k_old = C`.
* **Two-pole section with real poles** `+a` and `−b` (spectral
  compensation): `k_new = −(a − b)` and `k_old = −a·b`.
* **Two-zero section**: `d` are past *inputs*. This is
  `(1 − B z⁻¹ + C z⁻²) / (1 − B + C)`. Program `k_new = B/G` and
  `k_old = −C/G`.
* All coefficients are 16-bit two's complement in **Q3.13**: value × 8192,
  range −4 to +4.
  * Pole coefficients always fit.
  * A zero's coefficients grow like 1/G. Zeros below about 1.2 kHz with
    narrow bandwidths (at 10 kHz sampling) do not fit. Use a wider bandwidth
    there, or move `COEF_FRAC` in `fs_pkg`.
* A section with both coefficients zero passes its input unchanged. This is
  the state after reset.

Products are truncated toward minus infinity: an arithmetic shift right by 13
bits. Each step result wraps in 24-bit two's complement. A result that does
not fit lights the overflow flag.

## How one arithmetic unit serves ten sections

One sample is 20 steps, two per section. The sections are served in the
order R1…R6, Z7, U1, U2, UZ. The voiced path goes first, so the gate already
has this sample's R2 output when U1 starts.

| step        | subtractor | multiplier × | adder inputs             | result goes to             |
|-------------|------------|--------------|--------------------------|----------------------------|
| first (A)   | x − d2     | k_old        | x + product              | partial register           |
| second (B)  | x − d1     | k_new        | partial + product        | section output, delay line |

* The **input multiplexer** gives `x` for both steps:
  * the voiced excitation for R1;
  * the gated noise for U1;
  * the previous section's registered output for every other section.
* The **coefficient shift register** (`coef_sr`, 20 × 16 bits) moves one word
  per step and re-enters its head at the tail. The head is therefore always
  the coefficient of the current step.
* The **delay shift register** (`delay_sr`, 20 × 24 bits) holds `d2, d1` for
  each section in service order and also moves one word per step:
  * On step A its head is `d2`. The word that enters the tail is `d1`,
    taken from the next position; it becomes next sample's `d2`.
  * On step B its head is `d1`. The word that enters the tail is the new
    value: the output for a pole section, the input `x` for a zero section.

  After 20 steps every word is back in place. Both delays of every section
  are updated with a single word moved per step, and there is no addressing.
* The **accumulator** takes Z7's output and adds UZ's output. It registers
  the 24-bit sum.

Here each step takes one clock. The original did one step in about 3.9 µs
with serial arithmetic.

## Control frames and pitch-synchronous updates

The host sends a frame of 25 16-bit words over a valid/ready port
(`word_in`, `word_valid`, `word_ready`):

| word | meaning |
|------|---------|
| 0    | pitch period P, in samples (0 is taken as 1) |
| 1    | voice amplitude A_V (signed; placed in the top 16 of the 24 bits) |
| 2    | noise amplitude A_N (signed, same scaling) |
| 3    | mode: bit 0 whisper, bit 1 voiced fricative gate on |
| 4    | gate threshold (signed, compared with the top 16 bits of the R2 output) |
| 5–24 | for R1, R2, …, R6, Z7, U1, U2, UZ in turn: `k_old`, then `k_new` |

The memory buffer holds the frame and then takes no more words. Parameters
change only at the start of a pitch period, the sample that carries the
voice pulse:

1. At that sample, if a complete frame is waiting, the cycle timing first
   shifts the 20 coefficients from the buffer into the coefficient register.
   This takes 20 clocks.
2. On the last of those clocks, the pitch period, amplitudes, mode and
   threshold pass to the generators and the gate.
3. The buffer is then empty and accepts the next frame.

A period that starts with no complete frame keeps the old parameters. For
unvoiced speech the host simply picks a period; parameters still change once
per period.

## Excitation sources

* **Pitch pulse**: a down-counter marks one sample in every P. On that
  sample the voiced excitation is A_V; on all other samples it is 0.
* **Noise**: a 16-bit shift register forms each new bit as
  `X(n) = X(n−1) ⊕ X(n−2) ⊕ X(n−14) ⊕ X(n−15)`. It advances once per sample.
  A 1 gives +A_N and a 0 gives −A_N, so the noise is a random train of
  positive and negative pulses with a flat spectrum.
  * These are the taps specified for the original.
  * They repeat after 32767 bits, not the 65535 a maximal 16-bit sequence
    would give.
  * The taps are the `TAPS` parameter of `noise_gen`.
    `16'b1000_1000_0000_0101` (X(n−1), X(n−3), X(n−12), X(n−16)) gives a
    full 65535-bit sequence.
* The amplitude "multipliers" reduce to select and negate, because both
  sources are ±1 or 0.

## Sample timing

The sampling rate comes from the external clock `ext_clk`. Changing the
sampling rate therefore only means changing that clock.

* Its rising edge is synchronised into the system clock (two flops), and each
  edge starts one sample.
* A sample takes 22 system clocks: 20 steps, a start clock and an end clock.
  With a frame load it takes 42 clocks.
* `out_valid` comes 23 clocks after the external edge, or 43 with a load.
* Needed system clock:
  * at 12.8 kHz (78 µs per sample), at least 538 kHz;
  * at 10 kHz, at least 420 kHz;
  * in every case, at least four times the external clock.
* An edge that arrives while a sample is still running is dropped and sets
  the sticky `overrun` flag.

## Outputs

* `digital_out`: the 16 most significant bits of each output sample, for the
  host to store. It is valid with `out_valid`.
* `dac_code`: 12 consecutive bits of the 24-bit sum, starting at bit
  `dac_lsb`, for the D/A converter.
  * 12 gives the top 12 bits.
  * Values above 12 count as 12.
  * Lower settings let one listen to the low-order, noisy bits.
* `analog_out`: the output of the D/A model, code/2048 × 5 V.
* `overflow`: the overflow light. It sets when any step or the final sum
  leaves 24 bits and stays lit until `clear`.

## Modules

| file | role |
|------|------|
| `fs_pkg.sv` | widths, section order, frame layout, mode and control types |
| `formant_synth.sv` | top: wiring, section output registers, overflow light |
| `timing.sv` | external clock synchronizer, sample tick |
| `cycle_timing.sv` | load / run / done sequence, step counter, overrun flag |
| `memory_buffer.sv` | 25-word frame buffer with valid/ready input |
| `pulse_noise_gen.sv` | P, A_V, A_N, whisper switch; contains the two generators below |
| `pitch_pulse_gen.sv` | pitch period counter |
| `noise_gen.sv` | pseudorandom bit generator |
| `vf_modulator.sv` | voiced fricative gate |
| `input_mux.sv` | section input selection |
| `coef_sr.sv` | 20 × 16 coefficient shift register |
| `delay_sr.sv` | 20 × 24 delay shift register |
| `arith_unit.sv` | subtractor, multiplier, three-input adder, partial register |
| `accumulator.sv` | path sum, 16-bit return, D/A bit selection |
| `dac12.sv` | behavioural model of the 12-bit D/A converter (uses `real`, not synthesizable) |

Everything except `dac12` is synthesizable. The host computer, the cabinet,
the lamp and the switches are not modelled. Their signals are the top-level
ports.

## Simulating

Every module has a self-checking testbench in `tb/` that prints a
`TB_RESULT checks=… failures=…` line. For example, the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/fs_pkg.sv tb/tb_formant_synth.sv --top-module tb_formant_synth
./obj_dir/Vtb_formant_synth
```

`tb_formant_synth` runs the top at its default size for 4000 samples.

* It acts as the host. It sends frames whose coefficients are computed from
  random formant frequencies and bandwidths: vowels, nasals, whisper, voiced
  fricatives, unvoiced sounds and an overload frame.
* It compares every output sample, bit for bit, with an independent integer
  model of the two signal paths. It also checks the D/A code for changing
  bit selector settings, the analog level, the overflow light and the
  latency.
* After 4000 samples at 100 clocks per sample, it runs 2000 more at 78.125
  clocks per sample. That is the 12.8 kHz maximum rate with a 1 MHz system
  clock. The external clock is not aligned to the system clock, and no
  sample may overrun.
* It counts and requires each of these:
  * frame loads;
  * periods that keep their parameters;
  * whisper;
  * gate open and closed;
  * nasal cancellation;
  * overflow;
  * low bit selection;
  * an overrun (provoked at the end by running the external clock too fast).

The block testbenches check each module against its own reference. They
cover the noise sequence and its period, pulse spacing, the shift register
word order, the arithmetic with 64-bit integers, buffer handshakes and
cycle counts.

## Where this design departs from, or goes beyond, the original

* One step per clock, all bits in parallel. The original was serial TTL at
  about 3.9 µs per step.
* A separate 20-clock coefficient load before the first sample of a period.
  How the original interleaved the load is not known.
* The frame word order, the mode word, the threshold word and the
  valid/ready handshake are this design's.
* The voiced fricative gate is a simple threshold gate. The original used a
  nonlinear network that is not described.
* The coefficient binary point (Q3.13), truncation, wrap-on-overflow and
  reset values are this design's choices.
* The overrun flag is an addition.
* The noise taps follow the specification, with the period noted above.
