# 6-bit 16-GS/s time-interleaved flash ADC with background calibration

A single flash converter cannot reach tens of gigasamples per second at low power. This design
gets there by interleaving. Eight identical 6-bit flash channels each run at 2 GS/s. Their
sampling clocks are spaced by T_s = 62.5 ps, so the eight channels together deliver
16 GS/s.

Interleaving brings two errors that a single converter does not have:

- **Comparator offsets.** A flash channel has 63 comparators. Each one's offset moves a
  code edge. Because the offsets differ from channel to channel, they show up as
  fixed-pattern noise at the interleaving frequency.
- **Timing skew.** Each channel's clock travels its own route to its sample-and-hold.
  Any route mismatch moves that channel's sampling instant away from the ideal grid. For
  a fast input this is an amplitude error proportional to the signal slope.

Both errors are removed in the background, while the converter runs on the real signal. No
calibration phase or test tone is needed. Both loops use the same trick:

1. Multiply the quantity under test by a random ±1 sequence (chopping).
2. Correlate the observed output with the same sequence.
3. Average the correlation with a windowed accumulator.
4. Step a trim code whenever the average leaves a window.

The digital part of this trick is one block, the **calibration processor**. The comparator loop
uses 504 of them (63 comparators × 8 channels) and the skew loop uses seven.

```
            clk_ref (2 GHz)
               │
        ┌──────┴───────┐   phi[0..7]   ┌──────────────┐   ┌───────────────┐
        │ clock gen    ├──────────────►│ clock chopper├──►│ delay units   │── CK_j ──┐
        │ (8 phases)   │               │ (pair swaps) │   │ tau0 - mu*T_j │          │
        └──────────────┘               └──────▲───────┘   └───────▲───────┘          ▼
                                              │ swap_now          │ T_j     ┌─────────────────┐
 vin ─────────────────────────────────────────┼───────────────────┼────────►│ 8 flash channels│
                                              │                   │         │ SHA + 63 RCC +  │
                                       ┌──────┴───────────────────┴──┐      │ offset loops    │
                                       │ skew calibration processor  │      └───────┬─────────┘
                                       │ p/q sequences, ZC detectors,│◄─ x_par ─┐   │ codes
                                       │ 7 calibration processors    │          │   ▼
                                       └──────────────┬──────────────┘   ┌──────┴───────┐
                                                      └── swap_dly ─────►│ data chopper │
                                                                         └──────┬───────┘
                                                                     x_par ─────┴──► multiplexer ──► x_ser (16 GS/s)
```

## The calibration processor (`cal_processor`)

Each clock cycle the processor receives:

- an observation bit `d`;
- a validity bit `en`;
- the chopping sign `q` that was in force when the observation was made.

It computes U = q·d, which is +1, −1 or 0. This is a one-bit correlator.

ACC1 adds U into a register R. A bilateral peak detector (BPD) watches R:

- when R reaches +N_C, the BPD emits S = +1;
- when R reaches −N_C, the BPD emits S = −1;
- otherwise S = 0.

Whenever S is nonzero, R is cleared. ACC2 integrates S into the trim code T. T saturates at
the ends of its TW-bit range.

The window ±N_C does two jobs:

- **Averaging.** A trim step needs a net excess of N_C correlated events, so random noise in
  `d` rarely moves T.
- **Bounded dither.** Once the loop has converged, it steps back and forth around the
  optimum only rarely.

A larger N_C gives a smaller steady-state fluctuation but slower tracking. The defaults are:

- N_C = 16 with a 1/4-LSB trim step for the comparator loop;
- N_C = 29 with a trim step of T_s/28 for the skew loop.

## Comparator offset loop

Files: `rcc_model`, `flash_bcc_digital`, `tced`, `edge_encoder`.

### Random-chopping comparator

Each comparator has two choppers around it:

- an input chopper, which flips the sign of (v_in − V_ref) when q = −1;
- an output chopper, which flips the decision back.

The converter output therefore does not depend on q. The comparator's own offset, however,
now appears in the de-chopped decision with the sign of q. Correlating the decision with q
measures the offset. The trim code T then moves the offset in steps of ΔV = 1/4 LSB.

### Windowing by the edge detector

A comparator far from the input value always decides the same way. Its correlation carries no
information about its offset.

The thermometer-code edge detector (TCED) marks only the comparator at the 1→0 transition of
the thermometer code: de[i] = dc[i]·¬dc[i+1]. For the top comparator, de[62] = dc[62].

Only the marked comparator's processor counts an event (d = de[i]). Each processor therefore
learns only from inputs within about one LSB of its threshold, which are the inputs where its
offset matters. The same one-hot edge code feeds the 63-to-6 encoder, which produces the
channel output.

### Pipeline

`flash_bcc_digital` runs on the channel clock:

| Clock edge | What happens |
|---|---|
| 1 | Registers the 63 de-chopped decisions, together with the chopping signs they were made with. |
| 2 | Registers the encoded code. Updates every comparator's trim. |

Channel latency is therefore two clock edges. The chopping signs come from a 63-bit LFSR
(x⁶³ + x⁶² + 1). State bit i is comparator i's sign.

## Timing-skew loop

Files: `skew_cal_processor`, `pair_chopper`, `delay_unit_model`.

### Principle

Take two neighbouring channels j and j+1. When the skew between them is zero, a sign change
between the samples x_j and x_{j+1} is equally likely in either of two arrangements:

- the channels sample in their normal order;
- their clocks have been swapped.

Two choppers make the swap:

- a clock chopper exchanges the two sampling clocks;
- a data chopper exchanges the two outputs back.

Together, the two choppers leave the output stream unchanged. The time interval over which the
zero-crossing detector looks, however, becomes T_s + Δ or T_s − Δ depending on the chopping
sign. The correlation of the zero-crossing flag z with the chopping sign therefore measures
the skew Δ. The loop steps the delay code of channel j+1 by μ_t = T_s/28. Channel 1 (index 0)
is the reference and has no delay correction.

### Chopping schedule

This is this design's choice. A channel cannot be in two exchanged pairs at once. The pairs
are therefore split into two sets:

- **p frames (even frames):** pairs (0,1), (2,3), (4,5), (6,7) may be exchanged, each with
  its own random bit;
- **q frames (odd frames):** pairs (1,2), (3,4), (5,6) may be exchanged.

Only the pairs of the current set are correlated in a given frame. The random bits come from a
31-bit LFSR.

The frame phase travels down the delay pipe with the swap word, and the delayed word is masked
with it. Two adjacent pairs are therefore never exchanged together, even before the first
reset.

### Latency alignment

The clock chopper acts on the frame being sampled. The data for that frame reaches the
processor LAT = 2 channel-clock edges later. The swap word is therefore delayed by LAT:

- the delayed word drives the data chopper;
- it also gives the sign for the correlators.

A chopper driven with the undelayed word corrupts the output stream. The end-to-end testbench
detects this.

### Zero-crossing detection

z = 1 when the MSBs of x_j and x_{j+1} differ. Mid-scale is treated as zero.

## Analog parts (behavioural models)

These files model physical parts and are not synthesizable. They run in a 1 ps / 1 fs time base.

- **`clock_gen_model`** — an ideal multi-phase clock (the DLL of a real chip). On each
  `clk_ref` rise, phase j pulses at T_OFF + j·T_s. `clk_fs` is the OR of all phases.
- **`delay_unit_model`** — delays the chopped clock by τ = τ0 + route − μ_t·T. The per-channel
  `route` term is the mismatch to be calibrated. The model emits a fixed-width pulse.
- **`sha_model`** — samples the real-valued input at the clock edge. It interpolates linearly
  within the 2 ps grid on which the testbench defines the input.
- **`rcc_model`** — the comparator with its two choppers. Its offset is
  V_OS = V_OS0 − ΔV·T (see the sign note below).
- **`flash_adc_channel`** — one complete channel. It contains:
  - one SHA;
  - 63 comparator models with references at 1…63 LSB;
  - `flash_bcc_digital`.

  Comparator offsets V_OS0 are fixed pseudo-random values up to `OS_MAX_LSB`, derived from a
  hash of the channel and comparator index.

### Timing plan

In `tiadc_top`, T_OFF = T_s/2 − τ0. Channel j therefore samples near T_s/2 + j·T_s after the
`clk_ref` rising edge. All sampling edges stay well away from the `clk_ref` and `clk_fs` edges
that clock the digital logic.

`x_par` changes on the `clk_ref` rising edge. After that edge it holds the frame whose sampling
period began two rising edges earlier. The multiplexer (`ti_mux`) takes a frame when the frame
toggle changes. It then emits the eight words in channel order on the next eight `clk_fs`
pulses.

## Sign convention and other departures

**Sign of the trim steps.** The trims are described as *adding* ΔV·T (or μ_t·T) to the offset
(or delay). The correlator and peak detector have the polarity described above. With those
two polarities, both loops would be positive feedback and would run to the rail. The digital
processors are built exactly as described. The analog models apply the trim with a negative
sign, which closes both loops with negative feedback.

Other points that follow this design's own choices:

- **Skew scheme on the chip.** The chip's skew scheme is said to be a simplified version of
  the general one, without detail. The general scheme is built.
- **Skew loop constants.** The values N_C = 29 and μ_t = T_s/28 are given for a 16-channel
  example. They are used here for 8 channels.
- **Output de-chopping sign.** The comparator's output chopper uses the same q as the input
  chopper of the same sample.
- **Implementation details.** The following are all implementation choices:
  - the pseudo-random generators;
  - the ACC2 width (6 bits, saturating);
  - the reset values (all zero);
  - the pipeline depth;
  - the multiplexer handshake.

Not modelled: the optical front end (transimpedance amplifier, programmable-gain amplifier), the
receiver DSP, DLL locking, SHA bandwidth and noise, and comparator metastability.

## Measured behaviour

### Full-size simulation (`tb_tiadc_full`)

- **Setup:** all top parameters at their defaults. The input is a 1.13 GHz sine of ±30 LSB.
  Comparator offsets are up to 1 LSB; clock-route mismatch is up to ±4 ps. The run lasts
  200 000 channel-clock cycles.
- **RMS output error:** 0.99 LSB in the first frames; 0.73 LSB after settling.
- **Residual comparator offsets:** the largest is 0.34 LSB.
- **Residual skew:** RMS neighbour skew of about 2.7 ps, which is a little over one delay step.

### Faster end-to-end test (`tb_tiadc_top`)

- **Setup:** N_C = 8 in the offset loop, larger mismatches, and 150 000 cycles.
- **RMS output error:** drops from 3.3 LSB to 0.54 LSB.
- **Residual comparator offsets:** largest 0.47 LSB.
- **Residual skew:** about 2.3 ps RMS.

### Limits of accuracy

An ideal 6-bit quantizer gives 0.29 LSB RMS. The remaining error has two sources:

- the bounded dither of the loops, which is about one trim step;
- the 1/4-LSB offset resolution.

Expect 0.5–0.7 LSB RMS at the defaults. Convergence is slow because each processor learns only
from inputs near its threshold. With N_C = 16, the comparator loop needs about 10⁵ channel
cycles.

## Parameters of `tiadc_top`

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 8 | channels |
| `N` | 6 | bits per channel (2^N − 1 comparators) |
| `NC_BCC_P` | 16 | window of the comparator loops |
| `NC_SKEW_P` | 29 | window of the skew loops |
| `TW` | 6 | trim code width (signed) |
| `TCLK_PS` | 500 | channel clock period |
| `DV` | 0.25 | comparator trim step, LSB |
| `MU_T_DIV` | 28 | delay step = T_s / MU_T_DIV |
| `TAU0_PS` | 20 | nominal delay of a delay unit |
| `ROUTE_MAX_PS` | 4 | largest clock-route mismatch in the model |
| `OS_MAX_LSB` | 1 | largest comparator offset in the model |
| `STEP_PS` | 2 | grid of the piecewise-linear input |

Shared constants and the BPD decision type (`bpd_e`) live in `tiadc_pkg`.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<n>` at the end. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tiadc_pkg.sv rtl/*.sv \
          tb/tb_tiadc_top.sv --top-module tb_tiadc_top
./obj_dir/Vtb_tiadc_top
```

Replace `tb_tiadc_top` with any other testbench name. The two end-to-end testbenches share
their stimulus and checks through `tb/tiadc_e2e_body.svh`.

Run times:

- `tb_tiadc_top`: about one minute;
- `tb_tiadc_full`: under a minute;
- each block testbench: seconds.

### What the end-to-end testbenches check

- **Output accuracy:** output words against the ideal quantization of the input at the nominal
  sampling instants.
- **Offsets:** each comparator's residual offset.
- **Skew:** the residual skew between neighbouring channels.
- **Multiplexer:** that it delivers M words per cycle, in order.
- **Mechanisms:** that each mechanism occurred at least once, namely:
  - p-frame and q-frame chopping;
  - ±1 decisions in both kinds of loop;
  - multiplexer output.
