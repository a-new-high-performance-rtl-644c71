# Digital FM modulator and DPLL FM demodulator

A software-defined radio needs to produce and recover frequency modulation
without an analog VCO. An analog VCO is not linear over its tuning range and
drifts. This design does both jobs with integer arithmetic at one system
clock (100 MHz nominal). The modulator steers a direct digital frequency
synthesizer (DDFS) with the message, so the carrier frequency follows the
message exactly. The demodulator locks a second DDFS to the received carrier
with a second-order digital phase-locked loop (DPLL). When the loop is
locked, the control signal of that DDFS *is* the message.

```
 modulator                                                      demodulator
 ----------                                                     -----------
 fm_in ─► data generator ─► x32 interpolator ─► (+) ─► DDFS ─► mod_out   adc_in ─► phase detector ─► loop filter ─┬─► FIR ─► demod_out
 (serial)  (8-bit words)     (linear ramp)       ▲   (pipelined)                    (8x8 Booth mult)   1/(z-15/16)  │   16-tap avg
                                                fcw                                        ▲                       │
                                                                                           └── DDFS ◄── gain ◄─────┘
                                                                                           (comb.)   center_fcw + 2*loop
```

All widths follow the reference architecture. Messages and carrier samples
are 8 bits. Frequency control words (FCW) and phase accumulators are 18 bits,
the truncated phase is 10 bits, and the loop-filter output is 12 bits. At
100 MHz one FCW step is 100 MHz / 2^18 = 381.47 Hz.

## Files

| module | role |
|---|---|
| `fm_modem` | top level: the modulator and the demodulator side by side, sharing only clock and reset |
| `fm_modulator` | `fm_data_generator` → `interpolator` → `freq_accumulator` → `ddfs` (pipelined) |
| `fm_data_generator` | serial-to-parallel converter with word framing |
| `interpolator` | linear ×32 interpolation with one subtractor and one adder |
| `freq_accumulator` | `fcw + (msg <<< KF_SHIFT)`, registered |
| `ddfs` | 18-bit phase accumulator, quarter-wave ROM, 1's-complement quadrant logic; `PIPELINED` = 1 or 0 |
| `cos_rom` | 256 × 8 quarter-wave cosine table, computed at elaboration |
| `fm_demodulator` | `phase_detector` → `loop_filter` → `loop_gain` → `ddfs` (combinational), plus `fir_filter` |
| `phase_detector` | `booth_wallace_mult` and an output register |
| `booth_wallace_mult` | 8×8 signed radix-4 Booth multiplier: `booth_encoder`, `booth_decoder`, a carry-save (Wallace) tree and `cla_adder` |
| `loop_filter` | y ← x + y − (y >>> 4), saturating at 12 bits |
| `loop_gain` | `fcw = center_fcw + (loop <<< 1)` |
| `fir_filter` | 16-tap transposed moving average |
| `fm_pkg` | shared widths and the sample, FCW and loop-word types |

Each file opens with a description of its interface and timing. All
registers use a synchronous, active-low reset `rst_n`.

## Modulator

**Serial input.** `fm_data_generator` shifts in one bit on each cycle where
`bit_en` is high. `bit_en` plays the role of the FM symbol clock. Bits enter
at bit 7 and move towards bit 0, so bytes are sent LSB first. A 3-bit counter
started by reset frames the bytes. On every 8th bit the byte is copied to
`word_out` and `word_valid` pulses for one cycle. There is no
synchronisation word: the transmitter and this counter must agree on byte
boundaries from reset.

**Interpolation by 32.** When a new sample arrives, `interpolator` does three
things:

- It computes `d = (new >>> 1) − (prev >>> 1)`. Halving both operands first
  keeps the difference inside 8 bits.
- It stores the new sample.
- It reloads its output register with the previous sample.

The output register carries 4 fraction bits. Adding `d` there on each
`step_en` therefore adds d/16 ≈ (new − prev)/32. After 32 steps the output
has ramped from the previous sample to the new one. Error budget: 1 LSB from
the halving, and 1 LSB from showing only the integer part. The reload stops
rounding errors from building up across samples. The user supplies 32
`step_en` per sample. The tests use `step_en` on every clock with one bit
every 4 clocks, i.e. one sample every 32 clocks.

**Frequency word.** `freq_accumulator` forms `fcw + 2·msg`. With
`KF_SHIFT = 1`, a full-scale message (±127) deviates the carrier by
±254 × 381.47 Hz ≈ ±97 kHz. For a 10 kHz tone that is a modulation index of
about 10.

## DDFS: quarter-wave ROM with 1's-complement symmetry

The phase accumulator's top 10 bits address 1024 points per cycle:

- The top two bits, MSB1 and MSB0, give the quadrant.
- The other 8 bits address a 256-entry quarter-wave table.

In the second and fourth quadrants (MSB0 = 1) the address is inverted, which
reads the quarter wave backwards. In the second and third quadrants
(MSB1 ⊕ MSB0 = 1) the table output is inverted. The design uses only
inverters, no adders, because of how the table is built:

    entry[a] = floor(127.5 · cos(2π · (a + 0.5) / 1024))

Each code `c` stands for the value `c + 0.5`. Then `~c = −c − 1` stands for
`−(c + 0.5)`, so a bit-wise inversion is an exact negation. The half-step
phase offset makes inverting the address an exact reflection in the same
way. So `dds_out` is a two's-complement code whose true value is
`code + 0.5`, within ½ LSB of 127.5·cos(phase) at the centre of each phase
step.

Two variants are built:

- **Modulator (`PIPELINED = 1`).** One register after the address
  multiplexer and one after the ROM. The quadrant flag is delayed by two
  registers to stay aligned. `dds_out` follows the phase register by 2
  cycles, so a new `add_in` shows up 3 cycles later.
- **Demodulator (`PIPELINED = 0`).** Everything after the phase register is
  combinational, which keeps the delay around the loop short.

## Demodulator: how the loop works and where it stops working

Consider an input carrier `cos(θi)` and a local DDFS output `cos(θo)`. The
phase detector multiplies them, which gives

    ½ cos(θi − θo) + ½ cos(θi + θo)

The loop settles where the first term (the phase error) averages to zero,
i.e. in quadrature.

**Loop filter.** `loop_filter` realises H(z) = 1/(z − 15/16) as
`y ← x + y − (y >>> 4)`. Its DC gain is 16.

**Gain block.** `loop_gain` adds `2·y` to the free-running word
`center_fcw`.

**Second integrator.** The DDFS phase accumulator integrates frequency into
phase, so the loop is second order. At lock the DDFS frequency equals the
input frequency. An input that is `d` FCW steps above `center_fcw` therefore
holds `loop_out = d/2` on average. With the modulator's `KF_SHIFT = 1`, this
is the original message sample, so `demod_out` reproduces the transmitted
value directly.

**Loop dynamics.** Phase-detector gain is about 63 LSB per radian: the
product is taken as `(a·b) >>> 7` and saturated. The DDFS turns one FCW step
into 2π/2^18 rad per cycle. This gives a loop gain K ≈ 0.003 per cycle. The
characteristic polynomial is `z² − 1.9375 z + 0.9375 + K`, with poles at
radius 0.97, lightly under-damped, the same character as a loop gain of
about 1/1024 through a bilinear integrator. The loop pulls in within a few
hundred cycles. Pure delay in the loop: the phase-detector register, the
loop-filter register and the phase register, 3 cycles in all.

**The twice-carrier term limits which carriers are usable.** The second
product term, at 2·fc, is the term that matters:

- **Loop filter.** It passes 2·fc with a gain of 1/|e^{jω} − 15/16|. At
  fc = 1 MHz (ω = 2π·0.02) that gain is 7.3, so the term appears on
  `loop_out` with about ±460 LSB.
- **FIR.** The 16-tap average nulls only frequencies that are multiples of
  fclk/16 = 6.25 MHz. At 2 MHz it lets 84 % through.
- **Result.** At the nominal 1 MHz free-running frequency, `demod_out`
  (8 bits, saturating) is swamped by the ripple. The message is still
  present on `loop_out`. Averaged over whole ripple periods (500 cycles in
  the test), it follows the message within about 20 LSB.
- **The fix is the carrier choice.** Pick fc so that 2·fc is a multiple of
  6.25 MHz, for example fc = 3.125 MHz (FCW 8192). Then the FIR removes the
  ripple and `demod_out` follows the message within about 6 LSB.

For this reason the free-running word is an input (`center_fcw`, or
`demod_fcw` on the top) rather than a constant. The nominal value is 2621,
which is 1 MHz at 100 MHz. In practice `demod_fcw` should equal the
modulator's `mod_fcw`.

**Lock range.** `loop_out` saturates at ±2047, so it can hold an offset of
up to ±4094 FCW steps (±1.56 MHz). The phase detector, however, can only
supply ±63 × 16 ≈ ±1008, which limits the offset to about ±2000 steps
(±770 kHz) from `center_fcw`.

**FIR filter.** `fir_filter` is the transposed form of a 16-tap filter whose
coefficients are all 1/16. The input goes to every adder, and register k of
the chain holds the sum of the last k inputs. The 1/16 is a 4-bit
arithmetic shift. It is applied once to the full 16-bit sum rather than to
each term, so no truncation error accumulates. The result is saturated to
8 bits.

## Booth/Wallace multiplier

`booth_wallace_mult` is parameterised by an even `N` (default 8).

- **Booth encoding.** The multiplier `y` is cut into N/2 overlapping
  triplets. Each triplet is encoded into a digit in {−2, −1, 0, 1, 2} by
  `booth_encoder`, whose outputs are Neg = y(i+1), X1_b = ¬(y(i) ⊕ y(i−1)),
  X2_b = y(i) ⊕ y(i−1) and Z = ¬(y(i+1) ⊕ y(i)).
- **Partial-product bits.** `booth_decoder` forms each bit: x_j for |digit|
  = 1, x_{j−1} for |digit| = 2, 0 otherwise, inverted when Neg is set.
- **Completing the negation.** The +1 that finishes the two's complement of
  each negative row goes into one extra correction row.
- **No sign extension.** The sign bit of every row is inverted, and a
  constant row −Σ 2^(N+2i) is added instead.
- **Reduction.** The N/2 + 2 rows are reduced by levels of 3:2 carry-save
  adders: 6 → 4 → 3 → 2 for N = 8. A carry look-ahead adder (`cla_adder`:
  4-bit groups plus a look-ahead level across groups) adds the last two rows.

The whole multiplier is combinational. The phase detector registers its
output.

## Timing summary

| path | cycles |
|---|---|
| `bit_en` of 8th bit → `word_valid` | 1 |
| `load` → interpolator output = previous sample | 1 |
| `step_en` → interpolator output moves | 1 |
| interpolator output → `mod_out` | 4 (freq word, phase, 2 DDFS pipeline) |
| `adc_in` → `pd_out` | 1 |
| `pd_out` → `loop_out` | 1 |
| `loop_out` → local DDFS phase | 1 |
| `loop_out` → `demod_out` | 1, plus 7.5 cycles group delay of the average |

## Where this design departs from, or fills in, the reference architecture

- **Demodulator free-running frequency.** It is a run-time input rather than
  fixed at 1 MHz; see above.
- **Choices where the reference gives no detail.** All of these are listed
  in the module headers:
  - the phase-detector bit selection `(a·b) >>> 7`;
  - the gain block's shift of 1;
  - the deviation shift `KF_SHIFT = 1`;
  - saturation in the loop filter and the FIR;
  - the cosine table contents;
  - byte framing and LSB-first order;
  - the fraction bits kept in the interpolator;
  - the CLA grouping;
  - the Booth decoder, written from the encoder truth table rather than as
    a particular gate netlist;
  - synchronous reset.
- **DDFS quadrant register.** Two registers are used on the quadrant-select
  path so that it stays aligned with the two data registers.
- **Demodulator DDFS.** It is taken to be the pipelined DDFS without its two
  pipeline registers.
- **Loop coefficient.** The loop-filter coefficient is 15/16 = 0.9375.
- **Carrier arithmetic.** One reference example pairs FCW 512 with a
  1.5 MHz carrier. That is inconsistent with an 18-bit word at 100 MHz,
  where FCW 512 gives 195 kHz and 1.5 MHz needs FCW 3932. The 18-bit /
  381.47 Hz arithmetic is the one used here.
- **Outside this RTL.** The ADC and DAC are outside the digital design; the
  top level's `demod_adc_in`, `mod_out` and `demod_out` are their digital
  sides.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops. For example:

    verilator --binary --timing --assert -Irtl -Itb tb/tb_fm_modem.sv --top-module tb_fm_modem
    ./obj_dir/Vtb_fm_modem

`tb_fm_modem` runs the whole design at its default parameters. The
modulator output is looped into the demodulator input. A 9.77 kHz triangle
of ±80 is sent as serial bytes, at a 3.125 MHz carrier and then at 1 MHz.
The test checks:

- every framed byte;
- the interpolator ramp;
- every modulator output sample, against an independent phase/cosine model;
- at 3.125 MHz, the demodulated output (16-cycle averages within 8 LSB);
- at 1 MHz, the loop-filter output (500-cycle averages within 24 LSB).

It also counts framing, interpolation steps, all four DDFS quadrants, the
carrier switch and re-lock, and both signs of loop output and output slope.
The run takes about 62,000 cycles and well under a second.

`tb_fm_workload` runs the nominal operating point: a 10 kHz triangle at
full scale (97 kHz deviation) on a 1.5 MHz carrier. At 3 MHz the
twice-carrier ripple is not removed by the FIR, so the test compares 2048
consecutive 500-cycle averages of the loop-filter output with the message;
the largest error is about 10 LSB. It then switches the serial input to
320 kbit/s (one bit every 312 cycles, one interpolation step every 78) and
checks framing and interpolation there. Finally it sets the modulator's
carrier word to 512 (195.3 kHz) with a silent message and counts carrier
periods on `mod_out`.

Other testbenches of note:

- `tb_booth_wallace_mult` checks all 65,536 operand pairs.
- `tb_ddfs` checks both DDFS variants sample by sample, the 3-cycle
  frequency-switch latency and the output frequency.
- `tb_fm_demodulator` drives the demodulator from an ideal floating-point FM
  source (sine message) and checks the output and the steady-state
  `loop_out = offset/2` relation.

Things to try when changing the design:

- **Ripple test.** Set both `fcw` inputs to 2621 and watch `demod_loop`
  against `demod_out` to see the twice-carrier ripple.
- **Deviation.** Raising `KF_SHIFT` on the modulator without raising
  `DEMOD_GAIN_SHIFT` doubles both the deviation and the demodulated
  amplitude.
- **Loop gain.** Raising `DEMOD_GAIN_SHIFT` halves the output and doubles
  the loop gain.
