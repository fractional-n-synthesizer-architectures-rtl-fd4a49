# Fractional-N 2-FSK synthesizer with a one-flip-flop phase detector

This design is a fractional-N phase-locked loop that synthesizes and
frequency-modulates a carrier near 2.24 GHz from a 185.5 MHz reference.
Almost all of it is synchronous digital logic. Two ideas carry it.

1. **The phase detector is a single flip-flop.** The reference clock samples
   the divided-down VCO clock. The result is one bit per reference cycle: is
   the divider edge early or late? That bit is scaled to ±Kpd and fed back into
   the input of the sigma-delta modulator that controls the divider. This
   *phase-minimization loop* (PML) has two effects:
   - It keeps the divider edge within about one quantizer step of the
     reference edge.
   - The sigma-delta's own noise dithers the flip-flop, so over many cycles
     the bit stream becomes a linear measure of phase.

   The same ±Kpd stream drives a digital integrator with gain Klp. Together
   they replace the charge pump and the analog loop filter. The integrator
   word reaches the VCO through a first-order sigma-delta, a 5-bit resistor
   string DAC and two RC poles.
2. **FSK faster than the loop bandwidth.** The loop bandwidth is quoted as
   142 kHz (this implementation's loop gives about 120 kHz with the same
   constants, see the deviations below), but data is sent at 927.5 kb/s. The VCO control is split into
   two DAC paths:
   - Path B carries the loop word.
   - Path A carries the loop word plus a learned offset, *Delta*.

   An analog multiplexer picks the path for the current bit, so the VCO
   control voltage steps at once. Delta is learned from the loop itself. At
   every data transition the control word reached at the end of the bit is
   sampled. Delta is then the difference between the latest "A" sample and
   the latest "B" sample. After a few transitions the step is right and the
   loop barely has to move.

## Block diagram

```
            +----------------------------- fnpll_digital (synthesizable) ---------------------------+
 chan ----->| tx_ctrl: ratio table[chan] + data*FSK_DEV,  prbs16 test data, bit timer (200 cycles) |
 data ----->|     | ratio (20b, N-8 in 3.17)                                                         |
            |     v                                                                                  |
            |  (+)--- minus pd -----> divider_sdm (2nd order) --CON(3b)------------------------------+--> prog_divider
            |     ^                                                                                  |        | div_out
            |     | pd = +-Kpd      phase_quantizer (flop: D=div_out, clk=ref) <---------------------+--------+
            |     +----------------+                                                                 |
            |                      v                                                                 |
            |     loop_integrator: ctrl += Klp*pd (20b) -> ctrl[19:4] (16b)                         |
            |                      v                                                                 |
            |     fsk_switch: word_b = ctrl16, word_a = ctrl16 + Delta, sel = data                   |
            |          | word_a                        | word_b                                      |
            |     dac_sdm -> dac_decoder          dac_sdm -> dac_decoder                             |
            +----------|-------------------------------|---------------------------------------------+
                  string_dac A (RC,RC)           string_dac B (RC,RC)
                          \__________ analog_mux __________/   (break-before-make)
                                         |
                                        vco  ---> rf_out, and back to prog_divider
```

All digital logic runs on the reference clock, except the divider and the CON
retiming register, which run on the VCO clock and the divided clock.

## Number formats

| Quantity | Format | Example |
|---|---|---|
| Division ratio `ratio` | 20-bit unsigned, value = N − 8, 17 fraction bits | N = 12.075 gives 534118 |
| Kpd | same units as the ratio, 2^-17 | 0.01 gives 1311 |
| Quantizer output `pd` | signed 21-bit, ±Kpd | |
| Divider control CON | 3 bits, N = 8 + CON0 + 2·CON1 + 4·CON2 | |
| Loop integrator | 20-bit unsigned, full scale = 1.4 V | reset value 2^20 − 1 (full scale) |
| Klp | Q0.16 multiplier on `pd`, `KLP_Q16` = round(Klp·8/1.4·2^16) = 9362 | per-cycle step = 187 LSB = 0.25 mV |
| DAC word | top 16 bits of the integrator | |
| DAC code | 5 bits, tap k = k·1.4/32 V | |
| Delta | signed 17-bit, in DAC-word LSBs | 463.75 kHz deviation gives 868 |

Klp is read as volts of VCO control per unit of division ratio. An integrator
LSB is 1.4/2^20 V and a `pd` LSB is 2^-17 ratio units. That gives the
constant 8/1.4 above.

## The phase detector and the phase-minimization loop

`phase_quantizer` is one flip-flop. `D` is the divided clock and the clock
pin is the reference. A 1 gives `+kpd` and a 0 gives `-kpd`. The flip-flop's
setup and hold times are not respected on purpose. It acts like a comparator,
so there is no synchronizer.

`fnpll_digital` subtracts `pd` from the ratio word, clamps the result to the
20-bit range, and feeds it to `divider_sdm`. The modulator has two
integrators, a feedback weight of 2 into the second one, and a quantizer that
rounds to 0..7.

The sign convention matters:
- The loop locks the **falling** edge of the divided clock to the reference
  edge.
- A 1 means the divided clock is still high. The divider period is then too
  long, so +Kpd is subtracted from the ratio.
- The divided clock is high for less than half its period (a property of the
  modular divider). This gives a stable lock point.

On average the `pd` stream equals the difference between the requested ratio
and the actual f_vco/f_ref. So the integrator behind it sees a frequency
error.

**Acquisition range.** The PML can absorb at most ±Kpd of ratio error. That
is about ±1.86 MHz at the VCO. Small steps and downward channel changes are
acquired. A large upward change is not: out of lock the flip-flop reads 0
more often than 1, because the divided clock is high for less than half its
period, so the loop can only pull the VCO down. The integrator therefore
resets to full scale. After a reset the VCO starts at the top of the selected
capacitor band and sweeps down (a few kHz per reference cycle) until the
quantizer captures the channel. To change channel upwards, select the band
and pulse the reset. Choose the band so that the channel lies at least about
2 MHz below the band's top. That top is set by the highest DAC tap, 31/32 of
1.4 V, not by 1.4 V itself. Large-signal acquisition is outside what the
small-signal theory covers, and this design adds no frequency detector.

## Programmable divider

`prog_divider` is a chain of three identical 2/3 cells (`div23_cell`), giving
N = 8 + CON0 + 2·CON1 + 4·CON2 (8..15).
- The last cell's `mod_in` is tied high.
- Each cell divides by 3 once per output cycle if its `mod_in` and its CON
  bit are both high.
- Each cell passes a `mod_out` pulse to the previous cell.

Each cell is written as a three-state counter clocked by its input. The
design does not reproduce the transistor-level prescaler and end-of-cycle
latches.

CON comes from the reference domain. It is retimed on the rising edge of
`div_out`, so that one divider cycle uses one value (exposed as `con_q`).

## Loop integrator and DAC paths

`loop_integrator` adds `(pd · KLP_Q16) >>> 16` to a 20-bit accumulator every
reference cycle, saturating at 0 and full scale. Its top 16 bits go to the
DAC paths.

Each `dac_sdm` is a first-order error-feedback modulator:
`w[i] = x[i-1] - y[i-1] + w[i-1]`, with `y` taken as the top 5 bits of `w`
(clamped).
- `dac_decoder` turns the 5-bit code into a one-hot 32-line select.
- `string_dac` is a behavioural model. It gives tap voltage k·1.4/32, then
  two first-order RC sections (30 ns each, well above the loop bandwidth).
  The sections are updated with the exact exponential step every 1 ns. Its output
  is a `real`. If no switch is closed, the first capacitor keeps its
  charge.

## FSK switching scheme (`fsk_switch`)

- **Data sense.** `data = 1` is frequency A, the upper tone. `tx_ctrl` adds
  `FSK_DEV` to the ratio when data is 1.
- **The two words.**
  - `word_b` is the 16-bit loop word.
  - `word_a` is the loop word plus Delta, saturated.
  - The mux selects A when `data = 1`.
- **Sampling.** The words are sampled at the end of each bit, where the data
  changes:
  - On 1→0 (end of an A bit) `word_a` is stored.
  - On 0→1 (end of a B bit) `word_b` is stored.
- **Delta.** Delta is recomputed at each transition as (latest A sample) −
  (latest B sample). It stays 0 until one sample of each kind exists.
  `en = 0` holds it at 0, which gives a conventional single-path loop.
- **Strobes.** `upd_ab` and `upd_ba` pulse when Delta is updated.

`analog_mux` is a behavioural model of the break-before-make switch:
- On a select change it opens the closed switch.
- It waits `T_BBM_NS` (0.2 ns), then closes the other switch.
- During the gap the VCO control holds its last value.
- An assertion checks that both switches are never closed together.

## Transmit control and test data

`tx_ctrl` holds 16 division ratios, indexed by `chan`.
- Entry 15 is the nominal 12.075.
- Each lower entry is 5 MHz lower: entry k = 534118 − (15−k)·3533.
- A counter produces a bit strobe every 200 reference cycles (927.5 kb/s).
- At the strobe, the next bit is loaded from `prbs16` (`prbs_mode = 1`) or
  from `ext_data`.

`prbs16` is a 16-bit Galois LFSR with taps at stages 16, 15, 13 and 4. It
shifts right with toggle mask 0xD008, giving a sequence length of 65535.

## VCO model

`vco` is behavioural. Its frequency law is

f = 2.2224 GHz − cap_bank · (500 MHz / 15) + 25 MHz/V · clip(vctl, 0, 1.4 V).

It schedules each output edge at an absolute time, so edge jitter does not
accumulate. There is no phase noise. At 0.7 V on band 0 it runs at
2.2399 GHz (channel 15). One band spans 25 MHz/V · 1.4 V · 31/32 = 33.9 MHz
of reachable tuning, slightly more than the 33.3 MHz bank step, so bands 0
to 2 cover all 16 channels.

## What follows the source design and what does not

Taken from the described design:
- Single-flip-flop quantizer with ±Kpd, the PML, and the second-order divider
  sigma-delta.
- 20-bit ratio, 16-bit DAC word, 5-bit DAC, 3 CON bits, 32-tap string with
  two RC poles.
- Kpd 0.01, Klp 0.025, 185.5 MHz reference, N = 12.075, 25 MHz/V, 500 MHz
  coarse range, 1.4 V.
- 927.5 kb/s data, two DAC paths with an analog break-before-make mux, and
  the PRBS taps and length.
- 16 channels and the 8..15 modular divider.

This design's own choices:
- The number formats above and the scaling of Klp into an integer multiplier.
- The sign convention and falling-edge lock point.
- The rounding quantizers and the saturation.
- The CON retiming register.
- The channel spacing (5 MHz below 12.075). Only the count of 16 is known.
- The FSK deviation: 0.0025 ratio units, 463.75 kHz, modulation index 0.5.
- The RC time constants, the 0.2 ns dead time, and the VCO band step and
  frequency offset.

Deliberate differences and limits:
- **Delta update.** In the source analysis, the update that produces frequency
  B from A is written at the A→B switch. Here Delta is added to path A and
  updated at every switch, as in the block-level description. Both converge to
  the same Delta. During the first few bits the transient differs slightly.
- **Pull-in.** Pull-in is limited to about ±Kpd·f_ref (see above).
- **Loop bandwidth.** Klp is read as volts of VCO control per unit of
  division ratio, which is how the loop equations use it. The second-order
  model of the loop then gives, for these constants:
  - natural frequency ωn = √(2·Kpd·Kvco·Klp·f_ref) = 2π·242 kHz;
  - damping ζ = √(Kpd·f_ref / (2·Kvco·Klp)) = 1.22;
  - a −3 dB point near 119 kHz.

  The RTL follows this model closely (see `tb_fnpll_loop_step` below). The
  quoted bandwidth for the same constants is 142 kHz, about 20 % higher.
  Raising `KLP_Q16` moves the RTL's bandwidth up if that figure is wanted.
- **Not modelled:**
  - The RF output buffer (an analog amplifier with no logic function).
  - Noise of any kind.
  - The supply and bias circuits.
- **Not built:**
  - The direct digital phase-modulation technique.
  - The time-to-digital-converter variant of the phase detector. It is
    described only as future work.

## Verification

Every block has a self-checking testbench in `tb/` that compares against a
model written independently in the testbench. Each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_phase_quantizer` | ±Kpd mapping for random phases and Kpd values |
| `tb_divider_sdm` | cycle by cycle against an integer reference model; mean output equals the input; running error stays bounded |
| `tb_prog_divider` | every period equals 8 + CON for random CON sequences; CON retiming |
| `tb_loop_integrator` | bit-exact accumulation and saturation |
| `tb_dac_sdm` | bit-exact against Eq. w[i] = x[i−1] − y[i−1] + w[i−1]; mean output tracks the input |
| `tb_dac_decoder` | one-hot output for all codes |
| `tb_string_dac` | exact tap voltages; output not yet settled 5 ns after a step; settled within 1 mV after 600 ns |
| `tb_analog_mux` | dead time, no overlap, correct source |
| `tb_vco` | frequency measured over 20000 edges against the frequency law (within 2 kHz), including clipping |
| `tb_prbs16` | full period 65535 and the sequence's linear recurrence |
| `tb_fsk_switch` | Delta, sampling instants and path A/B words against a model |
| `tb_tx_ctrl` | bit timing (200 cycles), ratio table, data source select |
| `tb_fnpll_top` | end to end at default parameters (next paragraph) |
| `tb_fnpll_loop_step` | closed-loop step response at default parameters against the second-order loop model |
| `tb_fnpll_channels` | acquisition and lock on all 16 channels at default parameters, with band selection |

`tb_fnpll_top` runs the whole loop at the default parameters. It measures
the VCO frequency from edge times.
- Lock on channel 15: 2239.906 MHz against a target of 2239.912 MHz.
- Relock after a switch to channel 12.
- Back to channel 15 through a reset.
- 2-FSK with the switching scheme off: the end-of-bit frequency error is
  about 170 kHz.
- 2-FSK on PRBS data with the scheme on: the error falls to about 10 kHz, and
  Delta settles near 868 LSB, the value predicted from the deviation and the
  VCO gain. It is within 10 % of that value after 12 to 14 bit periods.

The testbench also counts each mechanism (quantizer 0s and 1s, CON dithering,
lock, relock, both Delta updates, break-before-make gaps, both data sources,
the scheme on and off) and fails if any of them never happened. It runs in
about a second of wall-clock time.

`tb_fnpll_loop_step` locks the loop, then steps the division ratio by the FSK
deviation with the switching scheme off, and records the integrator word every
reference cycle.
- The final step is within 1 % of the value expected from the ratio change
  and the VCO gain.
- The 50 % and 90 % rise times (225 and 538 reference cycles) are within 3 %
  and 12 % of those of the second-order model (231 and 611). The test allows
  15 %.
- The response does not overshoot beyond the noise.

`tb_fnpll_channels` visits the 16 channels in random order. For each it picks
the capacitor band, pulses the reset, waits 20000 reference cycles and
measures the VCO frequency. All 16 lock within about 6 kHz of
f_ref·(8 + ratio), using bands 0 to 2. The integrator ends well inside the
range the DAC can reproduce.

### Running a testbench with Verilator

The package must come first. Use `-y` so that submodules are found:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    -y rtl -y tb rtl/fnpll_pkg.sv tb/tb_fnpll_top.sv \
    --top-module tb_fnpll_top -Mdir obj_top
./obj_top/Vtb_fnpll_top
```

Replace `tb_fnpll_top` with any other testbench name. All files use
`` `timescale 1ns/1fs ``, and the analog models use `real` ports, so
`--timing` is required.

## Changing the design

- **Loop constants.**
  - `fnpll_pkg` holds the operating point and the derived integer codes.
  - `fnpll_top` has parameters `BIT_PERIOD`, `KLP_Q16` and `FSK_DEV`.
  - Kpd is a run-time input (`kpd`), so the loop gain can be trimmed without
    rebuilding.
- **Channel table.** Set by `default_ratio_table()` in `fnpll_pkg`, or
  replaced through `tx_ctrl`'s `RATIO_TABLE` parameter.
- **Synthesis.** For silicon, `string_dac`, `analog_mux` and `vco` are the
  analog parts to replace. The rest (`fnpll_digital` and everything under it,
  plus `prog_divider`) is synthesizable. The divider is an asynchronous
  ripple chain and needs the usual care in timing constraints.
