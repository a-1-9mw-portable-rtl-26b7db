# All-digital PLL frequency synthesizer (50 MHz in, 300 MHz – 1 GHz out)

This is a clock multiplier built around a digitally controlled ring
oscillator (DCO). A 50 MHz reference comes in. A one-hot select picks one of
six output frequencies: 300, 400, 500, 600, 850 MHz or 1 GHz. The loop has no
analog filter and no charge pump. Once per reference cycle it counts how many
DCO cycles fit into the high half of the reference (10 ns). It then moves the
DCO's 11-bit control word up or down by a binary search. The DCO is stopped
briefly before each reference rising edge and restarted on that edge, which
resets its phase to the reference every cycle. Because of that, one reference
cycle is enough for both the frequency and the phase comparison.

The loop logic is synthesizable SystemVerilog: the detector, the counter, the
DCO enable generator and the control unit. The oscillator and its delay
elements are analog parts, so they are written as timed behavioural models
with the real parts' ports. This lets the whole loop be simulated end to end
in Verilator.

## Structure

```
                 sel[5:0] (S300M .. S1-G)
                      |
 ref_clk ---------> pfd ------------------- fast, lock ---> control_unit --- ctrl[10:0] ---+
                    |  dco_enable_gen  (stops / restarts the DCO)                         |
                    |  dco_counter     (adjustable-length counter, odd/even clock mux)    |
                    |  matched_delay   (counter reset timing)                             |
                    |  2 synchronizers + AND (fast, lock)                                 |
                    +-- dco_en ---------------------------------------------> dco <-------+
                                                                               |
 dco_clk <---------------------------------------------------------------------+
                                                                 (ring of 4 or 8 dcde)
```

| module | kind | what it is |
|---|---|---|
| `adpll_synth` | RTL (top) | the loop; brings out the word, fast, lock, mode and gains |
| `pfd` | RTL | one-cycle phase/frequency detector |
| `dco_counter` | RTL | 10-flip-flop counter with tap select and odd/even clock mux |
| `dco_enable_gen` | RTL | enables the DCO at the reference edge and stops it after N cycles |
| `control_unit` | RTL | modified binary search plus maintenance mode |
| `phase_gain_reg` | RTL | 4-bit one-hot gain used after lock |
| `dco` | behavioural | ring oscillator: NAND + 2 inverters + 4 or 8 DCDEs |
| `dcde` | behavioural | digitally controlled delay element |
| `matched_delay` | behavioural | fixed delay line |
| `adpll_pkg` | package | widths, the select enum and the select decode table |

## Frequency plan: what the counter measures

The detector counts DCO edges from the reference rising edge to the falling
edge, which is 10 ns. A DCO at k × 100 MHz completes exactly k cycles in that
window. A DCO at (k − ½) × 100 MHz completes k − ½ cycles. So each select
becomes a flip-flop position in a 10-stage shift register that fills with
ones, plus an odd/even choice of which DCO edge clocks it:

| select | output | ratio to 50 MHz | tap (flip-flop) | counted edge |
|---|---|---|---|---|
| S300M | 300 MHz | 6 | 3 | even (falling) |
| S400M | 400 MHz | 8 | 4 | even |
| S500M | 500 MHz | 10 | 5 | even |
| S600M | 600 MHz | 12 | 6 | even |
| S850M | 850 MHz | 17 | 9 | odd (rising) |
| S1-G | 1 GHz | 20 | 10 | even |

The tap table matches the original design's per-flip-flop labels (flip-flop
k ↔ (2k−1)·50 / 2k·50 MHz). The choice that only S850M uses the odd mode is
this implementation's, since 850 MHz is the only odd multiple of 50 MHz. If
the selected tap is already high at the detection point, the DCO is **fast**.

## One reference cycle, step by step

1. **Reference rises.** The enable generator raises `dco_en`. The DCO ring
   node, held high while the DCO was stopped, falls one NAND delay later. This
   restart edge starts DCO cycle one. The counter's reset is released at the
   same reference edge. In even mode a start flip-flop takes the restart edge,
   so flip-flop k goes high exactly k DCO periods after the restart.
2. **Reference high (10 ns).** The counter fills. The enable generator
   counts DCO rising edges. At the rising edge whose number equals the ratio
   (e.g. the 10th at 500 MHz), it drops `dco_en`. The NAND then holds the
   node high, so the DCO waits. When the DCO is on frequency this pause lasts
   about half a DCO cycle.
3. **Reference falls: the detection point.** The first synchronizer samples
   the tap and gives `fast`. The second synchronizer keeps the inverted tap of
   the previous detection point. `lock = fast & previous-slow` is a one-cycle
   pulse each time the search steps across the target from below. The counter
   reset is asserted a matched delay (50 ps) after this edge, so it cannot
   race the sample.
4. **Next reference rise.** The control unit applies the decision to the word
   (see below), and the DCO restarts on the new word.

**Phase carry-over.** A DCO that is slightly slow still reaches its last edge
just before the reference edge. But its ring has not yet settled, so it
cannot restart right away. Part of a cycle then carries into the next
reference period. The counter measures from the DCO's own first edge, so this
phase error makes the next decision read slower, and the loop corrects it.
This is what makes the detector a phase detector as well. It is also why lock
time in this model depends on the frequency (next section).

## The search (control unit)

- **Acquisition.** The word starts at 1024 with a frequency gain of 512. Each
  cycle, if `fast` differs from the previous cycle, the gain is first shifted
  right by one bit (halved). Then the gain is subtracted when fast and added
  when slow, with the result clamped to 0 … 2047. The gain only shrinks when
  the search changes direction. If the target is far away, the word keeps
  taking big steps until it overshoots.
- **Entering maintenance.** This happens on the first `lock` pulse once the
  frequency gain has come down to 8 or less. 8 is the largest phase gain.
  This threshold is this implementation's choice. The original design only
  says that lock is entered when both synchronizers read high.
- **Maintenance.** A multiplexer now takes the step from the 4-bit one-hot
  phase gain register, which starts at `0001`. The register shifts right
  when `fast` changes and shifts left after eight cycles with the same
  `fast`, so its values are `0001`, `0010`, `0100` and `1000`. A slow drift
  therefore speeds up its own correction, and dithering keeps the step at one
  LSB. Only reset leaves maintenance.
- `enable` low freezes the control unit and keeps the DCO stopped.

## The DCO model

- **Control word.** Bit 10 selects the path: 1 = the four-element loop (high
  band), 0 = eight elements (low band). Bits 9:3 are the 7-bit code shared by
  every DCDE. Bits 2:0 count extra one-LSB devices, spread one per element,
  bottom row first. In the low band each extra device is one eighth of a code
  step, so the word is a monotonic 10-bit fine control. In the high band only
  four elements are in the loop, so values of bits 2:0 above 4 overlap the
  next code step.
- **DCDE delay.** `252.9 − (code + extra devices) × 142.5/128` ps.
- **Ring.** NAND 10 ps, two inverters at 10 ps each, and 179 ps of route in
  the long path. These numbers are fitted so that the model spans 224 – 458
  MHz (word 0 – 1023) and 480 – 1068 MHz (word 1024 – 2047). That is close to
  the 224 MHz – 1.06 GHz characteristic of the original circuit. The original
  circuit's bands overlap slightly near 500 MHz, while the model has a small
  gap at 458 – 480 MHz; no select frequency falls in it.
- **Coarse switching.** The coarse switch only takes effect at an instant when
  its two inputs carry the same level. That way, a band change while the DCO
  runs never puts a second wavefront into the ring.
- **Gates.** Each gate schedules its output once at time zero, so the ring
  settles from any power-up state while it is held in reset.
- **Not modelled.** Jitter, supply and temperature dependence, power and
  area.

## Measured behaviour (end-to-end test, default parameters)

| select | lock after (ref. cycles) | locked word | mean DCO period | target |
|---|---|---|---|---|
| 300 MHz | 27 | 509–510 | 3330.0 ps | 3333.3 ps |
| 400 MHz | 20 | 883–884 | 2497.2 ps | 2500.0 ps |
| 500 MHz | 19 | 1097–1114 | 1994.9 ps | 2000.0 ps |
| 600 MHz | 17 | 1395–1410 | 1663.7 ps | 1666.7 ps |
| 850 MHz | 11 | 1825–1843 | 1176.6 ps | 1176.5 ps |
| 1 GHz | 14 | 1994–2001 | 998.5 ps | 1000.0 ps |

After locking at 1 GHz, the test switches the select to 600 MHz. Maintenance
mode alone (the phase gain ramping up to 1000 and back down) takes the DCO to
1665.7 ps.

## Where this departs from the original design

- **Lock time.** The original claims at most 15 reference cycles. This model
  needs 11 – 27 cycles. The extra cycles come from the phase carry-over
  described above: when the DCO is a little slow, the search sees "slow" for
  a few cycles after it has actually crossed the target.
- **Lock detector.** In the original, both synchronizers take the same clock.
  Sampling the count and its inverse at one instant would never give lock, so
  the second synchronizer is read here as one detection point older. Lock
  then means "stepped across the target from below".
- **Detection clock and matched delays.** The original drives the
  synchronizers' clock from a gated, matched-delayed signal. Here the falling
  reference edge clocks them directly, since that edge is the stated
  detection point. Only the matched delay in front of the counter reset is
  kept; the others balance gate delays that the model does not have.
- **Own choices where the original is silent.** The edge-counting enable
  generator, the even-mode start flip-flop, the initial word and gain,
  clamping at 0 and 2047, and the maintenance entry threshold.

## Simulating

Every testbench prints one `TB_RESULT checks=N failures=M` line and ends
with `$finish`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/adpll_pkg.sv tb/tb_adpll_synth.sv --top-module tb_adpll_synth -o sim
./obj_dir/sim
```

Replace the testbench name to run another. Each one finishes in well under a
second.

- `tb_adpll_synth`: the whole loop at its default parameters. For each of the
  six selects it checks lock, the DCO period (±2 %) and that the word stays
  put after lock. It then runs the select switch in maintenance and the
  global-enable freeze. It counts every loop mechanism (gain halving, lock
  pulse, maintenance entry, phase-gain left and right shifts, DCO pauses,
  odd-mode counting, both coarse bands, enable low) and fails if one never
  happened.
- `tb_pfd`, `tb_dco_counter`, `tb_dco_enable_gen`, `tb_control_unit` and
  `tb_phase_gain_reg` compare their block with expectations worked out in
  the testbench: edge times, or a step-by-step model of the search rules.
- `tb_dco`, `tb_dcde` and `tb_matched_delay` check the timing laws of the
  models.

All timed modules use `timeunit 1ps; timeprecision 1fs`. The DCO's finest
step is about 1.1 ps.

## Changing it

- **Output frequencies.** These live in `decode_sel` in `adpll_pkg.sv` (tap,
  odd/even, ratio). A new frequency must be a multiple of 50 MHz that the
  counter can resolve, i.e. tap ≤ 10 and ratio ≤ 31.
- **DCO range.** Set by the `dcde` end points and the `dco` gate and route
  delays.
- **Search.** `INIT_WORD`, `INIT_FGAIN`, `LOCK_FGAIN` and `RUN_LEN` are
  parameters of `control_unit`.
- The behavioural models contain delays, which synthesis ignores. Everything
  else is plain flip-flops and logic. Note that the counter is clocked by the
  DCO through a clock mux, and the enable generator crosses between the
  reference and DCO domains through toggle signals without synchronizers (the
  reasoning is in its header).
