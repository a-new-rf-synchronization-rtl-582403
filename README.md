# Moving-reference RF synchronization core

A synchrotron must often lock its rf, and with it the beam, to an external
reference: when it hands the beam to the next machine, for example. The classic
way waits for the flattop, forces a frequency offset to make the phase slip, and
closes a phase loop when the slipping phase crosses zero. That costs tens of
milliseconds and gives the beam two transients.

This core removes both problems. It works on digital phase words, not on
analogue signals. It adds to the rf phase an *offset phase* that advances at the
rate `F_ref - F_rf`. The sum is called the *moving reference*. It always runs at
the reference frequency, even while the rf is still accelerating. So its phase
difference to the reference, the *error*, is a constant. The synchronization
loop can therefore be closed at any moment, with no transient.

After the loop is closed, the offset is removed in two gentle linear ramps:

1. The offset frequency is brought to zero.
2. The offset phase is brought to the wanted synchronization phase.

The method works the same way in a decelerating machine, where the offset
frequency is negative, and in a machine at fixed frequency.

When both ramps are done, the moving reference is the rf itself, and the rf is
locked to the reference at `phi_rf - phi_ref = phase_set`. The beam is
synchronized as soon as the flattop starts.

## Number format

Every phase and frequency is a `PHASE_W`-bit word (32 bits by default).

- A phase word is a binary fraction of one turn: `2^32` is one rf period.
- A frequency word is the phase step per clock. The frequency equals `word / 2^32 × f_clk`.

Sums wrap modulo one turn. Offsets, slopes, the error and the correction are
read as two's complement values in `[-1/2, +1/2)` turn. All blocks share one
clock.

## Data path

```
 ref ADC ──► digital_pll (ref) ──F_ref, phi_ref──┐
                                                  │
 rf ADC ───► digital_pll (rf) ───F_rf, phi_rf────┤
                                                  ▼
           offset_generator:  F_ref-F_rf ─► force_to_zero ─► F_off ─► phase accumulator
                              ─► (− latch) ─► force_to_zero (target −phase_set) ─► phi_off
                                                  │
           error_source:      phi_MR = phi_off + phi_rf ; phi_error = phi_MR − phi_ref
                                                  │
           transient_cancel:  latch += phi_error on Start Synchro; loop switch after DELAY
                                                  │
           loop_filter (PI, negative):  correction
                                                  │
           rf_synthesizer:    freq_program + correction ─► phase accumulator ─► sine ─► DAC ─► cavity
```

### Digital PLLs (`digital_pll`)

Each analogue signal (the reference and the rf) gets its own PLL. The
discriminator, the analogue loop filter and the ADC stay outside the chip.

The signed ADC code is shifted left by `ADC_SHIFT` and added to a
*pre-programmed* frequency word. The sum is the PLL's frequency word `F`. It
feeds a phase accumulator, which gives `phi`. A sine look-up table turns `phi`
back into samples for the discriminator's DAC.

The pre-programmed word carries the large frequency swing of the acceleration.
The ADC then only trims the low bits, so a narrow converter is enough. On the
rf side it is natural to use the synthesizer's own frequency word
(`synth_freq`) as the pre-program. The end-to-end testbench does this.

A reference that is only a fixed frequency value needs no analogue input. Drive
`ref_preprog` with that value and hold `ref_adc` at 0.

### Offset generator (`offset_generator`, `force_to_zero`)

`F_ref - F_rf` passes through a *force-to-zero* stage and is accumulated into
the offset phase. The latched error (below) is subtracted. The result passes
through a second force stage whose target is `-phase_set`.

A `force_to_zero` stage normally passes its input one clock late. While its
trigger is high, it ignores the input and keeps the last value. It then adds
`slope` every clock. When the value is within one slope of the target, it
loads the target, holds it and raises `done`.

The slope must point towards the target. You choose its size and sign, and
they set how hard the beam is pushed:

- During the frequency stage, the rf leaves its programmed frequency, and the beam moves off the central orbit by a controlled amount.
- During the phase stage, the rf runs at a small constant frequency step.

Either effect can be made as small as wanted by choosing a smaller slope.

### Why the error stays constant (`error_source`)

The offset path needs two clocks to turn a frequency difference into a phase
step:

- one force-stage register
- the accumulator register

`error_source` therefore delays `phi_rf` and `phi_ref` by `ALIGN = 2` clocks
before it forms `phi_MR` and `phi_error`. With this alignment, the error is
constant *to the bit* during acceleration. This holds however fast the
frequencies ramp, because each phase is the exact integral of its frequency
word.

### Closing the loop without a transient (`transient_cancel`)

On the rising edge of `start_synchro`, the current error is added to a latch.
The offset generator subtracts the latch from the offset phase, so the error
drops to zero. Two clocks later (`SYNC_DELAY`), that zero has reached the
filter input, and the loop switch closes.

The latch accumulates (`latch + error`) because the error already contains the
previous latch value. A second Start Synchro therefore also lands on zero. The
loop stays closed while `start_synchro` is high.

Just after closing, the loop does nothing: its input is identically zero, so it
acts as a zero-gain loop. It starts to act only when a force stage makes
`F_off` differ from `F_ref - F_rf`.

### Loop filter and synthesizer (`loop_filter`, `rf_synthesizer`)

The filter is a proportional-integral filter with power-of-two gains:

```
corr = -((err >>> kp_shift) + Σ (err >>> ki_shift))
```

The minus sign gives negative feedback. The integrator is cleared while the
loop is open.

The correction is added to the frequency program. A direct digital synthesizer
turns the sum into sine samples. The same synthesizer also supplies the phase
and frequency words used for monitoring.

## Operating sequence

| step | input | what happens |
|---|---|---|
| acceleration | — | `phi_error` constant, `F_off = F_ref - F_rf` |
| lock | `start_synchro` ↑ | error latched to 0; `loop_closed` two clocks later |
| frequency stage | `force_freq` = 1, `freq_slope` | `F_off` ramps to 0 (`freq_done`); the rf is pulled to the reference frequency |
| phase stage | `force_phase` = 1 (keep `force_freq` = 1), `phase_slope` | `phi_off` ramps to `-phase_set` (`phase_done`); the rf ends at `phi_rf - phi_ref = phase_set` |

An assertion in `rf_sync_top` flags `force_phase` rising while `force_freq` is
low.

Take care with the loop gains:

- The synchronization loop must be much slower than the rf PLL, or it will pull the PLL's phase word instead of the real rf.
- While the frequency programme is still ramping, a type-2 loop keeps a small constant lag, equal to `ramp × 2^ki_shift`. The lag disappears at flattop.

## Latencies

| path | clocks |
|---|---|
| `preprog`/`adc_code` → PLL `freq` | 1 |
| `freq` → `phase` step | 1 |
| `phase` → `sine` | 1 |
| `F_ref - F_rf` → `phi_off` step | 2 |
| `phi_off` → `phi_error` | 1 |
| Start Synchro edge → latch → `phi_error` = 0 | 3 |
| Start Synchro edge → `loop_closed` | `SYNC_DELAY` + 1 = 3 |
| `phi_error` → `correction` | 1 |
| `correction` → `synth_freq` | 1 |

## Parameters (package `rf_sync_pkg`)

| name | default | meaning |
|---|---|---|
| `PHASE_W` | 32 | phase / frequency word width |
| `ADC_W` | 12 | PLL ADC width |
| `ADC_SHIFT` | 8 | left shift of the ADC code in the frequency word |
| `SINE_ADDR_W` | 10 | phase bits used by the sine table (quarter table: 256 entries) |
| `SINE_W` | 12 | sine sample width |
| `SYNC_DELAY` | 2 | Start Synchro → loop switch delay |
| `SHIFT_W` | 5 | width of the filter gain inputs |

The sine table is computed at elaboration as
`round((2^(SINE_W-1)-1) · sin(2π(i+0.5)/2^SINE_ADDR_W))`.

## What follows the method, and what is this design's choice

These parts follow the method:

- the block structure: two digital PLLs, the offset path with its two force stages, the latch subtraction, the error sums, the delayed loop switch, the loop filter, and the sum with the frequency program
- the pass/ramp/reset behaviour of the force circuit
- the retro-fit of the error onto the offset

These are choices of this design:

- all word widths, the ADC scaling and the sine table format
- the register placement and the `ALIGN` delay
- level-sensitive triggers, and the force stage holding its target once reached
- the accumulating latch and the opening of the loop when Start Synchro falls
- the PI filter, its sign and its shift gains
- the sign convention that makes `phase_set` equal the final `phi_rf - phi_ref`
- the PLL frequency word taken after the pre-program sum

These are not included:

- the analogue parts: the phase discriminators, the PLL loop filters, the ADCs and DACs, and the cavity amplifier
- the frequency-program source
- the machine's beam phase loop, which acts on the same rf
- any sequencer for the triggers, which are expected from the machine timing system
- the optional variant with a second accumulator in front of the PLL's phase accumulator, for slow applications

## Files and simulation

`rtl/` holds one module per file plus the package:

- `rf_sync_top` — the top, which wires all the blocks together
- `digital_pll`, `phase_accumulator`, `sine_converter`
- `offset_generator`, `force_to_zero`
- `error_source`, `transient_cancel`
- `loop_filter`, `rf_synthesizer`

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). It also
holds `pll_frontend_model.sv`, a behavioural model of the analogue front end
made of a multiplier, a first-order low-pass and a clipping ADC.

Each testbench prints `TB_RESULT checks=N failures=M`.

`tb_rf_sync_top` runs the complete process at the default parameters, in about
570 000 clocks (under a second):

1. acceleration
2. Start Synchro
3. frequency stage
4. phase stage
5. flattop

It checks the following:

- the error is constant during acceleration
- the loop closes with no correction transient
- `F_off` reaches 0 and the rf reaches exactly the reference frequency
- `phi_off` reaches `-phase_set`
- the final error is near zero, and `phi_rf - phi_ref = phase_set`
- the rf phase is fixed against the analogue reference

It also counts each mechanism (latch, switch, both ramps, the rf leaving its
programme) and fails if one never happened.

`tb_ppm_cycles` runs two machine cycles back to back without a reset, each
with its own settings:

- The first cycle accelerates towards the reference and synchronizes at 1/8 turn.
- The second cycle decelerates from above the reference, so the offset and both slopes change sign. It synchronizes at 3/8 turn.

The test checks that the real rf phase against the analogue reference moves by
the 1/4 turn difference in `phase_set`. Releasing the three triggers at the end
of a cycle re-opens the loop and re-arms the process for the next cycle.

Example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rf_sync_pkg.sv \
    tb/tb_rf_sync_top.sv --top-module tb_rf_sync_top -o sim
./obj_dir/sim
```

For any other block, replace `tb_rf_sync_top` with that block's testbench.

The loop parameters used in that test are only one example of a stable
setting, not a tuned design:

- PLL model gain 32000, low-pass coefficient 1/32
- `kp_shift = 9`, `ki_shift = 20`
- slopes: 16 per clock for frequency, `2^14` per clock for phase
