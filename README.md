# Digital reactor period meter

Reactor period T is the time the reactor power takes to grow by a factor
e. Rod calibrations need many period measurements. This instrument makes
each one automatically and to about 1.5 %. It does not time an e-fold rise.
It times a doubling instead, and doubling time equals T·ln 2. The display's
time base is slowed by the factor ln 2 = 0.69315, so the counter shows T
directly, in tenths of a second, on four Nixie digits (000.0 to 999.9 s).
The same circuit measures negative periods, where it times the power
falling to half.

The design is small and made of plain counters, latches and adders. This
RTL keeps that structure, one module per board function:

```
 power signal (0..-5 V)                           clk_adc (~100 kHz)
        |                                                 |
  [DAC + comparator]  <--dac_code--  tracking_adc  (adc_timing: CLOCK1..4)
   (analog, outside)  --comp_up--->       |  code, CLOCK4
                                          v
   start_btn ---sync2--------------> decision_logic  -- stop --+
        |                                                      |
        +---sync2---+        clk_xtal (7.213475 MHz)         sync2
                    v                                          v
                   display_logic: display_gate -> timebase_divider (/500000)
                                  -> display_counter (4 BCD decades) -> nixie_driver x4
```

## Measurement cycle

1. The operator lets the reactor settle on a stable period. The converter
   follows the power continuously the whole time.
2. **Pressing START** does three things:
   - It freezes the converter at a quiet phase.
   - It copies the converter word into the P0 register.
   - It clears the display and arms the display gate.
3. **Releasing START** starts counting. Time-base pulses arrive at
   14.427 per second, one per tenth of a period-second.
4. The decision logic compares every new word with P0. STOP is raised when
   the word reaches 2·P0 or falls to P0/2. STOP closes the gate, and the
   reading holds until the next START.

## The tracking converter (`tracking_adc`, `adc_timing`)

An 8-bit up/down counter drives an external current-output DAC. That
current is compared with the input current, and the comparator answers
"count up" or "count down". A 2-bit counter on the ~100 kHz board clock
splits every step into four phases:

| phase  | action |
|--------|--------|
| CLOCK1 | direction flip-flop samples the comparator |
| CLOCK2 | counter steps one count; new value at the end of the phase |
| CLOCK3 | nothing |
| CLOCK4 | quiet: STOP is evaluated here, START freezes here |

One step takes four clocks, which is 25 000 counts/s. A full-scale step
settles in about 10 ms, far faster than any reactor transient. When the
input is steady, the word alternates between the two counts on either side
of it.

**Freeze on the upper count.** The word alternates, so a sample taken at
a random moment is ±1 count uncertain. The end value 2·P0 doubles that
error. The timing is therefore frozen only when START is held, the phase is
CLOCK4 *and* the last step was upward. P0 is then always the upper of the
two alternating counts, which halves the uncertainty at the end of the
measurement. While frozen the word cannot change, so the P0 register
captures a stable value.

The counter saturates at 0 and 255 rather than wrapping. This design adds
that because the input can exceed full scale.

## The decision logic (`decision_logic`)

There is no comparator or multiplier. The inverted register value
L' = ~P0 feeds two adder chains together with the live word:

- **Doubling chain:** word + {L'[6:0], 1} + 1. This equals
  word + (256 − 2·P0[6:0]), so the carry-out is 1 exactly when
  word ≥ 2·P0.
- **Halving chain:** word + {1, L'[7:1]}. This equals
  word + (255 − ⌊P0/2⌋), so the carry-out is 0 exactly when
  word ≤ ⌊P0/2⌋.

**MSB clamp.** When P0 ≥ 128, 2·P0 does not fit in 8 bits. The doubling
chain would then carry almost at once, because it really compares against
2·(P0 − 128). The original clamps that carry with a diode to L'[7]; here it
is an AND with ~P0[7]. So for P0 ≥ 128 only halving can stop the count,
which is the negative-period case. The `inhibit` output shows when the clamp
acts.

The two decisions are ORed and gated with CLOCK4, when the word is stable.
STOP is registered in this design, so it is high during the clock after
that CLOCK4. The extra 10 µs of latency is negligible. The register makes
STOP glitch-free before it crosses into the crystal clock domain.

Consequence for users: a positive period needs P0 ≤ 127, just under half
scale. Starting at exactly half scale (P0 = 128) never stops.

## The display board (`display_logic` and below)

- **`display_gate`:** START sets the gate flip-flop and STOP clears it.
  Counting is enabled only while the flip-flop is set and START is released,
  so the interval runs from release to STOP. START wins if both arrive
  together.
- **`timebase_divider`:** 10 / ln 2 = 14.427 pulses per second is needed.
  The crystal is 7.213475 MHz, which is 5 × 1.442695 MHz and can be bought
  cheaply. A divide-by-5 stage and five divide-by-10 stages give
  7 213 475 / 500 000 = 14.42695 Hz. In this design the gate sits ahead of
  the divider, and START clears the divider along with the display. Every
  measurement therefore starts on a whole pulse boundary.
- **`display_counter`:** four cascaded decades, with `digit[0]` the tenths
  digit. Past 999.9 it wraps to 000.0, as a chain of 7490s would.
- **`nixie_driver`:** a BCD to one-of-ten decoder, like the 7441, with
  active-low cathodes. Codes 10 to 15 blank the tube.
- **`decade_counter`:** the shared stage. It counts modulo 10 or 5, with
  carry = enable AND terminal count. The original's ripple chain of 7490s
  is replaced here by a synchronous enable chain.

## Accuracy

Two error sources remain. One is the converter's ±1 count resolution,
reduced by the freeze-on-up rule. The other is its ±½ count nonlinearity at
both ends of the measurement. Together they bound the error at
±0.71/K %, where K = P0 / full scale:

| K   | worst-case error |
|-----|------------------|
| 0.5 | 1.4 % |
| 0.2 | 3.6 % |
| 0.1 | 7.1 % |

The crystal time base adds less than 0.01 %. The display adds ±1 count of
quantisation. The RTL is exact digital logic, so only the ±1 count
resolution term shows in simulation. Nonlinearity belongs to the DAC, which
is outside the design.

## Clocks, reset and ports of `period_meter_top`

- **`clk_adc`:** the A/D board clock, about 100 kHz from an astable
  multivibrator. Its exact rate only sets the tracking speed.
- **`clk_xtal`:** 7.213475 MHz. The reading is only correct at this
  frequency with the default divider.
- **`rst_n`:** asynchronous, active low. This design adds it; the original
  has no reset.
- **`start_btn`:** high while pressed. It must be debounced, and it is
  synchronised into both domains. STOP is synchronised into the crystal
  domain.
- **`comp_up`, `dac_code`:** the link to the external DAC and comparator.
- **`digit`, `cathode_n`:** the reading, as BCD digits and as Nixie cathode
  drive.
- **Status outputs:** `p0`, `stop`, `counting`, `adc_frozen`, `dir_up`,
  `doubled`, `halved`, `inhibit` and `tick`, for observation.

Parameters, all at the instrument's values by default:

| parameter | default | meaning |
|-----------|---------|---------|
| `ADC_W` | 8 | converter word |
| `PRESCALE` | 5 | first divider stage |
| `DECADES` | 5 | decade divider stages |
| `DIGITS` | 4 | display digits |

Shared types and constants are in `period_meter_pkg`. These include the
phase enum and the BCD digit type.

Not in the RTL are the analog and purchased parts: the DAC module, the µA710
comparator, the two oscillators, the Nixie tubes and the pico-ammeter that
supplies the power signal. The testbench models the DAC, the comparator and
the input resistor in `tb/adc_frontend_model.sv`. It also sets the
calibration gain there: a 5 V input toggles the word between 254 and 255.

## Simulation

Each board module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/period_meter_pkg.sv \
    tb/tb_period_meter_top.sv --top-module tb_period_meter_top
./obj_dir/Vtb_period_meter_top
```

- **`tb_period_meter_top`:** runs the whole instrument at full size and real
  clock rates. It makes four measurements:
  - +20 s from K = 0.48, which reads 20.0;
  - −10 s from K = 0.96, which reads 9.9 and exercises the MSB clamp;
  - +10 s from K = 0.2, which reads 9.8;
  - +10 s from K = 0.1, which reads 10.0.

  It checks each reading against the 0.71/K % bound. It also counts every
  mechanism: up and down steps, freeze, STOP by doubling and by halving, the
  clamp, ticks and display clears. That is about 35 s of instrument time and
  takes a little over two minutes with Verilator.
- **`tb_calibration`:** runs the calibration procedure. A shorted input
  toggles 0/1, −5 V toggles 254/255, and a full-scale step settles in about
  10 ms.
- **`tb_decision_logic`:** checks all 65 536 combinations of P0 and the
  converter word against plain integer arithmetic.
- **`tb_timebase_divider`:** runs at the full 500 000 ratio.

Not simulated end to end: the longest period, 999.9 s. That would take
693 s of instrument time. The counter widths cover it.
