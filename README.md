# Adiabatically stepped, reconfigurable charge-pump control for electrostatic MEMS actuation

Electrostatic MEMS actuators need voltages far above a modern CMOS supply,
and often several different ones. They draw almost no DC current, because
the load is a capacitor of about 1 pF. This design generates the actuation
voltage with an 8-stage switched-capacitor charge pump fed from 1.2 V, and it
sets the voltage digitally by choosing how many stages are clocked. With `n`
stages enabled the unloaded output is `(n+1) x 1.2 V`, from 2.4 V up to
10.8 V.

The digital controller adds two ideas to a plain reconfigurable pump:

* **Adiabatic stepping.** The active stage count is never changed in one
  jump. It moves one stage at a time. It climbs quickly when charging and
  falls slowly when discharging, so each step moves only a small amount of
  charge.
* **Charge recycling.** Each downward step taken while the actuator still
  holds charge counts as returned energy. Once some energy has been
  recovered, two recycled clocks and two enables (`start_mux`, `start_clk`)
  switch on a few small low-power logic blocks, an 8:1 multiplexer and an AND
  gate.

The pump clock also slows down by a factor of 4 in steady state. The load is
purely capacitive, so holding a voltage needs only occasional pumping.

The RTL follows the block structure of a published CPLD prototype of this
scheme. That source describes most blocks by their role and their
waveforms, not by their internals. Much of the logic below is therefore this
design's own, and the sections on each block say what was chosen. The
behaviour of the analog parts (the pump itself and the MEMS actuator) is
approximated by cycle-based behavioural models. They let the digital control
be simulated end to end, but they are not circuits.

## Signal chain

```
prog_word[8:0] = {discharge, drive_code[3:0], involt[3:0]}

involt / adc_in ─► mux_memout ─► memout (stage code 0..8)
                                    │
                     control_signal (threshold assigners + converter)
                                    │ target
                     adiabatic_controller ──► level (ramped) ──► therm_dec ──► CTRL1..8
                       │    │     │                                             │
                       │    │     └── steady ──► nonoverlap_clk ─► CLK1/CLK2 ──► pump_clk_buffer
                       │    │                                                   │ phi1/phi2 = CLKx·CTRLi
drive_code ─► dac ─► anout ─► vclk = anout/50 × 1.2 V ─────────────────────► charge_pump (model)
                       │    │                                                   │ vout
                       │    └── discharging ─► discharge stage                  ▼
                       │                                              mems_actuator (model)
                       │                                                  │ capacitive_load
                       └─ rclk1/rclk2, start_mux/start_clk ─► lp_block ◄──┘ (back to controller)
```

Everything runs on one clock `clk`, with an active-low synchronous reset
`rst_n`. The blocks whose role was given as "clear" see `!rst_n`. The timings
below are quoted at 40 MHz, the clock at which the prototype was measured.

## Stage count and output voltage

`therm_dec` turns the stage count into the thermometer pattern CTRL1..CTRLn.
The pump's capacitor pairs in stage `i` are clocked by `CLK1·CTRLi` and
`CLK2·CTRLi`. A stage whose CTRL line is low receives no clock and passes
its input through.

| level | CTRL high      | pump output (1.2 V drive) |
|-------|----------------|---------------------------|
| 0     | none           | Vin (model: see below)    |
| 1     | CTRL1          | 2 × Vin = 2.4 V           |
| 2     | CTRL1–CTRL2    | 3 × Vin                   |
| …     | …              | …                         |
| 8     | CTRL1–CTRL8    | 9 × Vin = 10.8 V          |

Codes 9–15 saturate to all eight stages.

## The adiabatic controller (`adiabatic_controller`)

This is the heart of the design and the part least specified by the
source. It has four states, declared in `mems_pkg::ac_state_t`:

| state     | condition                           | what happens                                             |
|-----------|-------------------------------------|----------------------------------------------------------|
| IDLE      | level = goal = 0                    | nothing stored                                           |
| CHARGE    | level < goal                        | +1 stage every `RISE_STEP_CYCLES` clocks, `rclk1` toggles |
| HOLD      | level = goal ≠ 0                    | steady state, pump clock slowed (`steady`)               |
| DISCHARGE | level > goal, or finishing the last dwell | −1 stage at once, then −1 every `FALL_STEP_CYCLES`; `rclk2` toggles; discharge stage on |

The goal is `target`, or 0 while the `discharge` bit of the program word is
set.

**Timing at default parameters.** `RISE_STEP_CYCLES = 1` and
`FALL_STEP_CYCLES = 32`.

* A new `involt` reaches `target` after 3 clocks.
* From 0, the level reaches 8 stages 9 clocks later.
* A full release spends 8 × 32 = 256 clocks in DISCHARGE, which is 6.4 µs at
  40 MHz and matches the prototype's measured fall time. The level reaches
  0 after 1 + 7 × 32 clocks. The last step is then held for 32 more clocks
  so that the discharge stage can settle the output.
* The prototype's 80 ns rise time (about 3 clocks) is faster than this
  digital ramp. The rise time is set by `RISE_STEP_CYCLES`.

**Recycle accounting.** A downward step taken while the MEMS model reports
`capacitive_load` adds one to `recyc_count`, which saturates at 255. This
counter is the "y" of the original controller.

* `start_mux` is high once `recyc_count` is non-zero.
* `start_clk` is high while `start_mux` is high and a discharge is in
  progress.
* The two recycled clocks are `rclk1` (toggling while charging) and `rclk2`
  (toggling while discharging).

These rules are this design's reading of the controller's waveforms. In the
prototype the controller is built from Positive Feedback Adiabatic Logic
(PFAL) gates powered by ramped clocks. Those gates are transistor-level
circuits. Here they are replaced by ordinary synchronous logic with the same
role.

The assertions in the module check two things: the level never moves by
more than one stage per clock, and it never exceeds `NSTAGES`.

## Pump clocking (`nonoverlap_clk`, `pump_clk_buffer`)

A four-phase counter produces CLK1 (phase 0) and CLK2 (phase 2), with one
dead phase between them on each side. They can therefore never overlap, and
an assertion checks this.

* The counter normally advances every clock, giving a pump cycle of 4
  clocks.
* In HOLD it advances every `SLOW_DIV` = 4 clocks, giving 16 clocks per
  cycle.

`pump_clk_buffer` ANDs both phases with each CTRLi and registers the result.
This register is the drive buffer. Both phases are delayed equally, so the
nonoverlap is kept.

## Clock drive level (`dac`)

The pump's per-stage gain is set by the amplitude of its clock (VddClk). A
4-bit DAC, built from logic only, sets that amplitude. Its weights are not
binary: bit `k-1` contributes `k × 1.25 V`, so the four bits are worth 1.25,
2.5, 3.75 and 5 V. For example, 0110 gives 2.5 + 3.75 = 6.25 V.

* `anout` is the sum, counted in 0.25 V units (0–50).
* The top reads full scale (50) as the 1.2 V supply: `vclk = anout/50 × 1.2 V`.
* `dac_bit` is a first-order delta-sigma stream whose density of ones is
  exactly `anout/50` over every 50 clocks. It is the level as a single
  pin, with no external parts.

The weights follow the prototype's DAC. The delta-sigma output and the
full-scale mapping are this design's own.

## Voltage request path (`mux_memout`, `control_signal`)

* **mux0** registers either `{involt, involt}` (the 4-bit request widened to
  8 bits, i.e. ×17) or, when `src_sel` is high, an 8-bit `adc_in` word.
* **mux1** maps the top 5 bits of that word to one of 32 stage codes,
  `memout = round(idx × 8/31)`. 0 maps to 0 stages and full scale to 8.
  For example, `involt = 7` gives 0x77, idx 14, and 4 stages.
* **control_signal** compares the code against the stage thresholds (one
  `therm_dec` instance). Its converter registers the saturated `target` and
  its thermometer pattern, and pulses `changed` when the target moves.

The two-mux structure, the widths (4-bit `involt`, 8-bit `adcout`, 32
memout combinations, 4-bit stage code) and the threshold/converter split
follow the prototype. The widening rule, the mapping formula and the
`adc_in` source are this design's own choices.

## Low-power blocks (`lp_block`, `dec3to8`)

These loads run only on recycled energy.

* `en_onehot` is the 3:8 decode of `lp_sel`. It is all zero while
  `start_mux` is low.
* `lp_out` takes `lp_data[lp_sel]` on each rising edge of `rclk1` or `rclk2`,
  but only while `start_mux` is high.
* `lp_and` is `lp_data[lp_sel] & start_clk`, registered.

The recycled clocks are sampled as data by `clk`, not used as clocks, so
the block stays in one clock domain.

## Behavioural models of the analog parts

**`charge_pump`** models the pump, including its discharge stage.

* With `n` clocked stages and drive `Vclk`, the pump aims for
  `Vin + n × Veff`. `Veff = Vclk` at 0.5 V and above. Below 0.5 V it is
  `Vclk/2`, which models the weak clock-inverter drive at low clock levels.
* Each pump cycle closes a quarter of the gap upward. The pump can only add
  charge, so removing stages does not lower the output by itself.
* While the controller discharges, the output closes one eighth of the gap
  per clock toward the new, lower target. With all stages off it falls
  toward 0.
* The active-stage set is sampled at each phase-1 edge. It is cleared after
  16 clocks without a clock edge.

**`mems_actuator`** models the actuator's electrostatic hysteresis.

* It pulls in at 6.0 V and releases below 3.0 V.
* `capacitive_load` is high above 1.2 V.
* These thresholds are placeholders. Set them to the device being driven.

Both models are synthesizable integer logic (voltages in mV, 16 bits), but
they describe analog behaviour and are not meant as hardware.

## How far to trust it

The following follow the source design:

* the block set and how the blocks are chained;
* the 8 stages and the 1.2 V supply;
* the thermometer control table;
* the gated nonoverlapping stage clocks;
* the DAC weights;
* the 32 memout combinations;
* the slow steady-state clock;
* the stepped adiabatic control;
* the recycle counter and the two recycled clocks;
* the 8:1 mux / AND loads;
* the 256-clock (6.4 µs) fall.

The following are this design's own choices:

* the program-word bit layout;
* the mux0/mux1 mapping;
* the step rates and the final dwell;
* the rules for `start_mux` and `start_clk`;
* the slow-down factor;
* the delta-sigma DAC output;
* all the numeric behaviour of the two models.

Known departures:

* The digital rise ramp (9 clocks) is slower than the 80 ns rise the
  prototype measured on the pump output.
* PFAL adiabatic gates are not modelled. The controller is plain CMOS-style
  synchronous logic.
* Level 0 in the pump model leaves the output where the discharge stage put
  it. It does not return to Vin.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops at a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mems_pkg.sv rtl/*.sv \
          tb/tb_mems_actuation_top.sv --top-module tb_mems_actuation_top -o sim
./obj_dir/sim
```

`tb_mems_actuation_top` runs the whole system at its default parameters, in
about 9,000 clocks. It performs these steps:

1. full drive to 8 stages, with pull-in;
2. a reconfiguration down to 4 stages, which recycles charge and enables
   the low-power blocks;
3. a release;
4. a run with a weak 0.12 V clock drive, which gives no pull-in;
5. a 2-stage request through `adc_in`.

Along the way it checks:

* every stage-count timing;
* the settled pump voltages, within 2 %;
* that only enabled stages are clocked;
* the 4-to-16-clock slow-down of the pump clock;
* that each of these mechanisms happened at least once.

`tb_stage_sweep` walks the request `involt` through 0..15 and back down at
full drive, about 47,000 clocks. At every step it checks the stage count,
the CTRL thermometer pattern, the settled `(n+1) × 1.2 V` output and the
pull-in state, so every row of the stage table is reached by both a rising
and a falling ramp.

## Parameters

| parameter          | default | where                         | meaning                         |
|--------------------|---------|-------------------------------|---------------------------------|
| `NSTAGES`          | 8       | top, pump, decoders, control  | pump stages                     |
| `VIN_MV`           | 1200    | top, pump                     | supply, mV                      |
| `RISE_STEP_CYCLES` | 1       | top, controller               | clocks per upward stage step    |
| `FALL_STEP_CYCLES` | 32      | top, controller               | clocks per downward stage step  |
| `SLOW_DIV`         | 4       | top, `nonoverlap_clk`         | steady-state pump-clock divider |
| `FULL_SCALE`       | 50      | `dac`                         | modulator full scale, 0.25 V units |
| `VPI_MV`, `VREL_MV`, `CHG_MV` | 6000, 3000, 1200 | `mems_actuator` | pull-in, release, charged thresholds |

The stage code is 4 bits wide, so `NSTAGES` can go up to 15 without other
changes. The DAC full scale sets the mapping from `anout` to the drive level.
