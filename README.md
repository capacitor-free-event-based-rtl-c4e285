# Event-driven digital LDO controller

A digital low-dropout regulator (DLDO) replaces the error amplifier of an
analog LDO with an ADC, a digital controller and an array of switched pass
transistors. Such a loop normally runs from a free-running clock. That costs
power even when nothing changes, and a quantised loop at rest tends to toggle
between neighbouring codes (a limit cycle), which shows up as ripple on the
output.

This controller stops its own clock. While the output voltage VOUT is inside a
window around the target (the *dead zone*, VREFL..VREFH), the oscillator is
off, no flip-flop toggles and the pass-array code is frozen. There is then no
limit cycle and almost no quiescent current. When VOUT leaves the window, two
analog comparators raise an *event*, which restarts the oscillator without
needing a clock. The loop then runs a gain-scheduled PID until VOUT is back in
the window. From then on it makes no further correction, and it stops again
after a short dwell. A separate droop detector turns on extra pass
current with no clock at all, to catch fast load steps during the time the
sampled loop needs to react.

The RTL here is the digital part of such a regulator. It has an 8-bit
Flash-SAR ADC sequencer, a dynamic gain control, a PID controller, the event
detector and the pass-array gate drive. The analog parts are the oscillator,
the comparators, the ADC's sample-and-hold and DAC, the pass transistors and
the droop detector. They stay outside and connect through ports. The
testbenches model them with real-valued behavioural models.

## Block diagram and files

```
            above_h/below_l (window comparators)          droop_n (droop detector)
                    |                                            |
              +-----v---------+  osc_en   +-----------+          |
              | event_detector|---------->| oscillator|          |
              +-----+---------+           +-----+-----+          |
                    | sleep_entry               | osc_clk (all clocked logic)
   VOUT --> [S/H, DAC, comparators] <--> flash_sar_ctrl          |
                                            | adc_data           |
                                     dynamic_gain_ctrl <- vref_code
                                            | e, de, {Kp,Ki,Kd}  |
                                      pid_controller             |
                                            | code (0..255)      |
                                     pass_array_driver <---------+
                                            | pmos_gate_n / nmos_gate / assist_gate_n
                                     [CMOS pass-transistor array] --> VOUT
```

| file | contents |
|---|---|
| `rtl/dldo_pkg.sv` | widths, the PID parameter struct, the gain-state enum, the default gain table |
| `rtl/dldo_ctrl.sv` | top level: wires the five blocks below |
| `rtl/event_detector.sv` | dead-zone dwell counter, asynchronous wake-up, oscillator enable, synchronised event |
| `rtl/flash_sar_ctrl.sv` | ADC sequencer: 3 sample clocks, 1 flash clock (2 bits), 6 SAR clocks |
| `rtl/dynamic_gain_ctrl.sv` | error, error difference, choice of one of four parameter sets |
| `rtl/pid_controller.sv` | fixed-point PID with clamping and anti-windup |
| `rtl/pass_array_driver.sv` | thermometer decode to 255 PMOS+NMOS cells, clock-free assist cells |
| `tb/ring_osc_model.sv`, `tb/adc_frontend_model.sv`, `tb/dldo_plant_model.sv` | behavioural models of the analog parts |
| `tb/dldo_loop_harness.sv` | one closed loop (controller and models) with its own oscillator period |
| `tb/tb_*.sv` | one self-checking testbench per block, a closed-loop testbench of the top, and a closed-loop sweep (`tb_dldo_workloads`) |

## Stopping and restarting the clock

This is the part that needs the most care, because the logic turns off its own
clock.

* **Event.** `event_o = above_h | below_l`, straight from the comparators with
  no register.
* **Wake-up.** The event drives the asynchronous clear of the `asleep` flip-flop
  and of the dwell counter (`wake_rst_n = rst_n & ~event_o`). `osc_en = ~asleep`
  therefore rises in the same instant as the event, while no clock is running.
  The oscillator model gives its first rising edge one period later.
* **Going to sleep.** The comparator outputs are also passed through a
  two-flop synchroniser. The dwell counter counts clocks in which the
  synchronised event is low and is cleared by any clock in which it is high.
  On the edge that completes `DWELL_CLKS` (32) consecutive in-window clocks,
  `asleep` is set. `osc_en` falls and the oscillator stops after its current
  half period. After a reset with VOUT already in the window this takes
  `DWELL_CLKS + 2` clocks, two of them for the synchroniser.
* **No correction inside the window.** An ADC result taken while the
  synchronised event is low is a "no event" sample. The PID, its integrator
  and the gate lines ignore it (the top's `sample_in_zone` output pulses
  instead of `pass_code_valid`). The gain control still records the sample as
  the previous error. So the code freezes the moment VOUT is back inside the
  window, and the dwell only has to confirm that it stays there. Without this,
  at light load, where one pass cell moves VOUT by several ADC LSBs, the
  integrator would keep walking the code in and out of the window, and the
  loop would never sleep.
* **What is frozen.** The PID code, its integrator, the previous error and the
  gate lines all keep their values, because their clock has stopped. The
  output therefore carries exactly the current it had when the loop stopped.
* **ADC restart.** The same edge that sets `asleep` sends the ADC sequencer
  back to its first sample clock (`sleep_entry` drives `restart`). After a
  wake-up the first result therefore comes from a fresh sample, 10 clocks after
  the clock restarts, and not from a conversion that was cut in half before
  sleep.
* **Analog enable.** `osc_en` can also switch the analog parts of the ADC
  (comparators, DAC) between their active and standby currents. The RTL needs
  nothing more for that.
* **Reset.** All flip-flops have an asynchronous active-low reset, since there
  may be no clock to apply a synchronous one. Reset leaves the loop awake.

The asynchronous clear is released when the event goes away, at any time
relative to the clock. The flip-flops it resets (`asleep` and the dwell
counter) are only ever reloaded with 0 or counted up from 0. A late release
therefore only delays the count by one clock.

## Error, gain scheduling and PID

`dynamic_gain_ctrl` forms `e = vref_code - adc_data` (9-bit signed, in ADC
LSBs) and `de = e - e_prev`. It picks one of four parameter sets:

| state | condition | Kp | Ki | Kd |
|---|---|---|---|---|
| `GS_SMALL_CONV` | \|e\| < 16, error not growing | 0.0625 | 0.0625 | 0 |
| `GS_SMALL_DIV`  | \|e\| < 16, e and de of the same sign | 0.0625 | 0.0625 | 0.0625 |
| `GS_LARGE_CONV` | \|e\| >= 16, error not growing | 0.0625 | 0.5 | 0.0625 |
| `GS_LARGE_DIV`  | \|e\| >= 16, e and de of the same sign | 0.0625 | 0.0625 | 0 |

The parameters are 8-bit unsigned Q4.4 values (`pid_gains_t`). The table is
the `GAIN_TABLE` parameter, whose default is `dldo_pkg::DEFAULT_GAINS`. The
threshold is `E_LARGE`. The loop is mostly integral. The integral gain is high
only while a large error shrinks, to cover the distance in a few samples.
Near the target it is low, because the plant gain depends strongly on the
load: in the testbench plant one pass cell moves VOUT by about one ADC LSB at
20 mA, but by about nine at 5 mA. A growing error mostly follows an overshoot
in this sampled loop, so it also gets the low integral gain. The values were
chosen against the testbench plant, and checked with its output capacitance
at 100, 200 and 400 pF. Changing the pass-cell strength or the ADC full scale
calls for a new table.

`pid_controller` computes, once per ADC result taken outside the dead zone,

```
I  <- I + Ki*e                  (16-bit, saturating; Q.4 like the products)
MV  = (Kp*e + I + Kd*de) >>> 4  (floor)
code = clamp(MV, 0, 255)
```

The integrator holds `Ki*sum(e)`, not `sum(e)`. The gain control may change Ki
from one sample to the next. With this form that changes only the slope of the
integral term and never makes a step in the output. When MV is clamped and `e`
pushes further into the clamp, the integrator is not advanced (anti-windup).
After an overload the loop therefore recovers as soon as the load is back in
range.

## ADC sequencer

`flash_sar_ctrl` produces one 8-bit result every `CLKS` = 10 clocks (5 MS/s at
50 MHz):

| phase (clock) | 0 - 2 | 3 | 4 - 9 |
|---|---|---|---|
| action | `sample` high, S/H tracks | 3 flash comparators give bits 7:6 | SAR, bits 5..0, one per clock |

During SAR, `dac_code` is the result so far with the bit under test set. The
bit is kept if `cmp` is high, meaning that the held input is at least the DAC
level. `valid` pulses on the clock after the last decision. The flash bits are
the count of ones in the thermometer input, and an assertion reports a
thermometer code with a bubble.

## Pass array and droop assist

`pass_array_driver` turns code `n` on as cells 0..n-1. Each cell is a PMOS
(gate `pmos_gate_n[i]`, low = on) in parallel with an NMOS (`nmos_gate[i]`,
high = on). One code step adds exactly one cell, so the current rises
monotonically with the code. The gate lines are registered, so they change
once per PID update, free of glitches. They load the PID's next code on the
same edge as the PID's own code register (`load` is the PID update strobe). The 32 assist cells (`assist_gate_n`)
are driven straight from the droop detector's active-low output, with no
register and no clock.

## Timing summary (defaults, 50 MHz)

| path | delay |
|---|---|
| event -> `osc_en` high | combinational |
| wake-up -> first ADC result | 10 clocks |
| ADC `valid` -> gain set -> PID code -> gate lines | 1 clock (gain set and PID are combinational) |
| wake-up -> first change of the pass array | 11 clocks (220 ns) |
| gate change -> next sample held | 2 clocks of settling for VOUT |
| VOUT enters the window -> code frozen | 2 clocks (synchroniser) |
| last in-window clock -> oscillator stopped | `DWELL_CLKS` clocks after the synchroniser |
| droop -> assist cells on | combinational |

## What is fixed by the source and what is chosen here

The following come from the design being implemented:

* the loop structure;
* the event-driven stop and wake with a VREFL..VREFH dead zone (0.65 - 0.75 V in
  its example);
* an 8-bit ADC at 5 MS/s from a 50 MHz clock, described as Flash-SAR;
* the error as `Vref - V_ADC`, both digital;
* a PID of the form `Kp*e + Ki*integral(e) + Kd*de/dt` whose parameters are
  chosen from the error and its difference;
* a pass array of both PMOS and NMOS devices;
* a droop-triggered assist path that needs no clock.

The following are this implementation's own choices, because the source does
not give them:

* the 2 + 6 flash/SAR split and the phase lengths;
* the four gain states, the threshold and all parameter values;
* the Q4.4 format, the integrator that accumulates `Ki*e`, and the anti-windup
  rule;
* the dwell length of 32 clocks and the synchroniser;
* the ADC restart on sleep;
* gating the PID update with the synchronised event, which is how the "no
  event" dead zone is applied to the sampled loop;
* the thermometer mapping, 255 main cells and 32 assist cells;
* the asynchronous reset.

The source reports a settling time of about 250 ns (20 -> 50 mA, VIN 1 V,
target 0.65 V) and a clock of 50 - 200 MHz. Every update of this loop takes
one ADC conversion (10 clocks), so its settling time scales with the clock.
`tb_dldo_settling` runs that step on three loops side by side, in the
testbench plant. VOUT is back in the window after 5.1 conversions:

| clock | 50 MHz | 100 MHz | 200 MHz |
|---|---|---|---|
| 20 -> 50 mA | 1024 ns | 514 ns | 258 ns |
| 50 -> 20 mA | 1222 ns | 612 ns | 307 ns |

At 50 MHz the reported figure is therefore not reached. At 200 MHz it is
matched, but the plant is illustrative, so this shows only the order of
magnitude. Larger or slower steps take longer: in `tb_dldo_ctrl` (50 MHz) the
loop is asleep 1.3 - 5.7 us after each step, and after up to 10 us in the
sweep. Only the clock-free assist path reacts within nanoseconds.

Because the loop stops as soon as VOUT is inside the window, the DC output
can end anywhere in the window, often near the edge it entered from. In the
sweep the load regulation is 0.9 - 1.8 mV/mA and the line regulation up to
0.45 V/V. The source reports 0.13 - 0.74 mV/mA and 0.01 - 0.40 V/V. Those
figures also depend on its pass devices and its window, so the two sets are
not directly comparable.

## Simulating

With Verilator 5 (two-state simulation, `--timing` for the models' delays):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/dldo_pkg.sv tb/tb_dldo_ctrl.sv --top-module tb_dldo_ctrl
./obj_dir/Vtb_dldo_ctrl
```

Replace `tb_dldo_ctrl` with `tb_flash_sar_ctrl`, `tb_dynamic_gain_ctrl`,
`tb_pid_controller`, `tb_event_detector` or `tb_pass_array_driver` for the
block tests, with `tb_dldo_workloads` for the sweep, or with `tb_dldo_settling`
for the settling time at 50, 100 and 200 MHz. Each test prints `TB_RESULT checks=N failures=M` and has a
watchdog.

`tb_dldo_ctrl` runs the top at its default parameters in a closed loop with the
plant model. The plant is a conductance of 1 mS per cell, 200 pF on the output,
and window comparators at 0.65 / 0.75 V. The target is code 149 (0.70 V of a
1.2 V full scale). The test runs this sequence:

* start-up from 0 V;
* load steps 20 -> 50 -> 20 mA;
* VIN steps 1.0 -> 0.8 -> 1.0 V;
* a 90 mA overload that the array cannot carry, then back to 20 mA;
* a slow load ramp from 20 to 35 mA over 4 us.

After each step it checks that the loop falls asleep with VOUT in the window,
and stays asleep with the code held. It also checks every ADC result against
the held voltage, checks that the cell count follows the code, checks that
no dead-zone sample changes the code, and checks that no clock edge occurs
while asleep. It counts wake-ups, sleeps, dead-zone holds, droop assists, PID
clamps and every gain state, and fails if any of them never happens. It runs
in well under a second.

`tb_dldo_workloads` runs the same closed loop over a grid:
* Vref 0.55 / 0.65 / 0.75 V, each with a +-50 mV window;
* VIN 0.6 / 0.8 / 1.0 V;
* load 5 / 20 / 50 mA.

It first works out from the plant whether each point can be reached with the
255 main cells:
* a reachable point must end asleep inside the window;
* an unreachable one must end with the code clamped at 255 and the loop awake;
* a point reachable only with the assist cells is reported but not checked.

It prints the settling time of each point, the load and line regulation, and
the fraction of time the oscillator ran.

The plant model's droop detector is a fast-drop detector (a high-pass filter
of VOUT against a 30 mV threshold) NANDed with the below-window comparator. So
the assist cells turn on only while a fast drop has taken VOUT under the
window.

The testbenches drop `rst_n` at 1 ns and hold the comparator window wide open
until reset has been applied. A two-state simulator triggers the flops'
asynchronous clears only on an edge, and with VOUT at 0 V the event would
otherwise be present from time 0.

## How far to trust it

Every block has a self-checking testbench against an independent reference
model. Each testbench was also shown to fail on a deliberately broken copy of
its block. All of this was run on Verilator only. The closed-loop results
depend on the plant model, whose values are illustrative, not extracted from
silicon. The gain table in particular is tuned to that model. With the plant's
output capacitance at 100 or 400 pF the loop still settles at every reachable
point of the sweep. The hardest case is a light load with a low target, where
one cell moves VOUT by about nine ADC LSBs. The RTL has not
been through timing analysis, and the clock stopping has not been checked with
a gate-level or analog simulation of the real oscillator.
