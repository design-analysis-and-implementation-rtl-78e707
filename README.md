# Reference-free voltage sensing and an energy-aware power platform

Systems powered by energy harvesters see a supply that varies widely and
unpredictably. They still need to know how much energy they have, so they
can schedule their work and regulate their supply. The usual tools for that
are a bandgap reference, an ADC and a stable clock. Each of these consumes
power, and each depends on a supply that is already good.

This design measures voltage with neither a voltage reference nor a timing
reference. It works by **turning charge into a count**:

1. A small capacitor is charged to the supply being measured.
2. The capacitor is then cut off from the supply and made to power an
   asynchronous counter.
3. The counter runs until the capacitor's energy is used up. The code it
   stops at grows with the energy that was stored, and so with the sampled
   voltage.

The RTL in `rtl/` builds this voltage sensor and places it in a small power
platform with two parts:

* **Part 1, load manager.** A sensor watches the unregulated supply. When a
  computational load (an FFT processor) asks for work, the platform picks one
  of four FFT configurations, depending on how much energy is available.
* **Part 2, reference-free buck-converter controller.** A sensor watches the
  converter output. A power management unit (PMU) then corrects the PWM duty
  cycle in proportion to the ratio between the demanded code and the measured
  code. The PMU's clock comes from the PWM generator's own self-timed counter.
  No reference appears anywhere in the loop.

Digital logic is written as synthesizable SystemVerilog. The analog parts are
modelled behaviourally, with real-valued voltages carried as 32-bit integers
in microvolts (`vsense_pkg::uv_t`):

* the sampling capacitor and its switches;
* the reference generator;
* the self-timed comparator;
* the level shifters.

Those models are simulation-only and say so in their first comment.

## The sensor: charge to code

### Sampling circuit and counter

Three switches surround the sampling capacitor C_sample:

| switch | connects | closed when |
|---|---|---|
| S1 | supply → C_sample | idle: the capacitor follows the supply |
| S2 | C_sample → counter supply | sensing: the counter runs from the capacitor |
| S3 | supply → counter supply | after sensing: the code is held at full logic level |

The counter (`toggle_counter`, built from `toggle_stage` cells) is a ripple
binary counter. Stage 0 oscillates by itself: its toggle request is its own
inverted output. Each later stage toggles when the previous bit falls. Without
a clock, the counter runs as fast as its supply voltage allows. Every toggle
moves charge out of C_sample. As the voltage falls the counter slows down, and
the number of toggles it completes depends on the starting energy,
½·C·V².

The model in `sampling_circuit` treats each count as charge sharing with the
switched capacitance: every toggle removes a fixed fraction (`DROP_PPM`,
3.288 %) of the remaining voltage. The oscillation period scales as 1/V. With
this law, the count reached between V and the stop voltage is
log(V/0.17 V) / −log(1 − 0.03288). The constants were chosen so that a
sample of about 1.0 V gives code 53 (0x35). The model's codes over the
operating range are:

| V (mV) | 250 | 400 | 600 | 800 | 1000 | 1200 | 1500 | 1600 | 1800 |
|---|---|---|---|---|---|---|---|---|---|
| code | 12 | 26 | 38 | 47 | 54 | 59 | 66 | 68 | 71 |

(The table comes from the sensor testbench. A round at exactly 1.0 V lands on
54, just past the 53/54 boundary.) The code is monotonic and compressive, and 8 bits hold it with
plenty of room.

### Knowing when to stop: reference generator and comparator

A counter that runs until it dies would lose its code. The sensor therefore
has to stop the counter *just before* the capacitor voltage becomes too low to
hold state, which is about 140 mV. It must do this without a reference
voltage to compare against.

The **reference generator** (`reference_generator`) is supplied by the
capacitor itself. Its output:

* follows its supply while that supply is above a first threshold (VTH1,
  400 mV here);
* is pulled to ground between VTH1 and a second threshold;
* rises to follow its supply again below the second threshold (VTH2, about
  170 mV).

This last rise is the *indication*: the capacitor has reached about 170 mV.
The thresholds come from transistor properties, not from a reference.

The **self-timed comparator** (`st_comparator`) compares the generator output
(Vi1) with the capacitor voltage (Vi2). It is a dynamic latch comparator
that clocks itself:

* While its enable ("Reset") input is low, Q, Clock, Vo1 and Vo2 are all high.
* When enabled, it evaluates. Whichever side discharges first pulls its
  output low and sets Q or Q̄.
* It then drops its own internal clock to precharge again, and repeats.

In other words, it polls for as long as it is enabled. The Vi1 side has the
larger input transistor, so Vi1 wins a tie. This makes Q = 1 while the
generator output equals its supply, and Q = 0 while it is grounded.

### The controlling unit: one toggle flip-flop

`sensor_control` sequences a round with a single toggle flip-flop FF1, clocked
by `req AND Q`:

1. **Idle.** The comparator is held reset, so Q = 1. FF1 = 0, S1 is closed and
   C_sample charges.
2. **Request.** `req` rises, and with Q already high the clock of FF1 rises.
   FF1 toggles to 1: S1 opens, S2 closes, the counter is released and the
   comparator is enabled.
3. **Counting.** The comparator's first decisions make Q = 1 (generator above
   VTH1). Soon the generator output grounds and Q falls to 0. A falling edge
   does not toggle FF1.
4. **Indication.** At about 170 mV the generator output rises again. Q returns
   to 1, FF1's clock rises, and FF1 toggles back to 0: the counter stops and
   holds its code. S3 closes to restore the code to full logic level, and S1
   recharges C_sample. The comparator returns to reset.
5. **Acknowledge.** When C_sample has recharged (1 µs) `ack` rises, and `code`
   is valid. When `req` falls, S3 opens, `ack` falls and the counter is
   cleared.

`req`/`ack` is a four-phase handshake. Between rounds the requester must
leave at least the recharge time, which is already included before `ack`.

## Part 2: the reference-free buck controller

```
 osc ─► pwm_generator ──pwm──► dead_time ──p_gate/n_gate──► (power switches, LC filter) ──► V_L
            │  C[5]                                                                    │
            ▼                                                                          ▼
           pmu ◄── level shifters ◄── voltage_sensor (supplied by V_L) ◄── req ── delay_counter
```

### PWM generator and PMU clock

`pwm_generator` holds a free-running asynchronous counter C[7:0]. It is
driven by self-timed oscillation events (`osc`), which are an input here.
Whenever C wraps to zero, a loadable counter Q is loaded with 256 − PWM_DC
and the PWM output is cleared. When Q reaches zero, PWM is set. The PWM is
therefore low for 256 − PWM_DC events and high for PWM_DC events, in a
256-event period.

Counter bit C[5] is the PMU clock: four PMU clock cycles per PWM period.

### Dead time

`dead_time` keeps the PMOS and NMOS power switches from conducting together:

* The PWM passes through a short delay line (`DEAD_STAGES` events).
* PMOS gate = NAND(pwm, delayed pwm). The PMOS turns on only after both are
  high.
* NMOS gate = NOR(pwm, delayed pwm). The NMOS turns on only after both are
  low.

Each PWM edge therefore has a gap in which both switches are off.

### PMU: monitor, read, compute

`pmu` is a small state machine running on C[5]. Every access to a signal
from the sensor's voltage domain takes three clock edges: enable the level
shifter, sample it, disable it.

* **Cold start.** After reset the duty cycle is 250 (0xFA), its maximum. The
  output-voltage detector is monitored. While it reads 0, the duty stays at
  maximum and monitoring repeats.
* **Normal mode.** Once the output is detected, the PMU enables the
  delay-line counter (`delay_counter`). After `delay` PMU clocks, the counter
  raises the sensor's `req`. The PMU waits for `ack` through its level
  shifter.
* **Reading.** The sensor code (measured) and the load's demanded code are
  read through eight level shifters each.
* **Computing.** The next duty cycle is

  PWM_DC(next) = PWM_DC · demanded / measured

  If the result is above 255, or the measurement is zero, 250 is used
  instead. The request is withdrawn, the PMU waits for `ack` to fall, and
  monitoring begins again. If monitoring finds the output gone, the PMU is
  back in cold start.

Worked example (demanded 0x35, which is 1 V):

* The first reading is 0x4C, giving 250·53/76 = 174 (0xAE).
* The next reading is 0x3F, giving 174·53/63 = 146 (0x92).

This works because the sensor code rises steadily with voltage: the ratio of
codes steers the duty cycle in the right direction. The loop settles where
the measured code equals the demanded code. No absolute voltage is ever
known.

### Level shifters

The sensor in part 2 is supplied by the converter output, while the PMU
lives in its own domain. `level_shifter` is a zero-bias current comparator
with one input tied to ground: when enabled, it outputs 1 if its input is
more than a margin ξ (about 100 mV) above ground. It outputs 0 while
disabled. In `power_platform`:

* one shifter carries the output-voltage detection;
* one carries `ack`;
* eight carry the sensor code, whose logic-1 level is the sensor's counter
  supply;
* eight carry the demanded code, whose logic-1 level is V_L.

## Part 1: load manager

`load_manager` serves a load request as follows:

1. It runs a sensing round on the unregulated supply.
2. It compares the code with three thresholds (`TH1`/`TH2`/`TH3` = 30/45/60).
3. It answers with one of four FFT configurations:

| code | index | points | precision |
|---|---|---|---|
| < 30 | 0 | 512 | 12 bit |
| 30 – 44 | 1 | 512 | 16 bit |
| 45 – 59 | 2 | 1024 | 8 bit |
| ≥ 60 | 3 | 1024 | 12 bit |

`load_ack` goes high with the configuration and falls after `load_req`
falls. The configuration after reset is index 0.

## Files

| file | content |
|---|---|
| `rtl/vsense_pkg.sv` | `uv_t` voltage type, PMU state enum, FFT configuration struct |
| `rtl/power_platform.sv` | top: both parts side by side |
| `rtl/voltage_sensor.sv` | sensor assembly |
| `rtl/sensor_control.sv` | FF1 controlling unit |
| `rtl/toggle_counter.sv`, `rtl/toggle_stage.sv` | asynchronous counter |
| `rtl/sampling_circuit.sv` | behavioural: C_sample, switches, counter oscillation |
| `rtl/reference_generator.sv` | behavioural: two-threshold indication |
| `rtl/st_comparator.sv` | behavioural: self-timed comparator |
| `rtl/level_shifter.sv` | behavioural: grounded-input current comparator |
| `rtl/pmu.sv` | PMU state machine |
| `rtl/delay_counter.sv` | loadable delay counter issuing `req` |
| `rtl/pwm_generator.sv` | PWM and PMU clock |
| `rtl/dead_time.sv` | dead-time generator |
| `rtl/load_manager.sv` | configuration selection |
| `tb/tb_<module>.sv` | self-checking testbench per module |

The top's ports are:

* the two supplies `vdc_uv` and `v_l_uv`;
* the PWM oscillation `osc`;
* the load handshake and demanded code;
* the delay value;
* the gate signals.

They also bring out observation signals (codes, capacitor voltages,
comparator counts, PMU state). The harvester, storage, protection and
power-on-reset circuit, power switches, LC filter and FFT processor are not
part of the RTL; their signals are the top's ports.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
stops, and it has a watchdog. With Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal rtl/vsense_pkg.sv rtl/*.sv tb/tb_pmu.sv --top-module tb_pmu
./obj_dir/Vtb_pmu
```

List `rtl/vsense_pkg.sv` first, as shown above; a duplicate on the command
line is harmless, and so is `--timescale 1ns/1ps` if your version needs one.

`tb/tb_power_platform.sv` runs the whole platform at its default parameters,
in about a minute. It closes part 2 through a first-order buck model written
in the testbench, whose output settles towards Vin·(PWM high share). It
checks:

* every duty-cycle update against the formula;
* the PWM high time;
* that the switches never conduct together;
* the PMU clock tap;
* the load configuration.

It also counts each mechanism and fails if one never happened: cold start,
normal mode, the 255 replacement, duty decreases and increases, dead-time
gaps on both edges, loss of output, and all four load configurations.

A typical run regulates to code 0x35 at about 0.98 V, with duty 139 from a
1.8 V input and duty 178 after the input drops to 1.4 V.

To reset the design, drive `rst_n` high, then low, then high again. The counter and
controlling unit have no clock, so their asynchronous reset needs an actual
falling edge.

## Departures from the original design and limits

* **Code scale.** The codes depend on the sampling model's constants, not on
  a silicon circuit. The model gives 53 at 1.0 V and 71 at 1.8 V. The
  reference chip reads about 24 at 0.8 V and 72 at 1.8 V, and its buck
  example reads 0x4C at 1.6 V and 0x3F at 1.15 V. The shape is similar, but
  individual codes differ. The PMU and the load thresholds only use ratios
  and preset codes, so the thresholds should be set to match a real sensor.
* **Load thresholds.** The original selects configurations by stored energy
  (about 20 mJ and 30 mJ bounds). The code thresholds 30/45/60 are this
  design's own.
* **PWM period.** Here the period is exactly 256 counter events, so PWM_DC
  = 240 means a duty of 240/256 = 0.94. The original also quotes
  a PWM frequency of 2.44 MHz with a duty of 0.88 for the same setting, which
  does not match 256-event counting; the counting scheme was followed.
* **Dead-time polarity.** The PMOS gate is driven from NAND and the NMOS gate
  from NOR. This is the only assignment that yields a gap; the reverse would
  turn both switches on at the same time.
* **Idle switch state.** In idle S1 is closed and C_sample tracks the supply.
  The original is inconsistent on this point. Tracking is what makes the
  1 µs recharge before `ack` meaningful.
* **Ack level shifter enable.** It is held for as long as the PMU waits for
  an edge, instead of being pulsed on each clock edge.
* **Sensor range.** The sensor works from about 250 mV to 1.8 V. If a round is
  requested on a supply already below the 170 mV indication, the generator
  output is never grounded, so no indication ever comes. The round then
  does not finish, and the PMU waits for `ack` forever. A real system needs
  its power-on reset or protection circuit to keep requests away from such
  supplies.
* **Behavioural models.** The analog models are functional abstractions:
  1 ns time steps, an ideal threshold in the comparator and level shifter,
  no switch resistance or leakage, and no process spread. Synthesis tools
  reject them; they exist to make the digital parts testable.
* **Not modelled.** The harvester, supercapacitor, protection and start-up
  circuit, power switches and filter, and the FFT processor. In the
  end-to-end testbench the buck power train is an ideal model.
