# Mixed-signal CPM controller with time-optimal transient recovery for multiphase buck converters

A multiphase interleaved buck converter under current-programmed mode (CPM)
control recovers slowly from a load step if it relies only on its voltage
loop. A time-optimal recovery is harder still, because at the moment of the
voltage extremum the phase currents are not equal. They are shifted in time
by the interleaving.

This controller keeps the current loops analog and makes the voltage loop
digital. It adds one small analog trick: a sample-and-hold (S&H) capacitor
per phase. The S&H serves two purposes:

* **In steady state it is the integrator's memory.** The reference written to
  the DAC is sampled. Next period it is converted back to a digital code,
  which becomes the "previous value" of the integrator.
* **During a transient it captures each phase's inductor current** at the
  voltage valley (or peak). The capacitors are then briefly short-connected,
  so each one holds the average phase current. Every phase restarts from the
  same reference, and the references add up to the load current.

A single on/off action, sized by capacitor charge balance, then restores the
output voltage. At light load the controller switches to pulse-frequency
mode (PFM).

The RTL is SystemVerilog. The digital voltage loop is synthesizable. The
analog parts are behavioural models with `real` signals:

* the windowed flash ADC;
* the DACs, multiplexer, S&H capacitors and comparators.

## Modes of operation

The windowed flash ADC delivers a 4-bit signed error `e = round((Vref - Vout)/V_LSB)`,
clipped to [-8, 7]. A positive `e` means the output is below the reference.

| mode | entered when | what the hardware does |
|---|---|---|
| CPM (steady state) | \|e\| ≤ 1 | Once per switching period: `i_ctrl[n] = K·e[n] + i_ctrl[n-1]`. The phase clock sets each SR latch, and the current comparator resets it at `i_ctrl`. |
| transient | \|e\| ≥ 2 | The time-optimal sequence below. `state_transient` is high. |
| PFM | the CPM reference falls below `I_PFM_ENTER` | The phase clock stops and the reference is fixed at `I_PFM`. When the error reaches 2, one phase gets one pulse, ended by its comparator. Phases take turns. |

In CPM the S&H tracks the DAC output. The dual-mode ADC converts it once per
period at the slow rate (one SAR bit per `SLOW_DIV` clocks). The result feeds
back into `cpm_integrator` as `i_ctrl[n-1]`. The first CPM update after a
transient or PFM waits until the S&H has been converted once. This ensures
that `i_ctrl[n-1]` really is the value now programmed.

## The transient sequence

This is the core of the design. It lives in `mode_control`, as the states
`M_SLEW → M_CAPTURE → M_CONVERT → M_PEAK → M_RETURN → M_CPM`. The light-to-heavy
case runs as follows; heavy-to-light is its mirror image.

1. **Slew** (`M_SLEW`).
   * All main switches are forced on.
   * The DAC is set to the maximum allowable current `I_MAX`. This limits the
     inductor current, because the comparator still turns a switch off at
     `I_MAX`.
   * The multiplexer connects the sensed inductor currents to the S&H
     capacitors.
   * The dual-mode ADCs convert back to back at the fast rate, which acts as
     a continuous-time tracker.
   * `minmax_detect` follows the deviation and flags the valley. It does so
     one clock after the first sample that is smaller than the largest
     deviation seen.
2. **Capture and share** (`M_CAPTURE`). Every S&H holds its phase current.
   The capacitors are then short-connected for `SHORT_CLKS` clocks. After
   that, each capacitor holds the phase average.
3. **Convert** (`M_CONVERT`). One fast conversion gives `i_ctrl_new`, the
   steady-state reference for the new load.
4. **Lag correction.** The error is coarse: one LSB is 10 mV. So the valley
   is only recognised once the voltage has risen back by up to one LSB. By
   then the currents have overshot the load current.
   * The output voltage is close to a parabola around its extremum, and the
     current ramps linearly. So the extremum lies halfway between two
     moments: when the last error level was entered (`i_entry`) and when it
     was left (`i_exit`).
   * The controller therefore uses `i_ctrl_new = sample - (i_exit - i_entry)/2`.
   * The tracked current is the mean of all phases' ADC results. Any single
     phase carries the interleaving ripple, which would bias the correction.
   * Often the last level is the one at which the transient was triggered.
     Its entry current is then the current at the arming instant. The
     tracking ADC was following the DAC until that moment, so it reports
     this current one conversion late. With every switch forced, the current
     ramps linearly, so the first result is extrapolated back using the
     second: `2·first - second`.
   * The correction is this design's addition. Without it, every recovery
     ends with a second, opposite transient.
5. **Peak** (`M_PEAK`).
   * `optimal_di_calc` looks up `Δi = sqrt(2C(1-D)·Vref·Δv / L)` from the
     measured deviation `Δv`.
   * The DAC carries `i_peak = i_ctrl_new + Δi`, clamped at `I_MAX`.
   * Each phase stays on until its comparator trips at `i_peak`, then waits
     for the others.
6. **Return** (`M_RETURN`).
   * The DAC carries `i_ctrl_new`.
   * Each phase stays off until its current falls to `i_ctrl_new`. It then
     rejoins clocked CPM operation.
   * When all phases have done so, the mode is CPM with `i_ctrl = i_ctrl_new`.

Further cases:

* **A new step during `M_PEAK`/`M_RETURN`.** The sequence restarts at
  `M_SLEW` in either of two cases: the deviation grows again by 2 LSB from
  its minimum since the capture, or `|e| ≥ 2` occurs in the opposite
  direction. This gives recovery from two closely spaced steps.
* **A comparator that never trips.** `TIMEOUT` clocks end `M_PEAK` or
  `M_RETURN`.
* **All phase currents reach zero.** In a heavy-to-light step with all
  switches off, every phase current can reach zero before the voltage peak
  is recognised. This can happen when the peak lies outside the ADC window.
  The capture is then taken at once, without correction, and the load is
  unknown.
  * While the output is still above the window, the controller waits in PFM,
    which issues no pulse while the output is high.
  * Otherwise it returns to CPM at the PFM reference. The integrator then
    decides whether the load is light enough for PFM.

### Sizing Δi

`optimal_di_calc` builds its 16-entry table during elaboration:

    LUT[v]  = round( sqrt(DI_GAIN · v) )                 (current codes)
    DI_GAIN = 2·C·(1-D)·Vref·V_LSB / (N·L·I_LSB²)

Here N is the number of phases. Each phase supplies 1/N of the recovery
current, so the equivalent inductance is L/N. The default `DI_GAIN = 569`
corresponds to the following power stage:

* C = 220 µF, L = 2.2 µH, N = 2;
* D = 1.8/5;
* V_LSB = 10 mV, I_LSB = 45 mA.

For other power stages, recompute `DI_GAIN`. For N phases of the same stage
it is about `569·2/N`.

## Blocks

| file | role |
|---|---|
| `mscpm_pkg.sv` | widths (8-bit current codes, 4-bit error), mode enum, saturation helper |
| `mscpm_top.sv` | wires everything for `N_PHASES` phases; sensed currents in, gate commands out |
| `mode_control.sv` | the mode FSM described above; drives DAC code, S&H, ADC mode and rate, latch forcing, PFM pulses |
| `cpm_integrator.sv` | `K·e + i_ctrl[n-1]`, saturated to [0, I_MAX] (combinational) |
| `minmax_detect.sv` | valley/peak detection on the coarse error, gives Δv |
| `optimal_di_calc.sv` | Δi table and `i_peak`/`i_valley`, clamped to [0, I_MAX] (combinational) |
| `dual_mode_adc.sv` | SAR logic per phase: one conversion per start, or free-running; 8 clocks per conversion when fast, 32 when slow |
| `phase_clock_gen.sv` | interleaved set pulses, phase k at `k·PERIOD/N`; per-period tick; stops in PFM |
| `pwm_latch.sv` | per-phase SR latch as a flip-flop: force-off > comparator reset > force-on > set |
| `windowed_flash_adc.sv` | behavioural: output voltage to error code, registered |
| `sa_dac_analog.sv` | behavioural: DAC, multiplexer, S&H with short-connection, SAR comparator, current comparators |

Sensed inductor currents enter as `isense[k]` in amperes. The
current-sense amplifier and the power stage are not part of the RTL.

## Parameters and their origin

The defaults describe a two-phase, 5 V to 1.8 V, 20 W converter switching at
1 MHz. That configuration comes from the reference prototype. Everything
else is this design's own choice:

| parameter | default | meaning |
|---|---|---|
| `N_PHASES` | 2 | phases |
| `PERIOD` | 50 | switching period in clocks (1 MHz at an assumed 50 MHz clock) |
| `V_LSB` | 0.01 | error LSB in volts |
| `I_LSB` | 0.045 | current code LSB in amperes (8-bit codes) |
| `K` | 1 | integrator gain, codes per error LSB |
| `I_MAX` | 200 | maximum reference (9 A per phase), used while slewing and as the clamp |
| `DI_GAIN` | 569 | Δi table gain, see above |
| `I_PFM` | 10 | PFM pulse reference (0.45 A, below the 0.52 A ripple of 2.2 µH) |
| `I_PFM_ENTER` | 8 | CPM reference below which PFM is entered |
| `SHORT_CLKS` | 4 | duration of the S&H short connection |
| `TIMEOUT` | 200 | limit on `M_PEAK`/`M_RETURN` |
| `SLOW_DIV` | 4 | clocks per SAR bit in the slow ADC rate |

## Where this design goes beyond or departs from the reference description

* **The state split and on/off timing.** The reference gives the sequence:
  reference at the maximum, capture at the extremum, short-connection, then
  peak and new steady-state references. The split into states is this
  design's own. So is the way each phase's on/off interval ends on its own
  comparator.
* **Lag correction.** These are additions (see above):
  * the correction of the captured current;
  * the mean-of-phases tracking and the entry-current extrapolation it
    relies on;
  * the zero-current capture.
* **Retrigger rule.** The rule for a second step during the sequence is this
  design's own.
* **PFM exit.** The reference does not describe leaving PFM. Here the
  controller returns to CPM in either of two cases: pulse requests come
  faster than each phase could switch at the normal frequency, or the error
  reaches 3.
* **PFM phase order.** PFM pulses rotate over the phases.
* **Comparator reference.** The comparators take their reference straight
  from the DAC. The S&H only feeds the dual-mode ADC.
* **DAC speed.** The DAC is ideal and settles within a clock. The reference
  raises the DAC speed during the calculation; here only the ADC has a fast
  and a slow rate.
* **SR latch.** The latch is a flip-flop, so a comparator trip acts one clock
  later.
* **Unspecified numbers.** The reference gives no controller clock, LSB
  sizes, gains or PFM thresholds. All of these are assumptions.
* **Digital averaging.** An all-digital averaging of the captured currents is
  possible, but it is not built. The S&H short connection is used instead.

## Verification

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_cpm_integrator` | exhaustive over error and previous value, with K=3 |
| `tb_minmax_detect` | random error sequences against a reference model, valley and peak |
| `tb_optimal_di_calc` | every Δv and reference against an independently computed square root |
| `tb_dual_mode_adc` | conversions against a comparator model, latency in both rates, free-running mode |
| `tb_phase_clock_gen` | three phases: offsets, period, suspension |
| `tb_pwm_latch` | random stimulus against the priority rules |
| `tb_windowed_flash_adc` | rounding and clipping over a voltage sweep |
| `tb_sa_dac_analog` | tracking, hold, averaging by the short connection, comparators |
| `tb_mode_control` | every mode and transition: CPM update, both transient directions, lag correction and entry extrapolation, zero-current capture, retrigger, time-out, PFM entry/pulses/exit |
| `tb_mscpm_top` | closed loop at default parameters with a behavioural two-phase buck (`buck_plant_model`) |
| `tb_mscpm_multiphase` | closed loop with three and with four phases, 0.5 A to 4.5 A per phase and back |

`tb_mscpm_top` runs this load sequence:

* 2 A;
* an 8 A step up;
* a step down to 0.15 A, which ends in PFM;
* back to 4 A;
* four double steps of 2.2 A then 2 A, with the second step 2.2 to 3.1 µs
  after the first;
* 16 A, which clips `i_peak` and limits the current at `I_MAX`;
* 6 A.

For every segment it checks four things: regulation within ±30 mV, the
settled mode, equal phase currents, and a sequence length under 25 µs. It
also counts each mechanism (undershoot, overshoot, short connection, PFM
entry/pulses/exit, retrigger, current limit, `i_peak` clip), and fails if
one never occurs. The 8 A step shows about 63 mV of undershoot and recovers
in about 8 µs with the assumed power stage.

`tb_mscpm_multiphase` builds the controller for three phases and for four
phases, with `DI_GAIN` scaled to 379 and 285. It steps each from 0.5 A to
4.5 A per phase and back. At each capture it checks that every S&H holds the
same value. Before and after each step it checks CPM operation, regulation
and equal sharing. It also compares the undershoot and overshoot against the
time-optimal minimum for this power stage, `N·L·ΔI²/(2·C·V)`. The measured
undershoots are 97 mV with three phases and 131 mV with four. The output
capacitor is an assumption, so these numbers say more about the power stage
than about the controller.

To run a testbench with Verilator 5 (the package first):

    verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_mscpm_top rtl/mscpm_pkg.sv tb/tb_mscpm_top.sv
    ./obj_dir/Vtb_mscpm_top

Replace the top module name for the other testbenches. The closed-loop
testbenches take a few seconds.

## Known limitations

* **Steady-state limit cycle.** The steady-state loop is a pure integrator
  sampled once per period, with a 10 mV error quantum. It limit-cycles by
  about ±1 LSB, with a period of roughly 40 µs. It occasionally crosses
  `|e| = 2` and starts a small transient sequence. A proportional term, a
  finer error LSB or a dead band would remove this. None of these is part of
  the described controller.
* **Overshoot on large heavy-to-light steps.** This is set by the power
  stage: with all switches off, the inductor energy must go into C. A
  200 mV overshoot for a 16 A step with four phases of 2.2 µH into 220 µF
  is close to the physical minimum of 180 mV, not a controller fault.
* **Follow-on sequences.** A recovery can overshoot enough to start a
  second, smaller sequence in the opposite direction. The error LSB is
  coarse, so Δv, and with it Δi, is known only to within ±5 mV.
* **Synthesis scope.** The two behavioural models and the top that contains
  them use `real` signals. Only the digital blocks are meant for synthesis.
  For an implementation, replace the models with the actual converters and
  comparators, using the same ports.
