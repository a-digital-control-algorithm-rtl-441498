# Two-switching-cycle input-voltage compensation for a digitally controlled buck converter

When the input voltage of a buck converter jumps, a normal feedback loop
only reacts after the output voltage has already moved. It then needs tens of
microseconds to pull the output back. This controller takes a different
approach. It samples the input voltage every switching cycle. When it sees a
large change, it stops the feedback loop for two switching cycles and applies
two duty cycles, `d1` and `d2`, computed in advance. They are chosen so that,
at the end of the second cycle, three things hold at once:

* the charge that went into the output capacitor has come back out, so the
  output voltage is back at its reference;
* the inductor current is at the valley value of the new steady state;
* the duty cycle is the new steady-state value `D_new = v_o'/v_in`.

The converter is then in its new steady state. The feedback loop (a
current-mode PID) takes over again, with its outputs preloaded to the new
steady-state current and duty, so there is no second transient at the hand-back.

The RTL is a complete digital controller for a synchronous buck: sampling of
three 9-bit A/D converters, the compensation algorithm, the steady-state PID,
a 10-to-8-bit dither and a DPWM. Its defaults are a 2.5 V / 10 A converter
with L = 1 µH, C = 235 µF, 400 kHz switching and a 100 MHz clock.

## Signal chain and timing within one switching cycle

```
 adc_vin/adc_il/adc_vo (9 bit)
        |
   adc_capture ---- fix_t volts/amps ---> optimal_controller ---d10---> dither ---d8---> dpwm ---> gate_s1, gate_s2
        ^                                   |  comp_sequencer                            |
        |                                   |  duty_predictor (seq_divider, seq_sqrt)    |
        |                                   |  load_current_estimator                    |
        |                                   |  current_mode_pid                          |
        +---------------- adc_sample (count 175) <---------------------------------------+
```

A switching cycle is 250 clocks (`dpwm` counter 0..249). S1 turns on at
count 0. Everything hangs off one instant: the ADC strobe at count 175,
which is 0.3·Ts = 75 clocks before the next turn-on.

| clocks after the strobe | what happens |
|---|---|
| 0 | `adc_sample`: the three A/D words must be valid in this clock |
| 1 | `adc_capture` has scaled them to fixed point (`valid`) |
| 2 | sequencer decides: PID step, start a prediction, or apply `d2` |
| 3–4 | in steady state the PID output and the 10-bit duty are ready |
| ≈ 69 | after a prediction, `d1` reaches the 10-bit output (the predictor itself takes 66 clocks) |
| 74 | DPWM takes the dithered 8-bit word for the cycle that starts next |

The sampling point is what makes the arithmetic affordable. The prediction
has a 75-clock budget, so one divider and one square root, each iterating one
bit per clock, are enough.

## The prediction (`duty_predictor`)

The inputs are the samples at point 1 (the turn-on that starts the first
compensation cycle) and the load current `i_o` estimated before the
transient. The predictor evaluates, in this order:

```
v_o'    = Vref + i_o·r_loss                          equivalent output voltage
i_L1    = i_sample + Ts/L·(v_in1·max(0, d_prev-0.7) - 0.3·v_o')
D_new   = v_o'/v_in1
i_L_end = i_o - ½·(Ts/L)·v_o'·(1 - D_new)            new valley current
k       = ((i_L_end - i_L1)·L/Ts + 2·v_o')/v_in1     = d1 + d2
Q0/Ts   = C/Ts·(v_o1 - (i_L1 - i_o)·ESR - Vref)      charge already on C
X       = (1+k)² + 4L/(v_in1·Ts)·(i_L1 - 2·i_o + i_L_end - ½·k²·v_in1·Ts/L + Q0/Ts)
d1      = ((1+k) - √X)/2,   d2 = k - d1
i_Lnew  = i_L_end + 0.3·v_o'·Ts/L                    PID current reference
```

The expression for `d1` solves the charge balance over the two cycles. The
area under the piecewise-linear inductor current of cycles 1 and 2 must
cancel the charge error present at point 1. `duty_predictor_tb` checks this
directly, not only against the formulas. It applies the predicted duties to
an ideal converter model, and for a 5 V → 7.5 V step the capacitor voltage
ends within 0.03 mV of the reference and the current within 1 mA of
`i_L_end`.

Implementation notes:

* **Number format.** Every quantity is a signed Q15.16 word (`fix_t` in
  `dcdc_pkg`): 1.0 V, 1.0 A and 100 % duty all equal 65536. Products are
  formed at 64 bits and shifted back (`fmul`). The converter constants (C/Ts,
  L/Ts, Ts/2L, …) are worked out from `real` parameters at elaboration.
* **One reciprocal.** `1/v_in1` is computed once, as 2³²/v_in1, by
  `seq_divider` (33 iterations). Every division in the list above then
  becomes a multiplication. Input voltages below 1 V are raised to 1 V
  before the division.
* **Square root.** `seq_sqrt` forms √(X·2¹⁶)·2⁸, i.e. √X in Q16, from a
  48-bit radicand in 24 iterations.
* **Where the current sample sits.** The current is sampled 0.3·Ts before
  turn-on, but the equations need it at the turn-on instant. If the sampled
  cycle's duty is at most 0.7, the switch is off in that window and the
  current falls at v_o'/L; this is the usual case. After a clamped 100 %
  cycle the switch is still on at the sample and the current is rising. The
  `max(0, d_prev-0.7)` term handles that case. Without it, an instant
  7.5 V → 5 V step overshot by 140 mV instead of 30 mV.
* **No real solution.** X < 0 means no two-cycle solution exists, for
  example after a large instant drop of the input. The root is then taken as
  0, `no_solution` is raised, and `d1` falls outside [0, 1]. The sequencer
  then clamps `d1` and starts again.

## Control flow (`comp_sequencer`)

The sequencer acts once per sample set:

| state | on new samples / predictor result |
|---|---|
| IDLE (PID in control) | if \|v_in − v_in,base\| > 0.25 V: start a prediction (`detect`), else step the PID and the load estimator |
| CALC | prediction done: send `d1`. Outside [0,1]: clamp to 0/100 % (`clamp_d1`) and predict again on the next samples (RECALC); else STEP1 |
| STEP1 | input moved by more than 1/32 V since point 1: predict again from these samples (`restart_vin`). Else send `d2`; clamped (`clamp_d2`) → RECALC, otherwise STEP2 |
| STEP2 | transient over: preload the PID with `i_Lnew`/`D_new` (`pid_load`), the input voltage at point 1 becomes the new base (`finish`) → IDLE |

While the input is still ramping, the compensation restarts every cycle. It
keeps steering the charge balance towards the latest input voltage, and runs
its two final cycles only once the input has stopped moving. The base voltage
used for detection is the input voltage at the last completed compensation.
A slow drift therefore also ends in one small compensation once it adds up
to 0.25 V.

## Steady state: PID and load estimate

`current_mode_pid` is a cascade that runs once per cycle:

* a voltage PID turns `Vref − v_o` into a current reference (KP = 8 A/V,
  KI = 1 A/V per cycle, KD = 8 A/V, limit ±15 A);
* a current PI turns `i_ref − i_sample` into the duty (KP = 0.06/A,
  KI = 0.03/A per cycle, limit [0, 1]).

The integrators are limited as well. `load` sets both outputs and both
integrators at once. These gains were picked by simulation for a stable,
reasonably fast loop with the default converter, not by a formal loop design.
With the PID alone (detection disabled), the cases in the table below give
deviations of 48–79 mV. Raising the gains further made the loop limit-cycle
on the 7.8 mV output-voltage LSB.

`load_current_estimator` turns each steady-state current sample into a cycle
average. It uses the known falling slope and the applied duty:
`i_avg = sample + Ts/L·Vref·(0.5 − 0.3) − Ts/(2L)·Vref·d`. It then filters
with weight 1/8. The estimate is frozen while a compensation runs.

## Duty resolution: dither and DPWM

The controller's duty is rounded to 10 bits (0..1023, so the largest duty is
99.9 %). The DPWM resolves 8 bits. `dither` recovers the two missing bits on
average over four cycles: it adds 1 to `d10[9:2]` in `d10[1:0]` out of every
four cycles, using the order 0, 2, 1, 3 so the extra counts are spread out.
The result saturates at 255. `dpwm` turns the 8-bit word into
`floor(d8·250/256)` on-clocks for S1. S2 is the complement, with 2 clocks
(20 ns) of dead time on each edge. The gate outputs are registered and lag
the counter by one clock.

## Interface of the top (`dcdc_controller_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, asynchronous active-low reset |
| `adc_vin` | in | 9 | input voltage, 1/32 V per LSB |
| `adc_il` | in | 9 | inductor current, two's complement, 1/16 A per LSB |
| `adc_vo` | in | 9 | output voltage, 1/128 V per LSB |
| `adc_sample` | out | 1 | convert/sample strobe; the words must be valid in this clock |
| `gate_s1`, `gate_s2` | out | 1 | high-side / low-side switch on |
| `d10`, `d8` | out | 10, 8 | duty before and after dithering |
| `comp_active` | out | 1 | the two-cycle compensation owns the duty |
| `events` | out | 5 | one-clock pulses: `detect`, `restart_vin`, `clamp_d1`, `clamp_d2`, `finish` |

The ADC scales are set in `dcdc_pkg` (`DEF_*_LSB_*`) and can be overridden
on `adc_capture`. The converter constants are `real` parameters of the top
(`L_H`, `C_F`, `FS_HZ`, `FCLK_HZ`, `VREF_V`, `ESR_OHM`, `RLOSS_OHM`,
`SAMPLE_ADV`). The DPWM period is `FCLK_HZ/FS_HZ` and the sampling advance is
`SAMPLE_ADV·period`. If you change the clock or the switching frequency,
check that the predictor's 66 clocks still fit inside the sampling advance.

## What was verified

`dcdc_controller_top_tb` closes the loop around a behavioural synchronous
buck. The model has ideal switches, body diodes during the dead time, a
10 mΩ loss resistance, 3 mΩ ESR, and 9-bit quantised sensing, and it is
integrated every 10 ns. Each case starts from reset, lets the PID settle for
1200 cycles, then changes the input:

| case | input change | load | plant L, C | peak output deviation | compensation active (cycles after the change) |
|---|---|---|---|---|---|
| A | 5 → 7.5 V in 20 µs | 5 A | nominal | 15 mV | 1..10 |
| B | 5 → 7.5 V in 20 µs | 0 A | nominal | 16 mV | 1..10 |
| C | 7.5 → 5 V in 40 µs | 5 A | nominal | 13 mV | 2..18 |
| D | 5 → 7.5 V in 20 µs | 5 A | +20 % | 14 mV | 1..10 |
| E | 5 → 7.5 V in 20 µs | 5 A | −20 % | 21 mV | 1..10 |
| F | 5 → 7.5 V at once | 5 A | nominal | 36 mV | 0..2 |
| G | 7.5 → 5 V at once | 5 A | nominal | 30 mV | 0..3 (d1 clamped once) |

The limits are 30 mV for the ramps and 50 mV for the instant steps. The
deviation includes one 7.8 mV LSB of output-voltage quantisation and the
cycle that passes before a change can be seen at all. In the ramp cases the
compensation restarts every cycle while the input moves, and ends two cycles
after the ramp does. For case F the test also requires that the
compensation covers exactly the two predicted cycles with no restart. The
run also counts detections, restarts, clamps, PID
preloads, PID steps and dithered cycles, and fails if any of them never
happened. The whole test runs at the default parameters and takes about a second
of wall-clock time.

Each block has its own self-checking testbench in `tb/`, named
`<module>_tb.sv`. They cover:

* quotient, remainder and latency of the divider, and floor-sqrt and latency
  of the square root;
* the predictor against floating-point formulas at 200 random operating
  points, plus the physics check described above, with latency ≤ 75 clocks;
* the PID against a floating-point model;
* every branch of the sequencer, driven by a scripted predictor;
* the estimator's filter;
* ADC scaling;
* the dither sums over every 10-bit value;
* DPWM period, on-time, dead time and strobe position.

## Departures and open points

* The PID structure and gains, the detection threshold (0.25 V), the "still
  changing" tolerance (1 LSB), ESR and r_loss used in the equations, the ADC
  scales, the dither pattern and the dead time are choices made here.
  Replace them with the values of a real board.
* The sense resistor is meant to be in series with the high-side switch,
  while the algorithm samples the current when that switch is normally off.
  The RTL assumes the current word is the inductor current at the sampling
  instant, whatever the sensor.
* The controller constants are fixed at elaboration. When the real L and C
  differ from them (cases D and E), the prediction is slightly wrong and the
  deviation grows, but the result stays within the limits above.
* A duty clamped to 100 % becomes 1023/1024 in the 10-bit word and 249 of
  250 on-clocks in the DPWM, so S1 still turns off for one clock.
* The A/D converters, the gate driver and the power stage are not part of
  the RTL. The converter conversion time is not modelled: the words must be
  valid at the strobe.
* Nothing here was timed for an FPGA. Each predictor step holds up to two
  32×32 multiplies in one 10 ns clock. A slow device would need those
  steps pipelined.

## Simulating

Put the package first, then the rest of `rtl/`, then one testbench:

```
verilator --binary --timing -Wno-fatal --top-module dcdc_controller_top_tb \
    rtl/dcdc_pkg.sv $(ls rtl/*.sv | grep -v dcdc_pkg) tb/dcdc_controller_top_tb.sv
./obj_dir/Vdcdc_controller_top_tb
```

Every testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Each
has a watchdog that counts a failure and stops the run if it hangs.
