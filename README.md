# Reconfigurable control for a fault-tolerant 6/5-leg back-to-back converter

A back-to-back converter (a three-phase rectifier and a three-phase inverter
sharing one dc-link) normally has to stop when one of its twelve switches
fails. The converter controlled here adds one bidirectional switch (a triac)
per phase between the AC terminals of the two sides. As long as all switches
are healthy the triacs are off and it is an ordinary six-leg back-to-back
converter. When a switch fails open, its leg is taken out of service: its
gates are cut, the triac of its phase connects its AC terminal to the leg of
the same phase on the other side, and that leg is from then on shared by both
sides. The converter keeps running as a five-leg converter with no spare
hardware.

This RTL is the digital part of that system, the part that sits in one FPGA:

* a six-leg PWM used before the fault,
* a five-leg reference generator and PWM used after it,
* one fault detector per leg that finds an open switch within about 32 us,
* the unit that latches the fault, swaps the PWM source, cuts the faulty leg
  and fires the right triac,
* a sinusoidal reference generator for the load side.

The design follows the paper "FPGA-based reconfigurable control for
fault-tolerant back-to-back converter without redundancy". The paper gives the
structure, the reference arithmetic, the detection method and its parameters.
Word formats, timing, reset behaviour and several small rules are this
design's own choices. They are listed under "Where this design goes beyond the
paper".

## Legs, switches and signals

Legs are numbered k = 0..5:

| k | leg | upper / lower switch | side | phase |
|---|-----|----------------------|------|-------|
| 0 | a1  | S1 / S4   | 1 (source) | a |
| 1 | b1  | S2 / S5   | 1 | b |
| 2 | c1  | S3 / S6   | 1 | c |
| 3 | a2  | S1' / S4' | 2 (load) | a |
| 4 | b2  | S2' / S5' | 2 | b |
| 5 | c2  | S3' / S6' | 2 | c |

`gate_hi[k]` and `gate_lo[k]` are the upper and lower IGBT commands of leg k.
`triac[p]` is the triac of phase p (Ta, Tb, Tc). The upper and lower commands
of a healthy leg are complementary. Dead time is not generated here: the gate
drivers of the target hardware insert it.

All voltages are signed fixed-point words, `ft_pkg::volt_t`: 16 bits with 4
fractional bits, so 1 LSB = 1/16 V and the range is +/-2048 V. Sums of
references (`mod_t`) are 18 bits wide so that they never wrap. Pole voltages
are measured from a leg's AC terminal to the dc-link midpoint n, so a healthy
leg sits at +Vdc/2 or -Vdc/2.

## Before the fault: six-leg PWM

Each side has three voltage references. Side 2 (the load) gets a balanced
sinusoidal set from `ref_gen_side2`. Side 1 comes from the rectifier's
dc-link/unity-power-factor controller, which is outside this RTL, so its three
references are inputs of the top.

A zero-sequence signal (ZSS) is added to each side's three references. The
ZSS leaves the line-to-line voltages unchanged and raises the usable voltage.
`zss_calc` uses min/max injection, vz = -(max + min)/2. For a balanced set
this is a triangle at three times the fundamental, a quarter of the reference
amplitude high.

`pwm_compare` compares each modulation signal v with one symmetric triangular
carrier that sweeps from -Vdc/2 to +Vdc/2. The upper switch is on while
v > carrier. The comparison is done without division, as
`(2v + Vdc)*CMAX > 2*c*Vdc`, where c is the carrier count (0..CMAX). Duty
cycles therefore follow the measured dc-link voltage. `pwm_carrier` builds the
carrier from an up/down counter. With the 80 MHz clock and the 8 kHz carrier,
CMAX = 5000 and one period is 10000 clocks (125 us).

## After the fault: five references for five legs

This is the core of the reconfiguration. Suppose the fault is in leg x_i
(phase x of side i). The triac of phase x joins that terminal to leg
x_(3-i), which then drives phase x of both sides. `ref_5leg` forms the five
new references in two steps.

1. It adds each side's own ZSS: v_lj = v*_lj + vz_j.
2. It adds the other side's phase-x signal to every healthy leg:

       V_lj = v_lj + v_x(3-j)        for every leg lj other than x_i

Step 2 adds one signal to all three terminals of side j: v_x(3-j) for its
two healthy legs, and (through the triac) also for phase x, whose shared leg
carries v_x1 + v_x2 = v_xj + v_x(3-j). That is a pure zero-sequence term for
side j, so both sides still get exactly their own line-to-line voltages. For
the fault in leg c2 the five references are

    VA1 = va1 + vc2    VB1 = vb1 + vc2    VC = vc1 + vc2
    VA2 = va2 + vc1    VB2 = vb2 + vc1

The five results leave `ref_5leg` packed in leg order with the faulty leg left
out. Output slot s holds leg s when s < fault_leg, and leg s+1 otherwise. A
second `pwm_compare` (five legs, same carrier) turns them into commands.

The five-leg converter has less voltage headroom. The shared leg's reference
is the sum of two phase voltages. As in the paper, the dc-link is assumed
large enough. Nothing rescales the references: a reference beyond +/-Vdc/2
simply saturates its leg. The end-to-end tests keep every five-leg reference
below Vdc/2.

## Finding the faulty leg

An open switch shows up as a wrong pole voltage. If S_k cannot close, a
positive leg current flows through the lower diode. The terminal then reads
-Vdc/2 although the command asks for +Vdc/2. `fault_detector` (one per leg)
works as follows:

* `pole_voltage_est` predicts the pole voltage from the command actually
  sent: +Vdc/2 when the upper switch is on, -Vdc/2 otherwise.
* **Voltage criterion:** the error is large if |v_meas - v_est| > h, with
  h = 10 V.
* **Time criterion:** on every sample strobe (every 1 us) an up-counter
  advances while the error is large and clears as soon as it is not. The leg
  is declared faulty when the counter reaches N = 32.

The detector has three states: S1 (normal), S2 (counting) and S3 (fault). S3
is left only by reset.

Driver and switch delays make the error large for a microsecond or two at
every switching instant. These pulses raise the counter briefly and never
reach N. A persistent error trips the detector 32 us after it appears.

Some faults cannot be seen at first. When the current direction makes the
diode beside the open switch conduct, the leg behaves normally. The fault is
then found only after the current reverses: with the lower switch of c2 open,
only while the c2 current flows into the leg.

Short-circuit faults need no logic of their own. Fast fuses in each leg
clear a shorted switch, after which the leg looks like one with an open
switch and is found the same way.

A reference check: at 1 us per sample, N = 32 gives the 32 us detection time
the paper chose. The paper's block diagram compares the count with "> N", but
its results declare the fault when the count reaches 32. This design trips at
the count of N.

## Reconfiguration (`fault_comp`)

`fault_comp` holds the six detectors and a sample-strobe divider
(SAMPLE_DIV = 80 clocks = 1 us). It also does the switch-over:

* **Six-leg mode** (after reset): `gate_hi = t6`, `gate_lo = ~t6`, all triacs
  off.
* **First trip:** the leg number is latched in `fault_leg` and `mode5` is
  set. The unit then stays in five-leg mode until reset (maintenance). Going
  back to six-leg operation after a fault is deliberately not supported. If
  two legs trip on the same sample, the lower leg number wins. Later trips
  are ignored.
* **Five-leg mode:** both gates of the faulty leg are 0. `triac[phase]` is 1.
  Every other leg k takes slot (k < f ? k : k-1) of the five-leg commands,
  with its lower switch complementary.

Assertions check that no leg has both gates on and that at most one triac is
on.

## Top level and timing

`ft_b2b_ctrl` wires the blocks together. It has one 80 MHz clock domain and
an asynchronous active-low reset.

```
v1_ref[3] (external rectifier control) ----+--> pwm_6leg (2x zss_calc, 6 comparators) --t6--+
ref_gen_side2(freq_word, amp2) -> v2_ref --+--> ref_5leg (2x zss_calc, V_lj) -> pwm_compare(5) --t5--+
pwm_carrier -> carrier (shared)                                                                      |
v_meas[6], vdc ----------------------------------------------------------> fault_comp <--------------+
                                                     gate_hi[6], gate_lo[6], triac[3], mode5, fault_leg
```

| port | dir | meaning |
|------|-----|---------|
| `vdc` | in | measured dc-link voltage |
| `v1_ref[3]` | in | side-1 references a, b, c |
| `freq_word`, `amp2` | in | side-2 frequency (f = freq_word * 80 MHz / 2^32; 2684 = 50 Hz) and amplitude |
| `v_meas[6]` | in | digitised pole voltages, leg order above |
| `gate_hi[6]`, `gate_lo[6]`, `triac[3]` | out | switch commands |
| `mode5`, `fault_leg` | out | five-leg mode and located leg |
| `det_count[6]`, `sample_en`, `carrier` | out | detector counters, sample strobe and carrier, for monitoring |

Latencies:

* Reference to gate command: 2 clocks in six-leg mode and 3 in five-leg mode.
  The ZSS, `ref_5leg` and comparator stages are combinational or registered
  once each.
* Gate commands change 1 clock after a detector trips.
* A fault that produces a steady error is acted on 32 to 33 samples after
  the error reaches the controller.

Parameters of the top, with their defaults (the first four are the paper's):

* `CLK_HZ` = 80 000 000
* `FC_HZ` = 8000
* `N` = 32
* `H_VOLTS` = 10
* `SAMPLE_DIV` = 80

The carrier count width follows from `CLK_HZ / (2*FC_HZ)`.

## Files

| file | contents |
|------|----------|
| `rtl/ft_pkg.sv` | word types, leg numbering helpers, detector state enum, polynomial sine |
| `rtl/pwm_carrier.sv` | triangular carrier counter |
| `rtl/zss_calc.sv` | min/max zero-sequence signal |
| `rtl/pwm_compare.sv` | carrier comparator bank (five-leg PWM; also inside the six-leg PWM) |
| `rtl/pwm_6leg.sv` | ZSS injection and comparison for six legs |
| `rtl/ref_5leg.sv` | double zero-sequence injection for any faulty leg |
| `rtl/pole_voltage_est.sv` | expected pole voltage from command and Vdc |
| `rtl/fault_detector.sv` | voltage/time-criterion detector of one leg |
| `rtl/fault_comp.sv` | six detectors, fault latch, command selection, triacs |
| `rtl/ref_gen_side2.sv` | phase accumulator and three-phase sine references |
| `rtl/ft_b2b_ctrl.sv` | top level |
| `tb/leg_plant_model.sv` | behavioural model of the six legs, triacs and delayed measurement (test only) |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog. The expected values are computed independently inside each
testbench, in integer or real arithmetic.

* `tb_pwm_carrier`: every carrier sample and the 10000-clock period.
* `tb_zss_calc`: random and edge-case triples against -(max+min)/2.
* `tb_pwm_compare`: random points against the real-valued comparison, and
  duty cycles over a full period.
* `tb_pwm_6leg`: ZSS injection plus comparison for random reference sets.
* `tb_ref_5leg`: all six fault locations. The c2 case is also checked term by
  term against the five equations above.
* `tb_pole_voltage_est`: +/-Vdc/2.
* `tb_fault_detector`: a counter model checked on every sample, spikes of 1
  to 31 samples that must not trip, a trip on exactly the 32nd sample, and the
  latched fault.
* `tb_fault_comp`: all six fault locations; gate mapping, triac, detection
  time, and the first fault being kept.
* `tb_ref_gen_side2`: outputs against `$sin` within 0.05 % of the amplitude.
* `tb_ft_b2b_ctrl` (top, default parameters): three scenarios through the leg
  model with 1.5 us of measurement delay:
  * the lower switch of c2 open with negative current, detected in 32.5 us;
  * the same fault with positive current, masked for two carrier periods and
    detected after the current reverses;
  * the upper switch of a1 open.

  It checks per-period duty cycles and the line-to-line voltages each side
  receives, before and after reconfiguration. It also counts that spikes,
  masked faults, detections and mode switches all occurred.
* `tb_load_fault_50hz` (top, default parameters): running 50 Hz references,
  and load currents lagging by the angle of a 2.75 ohm / 9 mH load. Two cases:
  * S6' opens at the negative current peak. It was detected after 67 us.
  * S6' opens just after the current turns positive. No detection for the
    whole 10 ms half-cycle, then detection 48 us after the reversal.

  Over 10 ms after each switch-over, the average line-to-line voltages of both
  sides stay within 2 V of their references.

To run a testbench with Verilator 5 (the package first, then the testbench;
`-y` finds the modules):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ft_pkg.sv tb/tb_ft_b2b_ctrl.sv --top-module tb_ft_b2b_ctrl -Mdir obj
./obj/Vtb_ft_b2b_ctrl
```

Each testbench finishes in a few seconds. Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/ft_pkg.sv rtl/<module>.sv`.
Lint reports an unused-signal warning for the detector state vector in
`fault_comp` and an unused-parameter warning for `ft_pkg::VFRAC` in modules
that do not need it. It also reports a SYNCASYNCNET note, because the
assertions in `fault_comp` use the asynchronous reset as their disable
condition.

## Where this design goes beyond the paper

These points are this design's own choices, made where the paper gives no
detail:

* **Fixed-point format:** 16-bit signed, 1/16 V per LSB. Threshold h = 10
  read as 10 V.
* **Detector sample period of 1 us:** inferred from N = 32 together with the
  32 us detection time the paper chose.
* **ZSS law:** min/max injection. The paper names ZSS injection but not the
  law; this law matches the triangular quarter-amplitude ZSS the paper plots.
* **Six-leg PWM:** the paper allows any PWM before the fault; this design
  uses the same ZSS and carrier as after the fault.
* **Pole-voltage estimate:** measured to the dc-link midpoint. Switch and
  diode drops are ignored.
* **Counter edge cases:** the counter clears when |error| equals h, and the
  detector trips when the count reaches N. The paper is inconsistent between
  "> N" and "reaches N".
* **Fault priority:** lowest leg index on simultaneous trips; later faults
  are ignored.
* **Five-leg packing and saturation:** packed slot order; no reference
  reduction in five-leg mode.
* **Register stages and reset values.**
* **Load-side generator:** the phase-accumulator/polynomial sine generator,
  with frequency and amplitude as inputs. The paper only asks for balanced
  sinusoidal load voltages.

Not included:

* **Source-side controller:** the voltage-oriented controller that keeps the
  dc-link voltage at unity power factor. The paper only names it, so its
  references are inputs.
* **Measurement front end:** the voltage sensors, amplifiers, ADC and the
  holding flip-flops at its outputs. Measured voltages enter as digitised
  words, and no ADC interface timing is assumed.
* **Power stage:** IGBTs, drivers, fuses, triacs and the dc-link. These
  appear only as the behavioural leg model used by the tests.
