# Digital phase detectors and a phase-detector tester

A phase detector compares two logic signals of the same frequency, the input
`fi` and the reference `fo`, and produces an output whose mean value depends
on the phase difference between them. Plotting that mean against the phase
difference gives the detector's *phase-voltage response*: its shape, its
linear range, and whether it also reacts to a frequency difference decide
which detector suits a given phase-locked loop.

This repository contains SystemVerilog for six classic digital phase
detectors and for a bench tester that measures their responses point by
point. The tester makes `fo` and a copy `fi` delayed by a selectable multiple
of pi/8, lets the operator step through 32 settings from -2*pi to +2*pi, and
passes the detector's output through a passive or an active low-pass filter
to a voltmeter. Everything digital is synthesizable RTL; the 4-bit DAC and
the charge pump with its filters are behavioural models with `real` voltages.

## The tester

```
  clk/osc_en ─► dephaser ──fo, fi──► six detectors ──► socket select ──► PD, Q1, Q2
                  ▲    ▲                    ▲                 │
   Set button ─► latch ─► step counter      │                 ├─► DAC (counter detector)
                          └─► LED decoder   │                 ▼
   Reset button ─► latch ─► R ───────► init block      charge pump + filter ─► Vout
   sign, PD 3/4 switches ─────────────────┘
```

### Making a phase difference: the dephaser (`dephaser`)

An 8-bit shift register whose last stage is fed back inverted to its input
is a Johnson counter: from all zeros it fills with ones, then with zeros
again, a cycle of 16 states. Every stage is therefore a 50 % square wave at
f_osc/16, and each stage lags the one before it by exactly one f_osc period,
which is 1/16 of the signal period, or pi/8. The first stage is the
reference `fo`. An 8-to-1 multiplexer picks stage `step[2:0]` (lag 0 to
7*pi/8) and an XOR gate inverts the pick when `step[3]` is set, adding pi.
So `fi` lags `fo` by `step * pi/8`, for step 0 to 15.

The Reset button clears the shift register and disables the multiplexer.
While Reset is held `fo` is 0 and `fi` equals `step[3]`; after release the
first rising edge is always an `fo` edge, followed by `fi` after the set lag.
That fixed start is what makes the negative settings possible.

### Setting and showing the step (`phase_setting`, `switch_latch`)

Each press of Set advances a 4-bit counter; it wraps from 15 to 0 and is not
cleared by Reset. A 4-to-16 decoder with active-low outputs lights one LED of
a row of sixteen. The front panel prints two scales over the row, 0..15*pi/8
for positive and -16*pi/8..-pi/8 for negative differences, and the sign
switch says which one applies.

Set and Reset are changeover push buttons read through set-reset latches
(two cross-coupled NAND gates in the original): a bouncing contact can only
re-assert the side that is already active, so each press gives one clean
edge. `switch_latch` is the clocked version; its inputs are the two contacts,
active low.

### Negative differences (`init_block`)

The dephaser only delays `fi`. A reading of `step*pi/8 - 2*pi` is obtained by
starting a frequency-sensitive detector as if one `fi` edge had already
arrived: while Reset is held, `init_block` clears the detector's flip-flops
and, when the sign switch selects negative differences, holds the preset of
the `fi` flip-flop (Q1). After release the first `fo` edge only cancels that
stored edge, and from then on Q1 is high from each `fi` edge to the next
`fo` edge. The PD 3/4 switch steers the preset to the rising-edge or the
both-edge detector. The original only states that an initialization block
does this; the preset-Q1 scheme is this design's.

## The six detectors

With `fi` lagging `fo` by a fraction x of a period (0 <= x < 1), and all
outputs averaged over a period:

| module | idea | mean output |
|---|---|---|
| `pd_xor` | XOR of the two signals | 2*min(x, 1-x): triangle, 0 at 0 and 2*pi, full at pi |
| `pd_edge_sr` | `fi` edge sets a flip-flop, `fo` edge clocks it back | 1-x: sawtooth over 2*pi |
| `pfd_single` | two flip-flops set by the rising edges, cleared together | Q2-Q1 = x, linear over +-2*pi, also frequency sensitive |
| `pfd_double` | `pfd_single` fed through XOR gates that flip the active edge after every clear | Q2-Q1 = 2x for x < 1/2, clipped beyond: every edge is compared |
| `pd_casual` | pump up while `fi` and `fo`, down while `fi` and not `fo`, idle while `fi` is 0 | up-down = 1/2 - 2*min(x, 1-x); output floats while `fi` is missing |
| `pd_counter` | edge counters for `fi` and `fo`, difference to a 4-bit DAC | staircase linear over 16 periods of difference |

**Edge-set flip-flop (`pd_edge_sr`).** In the original a pulse former turns
each rising `fi` edge into a short pulse on the flip-flop's asynchronous
preset, and `fo` clocks the flip-flop with its D input tied to its own
inverted output. A `fo` edge after a set therefore clears it; two `fo` edges
with no `fi` edge between them (possible when the frequencies differ) toggle
it back to 1. The model keeps this, and lets the preset win over a
simultaneous `fo` edge.

**Rising-edge PFD (`pfd_single`, core in `pfd_core`).** Whichever input has
an edge first sets its flip-flop; the other input's edge completes the pair
and both are cleared. Q1 (fi leads) and Q2 (fi lags) drive a charge pump:
Q1 connects the output node to the supply, Q2 to ground, neither leaves it
floating. Because a set flip-flop waits for the other input however long it
takes, a higher `fi` frequency keeps Q1 high most of the time: the detector
steers a loop in frequency as well as in phase. Its response is linear over
+-2*pi and wraps beyond that.

**Both-edge PFD (`pfd_double`).** A toggle flip-flop, clocked by the clear,
drives the control input of two XOR gates in front of the inputs. After a
pair of rising edges it switches the detector to falling edges, and back, so
the phase is compared twice per period. This doubles the gain and lets the
detector work with duty cycles other than 50 % (checked at 50 % and 20 %).
One property is inherited from the gate circuit on purpose: flipping the XOR
control while an input is low creates an edge on that XOR output. With 50 %
duty and lags below pi this never happens; with larger lags or short duty
cycles it shapes the response, as it does in hardware.
In this model the result is a usable range of about +-pi: lags of pi or
more read as the positive limit (Q2-Q1 = 14 of 16 clocks per period), and
with the negative preset applied, lags between 5*pi/4 and 2*pi read as
lag - 2*pi (2s - 32), with lags below that clipped at -14.

**Casual-input detector (`pd_casual`).** Meant for an input that may be
missing for a while. When `fi` is 0 it does not pump at all, so a filter
whose capacitor has no resistor across it holds the last correction.

**Counter detector (`pd_counter`).** Two separate 4-bit counters count the
rising edges of `fi` (A) and `fo` (B); being separate, they cannot lose a
pair of coincident edges as a single up/down counter could. An ALU forms
A - B modulo 16 (two's complement); inverting its top bit turns -8..+7 into
the offset code 0..15 for the DAC, so 0 difference sits at mid-scale
(2.5 V of 5 V) and the linear range spans 16 signal periods instead of one.
A load input sets B to 7 (binary 0111), which puts the start of a sweep at
one end of the range.

## From detector output to a voltage

`dac4_model` gives VREF * code / 16 (0 to 4.6875 V at 5 V).
`loop_filter_model` integrates the PD node with a forward-Euler step per
clock, using the tester's components by default:

* passive: 100 kOhm in series, 470 nF to ground, no resistor across the
  capacitor, so a floating pump output holds the voltage;
* active: inverting integrator around an op-amp whose other input is at
  2.5 V, 100 kOhm input resistor, 100 kOhm in parallel with 470 nF as
  feedback, output clamped to 0..12 V. It inverts: more pump-up gives a
  lower output.

When both pump switches are on, the node is taken as VDD/2. Two-output
detectors (rising-edge, both-edge and casual) need the charge pump and a
proper integrator to show their true response; single-output ones (XOR,
edge-set flip-flop, counter through the DAC) work with either filter.

## Timing of this clocked rendering

The original circuits are asynchronous gates and flip-flops clocked by the
signals themselves. Here every detector is synchronous to one clock `clk`:
`fi` and `fo` are sampled, a 0-to-1 change between two samples is an edge,
and the flip-flops change on `clk`. Phase resolution is therefore one clock;
`clk` must be much faster than the signals, and in the tester it is at least
f_osc (16 samples per period). Points to know:

* Latency is one clock from an input edge to the detector outputs, the same
  for `fi` and `fo`, so it cancels in the phase reading.
* In the PFDs the second edge of a pair clears both flip-flops on the same
  clock edge, so Q1 and Q2 are never high together (the gate circuit has a
  glitch of a few gate delays there). `reset_n` is a one-clock low pulse
  after each clear.
* In the both-edge PFD the toggle happens on the clearing clock edge. An
  XOR-output edge is then looked for in two steps, first the toggle and then
  the new input sample, which is the order in which the gate circuit sees
  them. Without this, an input edge one clock after a clear would be lost.
* Coincident edges (lag 0) set and clear in the same clock: the PFDs read
  0. As a consequence the tester's -2*pi setting (negative sign, step 0)
  reads 0 rather than -2*pi.
* `osc_en` marks the clock cycles that carry an f_osc edge; tie it to 1 to
  run the dephaser at the clock rate.

## Departures from the original hardware

* All six detectors are built side by side on the same signals; `pd_sel`
  (an enum in `pd_pkg`) chooses which one drives the test outputs, where the
  bench uses a plug-in module per detector. Q1/Q2 read 0 for the
  single-output detectors.
* The RC oscillator, the external-generator input and the power supply are
  not modelled: `clk` and `osc_en` stand for f_osc.
* The three XOR gates that match the delay of `fo` to that of `fi` are not
  needed in a clocked design and are absent.
* The counter detector's difference is two's complement, as the ALU's
  subtract mode with carry-in 1 gives; its B counter is loaded on Reset.
* The Set counter and the button latches have a power-on reset `por_n`.
* In the tester the PFDs start from 0 (the initialization block sets their
  state); stand-alone, `pfd_double` defaults to starting from 1.
* The filter and DAC are behavioural, with ideal components.

## Files

`rtl/`:

* `pd_pkg.sv`: `pump_t` (up/dn drive), `pd_sel_e`, tester constants
* `pd_tester_top.sv`: the tester with all detectors (top)
* `dephaser.sv`, `phase_setting.sv`, `switch_latch.sv`, `init_block.sv`: tester
* `pd_xor.sv`, `pd_edge_sr.sv`, `pfd_core.sv`, `pfd_single.sv`,
  `pfd_double.sv`, `pd_casual.sv`, `pd_counter.sv`: detectors
* `dac4_model.sv`, `loop_filter_model.sv`: behavioural analog models

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus
`tb_phase_sweep.sv`, which runs all detectors through a frequency-offset
sweep (`fo` 80 and `fi` 82 clocks per period, 50 % duty, the 1.000 ms /
1.025 ms pair at 12.5 us per clock) and checks each response window by
window, then checks the casual detector and the passive filter with random
`fi` dropouts. `tb_pd_tester_top.sv` operates the tester at its default
parameters: all 16 steps, every detector, negative settings, the step wrap
and both filters. Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/pd_pkg.sv tb/tb_pd_tester_top.sv --top-module tb_pd_tester_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another. The top has two parameters:
`T_CLK`, the clock period in seconds used by the filter model (default
62.5 us, which makes f_osc 16 kHz and `fo` 1 kHz), and `VDD` (5 V).

## How far to trust it

Each testbench compares outputs with values worked out by hand from the
descriptions above (per-period means for each lag, exact counter
differences, closed-form filter charging), not with a copy of the logic, and
each was shown to fail on a deliberately broken copy of its module. The
responses match the expected triangle, sawtooth and linear shapes at every
step of the tester and along the frequency-offset sweep. What is not
verified against hardware: the both-edge PFD limits quoted above for lags
beyond pi or with the preset applied are what this model produces and are
checked as such, but they depend on the XOR-toggle edges described above;
the analog models are ideal.
