# Multi-step pulse-width modulator for an inductive gate-driver isolator

A gate driver for GaN or SiC power switches has to send its on/off command
across an isolation barrier. With an on-off-keyed (OOK) transformer link the
command gates a 100 MHz carrier: while the switch is to be on, the carrier is
sent across the transformer, and while it is off, nothing is sent. The
receiver only needs the edges of what arrives. But every microsecond that the
primary is driven, the magnetising current ramps up (Δi = V·Δt / L), so a
carrier with 5 ns half-periods wastes most of its drive current.

This modulator keeps the carrier's timing but shortens what is actually
driven. Every rising edge of the carrier starts a train of four narrow pulses
of equal width *w*. The pulses go alternately to the two primary terminals.
A closed loop sets *w* in sixteen steps. It measures the peak voltage the
pulses produce on the transformer node and keeps the pulses only as wide as
that peak needs to reach a threshold `V_REF`.

```
          +-----------+ V_MOD +------------------+ PUL[0],PUL[2] -> OR -> V_MOD(H) --> primary +
 V_PWM -->| gated ring|------>| 4-stage pulse gen|
          | oscillator|   |   | (delay line+mux) | PUL[1],PUL[3] -> OR -> V_MOD(L) --> primary -
          +-----------+   |   +------------------+
                          |        ^ V_PWD[3:0]        | PUL[3:2]          V_MOD(H) node voltage
                          |        |                   v                        |
                          +----> feedback control: /8 dividers, edge detectors, peak detector,
                                 clocked comparator (V_REF), direction flip-flop, 4-bit up/down counter
```

## Source files

| file | what it is |
|---|---|
| `rtl/mpwm_pkg.sv` | constants: 4-bit code, 16 taps, 4 stages, divide-by-8, 150 ps step, 1.025 ns minimum width, 10 ns carrier period; `pulse_width_ps()` |
| `rtl/mpwm_top.sv` | the transmitter: oscillator, pulse generator, H/L merge, feedback |
| `rtl/mpwm_pulse_gen.sv` | four cascaded pulse stages |
| `rtl/mpwm_pulse_stage.sv` | one stage: 16-buffer delay line, 16:1 mux, inverter and AND |
| `rtl/mpwm_feedback.sv` | the closed loop that sets the code |
| `rtl/mpwm_divider.sv` | divide-by-8 |
| `rtl/mpwm_edge_detector.sv` | rising- or falling-edge pulse detector |
| `rtl/mpwm_updown_counter.sv` | 4-bit saturating up/down counter |
| `rtl/mpwm_dir_dff.sv` | direction flip-flop |
| `rtl/mpwm_delay_cell.sv` | behavioural buffer delay |
| `rtl/mpwm_vco_ook.sv` | behavioural gated ring oscillator |
| `rtl/mpwm_peak_detector.sv` | behavioural diode peak detector (real-valued) |
| `rtl/mpwm_comparator.sv` | behavioural clocked comparator (real-valued) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mpwm_workload_fixed_code` |
| `tb/mpwm_tb_channel.sv` | first-order model of the transformer node, used by `tb_mpwm_top` |

This is a timing circuit, not a clocked datapath. The pulse widths come from
real buffer delays, so the delay line and the analogue parts are behavioural
models with `#` delays and `real` signals. The RTL is written for event-driven
simulation at 1 ps resolution (`timescale 1ps/1ps` in every file). Synthesis
turns the delay cells into plain buffers. Silicon would need the delay line
built from characterised cells, and the oscillator, peak detector and
comparator built as analogue circuits.

## The pulse train

Each pulse stage (`mpwm_pulse_stage`) is a rising-edge detector whose delay
can be adjusted. Its trigger runs down a chain of 16 buffers (taps `D[0]` to
`D[15]`, 150 ps apart). The 16:1 mux picks tap `D[V_PWD]`. After the fixed
delay of the mux and gates, that tap becomes `V_REP`. The stage outputs

    PUL = trig AND NOT V_REP

This pulse rises with the trigger and falls when `V_REP` rises. Its width is

    w = 1025 ps + 150 ps * V_PWD        (1.025 ns at code 0, 3.275 ns at code 15)

The design description gives both numbers: a minimum of about 1.025 ns and
about 150 ps per step. In the model, 875 ps of fixed path delay plus one tap
makes up the minimum width. That split is a modelling choice.

`V_REP` of stage *x* triggers stage *x+1*, and stage 0 is triggered by the
carrier `V_MOD`. After each carrier rising edge, `PUL[x]` therefore covers
`[x·w, (x+1)·w)`. The four pulses follow each other with no gap or overlap.
Each stage sees a copy of `V_MOD` delayed by `x·w`, so every pulse is
complete as long as `w` is shorter than the carrier's 5 ns high time. That
holds for all 16 codes. Above code 9, the 4·w train is longer than the 10 ns
period, and the `PUL[3]` of one cycle overlaps the `PUL[0]` of the next. The
two go to opposite terminals.

`V_MOD(H) = PUL[0] | PUL[2]` and `V_MOD(L) = PUL[1] | PUL[3]`. The primary
therefore sees +, −, +, − pulses, each *w* wide, and every `V_MOD(L)` pulse
starts exactly when a `V_MOD(H)` pulse ends.

## The control loop and its timing

This is the subtle part. The loop has no system clock. Every clock in it is
made from the carrier or from the pulses:

* `V_FALL`: the carrier divided by 8, then a falling-edge detector. It
  clocks the up/down counter.
* `V_CLK`: `PUL[2] | PUL[3]` (one merged pulse per carrier cycle) divided
  by 8. It strobes the comparator on its rising edge. A falling-edge
  detector on `V_CLK` discharges the peak detector. A rising-edge detector
  on `V_CLK` makes `V_CK_UD`, which loads the comparator decision into the
  direction flip-flop (`V_UP/DN`).

One reset clears both dividers together. Counting carrier cycles from reset
(cycle 1 is the first), each group of eight runs as follows:

| carrier cycle (mod 8) | event |
|---|---|
| 0 (i.e. 8, 16, …), at the edge + 100 ps | `V_FALL`: the counter steps using `V_UP/DN` |
| 0, at 2·w (start of `PUL[2]`) | `V_CLK` falls; 100 ps later `V_FB` is discharged for 200 ps |
| 1 – 4 | pulses are sent with the new code; `V_FB` holds their peak |
| 4, at 2·w (start of `PUL[2]`) | `V_CLK` rises: the comparator decides `V_REF > V_FB` within 50 ps |
| 4, at 2·w + 100 ps | `V_CK_UD`: `V_UP/DN` is loaded, half a group before the next `V_FALL` |

So each decision uses only pulses sent with the current code. The code moves
by at most one step every eight carrier cycles, which is 80 ns at 100 MHz. It
goes down when the held peak `V_FB` (node peak minus the diode drop) is above
`V_REF` and up when it is below. With a steady load, the code settles into a
dither between the two codes on either side of the threshold. When the PWM
command is low, the carrier stops, so the dividers, and with them the loop,
freeze until the next burst. With the 1 MHz, 50 % PWM used to evaluate the
design, each 500 ns on-time allows about six steps.

The counter saturates at 0 and at 15. A loop that pushes past either end
therefore holds there instead of jumping to the opposite width. Reset puts the
code at 0, the narrowest pulse, and the direction at "down".

The code changes 100 ps after a carrier rising edge, before the first tap of
any chain has risen. Switching the mux between adjacent taps then cannot
glitch `PUL[0]`. For codes above 9, stage 3 is still finishing the previous
cycle's train at that moment. The last pulse of that train can then end one
step early or late. The code change is what causes this, not a glitch.

## Analogue parts, as modelled

* **Oscillator** (`mpwm_vco_ook`): one delayed inverting stage, gated by
  `V_PWM`, with `V_MOD = V_PWM & ring`. It gives 10 ns, 50 % duty cycles,
  starting with a rising edge when `V_PWM` rises. When `V_PWM` falls, the
  output drops at once. The feedback is a deliberate combinational loop. The
  bias input that tunes the frequency is not modelled.
* **Peak detector** (`mpwm_peak_detector`): `V_FB` = the highest node
  voltage minus `V_F` (0.3 V, assumed) since the last clear. The hold is
  ideal and has no leakage. It is written as a latch on purpose, because the
  hold capacitor is a storage element.
* **Comparator** (`mpwm_comparator`): `V_REF` on the non-inverting input
  and `V_FB` on the inverting one. It decides on the rising edge of `V_CLK`,
  after 50 ps.
* **Edge detectors**: 100 ps propagation delay and 200 ps pulse. They are
  built from delay cells and a gate, like the pulse stages. The propagation
  delay is what lets the comparator settle before `V_CK_UD` samples it.

The output buffers, the 105 nH transformer and the receiver's main driver are
outside the RTL. `mpwm_top` takes the analogue node voltage back in on its
`real` input `v_node_h`, with the threshold on `v_ref`.

## Where this departs from, or adds to, the original description

* The description quotes 2.5 ns as the width at code 1011₂. Its own rule of
  1.025 ns + 150 ps per step gives 2.675 ns. The RTL follows the rule.
* These details are this design's own choices; the description does not
  give them:
  * how the pulses are merged (OR) and how `PUL[2]`/`PUL[3]` are combined;
  * counter saturation and all reset values;
  * the 50 % duty and the power-of-two counter structure of the dividers;
  * all edge-detector, comparator and mux-path delays;
  * the 0.3 V diode drop;
  * the comparator deciding on the rising edge of `V_CLK`.
* The supply currents reported for the design (about 5.6 mA at code 0,
  11.5 mA at code 11, against 20.9 mA for a conventional inverted-PWM drive)
  are analogue results. This RTL does not reproduce them.
* The conventional inverted-PWM modulator, which the design is compared
  against, is not included.
* The description does not say what happens above code 9, where the
  four-pulse train is longer than a carrier period. Here the last pulse of
  one train simply overlaps the first pulse of the next, on the opposite
  terminal.
* The loop settling points in the testbenches come from an RC stand-in for
  the transformer node, not from the 105 nH transformer with its parasitics.
  They show how the loop behaves, not where the real circuit settles.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself,
and each one has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mpwm_pkg.sv tb/tb_mpwm_top.sv --top-module tb_mpwm_top
./obj_dir/Vtb_mpwm_top
```

Replace `tb_mpwm_top` with any other `tb_mpwm_<block>` to run that block's
test.

`tb_mpwm_top` runs the whole transmitter at its default parameters, with
the PWM at 1 MHz and 50 % duty and a first-order RC model of the transformer
node (2 ns time constant, 1.8 V). It steps `V_REF` through five values:
* 0.9 V: the loop settles near the predicted code (3 or 4 on this node
  model);
* 1.6 V: the code climbs to 15 and saturates;
* 1.2 V: the loop settles between codes 11 and 12;
* 0.9 V: the loop settles again, this time from above;
* 0.2 V: the code falls to 0 and saturates.

Throughout, it checks four things:
* every output pulse is 1025 + 150·code ps wide;
* the H/L pulses alternate with no gap;
* there are two pulses per carrier cycle on each side;
* the code moves by single steps, only every eighth carrier cycle, and never
  while the PWM command is low.

It also counts up steps, down steps, both saturations, settling and the
freeze, and fails if any of them never happens. The run covers 23 µs of
circuit time and takes a few seconds.

The testbench predicts each settling code from the node model in closed
form, as the periodic steady state of the RC charge and discharge. At wide
codes the node has little time to discharge between cycles, so the highest
peak comes from `PUL[0]` rather than `PUL[2]`. The prediction accounts for
this.

`tb_mpwm_workload_fixed_code` holds the code fixed at 0000₂ and at 1011₂,
the two settings the original evaluation reports supply currents for. It
runs the gated oscillator and pulse generator for four 1 MHz PWM periods
at each code. It checks that each 500 ns burst gives 100 pulses per
terminal and `100·w` of drive time per terminal: 102.5 ns at code 0 and
267.5 ns at code 11.

To change the step or the minimum width, edit `TAP_DELAY_PS` and
`MIN_WIDTH_PS` in `mpwm_pkg`, or override `TAP_PS` and `PATH_PS` on
`mpwm_top`. The testbenches check against the default numbers.
