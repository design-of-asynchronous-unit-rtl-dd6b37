# Asynchronous unit delays

An asynchronous unit delay (AUD) is the asynchronous counterpart of a D
flip-flop. It is an n-input, n-output circuit whose outputs always show the
input vector as it was *before the last input change*:

    z_i(t) = x_i(t - dt),   where t - dt is the moment the inputs last changed

There is no clock. The circuit's own notion of a "step" is an input change.
Chained into an asynchronous shift register, AUDs remember the last k input
values. An AUD is then the only memory element that an asynchronous state
machine built from such registers needs.

| time             | t0 | t1 | t2 | t3 | t4 |
|------------------|----|----|----|----|----|
| x1 x2            | 00 | 01 | 11 | 10 | 00 |
| z1 z2            | ?  | 00 | 01 | 11 | 10 |

This repository holds synthesizable SystemVerilog for the two ways of
building an AUD that the original 2 x 2 and 3 x 3 designs use, and for
shift registers made from each:

* **Fundamental mode.** A classic Huffman asynchronous state machine: gates
  with feedback, which settles after every input change. Inputs may change
  only one bit at a time, and only after the circuit has settled.
* **Pulse control.** A change detector turns every input change into a short
  internal "change pulse". That pulse clocks a tiny shift register. Any
  input pattern is allowed, including several bits changing at once. Every
  input-to-output path has the same delay.

## How an asynchronous circuit becomes synthesizable RTL here

The original circuits are gate networks whose memory is the propagation
delay in their feedback paths and delay lines. Written literally, that would
be combinational loops, which neither simulators nor synthesis tools can
handle. The RTL instead keeps the original logic equations and tables
exactly as they are. It replaces every *delay* with a register on a sampling
clock `clk`, which is assumed to be much faster than the inputs change:

* a state variable y fed back through a delay becomes `y <= Y(x, y)` on each
  clock edge. This is the Huffman model with a unit delay in each feedback
  branch.
* a delay line of a few gates becomes a register chain (`delay_line`).
* the S-R flip-flop of a shift circuit becomes a register loaded when the
  change pulse is high (`shift_circuit`).
* a one-shot or differentiator becomes a pulse a whole number of clock
  periods long (`monostable`, `change_detector`).

All times are therefore counted in clock periods. Read a clock period as
"one gate or feedback delay", not as a system clock. The inputs are
asynchronous in the original, but here they must be synchronous to `clk`.
Put a synchronizer in front of the top if they are not. `rst_n` is a
synchronous, active-low reset. It clears all state and treats the inputs as
having been 0 before reset. The original leaves the output before the first
change undefined.

A consequence worth knowing: the rules that the original circuits need for
correct operation survive as *timing rules in clock periods* (next
sections). The RTL does not enforce them; the testbenches respect them.

## Fundamental-mode delays

### 2 x 2 AUD (`aud2_fm`)

The reduced flow table has four states. It splits into two independent
one-bit machines, because it has two substitution-property partitions whose
product is zero. This gives the two state variables and equations:

    Y1 = x1 x2  + y1 (x1 + x2)      y1 is set by input 11, cleared by 00
    Y2 = x1 x2' + y2 (x1 + x2')     y2 is set by input 10, cleared by 01
    z1 = y1 y2  + x1' (y1 + y2)
    z2 = y1 y2' + x2' (y1 + y2')

These are implemented as written. In gates this is 16 NANDs and one
inverter. All single-bit transitions settle in one step. In this model, z is
final one clock period after an input change. During that period it shows
either its old or its final value, never a third one. This is why such
stages can be cascaded. `stable` reports that the next state equals the
present one.

**Rule:** change one input bit at a time, at least one period apart (two
periods if you wait for `stable`).

### 3 x 3 AUD (`aud3_fm`)

The reduced flow table has 12 states. Four two-block partitions give the
state code, one bit each:

    pi1 = {1,3,4,5,10,12 | 2,6,7,8,9,11}
    pi2 = {1,2,4,5,6,8   | 3,7,9,10,11,12}
    pi3 = {1,2,3,5,11,12 | 4,6,7,8,9,10}
    pi4 = {1,2,3,4,6,7   | 5,8,9,10,11,12}

The next-state and output logic is written as the flow table itself, a case
statement over (state code, input). Each entry is commented with its
flow-table state. Minimized sum-of-products equations are not used. Two
choices belong to this RTL rather than to the original:

* A transient total state outputs the value of the stable state it leads
  to, so z is correct in the same period as the input change.
* Unspecified entries, which only two simultaneous input changes can reach,
  hold the state and output 000.

Sixteen transitions change two state variables at once. In a gate circuit
these are races. Here all state bits update together.

The original rejects this design because its outputs depend on each other
and its path delays are very unequal. It is included because it is the
fundamental-mode 3-input case.

## Pulse-controlled delays

All of these share three parts:

* **`change_detector`** produces the change pulse C. C is high for
  `PULSE_W` periods whenever any input changes, including in the same period
  as the change. Changes on several inputs at once merge into one pulse.
  There are two kinds:
  * `DET_DELAY`: each input is ANDed with a delayed, complemented copy of
    itself, once per rail (x and x'). This is the inverter-chain detector.
    It also stands in for the RC-differentiator detector, which in a clocked
    model is the same thing: a fixed-width pulse at every edge.
  * `DET_MONOSTABLE`: two one-shots per input (`monostable`), triggered by
    the positive-going edge of x and of x'.
* **`shift_circuit`** is a store that loads its input while C is high and
  holds otherwise: `Y = d C + y C'`. It has one clock period of delay.
* an OR of all inputs' pulses drives every shift circuit.

### Circuit 1: delayed inputs, one shift circuit (`aud_pc1`)

Each input passes through a delay of `DELAY` periods (default 4, from a
four-gate delay chain). The shift circuit loads the *delayed* input during
the pulse, which still holds the value from before the change.

**Rule:** the input delay must outlast the detector delay plus the pulse,
so `DELAY >= PULSE_W`. This is checked at elaboration. Successive changes
must be at least `DELAY` periods apart, because the delayed line has to
catch up first. The output changes exactly one period after the input, for
every input and direction.

### Circuits 2 and 3: two shift circuits (`aud_pc2`)

There is no delay line. Shift circuit 1 stores the present input, and shift
circuit 2 drives the output. Both load on the same pulse. The pulse is
shorter than a shift circuit's delay, so shift circuit 2 takes what shift
circuit 1 held *before* the pulse, which is the previous input. The result
is a two-stage shift register clocked by a pulse derived from its own
input. In state-assignment terms: `Y1 = x1, Y2 = x2, Y3 = y1, Y4 = y2,
z1 = y3, z2 = y4`. This is the best of the original pulse-controlled
schemes. It uses identical building blocks and has the same delay on every
path.

`KIND = DET_MONOSTABLE` (default) is circuit 2. `KIND = DET_DELAY` is
circuit 3, which differs only in its detector. The pulse width is fixed at
one period, because a wider pulse would let the new input run through both
shift circuits. `N` sets the number of inputs. The cost per extra input is
one detector pair and two shift circuits.

**Rule:** none on which bits change. A new change may come in the very next
period.

An assertion in `aud_pc1` and `aud_pc2` checks one of the original
requirements: the output changes only when a change pulse was present.

## Asynchronous shift registers

* `asr_fm`: K stages of `aud2_fm`. Stage k shows the input from k changes
  ago. Each stage can add a period of settling, so inputs must change no
  faster than once every K + 1 periods. In gate circuits, the uneven delays
  of the fundamental-mode stages also shrink the allowed spacing
  stage by stage. The clocked model does not reproduce that effect.
* `asr_pc`: K stages of `aud_pc2`. A change ripples down one stage per
  period. The allowed input rate does not depend on K.

## The top (`aud_top`)

One 2-bit input `x2` drives every 2 x 2 realization at once:

* `aud2_fm`
* circuits 1, 2 and 3
* a two-stage register of each kind

This mirrors a bench comparison in which all circuits received the same
input sequence. A separate 3-bit input `x3` drives `aud3_fm` and a 3 x 3
circuit 2. Each realization has its own outputs, and the change pulses are
brought out for observation.

| parameter   | default | meaning                                        |
|-------------|---------|------------------------------------------------|
| `ASR_K`     | 2       | stages per shift register (two were measured)  |
| `PC1_DELAY` | 4       | circuit 1 input delay, periods                 |
| `PC1_PULSE` | 1       | circuit 1 change-pulse width, periods          |

If one input stream has to satisfy every part at once, it must obey the
strictest rule. That means single-bit changes spaced at least
max(`ASR_K` + 1, `PC1_DELAY`) periods apart. Only the outputs of circuits 2
and 3 are defined under faster or multi-bit changes.

## Simulating

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` and has a watchdog. With
Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl +libext+.sv \
        rtl/aud_pkg.sv tb/tb_aud_top.sv --top-module tb_aud_top
    ./obj_dir/Vtb_aud_top

`tb_aud_top` runs the whole design at its default parameters in three
phases:

1. Slow single-bit changes: every output is checked, including the exact
   one-period delay of the pulse circuits and the k-period delay of
   register stage k.
2. Fast multi-bit changes: only circuits 2 and 3 are checked.
3. Slow changes again.

It also counts the change pulses of each circuit, simultaneous changes,
back-to-back changes and propagation through both registers, and fails if
any of them never occurred. The unit testbenches compare against models
written from the AUD definition (the previous input vector). They do not
use the equations.

## Departures from the original and limits

* Delays are clock periods, not nanoseconds. The measured response,
  resolution and transmission times and gate counts of the original
  hardware have no counterpart here.
* Analog parts are modelled by their digital effect. The RC differentiators
  of circuits 1 and 3 become the `DET_DELAY` detector, and the one-shots a
  counter. The tunnel-diode detector is not modelled.
* The 3 x 3 AUD is implemented from its flow table and partition-based
  state code, not from closed-form equations.
* Reset and the initial output are this design's choice.
* Not included:
  * the single-feedback-loop 2 x 2 variant and delayed-input models, which
    the original only compares against;
  * a separate 2-unit delay block, whose function is the same as a
    two-stage register;
  * the three-variable assignment of the pulse-mode flow table.
