# Gated-clock finite-state machine with a locally-Moore state graph

A controller that spends most of its time waiting burns power on every clock
edge, even though its state and outputs do not change. Its flip-flops and clock
net switch, and input changes ripple through its logic. This design stops the
controller's clock on exactly those edges. A small combinational *activation
function* f_a sees that the machine is about to take an idle self-loop. A latch
and an AND gate then remove that edge from the local clock.

The RTL implements this scheme for a small example controller: a three-state
Mealy machine with two inputs and two outputs. It follows the method of
"Automatic Synthesis of Low-Power Gated-Clock Finite-State Machines". The state
graph, state codes and activation function are the published ones. The reset,
the observation ports and the parameterisation are this design's own.

## Why a Mealy machine has to be split first

The clock may be stopped only if the coming edge would change neither the
state nor the outputs. f_a sees only the inputs and the next-state lines, not
the outputs. In a Mealy machine the output belongs to the edge, not to the
state. "Next state is S2 and the input keeps it in S2" therefore does not mean
"output unchanged": the machine may have entered S2 on an edge with a
different output.

The fix is to split states. A *Moore-state* is a state whose incoming edges
all carry the same output. Suppose the machine is about to take a self-loop of
a Moore-state. Then the output before the edge and the output after it are the
same, and the edge can be dropped. A Mealy-state with self-loops is split in
two:

* `Sa` keeps every original incoming edge.
* `Sb` is entered only through the chosen self-loop class. It repeats that
  class as its own self-loop and copies all outgoing edges of `Sa`.

`Sb` is a Moore-state by construction. The chosen class is the
output-compatible set of self-loops with the highest probability. States
without self-loops are not touched. At most the number of states doubles. A
full Mealy-to-Moore conversion costs more.

The example machine. Inputs are `{in1,in2}`, outputs `{out1,out2}`, and `-`
marks an unspecified bit:

| original | edges                                                    |
|----------|----------------------------------------------------------|
| S0       | -1/-0 → S0, 10/00 → S0, 00/01 → S1                        |
| S1       | -1/01 → S1, 10/01 → S1, 00/10 → S2                        |
| S2       | 10/10 → S2, 01/-1 → S2, 00/00 → S0, 11/11 → S1            |

After splitting, the machine has five states. The code is `{v1,v2,v3}`:

| state | code | edges                                               | Moore? |
|-------|------|-----------------------------------------------------|--------|
| LM0   | 000  | -1/00 → LM0, 10/00 → LM0, 00/01 → LM1a               | yes, output 00 |
| LM1a  | 001  | -1/01 → LM1b, 10/01 → LM1b, 00/10 → LM2a              | no  |
| LM1b  | 011  | -1/01 → LM1b, 10/01 → LM1b, 00/10 → LM2a              | yes, output 01 |
| LM2a  | 010  | 01/-1 → LM2a, 10/10 → LM2b, 00/00 → LM0, 11/11 → LM1a | no  |
| LM2b  | 110  | 10/10 → LM2b, 01/-1 → LM2a, 00/00 → LM0, 11/11 → LM1a | yes, output 10 |

S0 needs no split: once its don't-care output bit is fixed to 0, all its
incoming edges carry 00. S2 has two self-loop classes whose outputs conflict
(10 and -1). The 10 class was chosen for LM2b. The 01 loop stays on LM2a, and
the clock keeps running on it.

## The activation function

f_a is the OR of all self-loops of Moore-states, written over the *primary
inputs* (before their register) and the *next-state lines*. Those are the values
the registers would load at the coming edge:

    f_a = in2·LM0 + in1·in2'·LM0 + in2·LM1b + in1·in2'·LM1b + in1·in2'·LM2b

Here `LMx` stands for the product of state variables of its code.

Why this is safe: say f_a = 1 and the edge is dropped. The registers keep their
old input and state. These already produce the same next state. Because that
state is a Moore-state, they also produce the same output as the self-loop
edge. The machine is therefore indistinguishable from one that was clocked.

A consequence that surprises people: while the clock is stopped, the state
register may still hold the *predecessor*. For example, it holds LM1a while
the machine idles in LM1b. The machine's real state is on the next-state lines
(`st_next_o`).

Any subset of the cubes, called a subfunction F_a, is also safe. It just stops
the clock less often, and it costs less logic, which matters when f_a is
large. `activation_function` therefore takes its cover as a parameter: `N_CUBES`
cubes, each a care mask and a value over `{in1,in2,v1,v2,v3}`. The top passes
`FA_N`, `FA_CARE` and `FA_VAL` through. The default is the complete f_a above.
Choosing a good F_a is a synthesis-time task. The method finds the
fewest-literal cover that still reaches a given fraction α of f_a's probability,
using a greedy start and then branch-and-bound. No such hardware is built here.

## The clock gate and its timing

    GCLK = CLK · ¬L(f_a),   L transparent while CLK is low

f_a must settle while CLK is low, before the rising edge. While CLK is high,
the latch is closed. A glitch on f_a then cannot cut a GCLK pulse short or
create an extra one. While CLK is low, the AND gate blocks glitches anyway.
Without the latch (a plain AND with ¬f_a), a glitch during the high phase
splits the pulse into two clock edges; `tb_clock_gate` checks this case.

The timing budget is as follows. f_a depends on the next-state logic, which
sits behind the registers. So the path register → next-state logic → f_a →
latch → AND gate must fit in one cycle, less the delay of the latch and the
gate and the flip-flop setup. The gate also adds skew to the local clock. Both
are constraints for static timing analysis and are not checked in RTL
simulation.

The latch in `clock_gate` is intended. It is the only one in the design. A
reset forces it to 0, so the clock runs during and right after reset.

## Modules

| file | role |
|------|------|
| `rtl/lm_fsm_pkg.sv` | widths, state enum with the codes above, reset state, the complete f_a cover |
| `rtl/fsm_registers.sv` | flip-flops on the inputs and on the state, clocked by GCLK, asynchronous active-low reset |
| `rtl/lm_fsm_logic.sv` | next-state and output logic of the split machine (the second table) |
| `rtl/activation_function.sv` | parameterised sum of cubes over {inputs, next state} |
| `rtl/clock_gate.sv` | latch + AND producing GCLK |
| `rtl/gated_clock_fsm.sv` | top: wires the four together; asserts that the clock stops only when the next state is LM0, LM1b or LM2b |

Top ports: `clk_i` (global clock), `rst_ni`, `in_i[1:0]`, `out_o[1:0]`.
There are also observation outputs: `st_o` (register), `st_next_o`, `fa_o`,
`clk_stop_o` (1 = the coming edge is dropped) and `gclk_o`. Outputs change one
edge after the input that caused them, because the inputs are registered.

## Design choices not fixed by the method

* Reset is asynchronous, so it works with the local clock stopped. The state
  resets to LM0. The input register resets to 00, so the first edge after
  reset takes the 00 edge out of LM0. Use `RST_IN` of `fsm_registers` for
  another value.
* The unspecified output bit on the `01/-1` edges is driven as 0. Unused state
  codes (100, 101, 111) behave like LM0.
* The published flow also feeds F_a to the logic optimiser as an extra
  don't-care set. Inputs that f_a stops are never clocked in, so the logic
  need not respond to them. This RTL writes the next-state logic fully
  specified and leaves that optimisation to synthesis.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

* `tb_lm_fsm_logic`: every state and input. It checks the exact split-machine
  next state and equivalence with the original Mealy machine (on specified
  output bits). It also checks that each Moore-state is entered with a single
  output.
* `tb_activation_function`: all 32 input/next-state combinations. The expected
  value comes from the transition table, not from the cube list. It also
  checks a reduced 2-cube cover.
* `tb_fsm_registers`: load, hold and asynchronous reset.
* `tb_clock_gate`: drives timed waveforms: enable, stop, glitches in both clock
  phases, f_a rising during the high phase, and reset.
* `tb_gated_clock_fsm`: the full design at default parameters over 60,000
  cycles, with uniform, biased (P(in1)=0.7) and bursty "reactive" inputs. Every
  cycle it checks against a model of the original Mealy machine with
  registered inputs. It also checks that the registers hold on each dropped
  edge, and the one-edge output latency. It counts each mechanism: stops in
  LM0, LM1b and LM2b, entries into the split states, LM2a self-loops with the
  clock running, and a reset during operation.

  Measured with uniform inputs: 48.5% of edges are dropped. The expected
  fraction follows from the stationary distribution. The original states have
  probabilities S0 1/4, S1 1/2, S2 1/4. The split states have LM1a 1/8,
  LM1b 3/8, LM2a 3/16, LM2b 1/16. So the expected fraction is
  1/4·3/4 + 3/8·3/4 + 1/16·1/4 = 31/64 ≈ 0.484, and the test allows ±0.02.
  With P(in1)=0.7 and P(in2)=0.5, the same calculation gives 0.634; 0.628
  was measured.
* `tb_gated_clock_fsm_reduced`: the same checks with F_a = the two LM0 cubes
  only. The expected stop fraction is 1/4·3/4 = 3/16 with uniform inputs and
  0.159 with the biased ones, and the test requires
  that the clock never stops in LM1b or LM2b.

Run a testbench with plain Verilator, from the directory holding `rtl/` and
`tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb \
        rtl/lm_fsm_pkg.sv tb/mealy_ref_pkg.sv tb/tb_gated_clock_fsm.sv \
        --top-module tb_gated_clock_fsm
    ./obj_dir/Vtb_gated_clock_fsm

Replace the testbench name for the others. Each runs in a few seconds.

## What is not here, and how far to trust it

* Power is not modelled. The published savings were measured at transistor
  level on mapped netlists. The RTL only reproduces the mechanism, not those
  numbers. For this example, the published measurement gives 42 µW for the gated
  design against 52 µW for the ungated Mealy machine, although the gated
  design is larger.
* The other benchmark machines evaluated with the method are not included.
  Their state tables are not part of this design. `lm_fsm_logic` is written for
  the example machine. The register bank, activation function and clock gate
  are parameterised and can be reused.
* To gate another machine:
  1. Split its Mealy-states with self-loops as described above.
  2. Write its next-state/output logic in place of `lm_fsm_logic`.
  3. Give `activation_function` the cubes of its Moore-state self-loops, or a
     subset of them.
  4. Extend the assertion in `gated_clock_fsm` to its Moore-states.
* The clock gate is modelled at RTL. In silicon it should be a
  library clock-gating cell or a hand-placed latch and AND gate, with skew
  controlled on GCLK.
