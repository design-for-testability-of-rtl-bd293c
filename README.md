# Testable gated-clock FSMs

A Moore FSM that sits in a self-loop does no useful work: its state and output
stay the same, yet every clock edge still burns power in the clock net, the
flip-flops and the logic. Clock gating stops the clock in those cycles. A small
*activation function* `fa`, computed from the inputs and the state, detects the
self-loops chosen for gating. A latch-plus-AND gate then suppresses the next
clock edge of the state register.

The catch is testability. The gating logic is functionally redundant: if it
breaks in the "never gate" direction, the machine still behaves correctly, so no
test applied at the primary inputs and outputs can detect the fault. Worse, the
gating also removes input/state combinations that the FSM logic would otherwise
see. A stuck-at fault that could only be provoked by such a combination becomes
untestable too, even in logic that was fully testable before gating.

This RTL implements two design-for-test fixes and the test model that goes with
them. It does so on a two-state example machine, with a generic clocking shell
that can be reused for other FSMs:

* **Increased observability.** An extra output `OB` shows the (latched)
  activation function, which makes a stuck-at-0 on `fa` observable. Logic that
  gating has made redundant is then removed, which leaves a smaller circuit
  that is fully testable (`ex_gated_fsm_obs`).
* **Increased controllability and observability.** `OB`, plus a test input
  `CT` that disables the gating. With `CT = 1` the FSM logic sees every
  input/state combination of the ungated machine, so the FSM logic can stay as
  it was and its existing test set still applies (`ex_gated_fsm_ctob`).
* **Multiplexed model.** A single-clock circuit that behaves exactly like the
  gated machine. Each flip-flop gets a hold multiplexer controlled by `fa`, so
  ordinary synchronous test generators and redundancy-removal tools can work on
  it (`ex_mux_model`).

## The example machine

Two states, output equal to the state, inputs `IN1 IN2`:

| state | input `IN1 IN2` | next state |
|-------|-----------------|------------|
| 0     | `11`            | 1          |
| 0     | `0-` or `-0`    | 0 (self-loop, not gated) |
| 1     | `1-`            | 0          |
| 1     | `0-`            | 1 (self-loop, **gated**) |

The implementation registers both inputs next to the state bit, in a 3-bit
register bank `{s, in2, in1}`. The output is computed from the registered
values:

```
A   = ~in1 & s            (stay in state 1)
B   =  in1 & in2 & ~s     (leave state 0)
OUT = A | B               (primary output, and D input of the state flip-flop)
```

So `OUT` after a clock edge equals `next(OUT before the edge, inputs at the
edge)`. After reset all three flip-flops are 0 and `OUT = 0`.

The activation function gates only the self-loop of state 1:

```
fa = ~IN1 & OUT
```

It looks at the *unregistered* input and at `OUT`, which is the value about to
be loaded into the state flip-flop. In other words, it sees what the logic
would see one cycle later. When `fa = 1`, the suppressed edge would have loaded
`in1 = 0, s = 1`, which gives `OUT = 1` again, so skipping it changes nothing
at the output.

## The clock gate and its timing (`clock_gate`)

```
             +-----+
  fa ------->| L   |-- fa_l --+---------------------------> ob
             | en  |          |
             +--^--+          v
  clk --o-------+       stop = fa_l & ~ct   (HAS_CT = 1)
        |                    = fa_l         (HAS_CT = 0)
        +---------------> gclk = clk & ~stop
```

`L` is a level-sensitive latch that is transparent while `clk` is low and holds
while `clk` is high. Cycle by cycle:

1. While `clk` is low, `fa_l` follows `fa`. Glitches on `fa` cannot reach
   `gclk`, because `gclk` is forced low in this phase.
2. At the rising edge of `clk`, `L` closes on the settled value of `fa`. If that
   value is 0, or `ct = 1`, then `gclk` rises together with `clk` and the
   registers load. Otherwise `gclk` stays low for the whole cycle.
3. While `clk` is high, the registers' outputs change. `fa` may glitch, but `L`
   is closed, so `gclk` is clean.

Timing requirements that follow from this:

* `fa` must settle before the rising edge of `clk`, like any D input.
* `ct` is not latched, so it must not change while `clk` is high. Treat it as
  a static test-mode pin and change it only during the low phase.
* `ob` is the latch output. It is high during the high phase that follows a
  suppressed edge (and it follows `fa` during the low phase). A test can
  therefore strobe `ob` just after the rising edge, next to `OUT`.

The latch is intentional. Lint tools report it, and synthesis keeps it as one
latch bit per gated machine.

## Why gating costs testability, and how each fix helps

This is the part of the design that is easiest to misread. Two faults show the
problem.

* **`fa` stuck-at-0.** The clock is never stopped, and the machine behaves
  exactly like the ungated one. Nothing at `OUT` reveals the fault. The same
  holds for any fault that shrinks the ON-set of `fa`. The only remedy is to
  make `fa` visible, which is what `OB` does.
* **Wire `A` stuck-at-0.** `A` can only be 1 when the registers hold
  `in1 = 0, s = 1`. In the gated machine that value is never loaded: the edge
  that would load it is exactly the one `fa` suppresses. From reset, the
  sequence `IN1 IN2 = 11, 01` detects the fault in the ungated machine. In the
  gated machine, `A` stays 0 forever. Adding observation points does not help,
  because the fault can never be activated.

The two fixes deal with `A` in different ways:

* `ex_gated_fsm_obs` (observability only) takes the redundancy to its
  conclusion. Wire `A` is replaced by constant 0, which also removes the
  AND gate behind it and the OR gate, so the logic becomes the single gate
  `OUT = in1 & in2 & ~s` (`ex_fsm_logic_opt`). That logic is **only correct
  inside the gated machine**: given `in1 = 0, s = 1` it answers 0, but the
  gating guarantees that this pair never reaches it. The circuit is smaller
  and faster than the gated original, and every remaining fault is testable
  through `OUT` or `OB`.
* `ex_gated_fsm_ctob` (controllability and observability) keeps the original
  logic (`ex_fsm_logic`). In test mode (`ct = 1`) every edge reaches the
  registers, so `11, 01` does load `in1 = 0, s = 1` and raises `A`. The
  testbenches check exactly this. With `ct = 0` they check that `A` never
  rises. The cost is one extra input, one extra output and one more gate in
  the clock path.

Both versions have the same input/output behaviour as the ungated machine. In
functional mode (`ct = 0`) both gate the same edges.

## The multiplexed model (`ex_mux_model`, `mux_registers`)

Ordinary test-generation and redundancy-removal tools cannot handle a gated
clock. The model replaces the gate with one multiplexer per flip-flop, on the
ungated clock:

```
q(n+1) = fa ? q(n) : d(n)
```

The multiplexer's `1` input is the flip-flop's own output. In the model, `fa` is
not latched; it is simply sampled at the edge along with `d`. `fa` is a primary
output (the observation point). The logic is the unoptimized network, because
redundancy removal runs on this model. Only faults on real wires of the gated
circuit count. The hold multiplexers and their feedback wires exist only in the
model.

## Module hierarchy

```
gcfsm_top
├── ex_gated_fsm_obs    observability only, optimized logic
│   ├── ex_act_fn           fa = ~IN1 & OUT
│   ├── gated_fsm_core      #(HAS_CT = 0)
│   │   ├── clock_gate          latch L + AND, OB
│   │   └── fsm_registers       {state, inputs}, async reset
│   └── ex_fsm_logic_opt    OUT = in1 & in2 & ~s
├── ex_gated_fsm_ctob   CT + OB, original logic
│   ├── ex_act_fn
│   ├── gated_fsm_core      #(HAS_CT = 1)
│   └── ex_fsm_logic        A, B, OUT = A | B
└── ex_mux_model        single-clock test model
    ├── ex_act_fn
    ├── mux_registers       hold multiplexers + flip-flops
    └── ex_fsm_logic
```

`gcfsm_pkg` holds the example's widths and the bit positions in the register
bank.

`gcfsm_top` drives all three versions from the same `clk`, `rst_n`, `in1` and
`in2`. `ct` goes only to the controllability version. The top contains an
assertion, checked on every falling edge, that the three `out` signals agree.
`gclk_obs` and `gclk_ctob` are the gated register clocks, brought out only so
that a testbench can count suppressed edges. `a_ctob` shows wire `A`.

### Reusing the shell for another FSM

`gated_fsm_core #(N_IN, N_ST, HAS_CT)` contains everything except the two pieces
of combinational logic. To use it for another machine:

* compute `fa` from the primary inputs `in` and the next state `ns`, and feed
  it in;
* feed `ns` back in;
* build the FSM logic on `reg_in` and `state`.

The `fa` you supply must only be 1 in self-loops. That is, whenever `fa = 1`,
the logic's output must not change when `{ns, in}` is loaded. Otherwise the
gated machine differs from the ungated one.

## Where this RTL makes its own choices

* **Reset.** All flip-flops have an asynchronous active-low reset to 0. The
  reset is asynchronous so that it works while the gate holds the clock off.
  Test generation for this style of machine assumes a reset state for every
  flip-flop, and the example's reset state is 0. The reset style is this
  design's own.
* **OB tap.** `OB` is taken at the latch output in both versions. Taking it
  after the `CT` gate would hide `fa` whenever `ct = 1`.
* **CT.** `CT` enters the gate without a latch, as in the published
  structure. Hence the rule that `ct` must be static while `clk` is high.
* **Multiplexer sense.** The model's flip-flop equation, as published,
  reads `y(n+1) = D(n)·fa + y(n)·fa'`. Read literally, that loads when
  `fa = 1`. The RTL holds when `fa = 1` instead. This is the only reading
  that matches clock gating and the multiplexer drawing of the model.
* **Activation function polarity.** `fa = ~IN1 & OUT` follows the state
  graph: the gated self-loop of state 1 is taken on `IN1 = 0`. One prose
  description of the example calls `fa` high when `IN1` and the state are
  both 1. That reading would make the gated machine differ from the ungated
  one, so it was not followed.
* **Monitor ports.** `gclk`, `gclk_obs`, `gclk_ctob` and wire `A` (`a`,
  `a_ctob`) are outputs for verification only. They are not test pins of the
  method.
* **Scope.** The evaluation of the method (test lengths and test-generation
  times on standard FSM benchmarks) is not reproduced. Those machines' state
  tables are not part of this RTL.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one ends by printing `TB_RESULT checks=N failures=M`, and each has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gcfsm_pkg.sv tb/tb_gcfsm_top.sv --top-module tb_gcfsm_top -o sim
./obj_dir/sim
```

Replace `gcfsm_top` to run another block's testbench. The simulator is
two-state, so the testbenches reset the design explicitly. Their reset drives
`rst_n` 1 → 0 → 1, because an asynchronous reset needs a real falling edge.

What the testbenches establish:

* `tb_clock_gate` checks the gate in both variants:
  - `gclk` against the value the latch closed on;
  - `ob`;
  - that `fa` can glitch during the high phase without effect;
  - the number of delivered edges.
* `tb_gated_fsm_core` drives `fa`, `ct`, `in` and `ns` at random. It checks
  load and hold behaviour with and without `CT`.
* `tb_ex_fsm_logic`, `tb_ex_fsm_logic_opt` and `tb_ex_act_fn` check their
  blocks exhaustively against the state graph.
* `tb_ex_gated_fsm_obs`, `tb_ex_gated_fsm_ctob` and `tb_ex_mux_model` run each
  version against a reference model of the ungated machine. They check:
  - `OUT` against the model;
  - `OB` against the activation condition;
  - the number of suppressed edges.

  The `ctob` bench also shows that `A` is unreachable with `ct = 0` and is
  reached by `11, 01` with `ct = 1`.
* `tb_gcfsm_top` runs all three versions together at the default parameters,
  through normal operation, test mode, back to normal operation and a reset in
  mid-run. It counts each mechanism: gated edges in both gated versions, holds
  in the model, `OB` high, edges forced by `CT`, wire `A` activated, and reset.
  A mechanism that never occurs counts as a failure.

The testbenches check function and cycle behaviour. They do not fault-simulate
the netlist. The claim that every stuck-at fault is testable is argued above,
not proven by simulation.
