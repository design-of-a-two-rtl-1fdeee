# A two-bit counter built from threshold logic units

This is a two-bit up-counter (0, 1, 2, 3, 0, ...) where every gate is a
*threshold logic unit* (TLU): a McCulloch–Pitts neuron that outputs 1 when the
weighted sum of its binary inputs is greater than a threshold. None of the gates
is an ordinary AND or XOR. Each is a node with fixed weights, and the weights
were found with Rosenblatt's perceptron learning rule. The AND, OR and NOT
gates are single neurons. XOR needs two layers. The D flip-flop's next-state
logic is a six-neuron network. A T flip-flop is that D flip-flop plus the
threshold-logic XOR, and two T flip-flops make a ripple counter.

The RTL follows the published design "Design of a Two-Bit Positive Clock-Edge
Triggered Counter Utilizing Threshold Logic Unit Based on Perceptron Learning
Algorithm" (R. Dey, D. Biswas, P. Dutta). It keeps that design's network
structure and every one of its weights and thresholds. The places where it
departs, or fills in something the original leaves open, are listed in
[Choices and departures](#choices-and-departures).

It synthesizes to 2 flip-flops and a few dozen cells. Each neuron becomes a
small adder tree and a comparator, and synthesis folds the constant weights
away.

## The threshold unit

`tlu` computes

    y = ( sum_i WEIGHTS[i] * x[i]  >  THRESHOLD )

Equality gives 0. There is no bias term. Weights and thresholds are signed
8-bit integers in **tenths** (`tlu_pkg::weight_t`), so 0.3 is written `3` and
-0.5 is written `-5`. Every value in the design is an exact multiple of 0.1, so
this integer form makes exactly the same decisions as real arithmetic.

`WEIGHTS[i]` multiplies `x[i]`. The parameter is a packed array, so the
concatenation `{w2, w1, w0}` lines up with `{x[2], x[1], x[0]}`.

The unit also models defect tolerance. A real threshold gate is only trusted to
give 1 above `T + DELTA_ON` and 0 at or below `T - DELTA_OFF`. The output
`decided` is 1 when the sum lies outside that band. Both deltas default to 0,
and then `decided` is always 1. The gates in this design leave `decided` open,
and `y` always uses the bare threshold.

A wider band shows how thin some of the trained margins are. The AND gate's
sum of 0.6 is only 0.1 above its threshold, so with `DELTA_ON = 1` it is no
longer "decided" (`tb_tlu` checks this).

`sum_node` is the threshold-free variant: it outputs the weighted sum itself.
It is used only as the output layer of the XOR.

## Where the weights come from

Every node was trained with the perceptron rule:

    y_j = (w · x_j > 0.5)
    w_i <- w_i + r (d_j - y_j) x_ji
    with r = 0.1 and all weights starting at 0

Passes over the training set repeat until one whole pass makes no error.

| node (module) | inputs | trained on | weights | threshold |
|---|---|---|---|---|
| AND (`tlu_and2`) | a, b | a held at 1: b=0→0, b=1→1 | 0.3, 0.3 | 0.5 |
| A (`tlu_node_a`) | D, L, Qn | D held at 1: next state = L or Qn | 0.4, 0.2, 0.3 | 0.5 |
| B (`tlu_node_b`) | L, Qn | D held at 0: next state = Qn and not L | -0.1, 0.6 | 0.5 |
| OR (`tlu_or2`) | a, b | — | 0.6, 0.6 | 0.5 |
| NOT (`tlu_not`) | a | — | -0.5 | -0.5 |
| XOR output (`sum_node` in `tlu_xor2`) | A, B, AND(A,B) | — | 1, 1, -2 | none (sum) |

Training does not happen in hardware. The weights are constants in `tlu_pkg`.
`tb/tb_perceptron_learning.sv` replays the three trainings, with the samples in
their original order, and checks two things:

- The rule lands exactly on these constants. AND takes 4 passes, node A takes 3
  and node B takes 8, counting the final error-free pass each time.
- The learned nodes classify their training sets correctly.

The AND gate is trained only on samples with `a = 1`. It still works as AND
for `a = 0`: 0.3 alone is below 0.5.

## The D flip-flop network (`tlu_dff_net`)

This is the least obvious part. A D flip-flop's next state is
`Q+ = L ? D : Qn`, where L marks a clock edge. That is a multiplexer, and it
is not linearly separable, so no single neuron can compute it.

The design therefore trains one neuron for each value of D:

- Node A is trained with D = 1. It computes `L | Qn`: set on an edge,
  otherwise hold. With D = 0 its largest possible sum is 0.2 + 0.3 = 0.5, which
  is not above 0.5, so it outputs 0.
- Node B is trained with D = 0. It computes `Qn & ~L`: clear on an edge,
  otherwise hold. With L = 1 and Qn = 1 its sum is -0.1 + 0.6 = 0.5, which is
  not above 0.5.

A second layer then selects between the two:

    C = NOT D             (-0.5 > -0.5 ?)
    Dn = AND(A, D)        (0.3, 0.3 > 0.5 ?)
    E  = AND(C, B)        (0.3, 0.3 > 0.5 ?)
    F  = OR(Dn, E)        (0.6, 0.6 > 0.5 ?)   -> Q+

`tb_tlu_dff_net` checks all eight input patterns against `L ? D : Qn`.

### From network to edge-triggered flip-flop (`tlu_dff`)

The output Q is fed back to the Qn input. What L means is the subtle point.

In the original behavioural model, L is 1 at a rising clock edge and 0 at a
falling edge, and the network's output is stored at both edges. With L = 0 the
network returns Qn for every D, so the falling-edge evaluation never changes
anything.

`tlu_dff` is therefore a single rising-edge register. It loads the network's
output with L = 1 and the current Q, which is the same set of stored values,
in a synthesizable form. Between edges the register holds, which is exactly
the L = 0 behaviour.

Wiring the clock *level* into L would give a transparent-high latch, not the
positive-edge flip-flop the design is meant to be.

## XOR and the T flip-flop

`tlu_xor2` is the standard two-layer construction. A hidden AND neuron detects
"both inputs are 1", and the output node sums `A + B - 2·AND`, which is 0, 1, 1
or 0. That sum only ever takes the values 0 and 1 (an assertion checks this),
and `y` is 1 when the sum is 1.

`tlu_tff` feeds `T xor Q` into the D flip-flop, so the output toggles on every
rising edge while T = 1.

## The counter (`tlu_counter2`)

Both T inputs are tied to 1:

- Bit 0 toggles on every rising edge of `clk`.
- Bit 0 also passes through a threshold-logic inverter (weight -0.5,
  threshold -0.5). The inverted signal is the clock of bit 1.
- Bit 1 therefore toggles when bit 0 falls from 1 to 0, which is the carry.

This is a **ripple counter**: bit 1 is clocked from a flip-flop output, not from
`clk`, so `q[1]` settles one inverter and one register delay after `q[0]`. Code
that samples `q` on `clk` must allow for that delay. The testbench samples 50
time units after the rising edge and again after the falling edge.

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | count clock, one step per rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset to 0 |
| `q` | out | 2 | count; `q[0]` is the first stage |

## Choices and departures

Numbers and structure:

- **Fixed point.** Weights are integers in tenths. The original uses real
  numbers, which are not synthesizable. The decisions are identical.
- **Edge handling.** The dual-edge evaluation with an L flag is replaced by one
  rising-edge register (see above). The stored values are identical.
- **XOR output.** The summing node has no threshold in the original. Its 0/1
  sum is turned into a bit by comparing it with 1.
- **Tolerance band.** `DELTA_ON` and `DELTA_OFF` appear in the threshold model
  but are given no values, so they default to 0. The band is reported on
  `decided` and does not change `y`.

Behaviour the original leaves open:

- **Reset.** The original has none. `rst_n` clears every flip-flop
  asynchronously, so the counter starts at 0.
- **Learning stop rule.** The written rule says to stop once the mean error of
  a pass is below 0.5, but the training tables continue until a pass has no
  error at all. The tables are followed. Under the written rule, node B would
  stop after its first pass with a Qn weight of 0.1 instead of 0.6.

## Files

`rtl/` (hierarchy from the top):

    tlu_counter2          two-bit ripple counter (top)
      tlu_tff             T flip-flop  = tlu_xor2 + tlu_dff
        tlu_xor2          two-layer XOR = tlu_and2 + sum_node
        tlu_dff           rising-edge register around tlu_dff_net
          tlu_dff_net     nodes A, B, C, D, E, F
            tlu_node_a, tlu_node_b, tlu_not, tlu_and2, tlu_or2
      tlu_not             clock inverter between the stages
    tlu                   generic threshold unit (every node above)
    sum_node              weighted sum without threshold
    tlu_pkg               weight type and all trained constants

`tb/` has one self-checking testbench per module, named `tb_<module>`, plus
`tb_perceptron_learning`.

- The combinational testbenches apply every input pattern and compare the
  output with the Boolean function it should compute.
- `tb_tlu_dff` and `tb_tlu_tff` compare against simple reference models for
  several hundred cycles. They also check that falling edges and data changes
  between edges have no effect, and that reset is asynchronous.
- `tb_tlu_counter2` is the end-to-end test. It checks:
  - the sequence 0, 1, 2, 3, 0, 1, 2 after reset;
  - 200 cycles in all against a modulo-4 model;
  - an asynchronous reset in mid-count.

  It also counts increments, carries, wrap-arounds, holding falling edges and
  resets, and fails if any of them never occurred.

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/tlu_pkg.sv \
        tb/tb_tlu_counter2.sv --top-module tb_tlu_counter2 -Mdir obj -o sim
    ./obj/sim

Replace `tb_tlu_counter2` with any other testbench name. The package has to be
listed first; Verilator finds the other modules through `-Irtl`.

## Changing it

- Trained weights and thresholds are named constants in `rtl/tlu_pkg.sv`. If
  you change one, rerun `tb_perceptron_learning`: it will report that the
  constant no longer matches what the rule produces.
- New gates are `tlu` instances with their own `N`, `WEIGHTS` and `THRESHOLD`.
- Weights must fit `weight_t`, -12.8 to +12.7.
