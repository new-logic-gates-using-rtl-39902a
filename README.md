# Logic gates and adders as fixed-weight threshold networks

Every circuit in this repository computes an ordinary Boolean function, but
not from AND/OR primitives: each one is a small feed-forward network of
artificial neurons. A neuron adds the weights of those of its binary inputs
that are 1 and compares the sum with a threshold. There is no training and no
bias. The weights and thresholds are fixed constants, and one wiring of five
neurons becomes an AND, OR, NOT or XOR gate depending only on those constants.
A half adder comes from the XOR network plus one carry neuron. A full adder
comes from two half adders and the network OR gate.

The RTL is synthesizable SystemVerilog and purely combinational. With
constant weights, synthesis reduces each neuron to a handful of gates. The
value of the design is that it shows the networks exactly, one neuron per
module instance, with every weighted sum visible in simulation. It is not a
cheaper way to build an AND gate.

## The neuron (`nn_neuron`)

```
val = B + sum over i of (x[i] ? W[i] : 0)
```

All inputs are 0 or 1, so each product is either 0 or the weight itself. The
one-bit output follows one of three firing rules (`nn_pkg::act_e`):

| rule         | fires when             | used by                              |
|--------------|------------------------|--------------------------------------|
| `ACT_GT`     | `val > TH`             | input and hidden neurons, AND/OR output, carry |
| `ACT_LT`     | `val < TH`             | NOT gate output                      |
| `ACT_WINDOW` | `TH < val < TH_HI`     | XOR gate output, half-adder sum      |

All comparisons are strict. This matters: several sums land exactly next to
a threshold (0.5 against 0.4, 1.0 against 0.9, 1.2 against 1.1).

**Number format.** Every weight and threshold in these networks is a decimal
with one fractional digit. They are stored as signed integers counted in
tenths: 0.6 is `6`, 1.9 is `19`. The weighted sum `val` is an 8-bit
two's-complement number (`nn_pkg::val_t`, range -12.8 to 12.7). In this
format every constant is exact, so no comparison depends on rounding. A binary
fraction format could not hold 0.6 or 0.9 exactly. Elaboration stops with an
error if a weight, bias or threshold could overflow the 8-bit sum.

Parameters: `N_IN` (fan-in, at most `nn_pkg::MAX_IN` = 4), `W` (array of
`MAX_IN` weights, of which the first `N_IN` are used), `B` (bias, 0 in all
networks here), `ACT`, `TH`, `TH_HI`.

## The shared 2-2-2-1 network (`nn_topology`)

```
           w1              w3 / w5              w7
  x1 ---> NOD1 ----+----> NOD3 ------+
                    \    /             \
                     \  /               +---> y
                      \/               /
                      /\              /
  x2 ---> NOD2 ----+----> NOD4 ------+
           w2              w6 / w4              w8

  NOD1 = f(x1*w1)                 NOD2 = f(x2*w2)
  NOD3 = f(NOD1*w3 + NOD2*w6)     NOD4 = f(NOD1*w5 + NOD2*w4)
  y    = g(NOD3*w7 + NOD4*w8)
```

Note the crossing: w5 carries NOD1 into NOD4, and w6 carries NOD2 into NOD3.
`f` is "greater than" with thresholds TH1..TH4. `g` is the output neuron's
rule `OUT_ACT`, with TH5 (and TH5_HI for a window). The module's outputs
include `nod_o` (the outputs of NOD1..NOD4), `nod_val` (their sums) and
`y_val` (the output neuron's sum), so that every intermediate value can be
checked. The defaults of `nn_topology` (all weights 1.0, thresholds 0.9) are
only placeholders. Every gate sets all of them.

## How each gate gets its function

Values in the table are real numbers. The RTL holds ten times these values.

| gate | w1,w2 | w3..w6 | w7,w8 | th1,th2 | th3 | th4 | output rule |
|------|-------|--------|-------|---------|-----|-----|-------------|
| AND  | 1     | 0.5    | 1     | 0.9     | 0.9 | 0.9 | y > 1.9     |
| OR   | 1     | 0.5    | 1     | 0.9     | 0.4 | 0.4 | y > 0.9     |
| NOT  | 1     | 1      | 1     | 0.9     | 0.9 | 0.9 | y < 0.5     |
| XOR  | 1     | 0.5    | 0.6   | 0.9     | 0.9 | 0.4 | 0 < y < 1.1 |
| half-adder sum | 1 | 0.5 | 0.6 | 0.9 | 0.6 | 0.4 | 0.1 < y < 1.1 |

The input neurons only copy their input, because 1.0 > 0.9 and 0 is not.
Everything happens in the hidden layer and the output neuron.

* **AND.** Each hidden neuron sees 0.5 when one input is 1 and 1.0 when both
  are. With a threshold of 0.9, both hidden neurons fire only for x1 = x2 = 1.
  The output sum is then 2.0 > 1.9. In every other case the output sum is 0.
* **OR.** The same sums, but hidden thresholds of 0.4 let 0.5 through. Both
  hidden neurons fire as soon as either input is 1, and the output sees 2.0.
* **NOT.** The single input drives both x1 and x2, and every weight is 1.
  For x = 1 all neurons fire and the output sum is 2.0. For x = 0 nothing
  fires and the sum is 0. The output neuron inverts by firing *below* 0.5.
* **XOR.** XOR cannot be separated by one threshold, so the two hidden
  neurons split the cases. NOD3 (th 0.9) fires only when both inputs are 1.
  NOD4 (th 0.4) fires when either input is 1. With w7 = w8 = 0.6 the output
  sum is:

  | x1 x2 | NOD3 | NOD4 | output sum | in (0, 1.1)? |
  |-------|------|------|------------|--------------|
  | 0 0   | 0    | 0    | 0          | no (not > 0) |
  | 0 1   | 0    | 1    | 0.6        | yes          |
  | 1 0   | 0    | 1    | 0.6        | yes          |
  | 1 1   | 1    | 1    | 1.2        | no (not < 1.1) |

  The window output neuron rejects both the "nothing" case and the "both"
  case. The half-adder sum is the same network with th3 = 0.6 (0.5 is still
  rejected) and a window of (0.1, 1.1). Its truth table is identical.

The gate modules (`nn_and_gate`, `nn_or_gate`, `nn_not_gate`, `nn_xor_gate`)
expose W1..W8 and TH1..TH5 (plus TH5_HI for XOR) as parameters, with the
values above as defaults.

## Half adder (`nn_half_adder`)

The sum is the XOR-style network above. The carry is one more neuron. It
reads the input neurons NOD1 and NOD2 directly, through w9 = w10 = 1, and
fires above 1.9, so only when both inputs are 1. NOD1 and NOD2 are shared by
the sum and carry paths. The sum takes three neuron levels and the carry two.
The module has six neurons in total, and its parameters are W1..W10, TH1..TH5,
TH5_HI and TH_CARRY.

## Full adder (`nn_full_adder`)

```
  a, b ---> half adder 1 --sum1--> half adder 2 ---sum---> sum
                 |                   ^      |
                 |           cin ----'      |
                 `--carry1--> OR <--carry2--'
                              `-------------------------> carry
```

The two half carries are never 1 together, so the OR sees at most one active
input. The OR is the network OR gate (`nn_or_gate`), which makes 17 neurons in
all. The longest path, from a through sum1 and carry2 to the OR, is eight
neuron levels.

## Top level (`nn_logic_top`)

The circuits share no signals, so the top places one of each side by side.
Each has its own ports. In a two-bit input, bit 0 is x1 and bit 1 is x2.

| ports | circuit |
|-------|---------|
| `and_x[1:0]` → `and_y` | AND |
| `or_x[1:0]` → `or_y` | OR |
| `not_x` → `not_y` | NOT |
| `xor_x[1:0]` → `xor_y` | XOR |
| `ha_x[1:0]` → `ha_sum`, `ha_carry` | half adder |
| `fa_a`, `fa_b`, `fa_cin` → `fa_sum`, `fa_carry` | full adder |

There is no clock and no reset. All outputs are combinational functions of
the inputs.

## Interpretations and departures

The design follows a published description that fixes the networks, weights
and thresholds. Where that description was ambiguous or self-contradictory,
these choices were made:

* **XOR output threshold.** The parameter list for the XOR gate names an
  output threshold of 0.6. The XOR output equation and its truth table instead
  use an open window from 0 to 1.1, and a "> 0.6" rule would reject the 0.6
  that must give 1. The window is implemented.
* **NOT hidden sums.** With all weights 1, the hidden neurons of the NOT gate
  sum to 2.0 when x = 1. A published intermediate table shows 1.0 there. The
  equations are followed, and the outputs are the same either way.
* **Half-adder input neurons.** The network diagram shares NOD1/NOD2 between
  the sum and carry. A neuron count elsewhere suggests separate copies. The
  shared form is built, with the same outputs and one neuron pair fewer.
* **The full adder's OR** is taken to be the network OR gate, not a plain
  logic OR.
* **This implementation's own choices:** the tenths-based fixed-point format,
  the 8-bit sum width, the strict comparisons (as the equations state), the
  purely combinational timing (no timing is specified), the extra observation
  ports, and the packed two-bit inputs of the top.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_nn_neuron` | four neurons (fan-in 2 to 4, negative weights and bias, all three rules), every input combination against an integer reference; sums that hit a threshold exactly |
| `tb_nn_topology` | default, asymmetric and window parameter sets; every neuron's sum and output against a layer-by-layer reference, which catches wrong or crossed edges |
| `tb_nn_and_gate`, `tb_nn_or_gate`, `tb_nn_not_gate`, `tb_nn_xor_gate` | every published intermediate value (sums and outputs of all five neurons) for every input row, and the final Boolean result |
| `tb_nn_half_adder` | all intermediate values, sum and carry sums, and `{carry,sum} == x1 + x2` |
| `tb_nn_full_adder` | all 8 rows against `a + b + cin`; that the carry comes from each half adder at least once |
| `tb_nn_logic_top` | all 4096 combinations of the top's 12 input bits at default parameters, against Boolean arithmetic. It counts eight mechanisms and fails if one never occurs: AND rejecting a single input, OR accepting one, NOT inverting, the XOR window accepting 0.6 and rejecting 1.2, the half-adder carry, and the full-adder carry from each half adder |

To run one with Verilator, list the package first, then the RTL and the
testbench:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nn_logic_top \
    rtl/nn_pkg.sv rtl/nn_neuron.sv rtl/nn_topology.sv rtl/nn_and_gate.sv \
    rtl/nn_or_gate.sv rtl/nn_not_gate.sv rtl/nn_xor_gate.sv \
    rtl/nn_half_adder.sv rtl/nn_full_adder.sv rtl/nn_logic_top.sv \
    tb/tb_nn_logic_top.sv
./obj_dir/Vtb_nn_logic_top
```

Every testbench finishes in well under a second. The only Verilator lint
warnings are `PINCONNECTEMPTY`, for observation outputs that are left open on
purpose.

## Changing the networks

All weights and thresholds are module parameters in tenths. To try another
gate, instantiate `nn_topology` with new values. For example, NAND is
`nn_and_gate`'s network with output rule `ACT_LT` and TH5 = 19. A
non-integer-tenths value needs a finer scale. In that case, multiply every
constant by the same factor and widen `VAL_W` in `nn_pkg` if needed. The
elaboration checks in `nn_neuron` report overflow.
