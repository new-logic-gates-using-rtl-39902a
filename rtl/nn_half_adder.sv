// nn_half_adder: one-bit half adder built as a single threshold neural network.
//
//   x1 -w1-> NOD1 --w3/w5--> NOD3 -w7-+
//                  \  /                +--> NOD5 = sum   (window neuron)
//                   \/                 |
//                   /\                 |
//   x2 -w2-> NOD2 --w6/w4--> NOD4 -w8-+
//             |  \
//             |   `-------- w10 ----+
//             `------------ w9 -----+--> carry (threshold neuron)
//   (NOD1 feeds carry through w9, NOD2 through w10)
//
// The sum path is the XOR network of nn_topology with w1 = w2 = 1,
// w3..w6 = 0.5, w7 = w8 = 0.6, th1 = th2 = 0.9, th3 = 0.6, th4 = 0.4 and a
// window output neuron that fires for 0.1 < value < 1.1. NOD3 fires only when
// both inputs are 1, NOD4 when either is, so the sum neuron sees 0, 0.6 or 1.2
// and fires only on 0.6. The carry neuron takes the two input neurons
// directly, w9 = w10 = 1, and fires above th_carry = 1.9, i.e. only when both
// inputs are 1. All biases are zero.
//
// Interface
//   x1, x2     addend bits
//   sum        x1 ^ x2
//   carry      x1 & x2
//   nod_o      outputs of NOD1..NOD4 (bit i-1 = NODi)
//   nod_val    weighted sums of NOD1..NOD4, units of 0.1
//   sum_val    weighted sum of the sum neuron, units of 0.1
//   carry_val  weighted sum of the carry neuron, units of 0.1
//
// Timing: combinational; sum is three neuron levels deep, carry two.
//
// Weights, thresholds and wiring are the published ones, with NOD1 and NOD2
// shared between the sum and carry paths as drawn in the network diagram.
// The 0.1-unit fixed-point format is this implementation's choice.
module nn_half_adder
  import nn_pkg::*;
#(
  // Weights w1..w8, units of 0.1.
  parameter int W1 = 10,
  parameter int W2 = 10,
  parameter int W3 = 5,
  parameter int W4 = 5,
  parameter int W5 = 5,
  parameter int W6 = 5,
  parameter int W7 = 6,
  parameter int W8 = 6,
  // Thresholds th1..th5, units of 0.1.
  parameter int TH1 = 9,
  parameter int TH2 = 9,
  parameter int TH3 = 6,
  parameter int TH4 = 4,
  parameter int TH5 = 1,      // output window: lower bound (exclusive)
  parameter int TH5_HI = 11,  // output window: upper bound (exclusive)
  // Carry neuron.
  parameter int W9       = 10,   // NOD1 -> carry
  parameter int W10      = 10,   // NOD2 -> carry
  parameter int TH_CARRY = 19    // carry fires above 1.9
) (
  input  logic       x1,
  input  logic       x2,
  output logic       sum,
  output logic       carry,
  output logic [3:0] nod_o,
  output val_t       nod_val [4],
  output val_t       sum_val,
  output val_t       carry_val
);

  // Sum: input, hidden and output layers.
  nn_topology #(
    .W1(W1), .W2(W2), .W3(W3), .W4(W4), .W5(W5), .W6(W6), .W7(W7), .W8(W8),
    .TH1(TH1), .TH2(TH2), .TH3(TH3), .TH4(TH4), .TH5(TH5), .TH5_HI(TH5_HI), .OUT_ACT(ACT_WINDOW)
  ) u_sum_net (
    .x1(x1), .x2(x2), .y(sum), .nod_o(nod_o), .nod_val(nod_val), .y_val(sum_val)
  );

  // Carry: one neuron on the shared input neurons NOD1 (x[0]) and NOD2 (x[1]).
  nn_neuron #(
    .N_IN(2), .W('{0: W9, 1: W10, default: 0}), .B(0), .ACT(ACT_GT), .TH(TH_CARRY)
  ) u_carry (
    .x(nod_o[1:0]), .val(carry_val), .y(carry)
  );

endmodule
