// nn_xor_gate: two-input XOR gate built as a threshold neural network.
//
// XOR is not linearly separable, so one threshold cannot produce it; here the
// output neuron uses a window instead. The network is nn_topology with
// w1 = w2 = 1, w3..w6 = 0.5, w7 = w8 = 0.6 and thresholds th1 = th2 = 0.9,
// th3 = 0.9, th4 = 0.4. NOD3 fires only when both inputs are 1 (value 1.0),
// NOD4 when either is (value 0.5 or 1.0). The output value is therefore 0
// (no input), 0.6 (one input) or 1.2 (both), and the output neuron fires
// only for 0 < value < 1.1, which leaves exactly the one-input case.
// All biases are zero.
//
// The published threshold list names th5 = 0.6, but the output equation and
// its truth table use the open window (0, 1.1): with "greater than 0.6" the
// one-input value 0.6 would not fire. This module follows the window.
//
// Interface: x1, x2 in; y = x1 ^ x2 out. nod_o, nod_val and y_val expose the
// inner neuron outputs and weighted sums (units of 0.1) for observation.
// Timing: combinational.
module nn_xor_gate
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
  parameter int TH3 = 9,
  parameter int TH4 = 4,
  parameter int TH5 = 0,      // output window: lower bound (exclusive)
  parameter int TH5_HI = 11   // output window: upper bound (exclusive)
) (
  input  logic       x1,
  input  logic       x2,
  output logic       y,
  output logic [3:0] nod_o,
  output val_t       nod_val [4],
  output val_t       y_val
);

  nn_topology #(
    .W1(W1), .W2(W2), .W3(W3), .W4(W4), .W5(W5), .W6(W6), .W7(W7), .W8(W8),
    .TH1(TH1), .TH2(TH2), .TH3(TH3), .TH4(TH4), .TH5(TH5), .TH5_HI(TH5_HI), .OUT_ACT(ACT_WINDOW)
  ) u_net (
    .x1(x1), .x2(x2), .y(y), .nod_o(nod_o), .nod_val(nod_val), .y_val(y_val)
  );

endmodule
