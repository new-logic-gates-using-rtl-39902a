// nn_or_gate: two-input OR gate built as a threshold neural network.
//
// The 2-2-2-1 network of nn_topology with the published OR weights
// w1 = w2 = w7 = w8 = 1, w3..w6 = 0.5 and thresholds th1 = th2 = 0.9,
// th3 = th4 = 0.4, th5 = 0.9. The hidden neurons now fire on 0.5, that is
// when either input is 1, and the output neuron sees 2.0 > 0.9 whenever both
// hidden neurons fire. All biases are zero.
//
// Interface: x1, x2 in; y = x1 | x2 out. nod_o, nod_val and y_val expose the
// inner neuron outputs and weighted sums (units of 0.1) for observation.
// Timing: combinational.
//
// Weights, thresholds and firing rules are the published ones; the 0.1-unit
// fixed-point format is this implementation's choice.
module nn_or_gate
  import nn_pkg::*;
#(
  // Weights w1..w8, units of 0.1.
  parameter int W1 = 10,
  parameter int W2 = 10,
  parameter int W3 = 5,
  parameter int W4 = 5,
  parameter int W5 = 5,
  parameter int W6 = 5,
  parameter int W7 = 10,
  parameter int W8 = 10,
  // Thresholds th1..th5, units of 0.1.
  parameter int TH1 = 9,
  parameter int TH2 = 9,
  parameter int TH3 = 4,
  parameter int TH4 = 4,
  parameter int TH5 = 9
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
    .TH1(TH1), .TH2(TH2), .TH3(TH3), .TH4(TH4), .TH5(TH5), .OUT_ACT(ACT_GT)
  ) u_net (
    .x1(x1), .x2(x2), .y(y), .nod_o(nod_o), .nod_val(nod_val), .y_val(y_val)
  );

endmodule
