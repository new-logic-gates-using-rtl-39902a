// nn_not_gate: inverter built as a threshold neural network.
//
// The 2-2-2-1 network of nn_topology with its two inputs tied together to
// the single input x, every weight 1 and thresholds th1..th4 = 0.9. For x = 1
// every neuron fires and the output neuron's sum is 2.0; for x = 0 nothing
// fires and the sum is 0. The output neuron inverts by firing when its sum
// is below th5 = 0.5. All biases are zero.
//
// Interface: x in; y = ~x out. nod_o, nod_val and y_val expose the inner
// neuron outputs and weighted sums (units of 0.1) for observation.
// Timing: combinational.
//
// Weights, thresholds, the tied inputs and the "less than" output rule are
// the published ones; the 0.1-unit fixed-point format is this
// implementation's choice.
module nn_not_gate
  import nn_pkg::*;
#(
  // Weights w1..w8, units of 0.1.
  parameter int W1 = 10,
  parameter int W2 = 10,
  parameter int W3 = 10,
  parameter int W4 = 10,
  parameter int W5 = 10,
  parameter int W6 = 10,
  parameter int W7 = 10,
  parameter int W8 = 10,
  // Thresholds th1..th5, units of 0.1.
  parameter int TH1 = 9,
  parameter int TH2 = 9,
  parameter int TH3 = 9,
  parameter int TH4 = 9,
  parameter int TH5 = 5
) (
  input  logic       x,
  output logic       y,
  output logic [3:0] nod_o,
  output val_t       nod_val [4],
  output val_t       y_val
);

  nn_topology #(
    .W1(W1), .W2(W2), .W3(W3), .W4(W4), .W5(W5), .W6(W6), .W7(W7), .W8(W8),
    .TH1(TH1), .TH2(TH2), .TH3(TH3), .TH4(TH4), .TH5(TH5), .OUT_ACT(ACT_LT)
  ) u_net (
    .x1(x), .x2(x), .y(y), .nod_o(nod_o), .nod_val(nod_val), .y_val(y_val)
  );

endmodule
