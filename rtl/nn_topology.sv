// nn_topology: the 2-2-2-1 threshold network from which every gate is made.
//
//            w1            w3 / w5           w7
//   x1 ----> NOD1 ----+--> NOD3 ----+
//                      \  /           \
//                       \/             +--> y (output neuron)
//                       /\            /
//   x2 ----> NOD2 ----+--> NOD4 ----+
//            w2            w6 / w4           w8
//
//   NOD1 = f(x1*w1)               NOD2 = f(x2*w2)
//   NOD3 = f(NOD1*w3 + NOD2*w6)   NOD4 = f(NOD1*w5 + NOD2*w4)
//   y    = g(NOD3*w7 + NOD4*w8)
//
// f fires when its sum is above the neuron's threshold (TH1..TH4); g is the
// output neuron's rule OUT_ACT: above TH5, below TH5, or strictly between TH5
// and TH5_HI. A gate is nothing but a choice of the eight weights, the five
// thresholds and the output rule: the same wiring gives AND, OR, NOT and XOR.
// All biases are zero in the published networks; BIAS is kept as a parameter
// and applied to every neuron.
//
// Interface
//   x1, x2   binary inputs
//   y        output neuron
//   nod_o    outputs of the four inner neurons, bit i-1 = NODi
//   nod_val  weighted sums of NOD1..NOD4 (index 0..3), units of 0.1
//   y_val    weighted sum of the output neuron, units of 0.1
//
// Timing: combinational, three neuron levels deep.
//
// The wiring, the weight names w1..w8 and the per-layer equations are the
// published ones. The defaults of the parameters are placeholders only (all
// weights 1.0, all thresholds 0.9): each gate module sets every one of them.
module nn_topology
  import nn_pkg::*;
#(
  parameter int   W1 = 10, parameter int W2 = 10,
  parameter int   W3 = 10, parameter int W4 = 10,
  parameter int   W5 = 10, parameter int W6 = 10,
  parameter int   W7 = 10, parameter int W8 = 10,
  parameter int   TH1 = 9, parameter int TH2 = 9,
  parameter int   TH3 = 9, parameter int TH4 = 9,
  parameter int   TH5 = 9,
  parameter int   TH5_HI  = 11,          // upper bound when OUT_ACT = ACT_WINDOW
  parameter act_e OUT_ACT = ACT_GT,      // firing rule of the output neuron
  parameter int   BIAS    = 0            // bias of every neuron
) (
  input  logic       x1,
  input  logic       x2,
  output logic       y,
  output logic [3:0] nod_o,
  output val_t       nod_val [4],
  output val_t       y_val
);

  logic nod1, nod2, nod3, nod4;

  // Input layer.
  nn_neuron #(.N_IN(1), .W('{0: W1, default: 0}), .B(BIAS), .ACT(ACT_GT), .TH(TH1)) u_nod1 (
    .x(x1), .val(nod_val[0]), .y(nod1));
  nn_neuron #(.N_IN(1), .W('{0: W2, default: 0}), .B(BIAS), .ACT(ACT_GT), .TH(TH2)) u_nod2 (
    .x(x2), .val(nod_val[1]), .y(nod2));

  // Hidden layer: x[0] is NOD1, x[1] is NOD2.
  nn_neuron #(.N_IN(2), .W('{0: W3, 1: W6, default: 0}), .B(BIAS), .ACT(ACT_GT), .TH(TH3)) u_nod3 (
    .x({nod2, nod1}), .val(nod_val[2]), .y(nod3));
  nn_neuron #(.N_IN(2), .W('{0: W5, 1: W4, default: 0}), .B(BIAS), .ACT(ACT_GT), .TH(TH4)) u_nod4 (
    .x({nod2, nod1}), .val(nod_val[3]), .y(nod4));

  // Output layer: x[0] is NOD3, x[1] is NOD4.
  nn_neuron #(.N_IN(2), .W('{0: W7, 1: W8, default: 0}), .B(BIAS), .ACT(OUT_ACT), .TH(TH5), .TH_HI(TH5_HI)) u_out (
    .x({nod4, nod3}), .val(y_val), .y(y));

  assign nod_o = {nod4, nod3, nod2, nod1};

endmodule
