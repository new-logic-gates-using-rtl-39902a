// nn_full_adder: one-bit full adder from two neural half adders and a
// neural OR gate.
//
//   A, B  --> half adder 1 --sum1--> half adder 2 --sum--> SUM
//                  |                      ^  |
//                  |             CIN -----'  |
//                  `--carry1--> OR <--carry2-'
//                               `------------------------> CARRY
//
// SUM = A ^ B ^ CIN and CARRY = (A & B) | ((A ^ B) & CIN). The two half
// carries are never 1 together, so the OR sees at most one active input.
// Every gate is a threshold network: nn_half_adder for the halves and
// nn_or_gate for the OR.
//
// Interface: a, b, cin in; sum, carry out. Timing: combinational; the
// longest path (A -> sum1 -> half adder 2 -> carry2 -> OR) is eight neuron
// levels.
//
// The structure (two half adders and an OR gate) is the published one. That
// the OR is the neural OR gate rather than a plain logic OR is a reading of
// the text, which builds the full adder from the gates it designs.
module nn_full_adder
  import nn_pkg::*;
(
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);

  logic sum1, carry1, carry2;

  // The sub-networks' observation outputs (inner neuron states and sums)
  // are left open.
  nn_half_adder u_ha1 (
    .x1(a), .x2(b), .sum(sum1), .carry(carry1),
    .nod_o(), .nod_val(), .sum_val(), .carry_val()
  );

  nn_half_adder u_ha2 (
    .x1(sum1), .x2(cin), .sum(sum), .carry(carry2),
    .nod_o(), .nod_val(), .sum_val(), .carry_val()
  );

  nn_or_gate u_or (
    .x1(carry1), .x2(carry2), .y(carry),
    .nod_o(), .nod_val(), .y_val()
  );

endmodule
