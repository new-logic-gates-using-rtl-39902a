// nn_logic_top: the complete set of neural-network logic circuits.
//
// Every circuit here is a small feed-forward network of hard-threshold
// neurons with fixed weights and zero biases (nn_neuron). One 2-2-2-1 wiring
// (nn_topology) becomes an AND, OR, NOT or XOR gate purely by its weights,
// thresholds and output firing rule; the half adder adds a carry neuron to
// the XOR network; the full adder is two half adders and the neural OR gate.
// The circuits share no signals, so this top places one of each side by side
// with its own ports.
//
// Interface (bit 0 of a two-bit input is x1, bit 1 is x2)
//   and_x  -> and_y              AND gate
//   or_x   -> or_y               OR gate
//   not_x  -> not_y              NOT gate
//   xor_x  -> xor_y              XOR gate
//   ha_x   -> ha_sum, ha_carry   half adder
//   fa_a, fa_b, fa_cin -> fa_sum, fa_carry   full adder
//
// Timing: combinational; no clock or reset.
//
// Which circuits exist and how each is built follows the published design;
// gathering them in one top with packed two-bit inputs is this
// implementation's own arrangement.
module nn_logic_top (
  input  logic [1:0] and_x,
  output logic       and_y,
  input  logic [1:0] or_x,
  output logic       or_y,
  input  logic       not_x,
  output logic       not_y,
  input  logic [1:0] xor_x,
  output logic       xor_y,
  input  logic [1:0] ha_x,
  output logic       ha_sum,
  output logic       ha_carry,
  input  logic       fa_a,
  input  logic       fa_b,
  input  logic       fa_cin,
  output logic       fa_sum,
  output logic       fa_carry
);

  nn_and_gate u_and (
    .x1(and_x[0]), .x2(and_x[1]), .y(and_y), .nod_o(), .nod_val(), .y_val());

  nn_or_gate u_or (
    .x1(or_x[0]), .x2(or_x[1]), .y(or_y), .nod_o(), .nod_val(), .y_val());

  nn_not_gate u_not (
    .x(not_x), .y(not_y), .nod_o(), .nod_val(), .y_val());

  nn_xor_gate u_xor (
    .x1(xor_x[0]), .x2(xor_x[1]), .y(xor_y), .nod_o(), .nod_val(), .y_val());

  nn_half_adder u_ha (
    .x1(ha_x[0]), .x2(ha_x[1]), .sum(ha_sum), .carry(ha_carry),
    .nod_o(), .nod_val(), .sum_val(), .carry_val());

  nn_full_adder u_fa (
    .a(fa_a), .b(fa_b), .cin(fa_cin), .sum(fa_sum), .carry(fa_carry));

endmodule
