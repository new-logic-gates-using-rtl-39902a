// nn_neuron: one artificial neuron with binary inputs and a hard threshold.
//
// The neuron forms the weighted sum  v = B + sum_i x[i]*W[i]  of its N_IN
// one-bit inputs and turns it into a one-bit output with a firing rule:
// "greater than TH", "less than TH", or "strictly between TH and TH_HI"
// (see nn_pkg::act_e). Because every input is 0 or 1, each product is either
// 0 or the weight itself, so the sum is an adder tree over gated constants;
// with constant weights synthesis reduces the whole neuron to a few gates.
//
// Interface
//   x    N_IN binary inputs (N_IN at most nn_pkg::MAX_IN; the weight array
//        always has MAX_IN entries, of which the first N_IN are used)
//   val  the weighted sum v, in units of 0.1
//   y    the neuron's output after the firing rule
//
// Timing: purely combinational, no clock.
//
// The sum-then-threshold structure, the zero bias and the three firing rules
// follow the published neuron and network equations. The fixed-point format
// (units of 0.1, 8-bit value) is this implementation's own choice; all
// parameters are checked at elaboration to fit in it.
module nn_neuron
  import nn_pkg::*;
#(
  parameter int   N_IN         = 2,
  parameter int   W [MAX_IN]   = '{default: 10},  // weights, units of 0.1; W[i] for i >= N_IN unused
  parameter int   B            = 0,               // bias, units of 0.1
  parameter act_e ACT          = ACT_GT,          // firing rule
  parameter int   TH           = 9,               // threshold (lower bound for ACT_WINDOW)
  parameter int   TH_HI        = 11               // upper bound, used by ACT_WINDOW only
) (
  input  logic [N_IN-1:0] x,
  output val_t            val,
  output logic            y
);

  // Elaboration-time range checks: the worst-case sum must fit in val_t.
  function automatic int sum_pos();
    int s = (B > 0) ? B : 0;
    for (int i = 0; i < N_IN; i++) if (W[i] > 0) s += W[i];
    return s;
  endfunction

  function automatic int sum_neg();
    int s = (B < 0) ? B : 0;
    for (int i = 0; i < N_IN; i++) if (W[i] < 0) s += W[i];
    return s;
  endfunction

  if (N_IN < 1 || N_IN > MAX_IN) begin : gen_chk_n_in
    $error("nn_neuron: N_IN must be between 1 and %0d", MAX_IN);
  end
  if (sum_pos() > VAL_MAX || sum_neg() < VAL_MIN) begin : gen_chk_sum
    $error("nn_neuron: weighted sum does not fit in %0d bits", VAL_W);
  end
  if (TH > VAL_MAX || TH < VAL_MIN || TH_HI > VAL_MAX || TH_HI < VAL_MIN) begin : gen_chk_th
    $error("nn_neuron: threshold does not fit in %0d bits", VAL_W);
  end

  localparam val_t BIAS = val_t'(B);
  localparam val_t THR  = val_t'(TH);
  localparam val_t THR_HI = val_t'(TH_HI);

  // Weighted sum: each binary input either adds its weight or nothing.
  always_comb begin
    val = BIAS;
    for (int i = 0; i < N_IN; i++)
      if (x[i]) val = val + val_t'(W[i]);
  end

  // Firing rule.
  always_comb begin
    unique case (ACT)
      ACT_GT:     y = (val > THR);
      ACT_LT:     y = (val < THR);
      ACT_WINDOW: y = (val > THR) && (val < THR_HI);
      default:    y = 1'b0;
    endcase
  end

endmodule
