// nn_pkg: types and constants shared by the threshold-neuron logic.
//
// Weights, biases and thresholds of every network are decimal numbers with
// one fractional digit (0.4, 0.5, 0.6, 0.9, 1.1, 1.9 ...). They are stored as
// signed integers counted in units of 0.1, so 0.6 is written 6
// and 1.9 is written 19. In this format every constant of the design is
// exact, and a neuron's weighted sum is compared with its threshold without
// rounding. This number format is a choice of this implementation; the
// network values themselves are the published ones.
//
// A neuron's weighted sum is an 8-bit two's-complement value (-12.8 .. 12.7),
// far more than the largest sum any network here reaches (2.0).
package nn_pkg;

  // Width of a neuron's weighted sum.
  localparam int VAL_W = 8;
  localparam int VAL_MIN = -(2 ** (VAL_W - 1));
  localparam int VAL_MAX = (2 ** (VAL_W - 1)) - 1;

  typedef logic signed [VAL_W-1:0] val_t;

  // Largest fan-in of one neuron (size of a neuron's weight array).
  localparam int MAX_IN = 4;

  // Firing rule of a neuron, applied to its weighted sum v:
  //   ACT_GT     : fires when v >  TH            (input and hidden neurons, AND/OR output)
  //   ACT_LT     : fires when v <  TH            (NOT gate output)
  //   ACT_WINDOW : fires when TH < v < TH_HI     (XOR gate and half-adder sum output)
  typedef enum logic [1:0] {
    ACT_GT     = 2'd0,
    ACT_LT     = 2'd1,
    ACT_WINDOW = 2'd2
  } act_e;

endpackage
