// ae_pkg: constants and fixed-point helpers shared by the ANN demapper.
//
// The demapper is a three-layer fully connected network, 2 -> N -> N -> 4,
// with N = 16 hidden neurons, ReLU after the two hidden layers and a sigmoid
// after the output layer. It holds 388 trainable parameters (weights and
// biases), all of them on chip. The topology and the bit widths of weights
// (9 bit for inference, 14 bit for training) and gradients (13 bit) follow
// the document; the widths of the activations lie inside the 11..15 bit
// range it states. The split between integer and fraction bits is this
// design's own choice, as is the power-of-two learning rate.
//
// All fixed-point values are two's complement; FRAC is the number of
// fraction bits. The helpers below work on a wide 48-bit intermediate and
// are used by every arithmetic module so rounding and saturation are the
// same everywhere: round half up, then clip to the target width.
package ae_pkg;

  // Network topology
  localparam int unsigned N_IN     = 2;    // real and imaginary part of y
  localparam int unsigned N_HID    = 16;   // neurons per hidden layer (N)
  localparam int unsigned N_OUT    = 4;    // bits per symbol (m)
  localparam int unsigned N_LAYERS = 3;
  localparam int unsigned N_PARAMS = (N_IN + 1) * N_HID + (N_HID + 1) * N_HID
                                   + (N_HID + 1) * N_OUT;  // 388

  // Received symbol y (I and Q), shared by inference and training
  localparam int unsigned SYM_W     = 12;
  localparam int unsigned SYM_FRAC  = 7;

  // Inference formats
  localparam int unsigned INF_ACT_W  = 12;
  localparam int unsigned INF_ACT_FRAC = 7;
  localparam int unsigned INF_W_W    = 9;
  localparam int unsigned INF_W_FRAC = 6;
  localparam int unsigned PROB_FRAC  = 8;   // sigmoid output, 0..1
  localparam int unsigned PROB_W     = PROB_FRAC + 1;

  // Training formats
  localparam int unsigned TRN_ACT_W  = 14;
  localparam int unsigned TRN_ACT_FRAC = 9;
  localparam int unsigned TRN_W_W    = 14;
  localparam int unsigned TRN_W_FRAC = 11;
  localparam int unsigned GRAD_W     = 13;  // error terms (delta)
  localparam int unsigned GRAD_FRAC  = 10;
  localparam int unsigned GACC_W     = 32;  // gradient accumulators over a batch

  // Width of the layer/neuron/input indices of the weight access ports
  localparam int unsigned LAYER_IDX_W  = 2;
  localparam int unsigned NEURON_IDX_W = 5;  // up to 31 neurons
  localparam int unsigned INPUT_IDX_W  = 5;  // input index; index == fan-in selects the bias

  typedef logic signed [47:0] wide_t;

  // Arithmetic right shift by sh with round half up (sh may be 0).
  function automatic wide_t rshift_round(wide_t v, int unsigned sh);
    if (sh == 0) return v;
    return (v + (wide_t'(1) <<< (sh - 1))) >>> sh;
  endfunction

  // Clip v to the range of a w-bit signed number.
  function automatic wide_t sat(wide_t v, int unsigned w);
    if (v > (wide_t'(1) <<< (w - 1)) - 1) return (wide_t'(1) <<< (w - 1)) - 1;
    if (v < -(wide_t'(1) <<< (w - 1)))    return -(wide_t'(1) <<< (w - 1));
    return v;
  endfunction

  // Requantize: change the number of fraction bits, round, saturate to w bits.
  function automatic wide_t requant(wide_t v, int unsigned frac_in,
                                    int unsigned frac_out, int unsigned w);
    if (frac_in >= frac_out) return sat(rshift_round(v, frac_in - frac_out), w);
    return sat(v <<< (frac_out - frac_in), w);
  endfunction

endpackage
