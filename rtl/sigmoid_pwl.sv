// sigmoid_pwl: piecewise-linear sigmoid, the output activation of the
// demapper, which turns each output logit into a bit probability.
//
// The document names the sigmoid but not how it is built. This design uses
// the classic four-segment shift-and-add approximation (no multipliers):
//   f(|x|) = 1                          for |x| >= 5
//          = |x|/32 + 27/32             for 2.375 <= |x| < 5
//          = |x|/8  + 5/8               for 1 <= |x| < 2.375
//          = |x|/4  + 1/2               for |x| < 1
// and sigmoid(x) = 1 - f(|x|) for x < 0. Its error against the true sigmoid
// is below 0.02.
//
// Interface: x is a signed fixed-point number with IN_FRAC fraction bits;
// y is unsigned with OUT_FRAC fraction bits, range 0 .. 1.0 inclusive
// (OUT_FRAC + 1 bits). Purely combinational. IN_FRAC must be at least 3.
module sigmoid_pwl
  import ae_pkg::*;
#(
  parameter int unsigned IN_W     = INF_ACT_W,
  parameter int unsigned IN_FRAC  = INF_ACT_FRAC,
  parameter int unsigned OUT_FRAC = PROB_FRAC
) (
  input  logic signed [IN_W-1:0]   x,
  output logic        [OUT_FRAC:0] y
);
  // Internal values carry IN_FRAC + 5 fraction bits so that |x|/32 is exact.
  localparam int unsigned IF = IN_FRAC + 5;

  initial assert (IN_FRAC >= 3) else $error("sigmoid_pwl: IN_FRAC must be >= 3");

  wide_t ax, f, g, r;
  always_comb begin
    ax = wide_t'(x);
    if (ax < 0) ax = -ax;
    if (ax >= (wide_t'(5) <<< IN_FRAC))
      f = wide_t'(32) <<< IN_FRAC;
    else if (ax >= (wide_t'(19) <<< (IN_FRAC - 3)))
      f = ax + (wide_t'(27) <<< IN_FRAC);
    else if (ax >= (wide_t'(1) <<< IN_FRAC))
      f = (ax <<< 2) + (wide_t'(20) <<< IN_FRAC);
    else
      f = (ax <<< 3) + (wide_t'(16) <<< IN_FRAC);
    g = (x < 0) ? (wide_t'(32) <<< IN_FRAC) - f : f;
    if (IF >= OUT_FRAC) r = rshift_round(g, IF - OUT_FRAC);
    else                r = g <<< (OUT_FRAC - IF);
    y = r[OUT_FRAC:0];
  end
endmodule
