// ae_ref_pkg: reference model of the demapper network for the testbenches.
//
// Plain, unfolded arithmetic on 64-bit integers (and real numbers for the
// sigmoid), written independently of the RTL's folding and partitioning:
// fully connected layers, ReLU, the piecewise-linear sigmoid, the output
// error, backpropagation with gradient sums over a batch, the weight update
// and the 14-bit -> 9-bit weight conversion. Fixed-point rules: round half
// up, then saturate. Arrays are sized for the largest layer (16 x 16) and
// indexed [neuron][input].
package ae_ref_pkg;

  localparam int MAXN = 16;

  typedef longint vec_t [MAXN];
  typedef longint mat_t [MAXN][MAXN];

  // The network's parameters, indexed [layer]
  typedef struct {
    mat_t w [3];
    vec_t b [3];
  } net_t;

  function automatic longint rnd(longint v, int sh);
    if (sh <= 0) return v <<< (-sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic longint clip(longint v, int w);
    longint hi, lo;
    hi = (longint'(1) <<< (w - 1)) - 1;
    lo = -(longint'(1) <<< (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint rq(longint v, int fi, int fo, int w);
    return clip(rnd(v, fi - fo), w);
  endfunction

  // Piecewise-linear sigmoid computed in real arithmetic, rounded half up.
  function automatic longint sigm(longint x, int in_frac, int out_frac);
    real xr, ax, f;
    xr = real'(x) / real'(longint'(1) <<< in_frac);
    ax = (xr < 0.0) ? -xr : xr;
    if (ax >= 5.0)        f = 1.0;
    else if (ax >= 2.375) f = ax / 32.0 + 27.0 / 32.0;
    else if (ax >= 1.0)   f = ax / 8.0 + 0.625;
    else                  f = ax / 4.0 + 0.5;
    if (xr < 0.0) f = 1.0 - f;
    return longint'($floor(f * real'(longint'(1) <<< out_frac) + 0.5));
  endfunction

  // One layer: z = W x + b, requantized; out = relu(z) or z; mask = z >= 0.
  function automatic void layer_fwd(input mat_t w, input vec_t b, input vec_t x,
                                    input int mw, input int mh,
                                    input int act_in_frac, input int w_frac,
                                    input int act_out_frac, input int act_out_w,
                                    input bit relu,
                                    output vec_t y, output bit mask [MAXN]);
    for (int n = 0; n < MAXN; n++) begin y[n] = 0; mask[n] = 0; end
    for (int n = 0; n < mh; n++) begin
      longint s;
      s = b[n] <<< act_in_frac;
      for (int i = 0; i < mw; i++) s += w[n][i] * x[i];
      s = rq(s, act_in_frac + w_frac, act_out_frac, act_out_w);
      mask[n] = (s >= 0);
      y[n] = (relu && s < 0) ? 0 : s;
    end
  endfunction

  // Inference formats: symbols 12/7, activations 12/7, weights 9/6,
  // probabilities with 8 fraction bits.
  function automatic void infer(input net_t net, input longint yi, input longint yq,
                                output longint prob [4], output bit [3:0] bits);
    vec_t x, a1, a2, z3;
    bit m [MAXN];
    x = '{default: 0};
    x[0] = yi; x[1] = yq;
    layer_fwd(net.w[0], net.b[0], x,  2, 16, 7, 6, 7, 12, 1, a1, m);
    layer_fwd(net.w[1], net.b[1], a1, 16, 16, 7, 6, 7, 12, 1, a2, m);
    layer_fwd(net.w[2], net.b[2], a2, 16, 4, 7, 6, 7, 12, 0, z3, m);
    for (int j = 0; j < 4; j++) begin
      prob[j] = sigm(z3[j], 7, 8);
      bits[j] = (z3[j] >= 0);
    end
  endfunction

  // Training state: 14/11 weights plus gradient sums.
  typedef struct {
    net_t   net;
    mat_t   g  [3];
    vec_t   gb [3];
  } trn_t;

  function automatic void clear_grads(inout trn_t t);
    for (int l = 0; l < 3; l++) begin
      t.g[l]  = '{default: '{default: 0}};
      t.gb[l] = '{default: 0};
    end
  endfunction

  // One training sample: forward (activations 14/9), sigmoid (10 fraction
  // bits), error a - label, backward with ReLU masks, gradient sums.
  function automatic void train_sample(inout trn_t t, input longint yi, input longint yq,
                                       input bit [3:0] label, output longint prob [4]);
    int mw [3];
    int mh [3];
    vec_t act [4];
    bit   msk [3][MAXN];
    vec_t d, e;
    mw = '{2, 16, 16};
    mh = '{16, 16, 4};
    act[0] = '{default: 0};
    act[0][0] = rq(yi, 7, 9, 14);
    act[0][1] = rq(yq, 7, 9, 14);
    for (int l = 0; l < 3; l++)
      layer_fwd(t.net.w[l], t.net.b[l], act[l], mw[l], mh[l], 9, 11, 9, 14, l != 2,
                act[l+1], msk[l]);
    d = '{default: 0};
    for (int j = 0; j < 4; j++) begin
      prob[j] = sigm(act[3][j], 9, 10);
      d[j] = prob[j] - (label[j] ? 1024 : 0);
    end
    for (int l = 2; l >= 0; l--) begin
      if (l != 2)
        for (int n = 0; n < mh[l]; n++) if (!msk[l][n]) d[n] = 0;
      e = '{default: 0};
      for (int n = 0; n < mh[l]; n++) begin
        t.gb[l][n] += d[n];
        for (int i = 0; i < mw[l]; i++) begin
          t.g[l][n][i] += d[n] * act[l][i];
          e[i] += t.net.w[l][n][i] * d[n];
        end
      end
      for (int i = 0; i < MAXN; i++) e[i] = rq(e[i], 21, 10, 13);
      d = e;
    end
  endfunction

  // W -= round(G * 2^-lr): G has 19 fraction bits, W 11; bias sums have 10.
  function automatic void update(inout trn_t t, input int lr);
    int mw [3];
    int mh [3];
    mw = '{2, 16, 16};
    mh = '{16, 16, 4};
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < mh[l]; n++) begin
        t.net.b[l][n] = clip(t.net.b[l][n] - rnd(t.gb[l][n] * 2, lr), 14);
        for (int i = 0; i < mw[l]; i++)
          t.net.w[l][n][i] = clip(t.net.w[l][n][i] - rnd(t.g[l][n][i], 8 + lr), 14);
      end
    clear_grads(t);
  endfunction

  // 14-bit training weights (11 fraction bits) to 9-bit inference weights (6).
  function automatic net_t to_inference(input net_t n14);
    net_t n9;
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < MAXN; n++) begin
        n9.b[l][n] = rq(n14.b[l][n], 11, 6, 9);
        for (int i = 0; i < MAXN; i++) n9.w[l][n][i] = rq(n14.w[l][n][i], 11, 6, 9);
      end
    return n9;
  endfunction

endpackage
