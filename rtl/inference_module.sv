// inference_module: the demapper network for inference. It takes a received
// symbol y = (I, Q) and returns, for each of the 4 bits of the symbol, the
// probability that the bit is 1, plus the hard decision.
//
// Structure (from the document): three fully connected layers, 2 -> 16 ->
// 16 -> 4, ReLU after the first two and a sigmoid after the last, each layer
// a separate hardware stage so that they work on consecutive symbols at the
// same time. Weights are 9 bit and stored on chip. The parallelism of each
// layer is set by its SIMD and PE parameters (DOP = SIMD * PE); the defaults
// give the fully parallel configuration, 16 x 16 = 256 on the middle layer.
// The activation width (12 bit) and the valid/ready handshakes are this
// design's choices.
//
// Interface: a symbol is taken when in_valid && in_ready; the probabilities
// (PROB_FRAC fraction bits, 0..1) and hard bits (probability >= 0.5) are
// held while out_valid && !out_ready. Throughput is one symbol per
// max(NF*SF)+2 cycles of the slowest layer; latency is the sum over the
// three layers of (NF*SF + 2) cycles. The weight write port addresses one
// parameter by (layer 0..2, neuron, input); input == fan-in selects the bias.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously. The flip-flops use it only asynchronously; the synchronous
// use is the 'disable iff' of the handshake assertions, which is not logic.
module inference_module
  import ae_pkg::*;
#(
  parameter int unsigned L1_SIMD = 2,
  parameter int unsigned L1_PE   = 16,
  parameter int unsigned L2_SIMD = 16,
  parameter int unsigned L2_PE   = 16,
  parameter int unsigned L3_SIMD = 16,
  parameter int unsigned L3_PE   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // received symbols
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [SYM_W-1:0]       in_y [N_IN],
  // bit probabilities and hard decisions
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic        [PROB_W-1:0]      out_prob [N_OUT],
  output logic        [N_OUT-1:0]       out_bits,
  // weight write port
  input  logic                          wr_en,
  input  logic [LAYER_IDX_W-1:0]        wr_layer,
  input  logic [NEURON_IDX_W-1:0]       wr_neuron,
  input  logic [INPUT_IDX_W-1:0]        wr_input,
  input  logic signed [INF_W_W-1:0]     wr_data,
  output logic                          busy
);
  typedef logic signed [INF_ACT_W-1:0] act_t;

  act_t x0 [N_IN];
  act_t a1 [N_HID];
  act_t a2 [N_HID];
  act_t z3 [N_OUT];
  logic v1, r1, v2, r2;
  logic b1, b2, b3;

  // symbol format to activation format
  always_comb
    for (int i = 0; i < N_IN; i++)
      x0[i] = act_t'(requant(wide_t'(in_y[i]), SYM_FRAC, INF_ACT_FRAC, INF_ACT_W));

  fc_layer #(
    .MW(N_IN), .MH(N_HID), .SIMD(L1_SIMD), .PE(L1_PE), .RELU(1'b1)
  ) u_l1 (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(x0),
    .out_valid(v1), .out_ready(r1), .out_data(a1),
    .wr_en(wr_en && wr_layer == 2'd0), .wr_neuron, .wr_input, .wr_data,
    .busy(b1)
  );

  fc_layer #(
    .MW(N_HID), .MH(N_HID), .SIMD(L2_SIMD), .PE(L2_PE), .RELU(1'b1)
  ) u_l2 (
    .clk, .rst_n,
    .in_valid(v1), .in_ready(r1), .in_data(a1),
    .out_valid(v2), .out_ready(r2), .out_data(a2),
    .wr_en(wr_en && wr_layer == 2'd1), .wr_neuron, .wr_input, .wr_data,
    .busy(b2)
  );

  fc_layer #(
    .MW(N_HID), .MH(N_OUT), .SIMD(L3_SIMD), .PE(L3_PE), .RELU(1'b0)
  ) u_l3 (
    .clk, .rst_n,
    .in_valid(v2), .in_ready(r2), .in_data(a2),
    .out_valid, .out_ready, .out_data(z3),
    .wr_en(wr_en && wr_layer == 2'd2), .wr_neuron, .wr_input, .wr_data,
    .busy(b3)
  );

  for (genvar j = 0; j < N_OUT; j++) begin : g_sig
    sigmoid_pwl #(.IN_W(INF_ACT_W), .IN_FRAC(INF_ACT_FRAC), .OUT_FRAC(PROB_FRAC)) u_sig (
      .x(z3[j]), .y(out_prob[j])
    );
    // probability >= 0.5 exactly when the logit is >= 0
    assign out_bits[j] = !z3[j][INF_ACT_W-1];
  end

  assign busy = b1 || b2 || b3 || v1 || v2;
endmodule
