// ae_demapper_top: the programmable-logic part of the trainable ANN
// demapper for a 4-bit-per-symbol autoencoder link.
//
// A mapper network, trained offline together with the demapper, is frozen
// into a 16-entry look-up table on the transmit side (mapper_lut). On the
// receive side the demapper is a small neural network, 2 -> 16 -> 16 -> 4,
// that turns a noisy received symbol into four bit probabilities. It exists
// twice, as in the document: an inference module with 9-bit weights and
// its own parallelism, and a training module with 14-bit weights that
// fine-tunes the network to the actual channel from labelled symbols by
// backpropagation. weight_transfer copies the fine-tuned weights from the
// training module into the inference module, converting the format.
//
// Data movement between the host processor's memory and the streams here
// (memory-mapped AXI converted to streams in the document) is left to the
// surrounding system: the streams are ports of this top.
//
// Interface (valid/ready on every stream):
//   inf_*   symbols in, probabilities and hard bits out (inference)
//   trn_*   labelled training symbols in, per-sample probabilities and
//           batch/iteration progress out
//   wl_*    loading of initial weights into the training module
//   xfer_*  weight copy; started by xfer_start, or after every weight
//           update when auto_xfer is set. While a copy runs, no new symbol
//           enters the inference module and the training update waits.
//   map_*   mapper table look-up and write.
// Parallelism of every layer is a parameter (defaults: inference DOP 256,
// training DOP 32, the largest the document reports).
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously. The flip-flops use it only asynchronously; the synchronous
// use is the 'disable iff' of the handshake assertions, which is not logic.
module ae_demapper_top
  import ae_pkg::*;
#(
  parameter int unsigned INF_L1_SIMD = 2,
  parameter int unsigned INF_L1_PE   = 16,
  parameter int unsigned INF_L2_SIMD = 16,
  parameter int unsigned INF_L2_PE   = 16,
  parameter int unsigned INF_L3_SIMD = 16,
  parameter int unsigned INF_L3_PE   = 4,
  parameter int unsigned TRN_L1_SIMD = 2,
  parameter int unsigned TRN_L1_PE   = 16,
  parameter int unsigned TRN_L2_SIMD = 4,
  parameter int unsigned TRN_L2_PE   = 8,
  parameter int unsigned TRN_L3_SIMD = 8,
  parameter int unsigned TRN_L3_PE   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // inference
  input  logic                          inf_in_valid,
  output logic                          inf_in_ready,
  input  logic signed [SYM_W-1:0]       inf_in_y [N_IN],
  output logic                          inf_out_valid,
  input  logic                          inf_out_ready,
  output logic        [PROB_W-1:0]      inf_out_prob [N_OUT],
  output logic        [N_OUT-1:0]       inf_out_bits,
  // training
  input  logic                          trn_valid,
  output logic                          trn_ready,
  input  logic signed [SYM_W-1:0]       trn_y [N_IN],
  input  logic [N_OUT-1:0]              trn_label,
  input  logic [7:0]                    batch_size,
  input  logic [3:0]                    lr_shift,
  output logic                          trn_sample_done,
  output logic [GRAD_FRAC:0]            trn_prob [N_OUT],
  output logic                          trn_batch_done,
  output logic [31:0]                   trn_iterations,
  output logic                          trn_idle,
  // initial weights into the training module
  input  logic                          wl_en,
  input  logic [LAYER_IDX_W-1:0]        wl_layer,
  input  logic [NEURON_IDX_W-1:0]       wl_neuron,
  input  logic [INPUT_IDX_W-1:0]        wl_input,
  input  logic signed [TRN_W_W-1:0]     wl_data,
  // weight copy training -> inference
  input  logic                          xfer_start,
  input  logic                          auto_xfer,
  output logic                          xfer_busy,
  output logic                          xfer_done,
  output logic [15:0]                   xfer_copies,
  // mapper table
  input  logic [N_OUT-1:0]              map_bits,
  output logic signed [SYM_W-1:0]       map_x_i,
  output logic signed [SYM_W-1:0]       map_x_q,
  input  logic                          map_wr_en,
  input  logic [N_OUT-1:0]              map_wr_addr,
  input  logic signed [SYM_W-1:0]       map_wr_i,
  input  logic signed [SYM_W-1:0]       map_wr_q
);
  logic                          inf_ready_i, inf_busy, trn_upd_busy;
  logic [LAYER_IDX_W-1:0]        rd_layer, iw_layer;
  logic [NEURON_IDX_W-1:0]       rd_neuron, iw_neuron;
  logic [INPUT_IDX_W-1:0]        rd_input, iw_input;
  logic signed [TRN_W_W-1:0]     rd_data;
  logic                          iw_en;
  logic signed [INF_W_W-1:0]     iw_data;

  assign inf_in_ready = inf_ready_i && !xfer_busy;

  inference_module #(
    .L1_SIMD(INF_L1_SIMD), .L1_PE(INF_L1_PE),
    .L2_SIMD(INF_L2_SIMD), .L2_PE(INF_L2_PE),
    .L3_SIMD(INF_L3_SIMD), .L3_PE(INF_L3_PE)
  ) u_inf (
    .clk, .rst_n,
    .in_valid(inf_in_valid && !xfer_busy), .in_ready(inf_ready_i), .in_y(inf_in_y),
    .out_valid(inf_out_valid), .out_ready(inf_out_ready),
    .out_prob(inf_out_prob), .out_bits(inf_out_bits),
    .wr_en(iw_en), .wr_layer(iw_layer), .wr_neuron(iw_neuron), .wr_input(iw_input),
    .wr_data(iw_data),
    .busy(inf_busy)
  );

  training_module #(
    .L1_SIMD(TRN_L1_SIMD), .L1_PE(TRN_L1_PE),
    .L2_SIMD(TRN_L2_SIMD), .L2_PE(TRN_L2_PE),
    .L3_SIMD(TRN_L3_SIMD), .L3_PE(TRN_L3_PE)
  ) u_trn (
    .clk, .rst_n,
    .s_valid(trn_valid), .s_ready(trn_ready), .s_y(trn_y), .s_label(trn_label),
    .batch_size, .lr_shift, .upd_hold(xfer_busy),
    .sample_done(trn_sample_done), .prob(trn_prob),
    .batch_done(trn_batch_done), .iterations(trn_iterations),
    .upd_busy(trn_upd_busy), .idle(trn_idle),
    .wr_en(wl_en), .wr_layer(wl_layer), .wr_neuron(wl_neuron), .wr_input(wl_input),
    .wr_data(wl_data),
    .rd_layer, .rd_neuron, .rd_input, .rd_data
  );

  weight_transfer u_xfer (
    .clk, .rst_n,
    .start(xfer_start || (auto_xfer && trn_batch_done)),
    .other_busy(trn_upd_busy || inf_busy),
    .busy(xfer_busy), .done(xfer_done), .copies(xfer_copies),
    .rd_layer, .rd_neuron, .rd_input, .rd_data,
    .wr_en(iw_en), .wr_layer(iw_layer), .wr_neuron(iw_neuron), .wr_input(iw_input),
    .wr_data(iw_data)
  );

  mapper_lut u_map (
    .clk, .rst_n,
    .bits(map_bits), .x_i(map_x_i), .x_q(map_x_q),
    .wr_en(map_wr_en), .wr_addr(map_wr_addr), .wr_i(map_wr_i), .wr_q(map_wr_q)
  );
endmodule
