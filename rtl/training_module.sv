// training_module: fine-tunes the demapper network on chip by
// backpropagation and gradient descent.
//
// Each training sample is a received symbol y with its 4 transmitted bits
// (the label, from pilots or an outer code). The forward pass runs through
// three train_fc_layer stages (2 -> 16 -> 16 -> 4, ReLU, ReLU, linear) and
// a sigmoid. The loss unit forms the output error d[j] = a[j] - label[j]
// (the document's equation 3, the gradient of the binary cross-entropy
// through the sigmoid). The backward pass then runs from the last layer to
// the first, the error terms passing between layers through FIFOs; every
// layer adds the sample's gradients to its gradient sums. After batch_size
// samples have finished their backward pass, all layers apply
// W -= eta * sum(gradients) and the next batch starts. Within a batch the
// forward pass of later samples overlaps the backward pass of earlier ones;
// no sample of the next batch enters before the update is done.
// This structure follows the document; the handshakes, FIFO depths, the
// power-of-two learning rate 2^-lr_shift and the per-layer parallelism of
// the defaults (DOP 32 per layer, the largest training DOP the document
// reports) are this design's choices.
//
// Interface: a sample is taken when s_valid && s_ready. batch_size (>= 1,
// read at the start of each batch) and lr_shift (>= 1) are run-time
// settings. upd_hold postpones a pending update (used while the weights are
// copied out). After each sample, sample_done pulses with the network's
// probabilities in prob. batch_done pulses after each weight update and
// iterations counts the updates. Weight port: (layer, neuron, input), input
// == fan-in selects the bias; writes load initial weights, reads are
// combinational.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously. The flip-flops use it only asynchronously; the synchronous
// use is the 'disable iff' of the handshake assertions, which is not logic.
module training_module
  import ae_pkg::*;
#(
  parameter int unsigned L1_SIMD  = 2,
  parameter int unsigned L1_PE    = 16,
  parameter int unsigned L2_SIMD  = 4,
  parameter int unsigned L2_PE    = 8,
  parameter int unsigned L3_SIMD  = 8,
  parameter int unsigned L3_PE    = 4,
  parameter int unsigned FM_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // training samples
  input  logic                          s_valid,
  output logic                          s_ready,
  input  logic signed [SYM_W-1:0]       s_y [N_IN],
  input  logic [N_OUT-1:0]              s_label,
  // settings
  input  logic [7:0]                    batch_size,
  input  logic [3:0]                    lr_shift,
  input  logic                          upd_hold,
  // progress
  output logic                          sample_done,
  output logic [GRAD_FRAC:0]            prob [N_OUT],
  output logic                          batch_done,
  output logic [31:0]                   iterations,
  output logic                          upd_busy,
  output logic                          idle,
  // weight load and read-back
  input  logic                          wr_en,
  input  logic [LAYER_IDX_W-1:0]        wr_layer,
  input  logic [NEURON_IDX_W-1:0]       wr_neuron,
  input  logic [INPUT_IDX_W-1:0]        wr_input,
  input  logic signed [TRN_W_W-1:0]     wr_data,
  input  logic [LAYER_IDX_W-1:0]        rd_layer,
  input  logic [NEURON_IDX_W-1:0]       rd_neuron,
  input  logic [INPUT_IDX_W-1:0]        rd_input,
  output logic signed [TRN_W_W-1:0]     rd_data
);
  typedef logic signed [TRN_ACT_W-1:0] act_t;
  typedef logic signed [GRAD_W-1:0]    d_t;
  typedef logic [N_HID-1:0][GRAD_W-1:0] dvec_h_t;
  typedef logic [N_OUT-1:0][GRAD_W-1:0] dvec_o_t;

  //--------------------------------------------------------------------------
  // Batch control
  //--------------------------------------------------------------------------
  typedef enum logic [1:0] {C_RUN, C_WAIT, C_UPD} cstate_t;
  cstate_t cstate;
  logic [7:0] bs, admitted, finished;
  logic       take;
  logic       lbl_in_ready, lbl_out_valid, lbl_pop;
  logic [N_OUT-1:0] lbl_out;
  logic       l1_in_ready;
  logic       admit_ok;
  logic [2:0] upd_b, upd_d, f_b, b_b;
  logic [2:0] upd_seen;
  logic       l1_done;
  logic       upd_start;

  assign admit_ok = (cstate == C_RUN) && (admitted < bs);
  assign s_ready  = admit_ok && l1_in_ready && lbl_in_ready;
  assign take     = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate     <= C_RUN;
      bs         <= 8'd1;
      admitted   <= '0;
      finished   <= '0;
      iterations <= '0;
      batch_done <= 1'b0;
      upd_start  <= 1'b0;
      upd_seen   <= '0;
    end else begin
      batch_done <= 1'b0;
      upd_start  <= 1'b0;
      unique case (cstate)
        C_RUN: begin
          if (admitted == '0)
            bs <= (batch_size == '0) ? 8'd1 : batch_size;
          if (take) admitted <= admitted + 1'b1;
          if (l1_done) finished <= finished + 1'b1;
          if (admitted == bs && admitted != '0 &&
              (finished + 8'(l1_done)) == bs)
            cstate <= C_WAIT;
        end
        C_WAIT: if (!upd_hold) begin
          upd_start <= 1'b1;
          upd_seen  <= '0;
          cstate    <= C_UPD;
        end
        C_UPD: begin
          upd_seen <= upd_seen | upd_d;
          if ((upd_seen | upd_d) == 3'b111) begin
            iterations <= iterations + 1'b1;
            batch_done <= 1'b1;
            admitted   <= '0;
            finished   <= '0;
            cstate     <= C_RUN;
          end
        end
        default: cstate <= C_RUN;
      endcase
    end
  end

  assign upd_busy = (cstate != C_RUN) || (upd_b != '0);
  assign idle     = (cstate == C_RUN) && (admitted == '0) && (f_b == '0) && (b_b == '0);

  //--------------------------------------------------------------------------
  // Labels wait in a FIFO for the network output
  //--------------------------------------------------------------------------
  stream_fifo #(.T(logic [N_OUT-1:0]), .DEPTH(8)) u_lbl (
    .clk, .rst_n,
    .in_valid(take), .in_ready(lbl_in_ready), .in_data(s_label),
    .out_valid(lbl_out_valid), .out_ready(lbl_pop), .out_data(lbl_out),
    .count()
  );

  //--------------------------------------------------------------------------
  // Forward and backward datapath
  //--------------------------------------------------------------------------
  act_t x0 [N_IN];
  act_t a1 [N_HID];
  act_t a2 [N_HID];
  act_t z3 [N_OUT];
  logic v1, r1, v2, r2, v3, r3;
  d_t   d3_in  [N_OUT];
  d_t   d3_q   [N_OUT];
  d_t   e2_out [N_HID];
  d_t   e2_q   [N_HID];
  d_t   e1_out [N_HID];
  d_t   e1_q   [N_HID];
  d_t   e0_unused [N_IN];
  logic d3_fv, d3_fr, d3_qv, d3_qr;
  logic e2_ov, e2_or, e2_qv, e2_qr;
  logic e1_ov, e1_or, e1_qv, e1_qr;
  logic bd3, bd2;
  logic signed [TRN_W_W-1:0] rd_l [3];
  dvec_o_t d3_pk, d3_qpk;
  dvec_h_t e2_pk, e2_qpk, e1_pk, e1_qpk;

  always_comb
    for (int i = 0; i < N_IN; i++)
      x0[i] = act_t'(requant(wide_t'(s_y[i]), SYM_FRAC, TRN_ACT_FRAC, TRN_ACT_W));

  train_fc_layer #(
    .MW(N_IN), .MH(N_HID), .SIMD(L1_SIMD), .PE(L1_PE), .RELU(1'b1), .BWD_OUT(1'b0),
    .FM_DEPTH(FM_DEPTH)
  ) u_l1 (
    .clk, .rst_n,
    .fwd_in_valid(s_valid && admit_ok && lbl_in_ready), .fwd_in_ready(l1_in_ready),
    .fwd_in_data(x0),
    .fwd_out_valid(v1), .fwd_out_ready(r1), .fwd_out_data(a1),
    .bwd_in_valid(e1_qv), .bwd_in_ready(e1_qr), .bwd_in_data(e1_q),
    .bwd_out_valid(), .bwd_out_ready(1'b1), .bwd_out_data(e0_unused),
    .bwd_done(l1_done),
    .upd_start, .lr_shift, .upd_busy(upd_b[0]), .upd_done(upd_d[0]),
    .wr_en(wr_en && wr_layer == 2'd0), .wr_neuron, .wr_input, .wr_data,
    .rd_neuron, .rd_input, .rd_data(rd_l[0]),
    .fwd_busy(f_b[0]), .bwd_busy(b_b[0])
  );

  train_fc_layer #(
    .MW(N_HID), .MH(N_HID), .SIMD(L2_SIMD), .PE(L2_PE), .RELU(1'b1), .BWD_OUT(1'b1),
    .FM_DEPTH(FM_DEPTH)
  ) u_l2 (
    .clk, .rst_n,
    .fwd_in_valid(v1), .fwd_in_ready(r1), .fwd_in_data(a1),
    .fwd_out_valid(v2), .fwd_out_ready(r2), .fwd_out_data(a2),
    .bwd_in_valid(e2_qv), .bwd_in_ready(e2_qr), .bwd_in_data(e2_q),
    .bwd_out_valid(e1_ov), .bwd_out_ready(e1_or), .bwd_out_data(e1_out),
    .bwd_done(bd2),
    .upd_start, .lr_shift, .upd_busy(upd_b[1]), .upd_done(upd_d[1]),
    .wr_en(wr_en && wr_layer == 2'd1), .wr_neuron, .wr_input, .wr_data,
    .rd_neuron, .rd_input, .rd_data(rd_l[1]),
    .fwd_busy(f_b[1]), .bwd_busy(b_b[1])
  );

  train_fc_layer #(
    .MW(N_HID), .MH(N_OUT), .SIMD(L3_SIMD), .PE(L3_PE), .RELU(1'b0), .BWD_OUT(1'b1),
    .FM_DEPTH(FM_DEPTH)
  ) u_l3 (
    .clk, .rst_n,
    .fwd_in_valid(v2), .fwd_in_ready(r2), .fwd_in_data(a2),
    .fwd_out_valid(v3), .fwd_out_ready(r3), .fwd_out_data(z3),
    .bwd_in_valid(d3_qv), .bwd_in_ready(d3_qr), .bwd_in_data(d3_q),
    .bwd_out_valid(e2_ov), .bwd_out_ready(e2_or), .bwd_out_data(e2_out),
    .bwd_done(bd3),
    .upd_start, .lr_shift, .upd_busy(upd_b[2]), .upd_done(upd_d[2]),
    .wr_en(wr_en && wr_layer == 2'd2), .wr_neuron, .wr_input, .wr_data,
    .rd_neuron, .rd_input, .rd_data(rd_l[2]),
    .fwd_busy(f_b[2]), .bwd_busy(b_b[2])
  );

  always_comb begin
    unique case (rd_layer)
      2'd0:    rd_data = rd_l[0];
      2'd1:    rd_data = rd_l[1];
      default: rd_data = rd_l[2];
    endcase
  end

  //--------------------------------------------------------------------------
  // Sigmoid and loss: d[j] = a[j] - label[j]
  //--------------------------------------------------------------------------
  logic [GRAD_FRAC:0] a3 [N_OUT];
  for (genvar j = 0; j < N_OUT; j++) begin : g_loss
    sigmoid_pwl #(.IN_W(TRN_ACT_W), .IN_FRAC(TRN_ACT_FRAC), .OUT_FRAC(GRAD_FRAC)) u_sig (
      .x(z3[j]), .y(a3[j])
    );
    assign d3_in[j] = d_t'($signed({2'b00, a3[j]}))
                    - (lbl_out[j] ? d_t'(1 << GRAD_FRAC) : d_t'(0));
  end

  assign d3_fv   = v3 && lbl_out_valid;
  assign r3      = lbl_out_valid && d3_fr;
  assign lbl_pop = d3_fv && d3_fr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_done <= 1'b0;
      for (int j = 0; j < N_OUT; j++) prob[j] <= '0;
    end else begin
      sample_done <= lbl_pop;
      if (lbl_pop) prob <= a3;
    end
  end

  //--------------------------------------------------------------------------
  // Error-term FIFOs between the backward stages
  //--------------------------------------------------------------------------
  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      d3_pk[j] = d3_in[j];
      d3_q[j]  = d_t'(d3_qpk[j]);
    end
    for (int n = 0; n < N_HID; n++) begin
      e2_pk[n] = e2_out[n];
      e2_q[n]  = d_t'(e2_qpk[n]);
      e1_pk[n] = e1_out[n];
      e1_q[n]  = d_t'(e1_qpk[n]);
    end
  end

  stream_fifo #(.T(dvec_o_t), .DEPTH(2)) u_d3 (
    .clk, .rst_n,
    .in_valid(d3_fv), .in_ready(d3_fr), .in_data(d3_pk),
    .out_valid(d3_qv), .out_ready(d3_qr), .out_data(d3_qpk), .count()
  );
  stream_fifo #(.T(dvec_h_t), .DEPTH(2)) u_e2 (
    .clk, .rst_n,
    .in_valid(e2_ov), .in_ready(e2_or), .in_data(e2_pk),
    .out_valid(e2_qv), .out_ready(e2_qr), .out_data(e2_qpk), .count()
  );
  stream_fifo #(.T(dvec_h_t), .DEPTH(2)) u_e1 (
    .clk, .rst_n,
    .in_valid(e1_ov), .in_ready(e1_or), .in_data(e1_pk),
    .out_valid(e1_qv), .out_ready(e1_qr), .out_data(e1_qpk), .count()
  );

  a_no_sample_during_update: assert property (@(posedge clk) disable iff (!rst_n)
    upd_start |-> (f_b == '0) && (b_b == '0) && !v1 && !v2 && !v3);
endmodule
