// train_fc_layer: one fully connected layer of the training datapath, with
// forward pass, backward pass and weight update.
//
// Forward: z[n] = sum_i W[n][i] x[i] + b[n], output relu(z) (RELU = 1) or z.
// Folded like the inference layer onto PE x SIMD multipliers, NF*SF cycles
// per vector. Unlike inference, the layer saves its feature map, the input
// vector x and the ReLU mask (z[n] >= 0), in a FIFO for the backward pass.
//
// Backward (the document's equations 4 and 5): the error terms d[n] of this
// layer's outputs arrive on bwd_in. A multiplexer passes d[n] where the mask
// is set and 0 elsewhere (sigma[n]). In the same NF*SF fold loop, over the
// same weight word as the forward pass, it
//   - accumulates the gradients  G[n][i] += sigma[n] * x[i],  Gb[n] += sigma[n]
//   - sums the error for the previous layer, e[i] = sum_n W[n][i] sigma[n],
//     with a PE-wide adder tree per input lane.
// e is sent on bwd_out when BWD_OUT = 1 (not needed by the first layer).
// The gradients are summed over all samples of a batch.
//
// Update: after upd_start, each weight word in turn gets
// W -= round(G * eta), G is cleared, one word per cycle (NF*SF cycles).
// The learning rate eta is 2^-lr_shift (lr_shift >= 1), a power of two so
// the multiply is a shift: this is this design's choice, the document gives
// only eta's role.
//
// Formats (ae_pkg): activations TRN_ACT_W/TRN_ACT_FRAC, weights
// TRN_W_W/TRN_W_FRAC (14 bit, as the document states for training), error
// terms GRAD_W/GRAD_FRAC (13 bit as stated), gradient sums GACC_W.
// Handshakes are valid/ready on whole vectors, as in fc_layer. The caller
// must start an update only while both passes are idle (asserted below);
// new vectors are refused while an update runs. The weight write port loads
// initial values; the read port (combinational) lets the weights be copied
// out. Input index MW selects the bias on both ports.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously. The flip-flops use it only asynchronously; the synchronous
// use is the 'disable iff' of the handshake assertions, which is not logic.
module train_fc_layer
  import ae_pkg::*;
#(
  parameter int unsigned MW       = N_HID,
  parameter int unsigned MH       = N_HID,
  parameter int unsigned SIMD     = 4,
  parameter int unsigned PE       = 8,
  parameter bit          RELU     = 1'b1,
  parameter bit          BWD_OUT  = 1'b1,
  parameter int unsigned FM_DEPTH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // forward pass
  input  logic                          fwd_in_valid,
  output logic                          fwd_in_ready,
  input  logic signed [TRN_ACT_W-1:0]   fwd_in_data  [MW],
  output logic                          fwd_out_valid,
  input  logic                          fwd_out_ready,
  output logic signed [TRN_ACT_W-1:0]   fwd_out_data [MH],
  // backward pass
  input  logic                          bwd_in_valid,
  output logic                          bwd_in_ready,
  input  logic signed [GRAD_W-1:0]      bwd_in_data  [MH],
  output logic                          bwd_out_valid,
  input  logic                          bwd_out_ready,
  output logic signed [GRAD_W-1:0]      bwd_out_data [MW],
  output logic                          bwd_done,
  // weight update
  input  logic                          upd_start,
  input  logic [3:0]                    lr_shift,
  output logic                          upd_busy,
  output logic                          upd_done,
  // weight load and read-back
  input  logic                          wr_en,
  input  logic [NEURON_IDX_W-1:0]       wr_neuron,
  input  logic [INPUT_IDX_W-1:0]        wr_input,
  input  logic signed [TRN_W_W-1:0]     wr_data,
  input  logic [NEURON_IDX_W-1:0]       rd_neuron,
  input  logic [INPUT_IDX_W-1:0]        rd_input,
  output logic signed [TRN_W_W-1:0]     rd_data,
  // status
  output logic                          fwd_busy,
  output logic                          bwd_busy
);
  localparam int unsigned NF    = MH / PE;
  localparam int unsigned SF    = MW / SIMD;
  localparam int unsigned DEPTH = NF * SF;
  localparam int unsigned ACC_W = TRN_ACT_W + TRN_W_W + $clog2(MW + 1) + 2;
  localparam int unsigned EACC_W = GRAD_W + TRN_W_W + $clog2(MH + 1) + 2;
  localparam int unsigned NF_W  = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned SF_W  = (SF > 1) ? $clog2(SF) : 1;
  localparam int unsigned A_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  // fraction bits of sigma * x, to be aligned to the weight format
  localparam int unsigned G_SH  = GRAD_FRAC + TRN_ACT_FRAC - TRN_W_FRAC;

  initial begin
    assert (MW % SIMD == 0) else $error("train_fc_layer: MW must be a multiple of SIMD");
    assert (MH % PE == 0)   else $error("train_fc_layer: MH must be a multiple of PE");
  end

  typedef logic signed [TRN_ACT_W-1:0] act_t;
  typedef logic signed [TRN_W_W-1:0]   w_t;
  typedef logic signed [GRAD_W-1:0]    d_t;
  typedef logic signed [GACC_W-1:0]    g_t;

  // Saved feature map of one sample
  typedef struct packed {
    logic [MH-1:0]                mask;
    logic [MW-1:0][TRN_ACT_W-1:0] x;
  } fm_t;

  w_t wmem [DEPTH][PE][SIMD];
  w_t bias [MH];
  g_t gacc [DEPTH][PE][SIMD];
  g_t gbias [MH];

  //--------------------------------------------------------------------------
  // Feature-map FIFO
  //--------------------------------------------------------------------------
  fm_t  fm_in, fm_out;
  logic fm_push, fm_in_ready, fm_out_valid, fm_pop;
  logic [$clog2(FM_DEPTH):0] fm_count;  // fill level, observed by assertions only

  stream_fifo #(.T(fm_t), .DEPTH(FM_DEPTH)) u_fm (
    .clk, .rst_n,
    .in_valid (fm_push), .in_ready (fm_in_ready), .in_data (fm_in),
    .out_valid(fm_out_valid), .out_ready(fm_pop), .out_data(fm_out),
    .count    (fm_count)
  );

  //--------------------------------------------------------------------------
  // Forward pass
  //--------------------------------------------------------------------------
  typedef enum logic [1:0] {F_IDLE, F_RUN, F_DRAIN} fstate_t;
  fstate_t fstate;
  logic [NF_W-1:0] fnf;
  logic [SF_W-1:0] fsf;
  act_t xbuf [MW];
  act_t fres [MH];
  logic [MH-1:0] fmask;
  logic signed [ACC_W-1:0] facc [PE];
  logic signed [ACC_W-1:0] fpsum [PE];
  logic upd_run;

  always_comb begin
    for (int p = 0; p < PE; p++) begin
      fpsum[p] = facc[p];
      for (int s = 0; s < SIMD; s++)
        fpsum[p] = fpsum[p] + ACC_W'(wmem[int'(fnf) * SF + int'(fsf)][p][s])
                             * ACC_W'(xbuf[int'(fsf) * SIMD + s]);
    end
  end

  assign fwd_in_ready = (fstate == F_IDLE) && !upd_run && !upd_start;
  assign fwd_busy     = (fstate != F_IDLE);
  assign fm_push      = (fstate == F_DRAIN) && (!fwd_out_valid || fwd_out_ready);
  always_comb begin
    fm_in.mask = fmask;
    for (int i = 0; i < MW; i++) fm_in.x[i] = xbuf[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fstate        <= F_IDLE;
      fnf           <= '0;
      fsf           <= '0;
      fwd_out_valid <= 1'b0;
      fmask         <= '0;
      for (int p = 0; p < PE; p++) facc[p] <= '0;
      for (int n = 0; n < MH; n++) begin
        fres[n]         <= '0;
        fwd_out_data[n] <= '0;
      end
      for (int i = 0; i < MW; i++) xbuf[i] <= '0;
    end else begin
      if (fwd_out_valid && fwd_out_ready) fwd_out_valid <= 1'b0;
      unique case (fstate)
        F_IDLE: if (fwd_in_valid && fwd_in_ready) begin
          xbuf   <= fwd_in_data;
          fnf    <= '0;
          fsf    <= '0;
          fstate <= F_RUN;
        end
        F_RUN: begin
          if (int'(fsf) == SF - 1) begin
            for (int p = 0; p < PE; p++) begin
              automatic wide_t v;
              v = wide_t'(fpsum[p]) + (wide_t'(bias[int'(fnf) * PE + p]) <<< TRN_ACT_FRAC);
              v = requant(v, TRN_ACT_FRAC + TRN_W_FRAC, TRN_ACT_FRAC, TRN_ACT_W);
              fmask[int'(fnf) * PE + p] <= (v >= 0);
              fres[int'(fnf) * PE + p]  <= (RELU && v < 0) ? '0 : act_t'(v);
              facc[p] <= '0;
            end
            fsf <= '0;
            if (int'(fnf) == NF - 1) begin
              fnf    <= '0;
              fstate <= F_DRAIN;
            end else begin
              fnf <= fnf + 1'b1;
            end
          end else begin
            for (int p = 0; p < PE; p++) facc[p] <= fpsum[p];
            fsf <= fsf + 1'b1;
          end
        end
        // leave only when the output slot and the feature-map FIFO both take it
        F_DRAIN: if ((!fwd_out_valid || fwd_out_ready) && fm_in_ready) begin
          fwd_out_data  <= fres;
          fwd_out_valid <= 1'b1;
          fstate        <= F_IDLE;
        end
        default: fstate <= F_IDLE;
      endcase
    end
  end

  //--------------------------------------------------------------------------
  // Backward pass
  //--------------------------------------------------------------------------
  typedef enum logic [1:0] {B_IDLE, B_RUN, B_DRAIN} bstate_t;
  bstate_t bstate;
  logic [NF_W-1:0] bnf;
  logic [SF_W-1:0] bsf;
  d_t   sigma [MH];
  act_t bx    [MW];
  logic signed [EACC_W-1:0] eacc [MW];
  logic signed [EACC_W-1:0] esum [SIMD];
  logic [A_W-1:0] baddr;

  assign baddr = A_W'(int'(bnf) * SF + int'(bsf));

  // adder tree over the PE lanes for each SIMD input lane
  always_comb begin
    for (int s = 0; s < SIMD; s++) begin
      esum[s] = eacc[int'(bsf) * SIMD + s];
      for (int p = 0; p < PE; p++)
        esum[s] = esum[s] + EACC_W'(wmem[baddr][p][s]) * EACC_W'(sigma[int'(bnf) * PE + p]);
    end
  end

  assign bwd_in_ready = (bstate == B_IDLE) && fm_out_valid && !upd_run && !upd_start;
  assign fm_pop       = bwd_in_valid && bwd_in_ready;
  assign bwd_busy     = (bstate != B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstate        <= B_IDLE;
      bnf           <= '0;
      bsf           <= '0;
      bwd_out_valid <= 1'b0;
      bwd_done      <= 1'b0;
      for (int n = 0; n < MH; n++) sigma[n] <= '0;
      for (int i = 0; i < MW; i++) begin
        bx[i]           <= '0;
        eacc[i]         <= '0;
        bwd_out_data[i] <= '0;
      end
    end else begin
      bwd_done <= 1'b0;
      if (bwd_out_valid && bwd_out_ready) bwd_out_valid <= 1'b0;
      unique case (bstate)
        B_IDLE: if (fm_pop) begin
          for (int n = 0; n < MH; n++)
            sigma[n] <= (RELU && !fm_out.mask[n]) ? d_t'(0) : bwd_in_data[n];
          for (int i = 0; i < MW; i++) begin
            bx[i]   <= act_t'(fm_out.x[i]);
            eacc[i] <= '0;
          end
          bnf    <= '0;
          bsf    <= '0;
          bstate <= B_RUN;
        end
        B_RUN: begin
          for (int s = 0; s < SIMD; s++) eacc[int'(bsf) * SIMD + s] <= esum[s];
          if (int'(bsf) == SF - 1) begin
            bsf <= '0;
            if (int'(bnf) == NF - 1) begin
              bnf    <= '0;
              bstate <= B_DRAIN;
            end else begin
              bnf <= bnf + 1'b1;
            end
          end else begin
            bsf <= bsf + 1'b1;
          end
        end
        B_DRAIN: if (!BWD_OUT) begin
          bwd_done <= 1'b1;
          bstate   <= B_IDLE;
        end else if (!bwd_out_valid || bwd_out_ready) begin
          for (int i = 0; i < MW; i++)
            bwd_out_data[i] <= d_t'(requant(wide_t'(eacc[i]), GRAD_FRAC + TRN_W_FRAC,
                                            GRAD_FRAC, GRAD_W));
          bwd_out_valid <= 1'b1;
          bwd_done      <= 1'b1;
          bstate        <= B_IDLE;
        end
        default: bstate <= B_IDLE;
      endcase
    end
  end

  //--------------------------------------------------------------------------
  // Weight update
  //--------------------------------------------------------------------------
  logic [A_W-1:0] uaddr;
  logic [4:0]     lr_q;

  assign upd_busy = upd_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_run  <= 1'b0;
      upd_done <= 1'b0;
      uaddr    <= '0;
      lr_q     <= 5'd1;
    end else begin
      upd_done <= 1'b0;
      if (!upd_run) begin
        if (upd_start) begin
          upd_run <= 1'b1;
          uaddr   <= '0;
          lr_q    <= (lr_shift == 4'd0) ? 5'd1 : {1'b0, lr_shift};
        end
      end else if (int'(uaddr) == DEPTH - 1) begin
        upd_run  <= 1'b0;
        upd_done <= 1'b1;
      end else begin
        uaddr <= uaddr + 1'b1;
      end
    end
  end

  // Weights, biases and gradient sums. The weights need no reset: they are
  // loaded through the write port before training starts.
  always_ff @(posedge clk) begin
    if (upd_run) begin
      for (int p = 0; p < PE; p++)
        for (int s = 0; s < SIMD; s++)
          wmem[uaddr][p][s] <= w_t'(sat(wide_t'(wmem[uaddr][p][s])
                                 - rshift_round(wide_t'(gacc[uaddr][p][s]), G_SH + int'(lr_q)),
                                 TRN_W_W));
      if (uaddr == '0)
        for (int n = 0; n < MH; n++)
          bias[n] <= w_t'(sat(wide_t'(bias[n])
                        - rshift_round(wide_t'(gbias[n]) <<< (TRN_W_FRAC + 1),
                                       GRAD_FRAC + 1 + int'(lr_q)),
                        TRN_W_W));
    end else if (wr_en) begin
      if (int'(wr_input) == MW)
        bias[int'(wr_neuron) % MH] <= wr_data;
      else
        wmem[(int'(wr_neuron) / PE) * SF + int'(wr_input) / SIMD]
            [int'(wr_neuron) % PE][int'(wr_input) % SIMD] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < DEPTH; a++)
        for (int p = 0; p < PE; p++)
          for (int s = 0; s < SIMD; s++) gacc[a][p][s] <= '0;
      for (int n = 0; n < MH; n++) gbias[n] <= '0;
    end else if (upd_run) begin
      for (int p = 0; p < PE; p++)
        for (int s = 0; s < SIMD; s++) gacc[uaddr][p][s] <= '0;
      if (uaddr == '0)
        for (int n = 0; n < MH; n++) gbias[n] <= '0;
    end else begin
      if (bstate == B_IDLE && fm_pop)
        for (int n = 0; n < MH; n++)
          gbias[n] <= gbias[n] + ((RELU && !fm_out.mask[n]) ? g_t'(0) : g_t'(bwd_in_data[n]));
      if (bstate == B_RUN)
        for (int p = 0; p < PE; p++)
          for (int s = 0; s < SIMD; s++)
            gacc[baddr][p][s] <= gacc[baddr][p][s]
                               + g_t'(sigma[int'(bnf) * PE + p]) * g_t'(bx[int'(bsf) * SIMD + s]);
    end
  end

  // combinational read-back of one weight or bias
  always_comb begin
    if (int'(rd_input) == MW)
      rd_data = bias[int'(rd_neuron) % MH];
    else
      rd_data = wmem[(int'(rd_neuron) / PE) * SF + int'(rd_input) / SIMD]
                    [int'(rd_neuron) % PE][int'(rd_input) % SIMD];
  end

  a_fm_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(fm_count) <= FM_DEPTH);
  a_upd_idle: assert property (@(posedge clk) disable iff (!rst_n)
    upd_start |-> (fstate == F_IDLE) && (bstate == B_IDLE));
  for (genvar n = 0; n < MH; n++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      fwd_out_valid && !fwd_out_ready |=> fwd_out_valid && $stable(fwd_out_data[n]));
  end
endmodule
