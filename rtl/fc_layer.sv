// fc_layer: one folded fully connected layer of the inference datapath.
//
// Computes out[n] = act( sum_i W[n][i] * in[i] + b[n] ) for MH neurons over
// MW inputs. The work is folded onto a PE x SIMD array of multipliers: PE
// neurons are processed at a time (coarse-grained parallelism) and each of
// them consumes SIMD inputs per cycle (fine-grained parallelism), so one
// input vector takes NF * SF = (MH/PE) * (MW/SIMD) compute cycles. The
// degree of parallelism (DOP) of the layer is SIMD * PE. This folding scheme
// and the on-chip weight storage follow the document.
//
// Weights live in an array with one word of PE*SIMD weights per fold step,
// so all weights one cycle needs are read at once (the document's weight
// partitioning). Weight word for neuron n, input i: address (n/PE)*SF +
// i/SIMD, lane (n%PE, i%SIMD). Biases are in a separate register file.
//
// Interface (all this design's own choice): input and output are whole
// vectors with valid/ready handshakes. The input vector is captured when
// in_valid && in_ready; the result is held in out_data while out_valid is
// high and out_ready low. A new vector is accepted while the previous
// result waits at the output, so layers chained by these handshakes form a
// pipeline. Timing: 1 cycle to capture, NF*SF cycles to compute, then the
// result appears in out_data on the next cycle if the output is free.
// Weight write port: wr_input == MW selects the bias of neuron wr_neuron.
// Arithmetic: products are summed exactly; the sum is rounded and saturated
// to ACT_OUT_W bits; ReLU (when RELU = 1) clips negative results to zero.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously. The flip-flops use it only asynchronously; the synchronous
// use is the 'disable iff' of the handshake assertions, which is not logic.
module fc_layer
  import ae_pkg::*;
#(
  parameter int unsigned MW           = N_HID,
  parameter int unsigned MH           = N_HID,
  parameter int unsigned SIMD         = 16,
  parameter int unsigned PE           = 16,
  parameter int unsigned ACT_IN_W     = INF_ACT_W,
  parameter int unsigned ACT_IN_FRAC  = INF_ACT_FRAC,
  parameter int unsigned W_W          = INF_W_W,
  parameter int unsigned W_FRAC       = INF_W_FRAC,
  parameter int unsigned ACT_OUT_W    = INF_ACT_W,
  parameter int unsigned ACT_OUT_FRAC = INF_ACT_FRAC,
  parameter bit          RELU         = 1'b1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input vector stream
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [ACT_IN_W-1:0]    in_data  [MW],
  // output vector stream
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic signed [ACT_OUT_W-1:0]   out_data [MH],
  // weight / bias write port
  input  logic                          wr_en,
  input  logic [NEURON_IDX_W-1:0]       wr_neuron,
  input  logic [INPUT_IDX_W-1:0]        wr_input,
  input  logic signed [W_W-1:0]         wr_data,
  // status
  output logic                          busy
);
  localparam int unsigned NF    = MH / PE;
  localparam int unsigned SF    = MW / SIMD;
  localparam int unsigned DEPTH = NF * SF;
  localparam int unsigned ACC_W = ACT_IN_W + W_W + $clog2(MW + 1) + 2;
  localparam int unsigned NF_W  = (NF > 1) ? $clog2(NF) : 1;
  localparam int unsigned SF_W  = (SF > 1) ? $clog2(SF) : 1;

  initial begin
    assert (MW % SIMD == 0) else $error("fc_layer: MW must be a multiple of SIMD");
    assert (MH % PE == 0)   else $error("fc_layer: MH must be a multiple of PE");
    assert (ACT_IN_FRAC + W_FRAC >= ACT_OUT_FRAC) else $error("fc_layer: output format");
  end

  logic signed [W_W-1:0]       wmem [DEPTH][PE][SIMD];
  logic signed [W_W-1:0]       bias [MH];
  logic signed [ACT_IN_W-1:0]  xbuf [MW];
  logic signed [ACC_W-1:0]     acc  [PE];
  logic signed [ACT_OUT_W-1:0] res  [MH];

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;
  logic [NF_W-1:0] nf;
  logic [SF_W-1:0] sf;

  // PE partial sums of the current fold step
  logic signed [ACC_W-1:0] psum [PE];
  always_comb begin
    for (int p = 0; p < PE; p++) begin
      psum[p] = acc[p];
      for (int s = 0; s < SIMD; s++)
        psum[p] = psum[p] + ACC_W'(wmem[int'(nf) * SF + int'(sf)][p][s])
                           * ACC_W'(xbuf[int'(sf) * SIMD + s]);
    end
  end

  function automatic logic signed [ACT_OUT_W-1:0] finish(logic signed [ACC_W-1:0] a,
                                                         logic signed [W_W-1:0] b);
    wide_t v;
    v = wide_t'(a) + (wide_t'(b) <<< ACT_IN_FRAC);
    v = requant(v, ACT_IN_FRAC + W_FRAC, ACT_OUT_FRAC, ACT_OUT_W);
    if (RELU && v < 0) v = '0;
    return ACT_OUT_W'(v);
  endfunction

  assign in_ready = (state == S_IDLE);
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      nf        <= '0;
      sf        <= '0;
      out_valid <= 1'b0;
      for (int p = 0; p < PE; p++) acc[p] <= '0;
      for (int n = 0; n < MH; n++) begin
        res[n]      <= '0;
        out_data[n] <= '0;
      end
      for (int i = 0; i < MW; i++) xbuf[i] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          xbuf  <= in_data;
          nf    <= '0;
          sf    <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          if (int'(sf) == SF - 1) begin
            for (int p = 0; p < PE; p++) begin
              res[int'(nf) * PE + p] <= finish(psum[p], bias[int'(nf) * PE + p]);
              acc[p] <= '0;
            end
            sf <= '0;
            if (int'(nf) == NF - 1) begin
              nf    <= '0;
              state <= S_DRAIN;
            end else begin
              nf <= nf + 1'b1;
            end
          end else begin
            for (int p = 0; p < PE; p++) acc[p] <= psum[p];
            sf <= sf + 1'b1;
          end
        end
        S_DRAIN: if (!out_valid || out_ready) begin
          out_data  <= res;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Weight and bias storage (no reset: loaded through the write port)
  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (int'(wr_input) == MW)
        bias[int'(wr_neuron) % MH] <= wr_data;
      else
        wmem[(int'(wr_neuron) / PE) * SF + int'(wr_input) / SIMD]
            [int'(wr_neuron) % PE][int'(wr_input) % SIMD] <= wr_data;
    end
  end

  // The output vector must stay stable while it waits for the consumer.
  for (genvar n = 0; n < MH; n++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data[n]));
  end

endmodule
