// weight_transfer: copies the weights of the training module into the
// inference module after fine-tuning.
//
// The two modules keep their own copies of all 388 parameters, in different
// formats and partitions: the training module holds 14-bit weights in words
// of its own SIMD x PE shape, the inference module 9-bit weights in words of
// its (usually larger) SIMD x PE shape. The document states that weights are
// re-arranged to the other partition scheme when exchanged; this block does
// it by walking the parameters one by one in (layer, neuron, input) order,
// reading each through the training module's read port and writing it,
// rounded and saturated from TRN_W_FRAC to INF_W_FRAC fraction bits, through
// the inference module's write port. Both ports address a parameter by
// layer, neuron and input, so each module maps the index to its own
// partition. The walk and the handshake are this design's own.
//
// Interface: start (a pulse or level) begins a copy once other_busy is low (no weight update running
// and no symbol inside the inference module).
// busy is high for the whole copy, one parameter per cycle (388 cycles);
// the caller holds back inference inputs and training updates meanwhile.
// done pulses at the end; copies counts the completed copies.
module weight_transfer
  import ae_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          other_busy,
  output logic                          busy,
  output logic                          done,
  output logic [15:0]                   copies,
  // read side (training module)
  output logic [LAYER_IDX_W-1:0]        rd_layer,
  output logic [NEURON_IDX_W-1:0]       rd_neuron,
  output logic [INPUT_IDX_W-1:0]        rd_input,
  input  logic signed [TRN_W_W-1:0]     rd_data,
  // write side (inference module)
  output logic                          wr_en,
  output logic [LAYER_IDX_W-1:0]        wr_layer,
  output logic [NEURON_IDX_W-1:0]       wr_neuron,
  output logic [INPUT_IDX_W-1:0]        wr_input,
  output logic signed [INF_W_W-1:0]     wr_data
);
  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_COPY} tstate_t;
  tstate_t state;
  logic [LAYER_IDX_W-1:0]  layer;
  logic [NEURON_IDX_W-1:0] neuron;
  logic [INPUT_IDX_W-1:0]  inp;

  // fan-in and neuron count of each layer
  function automatic int unsigned fan_in(logic [LAYER_IDX_W-1:0] l);
    return (l == 2'd0) ? N_IN : N_HID;
  endfunction
  function automatic int unsigned fan_out(logic [LAYER_IDX_W-1:0] l);
    return (l == 2'd2) ? N_OUT : N_HID;
  endfunction

  assign busy      = (state != T_IDLE);
  assign rd_layer  = layer;
  assign rd_neuron = neuron;
  assign rd_input  = inp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      layer     <= '0;
      neuron    <= '0;
      inp       <= '0;
      done      <= 1'b0;
      copies    <= '0;
      wr_en     <= 1'b0;
      wr_layer  <= '0;
      wr_neuron <= '0;
      wr_input  <= '0;
      wr_data   <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      unique case (state)
        T_IDLE: if (start) state <= T_WAIT;
        T_WAIT: if (!other_busy) begin
          layer  <= '0;
          neuron <= '0;
          inp    <= '0;
          state  <= T_COPY;
        end
        T_COPY: begin
          wr_en     <= 1'b1;
          wr_layer  <= layer;
          wr_neuron <= neuron;
          wr_input  <= inp;
          wr_data   <= INF_W_W'(requant(wide_t'(rd_data), TRN_W_FRAC, INF_W_FRAC, INF_W_W));
          if (int'(inp) == fan_in(layer)) begin          // bias was the last of this neuron
            inp <= '0;
            if (int'(neuron) == fan_out(layer) - 1) begin
              neuron <= '0;
              if (layer == 2'(N_LAYERS - 1)) begin
                state  <= T_IDLE;
                done   <= 1'b1;
                copies <= copies + 1'b1;
              end else begin
                layer <= layer + 1'b1;
              end
            end else begin
              neuron <= neuron + 1'b1;
            end
          end else begin
            inp <= inp + 1'b1;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
