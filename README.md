# Trainable ANN demapper for an autoencoder link

A demapper turns a received complex symbol back into the bits that were sent. This
design does it with a small neural network instead of a fixed constellation rule.
The link sends 4 bits per symbol. The transmitter's mapper is a frozen look-up table
of 16 learned constellation points. The receiver is a fully connected network:

    y = (I, Q)  ->  FC 16, ReLU  ->  FC 16, ReLU  ->  FC 4, sigmoid  ->  P(bit_k = 1), k = 0..3

The network has 2·16+16 + 16·16+16 + 16·4+4 = 388 parameters. Because the channel
drifts, for example through a carrier phase offset, the receiver can fine-tune itself
in the field using labelled symbols such as pilots.

The hardware therefore holds the network twice:

- The **inference module** is narrow and fast. It has 9-bit weights and answers every
  received symbol.
- The **training module** is wide and slower. It has 14-bit weights and runs forward
  pass, backpropagation and gradient descent on labelled samples.
- A **weight copier** moves the fine-tuned weights into the inference module, converting
  their format and memory layout on the way.

Every layer in both modules is folded. A single knob per layer trades multipliers for
cycles, so the same RTL can be built fully parallel for low latency or serial for small
area.

## Folding: SIMD, PE and the degree of parallelism

A layer with MW inputs and MH neurons needs MW·MH multiplies per vector. Each layer
has two parameters:

- **PE** is the number of neurons computed at the same time.
- **SIMD** is the number of inputs each of those neurons consumes per cycle.

Their product is the layer's degree of parallelism (DOP), which equals its number of
multipliers. The layer walks NF = MH/PE neuron folds. For each neuron fold it walks
SF = MW/SIMD input folds. One vector therefore takes NF·SF cycles. PE must divide MH and
SIMD must divide MW.

The weights are stored so that one cycle's PE×SIMD weights form one memory word. Word
`(n/PE)·SF + i/SIMD` holds the weights of neurons n..n+PE−1 for inputs i..i+SIMD−1.
With this layout a fold step never needs more than one read.

| Module | Layer 1 (2→16) | Layer 2 (16→16) | Layer 3 (16→4) |
|---|---|---|---|
| inference (default) | SIMD 2 × PE 16 | SIMD 16 × PE 16 (DOP 256) | SIMD 16 × PE 4 |
| training (default) | SIMD 2 × PE 16 | SIMD 4 × PE 8 (DOP 32) | SIMD 8 × PE 4 |

The defaults are the largest DOPs this design targets: 256 for inference and 32 for
training. Any divisor pair works down to SIMD = PE = 1.

## Fixed-point formats

Each format is written as width / fraction bits. All constants are in `rtl/ae_pkg.sv`.

| Quantity | Format |
|---|---|
| Received symbol I, Q | 12 / 7 |
| Inference activations | 12 / 7 |
| Inference weights and biases | 9 / 6 |
| Inference probabilities | 9-bit unsigned, 8 fraction bits (0 … 1.0) |
| Training activations | 14 / 9 |
| Training weights and biases | 14 / 11 |
| Error terms δ, σ, e | 13 / 10 |
| Gradient sums | 32-bit, 19 fraction bits (weights), 10 (biases) |

Products and sums inside a layer are exact. A value is rounded (half up) and then
saturated only when it leaves a layer in its narrower format. The same rule applies when
weights are updated or copied.

Two things are this design's own choice:

- The total widths come from a quantization study. It found that 11–15-bit activations,
  9-bit inference weights, 14-bit training weights and 13-bit gradients keep the error
  rate of a floating-point model. The integer/fraction splits were chosen here.
- The sigmoid is a four-segment piecewise-linear approximation with shift-and-add
  slopes. It uses no multiplier and its error is below 0.02. See `rtl/sigmoid_pwl.sv`.

## Inference datapath (`inference_module`, `fc_layer`, `sigmoid_pwl`)

Three `fc_layer` instances are chained by valid/ready handshakes on whole vectors. Each
layer's fold loop is a small FSM: idle, run, drain. The loop captures the input vector,
steps through NF·SF weight words, and accumulates PE sums of SIMD products each cycle.
It then adds the bias, applies ReLU, and rounds and saturates into the output register.
A layer accepts the next vector while its previous output is still waiting downstream.

Latency of one layer is NF·SF + 2 cycles from the cycle it accepts a vector.

- At the defaults the layers take 1 fold step each. A symbol's probabilities appear
  9 cycles after it is accepted, and a new symbol can enter every 3 cycles.
- With SIMD = PE = 1 everywhere (DOP 1) the latency is 34 + 258 + 66 = 358 cycles.

The output register holds the result until `out_ready`. The last layer is linear. Four
sigmoid units turn its logits into probabilities. The hard decision for each bit is
simply the logit's sign: bit = 1 when the logit is ≥ 0.

Weights are loaded through a write port that names each parameter by (layer, neuron,
input). An input index equal to the fan-in selects the bias. The layer maps that index
to its own word and lane.

## Training datapath (`training_module`, `train_fc_layer`, `stream_fifo`)

Each `train_fc_layer` has three jobs, and they share the same weight words and fold
counters.

### Forward pass

The forward pass works like `fc_layer`, with wider formats. It also pushes the layer's
*feature map* into a FIFO of depth FM_DEPTH (default 4). The feature map is the input
vector x and the ReLU mask m[n] = (z[n] ≥ 0). When that FIFO is full, the layer stops
taking new forward vectors. This is the stall that limits how far the forward pass may
run ahead of the backward pass.

### Backward pass

Error terms δ for the layer's outputs arrive on `bwd_in`, and the oldest feature map is
popped. A multiplexer forms σ[n] = m[n] ? δ[n] : 0. Then, in the same NF·SF fold loop
as the forward pass, the layer does two things:

- It adds σ[n]·x[i] to the gradient sum G[n][i], and σ[n] to Gb[n].
- It builds the error for the previous layer, e[i] = Σₙ W[n][i]·σ[n]. Each input lane
  has a PE-wide adder tree, and the partial sums are accumulated over the neuron folds.

The e vector is rounded to the 13-bit error format and sent on `bwd_out`. The first
layer has no use for it, so `BWD_OUT = 0` there. The backward latency is NF·SF + 2
cycles, the same as the forward latency.

### Update

After `upd_start`, the layer walks its weight words, one per cycle, and applies
`W -= round(G · 2^-lr_shift)` to each. The biases are updated in the first cycle. The
gradient sums are then cleared.

The learning rate is a power of two, so the multiply is a shift. `lr_shift` is a
run-time input (1..15). The unit tests use `lr_shift = 4`, the phase-offset test 7; the software
training rate of 0.01 lies between 2^-6 and 2^-7. Weights saturate at the 14-bit limits.

### Sample and batch control

`training_module` wires three `train_fc_layer` instances in both directions. It adds:

- a label FIFO;
- a loss unit, which forms δ[j] = sigmoid(z[j]) − label[j] on the 13-bit grid. This is
  the gradient of binary cross-entropy taken through the sigmoid;
- error FIFOs between the layers on the backward path.

A batch controller counts the samples admitted and the samples whose backward pass has
finished in layer 1:

- During a batch (`C_RUN`), samples stream in. Forward passes of later samples overlap
  backward passes of earlier ones.
- When `batch_size` samples are admitted, the input is closed. The controller waits
  (`C_WAIT`) for the last backward pass and for `upd_hold` to be low. It then runs the
  update in all three layers at once (`C_UPD`).
- After the update it pulses `batch_done`, increments `iterations` and opens the input
  again.

A batch size of 1 gives plain stochastic gradient descent. `batch_size` is read at the
start of each batch.

## Weight copy (`weight_transfer`)

The two modules store the same 388 parameters in different formats and different
SIMD×PE word layouts. The copier does not move whole words. It walks the parameters one
at a time in (layer, neuron, input) order. For each parameter it:

1. reads it through the training module's index-addressed read port;
2. rounds it from 11 to 6 fraction bits and saturates it to 9 bits;
3. writes it through the inference module's index-addressed write port.

Each side maps the index to its own layout, so any pair of DOPs works. A copy takes
388 cycles.

A copy is requested by `xfer_start`, or automatically after every update when
`auto_xfer` is set. It starts only when no update is running and no symbol is inside
the inference network. While it runs, the top holds off new inference symbols
(`inf_in_ready` low) and keeps a due training update waiting (`upd_hold`). Each symbol
is therefore computed entirely with either the old or the new weights.

## Mapper table (`mapper_lut`)

The mapper is a writable 16-entry table of (I, Q) points in the 12/7 format. After
reset it holds Gray-coded 16-QAM scaled to unit average energy:

- bits[3:2] select I and bits[1:0] select Q;
- 00 → −3, 01 → −1, 11 → +1, 10 → +3, all times 1/√10.

This is the constellation the learned ones approach at high SNR. A learned
constellation is loaded by writing the table.

## Top level (`ae_demapper_top`)

The top connects the inference module, training module, weight copier and mapper
table. The surrounding system has to supply:

- memory access: the symbol, label and result streams come out as valid/ready ports,
  not as AXI masters;
- the host processor that generates test traffic and the channel model.

| Port group | Purpose |
|---|---|
| `inf_in_*`, `inf_out_*` | symbol in, probabilities and hard bits out |
| `trn_*`, `batch_size`, `lr_shift` | labelled samples in, per-sample probabilities and per-update progress out |
| `wl_*` | load initial 14-bit weights into the training module |
| `xfer_*`, `auto_xfer` | weight copy control and status |
| `map_*` | mapper look-up and table writes |

After reset, load the initial weights through `wl_*` and request one copy so the
inference module has them. Then stream symbols. Clock and reset are shared, with an
active-low asynchronous reset. The weight memories are not reset.

## Where this design departs from the original architecture

- **Handshakes on whole vectors.** A layer starts once the previous layer has produced
  its whole output vector. The original architecture streams elements, so a layer can
  begin on the first values it receives. Throughput is the same when the layers are
  balanced; latency is a few cycles higher.
- **Weight memories read combinationally.** They are written as arrays, which map to
  distributed RAM or registers, rather than block RAM with a registered read. In the
  training layer, the forward pass, backward pass and read-back port can then read
  different words in the same cycle.
- **No AXI or DRAM interfaces.** There is also no processor, channel model, or
  software that picks a DOP and loads the matching bitstream. In this RTL the DOP is an
  elaboration-time parameter.
- **Design choices made here, not taken from the original:**
  - the power-of-two learning rate;
  - the piecewise-linear sigmoid;
  - the fixed-point fraction splits;
  - the FIFO depths;
  - the 16-QAM reset table;
  - the copy protocol.
- **Clock rate not measured.** The target device's clock rate (300 MHz in the original
  work) has not been checked for this RTL. The long adder trees at DOP 256 would likely
  need pipeline registers to reach it.

## Verification

Each module has a self-checking testbench in `tb/`. They compare against
`tb/ae_ref_pkg.sv`, an unfolded integer model of the same arithmetic, which covers
inference, one training sample, the batch update and the format conversion for the
copy. Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it exercises |
|---|---|
| `tb_sigmoid_pwl` | every 12-bit input against the model and the true sigmoid |
| `tb_stream_fifo` | random traffic, full and empty reached |
| `tb_mapper_lut` | reset table, Gray property, unit energy, writes |
| `tb_fc_layer` | folded layer (SIMD 4 × PE 8), latency, output hold under back-pressure |
| `tb_inference_module` | DOP 256 and DOP 1 side by side: outputs, latencies 9 and 358, interval 3 |
| `tb_train_fc_layer` | forward, backward, gradients, update, feature-map stall, backward latency |
| `tb_training_module` | batches of 1, 4 and 7: per-sample probabilities and all weights after every update |
| `tb_weight_transfer` | waiting for the other modules, 388-cycle copy, rounding and saturation |
| `tb_ae_demapper_top` | whole design at default parameters (see below) |
| `tb_phase_offset_finetune` | the adaptation scenario: whole design, Eb/N0 = 2 dB, a 0.45 rad phase offset, 120 updates of 8 samples |

`tb_ae_demapper_top` runs the whole design at its default parameters:

1. It loads random weights and copies them to the inference module.
2. It demaps symbols under random back-pressure and checks them against the model.
3. It runs training batches with automatic copies, and demands a copy in the middle of
   an inference stream.

It counts each mechanism, and a mechanism that never occurs is a failure:

- output stalls;
- symbols held off by a copy;
- updates held off by a copy;
- forward/backward overlap;
- the copies;
- the updates.

`tb_phase_offset_finetune` starts from hand-built weights that demap 16-QAM on a plain
noisy channel. It then rotates the channel and lets the design retrain itself. The error
rates measured through the inference path with 2000 symbols each are:

| Condition | Bit error rate |
|---|---|
| no offset | about 0.10 |
| with the offset | about 0.20 |
| after fine-tuning | about 0.11, almost back to the no-offset value |

The test requires the offset to raise the error rate and fine-tuning to remove at least a
quarter of it.

To run a testbench with plain Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ae_pkg.sv tb/ae_ref_pkg.sv tb/tb_training_module.sv --top-module tb_training_module
    ./obj_dir/Vtb_training_module

To change the parallelism, override the `*_SIMD` / `*_PE` parameters of
`ae_demapper_top`, `inference_module` or `training_module`. Each SIMD must divide its
layer's fan-in and each PE its layer's neuron count. The testbenches check the DOP-1
latency only for inference. The training tests run at the default DOP 32 only. Other
training folds are covered by `tb_train_fc_layer` at SIMD 4 × PE 8.
