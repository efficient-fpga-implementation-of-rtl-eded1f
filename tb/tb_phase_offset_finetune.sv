// tb_phase_offset_finetune: the fine-tuning scenario the design exists for,
// run on the whole design at its default parameters. A channel rotates the
// constellation by a fixed phase offset, and the receiver adapts to it by
// training on labelled symbols.
//
//   1. The network is loaded with hand-built weights that demap Gray-coded
//      16-QAM on a plain AWGN channel. The first layer forms relu(+-2I) and
//      relu(+-2Q), the second passes them on, and the third forms the four
//      bit logits (sign bits from differences, inner/outer bits from sums
//      against the 0.632 threshold). The remaining 12 neurons per hidden
//      layer start with small random weights. The weights are then copied to
//      the inference module.
//   2. The bit error rate is measured through the inference path at
//      Eb/N0 = 2 dB, first with no phase offset and then with the offset.
//   3. Fine-tuning runs in batches of BATCH labelled symbols drawn from the
//      rotated channel, with an automatic weight copy after every update.
//   4. The bit error rate with the offset is measured again.
// Symbols come from the design's own mapper table. Gaussian noise is made
// with the Box-Muller method from $urandom. The test passes when:
//   - the offset raises the error rate;
//   - fine-tuning lowers it by at least a quarter;
//   - the expected number of updates and copies took place.
// The offset, noise level, batch size and learning rate are this test's
// choices. The test's purpose (fine-tuning towards a phase offset at
// 2 dB) follows the original evaluation.
module tb_phase_offset_finetune;
  import ae_pkg::*;
  localparam int    NSYM    = 2000;    // symbols per error-rate measurement
  localparam int    BATCH   = 8;
  localparam int    NITER   = 120;     // weight updates
  localparam int    LR      = 7;
  localparam real   PHI     = 0.45;    // phase offset in radians
  localparam real   EBN0_DB = 2.0;
  localparam real   PI      = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic inf_in_valid, inf_in_ready, inf_out_valid, inf_out_ready;
  logic signed [11:0] inf_in_y [2];
  logic [8:0] inf_out_prob [4];
  logic [3:0] inf_out_bits;
  logic trn_valid, trn_ready;
  logic signed [11:0] trn_y [2];
  logic [3:0] trn_label;
  logic [7:0] batch_size;
  logic [3:0] lr_shift;
  logic trn_sample_done, trn_batch_done, trn_idle;
  logic [10:0] trn_prob [4];
  logic [31:0] trn_iterations;
  logic wl_en;
  logic [1:0] wl_layer;
  logic [4:0] wl_neuron, wl_input;
  logic signed [13:0] wl_data;
  logic xfer_start, auto_xfer, xfer_busy, xfer_done;
  logic [15:0] xfer_copies;
  logic [3:0] map_bits, map_wr_addr;
  logic signed [11:0] map_x_i, map_x_q, map_wr_i, map_wr_q;
  logic map_wr_en;

  int checks = 0, failures = 0;
  real sigma;

  always #5 clk = ~clk;

  ae_demapper_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real urand();
    return (real'($urandom_range(0, 999999)) + 1.0) / 1000001.0;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = urand();
    u2 = urand();
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // one channel use: random bits through the mapper table, rotation, noise;
  // returns the received symbol in the 12-bit, 7-fraction-bit format
  task automatic channel(real phi, output logic [3:0] bits,
                         output logic signed [11:0] ri, output logic signed [11:0] rq);
    real xi, xq, yi_r, yq_r;
    bits = 4'($urandom);
    map_bits = bits;
    #1;
    xi = real'(map_x_i) / 128.0;
    xq = real'(map_x_q) / 128.0;
    yi_r = xi * $cos(phi) - xq * $sin(phi) + sigma * gauss();
    yq_r = xi * $sin(phi) + xq * $cos(phi) + sigma * gauss();
    ri = 12'($rtoi(yi_r * 128.0 + (yi_r >= 0.0 ? 0.5 : -0.5)));
    rq = 12'($rtoi(yq_r * 128.0 + (yq_r >= 0.0 ? 0.5 : -0.5)));
  endtask

  // bit error rate of the inference path over NSYM symbols
  task automatic measure(real phi, output real ber);
    logic [3:0] sent_bits [NSYM];
    logic [3:0] b;
    logic signed [11:0] ri, rq;
    int sent = 0, got = 0, errs = 0;
    inf_out_ready = 1;
    while (got < NSYM) begin
      @(negedge clk);
      if (inf_out_valid) begin
        errs += $countones(inf_out_bits ^ sent_bits[got]);
        got++;
      end
      if (sent < NSYM) begin
        if (!inf_in_valid || inf_in_ready) begin
          if (inf_in_valid) sent++;
          if (sent < NSYM) begin
            channel(phi, b, ri, rq);
            sent_bits[sent] = b;
            inf_in_valid = 1;
            inf_in_y[0] = ri;
            inf_in_y[1] = rq;
          end else inf_in_valid = 0;
        end
      end
    end
    inf_in_valid = 0;
    ber = real'(errs) / real'(4 * NSYM);
  endtask

  // load one parameter, value given as a real number (14 bit, 11 fraction)
  task automatic load(int l, int n, int i, real v);
    @(negedge clk);
    wl_en = 1; wl_layer = 2'(l); wl_neuron = 5'(n); wl_input = 5'(i);
    wl_data = 14'($rtoi(v * 2048.0));
  endtask

  function automatic real small_w();
    return (real'($urandom_range(0, 200)) - 100.0) / 1000.0;
  endfunction

  initial begin
    real ber0, ber1, ber2, thr;
    logic [3:0] b;
    logic signed [11:0] ri, rq;
    int sent;
    inf_in_valid = 0; inf_out_ready = 1; inf_in_y[0] = 0; inf_in_y[1] = 0;
    trn_valid = 0; trn_y[0] = 0; trn_y[1] = 0; trn_label = 0;
    batch_size = 8'(BATCH); lr_shift = 4'(LR);
    wl_en = 0; wl_layer = 0; wl_neuron = 0; wl_input = 0; wl_data = 0;
    xfer_start = 0; auto_xfer = 0;
    map_bits = 0; map_wr_en = 0; map_wr_addr = 0; map_wr_i = 0; map_wr_q = 0;
    // unit average symbol energy, 4 bits per symbol: N0 = 1 / (4 Eb/N0)
    sigma = $sqrt(1.0 / (2.0 * 4.0 * (10.0 ** (EBN0_DB / 10.0))));
    thr = 2.0 * 2.0 / $sqrt(10.0);     // |2I| at the inner/outer boundary
    repeat (3) @(posedge clk);
    rst_n = 1;

    // layer 1: n0 = relu(2I), n1 = relu(-2I), n2 = relu(2Q), n3 = relu(-2Q)
    for (int n = 0; n < 16; n++) begin
      load(0, n, 0, n == 0 ? 2.0 : n == 1 ? -2.0 : n < 4 ? 0.0 : small_w());
      load(0, n, 1, n == 2 ? 2.0 : n == 3 ? -2.0 : n < 4 ? 0.0 : small_w());
      load(0, n, 2, 0.0);
    end
    // layer 2: pass n0..n3 on
    for (int n = 0; n < 16; n++) begin
      for (int i = 0; i < 16; i++) load(1, n, i, (n < 4) ? (i == n ? 1.0 : 0.0) : small_w());
      load(1, n, 16, 0.0);
    end
    // layer 3: bit 3 = I > 0, bit 2 = |I| inner, bit 1 = Q > 0, bit 0 = |Q| inner
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) begin
        real v;
        v = 0.0;
        if (n == 3) v = (i == 0) ? 3.0 : (i == 1) ? -3.0 : 0.0;
        if (n == 2) v = (i == 0 || i == 1) ? -3.0 : 0.0;
        if (n == 1) v = (i == 2) ? 3.0 : (i == 3) ? -3.0 : 0.0;
        if (n == 0) v = (i == 2 || i == 3) ? -3.0 : 0.0;
        load(2, n, i, v);
      end
      load(2, n, 16, (n == 2 || n == 0) ? 3.0 * thr : 0.0);
    end
    @(negedge clk);
    wl_en = 0;
    xfer_start = 1;
    @(negedge clk);
    xfer_start = 0;
    while (!xfer_done) @(negedge clk);

    measure(0.0, ber0);
    measure(PHI, ber1);

    // fine-tuning on the rotated channel
    auto_xfer = 1;
    sent = 0;
    @(negedge clk);
    while (sent < NITER * BATCH) begin
      if (!trn_valid || trn_ready) begin
        if (trn_valid) sent++;
        if (sent < NITER * BATCH) begin
          channel(PHI, b, ri, rq);
          trn_valid = 1;
          trn_y[0] = ri; trn_y[1] = rq; trn_label = b;
        end else trn_valid = 0;
      end
      @(negedge clk);
    end
    trn_valid = 0;
    while (int'(trn_iterations) != NITER || xfer_busy || !trn_idle) @(negedge clk);
    auto_xfer = 0;
    @(negedge clk);

    measure(PHI, ber2);

    $display("bit error rate: no offset %0.4f, offset %0.2f rad %0.4f, after %0d updates %0.4f",
             ber0, PHI, ber1, NITER, ber2);
    checks += 4;
    if (!(ber1 > ber0)) failures++;
    if (!(ber2 < 0.75 * ber1)) failures++;
    if (int'(trn_iterations) != NITER) failures++;
    if (xfer_copies != 16'(NITER + 1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
