// tb_ae_demapper_top: end-to-end run of the whole design at its default
// parameters (inference DOP 256, training DOP 32).
//   1. Random initial 14-bit weights are loaded into the training module
//      and copied to the inference module (explicit copy request).
//   2. Phase A: symbols made by the mapper table (one table entry is
//      rewritten first) plus random noise are demapped; every output is
//      checked against the reference model with the converted weights.
//      Random output back-pressure; a second copy request arrives while
//      symbols are streaming and must hold the inference input off.
//   3. Phase B: fine-tuning on labelled symbols, batches of 4, 1, 1, 4 with
//      automatic weight copy after each update. Every sample's
//      probabilities are checked against the reference training; an update
//      that becomes due while a copy is running must wait.
//   4. Phase C: demapping again, checked against the fine-tuned weights.
// Mechanisms counted, each must occur: output stall, inference input held
// by a copy, training update held by a copy, automatic copies, forward and
// backward overlap in training, mapper table write, bit decisions of both
// values.
module tb_ae_demapper_top;
  import ae_pkg::*;
  import ae_ref_pkg::*;
  localparam int NA = 120, NC = 120;
  localparam int LR = 4;
  localparam int NBATCH = 4;
  int bsz [NBATCH] = '{4, 1, 1, 4};

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
  int m_out_stall = 0, m_inf_held = 0, m_upd_held = 0, m_overlap = 0, m_map_wr = 0;
  int m_bit0 = 0, m_bit1 = 0;
  trn_t ref_t;
  net_t inf_net;
  longint yi [256], yq [256];
  bit [3:0] lab [256];

  always #5 clk = ~clk;

  ae_demapper_top dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(negedge clk) if (rst_n) begin
    if (inf_out_valid && !inf_out_ready) m_out_stall++;
    if (inf_in_valid && xfer_busy && !inf_in_ready) m_inf_held++;
    if (dut.u_trn.cstate == dut.u_trn.C_WAIT && xfer_busy) m_upd_held++;
    if (dut.u_trn.f_b != 0 && dut.u_trn.b_b != 0) m_overlap++;
  end

  // training probabilities of every finished sample
  longint tprob [256][4];
  int n_tdone = 0;
  always @(negedge clk) if (rst_n && trn_sample_done) begin
    for (int j = 0; j < 4; j++) tprob[n_tdone][j] = longint'(trn_prob[j]);
    n_tdone++;
  end

  // symbols from the mapper table plus uniform noise of +-0.3
  task automatic make_symbols(int base, int n);
    for (int k = base; k < base + n; k++) begin
      lab[k] = 4'($urandom);
      map_bits = lab[k];
      #1;
      yi[k] = longint'(map_x_i) + longint'($urandom_range(0, 76)) - 38;
      yq[k] = longint'(map_x_q) + longint'($urandom_range(0, 76)) - 38;
    end
  endtask

  // stream symbols base..base+n-1 through inference and check them
  task automatic run_inference(int base, int n, bit copy_midway);
    int got = 0, sent = 0;
    longint pr [4];
    bit [3:0] hb;
    inf_net = to_inference(ref_t.net);
    // at each falling edge: decide ready/valid for the next rising edge and
    // account for the transfers that edge will make
    while (got < n) begin
      @(negedge clk);
      inf_out_ready = ($urandom_range(0, 3) != 0);
      if (inf_out_valid && inf_out_ready) begin
        infer(inf_net, yi[base + got], yq[base + got], pr, hb);
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (longint'(inf_out_prob[j]) != pr[j]) begin
            failures++;
            if (failures < 10) $display("infer sym %0d bit %0d: %0d vs %0d", base + got, j,
                                        inf_out_prob[j], pr[j]);
          end
          if (inf_out_bits[j]) m_bit1++; else m_bit0++;
        end
        checks++;
        if (inf_out_bits != hb) failures++;
        got++;
      end
      xfer_start = copy_midway && (sent == n / 2) && !xfer_busy && (xfer_copies < 16'd2);
      if (sent < n) begin
        inf_in_valid = 1;
        inf_in_y[0] = 12'(yi[base + sent]);
        inf_in_y[1] = 12'(yq[base + sent]);
        if (inf_in_ready) sent++;
      end else inf_in_valid = 0;
    end
    @(negedge clk);
    xfer_start = 0;
    inf_in_valid = 0;
  endtask

  initial begin
    int mw [3], mh [3];
    int k, nb_copies;
    longint pr [4];
    mw = '{2, 16, 16};
    mh = '{16, 16, 4};
    inf_in_valid = 0; inf_out_ready = 0; inf_in_y[0] = 0; inf_in_y[1] = 0;
    trn_valid = 0; trn_y[0] = 0; trn_y[1] = 0; trn_label = 0;
    batch_size = 8'(bsz[0]); lr_shift = 4'(LR);
    wl_en = 0; wl_layer = 0; wl_neuron = 0; wl_input = 0; wl_data = 0;
    xfer_start = 0; auto_xfer = 0;
    map_bits = 0; map_wr_en = 0; map_wr_addr = 0; map_wr_i = 0; map_wr_q = 0;
    clear_grads(ref_t);
    for (int l = 0; l < 3; l++) begin
      ref_t.net.w[l] = '{default: '{default: 0}};
      ref_t.net.b[l] = '{default: 0};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // initial weights
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < mh[l]; n++)
        for (int i = 0; i <= mw[l]; i++) begin
          @(negedge clk);
          wl_en = 1; wl_layer = 2'(l); wl_neuron = 5'(n); wl_input = 5'(i);
          wl_data = 14'($signed($urandom_range(0, 2400)) - 1200);
          if (i == mw[l]) ref_t.net.b[l][n] = longint'(wl_data);
          else            ref_t.net.w[l][n][i] = longint'(wl_data);
        end
    @(negedge clk);
    wl_en = 0;
    xfer_start = 1;
    @(negedge clk);
    xfer_start = 0;
    while (!xfer_done) @(negedge clk);
    checks++;
    if (xfer_copies != 16'd1) failures++;

    // rewrite one mapper point and check it
    @(negedge clk);
    map_wr_en = 1; map_wr_addr = 4'd5; map_wr_i = 12'sd60; map_wr_q = -12'sd100;
    @(negedge clk);
    map_wr_en = 0; map_bits = 4'd5;
    #1;
    checks++;
    if (map_x_i != 12'sd60 || map_x_q != -12'sd100) failures++; else m_map_wr++;

    // phase A
    make_symbols(0, NA);
    run_inference(0, NA, 1);
    checks++;
    if (xfer_copies != 16'd2) failures++;

    // phase B: fine-tuning with automatic copies
    auto_xfer = 1;
    nb_copies = int'(xfer_copies);
    k = 0;
    for (int bi = 0; bi < NBATCH; bi++) begin
      make_symbols(NA + k, bsz[bi]);
      batch_size = 8'(bsz[bi]);
      for (int s = 0; s < bsz[bi]; s++) begin
        @(negedge clk);
        trn_valid = 1;
        trn_y[0] = 12'(yi[NA + k + s]); trn_y[1] = 12'(yq[NA + k + s]);
        trn_label = lab[NA + k + s];
        while (!trn_ready) @(negedge clk);
      end
      @(negedge clk);
      trn_valid = 0;
      for (int s = 0; s < bsz[bi]; s++) begin
        while (n_tdone <= k) @(negedge clk);
        train_sample(ref_t, yi[NA + k], yq[NA + k], lab[NA + k], pr);
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (tprob[k][j] != pr[j]) begin
            failures++;
            if (failures < 10) $display("train sample %0d bit %0d: %0d vs %0d", k, j, tprob[k][j], pr[j]);
          end
        end
        k++;
      end
      update(ref_t, LR);
      while (int'(trn_iterations) != bi + 1) @(negedge clk);
    end
    while (xfer_busy || int'(xfer_copies) != nb_copies + NBATCH) @(negedge clk);
    checks++;
    if (int'(xfer_copies) != nb_copies + NBATCH) failures++;

    // phase C
    auto_xfer = 0;
    make_symbols(NA + k, NC);
    run_inference(NA + k, NC, 0);

    checks += 8;
    if (m_out_stall == 0) failures++;
    if (m_inf_held == 0) failures++;
    if (m_upd_held == 0) failures++;
    if (m_overlap == 0) failures++;
    if (m_map_wr == 0) failures++;
    if (m_bit0 == 0 || m_bit1 == 0) failures++;
    if (!trn_idle) failures++;
    if (int'(trn_iterations) != NBATCH) failures++;
    $display("output stalls %0d, inference input held by copy %0d, update held by copy %0d",
             m_out_stall, m_inf_held, m_upd_held);
    $display("training overlap cycles %0d, copies %0d, iterations %0d, bits 0/1 %0d/%0d",
             m_overlap, xfer_copies, trn_iterations, m_bit0, m_bit1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
