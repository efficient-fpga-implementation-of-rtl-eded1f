// tb_training_module: end-to-end fine-tuning in the default configuration
// (training DOP 32 per layer). Random 14-bit weights are loaded, then
// labelled random symbols are streamed in batches of 1, 4 and 7 samples.
// The reference model trains the same network sample by sample and updates
// after each batch. Checked: the network's probabilities for every sample,
// every weight and bias after every update (read through the read port
// while the next update is held back with upd_hold), the iteration counter,
// and that forward and backward passes of different samples overlapped.
module tb_training_module;
  import ae_pkg::*;
  import ae_ref_pkg::*;
  localparam int NB = 6;
  int bsz [NB] = '{1, 4, 7, 4, 1, 7};
  localparam int LR = 4;

  logic clk = 0, rst_n = 0;
  logic s_valid, s_ready, upd_hold, sample_done, batch_done, upd_busy, idle, wr_en;
  logic signed [11:0] s_y [2];
  logic [3:0] s_label;
  logic [7:0] batch_size;
  logic [3:0] lr_shift;
  logic [10:0] prob [4];
  logic [31:0] iterations;
  logic [1:0] wr_layer, rd_layer;
  logic [4:0] wr_neuron, wr_input, rd_neuron, rd_input;
  logic signed [13:0] wr_data, rd_data;
  int checks = 0, failures = 0, overlap = 0;
  trn_t ref_t;
  longint sy_i [64], sy_q [64];
  bit [3:0] lab [64];
  int ns_total;

  always #5 clk = ~clk;

  training_module dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record the probabilities of every finished sample
  longint got_prob [64][4];
  int n_done = 0;
  always @(negedge clk) if (rst_n && sample_done) begin
    for (int j = 0; j < 4; j++) got_prob[n_done][j] = longint'(prob[j]);
    n_done++;
  end

  // overlap of forward and backward work in the pipeline
  always @(negedge clk) if (dut.f_b != 0 && dut.b_b != 0) overlap++;

  // stimulus: all samples back to back; the module admits one batch at a time
  initial begin
    s_valid = 0; s_y[0] = 0; s_y[1] = 0; s_label = 0;
    wait (rst_n && !wr_en && ns_total > 0);
    repeat (5) @(negedge clk);
    for (int k = 0; k < ns_total; k++) begin
      s_y[0] = 12'(sy_i[k]); s_y[1] = 12'(sy_q[k]); s_label = lab[k];
      s_valid = 1;
      while (!s_ready) @(negedge clk);
      @(negedge clk);
      s_valid = 0;
    end
  end

  initial begin
    int mw [3], mh [3];
    int k;
    longint pr [4];
    mw = '{2, 16, 16};
    mh = '{16, 16, 4};
    ns_total = 0;
    wr_en = 1; wr_layer = 0; wr_neuron = 0; wr_input = 0; wr_data = 0;
    rd_layer = 0; rd_neuron = 0; rd_input = 0;
    upd_hold = 1; lr_shift = 4'(LR); batch_size = 8'(bsz[0]);
    clear_grads(ref_t);
    ref_t.net.w[0] = '{default: '{default: 0}};
    ref_t.net.w[1] = '{default: '{default: 0}};
    ref_t.net.w[2] = '{default: '{default: 0}};
    ref_t.net.b[0] = '{default: 0}; ref_t.net.b[1] = '{default: 0}; ref_t.net.b[2] = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < mh[l]; n++)
        for (int i = 0; i <= mw[l]; i++) begin
          @(negedge clk);
          wr_layer = 2'(l); wr_neuron = 5'(n); wr_input = 5'(i);
          wr_data = 14'($signed($urandom_range(0, 2400)) - 1200);
          if (i == mw[l]) ref_t.net.b[l][n] = longint'(wr_data);
          else            ref_t.net.w[l][n][i] = longint'(wr_data);
        end
    @(negedge clk);
    wr_en = 0;
    upd_hold = 0;
    for (int bi = 0; bi < NB; bi++) ns_total += bsz[bi];
    for (int j = 0; j < ns_total; j++) begin
      sy_i[j] = longint'($urandom_range(0, 400)) - 200;
      sy_q[j] = longint'($urandom_range(0, 400)) - 200;
      lab[j]  = 4'($urandom);
    end
    k = 0;
    for (int bi = 0; bi < NB; bi++) begin
      batch_size = 8'(bsz[bi]);
      for (int s = 0; s < bsz[bi]; s++) begin
        while (n_done <= k) @(negedge clk);
        train_sample(ref_t, sy_i[k], sy_q[k], lab[k], pr);
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (got_prob[k][j] != pr[j]) begin
            failures++;
            if (failures < 10) $display("batch %0d sample %0d bit %0d: %0d vs %0d", bi, k, j, got_prob[k][j], pr[j]);
          end
        end
        k++;
        // batch size for the next batch must be set before its first sample
        if (s == bsz[bi] - 1 && bi + 1 < NB) batch_size = 8'(bsz[bi + 1]);
      end
      while (int'(iterations) != bi + 1) @(negedge clk);
      upd_hold = 1;
      update(ref_t, LR);
      for (int l = 0; l < 3; l++)
        for (int n = 0; n < mh[l]; n++)
          for (int i = 0; i <= mw[l]; i++) begin
            rd_layer = 2'(l); rd_neuron = 5'(n); rd_input = 5'(i);
            #1;
            checks++;
            if (longint'(rd_data) != ((i == mw[l]) ? ref_t.net.b[l][n] : ref_t.net.w[l][n][i])) begin
              failures++;
              if (failures < 10)
                $display("after batch %0d weight %0d/%0d/%0d: %0d vs %0d", bi, l, n, i, rd_data,
                         (i == mw[l]) ? ref_t.net.b[l][n] : ref_t.net.w[l][n][i]);
            end
          end
      @(negedge clk);
      upd_hold = 0;
    end
    repeat (20) @(negedge clk);
    checks += 3;
    if (iterations != 32'(NB) || n_done != ns_total) failures++;
    if (!idle) failures++;
    if (overlap == 0) failures++;
    $display("cycles with forward and backward passes overlapping: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
