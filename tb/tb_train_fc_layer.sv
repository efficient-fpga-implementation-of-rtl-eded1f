// tb_train_fc_layer: one 16 x 16 training layer with ReLU, folded as
// SIMD 4 x PE 8, feature-map FIFO of 4. Per round it
//   - loads random 14-bit weights (first round only),
//   - runs 6 forward passes (the 5th must wait: the saved feature maps fill
//     the FIFO) and compares the outputs with the reference model,
//   - runs the 6 backward passes with random error terms and compares the
//     propagated errors (ReLU mask applied), checking the backward cycle
//     count NF*SF + 2,
//   - applies a weight update and reads every weight and bias back through
//     the read port against the reference W -= round(sum(grad) * 2^-lr).
module tb_train_fc_layer;
  import ae_pkg::*;
  import ae_ref_pkg::*;
  localparam int MW = 16, MH = 16, SIMD = 4, PE = 8, NS = 6, LR = 3;
  localparam int BLAT = (MH / PE) * (MW / SIMD) + 2;

  logic clk = 0, rst_n = 0;
  logic fwd_in_valid, fwd_in_ready, fwd_out_valid, fwd_out_ready;
  logic signed [13:0] fwd_in_data [MW];
  logic signed [13:0] fwd_out_data [MH];
  logic bwd_in_valid, bwd_in_ready, bwd_out_valid, bwd_out_ready, bwd_done;
  logic signed [12:0] bwd_in_data [MH];
  logic signed [12:0] bwd_out_data [MW];
  logic upd_start, upd_busy, upd_done, wr_en, fwd_busy, bwd_busy;
  logic [3:0] lr_shift;
  logic [4:0] wr_neuron, wr_input, rd_neuron, rd_input;
  logic signed [13:0] wr_data, rd_data;
  int checks = 0, failures = 0, fm_full_stalls = 0;
  mat_t w, g; vec_t b, gb;

  always #5 clk = ~clk;

  train_fc_layer #(.MW(MW), .MH(MH), .SIMD(SIMD), .PE(PE), .RELU(1'b1), .BWD_OUT(1'b1),
                   .FM_DEPTH(4)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  vec_t xs [NS], ys [NS];
  bit   ms [NS][MAXN];
  int   fcount, fsent;

  task automatic send_fwd(int k);
    for (int i = 0; i < MW; i++) begin
      xs[k][i] = longint'($urandom_range(0, 2000)) - 1000;
      fwd_in_data[i] = 14'(xs[k][i]);
    end
    for (int i = MW; i < MAXN; i++) xs[k][i] = 0;
    layer_fwd(w, b, xs[k], MW, MH, 9, 11, 9, 14, 1, ys[k], ms[k]);
    fwd_in_valid = 1;
    while (!fwd_in_ready) @(negedge clk);
    @(negedge clk);
    fwd_in_valid = 0;
    fsent++;
  endtask

  // forward outputs are always accepted, so each is valid for one cycle
  initial begin
    forever begin
      @(negedge clk);
      if (fwd_out_valid) begin
        for (int n = 0; n < MH; n++) begin
          checks++;
          if (longint'(fwd_out_data[n]) != ys[fcount][n]) begin
            failures++;
            if (failures < 10) $display("fwd %0d/%0d: %0d vs %0d", fcount, n, fwd_out_data[n], ys[fcount][n]);
          end
        end
        fcount++;
      end
    end
  end

  initial begin
    vec_t d, e;
    int   n_cyc;
    fwd_in_valid = 0; fwd_out_ready = 1; bwd_in_valid = 0; bwd_out_ready = 1;
    upd_start = 0; lr_shift = 4'(LR); wr_en = 0; wr_neuron = 0; wr_input = 0; wr_data = 0;
    rd_neuron = 0; rd_input = 0;
    for (int i = 0; i < MW; i++) fwd_in_data[i] = 0;
    for (int n = 0; n < MH; n++) bwd_in_data[n] = 0;
    g = '{default: '{default: 0}}; gb = '{default: 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < MH; n++)
      for (int i = 0; i <= MW; i++) begin
        @(negedge clk);
        wr_en = 1; wr_neuron = 5'(n); wr_input = 5'(i);
        wr_data = 14'($signed($urandom_range(0, 2048)) - 1024);
        if (i == MW) b[n] = longint'(wr_data); else w[n][i] = longint'(wr_data);
      end
    @(negedge clk);
    wr_en = 0;

    for (int round = 0; round < 3; round++) begin
      fcount = 0;
      // forward passes 0..4; the 5th waits for room in the feature-map FIFO
      fsent = 0;
      for (int k = 0; k < 5; k++) send_fwd(k);
      repeat (40) @(negedge clk);
      checks++;
      if (!fwd_busy || fcount != 4) begin
        failures++;
        $display("forward pass did not wait for the feature-map FIFO");
      end else fm_full_stalls++;

      // backward passes in order; the 6th forward pass goes in after the first
      for (int k = 0; k < NS; k++) begin
        for (int n = 0; n < MH; n++) begin
          d[n] = longint'($urandom_range(0, 1000)) - 500;
          bwd_in_data[n] = 13'(d[n]);
        end
        // reference: mask, gradients, propagated error
        for (int n = 0; n < MH; n++) if (!ms[k][n]) d[n] = 0;
        e = '{default: 0};
        for (int n = 0; n < MH; n++) begin
          gb[n] += d[n];
          for (int i = 0; i < MW; i++) begin
            g[n][i] += d[n] * xs[k][i];
            e[i] += w[n][i] * d[n];
          end
        end
        bwd_in_valid = 1;
        while (!bwd_in_ready) @(negedge clk);
        @(negedge clk);
        bwd_in_valid = 0;
        n_cyc = 1;
        while (!bwd_out_valid) begin
          @(negedge clk);
          n_cyc++;
        end
        checks++;
        if (n_cyc != BLAT) begin
          failures++;
          $display("backward latency %0d expected %0d", n_cyc, BLAT);
        end
        for (int i = 0; i < MW; i++) begin
          checks++;
          if (longint'(bwd_out_data[i]) != rq(e[i], 21, 10, 13)) begin
            failures++;
            if (failures < 10) $display("bwd %0d/%0d: %0d vs %0d", k, i, bwd_out_data[i], rq(e[i], 21, 10, 13));
          end
        end
        if (k == 0) send_fwd(5);
      end
      checks++;
      if (fcount != NS) failures++;
      repeat (20) @(negedge clk);

      // weight update
      upd_start = 1;
      @(negedge clk);
      upd_start = 0;
      while (!upd_done) @(negedge clk);
      for (int n = 0; n < MH; n++) begin
        b[n] = clip(b[n] - rnd(gb[n] * 2, LR), 14);
        for (int i = 0; i < MW; i++) w[n][i] = clip(w[n][i] - rnd(g[n][i], 8 + LR), 14);
      end
      g = '{default: '{default: 0}}; gb = '{default: 0};
      @(negedge clk);
      for (int n = 0; n < MH; n++)
        for (int i = 0; i <= MW; i++) begin
          rd_neuron = 5'(n); rd_input = 5'(i);
          #1;
          checks++;
          if (longint'(rd_data) != ((i == MW) ? b[n] : w[n][i])) begin
            failures++;
            if (failures < 10) $display("weight %0d/%0d: %0d vs %0d", n, i, rd_data, (i == MW) ? b[n] : w[n][i]);
          end
        end
    end
    checks++;
    if (fm_full_stalls == 0) failures++;
    $display("feature-map FIFO full: %0d", fm_full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
