// tb_inference_module: the inference network in two configurations side
// by side: the default, fully parallel one (DOP 256 on the middle layer)
// and a fully serial one (SIMD = PE = 1 everywhere, DOP 1). Both get the
// same random 9-bit weights and random received symbols; every probability
// and hard bit is compared with the reference model. The tb also checks the
// cycle counts that follow from the folding: a symbol takes
// sum over layers of (NF*SF + 2) cycles, i.e. 9 cycles fully parallel and
// 358 fully serial, and the parallel configuration accepts a new symbol
// every 3 cycles (the slowest layer's NF*SF + 2). Output back-pressure is
// applied at random.
module tb_inference_module;
  import ae_pkg::*;
  import ae_ref_pkg::*;
  localparam int NSYM = 300;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [1:0] wr_layer;
  logic [4:0] wr_neuron, wr_input;
  logic signed [8:0] wr_data;
  logic weights_loaded = 0;
  int checks = 0, failures = 0;
  net_t net;
  longint sym_i [NSYM], sym_q [NSYM];
  bit done [2];

  always #5 clk = ~clk;

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int S1 = c ? 1 : 2, P1 = c ? 1 : 16;
    localparam int S2 = c ? 1 : 16, P2 = c ? 1 : 16;
    localparam int S3 = c ? 1 : 16, P3 = c ? 1 : 4;
    localparam int LAT = (16 / P1) * (2 / S1) + (16 / P2) * (16 / S2) + (4 / P3) * (16 / S3) + 6;
    logic in_valid, in_ready, out_valid, out_ready, busy;
    logic signed [11:0] in_y [2];
    logic [8:0] out_prob [4];
    logic [3:0] out_bits;
    int n_acc = 0;
    int accept_gap_min = 1000;

    inference_module #(
      .L1_SIMD(S1), .L1_PE(P1), .L2_SIMD(S2), .L2_PE(P2), .L3_SIMD(S3), .L3_PE(P3)
    ) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_y, .out_valid, .out_ready, .out_prob,
      .out_bits, .wr_en, .wr_layer, .wr_neuron, .wr_input, .wr_data, .busy
    );

    // stimulus
    initial begin
      int last;
      in_valid = 0; in_y[0] = 0; in_y[1] = 0;
      wait (weights_loaded);
      last = -1;
      for (int k = 0; k < NSYM; k++) begin
        @(negedge clk);
        in_y[0] = 12'(sym_i[k]);
        in_y[1] = 12'(sym_q[k]);
        in_valid = 1;
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk);
      in_valid = 0;
    end

    // gap between accepted symbols, with free output
    initial begin
      int t = 0, last = -1;
      wait (weights_loaded);
      forever begin
        @(negedge clk);
        t++;
        if (in_valid && in_ready) begin
          if (last >= 0 && t - last < accept_gap_min) accept_gap_min = t - last;
          last = t;
        end
      end
    end

    // latency of the first symbol
    initial begin
      int n;
      wait (weights_loaded);
      do @(negedge clk); while (!(in_valid && in_ready));
      n = 0;
      do begin @(negedge clk); n++; end while (!out_valid);
      checks++;
      if (n != LAT) begin
        failures++;
        $display("cfg %0d latency %0d expected %0d", c, n, LAT);
      end else $display("cfg %0d latency %0d cycles", c, n);
    end

    // checker
    initial begin
      longint pr [4];
      bit [3:0] hb;
      int got = 0;
      out_ready = 0;
      wait (weights_loaded);
      while (got < NSYM) begin
        @(negedge clk);
        // free-running output for the first half (throughput), then random
        out_ready = (got < NSYM / 2) ? 1'b1 : ($urandom_range(0, 3) != 0);
        if (out_valid && out_ready) begin
          infer(net, sym_i[got], sym_q[got], pr, hb);
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (longint'(out_prob[j]) != pr[j]) begin
              failures++;
              if (failures < 10)
                $display("cfg %0d sym %0d bit %0d: p=%0d expected %0d", c, got, j, out_prob[j], pr[j]);
            end
          end
          checks++;
          if (out_bits != hb) failures++;
          got++;
        end
      end
      if (c == 0) begin
        checks++;
        if (accept_gap_min != 3) begin
          failures++;
          $display("initiation interval %0d expected 3", accept_gap_min);
        end
      end
      done[c] = 1;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mw [3], mh [3];
    mw = '{2, 16, 16};
    mh = '{16, 16, 4};
    done[0] = 0; done[1] = 0;
    wr_en = 0; wr_layer = 0; wr_neuron = 0; wr_input = 0; wr_data = 0;
    for (int k = 0; k < NSYM; k++) begin
      sym_i[k] = longint'($urandom_range(0, 400)) - 200;
      sym_q[k] = longint'($urandom_range(0, 400)) - 200;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < 3; l++)
      for (int n = 0; n < mh[l]; n++)
        for (int i = 0; i <= mw[l]; i++) begin
          @(negedge clk);
          wr_en = 1; wr_layer = 2'(l); wr_neuron = 5'(n); wr_input = 5'(i);
          wr_data = 9'($signed($urandom_range(0, 200)) - 100);
          if (i == mw[l]) net.b[l][n] = longint'(wr_data);
          else            net.w[l][n][i] = longint'(wr_data);
        end
    @(negedge clk);
    wr_en = 0;
    weights_loaded = 1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
