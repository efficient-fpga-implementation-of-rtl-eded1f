// tb_fc_layer: a folded 16 x 16 layer (SIMD 4, PE 8, so 2 x 4 fold steps)
// with ReLU. Loads random weights and biases, sends random input vectors
// and compares every output with the reference model. Checks the latency
// (NF*SF + 2 cycles from the cycle a vector is taken to the first cycle its result is valid), that a stalled
// output holds its value, and that the layer takes the next vector while
// its output waits.
module tb_fc_layer;
  import ae_pkg::*;
  import ae_ref_pkg::*;
  localparam int MW = 16, MH = 16, SIMD = 4, PE = 8;
  localparam int LAT = (MH / PE) * (MW / SIMD) + 2;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, wr_en, busy;
  logic signed [11:0] in_data [MW];
  logic signed [11:0] out_data [MH];
  logic [4:0] wr_neuron, wr_input;
  logic signed [8:0] wr_data;
  int checks = 0, failures = 0, overlap = 0;
  mat_t w; vec_t b;
  vec_t expv [200];

  always #5 clk = ~clk;

  fc_layer #(.MW(MW), .MH(MH), .SIMD(SIMD), .PE(PE), .RELU(1'b1)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker with random back-pressure; everything is driven and
  // sampled at the falling edge, a transfer happens at the next rising edge
  initial begin
    vec_t e;
    int got = 0;
    bit stalled = 0;
    logic signed [11:0] held [MH];
    out_ready = 0;
    wait (rst_n);
    while (got < 200) begin
      @(negedge clk);
      if (stalled) begin
        checks++;
        if (!out_valid || held != out_data) failures++;
        if (busy) overlap++;   // the layer works on the next vector meanwhile
      end
      out_ready = ($urandom_range(0, 2) != 0);
      stalled = out_valid && !out_ready;
      held = out_data;
      if (out_valid && out_ready) begin
        e = expv[got];
        for (int n = 0; n < MH; n++) begin
          checks++;
          if (longint'(out_data[n]) != e[n]) begin
            failures++;
            if (failures < 10) $display("vec %0d neuron %0d: %0d expected %0d", got, n, out_data[n], e[n]);
          end
        end
        got++;
      end
    end
    checks++;
    if (overlap == 0) failures++;
    $display("stalls with next vector in progress: %0d", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency check: first valid after an acceptance into an empty layer
  initial begin
    int n;
    wait (rst_n);
    do @(negedge clk); while (!(in_valid && in_ready));
    n = 0;
    do begin @(negedge clk); n++; end while (!out_valid);
    checks++;
    if (n != LAT) begin
      failures++;
      $display("latency %0d expected %0d", n, LAT);
    end
  end

  initial begin
    vec_t x, y;
    bit m [MAXN];
    in_valid = 0; wr_en = 0; wr_neuron = 0; wr_input = 0; wr_data = 0;
    for (int i = 0; i < MW; i++) in_data[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    w = '{default: '{default: 0}};
    b = '{default: 0};
    for (int n = 0; n < MH; n++)
      for (int i = 0; i <= MW; i++) begin
        @(negedge clk);
        wr_en = 1; wr_neuron = 5'(n); wr_input = 5'(i);
        wr_data = 9'($signed($urandom_range(0, 511)) - 256);
        if (i == MW) b[n] = longint'(wr_data); else w[n][i] = longint'(wr_data);
      end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 200; k++) begin
      x = '{default: 0};
      for (int i = 0; i < MW; i++) begin
        x[i] = longint'($urandom_range(0, 767)) - 384;
        in_data[i] = 12'(x[i]);
      end
      layer_fwd(w, b, x, MW, MH, 7, 6, 7, 12, 1, y, m);
      expv[k] = y;
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 12)) @(negedge clk);
    end
  end
endmodule
