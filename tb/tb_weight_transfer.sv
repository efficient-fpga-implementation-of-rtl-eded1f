// tb_weight_transfer: the copy engine against a model of the training
// module's read port (random 14-bit parameters) and a recorder of the
// inference module's write port. Checks that the copy waits while
// other_busy is high, that all 388 parameters are written exactly once,
// each rounded and saturated to 9 bits, that busy lasts 388 cycles of
// copying, and that done and the copy counter follow. Saturation must occur.
module tb_weight_transfer;
  import ae_pkg::*;
  import ae_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, other_busy, busy, done, wr_en;
  logic [15:0] copies;
  logic [1:0] rd_layer, wr_layer;
  logic [4:0] rd_neuron, rd_input, wr_neuron, wr_input;
  logic signed [13:0] rd_data;
  logic signed [8:0] wr_data;
  int checks = 0, failures = 0, saturated = 0;
  longint src [3][16][17];
  longint dst [3][16][17];
  int wcount [3][16][17];

  always #5 clk = ~clk;

  weight_transfer dut (.*);

  assign rd_data = 14'(src[rd_layer % 3][rd_neuron % 16][rd_input % 17]);

  always @(negedge clk) if (rst_n && wr_en) begin
    dst[wr_layer][wr_neuron][wr_input] = longint'(wr_data);
    wcount[wr_layer][wr_neuron][wr_input]++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mw [3], mh [3], nbusy, total;
    mw = '{2, 16, 16};
    mh = '{16, 16, 4};
    start = 0; other_busy = 1;
    for (int round = 0; round < 2; round++) begin
      for (int l = 0; l < 3; l++)
        for (int n = 0; n < 16; n++)
          for (int i = 0; i < 17; i++) begin
            src[l][n][i] = longint'($urandom_range(0, 16383)) - 8192;
            dst[l][n][i] = 0;
            wcount[l][n][i] = 0;
          end
      src[0][0][0] = 8191;   // rounds up beyond the 9-bit range
      if (round == 0) begin
        repeat (3) @(negedge clk);
        rst_n = 1;
      end
      @(negedge clk);
      other_busy = 1;
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (20) begin
        @(negedge clk);
        checks++;
        if (wr_en) failures++;   // must not copy while the modules are busy
      end
      other_busy = 0;
      nbusy = 0;
      while (!done) begin
        @(negedge clk);
        if (busy) nbusy++;
      end
      checks++;
      // one cycle per parameter once the modules are free
      if (nbusy != 388) begin
        failures++;
        $display("busy for %0d cycles", nbusy);
      end
      @(negedge clk);
      total = 0;
      for (int l = 0; l < 3; l++)
        for (int n = 0; n < 16; n++)
          for (int i = 0; i < 17; i++) begin
            if (n < mh[l] && i <= mw[l]) begin
              checks += 2;
              total++;
              if (wcount[l][n][i] != 1) failures++;
              if (dst[l][n][i] != rq(src[l][n][i], 11, 6, 9)) begin
                failures++;
                if (failures < 10) $display("%0d/%0d/%0d: %0d vs %0d", l, n, i, dst[l][n][i], rq(src[l][n][i], 11, 6, 9));
              end
              if (rnd(src[l][n][i], 5) != rq(src[l][n][i], 11, 6, 9)) saturated++;
            end else begin
              checks++;
              if (wcount[l][n][i] != 0) failures++;
            end
          end
      checks += 2;
      if (total != 388) failures++;
      if (copies != 16'(round + 1)) failures++;
    end
    checks++;
    if (saturated == 0) failures++;
    $display("saturated parameters: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
