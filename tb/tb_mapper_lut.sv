// tb_mapper_lut: checks the reset table (Gray-coded 16-QAM, unit average
// energy, adjacent points differing in one bit) and table writes.
module tb_mapper_lut;
  logic clk = 0, rst_n = 0;
  logic [3:0] bits, wr_addr;
  logic signed [11:0] x_i, x_q, wr_i, wr_q;
  logic wr_en;
  int checks = 0, failures = 0;
  // Gray levels 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3, in units of 1/sqrt(10)
  int lvl [4] = '{-3, -1, 3, 1};

  always #5 clk = ~clk;
  mapper_lut dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    wr_en = 0; bits = 0; wr_addr = 0; wr_i = 0; wr_q = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    e = 0.0;
    for (int k = 0; k < 16; k++) begin
      bits = 4'(k);
      #1;
      checks += 2;
      if (x_i != 12'($rtoi($floor(lvl[k >> 2] * 128.0 / $sqrt(10.0) + 0.5)))) failures++;
      if (x_q != 12'($rtoi($floor(lvl[k & 3] * 128.0 / $sqrt(10.0) + 0.5)))) failures++;
      e += (real'(x_i) * real'(x_i) + real'(x_q) * real'(x_q)) / (128.0 * 128.0);
    end
    checks++;
    if (e / 16.0 < 0.98 || e / 16.0 > 1.02) begin
      failures++;
      $display("average energy %f", e / 16.0);
    end
    // write new points and read them back
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(k); wr_i = 12'(k * 17 - 100); wr_q = 12'(50 - k * 9);
    end
    @(negedge clk);
    wr_en = 0;
    for (int k = 0; k < 16; k++) begin
      bits = 4'(k);
      #1;
      checks++;
      if (x_i != 12'(k * 17 - 100) || x_q != 12'(50 - k * 9)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
