// tb_stream_fifo: random pushes and pops against a queue model. Checks the
// data order, the full/empty flags and that a word written is readable in
// the next cycle; both a full FIFO and an empty FIFO must occur.
module tb_stream_fifo;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0, saw_full = 0, saw_empty = 0;
  logic [7:0] q [$];

  always #5 clk = ~clk;

  stream_fifo #(.T(logic [7:0]), .DEPTH(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // phase 1 fills, phase 2 drains, phase 3 random
      in_valid  = (c < 1000) ? ($urandom_range(0, 3) != 0) :
                  (c < 2000) ? ($urandom_range(0, 3) == 0) : $urandom_range(0, 1);
      out_ready = (c < 1000) ? ($urandom_range(0, 3) == 0) :
                  (c < 2000) ? ($urandom_range(0, 3) != 0) : $urandom_range(0, 1);
      in_data   = 8'($urandom);
      checks++;
      if (in_ready != (q.size() < 4) || out_valid != (q.size() > 0) || int'(count) != q.size())
        failures++;
      if (q.size() == 4) saw_full++;
      if (q.size() == 0) saw_empty++;
      if (out_valid) begin
        checks++;
        if (out_data != q[0]) begin
          failures++;
          $display("data mismatch %h vs %h", out_data, q[0]);
        end
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks += 2;
    if (saw_full == 0) failures++;
    if (saw_empty == 0) failures++;
    $display("full seen %0d, empty seen %0d", saw_full, saw_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
