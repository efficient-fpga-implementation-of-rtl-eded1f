// tb_sigmoid_pwl: exhaustive check of the piecewise-linear sigmoid.
// Every 12-bit input (7 fraction bits) is compared with the reference
// model (exact match) and with the true sigmoid (error below 0.02 plus one
// output LSB). The training configuration (14-bit input, 9 fraction bits,
// 10 output fraction bits) is checked on a sweep as well.
module tb_sigmoid_pwl;
  import ae_ref_pkg::*;
  logic signed [11:0] x;
  logic [8:0]         y;
  logic signed [13:0] xt;
  logic [10:0]        yt;
  int checks = 0, failures = 0;

  sigmoid_pwl #(.IN_W(12), .IN_FRAC(7), .OUT_FRAC(8)) dut (.x(x), .y(y));
  sigmoid_pwl #(.IN_W(14), .IN_FRAC(9), .OUT_FRAC(10)) dut_t (.x(xt), .y(yt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, s, err;
    for (int v = -2048; v < 2048; v++) begin
      x = 12'(v);
      #1;
      checks++;
      if (longint'(y) != sigm(v, 7, 8)) begin
        failures++;
        if (failures < 10) $display("mismatch x=%0d y=%0d ref=%0d", v, y, sigm(v, 7, 8));
      end
      xr  = real'(v) / 128.0;
      s   = 1.0 / (1.0 + $exp(-xr));
      err = real'(y) / 256.0 - s;
      if (err < 0) err = -err;
      checks++;
      if (err > 0.02 + 1.0 / 256.0) begin
        failures++;
        if (failures < 10) $display("approximation error %f at x=%f", err, xr);
      end
    end
    for (int v = -8192; v < 8192; v += 7) begin
      xt = 14'(v);
      #1;
      checks++;
      if (longint'(yt) != sigm(v, 9, 10)) begin
        failures++;
        if (failures < 10) $display("mismatch (train) x=%0d y=%0d ref=%0d", v, yt, sigm(v, 9, 10));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
