// mapper_lut: the trained mapper as a look-up table, mapping 4 bits to one
// complex constellation point x = (I, Q).
//
// The mapper network is trained in software and then frozen; the document
// keeps its result as a look-up table in the implementation. Its 16 learned
// points are not listed numerically, so the table is writable and resets to
// Gray-labelled 16-QAM with unit average energy (levels +-1/sqrt(10),
// +-3/sqrt(10)), which the document reports the learned constellations
// approach at high SNR. Bits [3:2] select I, bits [1:0] select Q, each with
// the Gray code 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3. These values and the
// layout are this design's choice.
//
// Interface: combinational look-up (bits -> x_i, x_q in the SYM_W/SYM_FRAC
// symbol format); wr_en writes entry wr_addr on the clock edge.
module mapper_lut
  import ae_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_OUT-1:0]           bits,
  output logic signed [SYM_W-1:0]    x_i,
  output logic signed [SYM_W-1:0]    x_q,
  input  logic                       wr_en,
  input  logic [N_OUT-1:0]           wr_addr,
  input  logic signed [SYM_W-1:0]    wr_i,
  input  logic signed [SYM_W-1:0]    wr_q
);
  localparam int unsigned M = 1 << N_OUT;

  logic signed [SYM_W-1:0] tab_i [M];
  logic signed [SYM_W-1:0] tab_q [M];

  // Gray-coded 16-QAM level of a bit pair, scaled by 2^SYM_FRAC / sqrt(10):
  // 1/sqrt(10) = 0.316228, 3/sqrt(10) = 0.948683.
  function automatic logic signed [SYM_W-1:0] qam_level(logic [1:0] b);
    localparam int L1 = (316228 * (1 << SYM_FRAC) + 500000) / 1000000;
    localparam int L3 = (948683 * (1 << SYM_FRAC) + 500000) / 1000000;
    unique case (b)
      2'b00:   return SYM_W'(-L3);
      2'b01:   return SYM_W'(-L1);
      2'b11:   return SYM_W'(L1);
      default: return SYM_W'(L3);
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < M; k++) begin
        tab_i[k] <= qam_level(2'(k >> 2));
        tab_q[k] <= qam_level(2'(k));
      end
    end else if (wr_en) begin
      tab_i[wr_addr] <= wr_i;
      tab_q[wr_addr] <= wr_q;
    end
  end

  assign x_i = tab_i[bits];
  assign x_q = tab_q[bits];
endmodule
