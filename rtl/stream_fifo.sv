// stream_fifo: synchronous FIFO with valid/ready handshakes on both sides.
//
// Used between the stages of the training datapath: it holds the feature
// maps a layer saves during the forward pass until its backward pass needs
// them, the labels that wait for the network output, and the error terms
// passed from one layer's backward pass to the next (the document states
// that error terms travel between layers through FIFOs).
//
// Interface: a word is written when in_valid && in_ready and read when
// out_valid && out_ready. out_data shows the oldest word (first-word
// fall-through), so a word written in one cycle can be read in the next.
// in_ready is low when DEPTH words are stored. DEPTH must be a power of two
// of at least 2. Storage is a plain array; count gives the fill level.
// Lint note: rst_n is reported as used both as an asynchronous reset and
// synchronously. The flip-flops use it only asynchronously; the synchronous
// use is the 'disable iff' of the handshake assertions, which is not logic.
module stream_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  T                         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output T                         out_data,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("stream_fifo: DEPTH must be a power of two >= 2");

  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  logic push, pop;
  assign in_ready  = (count != (AW + 1)'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW + 1)'(push) - (AW + 1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (AW + 1)'(DEPTH));
endmodule
