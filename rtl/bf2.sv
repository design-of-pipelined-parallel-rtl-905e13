// bf2: radix-2 butterfly with an optional trivial rotation of its lower input.
//
// Computes s = a + b' and d = a - b', where b' = b, or b' = -j*b when rot_b is
// high. Multiplying by -j needs no multiplier (swap real and imaginary parts and
// negate one of them), so the trivial twiddle factors W^(N/4) of the radix-2^k
// flow graph are merged into the butterfly that consumes them. The outputs are
// one bit wider than the inputs, so a butterfly never overflows.
//
// Purely combinational; the pipeline register after each butterfly lives in the
// datapath. The butterfly itself is the document's; merging the -j rotation
// into it is this design's choice, as the document's block diagram shows no
// separate unit for these trivial factors.
module bf2 #(
  parameter int unsigned W = 16            // input width of each real part
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  input  logic                rot_b,      // 1: use -j*b instead of b
  output logic signed [W:0]   s_re,
  output logic signed [W:0]   s_im,
  output logic signed [W:0]   d_re,
  output logic signed [W:0]   d_im
);

  logic signed [W:0] br, bi;   // rotated lower input, one bit wider (-(-2^(W-1)) fits)

  always_comb begin
    if (rot_b) begin
      // -j * (x + jy) = y - jx
      br = (W+1)'(b_im);
      bi = -(W+1)'(b_re);
    end else begin
      br = (W+1)'(b_re);
      bi = (W+1)'(b_im);
    end
    s_re = (W+1)'(a_re) + br;
    s_im = (W+1)'(a_im) + bi;
    d_re = (W+1)'(a_re) - br;
    d_im = (W+1)'(a_im) - bi;
  end

endmodule
