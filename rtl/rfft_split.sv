// rfft_split: turns one pair of packed-FFT bins into two bins of a real FFT.
//
// When a real sequence x of length 2M is packed as z(m) = x(2m) + j*x(2m+1)
// and Z is the M-point DFT of z, the 2M-point DFT of x follows from a bin
// pair (Z(k), Z(M-k)):
//   F = Z(k) + conj(Z(M-k)),  G = Z(k) - conj(Z(M-k)),  H = W_2M^k * G
//   X(k)   = (F - j*H) / 2
//   X(M-k) = conj(F + j*H) / 2
// Inputs are a = Z(k) and b = conj(Z(M-k)), the exponent e = k of
// W128 (2M = 128). One full complex multiplier (twiddle_cmult) forms H; the
// halving is rounded. Output width equals input width plus one.
//
// Timing: two register stages (the multiplier, then the output register),
// advancing only when en is high. The packing algorithm is named in the
// document as a way to compute a real FFT on a complex FFT; this unit and its
// formulas are this design's realisation of it.
module rfft_split #(
  parameter int unsigned ZW = 23,   // width of each real part of Z
  parameter int unsigned TW = 16    // coefficient width of the multiplier
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [ZW-1:0] a_re,
  input  logic signed [ZW-1:0] a_im,
  input  logic signed [ZW-1:0] b_re,
  input  logic signed [ZW-1:0] b_im,
  input  logic        [6:0]    e,
  output logic signed [ZW:0]   xk_re,   // X(k)
  output logic signed [ZW:0]   xk_im,
  output logic signed [ZW:0]   xp_re,   // X(M-k)
  output logic signed [ZW:0]   xp_im
);

  localparam int unsigned FW = ZW + 1;

  logic signed [FW-1:0] f_re, f_im, g_re, g_im;
  logic signed [FW-1:0] fq_re, fq_im;      // F delayed to line up with H
  logic signed [FW-1:0] h_re, h_im;
  logic signed [FW:0]   sk_re, sk_im, sp_re, sp_im;

  assign f_re = FW'(a_re) + FW'(b_re);
  assign f_im = FW'(a_im) + FW'(b_im);
  assign g_re = FW'(a_re) - FW'(b_re);
  assign g_im = FW'(a_im) - FW'(b_im);

  twiddle_cmult #(.W(FW), .TW(TW)) u_mul (
    .clk(clk), .en(en), .x_re(g_re), .x_im(g_im), .e(e), .y_re(h_re), .y_im(h_im));

  always_ff @(posedge clk) begin
    if (en) begin
      fq_re <= f_re;
      fq_im <= f_im;
    end
  end

  // F - jH = (Fr + Hi) + j(Fi - Hr);  conj(F + jH) = (Fr - Hi) - j(Fi + Hr)
  assign sk_re = (FW+1)'(fq_re) + (FW+1)'(h_im) + (FW+1)'(1);
  assign sk_im = (FW+1)'(fq_im) - (FW+1)'(h_re) + (FW+1)'(1);
  assign sp_re = (FW+1)'(fq_re) - (FW+1)'(h_im) + (FW+1)'(1);
  assign sp_im = -(FW+1)'(fq_im) - (FW+1)'(h_re) + (FW+1)'(1);

  always_ff @(posedge clk) begin
    if (en) begin
      xk_re <= FW'(sk_re >>> 1);
      xk_im <= FW'(sk_im >>> 1);
      xp_re <= FW'(sp_re >>> 1);
      xp_im <= FW'(sp_im >>> 1);
    end
  end

endmodule
