// csd_twiddle: constant twiddle multiplier y = x * W16^m, built from CSD multipliers.
//
// W16 = exp(-j*2*pi/16). The exponent m (0..15) is split into a quadrant
// q = m[3:2], a rotation by (-j)^q that needs no multiplier, and a residue
// r = m[1:0] handled by fixed shift-add multipliers:
//   r = 1: x*(C - jS)      r = 2: x*c4*(1 - j)      r = 3: x*(S - jC)
// with C = cos(pi/8), S = sin(pi/8), c4 = cos(pi/4). These are exactly the
// constants the document names for its constant multiplier stages.
// With FULL_W16 = 0 only even exponents (the W8 powers W8^1, W8^3 used after
// the first butterfly stage) are supported and only the cos(pi/4) multipliers
// are built; m[0] must then be 0.
//
// Combinational. Output width equals input width: rotation keeps the magnitude,
// so a value whose magnitude is below 2^(W-1) stays in range; the top bits of
// the widened intermediate products are therefore never needed and are left
// unread, and with FULL_W16 = 0 m[0] is unread too. The split into
// quadrant and residue is this design's choice.
module csd_twiddle
  import fft_pkg::*;
#(
  parameter int unsigned W        = 16,  // width of each real part
  parameter bit          FULL_W16 = 1'b1 // 1: all W16 powers, 0: W8 powers only
) (
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  logic        [3:0]   m,         // exponent of W16
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  // residue rotation
  logic signed [W:0]   sum_ab, dif_ba;     // a+b and b-a, one bit wider
  logic signed [W:0]   c4_sum, c4_dif;
  logic signed [W-1:0] r_re, r_im;

  assign sum_ab = (W+1)'(x_re) + (W+1)'(x_im);
  assign dif_ba = (W+1)'(x_im) - (W+1)'(x_re);

  csd_const_mult #(.W(W+1), .COEF(C4_Q15), .FRAC(CSD_FRAC)) u_c4_s (.x(sum_ab), .y(c4_sum));
  csd_const_mult #(.W(W+1), .COEF(C4_Q15), .FRAC(CSD_FRAC)) u_c4_d (.x(dif_ba), .y(c4_dif));

  if (FULL_W16) begin : g_w16
    logic signed [W-1:0] ac, as_, bc, bs;
    logic signed [W:0]   t1_re, t1_im, t3_re, t3_im;
    csd_const_mult #(.W(W), .COEF(C8_Q15), .FRAC(CSD_FRAC)) u_ac (.x(x_re), .y(ac));
    csd_const_mult #(.W(W), .COEF(S8_Q15), .FRAC(CSD_FRAC)) u_as (.x(x_re), .y(as_));
    csd_const_mult #(.W(W), .COEF(C8_Q15), .FRAC(CSD_FRAC)) u_bc (.x(x_im), .y(bc));
    csd_const_mult #(.W(W), .COEF(S8_Q15), .FRAC(CSD_FRAC)) u_bs (.x(x_im), .y(bs));
    assign t1_re = (W+1)'(ac) + (W+1)'(bs);    // (a+jb)(C-jS)
    assign t1_im = (W+1)'(bc) - (W+1)'(as_);
    assign t3_re = (W+1)'(as_) + (W+1)'(bc);   // (a+jb)(S-jC)
    assign t3_im = (W+1)'(bs) - (W+1)'(ac);
    always_comb begin
      unique case (m[1:0])
        2'd0:    begin r_re = x_re;       r_im = x_im;       end
        2'd1:    begin r_re = W'(t1_re);  r_im = W'(t1_im);  end
        2'd2:    begin r_re = W'(c4_sum); r_im = W'(c4_dif); end
        default: begin r_re = W'(t3_re);  r_im = W'(t3_im);  end
      endcase
    end
  end else begin : g_w8
    always_comb begin
      if (m[1]) begin r_re = W'(c4_sum); r_im = W'(c4_dif); end
      else      begin r_re = x_re;       r_im = x_im;       end
    end
  end

  // quadrant rotation by (-j)^q; the extra bit of the negation is dropped,
  // which only matters for the value -2^(W-1) that the magnitude bound excludes
  always_comb begin
    unique case (m[3:2])
      2'd0:    begin y_re = r_re;  y_im = r_im;  end
      2'd1:    begin y_re = r_im;  y_im = -r_re; end
      2'd2:    begin y_re = -r_re; y_im = -r_im; end
      default: begin y_re = -r_im; y_im = r_re;  end
    endcase
  end

endmodule
