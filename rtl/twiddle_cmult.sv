// twiddle_cmult: full complex multiplier y = x * W128^e with its twiddle ROM.
//
// The exponent e selects a coefficient from twiddle_rom; four real multipliers
// and two adders form the complex product, which is rounded half-up back to
// the input width and registered. Latency: one clock (the register advances
// only when en is high). Rotation keeps the magnitude, so inputs whose
// magnitude is below 2^(W-1) stay in range. The document places one such
// multiplier on each lane between the third and fourth butterfly stages; its
// inner structure (four multipliers, rounding, one register) is this design's
// choice.
module twiddle_cmult #(
  parameter int unsigned W  = 16,  // width of each real part
  parameter int unsigned TW = 16   // coefficient width, Q(TW-2)
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  logic        [6:0]   e,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);

  localparam int unsigned PW = W + TW + 1;   // product-sum width
  localparam int unsigned FR = TW - 2;       // coefficient fraction bits

  logic signed [TW-1:0] w_re, w_im;
  logic signed [PW-1:0] p_re, p_im;

  twiddle_rom #(.TW(TW)) u_rom (.e(e), .w_re(w_re), .w_im(w_im));

  always_comb begin
    p_re = PW'(x_re) * PW'(w_re) - PW'(x_im) * PW'(w_im) + (PW'(1) <<< (FR - 1));
    p_im = PW'(x_re) * PW'(w_im) + PW'(x_im) * PW'(w_re) + (PW'(1) <<< (FR - 1));
  end

  always_ff @(posedge clk) begin
    if (en) begin
      y_re <= W'(p_re >>> FR);
      y_im <= W'(p_im >>> FR);
    end
  end

endmodule
