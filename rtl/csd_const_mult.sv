// csd_const_mult: multiply a signed value by a fixed fraction using shifts and adds.
//
// y = round(x * COEF / 2^FRAC), with COEF a positive integer below 2^FRAC (a
// constant between 0 and 1). COEF is recoded at elaboration into canonical
// signed digits; each non-zero digit adds or subtracts one shifted copy of x,
// so the block contains only adders, as the document's "constant CSD
// multipliers" do. Rounding is half-up (add 2^(FRAC-1) before the shift).
// Output width equals input width; |COEF / 2^FRAC| < 1 keeps it in range.
// Combinational.
module csd_const_mult
  import fft_pkg::*;
#(
  parameter int unsigned W    = 16,      // data width
  parameter int          COEF = C4_Q15,  // constant, scaled by 2^FRAC
  parameter int unsigned FRAC = 15       // fraction bits of COEF
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  localparam int unsigned AW = W + FRAC + 2;   // accumulator width

  logic signed [AW-1:0] xe, acc;

  always_comb begin
    xe  = AW'(x);
    acc = AW'(1) <<< (FRAC - 1);               // rounding constant
    for (int i = 0; i <= int'(FRAC); i++) begin
      if (csd_digit(COEF, i) > 0)      acc = acc + (xe <<< i);
      else if (csd_digit(COEF, i) < 0) acc = acc - (xe <<< i);
    end
    y = W'(acc >>> FRAC);
  end

endmodule
