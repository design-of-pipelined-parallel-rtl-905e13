// twiddle_rom: table of the twiddle factors W128^e = exp(-j*2*pi*e/128).
//
// A 128-entry constant table, indexed by the exponent e, holding
// round(cos(2*pi*e/128) * 2^(TW-2)) and round(-sin(2*pi*e/128) * 2^(TW-2)).
// The values are computed at elaboration from the formula, so the table is a
// constant ROM (combinational read). Q(TW-2) lets 1.0 be represented exactly.
// The format is this design's choice; the document only states that a full
// complex multiplier applies the non-trivial twiddle factors.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned TW = 16   // coefficient width
) (
  input  logic        [6:0]    e,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);

  logic signed [TW-1:0] rom_re [FFT_N];
  logic signed [TW-1:0] rom_im [FFT_N];

  for (genvar i = 0; i < int'(FFT_N); i++) begin : g_rom
    assign rom_re[i] = TW'(tw_re(i, int'(TW) - 2));
    assign rom_im[i] = TW'(tw_im(i, int'(TW) - 2));
  end

  assign w_re = rom_re[e];
  assign w_im = rom_im[e];

endmodule
