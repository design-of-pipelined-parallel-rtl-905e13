// fft_pkg: constants and elaboration-time helpers shared by the FFT datapaths.
//
// Holds the transform size and parallelism of the 4-parallel 128-point
// feedforward FFT, the Q15 constants of the constant (CSD) twiddle multipliers,
// a canonical-signed-digit recoder used to build those multipliers from shifts
// and adds, and the quantised twiddle factors W128^e = exp(-j*2*pi*e/128) used
// by the full complex multiplier. Everything here is evaluated at elaboration;
// nothing in this package becomes logic on its own.
//
// The size (128 points, 4 samples per clock) follows the document; the number
// formats (Q15 constants, Q(TW-2) twiddles) are this design's choice.
package fft_pkg;

  localparam int unsigned FFT_N   = 128;  // transform size
  localparam int unsigned FFT_PAR = 4;    // samples accepted per clock

  // Q15 fixed-point constants of the CSD multipliers (value * 2^15, rounded).
  localparam int CSD_FRAC = 15;
  localparam int C4_Q15 = 23170;   // cos(pi/4)
  localparam int C8_Q15 = 30274;   // cos(pi/8)
  localparam int S8_Q15 = 12540;   // sin(pi/8)

  // Canonical signed digit of a positive constant at bit position 'pos':
  // returns +1, -1 or 0. Non-adjacent form: no two neighbouring digits are
  // non-zero, which minimises the number of adders in a shift-add multiplier.
  function automatic int csd_digit(input int value, input int pos);
    int v;
    int d;
    v = value;
    d = 0;
    for (int i = 0; i <= pos; i++) begin
      if ((v % 2) != 0) begin
        d = 2 - (v % 4);   // +1 if v mod 4 == 1, -1 if v mod 4 == 3
        v = v - d;
      end else begin
        d = 0;
      end
      v = v / 2;
    end
    return d;
  endfunction

  // Twiddle factor W128^e, real and imaginary part, scaled by 2^frac and rounded.
  function automatic int tw_re(input int e, input int frac);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(FFT_N);
    return int'($floor($cos(ang) * real'(1 << frac) + 0.5));
  endfunction

  function automatic int tw_im(input int e, input int frac);
    real ang;
    ang = 2.0 * 3.14159265358979323846 * real'(e) / real'(FFT_N);
    return int'($floor(-$sin(ang) * real'(1 << frac) + 0.5));
  endfunction

endpackage
