// tb_rfft_split: checks the real-FFT split unit against the packing formulas.
//
// For random real 16-point sequences x (packed into 8 complex z), the unit is
// fed the pairs (Z(k), conj(Z(8-k))) with exponent e = 8k of W128 (= W16^k)
// and must return X(k) and X(8-k) of the 16-point real DFT, two clocks later,
// holding its state while en is low.
module tb_rfft_split;
  localparam int ZW = 20;
  logic clk = 1'b0, en = 1'b0;
  logic signed [ZW-1:0] a_re, a_im, b_re, b_im;
  logic [6:0] e;
  logic signed [ZW:0] xk_re, xk_im, xp_re, xp_im;
  int checks = 0, failures = 0;

  rfft_split #(.ZW(ZW)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  real x [16];
  real a;
  real zr [8], zi [8];
  real xr [16], xi [16];
  // expected results of the pair presented now (index 0) and at the two
  // previous accepted clocks
  real p_kr [3], p_ki [3], p_pr [3], p_pi [3];
  bit  p_v [3] = '{1'b0, 1'b0, 1'b0};
  real c_kr, c_ki, c_pr, c_pi;
  bit  c_v = 1'b0;
  int  presented = 0, compared = 0;

  initial begin
    a_re = '0; a_im = '0; b_re = '0; b_im = '0; e = '0;
    for (int trial = 0; trial < 60; trial++) begin
      for (int n = 0; n < 16; n++) x[n] = real'(int'($urandom % 20001) - 10000);
      for (int k = 0; k < 8; k++) begin
        zr[k] = 0.0; zi[k] = 0.0;
        for (int m = 0; m < 8; m++) begin
          a = -2.0 * 3.14159265358979323846 * real'((m * k) % 8) / 8.0;
          zr[k] += x[2*m] * $cos(a) - x[2*m+1] * $sin(a);
          zi[k] += x[2*m] * $sin(a) + x[2*m+1] * $cos(a);
        end
      end
      for (int k = 0; k < 16; k++) begin
        xr[k] = 0.0; xi[k] = 0.0;
        for (int n = 0; n < 16; n++) begin
          a = -2.0 * 3.14159265358979323846 * real'((n * k) % 16) / 16.0;
          xr[k] += x[n] * $cos(a);
          xi[k] += x[n] * $sin(a);
        end
      end
      for (int k = 0; k <= 4; k++) begin
        // present one pair; random idle clocks with en low in between
        @(negedge clk);
        while (($urandom % 3) == 0) begin
          en = 1'b0;
          @(negedge clk);
        end
        en = 1'b1;
        a_re = ZW'($rtoi(zr[k]));           a_im = ZW'($rtoi(zi[k]));
        b_re = ZW'($rtoi(zr[(8 - k) % 8])); b_im = -ZW'($rtoi(zi[(8 - k) % 8]));
        e = 7'(8 * k);
        c_kr = xr[k];     c_ki = xi[k];
        c_pr = xr[8 - k]; c_pi = xi[8 - k];
        c_v = 1'b1;
        presented++;
      end
    end
    @(negedge clk);
    c_v = 1'b0;
    a_re = '0; a_im = '0; b_re = '0; b_im = '0;
    repeat (4) @(negedge clk);
    checks++;
    if (compared != presented) begin failures++; $display("FAIL: %0d of %0d compared", compared, presented); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // results emerge after two accepted clocks
  always @(posedge clk) begin
    if (en) begin
      if (p_v[1]) begin
        compared++;
        checks++;
        if (absr(real'(xk_re) - p_kr[1]) > 3.0 || absr(real'(xk_im) - p_ki[1]) > 3.0 ||
            absr(real'(xp_re) - p_pr[1]) > 3.0 || absr(real'(xp_im) - p_pi[1]) > 3.0) begin
          failures++;
          if (failures < 10) $display("FAIL: got (%0d,%0d) (%0d,%0d) expected (%f,%f) (%f,%f)",
                                      xk_re, xk_im, xp_re, xp_im, p_kr[1], p_ki[1], p_pr[1], p_pi[1]);
        end
      end
      p_kr[1] = p_kr[0]; p_ki[1] = p_ki[0]; p_pr[1] = p_pr[0]; p_pi[1] = p_pi[0]; p_v[1] = p_v[0];
      p_kr[0] = c_kr;    p_ki[0] = c_ki;    p_pr[0] = c_pr;    p_pi[0] = c_pi;    p_v[0] = c_v;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
