// tb_csd_twiddle: checks x * W16^m of the CSD twiddle multiplier for every
// exponent (full W16 version) and every even exponent (W8-only version),
// against a double-precision product.
module tb_csd_twiddle;
  localparam int W = 16;
  localparam real TOL = 2.0;
  logic signed [W-1:0] x_re, x_im;
  logic [3:0] m;
  logic signed [W-1:0] f_re, f_im, e_re, e_im;
  int checks = 0, failures = 0;

  csd_twiddle #(.W(W), .FULL_W16(1'b1)) dut_f (.x_re(x_re), .x_im(x_im), .m(m), .y_re(f_re), .y_im(f_im));
  csd_twiddle #(.W(W), .FULL_W16(1'b0)) dut_e (.x_re(x_re), .x_im(x_im), .m({m[3:1], 1'b0}), .y_re(e_re), .y_im(e_im));

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  task automatic check(string tag, int mm, int yr, int yi);
    real a, er, ei;
    a = -2.0 * 3.14159265358979323846 * real'(mm) / 16.0;
    er = real'(x_re) * $cos(a) - real'(x_im) * $sin(a);
    ei = real'(x_re) * $sin(a) + real'(x_im) * $cos(a);
    checks++;
    if (absr(real'(yr) - er) > TOL || absr(real'(yi) - ei) > TOL) begin
      failures++;
      if (failures < 10) $display("FAIL %s: x=(%0d,%0d) m=%0d got (%0d,%0d) expected (%f,%f)",
                                  tag, x_re, x_im, mm, yr, yi, er, ei);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      // magnitude below 2^(W-1): each part within +-23000
      x_re = W'(int'($urandom % 46001) - 23000);
      x_im = W'(int'($urandom % 46001) - 23000);
      m = 4'(i % 16);
      #1;
      check("W16", int'(m), int'(f_re), int'(f_im));
      check("W8", int'({m[3:1], 1'b0}), int'(e_re), int'(e_im));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
