// tb_twiddle_cmult: checks x * W128^e of the full complex multiplier for all
// 128 exponents with random data and random stalls, including the one-clock
// latency and that the output holds while en is low.
module tb_twiddle_cmult;
  localparam int W = 18;
  // rounding (0.5 LSB per part) plus the Q14 coefficient quantisation
  real tol;
  logic clk = 1'b0, en = 1'b0;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  logic [6:0] e;
  int checks = 0, failures = 0;
  real exp_re, exp_im;
  bit  have = 1'b0;

  twiddle_cmult #(.W(W), .TW(16)) dut (.*);
  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (absr(real'(y_re) - exp_re) > tol || absr(real'(y_im) - exp_im) > tol) begin
          failures++;
          if (failures < 10) $display("FAIL: got (%0d,%0d) expected (%f,%f)", y_re, y_im, exp_re, exp_im);
        end
      end
      en = (($urandom % 4) != 0);
      x_re = W'(int'($urandom % 184001) - 92000);
      x_im = W'(int'($urandom % 184001) - 92000);
      e = 7'(i);
      if (en) begin
        real a;
        a = -2.0 * 3.14159265358979323846 * real'(e) / 128.0;
        exp_re = real'(x_re) * $cos(a) - real'(x_im) * $sin(a);
        exp_im = real'(x_re) * $sin(a) + real'(x_im) * $cos(a);
        tol = 1.0 + 6.2e-5 * (absr(real'(x_re)) + absr(real'(x_im)));
        have = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
