// tb_cfft_datapath: checks one 2-sample datapath on its own.
//
// Each datapath is a 2-parallel 64-point FFT: fed with u = e(2t), l = e(2t+1)
// it delivers, 54 accepted clocks later, at output phase tau the bins
// k = kb + 32*lane with kb = bitrev4(tau[3:0]) + 16*tau[4]. The even datapath
// (DP = 0) yields the plain 64-point DFT E(k); the odd one (DP = 1) yields
// W128^kb * O(k), the odd-sample twiddles of the final 128-point stage except
// its -j factor. Both are checked against double-precision references, with
// random stalls.
module tb_cfft_datapath;
  localparam int IW = 17;
  localparam int M = 64;
  localparam int NFRAMES = 5;
  localparam int LAT = 54;
  logic clk = 1'b0, en = 1'b0;
  logic [4:0] cnt = '0;
  logic signed [IW-1:0] u_re, u_im, l_re, l_im;
  logic signed [IW+5:0] o0u_re, o0u_im, o0l_re, o0l_im, o1u_re, o1u_im, o1l_re, o1l_im;
  int checks = 0, failures = 0;
  real er [NFRAMES][M];
  real ei [NFRAMES][M];
  int t = 0;

  cfft_datapath #(.IW(IW), .DP(1'b0)) dut0 (.clk(clk), .en(en), .cnt(cnt),
    .u_re(u_re), .u_im(u_im), .l_re(l_re), .l_im(l_im),
    .ou_re(o0u_re), .ou_im(o0u_im), .ol_re(o0l_re), .ol_im(o0l_im));
  cfft_datapath #(.IW(IW), .DP(1'b1)) dut1 (.clk(clk), .en(en), .cnt(cnt),
    .u_re(u_re), .u_im(u_im), .l_re(l_re), .l_im(l_im),
    .ou_re(o1u_re), .ou_im(o1u_im), .ol_re(o1l_re), .ol_im(o1l_im));

  always #5 clk = ~clk;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  task automatic check(int f, int k, int kb, bit odd, int gr, int gi);
    real sr = 0.0, si = 0.0, a, tr, ti, tol = 0.0;
    for (int n = 0; n < M; n++) begin
      a = -2.0 * 3.14159265358979323846 * real'((n * k) % M) / real'(M);
      sr += er[f][n] * $cos(a) - ei[f][n] * $sin(a);
      si += er[f][n] * $sin(a) + ei[f][n] * $cos(a);
      tol += absr(er[f][n]) + absr(ei[f][n]);
    end
    if (odd) begin
      a = -2.0 * 3.14159265358979323846 * real'(kb) / 128.0;
      tr = sr * $cos(a) - si * $sin(a);
      ti = sr * $sin(a) + si * $cos(a);
      sr = tr; si = ti;
    end
    tol = 12.0 + 4.0e-5 * tol;
    checks++;
    if (absr(real'(gr) - sr) > tol || absr(real'(gi) - si) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL: DP=%0d frame %0d k=%0d got (%0d,%0d) expected (%f,%f)",
                                  odd, f, k, gr, gi, sr, si);
    end
  endtask

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < M; n++) begin
        er[f][n] = real'(int'($urandom % 60001) - 30000);
        ei[f][n] = real'(int'($urandom % 60001) - 30000);
      end
    u_re = '0; u_im = '0; l_re = '0; l_im = '0;
    for (int i = 0; i < (NFRAMES + 3) * 40; i++) begin
      @(negedge clk);
      if (en) begin t++; cnt = cnt + 5'd1; end
      if (t >= LAT && (t - LAT) / 32 < NFRAMES) begin
        int f, tau, kb;
        f = (t - LAT) / 32;
        tau = (t - LAT) % 32;
        kb = ((tau >> 3) & 1) + 2 * ((tau >> 2) & 1) + 4 * ((tau >> 1) & 1) + 8 * (tau & 1) + 16 * ((tau >> 4) & 1);
        check(f, kb, kb, 1'b0, int'(o0u_re), int'(o0u_im));
        check(f, kb + 32, kb, 1'b0, int'(o0l_re), int'(o0l_im));
        check(f, kb, kb, 1'b1, int'(o1u_re), int'(o1u_im));
        check(f, kb + 32, kb, 1'b1, int'(o1l_re), int'(o1l_im));
      end
      en = (($urandom % 9) != 0);
      if (t / 32 < NFRAMES) begin
        u_re = IW'($rtoi(er[t / 32][2 * (t % 32)]));
        u_im = IW'($rtoi(ei[t / 32][2 * (t % 32)]));
        l_re = IW'($rtoi(er[t / 32][2 * (t % 32) + 1]));
        l_im = IW'($rtoi(ei[t / 32][2 * (t % 32) + 1]));
      end else begin
        u_re = '0; u_im = '0; l_re = '0; l_im = '0;
      end
    end
    checks++;
    if (t < LAT + NFRAMES * 32) begin failures++; $display("FAIL: not all frames checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
