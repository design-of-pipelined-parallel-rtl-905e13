// tb_fft_top: end-to-end test of fft_top at its default parameters.
//
// Runs the three FFT processors at the same time, each with its own random
// stall pattern: NF128 complex frames into the 4-parallel complex FFT, NF128
// real frames into the real FFT and NF8 frames into the folded 8-point FFT.
// Every output is compared with a double-precision DFT. It also counts how
// often each mechanism of the design happened and fails if one never did:
// input stalls of each processor, back-to-back 128-point frames, the real
// FFT's self-paired words (tau 0 and 16) and buffered pairs, and each of the
// four output slots of the folded FFT.
module tb_fft_top;
  localparam int DW = 16;
  localparam int NF128 = 4;
  localparam int NF8 = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfft_in_valid = 1'b0, rfft_in_valid = 1'b0, f8_in_valid = 1'b0;
  logic signed [DW-1:0] cfft_in_re [4];
  logic signed [DW-1:0] cfft_in_im [4];
  logic signed [DW-1:0] rfft_in [4];
  logic signed [DW-1:0] f8_in_re, f8_in_im;
  logic cfft_out_valid, cfft_out_sof, rfft_out_sof, f8_out_valid;
  logic [6:0] cfft_out_k;
  logic signed [DW+7:0] cfft_out_re [4];
  logic signed [DW+7:0] cfft_out_im [4];
  logic [3:0] rfft_out_valid;
  logic [6:0] rfft_out_k [4];
  logic signed [DW+7:0] rfft_out_re [4];
  logic signed [DW+7:0] rfft_out_im [4];
  logic [1:0] f8_out_k;
  logic signed [DW+3:0] f8_out0_re, f8_out0_im, f8_out1_re, f8_out1_im;

  fft_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cstall = 0, n_rstall = 0, n_fstall = 0, n_b2b = 0, n_self = 0, n_pair = 0;
  int n_slot [4] = '{0, 0, 0, 0};
  real cxr [NF128][128];
  real cxi [NF128][128];
  real rx  [NF128][128];
  real fxr [NF8][8];
  real fxi [NF8][8];

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  // DFT bin k of an n-point sequence given as arrays
  function automatic void dft(input real xr [], input real xi [], input int k,
                              output real yr, output real yi);
    int n = xr.size();
    real a;
    yr = 0.0; yi = 0.0;
    for (int i = 0; i < n; i++) begin
      a = -2.0 * 3.14159265358979323846 * real'((i * k) % n) / real'(n);
      yr += xr[i] * $cos(a) - xi[i] * $sin(a);
      yi += xr[i] * $sin(a) + xi[i] * $cos(a);
    end
  endfunction

  task automatic cmp(string tag, int f, int k, real gr, real gi, real er, real ei, real tol);
    checks++;
    if (absr(gr - er) > tol || absr(gi - ei) > tol) begin
      failures++;
      if (failures < 12) $display("FAIL %s: frame %0d bin %0d got (%f,%f) expected (%f,%f)",
                                  tag, f, k, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int f = 0; f < NF128; f++)
      for (int n = 0; n < 128; n++) begin
        cxr[f][n] = real'($signed(16'($urandom)));
        cxi[f][n] = real'($signed(16'($urandom)));
        rx[f][n]  = real'($signed(16'($urandom)));
      end
    for (int f = 0; f < NF8; f++)
      for (int n = 0; n < 8; n++) begin
        fxr[f][n] = real'($signed(16'($urandom)));
        fxi[f][n] = real'($signed(16'($urandom)));
      end
  end

  // ---------------- drivers ----------------
  bit cdone = 1'b0, rdone = 1'b0, fdone = 1'b0;

  initial begin : drv_c
    foreach (cfft_in_re[i]) begin cfft_in_re[i] = '0; cfft_in_im[i] = '0; end
    repeat (3) @(negedge clk);
    for (int w = 0; w < (NF128 + 2) * 32; w++) begin
      @(negedge clk);
      if (w > 2 && ($urandom % 13) == 0) begin cfft_in_valid = 1'b0; n_cstall++; @(negedge clk); end
      cfft_in_valid = 1'b1;
      for (int i = 0; i < 4; i++) begin
        cfft_in_re[i] = (w < NF128 * 32) ? DW'($rtoi(cxr[w / 32][4 * (w % 32) + i])) : '0;
        cfft_in_im[i] = (w < NF128 * 32) ? DW'($rtoi(cxi[w / 32][4 * (w % 32) + i])) : '0;
      end
      // a frame that follows the previous one without an idle word
      if (w % 32 == 0 && w > 0 && w < NF128 * 32) n_b2b++;
    end
    @(negedge clk);
    cfft_in_valid = 1'b0;
    cdone = 1'b1;
  end

  initial begin : drv_r
    foreach (rfft_in[i]) rfft_in[i] = '0;
    repeat (3) @(negedge clk);
    for (int w = 0; w < (NF128 + 2) * 32; w++) begin
      @(negedge clk);
      if (w > 2 && ($urandom % 7) == 0) begin rfft_in_valid = 1'b0; n_rstall++; @(negedge clk); end
      rfft_in_valid = 1'b1;
      for (int i = 0; i < 4; i++)
        rfft_in[i] = (w < NF128 * 32) ? DW'($rtoi(rx[w / 32][4 * (w % 32) + i])) : '0;
    end
    @(negedge clk);
    rfft_in_valid = 1'b0;
    rdone = 1'b1;
  end

  initial begin : drv_f
    f8_in_re = '0; f8_in_im = '0;
    repeat (3) @(negedge clk);
    for (int w = 0; w < (NF8 + 1) * 8; w++) begin
      @(negedge clk);
      if (w > 2 && ($urandom % 5) == 0) begin f8_in_valid = 1'b0; n_fstall++; @(negedge clk); end
      f8_in_valid = 1'b1;
      f8_in_re = (w < NF8 * 8) ? DW'($rtoi(fxr[w / 8][w % 8])) : '0;
      f8_in_im = (w < NF8 * 8) ? DW'($rtoi(fxi[w / 8][w % 8])) : '0;
    end
    @(negedge clk);
    f8_in_valid = 1'b0;
    fdone = 1'b1;
  end

  initial begin
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  // ---------------- checkers ----------------
  int cframe = -1, rframe = -1, fframe = 0, fpos = 0;
  int cwords = 0, rbins = 0;
  const int forder [4] = '{0, 2, 1, 3};

  always @(posedge clk) begin
    // complex FFT
    if (rst_n && cfft_out_valid) begin
      if (cfft_out_sof) begin
        if (cframe >= 0) begin
          checks++;
          if (cwords != 32) begin failures++; $display("FAIL cfft: frame %0d had %0d words", cframe, cwords); end
        end
        cframe++;
        cwords = 0;
      end
      if (cframe >= 0 && cframe < NF128) begin
        int ks [4];
        ks = '{int'(cfft_out_k), int'(cfft_out_k) + 64, int'(cfft_out_k) + 32, int'(cfft_out_k) + 96};
        for (int i = 0; i < 4; i++) begin
          real er, ei;
          dft(cxr[cframe], cxi[cframe], ks[i], er, ei);
          cmp("cfft", cframe, ks[i], real'(cfft_out_re[i]), real'(cfft_out_im[i]), er, ei, 200.0);
        end
        cwords++;
      end
    end
    // real FFT
    if (rst_n && rfft_out_sof) begin
      if (rframe >= 0 && rframe < NF128) begin
        checks++;
        if (rbins != 65) begin failures++; $display("FAIL rfft: frame %0d had %0d bins", rframe, rbins); end
      end
      rframe++;
      rbins = 0;
    end
    if (rst_n && rframe >= 0 && rframe < NF128) begin
      real zero [128];
      foreach (zero[n]) zero[n] = 0.0;
      if (rfft_out_valid == 4'b0111 || rfft_out_valid == 4'b1100) n_self++;
      if (rfft_out_valid == 4'b1111) n_pair++;
      for (int i = 0; i < 4; i++)
        if (rfft_out_valid[i]) begin
          real er, ei;
          dft(rx[rframe], zero, int'(rfft_out_k[i]), er, ei);
          cmp("rfft", rframe, int'(rfft_out_k[i]), real'(rfft_out_re[i]), real'(rfft_out_im[i]), er, ei, 200.0);
          rbins++;
        end
    end
    // folded 8-point FFT
    if (rst_n && f8_out_valid && fframe < NF8) begin
      real e0r, e0i, e1r, e1i;
      int k;
      k = forder[fpos];
      checks++;
      if (int'(f8_out_k) != k) begin failures++; $display("FAIL f8: order"); end
      dft(fxr[fframe], fxi[fframe], k, e0r, e0i);
      dft(fxr[fframe], fxi[fframe], k + 4, e1r, e1i);
      cmp("f8", fframe, k, real'(f8_out0_re), real'(f8_out0_im), e0r, e0i, 4.0);
      cmp("f8", fframe, k + 4, real'(f8_out1_re), real'(f8_out1_im), e1r, e1i, 4.0);
      n_slot[fpos]++;
      fpos++;
      if (fpos == 4) begin fpos = 0; fframe++; end
    end
  end

  initial begin
    wait (cdone && rdone && fdone);
    repeat (6) @(negedge clk);
    checks++; if (cframe + 1 < NF128) begin failures++; $display("FAIL: cfft frames %0d", cframe + 1); end
    checks++; if (rframe + 1 < NF128) begin failures++; $display("FAIL: rfft frames %0d", rframe + 1); end
    checks++; if (fframe < NF8) begin failures++; $display("FAIL: f8 frames %0d", fframe); end
    $display("mechanisms: cfft stalls=%0d back-to-back frames=%0d rfft stalls=%0d self-paired=%0d buffered pairs=%0d f8 stalls=%0d f8 slots=%0d/%0d/%0d/%0d",
             n_cstall, n_b2b, n_rstall, n_self, n_pair, n_fstall, n_slot[0], n_slot[1], n_slot[2], n_slot[3]);
    checks++; if (n_cstall == 0) begin failures++; $display("FAIL: no cfft stall"); end
    checks++; if (n_b2b == 0) begin failures++; $display("FAIL: no back-to-back frames"); end
    checks++; if (n_rstall == 0) begin failures++; $display("FAIL: no rfft stall"); end
    checks++; if (n_self == 0) begin failures++; $display("FAIL: no self-paired word"); end
    checks++; if (n_pair == 0) begin failures++; $display("FAIL: no buffered pair"); end
    checks++; if (n_fstall == 0) begin failures++; $display("FAIL: no f8 stall"); end
    for (int i = 0; i < 4; i++) begin
      checks++; if (n_slot[i] == 0) begin failures++; $display("FAIL: f8 slot %0d unused", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
