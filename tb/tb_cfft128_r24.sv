// tb_cfft128_r24: self-checking test of the 4-parallel 128-point complex FFT.
//
// Streams NFRAMES random 128-point frames (the first a unit impulse at n = 5,
// the second full-scale corner values) into the FFT, four samples per clock,
// with random one-clock input stalls inside the frames. Every output word is
// compared with a double-precision DFT computed here, using the index carried
// on out_k; the tolerance covers the fixed-point rounding of the twiddle
// multipliers. Also checks the 55-clock latency from the first input word to
// the first output word, that each frame's 32 output words cover all 128 bins
// once, and that at least one stall happened.
module tb_cfft128_r24;
  localparam int DW = 16;
  localparam int N  = 128;
  localparam int NFRAMES = 6;
  localparam int LATENCY = 55;
  // allowed error per output part: rounding noise plus the relative error of
  // the quantised constants (about 2^-15 per multiplier stage)
  localparam real TOL_ABS = 16.0;
  localparam real TOL_REL = 3.0e-5;
  real tol = TOL_ABS;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [DW-1:0] in_re [4];
  logic signed [DW-1:0] in_im [4];
  logic out_valid, out_sof;
  logic [6:0] out_k;
  logic signed [DW+7:0] out_re [4];
  logic signed [DW+7:0] out_im [4];

  cfft128_r24 dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int stalls = 0;
  real xr [NFRAMES][N];
  real xi [NFRAMES][N];
  real refr [N], refi [N];
  int  ref_frame = -1;
  int  out_frame = -1;
  int  words_in_frame = 0;
  bit  seen [N];
  int  accepted = 0;
  bit  first_out_seen = 1'b0;
  real max_err = 0.0;

  task automatic compute_ref(input int f);
    for (int k = 0; k < N; k++) begin
      real sr, si, a;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        a = -2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
        sr += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
        si += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
      end
      refr[k] = sr; refi[k] = si;
    end
    tol = TOL_ABS;
    for (int k = 0; k < N; k++) begin
      real m;
      m = (refr[k] < 0 ? -refr[k] : refr[k]) + (refi[k] < 0 ? -refi[k] : refi[k]);
      if (TOL_ABS + TOL_REL * m > tol) tol = TOL_ABS + TOL_REL * m;
    end
    ref_frame = f;
  endtask

  // stimulus data
  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 0) begin
          xr[f][n] = (n == 5) ? 1000.0 : 0.0;
          xi[f][n] = 0.0;
        end else if (f == 1) begin
          xr[f][n] = (n % 3 == 0) ? 32767.0 : -32768.0;
          xi[f][n] = (n % 5 == 0) ? -32768.0 : 32767.0;
        end else begin
          xr[f][n] = real'($signed(16'($urandom)));
          xi[f][n] = real'($signed(16'($urandom)));
        end
      end
  end

  // driver: one word per accepted clock, occasional stalls, then flush words
  initial begin
    foreach (in_re[i]) begin in_re[i] = '0; in_im[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < (NFRAMES + 2) * 32; w++) begin
      @(negedge clk);
      if (w > 3 && ($urandom % 11) == 0) begin
        in_valid = 1'b0;
        stalls++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      for (int i = 0; i < 4; i++) begin
        if (w < NFRAMES * 32) begin
          in_re[i] = DW'($rtoi(xr[w / 32][4 * (w % 32) + i]));
          in_im[i] = DW'($rtoi(xi[w / 32][4 * (w % 32) + i]));
        end else begin
          in_re[i] = '0; in_im[i] = '0;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (out_frame + 1 < NFRAMES) begin
      failures++;
      $display("FAIL: only %0d frames seen", out_frame + 1);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no stall exercised"); end
    $display("frames out=%0d stalls=%0d max_err=%f", out_frame + 1, stalls, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_sof) begin
        if (out_frame >= 0) begin
          checks++;
          if (words_in_frame != 32) begin
            failures++;
            $display("FAIL: frame %0d had %0d words", out_frame, words_in_frame);
          end
        end
        if (!first_out_seen) begin
          first_out_seen = 1'b1;
          checks++;
          if (accepted != LATENCY) begin
            failures++;
            $display("FAIL: latency %0d, expected %0d", accepted, LATENCY);
          end
        end
        out_frame++;
        words_in_frame = 0;
        foreach (seen[k]) seen[k] = 1'b0;
        if (out_frame < NFRAMES) compute_ref(out_frame);
      end
      if (out_frame >= 0 && out_frame < NFRAMES) begin
        int ks [4];
        ks[0] = out_k; ks[1] = out_k + 64; ks[2] = out_k + 32; ks[3] = out_k + 96;
        for (int i = 0; i < 4; i++) begin
          real er, ei;
          er = real'(out_re[i]) - refr[ks[i]];
          ei = real'(out_im[i]) - refi[ks[i]];
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > max_err) max_err = er;
          if (ei > max_err) max_err = ei;
          checks++;
          if (er > tol || ei > tol || seen[ks[i]]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: frame %0d X(%0d) = (%0d, %0d), expected (%f, %f)", out_frame, ks[i],
                       out_re[i], out_im[i], refr[ks[i]], refi[ks[i]]);
          end
          seen[ks[i]] = 1'b1;
        end
        words_in_frame++;
      end
    end
    if (rst_n && in_valid) accepted++;
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
