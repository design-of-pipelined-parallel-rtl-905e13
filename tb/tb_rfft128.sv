// tb_rfft128: self-checking test of the 4-parallel 128-point real FFT.
//
// Streams NFRAMES real frames (an impulse, a full-scale pattern, a cosine at
// bin 64, then random data) four samples per clock with random stalls. Every
// flagged output lane is compared with a double-precision DFT; each frame must
// deliver each of the bins 0..64 exactly once. Also checks the 56-clock
// latency to the first output word and that stalls happened.
module tb_rfft128;
  localparam int DW = 16;
  localparam int N = 128;
  localparam int NFRAMES = 6;
  localparam int LATENCY = 56;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] in_x [4];
  logic [3:0] out_valid;
  logic out_sof;
  logic [6:0] out_k [4];
  logic signed [DW+7:0] out_re [4];
  logic signed [DW+7:0] out_im [4];

  rfft128 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, accepted = 0;
  real x [NFRAMES][N];
  real refr [N], refi [N];
  real tol;
  int out_frame = -1;
  int nseen = 0;
  bit seen [65];
  bit first = 1'b1;
  real max_err = 0.0;

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  task automatic compute_ref(int f);
    real s = 0.0;
    for (int k = 0; k <= 64; k++) begin
      real sr = 0.0, si = 0.0, a;
      for (int n = 0; n < N; n++) begin
        a = -2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
        sr += x[f][n] * $cos(a);
        si += x[f][n] * $sin(a);
      end
      refr[k] = sr; refi[k] = si;
    end
    for (int n = 0; n < N; n++) s += absr(x[f][n]);
    tol = 16.0 + 4.0e-5 * s;
  endtask

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 0)      x[f][n] = (n == 7) ? 500.0 : 0.0;
        else if (f == 1) x[f][n] = ((n * 7) % 3 == 0) ? 32767.0 : -32768.0;
        else if (f == 2) x[f][n] = (n % 2 == 0) ? 20000.0 : -20000.0;
        else             x[f][n] = real'($signed(16'($urandom)));
      end
    foreach (in_x[i]) in_x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < (NFRAMES + 3) * 32; w++) begin
      @(negedge clk);
      if (w > 3 && ($urandom % 9) == 0) begin
        in_valid = 1'b0; stalls++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      for (int i = 0; i < 4; i++)
        in_x[i] = (w < NFRAMES * 32) ? DW'($rtoi(x[w / 32][4 * (w % 32) + i])) : '0;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (out_frame + 1 < NFRAMES) begin failures++; $display("FAIL: %0d frames", out_frame + 1); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no stall"); end
    $display("frames=%0d stalls=%0d max_err=%f", out_frame + 1, stalls, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_sof) begin
      if (first) begin
        first = 1'b0;
        checks++;
        if (accepted != LATENCY) begin failures++; $display("FAIL: latency %0d", accepted); end
      end
      if (out_frame >= 0 && out_frame < NFRAMES) begin
        checks++;
        if (nseen != 65) begin failures++; $display("FAIL: frame %0d gave %0d bins", out_frame, nseen); end
      end
      out_frame++;
      nseen = 0;
      foreach (seen[k]) seen[k] = 1'b0;
      if (out_frame < NFRAMES) compute_ref(out_frame);
    end
    if (rst_n && out_frame >= 0 && out_frame < NFRAMES)
      for (int i = 0; i < 4; i++)
        if (out_valid[i]) begin
          int k;
          real er, ei;
          k = int'(out_k[i]);
          checks++;
          if (k > 64 || seen[k]) begin
            failures++; $display("FAIL: bin %0d out of range or repeated", k);
          end else begin
            seen[k] = 1'b1;
            nseen++;
            er = absr(real'(out_re[i]) - refr[k]);
            ei = absr(real'(out_im[i]) - refi[k]);
            if (er > max_err) max_err = er;
            if (ei > max_err) max_err = ei;
            if (er > tol || ei > tol) begin
              failures++;
              if (failures < 10) $display("FAIL: frame %0d X(%0d) got (%0d,%0d) expected (%f,%f)",
                                          out_frame, k, out_re[i], out_im[i], refr[k], refi[k]);
            end
          end
        end
    if (rst_n && in_valid) accepted++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
