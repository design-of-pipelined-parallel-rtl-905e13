// tb_folded_fft8: self-checking test of the folded 8-point FFT.
//
// Streams NFRAMES frames (an impulse, a full-scale pattern, then random data)
// one sample per clock with random stalls, and compares every output pair with
// a double-precision 8-point DFT. Checks the order k = 0, 2, 1, 3 within each
// frame, four output pairs per frame, and the one-clock latency from x(7) to
// X(0)/X(4).
module tb_folded_fft8;
  localparam int DW = 16;
  localparam int N = 8;
  localparam int NFRAMES = 40;
  localparam real TOL = 4.0;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [1:0] out_k;
  logic signed [DW+3:0] out0_re, out0_im, out1_re, out1_im;

  folded_fft8 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0;
  real xr [NFRAMES][N];
  real xi [NFRAMES][N];
  int out_frame = 0, out_pos = 0;
  int last_in_edge = -100, edge_no = 0;
  const int korder [4] = '{0, 2, 1, 3};

  function automatic real dft_re(int f, int k);
    real s = 0.0;
    for (int n = 0; n < N; n++) begin
      real a = -2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
      s += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
    end
    return s;
  endfunction
  function automatic real dft_im(int f, int k);
    real s = 0.0;
    for (int n = 0; n < N; n++) begin
      real a = -2.0 * 3.14159265358979323846 * real'((n * k) % N) / real'(N);
      s += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
    end
    return s;
  endfunction

  function automatic real absr(real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < N; n++) begin
        if (f == 0) begin xr[f][n] = (n == 3) ? 100.0 : 0.0; xi[f][n] = 0.0; end
        else if (f == 1) begin
          xr[f][n] = (n % 2) ? -32768.0 : 32767.0;
          xi[f][n] = (n % 3) ? 32767.0 : -32768.0;
        end else begin
          xr[f][n] = real'($signed(16'($urandom)));
          xi[f][n] = real'($signed(16'($urandom)));
        end
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < (NFRAMES + 1) * N; w++) begin
      @(negedge clk);
      if (w > 2 && ($urandom % 7) == 0) begin
        in_valid = 1'b0; stalls++;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_re = (w < NFRAMES * N) ? DW'($rtoi(xr[w / N][w % N])) : '0;
      in_im = (w < NFRAMES * N) ? DW'($rtoi(xi[w / N][w % N])) : '0;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (out_frame < NFRAMES) begin failures++; $display("FAIL: %0d frames out", out_frame); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL: no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int in_count = 0;
  always @(posedge clk) begin
    edge_no++;
    if (rst_n && out_valid && out_frame < NFRAMES) begin
      real r0, i0, r1, i1;
      int k;
      k = korder[out_pos];
      checks++;
      if (out_k != 2'(k)) begin failures++; $display("FAIL: order, got k=%0d expected %0d", out_k, k); end
      if (out_pos == 0) begin
        checks++;
        // x(7) of this frame was accepted at the previous accepted edge
        if (in_count != (out_frame + 1) * N) begin
          failures++; $display("FAIL: latency, %0d samples accepted", in_count);
        end
      end
      r0 = dft_re(out_frame, k);     i0 = dft_im(out_frame, k);
      r1 = dft_re(out_frame, k + 4); i1 = dft_im(out_frame, k + 4);
      checks++;
      if (absr(real'(out0_re) - r0) > TOL || absr(real'(out0_im) - i0) > TOL ||
          absr(real'(out1_re) - r1) > TOL || absr(real'(out1_im) - i1) > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL: frame %0d k=%0d got (%0d,%0d) (%0d,%0d) exp (%f,%f) (%f,%f)", out_frame, k,
                   out0_re, out0_im, out1_re, out1_im, r0, i0, r1, i1);
      end
      out_pos++;
      if (out_pos == 4) begin out_pos = 0; out_frame++; end
    end
    if (rst_n && in_valid) in_count++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
