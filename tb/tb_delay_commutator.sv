// tb_delay_commutator: checks the pairing done by the delay commutator.
//
// Feeds sample numbers (u carries 2t, l carries 2t+1 in the real part, the
// negated value in the imaginary part) with the switch driven by bit log2(L) of
// a free-running phase counter, with random stalls, and checks against the
// expected pairing: during swap phases the outputs are (u(t-L), u(t)), otherwise
// (l(t-2L), l(t-L)), counted in accepted clocks. Run for L = 4 and L = 1.
module tb_delay_commutator;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0;
  int   t = 0;                 // accepted clocks
  logic signed [W-1:0] u_re, u_im, l_re, l_im;
  logic signed [W-1:0] a_ou_re, a_ou_im, a_ol_re, a_ol_im;
  logic signed [W-1:0] b_ou_re, b_ou_im, b_ol_re, b_ol_im;
  logic swap4, swap1;

  assign u_re = W'(2 * t);
  assign u_im = -W'(2 * t);
  assign l_re = W'(2 * t + 1);
  assign l_im = -W'(2 * t + 1);
  assign swap4 = t[2];
  assign swap1 = t[0];

  delay_commutator #(.W(W), .L(4)) dut4 (
    .clk(clk), .en(en), .swap(swap4), .u_re(u_re), .u_im(u_im), .l_re(l_re), .l_im(l_im),
    .ou_re(a_ou_re), .ou_im(a_ou_im), .ol_re(a_ol_re), .ol_im(a_ol_im));
  delay_commutator #(.W(W), .L(1)) dut1 (
    .clk(clk), .en(en), .swap(swap1), .u_re(u_re), .u_im(u_im), .l_re(l_re), .l_im(l_im),
    .ou_re(b_ou_re), .ou_im(b_ou_im), .ol_re(b_ol_re), .ol_im(b_ol_im));

  task automatic expect_pair(int L, int tt, int our, int oui, int olr, int oli);
    int eu, el;
    if (((tt / L) % 2) == 1) begin eu = 2 * (tt - L); el = 2 * tt; end
    else begin eu = 2 * (tt - 2 * L) + 1; el = 2 * (tt - L) + 1; end
    checks++;
    if (our != eu || olr != el || oui != -eu || oli != -el) begin
      failures++;
      if (failures < 10) $display("FAIL: L=%0d t=%0d got (%0d,%0d) expected (%0d,%0d)", L, tt, our, olr, eu, el);
    end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (en) t++;   // the previous rising edge accepted a sample
      en = (($urandom % 5) != 0);
      #1;
      if (en && t >= 8) begin
        expect_pair(4, t, int'(a_ou_re), int'(a_ou_im), int'(a_ol_re), int'(a_ol_im));
        expect_pair(1, t, int'(b_ou_re), int'(b_ou_im), int'(b_ol_re), int'(b_ol_im));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
