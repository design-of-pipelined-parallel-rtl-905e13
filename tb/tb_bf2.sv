// tb_bf2: exhaustive-corner and random test of the radix-2 butterfly,
// with and without the -j rotation of the lower input.
module tb_bf2;
  localparam int W = 8;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic rot_b;
  logic signed [W:0] s_re, s_im, d_re, d_im;
  int checks = 0, failures = 0;

  bf2 #(.W(W)) dut (.*);

  task automatic check_one();
    int br, bi;
    #1;
    br = rot_b ? int'(b_im) : int'(b_re);
    bi = rot_b ? -int'(b_re) : int'(b_im);
    checks++;
    if (int'(s_re) != int'(a_re) + br || int'(s_im) != int'(a_im) + bi ||
        int'(d_re) != int'(a_re) - br || int'(d_im) != int'(a_im) - bi) begin
      failures++;
      $display("FAIL: a=(%0d,%0d) b=(%0d,%0d) rot=%0d -> s=(%0d,%0d) d=(%0d,%0d)",
               a_re, a_im, b_re, b_im, rot_b, s_re, s_im, d_re, d_im);
    end
  endtask

  initial begin
    int corner [4] = '{-128, -1, 0, 127};
    foreach (corner[i]) foreach (corner[j]) for (int r = 0; r < 2; r++) begin
      a_re = W'(corner[i]); a_im = W'(corner[j]); b_re = W'(corner[j]); b_im = W'(corner[i]);
      rot_b = r[0];
      check_one();
    end
    repeat (2000) begin
      a_re = W'($urandom); a_im = W'($urandom); b_re = W'($urandom); b_im = W'($urandom);
      rot_b = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
