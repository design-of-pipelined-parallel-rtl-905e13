// rfft128: 4-parallel 128-point FFT for real input.
//
// Four real samples x(4t)..x(4t+3) enter per clock (32 clocks per frame,
// frames back to back). Real input makes half of the spectrum redundant,
// X(128-k) = conj(X(k)), so only X(0)..X(64) are produced, with about half the
// datapath of the complex FFT: the samples are packed in pairs,
// z(2t) = x(4t) + j*x(4t+1) and z(2t+1) = x(4t+2) + j*x(4t+3), and a single
// 2-parallel 64-point datapath (cfft_datapath, the same feedforward structure
// as one half of cfft128_r24) computes Z = DFT64(z). Two rfft_split units then
// form the real-FFT bins from bin pairs (Z(k), Z(64-k)).
//
// The datapath delivers Z(kb) and Z(kb+32) per clock, kb = bitrev4(tau[3:0])
// + 16*tau[4]. The partner of a word with kb in 1..15 is the word with 32-kb,
// which comes in the second half of the frame, so the first-half words go into
// a 16-entry buffer and each second-half word completes two pairs. Per frame:
//   tau = 0      X(0), X(64) and X(32)          (Z(0) and Z(32) pair with themselves)
//   tau = 1..15  nothing (words buffered)
//   tau = 16     X(16), X(48)
//   tau = 17..31 X(kb), X(64-kb), X(kb'), X(64-kb') for kb' = 32 - kb
// out_valid[i] flags the lanes that carry a bin, out_k[i] gives its index and
// out_sof marks the first output word of a frame; like the complex FFT, the
// flags are high for one clock right after a new output word is loaded. Output words appear 56
// accepted clocks after the input word that produced them in the datapath
// (two clocks after the datapath output). Outputs are unscaled, DW+8 bits.
// All registers advance only on clocks with in_valid high.
//
// The document proposes a different internal structure for its real FFT,
// with specialised real/complex butterflies; this block delivers the same
// function (4 real samples per clock, non-redundant half of the spectrum)
// by the packing method instead.
module rfft128 #(
  parameter int unsigned DW = 16,   // input width
  parameter int unsigned TW = 16    // coefficient width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_x      [4],
  output logic        [3:0]    out_valid,
  output logic                 out_sof,
  output logic        [6:0]    out_k     [4],
  output logic signed [DW+7:0] out_re    [4],
  output logic signed [DW+7:0] out_im    [4]
);

  localparam int unsigned IW  = DW + 1;
  localparam int unsigned ZW  = IW + 6;       // width of Z
  localparam int          LAT = 54;           // datapath latency

  logic       en;
  logic [4:0] cnt;
  logic [5:0] fill;

  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 5'd1;
      if (fill != 6'(LAT)) fill <= fill + 6'd1;
    end
  end

  logic signed [ZW-1:0] zu_re, zu_im, zl_re, zl_im;

  cfft_datapath #(.IW(IW), .TW(TW), .DP(1'b0)) u_dp (
    .clk(clk), .en(en), .cnt(cnt),
    .u_re(IW'(in_x[0])), .u_im(IW'(in_x[1])), .l_re(IW'(in_x[2])), .l_im(IW'(in_x[3])),
    .ou_re(zu_re), .ou_im(zu_im), .ol_re(zl_re), .ol_im(zl_im));

  // ---- pairing buffer ----
  logic [4:0] tau;
  logic [4:0] kb;
  logic [3:0] rd_addr;
  logic       live;                 // datapath output holds frame data
  logic signed [4*ZW-1:0] buf_mem [16];
  logic signed [ZW-1:0]   su_re, su_im, sl_re, sl_im;   // stored partner word

  assign tau     = cnt - 5'(LAT);
  assign kb      = {tau[4], tau[0], tau[1], tau[2], tau[3]};
  assign rd_addr = 4'(5'd0 - kb);     // (32 - kb) mod 16
  assign live    = (fill == 6'(LAT));

  always_ff @(posedge clk) begin
    if (en && !tau[4]) buf_mem[kb[3:0]] <= {zu_re, zu_im, zl_re, zl_im};
  end

  assign {su_re, su_im, sl_re, sl_im} = buf_mem[rd_addr];

  // ---- operand selection for the two split units ----
  logic signed [ZW-1:0] a1_re, a1_im, b1_re, b1_im, a2_re, a2_im, b2_re, b2_im;
  logic        [6:0]    e1, e2;
  logic        [6:0]    k1, k2;
  logic        [3:0]    vmask;

  always_comb begin
    // defaults: second half of the frame, partner word from the buffer
    a1_re = su_re;  a1_im = su_im;  b1_re = zl_re;  b1_im = -zl_im;   // (kb, 64-kb)
    a2_re = zu_re;  a2_im = zu_im;  b2_re = sl_re;  b2_im = -sl_im;   // (kb', 64-kb')
    e1 = 7'(5'd0 - kb) & 7'h1f;      // 32 - kb', the stored word's kb
    e2 = 7'(kb);
    vmask = 4'b1111;
    if (tau == 5'd0) begin
      // Z(0) and Z(32) pair with themselves
      a1_re = zu_re;  a1_im = zu_im;  b1_re = zu_re;  b1_im = -zu_im;
      a2_re = zl_re;  a2_im = zl_im;  b2_re = zl_re;  b2_im = -zl_im;
      e1 = 7'd0;
      e2 = 7'd32;
      vmask = 4'b0111;
    end else if (tau == 5'd16) begin
      // Z(16) pairs with Z(48) in the same word
      b2_re = zl_re;  b2_im = -zl_im;
      vmask = 4'b1100;
    end else if (!tau[4]) begin
      vmask = 4'b0000;
    end
  end

  assign k1 = e1;
  assign k2 = e2;

  logic signed [ZW:0] x1k_re, x1k_im, x1p_re, x1p_im, x2k_re, x2k_im, x2p_re, x2p_im;

  rfft_split #(.ZW(ZW), .TW(TW)) u_sp1 (
    .clk(clk), .en(en), .a_re(a1_re), .a_im(a1_im), .b_re(b1_re), .b_im(b1_im), .e(e1),
    .xk_re(x1k_re), .xk_im(x1k_im), .xp_re(x1p_re), .xp_im(x1p_im));
  rfft_split #(.ZW(ZW), .TW(TW)) u_sp2 (
    .clk(clk), .en(en), .a_re(a2_re), .a_im(a2_im), .b_re(b2_re), .b_im(b2_im), .e(e2),
    .xk_re(x2k_re), .xk_im(x2k_im), .xp_re(x2p_re), .xp_im(x2p_im));

  // side information follows the two register stages of the split units
  logic [3:0] vq1, vq2;
  logic       sq1, sq2;
  logic       fresh;     // the output registers were loaded at the last clock
  logic [6:0] kq1 [4];
  logic [6:0] kq2 [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vq1 <= '0; vq2 <= '0; sq1 <= 1'b0; sq2 <= 1'b0; fresh <= 1'b0;
      for (int i = 0; i < 4; i++) begin kq1[i] <= '0; kq2[i] <= '0; end
    end else begin
      fresh <= en;
      if (en) begin
        vq1 <= live ? vmask : 4'b0000;
        sq1 <= live && (tau == 5'd0);
        kq1[0] <= k1;
        kq1[1] <= 7'd64 - k1;
        kq1[2] <= k2;
        kq1[3] <= 7'd64 - k2;
        vq2 <= vq1;
        sq2 <= sq1;
        kq2 <= kq1;
      end
    end
  end

  assign out_valid = fresh ? vq2 : 4'b0000;
  assign out_sof   = fresh && sq2;
  assign out_k     = kq2;
  assign out_re[0] = x1k_re;  assign out_im[0] = x1k_im;
  assign out_re[1] = x1p_re;  assign out_im[1] = x1p_im;
  assign out_re[2] = x2k_re;  assign out_im[2] = x2k_im;
  assign out_re[3] = x2p_re;  assign out_im[3] = x2p_im;

endmodule
