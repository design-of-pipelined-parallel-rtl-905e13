// cfft_datapath: one of the two 2-sample datapaths of the 4-parallel 128-point FFT.
//
// Each clock the datapath takes two complex samples (u, l) and passes them
// through six radix-2 butterfly stages. Before each butterfly a
// delay_commutator (delays 16, 8, 4, 2, 1, 16) brings together the two samples
// the butterfly combines. The stage-by-stage pairing is that of a 128-point
// decimation-in-frequency flow graph: stage s combines samples whose input
// index differs in bit 7-s. The twiddle factors are placed as in a radix-2^3
// group followed by a radix-2^4 group:
//   before stage 2: constant CSD multipliers, W8^1 / W8^3 (and -j)
//   before stage 3: trivial -j, merged into the butterfly
//   before stage 4: full complex multipliers, W128^e from a ROM
//   before stage 5: trivial -j, merged into the butterfly
//   before stage 6: constant CSD multipliers, W16 powers
// The seventh stage, which combines the two datapaths, is in cfft128_r24.
//
// Timing: cnt is the frame phase (0..31) of the samples now at the input; each
// stage's switch and twiddle selection is derived from it with a fixed offset.
// Latency 54 clocks (commutators 47, one full-multiplier register, six
// butterfly registers). All registers advance only when en is high.
// Widths grow by one bit per butterfly: outputs are IW+6 bits.
// Stage 1 has no twiddle factor, so its multiplier-input phase (tau) is
// computed by the common stage template but not read.
//
// Stage structure, delays and multiplier positions follow the document's
// block diagram; the exact twiddle exponents, the switch timing and the
// fixed-point formats are this design's own derivation.
module cfft_datapath #(
  parameter int unsigned IW = 17,   // input width of each real part
  parameter int unsigned TW = 16,   // full-multiplier coefficient width
  parameter bit          DP = 1'b0  // 0: even input samples, 1: odd input samples
) (
  input  logic                   clk,
  input  logic                   en,
  input  logic        [4:0]      cnt,
  input  logic signed [IW-1:0]   u_re,
  input  logic signed [IW-1:0]   u_im,
  input  logic signed [IW-1:0]   l_re,
  input  logic signed [IW-1:0]   l_im,
  output logic signed [IW+5:0]   ou_re,
  output logic signed [IW+5:0]   ou_im,
  output logic signed [IW+5:0]   ol_re,
  output logic signed [IW+5:0]   ol_im
);

  localparam int unsigned WMAX = IW + 6;
  localparam int NSTG = 6;
  localparam int DEL [NSTG] = '{16, 8, 4, 2, 1, 16};   // commutator delays
  localparam int LG  [NSTG] = '{4, 3, 2, 1, 0, 4};      // log2 of the delays
  // offset of each stage's commutator input from the datapath input
  localparam int OFS [NSTG] = '{0, 17, 26, 31, 35, 37};

  // stage inputs/outputs, sign-extended to the widest stage
  logic signed [WMAX-1:0] su_re [NSTG+1];
  logic signed [WMAX-1:0] su_im [NSTG+1];
  logic signed [WMAX-1:0] sl_re [NSTG+1];
  logic signed [WMAX-1:0] sl_im [NSTG+1];

  assign su_re[0] = WMAX'(u_re);
  assign su_im[0] = WMAX'(u_im);
  assign sl_re[0] = WMAX'(l_re);
  assign sl_im[0] = WMAX'(l_im);

  for (genvar s = 0; s < NSTG; s++) begin : g_stg
    localparam int unsigned WS = IW + s;

    logic        [4:0]    tau_c, tau;      // frame phase at the commutator / multiplier input
    logic                 swap;
    logic signed [WS-1:0] cu_re, cu_im, cl_re, cl_im;   // commutator outputs
    logic signed [WS-1:0] mu_re, mu_im, ml_re, ml_im;   // after the twiddle multipliers
    logic                 rot;                         // -j on the lower butterfly input
    logic signed [WS:0]   bs_re, bs_im, bd_re, bd_im;
    logic signed [WS:0]   ru_re, ru_im, rl_re, rl_im;   // butterfly output registers

    assign tau_c = cnt - 5'(OFS[s]);
    assign tau   = tau_c - 5'(DEL[s]);
    assign swap = tau_c[LG[s]];

    delay_commutator #(.W(WS), .L(DEL[s])) u_dc (
      .clk(clk), .en(en), .swap(swap),
      .u_re(WS'(su_re[s])), .u_im(WS'(su_im[s])),
      .l_re(WS'(sl_re[s])), .l_im(WS'(sl_im[s])),
      .ou_re(cu_re), .ou_im(cu_im), .ol_re(cl_re), .ol_im(cl_im));

    if (s == 1) begin : g_w8
      // W128^(16*k0*(2*n5+n4)) = W16^(2*k0*(2*lane+n4)); k0 = tau[3], n4 = tau[2]
      logic [3:0] m_u, m_l;
      assign m_u = (tau[3] & tau[2]) ? 4'd2 : 4'd0;
      assign m_l = tau[3] ? (tau[2] ? 4'd6 : 4'd4) : 4'd0;
      csd_twiddle #(.W(WS), .FULL_W16(1'b0)) u_tu (
        .x_re(cu_re), .x_im(cu_im), .m(m_u), .y_re(mu_re), .y_im(mu_im));
      csd_twiddle #(.W(WS), .FULL_W16(1'b0)) u_tl (
        .x_re(cl_re), .x_im(cl_im), .m(m_l), .y_re(ml_re), .y_im(ml_im));
      assign rot = 1'b0;
    end else if (s == 3) begin : g_full
      // W128^(n[3:0]*k[2:0]); n3 = lane, n2 = tau[0], n1 = tau[4], n0 = DP;
      // k2 = tau[1], k1 = tau[2], k0 = tau[3]
      logic [3:0] n_u, n_l;
      logic [2:0] k;
      logic [6:0] e_u, e_l;
      assign n_u = {1'b0, tau[0], tau[4], DP};
      assign n_l = {1'b1, tau[0], tau[4], DP};
      assign k   = {tau[1], tau[2], tau[3]};
      assign e_u = 7'(n_u * k);
      assign e_l = 7'(n_l * k);
      twiddle_cmult #(.W(WS), .TW(TW)) u_mu (
        .clk(clk), .en(en), .x_re(cu_re), .x_im(cu_im), .e(e_u), .y_re(mu_re), .y_im(mu_im));
      twiddle_cmult #(.W(WS), .TW(TW)) u_ml (
        .clk(clk), .en(en), .x_re(cl_re), .x_im(cl_im), .e(e_l), .y_re(ml_re), .y_im(ml_im));
      assign rot = 1'b0;
    end else if (s == 5) begin : g_w16
      // W128^(8*(2*n1+n0)*(2*k4+k3)) = W16^((2*lane+DP)*(2*k4+k3)); k4 = tau[4], k3 = tau[0]
      logic [1:0] q;
      logic [3:0] m_u, m_l;
      assign q   = {tau[4], tau[0]};
      assign m_u = 4'({1'b0, DP} * q);
      assign m_l = 4'({1'b1, DP} * q);
      csd_twiddle #(.W(WS), .FULL_W16(1'b1)) u_tu (
        .x_re(cu_re), .x_im(cu_im), .m(m_u), .y_re(mu_re), .y_im(mu_im));
      csd_twiddle #(.W(WS), .FULL_W16(1'b1)) u_tl (
        .x_re(cl_re), .x_im(cl_im), .m(m_l), .y_re(ml_re), .y_im(ml_im));
      assign rot = 1'b0;
    end else begin : g_none
      assign mu_re = cu_re;
      assign mu_im = cu_im;
      assign ml_re = cl_re;
      assign ml_im = cl_im;
      // trivial -j factors: before stage 3 when n4*k1 (tau[2]),
      // before stage 5 when n2*k3 (tau[0]); applied to the lower input only
      if (s == 2)      begin : g_rot3 assign rot = tau[2]; end
      else if (s == 4) begin : g_rot5 assign rot = tau[0]; end
      else             begin : g_rot0 assign rot = 1'b0;   end
    end

    bf2 #(.W(WS)) u_bf (
      .a_re(mu_re), .a_im(mu_im), .b_re(ml_re), .b_im(ml_im), .rot_b(rot),
      .s_re(bs_re), .s_im(bs_im), .d_re(bd_re), .d_im(bd_im));

    always_ff @(posedge clk) begin
      if (en) begin
        ru_re <= bs_re;
        ru_im <= bs_im;
        rl_re <= bd_re;
        rl_im <= bd_im;
      end
    end

    assign su_re[s+1] = WMAX'(ru_re);
    assign su_im[s+1] = WMAX'(ru_im);
    assign sl_re[s+1] = WMAX'(rl_re);
    assign sl_im[s+1] = WMAX'(rl_im);
  end

  assign ou_re = su_re[NSTG];
  assign ou_im = su_im[NSTG];
  assign ol_re = sl_re[NSTG];
  assign ol_im = sl_im[NSTG];

endmodule
