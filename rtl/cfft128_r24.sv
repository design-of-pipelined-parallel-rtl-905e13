// cfft128_r24: 4-parallel 128-point radix-2^4 feedforward FFT for complex input.
//
// Four complex samples x(4t), x(4t+1), x(4t+2), x(4t+3) enter each clock, so
// a 128-point frame takes 32 clocks and frames can follow each other without
// a gap. The even samples x(4t), x(4t+2) feed datapath 0 and the odd samples
// x(4t+1), x(4t+3) feed datapath 1. Each datapath (cfft_datapath) runs six
// butterfly stages with delay commutators and twiddle multipliers; the
// seventh stage combines the two datapaths: one butterfly takes the upper
// outputs of both datapaths, the other the lower outputs (the odd datapath's
// lower output rotated by -j). Only feedforward paths: no feedback loops.
//
// Outputs leave in a fixed permuted order, four per clock. With kb the 7-bit
// index reported on out_k, the outputs are X(kb), X(kb+64), X(kb+32) and
// X(kb+96) on out_*[0..3]; kb = bitrev4(tau[3:0]) + 16*tau[4] for output phase
// tau = 0..31, and out_sof marks tau = 0. The result is the plain DFT sum,
// without scaling: outputs are DW+8 bits (one guard bit plus one bit per
// butterfly stage), so nothing overflows.
//
// Timing: the first output word of a frame appears 55 accepted clocks after
// the first input word of that frame, and the frame's 32 output words follow
// on consecutive accepted clocks. The
// whole pipeline advances only on clocks with in_valid high (a stall freezes
// it); out_valid is high for one clock per new output word. The first frame
// starts with the first in_valid after reset. The architecture (two datapaths,
// delays, multiplier positions, crossed last stage) follows the document's
// block diagram; the output order, control and number formats are this
// design's choice.
module cfft128_r24 #(
  parameter int unsigned DW = 16,   // input width of each real part
  parameter int unsigned TW = 16    // full-multiplier coefficient width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  in_re  [4],   // x(4t+i) on index i
  input  logic signed [DW-1:0]  in_im  [4],
  output logic                  out_valid,
  output logic                  out_sof,      // first output word of a frame
  output logic        [6:0]     out_k,        // index kb of out_*[0]
  output logic signed [DW+7:0]  out_re [4],
  output logic signed [DW+7:0]  out_im [4]
);

  localparam int unsigned IW  = DW + 1;       // one guard bit
  localparam int unsigned WO  = IW + 6;       // datapath output width
  localparam int          LAT7 = 54;          // clocks from input to the seventh stage

  logic       en;
  logic [4:0] cnt;     // frame phase of the input word
  logic [5:0] fill;    // accepted clocks since reset, saturating at LAT7

  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 5'd1;
      if (fill != 6'(LAT7)) fill <= fill + 6'd1;
    end
  end

  logic signed [WO-1:0] u0_re, u0_im, l0_re, l0_im, u1_re, u1_im, l1_re, l1_im;

  cfft_datapath #(.IW(IW), .TW(TW), .DP(1'b0)) u_dp0 (
    .clk(clk), .en(en), .cnt(cnt),
    .u_re(IW'(in_re[0])), .u_im(IW'(in_im[0])), .l_re(IW'(in_re[2])), .l_im(IW'(in_im[2])),
    .ou_re(u0_re), .ou_im(u0_im), .ol_re(l0_re), .ol_im(l0_im));

  cfft_datapath #(.IW(IW), .TW(TW), .DP(1'b1)) u_dp1 (
    .clk(clk), .en(en), .cnt(cnt),
    .u_re(IW'(in_re[1])), .u_im(IW'(in_im[1])), .l_re(IW'(in_re[3])), .l_im(IW'(in_im[3])),
    .ou_re(u1_re), .ou_im(u1_im), .ol_re(l1_re), .ol_im(l1_im));

  // seventh stage: combine the even and odd datapaths
  logic signed [WO:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im;

  bf2 #(.W(WO)) u_bf7_top (
    .a_re(u0_re), .a_im(u0_im), .b_re(u1_re), .b_im(u1_im), .rot_b(1'b0),
    .s_re(a_re), .s_im(a_im), .d_re(b_re), .d_im(b_im));

  bf2 #(.W(WO)) u_bf7_bot (
    .a_re(l0_re), .a_im(l0_im), .b_re(l1_re), .b_im(l1_im), .rot_b(1'b1),
    .s_re(c_re), .s_im(c_im), .d_re(d_re), .d_im(d_im));

  logic [4:0] tau7;
  assign tau7 = cnt - 5'(LAT7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_k     <= '0;
      for (int i = 0; i < 4; i++) begin
        out_re[i] <= '0;
        out_im[i] <= '0;
      end
    end else begin
      out_valid <= en && (fill == 6'(LAT7));
      if (en) begin
        out_sof   <= (tau7 == 5'd0);
        out_k     <= {2'b00, tau7[4], tau7[0], tau7[1], tau7[2], tau7[3]};
        out_re[0] <= a_re;  out_im[0] <= a_im;
        out_re[1] <= b_re;  out_im[1] <= b_im;
        out_re[2] <= c_re;  out_im[2] <= c_im;
        out_re[3] <= d_re;  out_im[3] <= d_im;
      end
    end
  end

endmodule
