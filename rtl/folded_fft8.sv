// folded_fft8: 8-point radix-2 DIF FFT folded onto three butterflies.
//
// One complex sample enters per clock, x(0)..x(7) in natural order. The
// twelve butterflies of the 8-point flow graph are time-multiplexed onto three
// butterfly units (BFI, BFII, BFIII), each busy four clocks out of eight
// (50 % utilisation). With cnt the input phase (0..7) the schedule is:
//   BFI   at cnt 4..7     combines x(j) (from the 4-clock delay) with x(j+4);
//                         its lower output is multiplied by W8^j
//   BFII  at cnt 6,7,0,1  combines the pairs (y0,y2) (y1,y3) (y4,y6) (y5,y7);
//                         its lower output is multiplied by -j at cnt 7 and 1
//   BFIII at cnt 7,0,1,2  delivers X(k) and X(k+4) for k = 0, 2, 1, 3
// Between BFI and BFII four registers (R1 R2 on the lower path, R3 R4 after
// the upper multiplexer) replace the sixteen a direct folding would need;
// between BFII and BFIII one register on each path. The multiplexers pick
// either the fresh butterfly output or the delayed one.
//
// Interface: in_valid qualifies the input sample and advances the whole block
// (a stall freezes it); the first sample after reset is x(0) of the first
// frame and frames follow each other without gaps. out_valid marks a new
// output pair: out0 = X(out_k), out1 = X(out_k + 4). Outputs are registered,
// unscaled and DW+4 bits wide (one guard bit plus one bit per stage).
// Latency: X(0), X(4) of a frame appear one clock after its x(7) is accepted.
//
// The folding sets, register allocation and multiplexer placement follow the
// document's 8-point example; widths, the registered output and the handshake
// are this design's choice.
module folded_fft8 #(
  parameter int unsigned DW = 16    // input width of each real part
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic        [1:0]    out_k,
  output logic signed [DW+3:0] out0_re,
  output logic signed [DW+3:0] out0_im,
  output logic signed [DW+3:0] out1_re,
  output logic signed [DW+3:0] out1_im
);

  localparam int unsigned W0 = DW + 1;   // with guard bit
  localparam int unsigned W1 = W0 + 1;   // after BFI
  localparam int unsigned W2 = W1 + 1;   // after BFII
  localparam int unsigned W3 = W2 + 1;   // after BFIII

  logic       en;
  logic [2:0] cnt;
  logic       primed;   // a frame has reached BFIII

  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      primed <= 1'b0;
    end else if (en) begin
      cnt <= cnt + 3'd1;
      if (cnt == 3'd7) primed <= 1'b1;
    end
  end

  // ---- 4D delay and BFI ----
  logic signed [W0-1:0] x_re, x_im;
  logic signed [W0-1:0] d4_re [4];
  logic signed [W0-1:0] d4_im [4];
  logic signed [W1-1:0] a_s_re, a_s_im, a_d_re, a_d_im;   // BFI outputs
  logic signed [W1-1:0] a_m_re, a_m_im;                   // lower output times W8^j

  assign x_re = W0'(in_re);
  assign x_im = W0'(in_im);

  always_ff @(posedge clk) begin
    if (en) begin
      d4_re[0] <= x_re;
      d4_im[0] <= x_im;
      for (int i = 1; i < 4; i++) begin
        d4_re[i] <= d4_re[i-1];
        d4_im[i] <= d4_im[i-1];
      end
    end
  end

  bf2 #(.W(W0)) u_bf1 (
    .a_re(d4_re[3]), .a_im(d4_im[3]), .b_re(x_re), .b_im(x_im), .rot_b(1'b0),
    .s_re(a_s_re), .s_im(a_s_im), .d_re(a_d_re), .d_im(a_d_im));

  csd_twiddle #(.W(W1), .FULL_W16(1'b0)) u_w8 (
    .x_re(a_d_re), .x_im(a_d_im), .m({1'b0, cnt[1:0], 1'b0}),
    .y_re(a_m_re), .y_im(a_m_im));

  // ---- R1..R4 and BFII ----
  logic signed [W1-1:0] r1_re, r1_im, r2_re, r2_im, r3_re, r3_im, r4_re, r4_im;
  logic signed [W1-1:0] mt1_re, mt1_im, mb1_re, mb1_im;
  logic                 sel1;   // cnt 6,7: second half of the BFI outputs
  logic signed [W2-1:0] b_s_re, b_s_im, b_d_re, b_d_im;
  logic signed [W2-1:0] b_m_re, b_m_im;                   // lower output times 1 or -j

  assign sel1   = cnt[2] & cnt[1];
  assign mt1_re = sel1 ? r2_re : a_s_re;
  assign mt1_im = sel1 ? r2_im : a_s_im;
  assign mb1_re = sel1 ? a_s_re : r2_re;
  assign mb1_im = sel1 ? a_s_im : r2_im;

  always_ff @(posedge clk) begin
    if (en) begin
      r1_re <= a_m_re;  r1_im <= a_m_im;
      r2_re <= r1_re;   r2_im <= r1_im;
      r3_re <= mt1_re;  r3_im <= mt1_im;
      r4_re <= r3_re;   r4_im <= r3_im;
    end
  end

  bf2 #(.W(W1)) u_bf2 (
    .a_re(r4_re), .a_im(r4_im), .b_re(mb1_re), .b_im(mb1_im), .rot_b(1'b0),
    .s_re(b_s_re), .s_im(b_s_im), .d_re(b_d_re), .d_im(b_d_im));

  // W8^2 = -j for the odd BFII operations (cnt 7 and 1): (a + jb)(-j) = b - ja
  assign b_m_re = cnt[0] ? b_d_im  : b_d_re;
  assign b_m_im = cnt[0] ? -b_d_re : b_d_im;

  // ---- D registers and BFIII ----
  logic signed [W2-1:0] dl_re, dl_im, du_re, du_im;
  logic signed [W2-1:0] mt2_re, mt2_im, mb2_re, mb2_im;
  logic                 sel2;
  logic signed [W3-1:0] c_s_re, c_s_im, c_d_re, c_d_im;

  assign sel2   = cnt[0];
  assign mt2_re = sel2 ? dl_re : b_s_re;
  assign mt2_im = sel2 ? dl_im : b_s_im;
  assign mb2_re = sel2 ? b_s_re : dl_re;
  assign mb2_im = sel2 ? b_s_im : dl_im;

  always_ff @(posedge clk) begin
    if (en) begin
      dl_re <= b_m_re;  dl_im <= b_m_im;
      du_re <= mt2_re;  du_im <= mt2_im;
    end
  end

  bf2 #(.W(W2)) u_bf3 (
    .a_re(du_re), .a_im(du_im), .b_re(mb2_re), .b_im(mb2_im), .rot_b(1'b0),
    .s_re(c_s_re), .s_im(c_s_im), .d_re(c_d_re), .d_im(c_d_im));

  // ---- output register ----
  logic out_now;
  assign out_now = (cnt == 3'd7) || (primed && (cnt <= 3'd2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_k     <= '0;
      out0_re   <= '0;
      out0_im   <= '0;
      out1_re   <= '0;
      out1_im   <= '0;
    end else begin
      out_valid <= en && out_now;
      if (en) begin
        // cnt 7, 0, 1, 2 -> k = 0, 2, 1, 3
        unique case (cnt)
          3'd0:    out_k <= 2'd2;
          3'd1:    out_k <= 2'd1;
          3'd2:    out_k <= 2'd3;
          default: out_k <= 2'd0;
        endcase
        out0_re <= c_s_re;
        out0_im <= c_s_im;
        out1_re <= c_d_re;
        out1_im <= c_d_im;
      end
    end
  end

endmodule
