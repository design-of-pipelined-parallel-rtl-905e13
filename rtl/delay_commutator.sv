// delay_commutator: delay elements and switch that pair samples L clocks apart.
//
// Two streams u and l enter each clock. The lower stream first passes an
// L-stage delay line, then a 2x2 switch either passes both streams straight
// (swap = 0) or exchanges them (swap = 1), and the upper switch output passes
// a second L-stage delay line. Driving swap with bit log2(L) of the frame
// phase makes the outputs carry, during one half of each 2L-clock block, the
// pair (u(t-L), u(t)) and during the other half the pair (l(t-2L), l(t-L)): two
// samples that were L clocks apart on the same input now sit side by side for
// the next butterfly. Latency is L clocks; 2L registers per real part.
//
// All registers advance only when en is high, so a stalled input freezes the
// block. The delay elements are not reset: their content before the first
// frame is never used. Structure (delay on the lower input, switch, delay on
// the upper output) follows the document's block diagram; the polarity of the
// switch control is this design's choice.
module delay_commutator #(
  parameter int unsigned W = 16,   // width of each real part
  parameter int unsigned L = 16    // delay length in clocks
) (
  input  logic                clk,
  input  logic                en,
  input  logic                swap,
  input  logic signed [W-1:0] u_re,
  input  logic signed [W-1:0] u_im,
  input  logic signed [W-1:0] l_re,
  input  logic signed [W-1:0] l_im,
  output logic signed [W-1:0] ou_re,
  output logic signed [W-1:0] ou_im,
  output logic signed [W-1:0] ol_re,
  output logic signed [W-1:0] ol_im
);

  logic signed [2*W-1:0] dl_lo [L];   // delay line on the lower input {re, im}
  logic signed [2*W-1:0] dl_up [L];   // delay line on the upper switch output
  logic signed [2*W-1:0] sw_up, sw_lo;

  always_comb begin
    if (swap) begin
      sw_up = dl_lo[L-1];
      sw_lo = {u_re, u_im};
    end else begin
      sw_up = {u_re, u_im};
      sw_lo = dl_lo[L-1];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dl_lo[0] <= {l_re, l_im};
      dl_up[0] <= sw_up;
      for (int i = 1; i < int'(L); i++) begin
        dl_lo[i] <= dl_lo[i-1];
        dl_up[i] <= dl_up[i-1];
      end
    end
  end

  assign {ou_re, ou_im} = dl_up[L-1];
  assign {ol_re, ol_im} = sw_lo;

endmodule
