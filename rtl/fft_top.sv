// fft_top: the FFT processors side by side, each with its own ports.
//
//   cfft_*  4-parallel 128-point radix-2^4 feedforward FFT for complex input
//           (cfft128_r24): four samples x(4t+i) per clock, four bins per clock
//   rfft_*  4-parallel 128-point FFT for real input (rfft128): four real
//           samples per clock, the non-redundant half of the spectrum out
//   f8_*    8-point radix-2 FFT folded onto three butterflies (folded_fft8):
//           one sample per clock, two bins per clock half of the time
//
// The three share no logic and no control; each is described in its own file.
// All use one clock and an active-low asynchronous reset; each block's
// in_valid advances its pipeline and a low in_valid stalls it.
module fft_top #(
  parameter int unsigned DW = 16    // input width of each real part
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // complex 128-point FFT
  input  logic                 cfft_in_valid,
  input  logic signed [DW-1:0] cfft_in_re  [4],
  input  logic signed [DW-1:0] cfft_in_im  [4],
  output logic                 cfft_out_valid,
  output logic                 cfft_out_sof,
  output logic        [6:0]    cfft_out_k,
  output logic signed [DW+7:0] cfft_out_re [4],
  output logic signed [DW+7:0] cfft_out_im [4],
  // real 128-point FFT
  input  logic                 rfft_in_valid,
  input  logic signed [DW-1:0] rfft_in     [4],
  output logic        [3:0]    rfft_out_valid,
  output logic                 rfft_out_sof,
  output logic        [6:0]    rfft_out_k  [4],
  output logic signed [DW+7:0] rfft_out_re [4],
  output logic signed [DW+7:0] rfft_out_im [4],
  // folded 8-point FFT
  input  logic                 f8_in_valid,
  input  logic signed [DW-1:0] f8_in_re,
  input  logic signed [DW-1:0] f8_in_im,
  output logic                 f8_out_valid,
  output logic        [1:0]    f8_out_k,
  output logic signed [DW+3:0] f8_out0_re,
  output logic signed [DW+3:0] f8_out0_im,
  output logic signed [DW+3:0] f8_out1_re,
  output logic signed [DW+3:0] f8_out1_im
);

  cfft128_r24 #(.DW(DW)) u_cfft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cfft_in_valid), .in_re(cfft_in_re), .in_im(cfft_in_im),
    .out_valid(cfft_out_valid), .out_sof(cfft_out_sof), .out_k(cfft_out_k),
    .out_re(cfft_out_re), .out_im(cfft_out_im));

  rfft128 #(.DW(DW)) u_rfft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(rfft_in_valid), .in_x(rfft_in),
    .out_valid(rfft_out_valid), .out_sof(rfft_out_sof), .out_k(rfft_out_k),
    .out_re(rfft_out_re), .out_im(rfft_out_im));

  folded_fft8 #(.DW(DW)) u_f8 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(f8_in_valid), .in_re(f8_in_re), .in_im(f8_in_im),
    .out_valid(f8_out_valid), .out_k(f8_out_k),
    .out0_re(f8_out0_re), .out0_im(f8_out0_im), .out1_re(f8_out1_re), .out1_im(f8_out1_im));

endmodule
