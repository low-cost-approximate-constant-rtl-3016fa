// hbu_dsp_top: the two DSP engines built from hybrid binary-unary (HBU)
// constant-coefficient multipliers, side by side, plus one stand-alone
// cost-optimised 8-bit HBU multiplier lane.
//
//  * dct2d   - fully parallel 8x8 (DCT_B x DCT_B) 2-D DCT: 64 sub-kernels
//              of 64 8-bit sign-magnitude HBU multipliers and a pipelined
//              adder tree; one block per cycle, latency 8; 14-bit outputs.
//  * fft_dit - pipelined-parallel radix-2 DIT FFT of FFT_NPT 16-bit complex
//              points; every twiddle product uses 16-bit HBU multipliers
//              assembled from 8-bit ones; one frame per cycle, latency
//              4*log2(FFT_NPT).
//  * hbu_ccm_opt - an 8-bit truncated multiplier whose coefficient is split
//              into sub-coefficients sharing one encoder (68 = 26 + 42).
//
// The three parts share clk and rst_n (active-low, clears the valid
// pipelines) and are otherwise independent; each brings its own ports out.
// Ports and timing are those of the instantiated blocks.
//
// The DCT and FFT engines and their default sizes follow the published case
// studies; placing them side by side with a stand-alone optimised multiplier
// lane, and the reset scheme, are this design's own choices.
module hbu_dsp_top
  import hbu_pkg::*;
#(
  parameter  int DCT_B   = 8,
  parameter  int FFT_NPT = 128,
  parameter  int M       = 5,
  localparam int DCT_OW  = dct_out_w(DCT_B)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // 2-D DCT
  input  logic                        dct_in_valid_i,
  input  logic signed [7:0]           dct_pix_i [DCT_B*DCT_B],
  output logic                        dct_out_valid_o,
  output logic signed [DCT_OW-1:0]    dct_coef_o [DCT_B*DCT_B],
  // FFT
  input  logic                        fft_in_valid_i,
  input  logic signed [15:0]          fft_x_re_i [FFT_NPT],
  input  logic signed [15:0]          fft_x_im_i [FFT_NPT],
  output logic                        fft_out_valid_o,
  output logic signed [15:0]          fft_y_re_o [FFT_NPT],
  output logic signed [15:0]          fft_y_im_o [FFT_NPT],
  // stand-alone optimised multiplier, y ~= 68*x/256
  input  logic [7:0]                  ccm_x_i,
  output logic [7:0]                  ccm_y_o
);
  dct2d #(.B(DCT_B), .M(M)) u_dct (
    .clk(clk), .rst_n(rst_n),
    .in_valid_i(dct_in_valid_i), .pix_i(dct_pix_i),
    .out_valid_o(dct_out_valid_o), .coef_o(dct_coef_o));

  fft_dit #(.NPT(FFT_NPT), .M(M)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .in_valid_i(fft_in_valid_i), .x_re_i(fft_x_re_i), .x_im_i(fft_x_im_i),
    .out_valid_o(fft_out_valid_o), .y_re_o(fft_y_re_o), .y_im_o(fft_y_im_o));

  hbu_ccm_opt #(.N(8), .CS('{26, 42, 0}), .A('{1, 1, 0}), .M(M), .ROUND(1'b1)) u_ccm (
    .clk(clk), .x_i(ccm_x_i), .y_o(ccm_y_o));
endmodule
