// dct_subkernel: computes one coefficient F(U,V) of a BxB 2-D DCT-II
// (B = 8 by default) directly from the B*B samples of a block,
//   F(U,V) = sum_{x,y} T(U,V,x,y) * f(x,y),
// with one constant multiplier per sample (B*B HBU multipliers in
// sign-magnitude form, floored magnitude) and a fully pipelined adder tree.
//
// The basis values T are scaled by 256*B/2 (1024 for B = 8) and rounded to
// 8-bit magnitudes at elaboration time (hbu_pkg::dct_coef); an 8x8-bit
// truncated product divides by 256, so coef_o is about (B/2)*F(U,V), that is
// 4*F(U,V) for B = 8. Zero basis values need no multiplier.
//
// Interface: clk, pix_i[B*B] (signed 8-bit level-shifted samples, index
// B*x + y, x the row) in, coef_o (signed dct_out_w(B) bits, 14 for B = 8)
// out. Timing: latency 2 + log2(B*B) rising edges (8 for B = 8: 2 in the
// multipliers, 6 in the tree), a new block every cycle, no reset. The 64
// multipliers and the 8-cycle latency of the 8x8 case follow the document; the
// scale and the encoder width M = 5 are this design's choices.
module dct_subkernel
  import hbu_pkg::*;
#(
  parameter  int B  = 8,
  parameter  int U  = 1,
  parameter  int V  = 2,
  parameter  int M  = 5,
  localparam int OW = dct_out_w(B)
) (
  input  logic                 clk,
  input  logic signed [7:0]    pix_i [B*B],
  output logic signed [OW-1:0] coef_o
);
  logic signed [8:0] prod [B*B];

  for (genvar p = 0; p < B*B; p++) begin : g_mul
    localparam int     T    = dct_coef(B, U, V, p / B, p % B);
    localparam longint TMAG = (T < 0) ? -longint'(T) : longint'(T);
    if (T != 0) begin : g_ccm
      sm_ccm #(.W(8), .CMAG(TMAG), .NEG(T < 0), .ROUND(1'b0), .M(M)) u_ccm (
        .clk(clk), .x_i(pix_i[p]), .y_o(prod[p]));
    end else begin : g_zero
      assign prod[p] = '0;
    end
  end

  adder_tree #(.NUM(B*B), .IN_W(9), .OUT_W(OW)) u_tree (
    .clk(clk), .in_i(prod), .sum_o(coef_o));
endmodule
