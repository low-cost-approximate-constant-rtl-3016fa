// dct2d: fully parallel BxB 2-D DCT engine (B = 8 by default) built from HBU
// constant multipliers. B*B sub-kernels, one per output coefficient, each
// hold B*B multipliers and a pipelined adder tree (64 x 64 = 4096 multipliers
// for 8x8), so a whole block goes in and a whole transformed block comes out
// every clock cycle.
//
// Interface: clk, rst_n (active-low, clears the valid pipeline only),
// in_valid_i with pix_i[B*B] (signed 8-bit samples, already shifted by -128,
// index B*x + y), and out_valid_o with coef_o[B*B] (index B*u + v, each about
// (B/2)*F(u,v), i.e. 4*F(u,v) for 8x8; dct_out_w(B) = 14 bits signed for
// 8x8). Timing: out_valid_o and the coefficients of a block follow in_valid_i
// by 2 + log2(B*B) rising edges (8 for 8x8, as in the document); blocks may
// arrive on consecutive cycles. B other than 8 is this design's extension.
module dct2d
  import hbu_pkg::*;
#(
  parameter  int B  = 8,
  parameter  int M  = 5,
  localparam int OW = dct_out_w(B)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid_i,
  input  logic signed [7:0]    pix_i [B*B],
  output logic                 out_valid_o,
  output logic signed [OW-1:0] coef_o [B*B]
);
  localparam int LATENCY = 2 + $clog2(B * B);

  for (genvar k = 0; k < B*B; k++) begin : g_kern
    dct_subkernel #(.B(B), .U(k / B), .V(k % B), .M(M)) u_sub (
      .clk(clk), .pix_i(pix_i), .coef_o(coef_o[k]));
  end

  logic [LATENCY-1:0] vld_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LATENCY-2:0], in_valid_i};
  end
  assign out_valid_o = vld_q[LATENCY-1];
endmodule
