// hbu_ccm16: approximate 16-bit truncated constant multiplier assembled from
// 8-bit HBU multipliers by pencil-and-paper decomposition. With
// C = cH*2^8 + cL and x = xH*2^8 + xL,
//   C*x / 2^16 = cH*xH + (cL*xH + cH*xL) / 2^8 + cL*xL / 2^16,
// so the 16-bit result is the exact 8x8 product cH*xH (non-truncated HBU
// multiplier) plus two 8-bit truncated, rounded HBU products q(cL*xH) and
// q(cH*xL); the cL*xL term is dropped. The sum needs no more than 16 bits.
//
// Interface: clk, x_i (16 bits) in, y_o (16 bits) out, y_o ~= C*x/2^16.
// Timing: the three sub-multipliers register the operand at one rising edge
// and their products at the next; the final adder follows those registers
// combinationally, so y_o is valid two edges after x_i (latency 2). Each
// sub-multiplier keeps its own encoder here, which is this design's
// simplification; the document shares encoders where it can.
module hbu_ccm16
  import hbu_pkg::*;
#(
  parameter longint C     = 46341,
  parameter int     M     = 5,
  parameter bit     ROUND = 1'b1
) (
  input  logic        clk,
  input  logic [15:0] x_i,
  output logic [15:0] y_o
);
  localparam longint CH = (C >>> 8) & 255;
  localparam longint CL = C & 255;

  logic [15:0] f2;
  logic [7:0]  f0, f1;

  // f2 = cH * xH, exact 16-bit product
  hbu_ccm_nt #(.N(8), .C(CH), .MS(4), .M(M)) u_f2 (.clk(clk), .x_i(x_i[15:8]), .y_o(f2));
  // f0 = cL x xH, truncated to 8 bits
  hbu_ccm #(.N(8), .C(CL), .M(M), .ROUND(ROUND)) u_f0 (.clk(clk), .x_i(x_i[15:8]), .y_o(f0));
  // f1 = cH x xL, truncated to 8 bits
  hbu_ccm #(.N(8), .C(CH), .M(M), .ROUND(ROUND)) u_f1 (.clk(clk), .x_i(x_i[7:0]), .y_o(f1));

  logic [16:0] sum;
  assign sum = 17'(f2) + 17'(f0) + 17'(f1);
  assign y_o = sum[16] ? 16'hFFFF : sum[15:0];
endmodule
