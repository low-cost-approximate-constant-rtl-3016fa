// hbu_ccm_nt: non-truncated (exact) N x N-bit HBU constant-coefficient
// multiplier, y = C * x with a 2N-bit result.
//
// A full-width exact unary core would need C*(2^M-1) output wires and a
// decoder to match. The coefficient is therefore split at bit MS into
// C1 = C[N-1:MS] and C0 = C[MS-1:0]; two exact HBU paths compute C1*x and C0*x
// from one shared thermometer encoder, and the result is (C1*x << MS) + C0*x.
// With the exact quantiser every bias is exact, so the product is exact.
//
// Interface: clk, x_i (N bits) in, y_o (2N bits) out. Timing: operand
// registered at one rising edge, product registered at the next (latency 2,
// one result per cycle), no reset. The split point near N/2 follows the
// document; the encoder width M = 5 is this design's choice.
module hbu_ccm_nt
  import hbu_pkg::*;
#(
  parameter int     N  = 8,
  parameter longint C  = 167,
  parameter int     MS = 4,
  parameter int     M  = 5
) (
  input  logic           clk,
  input  logic [N-1:0]   x_i,
  output logic [2*N-1:0] y_o
);
  localparam longint C1 = C >>> MS;
  localparam longint C0 = C & ((longint'(1) <<< MS) - 1);
  localparam int     W1 = 2*N - MS;   // width of C1*x
  localparam int     W0 = N + MS;     // width of C0*x

  logic [N-1:0]    x_q;
  logic [2**M-2:0] therm;
  logic [W1-1:0]   p1;
  logic [W0-1:0]   p0;

  always_ff @(posedge clk) x_q <= x_i;

  therm_enc #(.M(M)) u_enc (.bin_i(x_q[M-1:0]), .therm_o(therm));

  hbu_ccm_path #(.N(N), .C(C1), .M(M), .SHIFT(0), .ROUND(1'b0), .OUT_W(W1)) u_hi (
    .therm_i(therm), .region_i(x_q[N-1:M]), .y_o(p1));

  hbu_ccm_path #(.N(N), .C(C0), .M(M), .SHIFT(0), .ROUND(1'b0), .OUT_W(W0)) u_lo (
    .therm_i(therm), .region_i(x_q[N-1:M]), .y_o(p0));

  always_ff @(posedge clk) y_o <= {p1, MS'(0)} + (2*N)'(p0);
endmodule
