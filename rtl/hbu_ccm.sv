// hbu_ccm: truncated N-bit hybrid binary-unary constant-coefficient
// multiplier, y ~= q(C * x / 2^N), the architecture of four units between an
// input and an output register: thermometer encoder on the lower M operand
// bits, routing-only unary core for the base function, multiplexer decoder,
// and a bias multiplexer plus binary adder driven by the upper N-M bits.
//
// The operand range is split into 2^(N-M) sub-ranges of length 2^M, all
// sharing one base function; each sub-range adds its own bias. The result is
// within one unit of q(C*x/2^N) (floor when ROUND = 0, round-half-up when
// ROUND = 1).
//
// Interface: clk, x_i (N bits) in, y_o (N bits) out. Timing: x_i is
// registered at a rising edge, y_o is registered one edge later, so y_o
// carries the product of the x_i sampled two edges earlier (latency 2, one
// result per cycle). The registers have no reset: they carry data only. The
// default constant 167/256 = 0.6523 with a 5-bit encoder is the document's
// unsigned 8-bit example.
module hbu_ccm
  import hbu_pkg::*;
#(
  parameter int     N     = 8,
  parameter longint C     = 167,
  parameter int     M     = 5,
  parameter bit     ROUND = 1'b1
) (
  input  logic         clk,
  input  logic [N-1:0] x_i,
  output logic [N-1:0] y_o
);
  logic [N-1:0]    x_q;
  logic [2**M-2:0] therm;
  logic [N-1:0]    y_d;

  always_ff @(posedge clk) x_q <= x_i;

  therm_enc #(.M(M)) u_enc (.bin_i(x_q[M-1:0]), .therm_o(therm));

  hbu_ccm_path #(.N(N), .C(C), .M(M), .SHIFT(N), .ROUND(ROUND), .OUT_W(N)) u_path (
    .therm_i(therm), .region_i(x_q[N-1:M]), .y_o(y_d));

  always_ff @(posedge clk) y_o <= y_d;
endmodule
