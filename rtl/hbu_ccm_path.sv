// hbu_ccm_path: one complete HBU multiplier behind a (possibly shared)
// thermometer encoder: unary core, multiplexer decoder and bias adder in a
// row. Several paths can hang off one encoder when their encoders would have
// the same size (split or optimised multipliers).
//
// Interface: therm_i (thermometer of the lower M operand bits) and region_i
// (upper N-M operand bits) in; y_o = f_base(x mod 2^M) + b_region out, OUT_W
// bits. Combinational.
//
// The chain of stages follows the published multiplier; grouping them into one
// helper behind a shared encoder is this design's own choice.
module hbu_ccm_path
  import hbu_pkg::*;
#(
  parameter int     N     = 8,
  parameter longint C     = 167,
  parameter int     M     = 5,
  parameter int     SHIFT = 8,
  parameter bit     ROUND = 1'b1,
  parameter int     OUT_W = 8
) (
  input  logic [2**M-2:0] therm_i,
  input  logic [N-M-1:0]  region_i,
  output logic [OUT_W-1:0] y_o
);
  localparam int L  = core_len(C, M, SHIFT, ROUND);
  localparam int LW = (L < 1) ? 1 : L;
  localparam int BW = $clog2(LW + 1);

  logic [LW-1:0] core_therm;
  logic [BW-1:0] base_bin;

  unary_core #(.M(M), .C(C), .SHIFT(SHIFT), .ROUND(ROUND)) u_core (
    .therm_i(therm_i), .therm_o(core_therm));

  mux_decoder #(.L(LW)) u_dec (.therm_i(core_therm), .bin_o(base_bin));

  bias_adder #(.N(N), .C(C), .M(M), .SHIFT(SHIFT), .ROUND(ROUND),
               .BASE_W(BW), .OUT_W(OUT_W)) u_bias (
    .region_i(region_i), .base_i(base_bin), .y_o(y_o));
endmodule
