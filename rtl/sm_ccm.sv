// sm_ccm: signed constant multiplier in sign-magnitude form around an
// unsigned HBU multiplier: y = sign(x)*sign(C) * q(|C| * |x| / 2^W). The
// operand magnitude goes through the unsigned multiplier (hbu_ccm for W = 8,
// hbu_ccm16 for W = 16); the product sign travels alongside in a two-stage
// delay line and is applied after the multiplier's output register.
//
// Interface: clk, x_i (signed W bits) in, y_o (signed W+1 bits) out. CMAG is
// the unsigned W-bit magnitude of the constant (scale 2^W) and NEG its sign.
// Timing: latency 2, one result per cycle, no reset. Sign-magnitude
// multiplication with a floored magnitude (ROUND = 0) is what the document
// uses in its DCT; using the same scheme with rounding in the FFT is this
// design's choice.
module sm_ccm
  import hbu_pkg::*;
#(
  parameter int     W     = 8,
  parameter longint CMAG  = 100,
  parameter bit     NEG   = 1'b0,
  parameter bit     ROUND = 1'b0,
  parameter int     M     = 5
) (
  input  logic                clk,
  input  logic signed [W-1:0] x_i,
  output logic signed [W:0]   y_o
);
  logic [W-1:0] mag_in, mag_out;
  logic [1:0]   sgn_q;

  // |x| fits W unsigned bits, including |-2^(W-1)|
  assign mag_in = x_i[W-1] ? W'(-x_i) : W'(x_i);

  always_ff @(posedge clk) sgn_q <= {sgn_q[0], x_i[W-1] ^ NEG};

  if (W == 16) begin : g_w16
    hbu_ccm16 #(.C(CMAG), .M(M), .ROUND(ROUND)) u_mag (.clk(clk), .x_i(mag_in), .y_o(mag_out));
  end else begin : g_wn
    hbu_ccm #(.N(W), .C(CMAG), .M(M), .ROUND(ROUND)) u_mag (.clk(clk), .x_i(mag_in), .y_o(mag_out));
  end

  assign y_o = sgn_q[1] ? -$signed({1'b0, mag_out}) : $signed({1'b0, mag_out});
endmodule
