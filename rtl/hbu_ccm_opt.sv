// hbu_ccm_opt: cost-optimised truncated HBU multiplier. The coefficient is
// built from up to three sub-coefficients, C = A[0]*CS[0] + A[1]*CS[1] +
// A[2]*CS[2] with A[i] in {-1, 0, +1}; each term is a truncated HBU path and
// all paths share one thermometer encoder (the sub-coefficients are chosen
// with equal encoder size). The terms are added or subtracted and the result
// is clamped to 0..2^N-1. Each term is within one unit of its exact value, so
// the sum is within a few units of q(C*x/2^N).
//
// Choosing the sub-coefficients is a search done before synthesis; it is not
// hardware, and here they are parameters. The default 68 = 26 + 42 is the
// document's example of a two-term set with equal encoders.
//
// Interface: clk, x_i (N bits) in, y_o (N bits) out. Timing: operand
// registered at one rising edge, result at the next (latency 2), no reset.
module hbu_ccm_opt
  import hbu_pkg::*;
#(
  parameter int     N      = 8,
  parameter longint CS [3] = '{26, 42, 0},
  parameter int     A  [3] = '{1, 1, 0},
  parameter int     M      = 5,
  parameter bit     ROUND  = 1'b1
) (
  input  logic         clk,
  input  logic [N-1:0] x_i,
  output logic [N-1:0] y_o
);
  localparam int SW = N + 3;   // signed sum width: three N-bit terms

  logic [N-1:0]         x_q;
  logic [2**M-2:0]      therm;
  logic [N-1:0]         term [3];
  logic signed [SW-1:0] sum;

  always_ff @(posedge clk) x_q <= x_i;

  therm_enc #(.M(M)) u_enc (.bin_i(x_q[M-1:0]), .therm_o(therm));

  for (genvar i = 0; i < 3; i++) begin : g_term
    if (A[i] != 0) begin : g_on
      hbu_ccm_path #(.N(N), .C(CS[i]), .M(M), .SHIFT(N), .ROUND(ROUND), .OUT_W(N)) u_path (
        .therm_i(therm), .region_i(x_q[N-1:M]), .y_o(term[i]));
    end else begin : g_off
      assign term[i] = '0;
    end
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < 3; i++) begin
      if (A[i] > 0)      sum = sum + SW'(term[i]);
      else if (A[i] < 0) sum = sum - SW'(term[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (sum < 0)                       y_o <= '0;
    else if (sum > SW'((1 << N) - 1))  y_o <= '1;
    else                               y_o <= sum[N-1:0];
  end
endmodule
