// bias_adder: the binary back end of an HBU multiplier. The upper N-M operand
// bits name the sub-range r the operand falls in; a multiplexer picks that
// sub-range's bias b_r = q(C * r * 2^M) and a binary adder adds it to the
// decoded base-function value, giving g(x) = f_base(x mod 2^M) + b_r.
//
// With the exact quantiser (SHIFT = 0) g(x) equals C*x. With a truncating
// quantiser the sum can differ from q(C*x) by one unit: the two quantisation
// steps do not line up (the aliasing error of the method).
//
// Interface: region_i (N-M bits) and base_i (BASE_W bits) in, y_o (OUT_W
// bits) out. Combinational. Choosing b_r as the exact value at the start of
// each sub-range follows the document's 5-bit example (bias 5 = q(9*16));
// the table is built at elaboration time.
module bias_adder
  import hbu_pkg::*;
#(
  parameter int     N      = 8,
  parameter longint C      = 167,
  parameter int     M      = 5,
  parameter int     SHIFT  = 8,
  parameter bit     ROUND  = 1'b1,
  parameter int     BASE_W = 5,
  parameter int     OUT_W  = 8
) (
  input  logic [N-M-1:0]    region_i,
  input  logic [BASE_W-1:0] base_i,
  output logic [OUT_W-1:0]  y_o
);
  localparam int R = 2**(N-M);

  logic [OUT_W-1:0] bias_tab [R];
  for (genvar r = 0; r < R; r++) begin : g_bias
    localparam longint B = qmul(C, longint'(r) <<< M, SHIFT, ROUND);
    assign bias_tab[r] = OUT_W'(B);
  end

  assign y_o = bias_tab[region_i] + OUT_W'(base_i);
endmodule
