// unary_core: the fully unary computation stage of an HBU multiplier. It
// evaluates the base function f_base(x) = q(C*x) for 0 <= x < 2^M using wires
// only: the output is again a thermometer code, and output wire j is a copy of
// the input wire that turns on at the smallest x with f_base(x) > j. Because a
// constant multiplication is monotonic, no gate is needed; a slope below 1
// makes several input wires go unused, a slope above 1 gives one input wire
// several output copies. Those unused input wires are expected, and a lint
// tool reports them as unused signals.
//
// q() is the quantiser of hbu_pkg::qmul: C*x / 2^SHIFT, floored or rounded
// half-up (ROUND). SHIFT = N gives the core of a truncated N-bit multiplier,
// SHIFT = 0 the exact core of a non-truncated one.
//
// Interface: therm_i (2^M-1 wires) in, therm_o (L = f_base(2^M-1) wires, at
// least one) out. Combinational, wires only. If C = 0 the core has no output
// wire and therm_o is held at 0.
//
// The wires-only core follows the published method; the rule that picks the
// source wire is this design's own formulation of it.
module unary_core
  import hbu_pkg::*;
#(
  parameter int     M     = 5,
  parameter longint C     = 167,
  parameter int     SHIFT = 8,
  parameter bit     ROUND = 1'b1,
  localparam int    L     = core_len(C, M, SHIFT, ROUND),
  localparam int    LW    = (L < 1) ? 1 : L
) (
  input  logic [2**M-2:0] therm_i,
  output logic [LW-1:0]   therm_o
);
  if (L < 1) begin : g_empty
    assign therm_o = '0;
  end else begin : g_route
    for (genvar j = 0; j < L; j++) begin : g_out
      localparam int SRC = first_reach(C, M, SHIFT, ROUND, j);
      assign therm_o[j] = therm_i[SRC-1];
    end
  end
endmodule
