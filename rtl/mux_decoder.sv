// mux_decoder: thermometer-to-binary decoder built from multiplexers, the
// stage after the unary core of an HBU multiplier. The count of set wires is
// found by binary search: the top output bit is the thermometer wire at
// 2^(W-1); each lower bit is the wire selected by the bits already decided
// plus its own weight, i.e. one multiplexer per output bit whose select
// inputs are the higher output bits.
//
// Interface: therm_i (L wires, first ones set) in, bin_o (W = clog2(L+1)
// bits) out. Combinational. The document names a multiplexer-based decoder;
// the binary-search arrangement is this design's choice.
module mux_decoder #(
  parameter  int L = 20,
  localparam int W = $clog2(L + 1)
) (
  input  logic [L-1:0] therm_i,
  output logic [W-1:0] bin_o
);
  // level[i] = 1 when the coded value is at least i; level[0] is always 1.
  logic [2**W-1:0] level;
  assign level = (2**W)'({therm_i, 1'b1});

  always_comb begin
    bin_o = '0;
    for (int k = W - 1; k >= 0; k--)
      bin_o[k] = level[bin_o | W'(1 << k)];
  end
endmodule
