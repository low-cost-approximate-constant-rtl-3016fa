// therm_enc: binary-to-thermometer encoder, the first stage of an HBU
// constant-coefficient multiplier. It turns the lower M bits of the operand
// into 2^M-1 parallel wires of which the first bin_i are 1 and the rest 0
// (wire i is set when bin_i > i).
//
// Interface: bin_i (M bits) in, therm_o (2^M-1 wires) out. Purely
// combinational. The thermometer format is the one the HBU method uses; the
// encoder is built here as one constant comparison per wire, which is this
// design's own choice of structure.
module therm_enc #(
  parameter int M = 5
) (
  input  logic [M-1:0]      bin_i,
  output logic [2**M-2:0]   therm_o
);
  for (genvar i = 0; i < 2**M - 1; i++) begin : g_wire
    assign therm_o[i] = (bin_i > M'(i));
  end
endmodule
