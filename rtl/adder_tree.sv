// adder_tree: fully pipelined binary adder tree. NUM signed inputs (a power
// of two) are summed pairwise, one register level per tree level, so the sum
// appears log2(NUM) rising edges after the inputs and a new set of inputs can
// be accepted every cycle. Inputs are IN_W bits and are sign-extended to the
// OUT_W-bit result before the first addition, so no level overflows as long
// as OUT_W >= IN_W + log2(NUM) or the application bounds the sum. No reset:
// the tree carries data only.
//
// The published DCT asks for 'a fully pipelined adder tree'; the pairwise
// structure, one register per level and the widths are this design's own choice.
module adder_tree #(
  parameter int NUM   = 64,
  parameter int IN_W  = 9,
  parameter int OUT_W = 14
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  in_i [NUM],
  output logic signed [OUT_W-1:0] sum_o
);
  localparam int LEVELS = $clog2(NUM);

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic signed [OUT_W-1:0] s [NUM >> l];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < NUM; i++) begin : g_in
        assign s[i] = OUT_W'(in_i[i]);
      end
    end else begin : g_add
      for (genvar i = 0; i < (NUM >> l); i++) begin : g_node
        always_ff @(posedge clk) s[i] <= g_lvl[l-1].s[2*i] + g_lvl[l-1].s[2*i+1];
      end
    end
  end

  assign sum_o = g_lvl[LEVELS].s[0];
endmodule
