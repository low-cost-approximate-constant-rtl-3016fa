// hbu_ccm_nt_tb: streams all 256 operands through four exact 8x8 HBU
// multipliers (167, 255, 1 and 16, the last two with an empty half) and
// checks every 16-bit product two cycles later against C*x.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module hbu_ccm_nt_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  x;
  logic [15:0] y [4];
  localparam longint CV [4] = '{167, 255, 1, 16};
  int checks = 0, failures = 0;

  hbu_ccm_nt                           d0 (.clk(clk), .x_i(x), .y_o(y[0]));
  hbu_ccm_nt #(.C(255))                d1 (.clk(clk), .x_i(x), .y_o(y[1]));
  hbu_ccm_nt #(.C(1), .MS(3))          d2 (.clk(clk), .x_i(x), .y_o(y[2]));
  hbu_ccm_nt #(.C(16), .MS(5), .M(4))  d3 (.clk(clk), .x_i(x), .y_o(y[3]));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 257; v++) begin
      x <= 8'(v);
      @(posedge clk);
      #1;
      if (v >= 1)
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (longint'(y[k]) != CV[k] * (v - 1)) begin
            failures++; $display("FAIL C=%0d x=%0d y=%0d", CV[k], v - 1, y[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
