// hbu_ccm16_tb: streams random and corner 16-bit operands through three
// 16-bit multipliers and checks each result two cycles later against the
// three-part reference g16() and against the exact rounded product
// C*x/2^16 (at most three units apart).
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module hbu_ccm16_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam longint CV [3] = '{46341, 65535, 6393};
  logic [15:0] x;
  logic [15:0] y [3];
  logic [15:0] hist [3];
  int checks = 0, failures = 0, maxerr = 0;

  hbu_ccm16                 d0 (.clk(clk), .x_i(x), .y_o(y[0]));
  hbu_ccm16 #(.C(65535))    d1 (.clk(clk), .x_i(x), .y_o(y[1]));
  hbu_ccm16 #(.C(6393))     d2 (.clk(clk), .x_i(x), .y_o(y[2]));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2002; n++) begin
      logic [15:0] v;
      v = (n == 0) ? 16'hFFFF : (n == 1) ? 16'h0000 : (n == 2) ? 16'h8000 : 16'($urandom);
      x <= v;
      @(posedge clk);
      #1;
      hist[1] = hist[0]; hist[0] = v;
      if (n >= 1) begin
        for (int k = 0; k < 3; k++) begin
          longint e, ex, d;
          e  = g16(CV[k], 5, 1, longint'(hist[1]));
          ex = q(CV[k], longint'(hist[1]), 16, 1);
          d  = longint'(y[k]) - ex;
          if (d < 0) d = -d;
          if (d > maxerr) maxerr = int'(d);
          checks += 2;
          if (longint'(y[k]) != e) begin failures++; $display("FAIL C=%0d x=%0d y=%0d exp %0d", CV[k], hist[1], y[k], e); end
          if (d > 3) begin failures++; $display("FAIL C=%0d x=%0d error %0d", CV[k], hist[1], d); end
        end
      end
    end
    $display("largest error against the exact product: %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
