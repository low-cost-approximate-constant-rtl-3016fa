// hbu_ccm_tb: streams every 8-bit operand through the default multiplier
// (167/256, 5-bit encoder) one per cycle and checks each result, two cycles
// later, against the HBU reference g(x) and against the exact rounded product
// (at most one unit apart). A second instance is the 5-bit example with
// constant 9 and a 4-bit encoder, whose outputs at x = 16..19 must be
// 5, 5, 6, 6 (bias 5 added to the base function).
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module hbu_ccm_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] x, y;
  logic [4:0] x5, y5;
  int checks = 0, failures = 0, aliased = 0;

  hbu_ccm dut (.clk(clk), .x_i(x), .y_o(y));
  hbu_ccm #(.N(5), .C(9), .M(4), .ROUND(1'b1)) dut5 (.clk(clk), .x_i(x5), .y_o(y5));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp5 [4] = '{5, 5, 6, 6};
    for (int v = 0; v < 256 + 1; v++) begin
      x  <= 8'(v);
      x5 <= 5'(v);
      @(posedge clk);
      #1;
      if (v >= 1) begin
        // result of the operand applied two edges earlier
        longint xv, e, ex;
        xv = v - 1;
        e  = g(167, 5, 8, 1, xv);
        ex = q(167, xv, 8, 1);
        checks++;
        if (longint'(y) != e) begin failures++; $display("FAIL x=%0d y=%0d expected %0d", xv, y, e); end
        checks++;
        if (longint'(y) > ex + 1 || longint'(y) + 1 < ex) begin
          failures++; $display("FAIL x=%0d y=%0d too far from %0d", xv, y, ex);
        end
        if (longint'(y) != ex) aliased++;
        if (xv < 32) begin
          checks++;
          if (longint'(y5) != g(9, 4, 5, 1, xv)) begin
            failures++; $display("FAIL 5-bit x=%0d y=%0d", xv, y5);
          end
          if (xv >= 16 && xv <= 19) begin
            checks++;
            if (int'(y5) != exp5[xv-16]) begin
              failures++; $display("FAIL 5-bit example x=%0d y=%0d expected %0d", xv, y5, exp5[xv-16]);
            end
          end
        end
      end
    end
    $display("operands with a one-unit aliasing error: %0d of 256", aliased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
