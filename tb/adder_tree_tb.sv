// adder_tree_tb: applies a new set of 64 random signed 9-bit inputs every
// cycle and checks that each sum appears exactly six cycles later.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module adder_tree_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [8:0]  in [64];
  logic signed [13:0] sum;
  int expq [7];
  int checks = 0, failures = 0;

  adder_tree dut (.clk(clk), .in_i(in), .sum_o(sum));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int s;
      s = 0;
      for (int i = 0; i < 64; i++) begin
        int v;
        v = (n == 0) ? 123 : (n == 1) ? -123 : int'($urandom_range(0, 246)) - 123;
        in[i] <= 9'(v);
        s += v;
      end
      @(posedge clk);
      #1;
      for (int k = 6; k > 0; k--) expq[k] = expq[k-1];
      expq[0] = s;
      if (n >= 5) begin
        checks++;
        if (int'(sum) != expq[5]) begin failures++; $display("FAIL n=%0d sum=%0d exp %0d", n, sum, expq[5]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
