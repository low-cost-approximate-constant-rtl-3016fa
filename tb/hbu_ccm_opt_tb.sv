// hbu_ccm_opt_tb: streams all 256 operands through the default optimised
// multiplier (68 = 26 + 42) and through a subtracting one (16 = 42 - 26), and
// checks each result against the sum of the reference sub-products, clamped
// to 0..255, and against the exact rounded product (at most two units apart).
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module hbu_ccm_opt_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] x, y_add, y_sub;
  int checks = 0, failures = 0, off_by_two = 0;

  hbu_ccm_opt dut_add (.clk(clk), .x_i(x), .y_o(y_add));
  hbu_ccm_opt #(.CS('{42, 26, 0}), .A('{1, -1, 0})) dut_sub (.clk(clk), .x_i(x), .y_o(y_sub));

  function automatic longint clamp8(longint v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

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
      if (v >= 1) begin
        longint xv, ea, es, d;
        xv = v - 1;
        ea = clamp8(g(26, 5, 8, 1, xv) + g(42, 5, 8, 1, xv));
        es = clamp8(g(42, 5, 8, 1, xv) - g(26, 5, 8, 1, xv));
        checks += 3;
        if (longint'(y_add) != ea) begin failures++; $display("FAIL add x=%0d y=%0d exp %0d", xv, y_add, ea); end
        if (longint'(y_sub) != es) begin failures++; $display("FAIL sub x=%0d y=%0d exp %0d", xv, y_sub, es); end
        d = longint'(y_add) - q(68, xv, 8, 1);
        if (d > 2 || d < -2) begin failures++; $display("FAIL add x=%0d error %0d", xv, d); end
        if (d == 2 || d == -2) off_by_two++;
      end
    end
    $display("operands two units off: %0d", off_by_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
