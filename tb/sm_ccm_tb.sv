// sm_ccm_tb: streams every signed 8-bit operand through a positive and a
// negative sign-magnitude multiplier (magnitude 100, floored) and random
// 16-bit operands through a rounded 16-bit one; each result, two cycles
// later, must be sign * reference magnitude.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module sm_ccm_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [7:0]  x8;
  logic signed [8:0]  yp, yn;
  logic signed [15:0] x16;
  logic signed [16:0] y16;
  int checks = 0, failures = 0;

  sm_ccm                                   dp  (.clk(clk), .x_i(x8), .y_o(yp));
  sm_ccm #(.NEG(1'b1))                     dn  (.clk(clk), .x_i(x8), .y_o(yn));
  sm_ccm #(.W(16), .CMAG(60547), .NEG(1'b1), .ROUND(1'b1)) d16 (.clk(clk), .x_i(x16), .y_o(y16));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h8 [2];
    int h16 [2];
    for (int n = 0; n < 258 + 500; n++) begin
      int v8, v16;
      v8  = (n % 256) - 128;
      v16 = (n == 0) ? -32768 : int'($signed(16'($urandom)));
      x8  <= 8'(v8);
      x16 <= 16'(v16);
      @(posedge clk);
      #1;
      if (n >= 1) begin
        longint m, e;
        m = g(100, 5, 8, 0, (h8[1] < 0) ? -h8[1] : h8[1]);
        checks += 2;
        e = (h8[1] < 0) ? -m : m;
        if (longint'(yp) != e)  begin failures++; $display("FAIL pos x=%0d y=%0d exp %0d", h8[1], yp, e); end
        if (longint'(yn) != -e) begin failures++; $display("FAIL neg x=%0d y=%0d exp %0d", h8[1], yn, -e); end
        m = g16(60547, 5, 1, (h16[1] < 0) ? -h16[1] : h16[1]);
        e = (h16[1] < 0) ? m : -m;
        checks++;
        if (longint'(y16) != e) begin failures++; $display("FAIL w16 x=%0d y=%0d exp %0d", h16[1], y16, e); end
      end
      h8[1] = v8;
      h16[1] = v16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
