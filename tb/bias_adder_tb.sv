// bias_adder_tb: for every sub-range and base value, checks that the adder
// returns base + q(C * r * 2^M), for the default truncated multiplier and for
// an exact one.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module bias_adder_tb;
  import tb_ref_pkg::*;
  logic [2:0]  r;
  logic [4:0]  base;
  logic [7:0]  y_t;
  logic [15:0] y_e;
  int checks = 0, failures = 0;

  bias_adder dut_t (.region_i(r), .base_i(base), .y_o(y_t));
  bias_adder #(.C(200), .SHIFT(0), .ROUND(1'b0), .BASE_W(5), .OUT_W(16)) dut_e (
    .region_i(r), .base_i(base), .y_o(y_e));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ri = 0; ri < 8; ri++)
      for (int b = 0; b <= 20; b++) begin
        r = 3'(ri); base = 5'(b);
        #1;
        checks += 2;
        if (longint'(y_t) != (b + q(167, ri * 32, 8, 1)) % 256) begin
          failures++; $display("FAIL trunc r=%0d b=%0d y=%0d", ri, b, y_t);
        end
        if (longint'(y_e) != b + 200 * ri * 32) begin
          failures++; $display("FAIL exact r=%0d b=%0d y=%0d", ri, b, y_e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
