// unary_core_tb: feeds every thermometer input to three unary cores (the
// default truncated 167/256 core, a floored one, and an exact non-truncated
// core) and checks that each output is a thermometer code whose count equals
// the reference base function q(C*x).
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module unary_core_tb;
  import tb_ref_pkg::*;
  localparam int M = 5;
  logic [2**M-2:0] t;
  logic [19:0] o_def;   // q(167*31/256 rounded) = 20 wires
  logic [3:0]  o_flr;   // floor(37*31/256) = 4 wires
  logic [92:0] o_ex;    // 3*31 = 93 wires
  int checks = 0, failures = 0;

  unary_core #(.M(M)) d_def (.therm_i(t), .therm_o(o_def));
  unary_core #(.M(M), .C(37), .SHIFT(8), .ROUND(1'b0)) d_flr (.therm_i(t), .therm_o(o_flr));
  unary_core #(.M(M), .C(3), .SHIFT(0), .ROUND(1'b0)) d_ex (.therm_i(t), .therm_o(o_ex));

  function automatic void check(string name, int x, longint expv, logic [127:0] o, int w);
    int cnt;
    bit therm_ok;
    cnt = 0; therm_ok = 1;
    for (int i = 0; i < w; i++) begin
      if (o[i]) cnt++;
      if (i > 0 && o[i] && !o[i-1]) therm_ok = 0;
    end
    checks++;
    if (cnt != expv || !therm_ok) begin
      failures++;
      $display("FAIL %s x=%0d count=%0d expected=%0d thermometer=%0b", name, x, cnt, expv, therm_ok);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 2**M; x++) begin
      for (int i = 0; i < 2**M - 1; i++) t[i] = (i < x);
      #1;
      check("trunc", x, q(167, x, 8, 1), 128'(o_def), 20);
      check("floor", x, q(37, x, 8, 0), 128'(o_flr), 4);
      check("exact", x, q(3, x, 0, 0), 128'(o_ex), 93);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
