// therm_enc_tb: drives every 5-bit value into the thermometer encoder and
// checks that exactly the first x wires are set.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module therm_enc_tb;
  localparam int M = 5;
  logic [M-1:0]    x;
  logic [2**M-2:0] t;
  int checks = 0, failures = 0;

  therm_enc #(.M(M)) dut (.bin_i(x), .therm_o(t));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**M; v++) begin
      x = M'(v);
      #1;
      for (int i = 0; i < 2**M - 1; i++) begin
        checks++;
        if (t[i] !== (i < v)) begin
          failures++;
          $display("FAIL x=%0d wire %0d = %b", v, i, t[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
