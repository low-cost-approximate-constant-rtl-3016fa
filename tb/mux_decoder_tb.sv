// mux_decoder_tb: applies every thermometer value to decoders of 20, 7 and
// 465 wires and checks the binary count.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module mux_decoder_tb;
  logic [19:0]  t20;  logic [4:0] b20;
  logic [6:0]   t7;   logic [2:0] b7;
  logic [464:0] t465; logic [8:0] b465;
  int checks = 0, failures = 0;

  mux_decoder #(.L(20))  d20  (.therm_i(t20),  .bin_o(b20));
  mux_decoder #(.L(7))   d7   (.therm_i(t7),   .bin_o(b7));
  mux_decoder #(.L(465)) d465 (.therm_i(t465), .bin_o(b465));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 465; v++) begin
      for (int i = 0; i < 465; i++) t465[i] = (i < v);
      for (int i = 0; i < 20; i++)  t20[i]  = (i < v);
      for (int i = 0; i < 7; i++)   t7[i]   = (i < v);
      #1;
      checks++;
      if (int'(b465) != v) begin failures++; $display("FAIL L=465 v=%0d got %0d", v, b465); end
      if (v <= 20) begin
        checks++;
        if (int'(b20) != v) begin failures++; $display("FAIL L=20 v=%0d got %0d", v, b20); end
      end
      if (v <= 7) begin
        checks++;
        if (int'(b7) != v) begin failures++; $display("FAIL L=7 v=%0d got %0d", v, b7); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
