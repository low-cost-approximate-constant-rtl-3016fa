// fft_butterfly_tb: streams random operands through butterflies with
// twiddles W_128^1 (multipliers), W^0 = 1 and W^32 = -j (wired) and W^16
// (multipliers, used with large operands to force saturation). Each output,
// four cycles later, must be within 3 units of the real-valued (a +- W*b)/2,
// or equal the saturation limit when that value leaves the 16-bit range.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module fft_butterfly_tb;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NB = 4;
  localparam int KS [NB] = '{1, 0, 32, 16};
  logic signed [15:0] ar, ai, br, bi;
  logic signed [15:0] y [NB][4];
  int checks = 0, failures = 0, saturated = 0;
  real ex [NB][4][4];   // [butterfly][age][output]

  for (genvar k = 0; k < NB; k++) begin : g_bf
    fft_butterfly #(.NPT(128), .K(KS[k])) dut (
      .clk(clk), .a_re_i(ar), .a_im_i(ai), .b_re_i(br), .b_im_i(bi),
      .y0_re_o(y[k][0]), .y0_im_o(y[k][1]), .y1_re_o(y[k][2]), .y1_im_o(y[k][3]));
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1003; n++) begin
      int va, vb, vc, vd;
      if (n % 10 == 9) begin
        va = 32767; vb = -32768; vc = 32767; vd = -32768;   // forces overflow for W^16
      end else begin
        va = int'($urandom_range(0, 65535)) - 32768; vb = int'($urandom_range(0, 65535)) - 32768;
        vc = int'($urandom_range(0, 65535)) - 32768; vd = int'($urandom_range(0, 65535)) - 32768;
      end
      ar <= 16'(va); ai <= 16'(vb); br <= 16'(vc); bi <= 16'(vd);
      @(posedge clk);
      #1;
      for (int k = 0; k < NB; k++) begin
        real wr, wi, tr, ti;
        for (int a = 3; a > 0; a--) ex[k][a] = ex[k][a-1];
        wr = $cos(2.0 * 3.141592653589793 * KS[k] / 128.0);
        wi = -$sin(2.0 * 3.141592653589793 * KS[k] / 128.0);
        tr = vc * wr - vd * wi;
        ti = vc * wi + vd * wr;
        ex[k][0][0] = (va + tr) / 2.0; ex[k][0][1] = (vb + ti) / 2.0;
        ex[k][0][2] = (va - tr) / 2.0; ex[k][0][3] = (vb - ti) / 2.0;
        if (n >= 3)
          for (int o = 0; o < 4; o++) begin
            real e, d;
            e = ex[k][3][o];
            checks++;
            if (e > 32767.0 || e < -32768.0) begin
              saturated++;
              if (int'(y[k][o]) != ((e > 0.0) ? 32767 : -32768)) begin
                failures++; $display("FAIL K=%0d n=%0d out %0d = %0d, not saturated (%f)", KS[k], n, o, y[k][o], e);
              end
            end else begin
              d = real'(y[k][o]) - e;
              if (d > 3.0 || d < -3.0) begin
                failures++; $display("FAIL K=%0d n=%0d out %0d = %0d exp %f", KS[k], n, o, y[k][o], e);
              end
            end
          end
      end
    end
    checks++;
    if (saturated == 0) begin failures++; $display("FAIL saturation never happened"); end
    $display("saturated outputs: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
