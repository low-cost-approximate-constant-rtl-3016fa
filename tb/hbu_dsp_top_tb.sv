// hbu_dsp_top_tb: end-to-end test of the whole design, all three parts
// running at once, at reduced sizes (4x4 DCT blocks, 16-point FFT) so that
// the simulator builds in minutes; the default 8x8 / 128-point build is
// several hundred megabytes of C++.
//  * DCT: four blocks, three on consecutive cycles and one after a gap; each
//    must come out 6 cycles later with all 16 coefficients bit-exact.
//  * FFT: three frames on consecutive cycles; each must come out 16 cycles
//    later with every bin within 6 units of the real-valued DFT / 16.
//  * Multiplier lane: all 256 operands, each result two cycles later equal to
//    the sum of the reference sub-products.
// Each mechanism (DCT block, back-to-back DCT blocks, FFT frame, back-to-back
// FFT frames, multiplier result, multiplier aliasing error) is counted and a
// mechanism that never happened counts as a failure.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module hbu_dsp_top_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NPT = 16, B = 4, NB = B * B, DLAT = 6, FLAT = 16;
  logic rst_n;
  logic dct_in_valid, dct_out_valid, fft_in_valid, fft_out_valid;
  logic signed [7:0]  pix [NB];
  logic signed [11:0] coef [NB];
  logic signed [15:0] xr [NPT], xi [NPT], yr [NPT], yi [NPT];
  logic [7:0] ccm_x, ccm_y;

  hbu_dsp_top #(.DCT_B(B), .FFT_NPT(NPT)) dut (
    .clk(clk), .rst_n(rst_n),
    .dct_in_valid_i(dct_in_valid), .dct_pix_i(pix),
    .dct_out_valid_o(dct_out_valid), .dct_coef_o(coef),
    .fft_in_valid_i(fft_in_valid), .fft_x_re_i(xr), .fft_x_im_i(xi),
    .fft_out_valid_o(fft_out_valid), .fft_y_re_o(yr), .fft_y_im_o(yi),
    .ccm_x_i(ccm_x), .ccm_y_o(ccm_y));

  int checks = 0, failures = 0, cycle = 0;
  int dct_blocks [4][NB];
  int dct_sent [4];
  int dct_out = 0, dct_b2b = 0;
  real fr [3][NPT], fi [3][NPT];
  int fft_sent [3];
  int fft_out = 0, fft_b2b = 0;
  int ccm_results = 0, ccm_aliased = 0;
  real psig = 0.0, perr = 0.0;

  function automatic int dct_model(int u, int v, int p [NB]);
    int s;
    s = 0;
    for (int i = 0; i < NB; i++) begin
      int t, mt, mp, m;
      t  = dct_basis(B, u, v, i / B, i % B);
      mt = (t < 0) ? -t : t;
      mp = (p[i] < 0) ? -p[i] : p[i];
      m  = int'(g(mt, 5, 8, 0, mp));
      s += ((t < 0) != (p[i] < 0)) ? -m : m;
    end
    return s;
  endfunction

  int dct_last_out = 0, fft_last_out = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    #1;
    if (rst_n && dct_out_valid) begin
      checks++;
      if (dct_out >= 4 || cycle - dct_sent[dct_out] != DLAT) begin
        failures++; $display("FAIL DCT block %0d latency", dct_out);
      end else
        for (int k = 0; k < NB; k++) begin
          checks++;
          if (int'(coef[k]) != dct_model(k / B, k % B, dct_blocks[dct_out])) begin
            failures++; $display("FAIL DCT block %0d coef %0d = %0d", dct_out, k, coef[k]);
          end
        end
      if (dct_out > 0 && dct_last_out == cycle - 1) dct_b2b++;
      dct_last_out = cycle;
      dct_out++;
    end
    if (rst_n && fft_out_valid) begin
      checks++;
      if (fft_out >= 3 || cycle - fft_sent[fft_out] != FLAT) begin
        failures++; $display("FAIL FFT frame %0d latency", fft_out);
      end else
        for (int k = 0; k < NPT; k++) begin
          real dr, di;
          dr = real'(yr[k]) - fr[fft_out][k];
          di = real'(yi[k]) - fi[fft_out][k];
          psig += fr[fft_out][k] ** 2 + fi[fft_out][k] ** 2;
          perr += dr ** 2 + di ** 2;
          checks++;
          if (dr > 6.0 || dr < -6.0 || di > 6.0 || di < -6.0) begin
            failures++; $display("FAIL FFT frame %0d bin %0d (%0d,%0d) exp (%f,%f)", fft_out, k, yr[k], yi[k], fr[fft_out][k], fi[fft_out][k]);
          end
        end
      if (fft_out > 0 && fft_last_out == cycle - 1) fft_b2b++;
      fft_last_out = cycle;
      fft_out++;
    end
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DCT stimulus
  initial begin
    rst_n = 0; dct_in_valid = 0;
    for (int i = 0; i < NB; i++) pix[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 4; b++) begin
      if (b == 3) begin dct_in_valid <= 0; repeat (2) @(posedge clk); end
      for (int i = 0; i < NB; i++) begin
        dct_blocks[b][i] = int'($urandom_range(0, 255)) - 128;
        pix[i] <= 8'(dct_blocks[b][i]);
      end
      dct_in_valid <= 1;
      @(posedge clk);
      dct_sent[b] = cycle;
    end
    dct_in_valid <= 0;
  end

  // FFT stimulus
  initial begin
    fft_in_valid = 0;
    for (int i = 0; i < NPT; i++) begin xr[i] = '0; xi[i] = '0; end
    @(posedge rst_n);
    @(posedge clk);
    for (int f = 0; f < 3; f++) begin
      int vr [NPT], vi [NPT];
      for (int i = 0; i < NPT; i++) begin
        vr[i] = int'($urandom_range(0, 16383)) - 8192;
        vi[i] = int'($urandom_range(0, 16383)) - 8192;
        xr[i] <= 16'(vr[i]);
        xi[i] <= 16'(vi[i]);
      end
      for (int k = 0; k < NPT; k++) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int i = 0; i < NPT; i++) begin
          real ang;
          ang = -2.0 * 3.141592653589793 * ((i * k) % NPT) / NPT;
          sr += vr[i] * $cos(ang) - vi[i] * $sin(ang);
          si += vr[i] * $sin(ang) + vi[i] * $cos(ang);
        end
        fr[f][k] = sr / NPT;
        fi[f][k] = si / NPT;
      end
      fft_in_valid <= 1;
      @(posedge clk);
      fft_sent[f] = cycle;
    end
    fft_in_valid <= 0;
  end

  // multiplier lane, then the final report
  initial begin
    ccm_x = '0;
    @(posedge rst_n);
    for (int v = 0; v < 257; v++) begin
      ccm_x <= 8'(v);
      @(posedge clk);
      #1;
      if (v >= 1) begin
        longint e;
        e = g(26, 5, 8, 1, v - 1) + g(42, 5, 8, 1, v - 1);
        if (e > 255) e = 255;
        checks++;
        ccm_results++;
        if (longint'(ccm_y) != e) begin failures++; $display("FAIL multiplier x=%0d y=%0d exp %0d", v - 1, ccm_y, e); end
        if (longint'(ccm_y) != q(68, v - 1, 8, 1)) ccm_aliased++;
      end
    end
    repeat (10) @(posedge clk);
    $display("DCT blocks %0d (back-to-back %0d), FFT frames %0d (back-to-back %0d), multiplier results %0d (aliasing errors %0d)",
             dct_out, dct_b2b, fft_out, fft_b2b, ccm_results, ccm_aliased);
    $display("%0d-point FFT SNR against the real DFT: %f dB", NPT, 10.0 * $log10(psig / ((perr > 0.0) ? perr : 1e-9)));
    checks += 6;
    if (dct_out != 4)     begin failures++; $display("FAIL DCT blocks out: %0d", dct_out); end
    if (dct_b2b == 0)     begin failures++; $display("FAIL no back-to-back DCT blocks"); end
    if (fft_out != 3)     begin failures++; $display("FAIL FFT frames out: %0d", fft_out); end
    if (fft_b2b == 0)     begin failures++; $display("FAIL no back-to-back FFT frames"); end
    if (ccm_results == 0) begin failures++; $display("FAIL no multiplier results"); end
    if (ccm_aliased == 0) begin failures++; $display("FAIL no multiplier aliasing error seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
