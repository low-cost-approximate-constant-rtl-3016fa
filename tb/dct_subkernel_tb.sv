// dct_subkernel_tb: streams random 8x8 blocks (one per cycle) into the
// sub-kernels for F(1,2) and F(0,0) and checks each output eight cycles
// later: bit-exact against the sum of reference sign-magnitude products, and
// within the worst-case bound of 4x the real-valued DCT coefficient.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module dct_subkernel_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [7:0]  pix [64];
  logic signed [13:0] c12, c00;
  int checks = 0, failures = 0;
  int exq12 [8], exq00 [8];
  real rq12 [8];
  real err_sum = 0.0;
  int  err_n = 0;

  dct_subkernel                   d12 (.clk(clk), .pix_i(pix), .coef_o(c12));
  dct_subkernel #(.U(0), .V(0))   d00 (.clk(clk), .pix_i(pix), .coef_o(c00));

  function automatic int model(int u, int v, int p [64]);
    int s;
    s = 0;
    for (int i = 0; i < 64; i++) begin
      int t, mt, mp, m;
      t  = dct_basis(8, u, v, i / 8, i % 8);
      mt = (t < 0) ? -t : t;
      mp = (p[i] < 0) ? -p[i] : p[i];
      m  = int'(g(mt, 5, 8, 0, mp));
      s += ((t < 0) != (p[i] < 0)) ? -m : m;
    end
    return s;
  endfunction

  function automatic real ideal(int u, int v, int p [64]);
    real s, cu, cv;
    s = 0.0;
    cu = (u == 0) ? $sqrt(0.5) : 1.0;
    cv = (v == 0) ? $sqrt(0.5) : 1.0;
    for (int i = 0; i < 64; i++)
      s += p[i] * cu * cv * $cos(3.141592653589793 * u * (2 * (i / 8) + 1) / 16.0)
                          * $cos(3.141592653589793 * v * (2 * (i % 8) + 1) / 16.0);
    return s;   // 4 * F(u,v) = 4 * s / 4
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 208; n++) begin
      int p [64];
      for (int i = 0; i < 64; i++) begin
        p[i] = (n == 0) ? 127 : (n == 1) ? -128 : (n == 2) ? ((i % 2) ? 127 : -128)
             : int'($urandom_range(0, 255)) - 128;
        pix[i] <= 8'(p[i]);
      end
      @(posedge clk);
      #1;
      for (int k = 7; k > 0; k--) begin exq12[k] = exq12[k-1]; exq00[k] = exq00[k-1]; rq12[k] = rq12[k-1]; end
      exq12[0] = model(1, 2, p);
      exq00[0] = model(0, 0, p);
      rq12[0]  = ideal(1, 2, p);
      if (n >= 7) begin
        real e;
        checks += 3;
        if (int'(c12) != exq12[7]) begin failures++; $display("FAIL F(1,2) n=%0d got %0d exp %0d", n, c12, exq12[7]); end
        if (int'(c00) != exq00[7]) begin failures++; $display("FAIL F(0,0) n=%0d got %0d exp %0d", n, c00, exq00[7]); end
        e = real'(c12) - rq12[7];
        if (e < 0.0) e = -e;
        err_sum += e; err_n++;
        if (e > 144.0) begin failures++; $display("FAIL F(1,2) n=%0d off the real DCT by %f", n, e); end
      end
    end
    $display("mean |error| of 4*F(1,2) against the real DCT: %f", err_sum / err_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
