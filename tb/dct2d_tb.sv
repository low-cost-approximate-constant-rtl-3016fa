// dct2d_tb: runs the engine with 4x4 blocks (B = 4: 16 sub-kernels of 16
// multipliers, to keep the simulator build short; the 8x8 sub-kernel is
// covered by dct_subkernel_tb). It sends five random blocks, the first four on
// consecutive cycles and the fifth after a gap, and checks that out_valid
// rises exactly 2 + log2(16) = 6 cycles after each in_valid and that all 16
// coefficients of each block match the bit-exact sign-magnitude reference.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module dct2d_tb;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int B = 4, NB = B * B, LAT = 6;
  logic rst_n, in_valid, out_valid;
  logic signed [7:0]  pix [NB];
  logic signed [11:0] coef [NB];
  int checks = 0, failures = 0;
  int blocks [5][NB];
  int sent_cycle [5];
  int cycle = 0, nout = 0;

  dct2d #(.B(B)) dut (.clk(clk), .rst_n(rst_n), .in_valid_i(in_valid), .pix_i(pix),
             .out_valid_o(out_valid), .coef_o(coef));

  function automatic int model(int u, int v, int p [NB]);
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

  always @(posedge clk) cycle <= cycle + 1;

  // output monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= 5 || cycle - sent_cycle[nout] != LAT) begin
        failures++; $display("FAIL block %0d came out after %0d cycles", nout, cycle - sent_cycle[nout]);
      end else begin
        for (int k = 0; k < NB; k++) begin
          int e;
          e = model(k / B, k % B, blocks[nout]);
          checks++;
          if (int'(coef[k]) != e) begin failures++; $display("FAIL block %0d coef %0d got %0d exp %0d", nout, k, coef[k], e); end
        end
      end
      nout++;
    end
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0;
    for (int i = 0; i < NB; i++) pix[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int b = 0; b < 5; b++) begin
      if (b == 4) begin in_valid <= 0; repeat (3) @(posedge clk); end
      for (int i = 0; i < NB; i++) begin
        blocks[b][i] = (b == 0) ? ((i % 5 == 0) ? 127 : -128) : int'($urandom_range(0, 255)) - 128;
        pix[i] <= 8'(blocks[b][i]);
      end
      in_valid <= 1;
      @(posedge clk);
      sent_cycle[b] = cycle;
    end
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (nout != 5) begin failures++; $display("FAIL %0d blocks out of 5", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
