// fft_check: test harness for one fft_dit of NPT points, used by fft_dit_tb.
// It sends FRAMES random frames on consecutive cycles (samples within +-8192
// so no stage saturates), checks that each result frame appears 4*log2(NPT)
// cycles after its input and that every output is within TOL units of the
// real-valued DFT / NPT, and reports the signal-to-noise ratio of the outputs.
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module fft_check #(
  parameter int NPT    = 16,
  parameter int FRAMES = 4,
  parameter int TOL    = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);
  localparam int S = $clog2(NPT);
  logic in_valid, out_valid;
  logic signed [15:0] xr [NPT], xi [NPT], yr [NPT], yi [NPT];
  real refr [FRAMES][NPT], refi [FRAMES][NPT];
  int  sent [FRAMES];
  int  cycle = 0, nout = 0;
  real psig = 0.0, perr = 0.0;

  fft_dit #(.NPT(NPT)) dut (.clk(clk), .rst_n(rst_n), .in_valid_i(in_valid),
    .x_re_i(xr), .x_im_i(xi), .out_valid_o(out_valid), .y_re_o(yr), .y_im_o(yi));

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      checks_o++;
      if (nout >= FRAMES || cycle - sent[nout] != 4 * S) begin
        failures_o++; $display("FAIL %0d-point frame %0d latency %0d", NPT, nout, cycle - sent[nout]);
      end else
        for (int k = 0; k < NPT; k++) begin
          real dr, di;
          dr = real'(yr[k]) - refr[nout][k];
          di = real'(yi[k]) - refi[nout][k];
          psig += refr[nout][k] ** 2 + refi[nout][k] ** 2;
          perr += dr ** 2 + di ** 2;
          checks_o++;
          if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) begin
            failures_o++;
            $display("FAIL %0d-point frame %0d bin %0d got (%0d,%0d) exp (%f,%f)", NPT, nout, k, yr[k], yi[k], refr[nout][k], refi[nout][k]);
          end
        end
      nout++;
    end
  end

  initial begin
    checks_o = 0; failures_o = 0; done_o = 0; in_valid = 0;
    for (int i = 0; i < NPT; i++) begin xr[i] = '0; xi[i] = '0; end
    @(posedge rst_n);
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
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
        refr[f][k] = sr / NPT;
        refi[f][k] = si / NPT;
      end
      in_valid <= 1;
      @(posedge clk);
      sent[f] = cycle;
    end
    in_valid <= 0;
    repeat (4 * S + 4) @(posedge clk);
    checks_o++;
    if (nout != FRAMES) begin failures_o++; $display("FAIL %0d-point: %0d frames out", NPT, nout); end
    $display("%0d-point FFT: SNR %f dB over %0d frames", NPT, 10.0 * $log10(psig / ((perr > 0.0) ? perr : 1e-9)), nout);
    done_o = 1;
  end
endmodule
