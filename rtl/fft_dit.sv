// fft_dit: pipelined-parallel radix-2 decimation-in-time FFT of NPT complex
// 16-bit points. All NPT points enter in one cycle; the inputs are wired in
// bit-reversed order into log2(NPT) stages of NPT/2 butterflies each (stage s
// pairs points 2^s apart and uses twiddles W_NPT^(j*NPT/2^(s+1))), and the
// last stage delivers the spectrum in natural order. A new frame can enter
// every cycle.
//
// Each butterfly halves its outputs, so y = DFT(x) / NPT, rounded per stage,
// saturated to 16 bits.
//
// Interface: clk, rst_n (active-low, clears the valid pipeline only),
// in_valid_i with x_re_i/x_im_i[NPT], out_valid_o with y_re_o/y_im_o[NPT].
// Timing: 4 rising edges per stage, so results follow their inputs by
// 4*log2(NPT) edges (28 for 128 points).
//
// The fully parallel radix-2 DIT structure and the 4-cycle stage latency follow
// the published engine; the 1/2 scaling per stage, the rounding and saturation,
// and the valid pipeline are this design's own choices.
module fft_dit
  import hbu_pkg::*;
#(
  parameter int NPT = 128,
  parameter int M   = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid_i,
  input  logic signed [15:0] x_re_i [NPT],
  input  logic signed [15:0] x_im_i [NPT],
  output logic               out_valid_o,
  output logic signed [15:0] y_re_o [NPT],
  output logic signed [15:0] y_im_o [NPT]
);
  localparam int S       = $clog2(NPT);
  localparam int LATENCY = 4 * S;

  function automatic int bitrev(int v);
    int r;
    r = 0;
    for (int b = 0; b < S; b++) r = (r << 1) | ((v >> b) & 1);
    return r;
  endfunction

  for (genvar s = 0; s <= S; s++) begin : g_st
    logic signed [15:0] re [NPT];
    logic signed [15:0] im [NPT];
    if (s == 0) begin : g_in
      for (genvar i = 0; i < NPT; i++) begin : g_pt
        assign re[i] = x_re_i[bitrev(i)];
        assign im[i] = x_im_i[bitrev(i)];
      end
    end else begin : g_bf
      localparam int H = 1 << (s - 1);   // distance between paired points
      for (genvar b = 0; b < NPT / 2; b++) begin : g_b
        localparam int J  = b % H;
        localparam int I0 = (b / H) * 2 * H + J;
        fft_butterfly #(.NPT(NPT), .K(J * (NPT / (2 * H))), .M(M)) u_bf (
          .clk(clk),
          .a_re_i(g_st[s-1].re[I0]),     .a_im_i(g_st[s-1].im[I0]),
          .b_re_i(g_st[s-1].re[I0 + H]), .b_im_i(g_st[s-1].im[I0 + H]),
          .y0_re_o(re[I0]),     .y0_im_o(im[I0]),
          .y1_re_o(re[I0 + H]), .y1_im_o(im[I0 + H]));
      end
    end
  end

  assign y_re_o = g_st[S].re;
  assign y_im_o = g_st[S].im;

  logic [LATENCY-1:0] vld_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LATENCY-2:0], in_valid_i};
  end
  assign out_valid_o = vld_q[LATENCY-1];
endmodule
