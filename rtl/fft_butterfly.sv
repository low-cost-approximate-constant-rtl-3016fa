// fft_butterfly: pipelined radix-2 decimation-in-time butterfly with a fixed
// twiddle factor W = W_NPT^K = cos(2 pi K/NPT) - j sin(2 pi K/NPT):
//   y0 = (a + W*b) / 2,   y1 = (a - W*b) / 2.
// The complex product W*b uses four signed 16-bit HBU constant multipliers
// (sign-magnitude form around hbu_ccm16); the twiddle parts are 16-bit
// magnitudes scaled by 65536 and computed at elaboration time. The twiddles
// W = 1 (K = 0) and W = -j (K = NPT/4) need no multiplier and are wired.
//
// Every butterfly halves its outputs (rounded half-up) so a transform of NPT
// points is scaled by 1/NPT overall, and results beyond the 16-bit range are
// saturated.
//
// Interface: clk, a/b real and imaginary parts (signed W bits) in, y0/y1
// parts (signed W bits) out. Timing: latency 4 rising edges (operand
// register, product register, complex-sum register, butterfly register),
// one butterfly per cycle, no reset. The 4-cycle stage latency matches the
// document; the scaling, rounding and saturation are this design's choices.
module fft_butterfly
  import hbu_pkg::*;
#(
  parameter int NPT = 128,
  parameter int K   = 1,
  parameter int M   = 5
) (
  input  logic               clk,
  input  logic signed [15:0] a_re_i,
  input  logic signed [15:0] a_im_i,
  input  logic signed [15:0] b_re_i,
  input  logic signed [15:0] b_im_i,
  output logic signed [15:0] y0_re_o,
  output logic signed [15:0] y0_im_o,
  output logic signed [15:0] y1_re_o,
  output logic signed [15:0] y1_im_o
);
  localparam int     TW   = 18;   // width of W*b parts and butterfly sums
  localparam real    WR   = tw_re(NPT, K);
  localparam real    WI   = tw_im(NPT, K);
  localparam longint WRM  = longint'(tw_mag(WR));
  localparam longint WIM  = longint'(tw_mag(WI));
  localparam bit     WRN  = (WR < 0.0);
  localparam bit     WIN  = (WI < 0.0);

  // a is delayed to line up with W*b
  logic signed [15:0]   a_re_q [3], a_im_q [3];
  logic signed [TW-1:0] t_re, t_im;

  always_ff @(posedge clk) begin
    a_re_q[0] <= a_re_i;    a_im_q[0] <= a_im_i;
    a_re_q[1] <= a_re_q[0]; a_im_q[1] <= a_im_q[0];
    a_re_q[2] <= a_re_q[1]; a_im_q[2] <= a_im_q[1];
  end

  if (K == 0) begin : g_w1
    logic signed [15:0] b_re_q [2], b_im_q [2];
    always_ff @(posedge clk) begin
      b_re_q[0] <= b_re_i;    b_im_q[0] <= b_im_i;
      b_re_q[1] <= b_re_q[0]; b_im_q[1] <= b_im_q[0];
      t_re <= TW'(b_re_q[1]);
      t_im <= TW'(b_im_q[1]);
    end
  end else if (4 * K == NPT) begin : g_wmj
    // (br + j bi) * (-j) = bi - j br
    logic signed [15:0] b_re_q [2], b_im_q [2];
    always_ff @(posedge clk) begin
      b_re_q[0] <= b_re_i;    b_im_q[0] <= b_im_i;
      b_re_q[1] <= b_re_q[0]; b_im_q[1] <= b_im_q[0];
      t_re <= TW'(b_im_q[1]);
      t_im <= -TW'(b_re_q[1]);
    end
  end else begin : g_mul
    logic signed [16:0] p_rr, p_ii, p_ri, p_ir;
    sm_ccm #(.W(16), .CMAG(WRM), .NEG(WRN), .ROUND(1'b1), .M(M)) u_rr (.clk(clk), .x_i(b_re_i), .y_o(p_rr));
    sm_ccm #(.W(16), .CMAG(WIM), .NEG(WIN), .ROUND(1'b1), .M(M)) u_ii (.clk(clk), .x_i(b_im_i), .y_o(p_ii));
    sm_ccm #(.W(16), .CMAG(WIM), .NEG(WIN), .ROUND(1'b1), .M(M)) u_ri (.clk(clk), .x_i(b_re_i), .y_o(p_ri));
    sm_ccm #(.W(16), .CMAG(WRM), .NEG(WRN), .ROUND(1'b1), .M(M)) u_ir (.clk(clk), .x_i(b_im_i), .y_o(p_ir));
    always_ff @(posedge clk) begin
      t_re <= TW'(p_rr) - TW'(p_ii);
      t_im <= TW'(p_ri) + TW'(p_ir);
    end
  end

  function automatic logic signed [15:0] half_sat(logic signed [TW-1:0] v);
    logic signed [TW-1:0] h;
    h = (v + TW'(1)) >>> 1;
    if (h > TW'(32767))       return 16'sh7FFF;
    else if (h < -TW'(32768)) return -16'sh8000;
    else                      return h[15:0];
  endfunction

  always_ff @(posedge clk) begin
    y0_re_o <= half_sat(TW'(a_re_q[2]) + t_re);
    y0_im_o <= half_sat(TW'(a_im_q[2]) + t_im);
    y1_re_o <= half_sat(TW'(a_re_q[2]) - t_re);
    y1_im_o <= half_sat(TW'(a_im_q[2]) - t_im);
  end
endmodule
