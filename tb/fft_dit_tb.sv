// fft_dit_tb: runs 8-, 16- and 32-point FFT engines, each on four random
// frames sent on consecutive cycles, through fft_check, which compares every
// bin with the real-valued DFT and checks the latency. (The 128-point engine
// is built the same way; its simulator build is too long for a routine run.)
//
// The reference models are written independently of the RTL, from the
// formulas of the published method; the stimulus, sizes and tolerances are
// this testbench's own choices.
module fft_dit_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n = 0;

  localparam int NS = 3;
  logic done [NS];
  int   c [NS], f [NS];

  fft_check #(.NPT(8))  u8  (.clk(clk), .rst_n(rst_n), .done_o(done[0]), .checks_o(c[0]), .failures_o(f[0]));
  fft_check #(.NPT(16)) u16 (.clk(clk), .rst_n(rst_n), .done_o(done[1]), .checks_o(c[1]), .failures_o(f[1]));
  fft_check #(.NPT(32)) u32 (.clk(clk), .rst_n(rst_n), .done_o(done[2]), .checks_o(c[2]), .failures_o(f[2]));

  initial begin
    repeat (500) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2], f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
