// dwt3d_top_tb: end-to-end test of the 3-D DWT processor. Two environments
// run side by side: the prototype 4x4x2 wavelet on an 8 x 6 x 5 volume, and
// the 12x12x4 wavelet (the larger filter size whose clock rates the design
// tabulates) on a 16 x 14 x 6 volume with fixed-point products (bits 8..23
// kept). Each runs the whole volume twice with new coefficients and checks
// every output value, the block and band order, the latency of the first
// output and the cycles per block. A mechanism that never happened counts
// as a failure.
module dwt3d_top_tb;
  logic clk = 0, rst_n = 0;
  logic fin_a, fin_b;
  int   chk_a, chk_b, fail_a, fail_b, miss_a, miss_b;
  int   checks, failures;

  always #5 clk = ~clk;

  dwt3d_env #(.L1(4), .L2(4), .L3(2), .NX(8), .NY(6), .NZ(5), .PROD_LSB(0), .RUNS(2)) env_a (
    .clk(clk), .rst_n(rst_n), .finished(fin_a), .checks(chk_a), .failures(fail_a), .missing(miss_a));

  dwt3d_env #(.L1(12), .L2(12), .L3(4), .NX(16), .NY(14), .NZ(6), .PROD_LSB(8), .RUNS(2)) env_b (
    .clk(clk), .rst_n(rst_n), .finished(fin_b), .checks(chk_b), .failures(fail_b), .missing(miss_b));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + miss_a + miss_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (fin_a && fin_b);
    checks   = chk_a + chk_b;
    failures = fail_a + fail_b + miss_a + miss_b;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
