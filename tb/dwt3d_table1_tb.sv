// dwt3d_table1_tb: the image sizes and wavelets of the clock rate table, as
// far as they simulate in a few minutes. One environment runs the 4x4x2
// wavelet over a full 1920 x 1080 frame pair (the largest image size), the
// other the 12x12x4 wavelet over a 256 x 256 x 4 volume. Each checks every
// output against the reference model and prints the cycles per slice, from
// which the clock rate for a given frame rate follows (cycles per slice x fps).
module dwt3d_table1_tb;
  logic clk = 0, rst_n = 0;
  logic fin_a, fin_b;
  int   chk_a, chk_b, fail_a, fail_b, miss_a, miss_b;

  always #5 clk = ~clk;

  dwt3d_env #(.L1(4), .L2(4), .L3(2), .NX(1920), .NY(1080), .NZ(2), .PROD_LSB(0),
              .RUNS(1), .NEED_WRAP(1'b0)) env_a (
    .clk(clk), .rst_n(rst_n), .finished(fin_a), .checks(chk_a), .failures(fail_a), .missing(miss_a));

  dwt3d_env #(.L1(12), .L2(12), .L3(4), .NX(256), .NY(256), .NZ(4), .PROD_LSB(8),
              .RUNS(1), .NEED_WRAP(1'b0)) env_b (
    .clk(clk), .rst_n(rst_n), .finished(fin_b), .checks(chk_b), .failures(fail_b), .missing(miss_b));

  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + miss_a + miss_b + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (fin_a && fin_b);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b, fail_a + fail_b + miss_a + miss_b);
    $finish;
  end
endmodule
