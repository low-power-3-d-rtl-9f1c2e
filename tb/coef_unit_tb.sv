// coef_unit_tb: loads R0, R1, R2 with three different words, copies each into
// DWTC and checks it, checks that DWTC holds while dwtc_load is low and while
// new words are loaded, and that reset clears DWTC.
module coef_unit_tb;
  import dwt3d_pkg::*;
  logic                 clk = 0, rst_n = 0;
  logic                 load_en = 0, dwtc_load = 0;
  dim_e                 load_sel = DIM_X, dwtc_sel = DIM_X;
  logic [3:0][15:0]     load_word = '0, dwtc;
  logic [3:0][15:0]     words [3];
  int checks = 0, failures = 0;

  coef_unit #(.TAPS(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_dwtc(input logic [3:0][15:0] exp, input string what);
    checks++;
    if (dwtc !== exp) begin
      failures++;
      $display("FAIL %s: dwtc %h expected %h", what, dwtc, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    expect_dwtc('0, "after reset");
    for (int round = 0; round < 20; round++) begin
      for (int d = 0; d < 3; d++) begin
        words[d] = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
        load_en <= 1; load_sel <= dim_e'(d); load_word <= words[d];
        @(posedge clk);
      end
      load_en <= 0;
      for (int d = 2; d >= 0; d--) begin
        dwtc_load <= 1; dwtc_sel <= dim_e'(d);
        @(posedge clk);
        dwtc_load <= 0;
        #1 expect_dwtc(words[d], "select");
        @(posedge clk);
        #1 expect_dwtc(words[d], "hold");
      end
      // Loading new words must not disturb DWTC.
      load_en <= 1; load_sel <= DIM_X; load_word <= '1;
      @(posedge clk);
      load_en <= 0;
      #1 expect_dwtc(words[0], "hold during load");
    end
    rst_n <= 0;
    #1 expect_dwtc('0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
