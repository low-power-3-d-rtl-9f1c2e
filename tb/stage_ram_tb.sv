// stage_ram_tb: checks that reset clears LRAM/HRAM-style storage (so unwritten
// padding lanes read as zero), that a lane write changes only that lane of
// that word, and that whole words read back as written.
module stage_ram_tb;
  localparam int WORDS = 4, LANES = 4;
  logic             clk = 0, rst_n = 0, we = 0;
  logic [1:0]       waddr = '0, raddr = '0, wlane = '0;
  logic [15:0]      wdata = '0;
  logic [3:0][15:0] rdata;
  logic [3:0][15:0] model [WORDS];
  int checks = 0, failures = 0;

  stage_ram #(.WORDS(WORDS), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_all(input string what);
    for (int w = 0; w < WORDS; w++) begin
      raddr = 2'(w);
      #1;
      checks++;
      if (rdata !== model[w]) begin
        failures++;
        $display("FAIL %s word %0d: %h expected %h", what, w, rdata, model[w]);
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) model[w] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check_all("after reset");
    for (int k = 0; k < 400; k++) begin
      automatic int w = $urandom_range(0, WORDS - 1);
      automatic int l = $urandom_range(0, LANES - 1);
      automatic logic [15:0] d = 16'($urandom);
      we <= 1; waddr <= 2'(w); wlane <= 2'(l); wdata <= d;
      @(posedge clk);
      we <= 0;
      model[w][l] = d;
      check_all("after write");
    end
    // Writes with we low change nothing.
    we <= 0; waddr <= 0; wlane <= 0; wdata <= 16'hdead;
    @(posedge clk);
    check_all("we low");
    rst_n <= 0;
    #1;
    for (int w = 0; w < WORDS; w++) model[w] = '0;
    check_all("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
