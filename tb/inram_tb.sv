// inram_tb: writes every word of the 1 KB block cache with random data, reads
// all of them back, then overwrites random words and checks that a word
// written at a clock edge reads back in the next cycle while the others keep
// their contents.
module inram_tb;
  localparam int WORDS = 128;
  logic             clk = 0, we = 0;
  logic [6:0]       waddr = '0, raddr = '0;
  logic [3:0][15:0] wdata = '0, rdata;
  logic [3:0][15:0] model [WORDS];
  int checks = 0, failures = 0;

  inram #(.WORDS(WORDS), .LANES(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < WORDS; w++) begin
      model[w] = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      we <= 1; waddr <= 7'(w); wdata <= model[w];
      @(posedge clk);
    end
    we <= 0;
    for (int w = 0; w < WORDS; w++) begin
      raddr = 7'(w);
      #1;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("FAIL word %0d", w); end
    end
    for (int k = 0; k < 500; k++) begin
      automatic int w = $urandom_range(0, WORDS - 1);
      automatic int r = $urandom_range(0, WORDS - 1);
      model[w] = {16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom)};
      we <= 1; waddr <= 7'(w); wdata <= model[w];
      @(posedge clk);
      we <= 0;
      raddr = 7'(w);
      #1;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("FAIL rewrite %0d", w); end
      raddr = 7'(r);
      #1;
      checks++;
      if (rdata !== model[r]) begin failures++; $display("FAIL other %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
