// booth_mult16_tb: checks the radix-4 Booth multiplier against the signed
// integer product, over the extreme operands (-32768, 32767, -1, 0, 1) in
// every combination and random operands. Combinational.
module booth_mult16_tb;
  logic signed [15:0] a, b;
  logic signed [31:0] p;
  int checks = 0, failures = 0;

  booth_mult16 #(.W(16)) dut (.a(a), .b(b), .p(p));

  task automatic check_vec(input logic signed [15:0] va, input logic signed [15:0] vb);
    longint exp;
    a = va; b = vb;
    #1;
    exp = longint'(va) * longint'(vb);
    checks++;
    if (longint'(p) != exp) begin
      failures++;
      $display("FAIL %0d * %0d: got %0d expected %0d", va, vb, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic signed [15:0] corner [7] = '{-16'sd32768, 16'sd32767, -16'sd1, 16'sd0,
                                                 16'sd1, 16'sd2, -16'sd2};
    foreach (corner[i]) foreach (corner[j]) check_vec(corner[i], corner[j]);
    for (int k = 0; k < 5000; k++) check_vec(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
