// cla_adder16_tb: checks the 16-bit carry look-ahead adder against the
// integer sum a + b + cin, over corner cases (carries rippling through every
// group, all ones, zero) and random operands. Combinational: one check per
// vector.
module cla_adder16_tb;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder16 #(.W(16)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check_vec(input logic [15:0] va, input logic [15:0] vb, input logic vc);
    logic [16:0] exp;
    a = va; b = vb; cin = vc;
    #1;
    exp = 17'(va) + 17'(vb) + 17'(vc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b: got %b_%h expected %h", va, vb, vc, cout, sum, exp);
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
    check_vec(16'h0000, 16'h0000, 1'b0);
    check_vec(16'hffff, 16'h0000, 1'b1);
    check_vec(16'hffff, 16'hffff, 1'b1);
    check_vec(16'h7fff, 16'h0001, 1'b0);
    check_vec(16'h0fff, 16'h0001, 1'b0);
    check_vec(16'h00ff, 16'h0000, 1'b1);
    check_vec(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 16; k++) check_vec(16'hffff >> k, 16'h0001, 1'b0);
    for (int k = 0; k < 5000; k++) check_vec(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
