// dwt_filter_tb: checks the filter y = sum coef[i]*x[i] with the 16-bit
// truncation of each product. Two instances: the 4-tap prototype filter
// keeping the low product bits, and a 12-tap filter (the 12x12x4 wavelet
// size) keeping bits 8..23, which also exercises the zero-padded adder tree.
// The expected values are computed from integer products here.
module dwt_filter_tb;
  logic [3:0][15:0]  x4, c4;
  logic [11:0][15:0] x12, c12;
  logic [15:0]       y4, y12;
  int checks = 0, failures = 0;

  dwt_filter #(.TAPS(4))                 dut4  (.x(x4),  .coef(c4),  .y(y4));
  dwt_filter #(.TAPS(12), .PROD_LSB(8))  dut12 (.x(x12), .coef(c12), .y(y12));

  function automatic logic [15:0] ref_y(input int taps, input int lsb,
                                        input logic [11:0][15:0] xv,
                                        input logic [11:0][15:0] cv);
    logic [15:0] acc;
    logic signed [31:0] pr;
    acc = '0;
    for (int i = 0; i < taps; i++) begin
      pr  = 32'(signed'(xv[i])) * 32'(signed'(cv[i]));
      acc = acc + 16'(pr >>> lsb);
    end
    return acc;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0][15:0] xe, ce;
    // A Haar-like pair on a ramp: low pass 1,1 gives x0+x1, high pass 1,-1 gives x0-x1.
    x4 = {16'd0, 16'd0, 16'd7, 16'd5}; c4 = {16'd0, 16'd0, 16'd1, 16'd1};
    #1; checks++; if (y4 !== 16'd12) begin failures++; $display("FAIL haar low %0d", y4); end
    c4 = {16'd0, 16'd0, 16'hffff, 16'd1};
    #1; checks++; if (y4 !== 16'hfffe) begin failures++; $display("FAIL haar high %0d", y4); end
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 12; i++) begin
        x12[i] = 16'($urandom);
        c12[i] = 16'($urandom);
      end
      for (int i = 0; i < 4; i++) begin
        x4[i] = (k % 3 == 0) ? 16'($urandom_range(0, 255)) : 16'($urandom);
        c4[i] = 16'($urandom);
      end
      #1;
      xe = '0; ce = '0;
      for (int i = 0; i < 4; i++) begin xe[i] = x4[i]; ce[i] = c4[i]; end
      checks++;
      if (y4 !== ref_y(4, 0, xe, ce)) begin
        failures++;
        $display("FAIL 4-tap: got %h expected %h", y4, ref_y(4, 0, xe, ce));
      end
      checks++;
      if (y12 !== ref_y(12, 8, x12, c12)) begin
        failures++;
        $display("FAIL 12-tap: got %h expected %h", y12, ref_y(12, 8, x12, c12));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
