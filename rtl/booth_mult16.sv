// booth_mult16: signed W x W multiplier (16 x 16 by default) using radix-4
// modified Booth recoding, giving the full 2W-bit product.
//
// The multiplier b is recoded three bits at a time (overlapping by one bit)
// into W/2 digits in {-2,-1,0,+1,+2}. Each digit selects 0, +a, +2a, -a or -2a
// as a partial product, sign-extended to 2W bits and shifted left by twice
// the digit index; the partial products are then added. The design specifies
// a 16-bit Booth multiplier with a 32-bit product; the radix-4 recoding and
// the plain sum of partial products are this implementation's choices.
//
// Interface: purely combinational, two's complement in and out. W must be even.
module booth_mult16 #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int unsigned ND = W / 2;

  logic [W:0]               bx;    // b with an implicit 0 below bit 0
  logic signed [2*W-1:0]    a_ext;
  logic signed [2*W-1:0]    pp [ND];

  assign bx    = {b, 1'b0};
  assign a_ext = (2*W)'(a);

  always_comb begin
    for (int d = 0; d < int'(ND); d++) begin
      unique case (bx[2*d +: 3])
        3'b000, 3'b111: pp[d] = '0;
        3'b001, 3'b010: pp[d] = a_ext;
        3'b011:         pp[d] = a_ext <<< 1;
        3'b100:         pp[d] = -(a_ext <<< 1);
        3'b101, 3'b110: pp[d] = -a_ext;
        default:        pp[d] = '0;
      endcase
    end
  end

  always_comb begin
    p = '0;
    for (int d = 0; d < int'(ND); d++) begin
      p = p + (pp[d] <<< (2*d));
    end
  end

endmodule
