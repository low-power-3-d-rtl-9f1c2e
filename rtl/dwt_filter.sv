// dwt_filter: one wavelet filter of the processor (the low pass and the high
// pass filter are two instances of it; they differ only in their coefficients).
//
// Every cycle the filter forms y = sum_i coef[i] * x[i] over TAPS taps. All TAPS
// products are computed in parallel by Booth multipliers; from each 32-bit
// product only the 16 bits starting at PROD_LSB are kept (PROD_LSB = 0 keeps the
// low 16 bits, i.e. the upper 16 bits are discarded as the design specifies;
// a larger PROD_LSB lets fixed-point coefficients be used instead). The kept
// products are summed by a balanced tree of carry look-ahead adders, log2(TAPS)
// adders deep and TAPS-1 adders in total; when TAPS is not a power of two the
// tree is padded with zero inputs. Sums wrap modulo 2^16.
//
// Where a dimension's filter is shorter than TAPS, the caller pads the
// coefficients with zeros, so the unused taps contribute nothing.
//
// Interface: purely combinational; x and coef are packed arrays of TAPS
// 16-bit two's complement values, lane i = tap i. The result is registered by
// whatever stores it (on-chip RAM or output register).
module dwt_filter #(
  parameter int unsigned TAPS     = 4,
  parameter int unsigned PROD_LSB = 0
) (
  input  logic [TAPS-1:0][15:0] x,
  input  logic [TAPS-1:0][15:0] coef,
  output logic [15:0]           y
);

  localparam int unsigned LEVELS = (TAPS > 1) ? $clog2(TAPS) : 0;
  localparam int unsigned NPOW   = 1 << LEVELS;

  // Truncated products, zero beyond TAPS.
  logic [15:0] prod16 [NPOW];

  for (genvar i = 0; i < int'(NPOW); i++) begin : g_mul
    if (i < int'(TAPS)) begin : g_tap
      logic signed [31:0] prod;
      booth_mult16 #(.W(16)) u_mul (
        .a (x[i]),
        .b (coef[i]),
        .p (prod)
      );
      assign prod16[i] = prod[PROD_LSB +: 16];
    end else begin : g_pad
      assign prod16[i] = '0;
    end
  end

  // Adder tree: level l holds NPOW >> (l+1) sums of level l-1 (or of the
  // products for l = 0). Each level has its own signals.
  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_lvl
    localparam int unsigned N = NPOW >> (l + 1);
    logic [15:0] v [N];
    for (genvar i = 0; i < int'(N); i++) begin : g_add
      logic [15:0] in_a, in_b;
      logic        cout_unused;
      if (l == 0) begin : g_first
        assign in_a = prod16[2*i];
        assign in_b = prod16[2*i+1];
      end else begin : g_next
        assign in_a = g_lvl[l-1].v[2*i];
        assign in_b = g_lvl[l-1].v[2*i+1];
      end
      cla_adder16 #(.W(16)) u_add (
        .a    (in_a),
        .b    (in_b),
        .cin  (1'b0),
        .sum  (v[i]),
        .cout (cout_unused)
      );
    end
  end

  if (LEVELS == 0) begin : g_single
    assign y = prod16[0];
  end else begin : g_root
    assign y = g_lvl[LEVELS-1].v[0];
  end

endmodule
