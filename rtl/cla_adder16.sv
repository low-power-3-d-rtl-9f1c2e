// cla_adder16: carry look-ahead adder, W bits wide (16 by default), used for
// every addition in the filter's adder tree.
//
// The adder is built from 4-bit look-ahead groups. Each bit forms its
// generate (a&b) and propagate (a^b) signals; inside a group every carry is
// computed directly from the group's generates, propagates and carry in, and
// each group publishes a group generate and a group propagate. A second level
// of look-ahead computes the carry into every group from those group signals,
// so no carry ripples through more than one level. The sum and the carry are
// formed on separate paths, as in the low power adder cell the design uses.
// W must be a multiple of 4.
//
// Interface: purely combinational. sum = (a + b + cin) mod 2^W, cout is the
// carry out of the top bit. The 16-bit width is the design's; the 4-bit
// grouping is this implementation's choice.
module cla_adder16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NG = W / 4;

  logic [W-1:0]  g, p;
  logic [W:0]    c;
  logic [NG-1:0] gg, gp;
  logic [NG:0]   gc;

  assign g = a & b;
  assign p = a ^ b;

  // Group generate and propagate of each 4-bit group.
  always_comb begin
    for (int k = 0; k < int'(NG); k++) begin
      gp[k] = p[4*k] & p[4*k+1] & p[4*k+2] & p[4*k+3];
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end
  end

  // Second level: carry into each group, expanded from the group signals and
  // cin alone (gc[k+1] = gg[k] | gp[k]&gg[k-1] | ... | gp[k]&...&gp[0]&cin).
  function automatic logic group_carry(input logic [NG-1:0] ggv, input logic [NG-1:0] gpv,
                                       input logic ci, input int unsigned k);
    logic acc;
    acc = ci;
    for (int j = 0; j <= int'(k); j++) acc = ggv[j] | (gpv[j] & acc);
    return acc;
  endfunction

  assign gc[0] = cin;
  for (genvar k = 0; k < int'(NG); k++) begin : g_gc
    assign gc[k+1] = group_carry(gg, gp, cin, k);
  end

  // First level: carries inside each group from that group's carry in.
  always_comb begin
    for (int k = 0; k < int'(NG); k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k] | (p[4*k] & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end
    c[W] = gc[NG];
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
