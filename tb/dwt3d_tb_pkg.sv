// dwt3d_tb_pkg: reference model shared by the processor testbenches.
//
// sample() makes a synthetic 8-bit volume (smooth gradients plus a textured
// term, like an MRI slice stack) from its coordinates, so no data file is
// needed. ref_block() computes the 8 subbands of one block directly from the
// definition: filter along X at every (y, z), then along Y, then along Z,
// with wrap-around at the volume edges and each product truncated to the 16
// bits starting at bit lsb, sums modulo 2^16. It shares no code with the RTL.
package dwt3d_tb_pkg;

  localparam int MAXT = 12;

  // coef[band][dim][tap]: band 0 = low pass, 1 = high pass; dim 0..2 = X, Y, Z.
  typedef logic [15:0] coef_t [2][3][MAXT];
  typedef logic [15:0] sub_t [2][2][2];   // [X band][Y band][Z band]

  function automatic logic [15:0] sample(int x, int y, int z, int seed);
    int v;
    v = 3 * x + 5 * y + 11 * z + ((x * y + seed) % 17) * 4 + ((x ^ (z * 7)) & 15) + seed * 9;
    return 16'(v & 255);
  endfunction

  function automatic logic [15:0] mulq(logic [15:0] a, logic [15:0] b, int lsb);
    logic signed [31:0] p;
    p = 32'(signed'(a)) * 32'(signed'(b));
    return 16'(p >>> lsb);
  endfunction

  function automatic void ref_block(input int l1, input int l2, input int l3,
                                    input int nx, input int ny, input int nz,
                                    input int ox, input int oy, input int oz,
                                    input int seed, input int lsb,
                                    input coef_t c, output sub_t res);
    logic [15:0] xr [2][MAXT][MAXT];   // [X band][y][z]
    logic [15:0] yr [2][2][MAXT];      // [X band][Y band][z]
    for (int b = 0; b < 2; b++)
      for (int y = 0; y < l2; y++)
        for (int z = 0; z < l3; z++) begin
          xr[b][y][z] = '0;
          for (int i = 0; i < l1; i++)
            xr[b][y][z] += mulq(sample((ox + i) % nx, (oy + y) % ny, (oz + z) % nz, seed),
                                c[b][0][i], lsb);
        end
    for (int xb = 0; xb < 2; xb++)
      for (int yb = 0; yb < 2; yb++)
        for (int z = 0; z < l3; z++) begin
          yr[xb][yb][z] = '0;
          for (int j = 0; j < l2; j++) yr[xb][yb][z] += mulq(xr[xb][j][z], c[yb][1][j], lsb);
        end
    for (int xb = 0; xb < 2; xb++)
      for (int yb = 0; yb < 2; yb++)
        for (int zb = 0; zb < 2; zb++) begin
          res[xb][yb][zb] = '0;
          for (int k = 0; k < l3; k++) res[xb][yb][zb] += mulq(yr[xb][yb][k], c[zb][2][k], lsb);
        end
  endfunction

  // Random coefficients, zero beyond each dimension's length.
  function automatic void rand_coefs(input int l1, input int l2, input int l3, output coef_t c);
    int len [3];
    len = '{l1, l2, l3};
    for (int b = 0; b < 2; b++)
      for (int d = 0; d < 3; d++)
        for (int t = 0; t < MAXT; t++)
          c[b][d][t] = (t < len[d]) ? 16'($urandom_range(0, 65535)) : 16'd0;
  endfunction

endpackage
