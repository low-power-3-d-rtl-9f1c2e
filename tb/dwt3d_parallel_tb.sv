// dwt3d_parallel_tb: two processors transform one volume in parallel, each
// taking half of the slices, with no change to the processor: the off-chip
// memory simply offsets the slice number of the second one. The volume is
// 8 x 6 x 8 with the 4x4x2 wavelet; processor p handles slices 4p..4p+3
// (its NZ is 4). Because each half has an even slice count and the Z filter
// has two taps, no block crosses the boundary between the halves, so together
// the two produce exactly the transform of the whole volume. Every output of
// both is checked against the reference for the whole volume, and both must
// finish in the cycles one processor needs for half the volume.
module dwt3d_parallel_tb;
  import dwt3d_tb_pkg::*;
  localparam int L1 = 4, L2 = 4, L3 = 2, NX = 8, NY = 6, NZ = 8, NP = 2;
  localparam int NZP = NZ / NP;
  localparam int BLK_CYC = 2 * L2 * L3 + 2 * L3 + 4;
  localparam int NBX = NX / 2, NBY = NY / 2, NBZP = NZP / 2;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NP-1:0]    busy, done, coef_rd_en, blk_rd_en, out_valid;
  logic [4:0]       state_num [NP];
  logic [1:0]       coef_rd_sel [NP], out_band [NP];
  logic [3:0][15:0] coef_lo_word [NP], coef_hi_word [NP], blk_rd_data [NP];
  logic [3:0]       blk_x [NP], out_bx [NP];
  logic [2:0]       blk_y [NP], out_by [NP], blk_z [NP], out_bz [NP];
  logic [7:0]       blk_addr [NP];
  logic [15:0]      out_lo [NP], out_hi [NP];

  coef_t c;
  int    seed = 11;
  int    checks = 0, failures = 0;
  int    n_out [NP];
  int    cyc_done [NP];

  always #5 clk = ~clk;

  for (genvar p = 0; p < NP; p++) begin : g_proc
    dwt3d_top #(.L1(L1), .L2(L2), .L3(L3), .NX(NX), .NY(NY), .NZ(NZP)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .busy(busy[p]), .done(done[p]),
      .state_num(state_num[p]), .coef_rd_en(coef_rd_en[p]), .coef_rd_sel(coef_rd_sel[p]),
      .coef_lo_word(coef_lo_word[p]), .coef_hi_word(coef_hi_word[p]),
      .blk_rd_en(blk_rd_en[p]), .blk_x(blk_x[p]), .blk_y(blk_y[p]), .blk_z(blk_z[p]),
      .blk_addr(blk_addr[p]), .blk_rd_data(blk_rd_data[p]),
      .out_valid(out_valid[p]), .out_band(out_band[p]), .out_lo(out_lo[p]), .out_hi(out_hi[p]),
      .out_bx(out_bx[p]), .out_by(out_by[p]), .out_bz(out_bz[p]));

    // Off-chip memory: this processor's slice 0 is slice p*NZP of the volume.
    always_comb begin
      for (int i = 0; i < L1; i++)
        blk_rd_data[p][i] = sample((int'(blk_x[p]) + i) % NX, int'(blk_y[p]),
                                   int'(blk_z[p]) + p * NZP, seed);
      for (int t = 0; t < 4; t++) begin
        coef_lo_word[p][t] = c[0][coef_rd_sel[p]][t];
        coef_hi_word[p][t] = c[1][coef_rd_sel[p]][t];
      end
    end

    // Output checker: every output against the whole-volume reference.
    always @(posedge clk) begin
      if (rst_n && out_valid[p]) begin
        automatic sub_t r;
        automatic int   xb = int'(out_band[p][1]), yb = int'(out_band[p][0]);
        ref_block(L1, L2, L3, NX, NY, NZ, 2 * int'(out_bx[p]), 2 * int'(out_by[p]),
                  2 * (int'(out_bz[p]) + p * NBZP), seed, 0, c, r);
        checks++;
        if (out_lo[p] != r[xb][yb][0] || out_hi[p] != r[xb][yb][1]) begin
          failures++;
          $display("FAIL processor %0d block %0d,%0d,%0d band %0d", p, out_bx[p], out_by[p],
                   out_bz[p], out_band[p]);
        end
        n_out[p]++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int p = 0; p < NP; p++) begin n_out[p] = 0; cyc_done[p] = 0; end
    rand_coefs(L1, L2, L3, c);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    #1;
    cyc = 0;
    while (busy != '0) begin
      @(posedge clk); #1; cyc++;
      // cyc is the index of the schedule step now running (0 = first
      // coefficient cycle), so the step with done is the last of cyc + 1.
      for (int p = 0; p < NP; p++) if (done[p]) cyc_done[p] = cyc;
    end
    repeat (2) @(posedge clk);
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (n_out[p] != NBX * NBY * NBZP * 4) begin
        failures++;
        $display("FAIL processor %0d gave %0d output pairs", p, n_out[p]);
      end
      checks++;
      if (cyc_done[p] + 1 != 3 + NBX * NBY * NBZP * BLK_CYC) begin
        failures++;
        $display("FAIL processor %0d finished at cycle %0d", p, cyc_done[p]);
      end
    end
    $display("two processors: %0d cycles for the volume; one processor needs %0d",
             cyc_done[0] + 1, 3 + NBX * NBY * (NZ / 2) * BLK_CYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
