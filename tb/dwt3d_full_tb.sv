// dwt3d_full_tb: the processor at its default size, the prototype 4x4x2
// wavelet over a whole 256 x 256 x 53 MRI-sized volume (442,368 blocks), one
// complete transform. The off-chip memory is modelled from the synthetic
// volume of dwt3d_tb_pkg; every output value is checked against ref_block(),
// as are the block and band order, the latency of the first output, the 24
// cycles per block and done on the last output.
module dwt3d_full_tb;
  import dwt3d_tb_pkg::*;
  localparam int L1 = 4, L2 = 4, L3 = 2, NX = 256, NY = 256, NZ = 53;
  localparam int ROWS = L2 * L3;
  localparam int BLK_CYC = 2 * ROWS + 2 * L3 + 4;
  localparam int NBX = NX / 2, NBY = NY / 2, NBZ = (NZ + 1) / 2;

  logic             clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic             busy, done, coef_rd_en, blk_rd_en, out_valid;
  logic [4:0]       state_num;
  logic [1:0]       coef_rd_sel, out_band;
  logic [3:0][15:0] coef_lo_word, coef_hi_word, blk_rd_data;
  logic [8:0]       blk_x, blk_y, out_bx, out_by;
  logic [5:0]       blk_z, out_bz;
  logic [21:0]      blk_addr;
  logic [15:0]      out_lo, out_hi;

  dwt3d_top dut (.*);

  coef_t c;
  int    seed = 5;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  always_comb begin
    for (int i = 0; i < L1; i++)
      blk_rd_data[i] = sample((int'(blk_x) + i) % NX, int'(blk_y), int'(blk_z), seed);
    for (int t = 0; t < 4; t++) begin
      coef_lo_word[t] = c[0][coef_rd_sel][t];
      coef_hi_word[t] = c[1][coef_rd_sel][t];
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (3 + NBX * NBY * NBZ * BLK_CYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   cyc, last_first, nwrap_z;
    sub_t r;
    logic saw_done;
    rand_coefs(L1, L2, L3, c);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0; last_first = 0; saw_done = 1'b0; nwrap_z = 0;
    for (int bz = 0; bz < NBZ; bz++)
      for (int by = 0; by < NBY; by++)
        for (int bx = 0; bx < NBX; bx++) begin
          if (2 * bz + L3 > NZ) nwrap_z++;
          ref_block(L1, L2, L3, NX, NY, NZ, 2 * bx, 2 * by, 2 * bz, seed, 0, c, r);
          for (int k = 0; k < 4; k++) begin
            automatic int guard = 0;
            do begin
              @(posedge clk); #1; cyc++; guard++;
              if (done) saw_done = 1'b1;
            end while (!out_valid && guard < 4 * BLK_CYC);
            chk(out_valid, "output arrives");
            if (k == 0) begin
              if (bx == 0 && by == 0 && bz == 0)
                chk(cyc == 3 + 2 * ROWS + 2 * L3 + 1, $sformatf("first output at cycle %0d", cyc));
              else
                chk(cyc - last_first == BLK_CYC, "24 cycles per block");
              last_first = cyc;
            end
            chk(out_band == 2'(k) && int'(out_bx) == bx && int'(out_by) == by && int'(out_bz) == bz,
                "block and band order");
            chk(out_lo == r[k / 2][k % 2][0] && out_hi == r[k / 2][k % 2][1],
                $sformatf("block %0d,%0d,%0d band %0d values", bx, by, bz, k));
          end
        end
    chk(saw_done, "done pulsed with the last output");
    @(posedge clk); #1;
    chk(!busy, "idle after the volume");
    chk(nwrap_z > 0, "slice wrap-around exercised");
    $display("blocks %0d outputs %0d cycles %0d", NBX * NBY * NBZ, NBX * NBY * NBZ * 8, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
