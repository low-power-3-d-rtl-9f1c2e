// dwt3d_env: test environment around one processor instance. It models the
// off-chip memory (the synthetic volume of dwt3d_tb_pkg, rows served in the
// cycle they are asked for, x wrapping at the edge) and the off-chip
// coefficient store, starts the processor RUNS times with new random
// coefficients and data each time, and checks every output: block order, band
// order, both values against ref_block(), the cycle of the first output after
// start, the spacing of the blocks and done on the last output. It counts the
// mechanisms of the design it sees happen (coefficient loads, block loads,
// X/Y/Z steps, wrap-around in x, y and z, done) and reports them when
// finished is set; a missing one is counted in missing. NEED_WRAP = 0 waives
// the z wrap for volumes whose slice count needs none.
module dwt3d_env
  import dwt3d_tb_pkg::*;
#(
  parameter int L1 = 4,
  parameter int L2 = 4,
  parameter int L3 = 2,
  parameter int NX = 8,
  parameter int NY = 6,
  parameter int NZ = 5,
  parameter int PROD_LSB = 0,
  parameter int RUNS = 2,
  parameter bit NEED_WRAP = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   missing
);
  localparam int TAPS = (L1 > L2) ? ((L1 > L3) ? L1 : L3) : ((L2 > L3) ? L2 : L3);
  localparam int ROWS = L2 * L3;
  localparam int BLK_CYC = 2 * ROWS + 2 * L3 + 4;
  localparam int NBX = NX / 2, NBY = NY / 2, NBZ = (NZ + 1) / 2;
  localparam int SNW = $clog2(1 + 2 * ROWS + 2 * L3 + 4 + 1);
  localparam int XW = $clog2(NX + 1), YW = $clog2(NY + 1), ZW = $clog2(NZ + 1);
  localparam int AW = $clog2(NX * NY * NZ + 1);

  logic                  start = 0;
  logic                  busy, done, coef_rd_en, blk_rd_en, out_valid;
  logic [SNW-1:0]        state_num;
  logic [1:0]            coef_rd_sel, out_band;
  logic [TAPS-1:0][15:0] coef_lo_word, coef_hi_word;
  logic [XW-1:0]         blk_x, out_bx;
  logic [YW-1:0]         blk_y, out_by;
  logic [ZW-1:0]         blk_z, out_bz;
  logic [AW-1:0]         blk_addr;
  logic [L1-1:0][15:0]   blk_rd_data;
  logic [15:0]           out_lo, out_hi;

  dwt3d_top #(.L1(L1), .L2(L2), .L3(L3), .NX(NX), .NY(NY), .NZ(NZ), .PROD_LSB(PROD_LSB)) dut (.*);

  coef_t c;
  int    seed = 0;

  // Off-chip memories.
  always_comb begin
    for (int i = 0; i < L1; i++)
      blk_rd_data[i] = sample((int'(blk_x) + i) % NX, int'(blk_y), int'(blk_z), seed);
    for (int t = 0; t < TAPS; t++) begin
      coef_lo_word[t] = c[0][coef_rd_sel][t];
      coef_hi_word[t] = c[1][coef_rd_sel][t];
    end
  end

  // Mechanism counters.
  int n_coef = 0, n_load = 0, n_x = 0, n_y = 0, n_z = 0;
  int n_wx = 0, n_wy = 0, n_wz = 0, n_done = 0, n_out = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      // nothing is counted during reset
    end else begin
    if (coef_rd_en) n_coef <= n_coef + 1;
    if (blk_rd_en) begin
      n_load <= n_load + 1;
      if (int'(blk_x) + L1 > NX) n_wx <= n_wx + 1;
    end
    if (busy && state_num > SNW'(ROWS) && state_num <= SNW'(2 * ROWS)) n_x <= n_x + 1;
    if (busy && state_num > SNW'(2 * ROWS) && state_num <= SNW'(2 * ROWS + 2 * L3)) n_y <= n_y + 1;
    if (busy && state_num > SNW'(2 * ROWS + 2 * L3)) n_z <= n_z + 1;
    if (done) n_done <= n_done + 1;
    if (out_valid) n_out <= n_out + 1;
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%0dx%0dx%0d] %s at %0t", L1, L2, L3, what, $time);
    end
  endtask

  initial begin
    int  cyc, last_first;
    sub_t r;
    logic saw_done;
    checks = 0; failures = 0; missing = 0; finished = 0;
    wait (rst_n);
    for (int run = 0; run < RUNS; run++) begin
      rand_coefs(L1, L2, L3, c);
      seed = run * 3 + 1;
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      cyc = 0;
      last_first = 0;
      saw_done = 0;
      for (int bz = 0; bz < NBZ; bz++)
        for (int by = 0; by < NBY; by++)
          for (int bx = 0; bx < NBX; bx++) begin
            // Y/Z wrap of this block (x wrap is counted at the memory).
            if (2 * by + L2 > NY) n_wy++;
            if (2 * bz + L3 > NZ) n_wz++;
            ref_block(L1, L2, L3, NX, NY, NZ, 2 * bx, 2 * by, 2 * bz, seed, PROD_LSB, c, r);
            for (int k = 0; k < 4; k++) begin
              automatic int guard = 0;
              do begin
                @(posedge clk); #1; cyc++; guard++;
                if (done) saw_done = 1;
              end while (!out_valid && guard < 4 * BLK_CYC);
              chk(out_valid, "output arrives");
              if (k == 0) begin
                if (bx == 0 && by == 0 && bz == 0)
                  chk(cyc == 3 + 2 * ROWS + 2 * L3 + 1, $sformatf("first output at cycle %0d", cyc));
                else
                  chk(cyc - last_first == BLK_CYC, $sformatf("block spacing %0d", cyc - last_first));
                last_first = cyc;
              end
              chk(out_band == 2'(k), "band order");
              chk(int'(out_bx) == bx && int'(out_by) == by && int'(out_bz) == bz, "block order");
              chk(out_lo == r[k / 2][k % 2][0],
                  $sformatf("band %0d low: got %h expected %h", k, out_lo, r[k / 2][k % 2][0]));
              chk(out_hi == r[k / 2][k % 2][1],
                  $sformatf("band %0d high: got %h expected %h", k, out_hi, r[k / 2][k % 2][1]));
            end
          end
      chk(saw_done, "done pulsed with the last output");
      @(posedge clk); #1;
      chk(!busy && !out_valid, "idle after the volume");
    end
    // Every mechanism must have happened.
    if (n_coef != 3 * RUNS) begin missing++; $display("coefficient loads %0d", n_coef); end
    if (n_load == 0 || n_x == 0 || n_y == 0 || n_z == 0) begin missing++; $display("a pass never ran"); end
    if (n_wx == 0) begin missing++; $display("no x wrap"); end
    if (n_wy == 0) begin missing++; $display("no y wrap"); end
    if (NEED_WRAP && n_wz == 0) begin missing++; $display("no z wrap"); end
    if (n_done != RUNS) begin missing++; $display("done count %0d", n_done); end
    $display("[%0dx%0dx%0d, %0dx%0dx%0d] cycles per run %0d, per slice %0d",
             L1, L2, L3, NX, NY, NZ, 3 + NBX * NBY * NBZ * BLK_CYC, (3 + NBX * NBY * NBZ * BLK_CYC) / NZ);
    $display("[%0dx%0dx%0d, %0dx%0dx%0d] runs %0d outputs %0d coef-loads %0d row-loads %0d X %0d Y %0d Z %0d wraps x/y/z %0d/%0d/%0d done %0d",
             L1, L2, L3, NX, NY, NZ, RUNS, n_out * 2, n_coef, n_load, n_x, n_y, n_z, n_wx, n_wy, n_wz, n_done);
    finished = 1;
  end
endmodule
