// dwt3d_ctrl_tb: runs the central controller over a small 8 x 6 x 5 volume
// (4 x 3 x 3 blocks, the odd slice count making the last block slice wrap to
// slice 0) and checks every cycle against the schedule worked out here:
// the three coefficient load cycles, then per block the state numbers, the
// wrapped row coordinates and linear addresses of the block load, the INRAM
// addresses, the LRAM/HRAM word and lane of every result, the filter source,
// the DWTC loads ahead of each pass, the output tags, and done on the very
// last cycle. It also counts the cycles of the whole run against
// 3 + blocks * (2*L2*L3 + 2*L3 + 4).
module dwt3d_ctrl_tb;
  import dwt3d_pkg::*;
  localparam int L1 = 4, L2 = 4, L3 = 2, NX = 8, NY = 6, NZ = 5;
  localparam int ROWS = L2 * L3;
  localparam int NBX = NX / 2, NBY = NY / 2, NBZ = (NZ + 1) / 2;

  logic       clk = 0, rst_n = 0, start = 0;
  logic       busy, done;
  phase_e     phase;
  logic [4:0] state_num;
  logic       coef_rd_en, dwtc_load;
  dim_e       coef_rd_sel, dwtc_sel;
  logic       blk_rd_en;
  logic [3:0] blk_x;
  logic [2:0] blk_y, blk_z;
  logic [7:0] blk_addr;
  logic       inram_we;
  logic [6:0] inram_waddr, inram_raddr;
  logic       src_inram, src_hram;
  logic [1:0] sram_raddr, sram_waddr, sram_wlane;
  logic       sram_we, z_emit, emit_xb, emit_yb;
  logic [3:0] blk_ix;
  logic [2:0] blk_iy, blk_iz;

  int checks = 0, failures = 0;
  int wraps_y = 0, wraps_z = 0;

  dwt3d_ctrl #(.L1(L1), .L2(L2), .L3(L3), .NX(NX), .NY(NY), .NZ(NZ)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (state %0d)", what, $time, state_num);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    chk(!busy && !done, "idle after reset");
    start <= 1;
    @(posedge clk);
    start <= 0;
    cycles = 0;
    #1;
    for (int k = 0; k < 3; k++) begin
      chk(busy && phase == PH_COEF && state_num == 0, "coef state");
      chk(coef_rd_en && coef_rd_sel == dim_e'(k), "coef select");
      chk(!blk_rd_en && !sram_we && !z_emit && !dwtc_load, "coef quiet");
      @(posedge clk); #1; cycles++;
    end
    for (int bz = 0; bz < NBZ; bz++)
      for (int by = 0; by < NBY; by++)
        for (int bx = 0; bx < NBX; bx++) begin
          // Block load: states 1..ROWS.
          for (int k = 0; k < ROWS; k++) begin
            automatic int ey = (2 * by + k % L2) % NY;
            automatic int ez = (2 * bz + k / L2) % NZ;
            if (2 * by + k % L2 >= NY) wraps_y++;
            if (2 * bz + k / L2 >= NZ) wraps_z++;
            chk(state_num == 5'(1 + k), "load state");
            chk(blk_rd_en && inram_we && inram_waddr == 7'(k), "load enable");
            chk(blk_x == 4'(2 * bx) && blk_y == 3'(ey) && blk_z == 3'(ez), "row coordinates");
            chk(blk_addr == 8'((ez * NY + ey) * NX + 2 * bx), "row address");
            chk(!sram_we && !z_emit, "load quiet");
            chk(dwtc_load == (k == ROWS - 1) && (k != ROWS - 1 || dwtc_sel == DIM_X), "dwtc X");
            @(posedge clk); #1; cycles++;
          end
          // X pass.
          for (int k = 0; k < ROWS; k++) begin
            chk(state_num == 5'(1 + ROWS + k), "X state");
            chk(src_inram && inram_raddr == 7'(k), "X source");
            chk(sram_we && sram_waddr == 2'(k / L2) && sram_wlane == 2'(k % L2), "X store");
            chk(!blk_rd_en && !z_emit, "X quiet");
            chk(dwtc_load == (k == ROWS - 1) && (k != ROWS - 1 || dwtc_sel == DIM_Y), "dwtc Y");
            @(posedge clk); #1; cycles++;
          end
          // Y pass.
          for (int k = 0; k < 2 * L3; k++) begin
            chk(state_num == 5'(1 + 2 * ROWS + k), "Y state");
            chk(!src_inram && src_hram == (k / L3 == 1) && sram_raddr == 2'(k % L3), "Y source");
            chk(sram_we && sram_waddr == 2'(L3 + k / L3) && sram_wlane == 2'(k % L3), "Y store");
            chk(dwtc_load == (k == 2 * L3 - 1) && (k != 2 * L3 - 1 || dwtc_sel == DIM_Z), "dwtc Z");
            @(posedge clk); #1; cycles++;
          end
          // Z pass.
          for (int k = 0; k < 4; k++) begin
            automatic logic last = (bx == NBX - 1) && (by == NBY - 1) && (bz == NBZ - 1) && (k == 3);
            chk(state_num == 5'(1 + 2 * ROWS + 2 * L3 + k), "Z state");
            chk(z_emit && emit_xb == k[1] && emit_yb == k[0], "Z emit");
            chk(!src_inram && src_hram == k[0] && sram_raddr == 2'(L3 + k / 2), "Z source");
            chk(!sram_we && !dwtc_load, "Z quiet");
            chk(blk_ix == 4'(bx) && blk_iy == 3'(by) && blk_iz == 3'(bz), "block index");
            chk(done == last, "done");
            @(posedge clk); #1; cycles++;
          end
        end
    chk(!busy && !done, "idle at end");
    chk(cycles == 3 + NBX * NBY * NBZ * (2 * ROWS + 2 * L3 + 4), "cycle count");
    chk(wraps_y > 0 && wraps_z > 0, "wrap-around exercised");
    $display("blocks %0d cycles %0d y-wraps %0d z-wraps %0d", NBX * NBY * NBZ, cycles, wraps_y, wraps_z);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
