// dwt3d_ctrl: central control unit of the 3-D DWT processor.
//
// The controller runs one fixed schedule per data block of L1 x L2 x L3
// samples (4 x 4 x 2 in the prototype, giving the 25 states 0..24):
//
//   state 0                 load the coefficients of both filters (3 cycles,
//                           one per dimension register R0, R1, R2)
//   states 1..L2*L3         load the block from off-chip, one L1-wide row
//                           (fixed y, z) per cycle, into INRAM row y + L2*z
//   next L2*L3 states       X pass: filter INRAM row k; the low result goes to
//                           LRAM and the high result to HRAM, word z, lane y
//   next 2*L3 states        Y pass: for X band xb and slice z, filter word z of
//                           LRAM (xb = low) or HRAM (xb = high); results go to
//                           word L3 + xb, lane z, of LRAM / HRAM
//   last 4 states           Z pass: for bands (xb, yb), filter word L3 + xb of
//                           LRAM (yb = low) or HRAM (yb = high); the low and
//                           high results are the two outputs of the cycle
//
// so a block costs L2*L3 load cycles plus L2*L3 + 2*L3 + 4 compute cycles and
// yields 8 outputs. The coefficients are loaded once per start; blocks then
// follow back to back. In the last cycle before each pass the controller
// tells the coefficient units to copy that pass's coefficients into DWTC.
//
// Block order: the block origin (ox, oy, oz) steps by 2 in every dimension,
// so that every other output position is skipped (downsampling by two); x runs
// fastest, then y, then z. Reads past the volume's edge wrap around (circular
// input): the controller wraps y and z, and the off-chip memory wraps the x
// lanes of a row starting at ox. An odd NZ gives (NZ+1)/2 block slices, the
// last one wrapping to slice 0.
//
// Interface: start (one cycle, while idle) runs the whole volume; busy is high
// until then, done pulses in the last cycle of the last block. blk_rd_en asks
// the off-chip memory for the row at (blk_x, blk_y, blk_z), linear address
// blk_addr = (z*NY + y)*NX + x, in the same cycle (blk_rd_data is written to
// INRAM at the clock edge). coef_rd_en asks for the coefficient word of
// dimension coef_rd_sel in the same way. z_emit marks a Z-pass cycle whose
// filter results are outputs of band {emit_xb, emit_yb} for block
// (blk_ix, blk_iy, blk_iz). state_num is the state number of the schedule.
// Because the window origin is always even, blk_x[0] and blk_addr[0] are
// constant 0, and the block indices keep the coordinate widths, so their top
// bits stay 0; the widths are kept for a uniform interface.
//
// The schedule, the 25 states and the block stepping follow the design; the
// storage layout, the order of the Y and Z pass steps, the same-cycle
// off-chip reads and the return to the block load (rather than to state 0)
// after each block are this implementation's choices.
module dwt3d_ctrl
  import dwt3d_pkg::*;
#(
  parameter int unsigned L1          = 4,
  parameter int unsigned L2          = 4,
  parameter int unsigned L3          = 2,
  parameter int unsigned NX          = 256,
  parameter int unsigned NY          = 256,
  parameter int unsigned NZ          = 53,
  parameter int unsigned INRAM_WORDS = 128,
  localparam int unsigned TAPS   = max3(L1, L2, L3),
  localparam int unsigned ROWS   = L2 * L3,
  localparam int unsigned SRAM_W = L3 + 2,
  localparam int unsigned NSTATE = 1 + 2 * ROWS + 2 * L3 + 4,
  localparam int unsigned IAW    = (INRAM_WORDS > 1) ? $clog2(INRAM_WORDS) : 1,
  localparam int unsigned SAW    = (SRAM_W > 1) ? $clog2(SRAM_W) : 1,
  localparam int unsigned SLW    = (TAPS > 1) ? $clog2(TAPS) : 1,
  localparam int unsigned XW     = $clog2(NX + 1),
  localparam int unsigned YW     = $clog2(NY + 1),
  localparam int unsigned ZW     = $clog2(NZ + 1),
  localparam int unsigned AW     = $clog2(NX * NY * NZ + 1),
  localparam int unsigned CW     = $clog2(ROWS + 1),
  localparam int unsigned SNW    = $clog2(NSTATE + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output phase_e          phase,
  output logic [SNW-1:0]  state_num,
  // coefficient load (state 0) and DWTC update
  output logic            coef_rd_en,
  output dim_e            coef_rd_sel,
  output logic            dwtc_load,
  output dim_e            dwtc_sel,
  // off-chip block read and INRAM write
  output logic            blk_rd_en,
  output logic [XW-1:0]   blk_x,
  output logic [YW-1:0]   blk_y,
  output logic [ZW-1:0]   blk_z,
  output logic [AW-1:0]   blk_addr,
  output logic            inram_we,
  output logic [IAW-1:0]  inram_waddr,
  output logic [IAW-1:0]  inram_raddr,
  // filter input source: INRAM (X pass) or LRAM/HRAM word
  output logic            src_inram,
  output logic            src_hram,
  output logic [SAW-1:0]  sram_raddr,
  // filter results into LRAM/HRAM
  output logic            sram_we,
  output logic [SAW-1:0]  sram_waddr,
  output logic [SLW-1:0]  sram_wlane,
  // outputs
  output logic            z_emit,
  output logic            emit_xb,
  output logic            emit_yb,
  output logic [XW-1:0]   blk_ix,
  output logic [YW-1:0]   blk_iy,
  output logic [ZW-1:0]   blk_iz
);

  localparam int unsigned NBX = NX / 2;
  localparam int unsigned NBY = NY / 2;
  localparam int unsigned NBZ = (NZ + 1) / 2;

  logic [CW-1:0] cnt;
  logic [XW-1:0] ox;
  logic [YW-1:0] oy;
  logic [ZW-1:0] oz;
  logic          last_cnt;
  logic          last_blk;

  // Position of the current step inside its pass.
  logic [CW-1:0] row_y, row_z;       // load / X pass: row k = y + L2*z
  logic [CW-1:0] y_xb;               // Y pass: k = z + L3*xb
  logic [SAW-1:0] y_z;
  logic          z_xb, z_yb;         // Z pass: k = yb + 2*xb
  logic [YW:0]   yy;
  logic [ZW:0]   zz;

  always_comb begin
    row_y = CW'(cnt % CW'(L2));
    row_z = CW'(cnt / CW'(L2));
    y_xb  = CW'(cnt / CW'(L3));
    y_z   = SAW'(cnt % CW'(L3));
    z_xb  = cnt[1];
    z_yb  = cnt[0];
  end

  always_comb begin
    unique case (phase)
      PH_IDLE: last_cnt = 1'b0;
      PH_COEF: last_cnt = (cnt == CW'(2));
      PH_LOAD: last_cnt = (cnt == CW'(ROWS - 1));
      PH_X:    last_cnt = (cnt == CW'(ROWS - 1));
      PH_Y:    last_cnt = (cnt == CW'(2 * L3 - 1));
      PH_Z:    last_cnt = (cnt == CW'(3));
      default: last_cnt = 1'b0;
    endcase
  end

  assign last_blk = (ox == XW'(2 * (NBX - 1))) && (oy == YW'(2 * (NBY - 1)))
                 && (oz == ZW'(2 * (NBZ - 1)));

  // Phase, step counter and block origin.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      ox    <= '0;
      oy    <= '0;
      oz    <= '0;
    end else begin
      if (phase == PH_IDLE) begin
        if (start) begin
          phase <= PH_COEF;
          cnt   <= '0;
          ox    <= '0;
          oy    <= '0;
          oz    <= '0;
        end
      end else if (!last_cnt) begin
        cnt <= cnt + 1'b1;
      end else begin
        cnt <= '0;
        unique case (phase)
          PH_COEF: phase <= PH_LOAD;
          PH_LOAD: phase <= PH_X;
          PH_X:    phase <= PH_Y;
          PH_Y:    phase <= PH_Z;
          PH_Z: begin
            if (last_blk) begin
              phase <= PH_IDLE;
            end else begin
              phase <= PH_LOAD;
              if (ox != XW'(2 * (NBX - 1))) begin
                ox <= ox + XW'(2);
              end else begin
                ox <= '0;
                if (oy != YW'(2 * (NBY - 1))) begin
                  oy <= oy + YW'(2);
                end else begin
                  oy <= '0;
                  oz <= oz + ZW'(2);
                end
              end
            end
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  assign busy = (phase != PH_IDLE);
  assign done = (phase == PH_Z) && last_cnt && last_blk;

  always_comb begin
    unique case (phase)
      PH_COEF: state_num = '0;
      PH_LOAD: state_num = SNW'(1 + cnt);
      PH_X:    state_num = SNW'(1 + ROWS + cnt);
      PH_Y:    state_num = SNW'(1 + 2 * ROWS + cnt);
      PH_Z:    state_num = SNW'(1 + 2 * ROWS + 2 * L3 + cnt);
      default: state_num = '0;
    endcase
  end

  // Coefficient load and DWTC update.
  assign coef_rd_en  = (phase == PH_COEF);
  assign coef_rd_sel = dim_e'(cnt[1:0]);

  always_comb begin
    dwtc_load = 1'b0;
    dwtc_sel  = DIM_X;
    if (last_cnt) begin
      unique case (phase)
        PH_LOAD: begin dwtc_load = 1'b1; dwtc_sel = DIM_X; end
        PH_X:    begin dwtc_load = 1'b1; dwtc_sel = DIM_Y; end
        PH_Y:    begin dwtc_load = 1'b1; dwtc_sel = DIM_Z; end
        default: ;
      endcase
    end
  end

  // Off-chip row read with circular wrap in y and z.
  always_comb begin
    yy = (YW+1)'(oy) + (YW+1)'(row_y);
    zz = (ZW+1)'(oz) + (ZW+1)'(row_z);
    if (yy >= (YW+1)'(NY)) yy = yy - (YW+1)'(NY);
    if (zz >= (ZW+1)'(NZ)) zz = zz - (ZW+1)'(NZ);
  end

  assign blk_rd_en   = (phase == PH_LOAD);
  assign blk_x       = ox;
  assign blk_y       = yy[YW-1:0];
  assign blk_z       = zz[ZW-1:0];
  assign blk_addr    = AW'((AW'(blk_z) * AW'(NY) + AW'(blk_y)) * AW'(NX) + AW'(blk_x));
  assign inram_we    = (phase == PH_LOAD);
  assign inram_waddr = IAW'(cnt);
  assign inram_raddr = IAW'(cnt);

  // Filter source and result storage.
  always_comb begin
    src_inram  = 1'b0;
    src_hram   = 1'b0;
    sram_raddr = '0;
    sram_we    = 1'b0;
    sram_waddr = '0;
    sram_wlane = '0;
    z_emit     = 1'b0;
    unique case (phase)
      PH_X: begin
        src_inram  = 1'b1;
        sram_we    = 1'b1;
        sram_waddr = SAW'(row_z);
        sram_wlane = SLW'(row_y);
      end
      PH_Y: begin
        src_hram   = y_xb[0];
        sram_raddr = SAW'(y_z);
        sram_we    = 1'b1;
        sram_waddr = SAW'(L3 + y_xb);
        sram_wlane = SLW'(y_z);
      end
      PH_Z: begin
        src_hram   = z_yb;
        sram_raddr = SAW'(L3 + 32'(z_xb));
        z_emit     = 1'b1;
      end
      default: ;
    endcase
  end

  assign emit_xb = z_xb;
  assign emit_yb = z_yb;
  assign blk_ix  = ox >> 1;
  assign blk_iy  = oy >> 1;
  assign blk_iz  = oz >> 1;

  // The pass layout needs each dimension to fit in one LRAM/HRAM word and the
  // block to fit in INRAM.
  initial begin
    assert (L2 <= TAPS && L3 <= TAPS && ROWS <= INRAM_WORDS)
      else $error("dwt3d_ctrl: block does not fit the on-chip memories");
  end

  // Every row read lies inside the volume once wrapped.
  property p_row_in_volume;
    @(posedge clk) disable iff (!rst_n)
      blk_rd_en |-> (32'(blk_y) < NY) && (32'(blk_z) < NZ) && (32'(blk_x) < NX);
  endproperty
  a_row_in_volume: assert property (p_row_in_volume);

endmodule
