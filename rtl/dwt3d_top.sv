// dwt3d_top: 3-D discrete wavelet transform processor (one octave).
//
// The processor transforms a volume of NX x NY x NZ 16-bit samples (an MRI
// study: 256 x 256 pixels, 53 slices by default) block by block. For every
// other position in each dimension it reads an L1 x L2 x L3 block (4 x 4 x 2)
// from off-chip memory and produces the 8 subband coefficients of that
// position (LLL, LLH, ..., HHH) with a single low pass / high pass filter
// pair, applied first along X, then Y, then Z. Intermediate results stay on
// chip in LRAM (low pass) and HRAM (high pass); the block itself is held in
// the 1 KB INRAM.
//
// Parts: dwt3d_ctrl (central control unit and block address generation),
// two coef_unit (low and high pass coefficients, R0..R2 and DWTC), inram,
// two stage_ram (LRAM, HRAM) and two dwt_filter (each TAPS Booth multipliers
// and a CLA adder tree).
//
// Interface and timing:
//   start         one-cycle pulse while idle; the whole volume is then done.
//   coef_rd_en    in the three cycles of state 0, coef_rd_sel = 0, 1, 2 (X, Y,
//                 Z) names the dimension whose low and high pass coefficient
//                 words must be on coef_lo_word / coef_hi_word in that cycle
//                 (TAPS values each, zero-padded, lane i = tap i).
//   blk_rd_en     names a block row (blk_x, blk_y, blk_z / blk_addr); the L1
//                 samples at x = blk_x .. blk_x+L1-1 (mod NX) of that row must
//                 be on blk_rd_data in the same cycle, lane i = x offset i.
//   out_valid     one cycle per Z-pass step, one cycle after it: out_lo and
//                 out_hi are the subbands {out_band, 0} and {out_band, 1},
//                 out_band = {X band, Y band} (0 = low, 1 = high), of block
//                 (out_bx, out_by, out_bz). Four such cycles give a block's 8
//                 outputs.
//   A block takes L2*L3 load cycles and L2*L3 + 2*L3 + 4 compute cycles (8 +
//   16 = 24 for 4x4x2); the coefficient load adds 3 cycles once per start.
//   done pulses with the last Z step of the volume. blk_x[0] and blk_addr[0]
//   are always 0 (the window origin is even).
//
// The block order, the 25-state schedule, the 16-bit datapath and the filter
// structure follow the design; see the submodules for the choices made here.
module dwt3d_top
  import dwt3d_pkg::*;
#(
  parameter int unsigned L1          = 4,
  parameter int unsigned L2          = 4,
  parameter int unsigned L3          = 2,
  parameter int unsigned NX          = 256,
  parameter int unsigned NY          = 256,
  parameter int unsigned NZ          = 53,
  parameter int unsigned INRAM_WORDS = 128,
  parameter int unsigned PROD_LSB    = 0,
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
  localparam int unsigned SNW    = $clog2(NSTATE + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [SNW-1:0]        state_num,
  // off-chip coefficients
  output logic                  coef_rd_en,
  output logic [1:0]            coef_rd_sel,
  input  logic [TAPS-1:0][15:0] coef_lo_word,
  input  logic [TAPS-1:0][15:0] coef_hi_word,
  // off-chip block data
  output logic                  blk_rd_en,
  output logic [XW-1:0]         blk_x,
  output logic [YW-1:0]         blk_y,
  output logic [ZW-1:0]         blk_z,
  output logic [AW-1:0]         blk_addr,
  input  logic [L1-1:0][15:0]   blk_rd_data,
  // transform outputs
  output logic                  out_valid,
  output logic [1:0]            out_band,
  output logic [15:0]           out_lo,
  output logic [15:0]           out_hi,
  output logic [XW-1:0]         out_bx,
  output logic [YW-1:0]         out_by,
  output logic [ZW-1:0]         out_bz
);

  phase_e                phase;
  dim_e                  coef_sel_e, dwtc_sel;
  logic                  dwtc_load;
  logic                  inram_we;
  logic [IAW-1:0]        inram_waddr, inram_raddr;
  logic [L1-1:0][15:0]   inram_rdata;
  logic                  src_inram, src_hram;
  logic [SAW-1:0]        sram_raddr, sram_waddr;
  logic [SLW-1:0]        sram_wlane;
  logic                  sram_we;
  logic [TAPS-1:0][15:0] lram_rdata, hram_rdata;
  logic [TAPS-1:0][15:0] coef_lo, coef_hi;
  logic [TAPS-1:0][15:0] filt_in;
  logic [15:0]           y_lo, y_hi;
  logic                  z_emit, emit_xb, emit_yb;
  logic [XW-1:0]         blk_ix;
  logic [YW-1:0]         blk_iy;
  logic [ZW-1:0]         blk_iz;

  dwt3d_ctrl #(
    .L1(L1), .L2(L2), .L3(L3), .NX(NX), .NY(NY), .NZ(NZ),
    .INRAM_WORDS(INRAM_WORDS)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .busy        (busy),
    .done        (done),
    .phase       (phase),
    .state_num   (state_num),
    .coef_rd_en  (coef_rd_en),
    .coef_rd_sel (coef_sel_e),
    .dwtc_load   (dwtc_load),
    .dwtc_sel    (dwtc_sel),
    .blk_rd_en   (blk_rd_en),
    .blk_x       (blk_x),
    .blk_y       (blk_y),
    .blk_z       (blk_z),
    .blk_addr    (blk_addr),
    .inram_we    (inram_we),
    .inram_waddr (inram_waddr),
    .inram_raddr (inram_raddr),
    .src_inram   (src_inram),
    .src_hram    (src_hram),
    .sram_raddr  (sram_raddr),
    .sram_we     (sram_we),
    .sram_waddr  (sram_waddr),
    .sram_wlane  (sram_wlane),
    .z_emit      (z_emit),
    .emit_xb     (emit_xb),
    .emit_yb     (emit_yb),
    .blk_ix      (blk_ix),
    .blk_iy      (blk_iy),
    .blk_iz      (blk_iz)
  );

  assign coef_rd_sel = coef_sel_e;

  coef_unit #(.TAPS(TAPS)) u_coef_lo (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_en   (coef_rd_en),
    .load_sel  (coef_sel_e),
    .load_word (coef_lo_word),
    .dwtc_load (dwtc_load),
    .dwtc_sel  (dwtc_sel),
    .dwtc      (coef_lo)
  );

  coef_unit #(.TAPS(TAPS)) u_coef_hi (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_en   (coef_rd_en),
    .load_sel  (coef_sel_e),
    .load_word (coef_hi_word),
    .dwtc_load (dwtc_load),
    .dwtc_sel  (dwtc_sel),
    .dwtc      (coef_hi)
  );

  inram #(.WORDS(INRAM_WORDS), .LANES(L1)) u_inram (
    .clk   (clk),
    .we    (inram_we),
    .waddr (inram_waddr),
    .wdata (blk_rd_data),
    .raddr (inram_raddr),
    .rdata (inram_rdata)
  );

  stage_ram #(.WORDS(SRAM_W), .LANES(TAPS)) u_lram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (sram_we),
    .waddr (sram_waddr),
    .wlane (sram_wlane),
    .wdata (y_lo),
    .raddr (sram_raddr),
    .rdata (lram_rdata)
  );

  stage_ram #(.WORDS(SRAM_W), .LANES(TAPS)) u_hram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (sram_we),
    .waddr (sram_waddr),
    .wlane (sram_wlane),
    .wdata (y_hi),
    .raddr (sram_raddr),
    .rdata (hram_rdata)
  );

  // Filter input: an INRAM row (zero-padded to TAPS) in the X pass, otherwise
  // a word of LRAM or HRAM. Both filters see the same input.
  always_comb begin
    filt_in = '0;
    if (src_inram) begin
      for (int i = 0; i < int'(L1); i++) filt_in[i] = inram_rdata[i];
    end else if (src_hram) begin
      filt_in = hram_rdata;
    end else begin
      filt_in = lram_rdata;
    end
  end

  dwt_filter #(.TAPS(TAPS), .PROD_LSB(PROD_LSB)) u_filt_lo (
    .x    (filt_in),
    .coef (coef_lo),
    .y    (y_lo)
  );

  dwt_filter #(.TAPS(TAPS), .PROD_LSB(PROD_LSB)) u_filt_hi (
    .x    (filt_in),
    .coef (coef_hi),
    .y    (y_hi)
  );

  // Output register: the Z-pass results of each step.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_band  <= '0;
      out_lo    <= '0;
      out_hi    <= '0;
      out_bx    <= '0;
      out_by    <= '0;
      out_bz    <= '0;
    end else begin
      out_valid <= z_emit;
      if (z_emit) begin
        out_band <= {emit_xb, emit_yb};
        out_lo   <= y_lo;
        out_hi   <= y_hi;
        out_bx   <= blk_ix;
        out_by   <= blk_iy;
        out_bz   <= blk_iz;
      end
    end
  end

endmodule
