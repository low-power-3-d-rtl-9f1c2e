// coef_unit: coefficient module of one filter. The processor has two, one
// holding the low pass and one the high pass coefficients.
//
// Three registers R0, R1 and R2 hold the coefficients of the X, Y and Z
// dimension, TAPS 16-bit values each (64 bits for the 4-tap prototype). They
// are loaded from the off-chip coefficient bus, one register per cycle, while
// load_en is high; load_sel picks the register. A dimension shorter than TAPS
// arrives padded with zero coefficients. The working register DWTC feeds the
// filter: when dwtc_load is high it copies the register picked by dwtc_sel at
// the clock edge, so the controller loads it in the last cycle before each
// filter pass and the pass then runs with no extra cycle. Reset clears all
// registers.
//
// The 64-bit registers, R0..R2 and DWTC follow the design's coefficient
// module; the one-register-per-cycle load and the copy into DWTC ahead of each
// pass are this implementation's reading of how they are used.
module coef_unit
  import dwt3d_pkg::*;
#(
  parameter int unsigned TAPS = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load_en,
  input  dim_e                  load_sel,
  input  logic [TAPS-1:0][15:0] load_word,
  input  logic                  dwtc_load,
  input  dim_e                  dwtc_sel,
  output logic [TAPS-1:0][15:0] dwtc
);

  logic [TAPS-1:0][15:0] r [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r[0] <= '0;
      r[1] <= '0;
      r[2] <= '0;
    end else if (load_en) begin
      case (load_sel)
        DIM_X:   r[0] <= load_word;
        DIM_Y:   r[1] <= load_word;
        DIM_Z:   r[2] <= load_word;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dwtc <= '0;
    end else if (dwtc_load) begin
      case (dwtc_sel)
        DIM_X:   dwtc <= r[0];
        DIM_Y:   dwtc <= r[1];
        DIM_Z:   dwtc <= r[2];
        default: dwtc <= '0;
      endcase
    end
  end

endmodule
