// dwt3d_pkg: types and constants shared by the 3-D discrete wavelet transform
// processor. The datapath word is 16 bits wide, as are the coefficients
// (sample_t). The controller walks a fixed schedule per block of data (coefficient load, block
// load, X pass, Y pass, Z pass); its phase is the enum below; dim_e names the
// dimension whose coefficients are in use. max3 sizes the filters: the design
// uses one filter length, the longest of the three dimensions.
package dwt3d_pkg;

  localparam int unsigned DATA_W = 16;   // datapath and coefficient width

  typedef logic signed [DATA_W-1:0] sample_t;

  // Controller phases. COEF is state 0, LOAD states 1..L2*L3, then the three
  // filter passes follow; IDLE waits for a start request.
  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,
    PH_COEF = 3'd1,
    PH_LOAD = 3'd2,
    PH_X    = 3'd3,
    PH_Y    = 3'd4,
    PH_Z    = 3'd5
  } phase_e;

  // Which dimension's coefficients the filters use.
  typedef enum logic [1:0] {
    DIM_X = 2'd0,
    DIM_Y = 2'd1,
    DIM_Z = 2'd2
  } dim_e;

  function automatic int unsigned max3(int unsigned a, int unsigned b, int unsigned c);
    int unsigned m;
    m = (a > b) ? a : b;
    return (m > c) ? m : c;
  endfunction

endpackage
