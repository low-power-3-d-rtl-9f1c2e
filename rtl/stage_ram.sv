// stage_ram: intermediate memory for one filter's results between passes. The
// processor has two: LRAM for the low pass results and HRAM for the high pass.
//
// The memory holds WORDS words of LANES 16-bit values. The filter writes one
// value per cycle into a chosen lane of a chosen word; the next pass reads a
// whole word per cycle as the filter input. The controller stores the results
// so that the values one filter evaluation needs (the samples along Y for the
// Y pass, along Z for the Z pass) share one word. Lanes that are never
// written read as zero, because reset clears the memory; these are the padding
// lanes of a filter shorter than LANES. The read is asynchronous.
//
// The two memories and their names follow the design; the word/lane layout
// is this implementation's choice.
module stage_ram #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned LANES = 4,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [LW-1:0]          wlane,
  input  logic [15:0]            wdata,
  input  logic [AW-1:0]          raddr,
  output logic [LANES-1:0][15:0] rdata
);

  logic [LANES-1:0][15:0] mem [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < int'(WORDS); w++) mem[w] <= '0;
    end else if (we) begin
      mem[waddr][wlane] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
