// inram: on-chip block cache (1 KB by default: 128 words of 64 bits).
//
// One word holds one row of a data block: LANES 16-bit samples along X, the
// width of the off-chip data bus. The block loader writes one row per cycle
// through the write port; the X pass reads one row per cycle through the
// read port. The read is asynchronous (combinational from raddr), so a row
// written at a clock edge can be read in the next cycle. The array is not
// reset: every row is written before it is read.
//
// The 1 KB size and the 64-bit row width follow the design; the one-write,
// one-read port arrangement and the asynchronous read are this
// implementation's choices.
module inram #(
  parameter int unsigned WORDS = 128,
  parameter int unsigned LANES = 4,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                   clk,
  input  logic                   we,
  input  logic [AW-1:0]          waddr,
  input  logic [LANES-1:0][15:0] wdata,
  input  logic [AW-1:0]          raddr,
  output logic [LANES-1:0][15:0] rdata
);

  logic [LANES-1:0][15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
