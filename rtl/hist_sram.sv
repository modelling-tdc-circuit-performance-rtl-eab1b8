// hist_sram: model of one histogram SRAM macro (one read port, one write
// port, synchronous).
//
// A read enabled at a clock edge returns mem[raddr] in rdata after that edge
// and rdata holds its value until the next read. A write enabled at a clock
// edge stores wdata at waddr. A read and a write of the same word at the same
// edge return the old contents. The contents are not reset; the histogram
// pipeline never reads a word before the first capture cycle of a histogram
// has written it.
//
// The reference study names the SRAM as an IP block slower than the TDC clock; its
// organisation (two ports, registered output) is this design's choice. In
// the histogram banks each instance is enabled only once every DIV TDC
// cycles, which is what lets a slow macro keep up.
module hist_sram #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned WIDTH = 12,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (re) begin
      rdata <= mem[raddr];
    end
    if (we) begin
      mem[waddr] <= wdata;
    end
  end

endmodule
