// clk_div: clock divider for the SRAM side of the histogram pipeline.
//
// A modulo-DIV counter running on the TDC clock gives the divided clock
// clk_div_o (high for the first half of each DIV-cycle period) and a one-hot
// strobe phase_o: phase_o[k] is high for one TDC cycle in every DIV cycles.
// Each interleaved SRAM of a histogram bank uses its own phase as a clock
// enable, so every SRAM, and the summation logic in front of it, performs
// one access per DIV TDC cycles, at the divided rate.
//
// Interface: phase_o[k] is asserted in the TDC cycle in which the counter
// equals k; after reset the counter starts at 0.
//
// From the reference study: the 1 GHz design divides the clock for the circuits
// after the SRAM multiplexor; the 500 MHz design runs each of its two SRAMs
// at half the TDC rate. This design's choice: the divided clock is also
// given as enables in the TDC clock domain, so that the whole block is
// single-clock, and clk_div_o is provided for macros that need a real clock.
module clk_div #(
  parameter int unsigned DIV = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           clk_div_o,
  output logic [DIV-1:0] phase_o
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else if (cnt_q == CW'(DIV - 1)) begin
      cnt_q <= '0;
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

  always_comb begin
    phase_o = '0;
    phase_o[cnt_q] = 1'b1;
  end

  assign clk_div_o = (cnt_q < CW'((DIV + 1) / 2));

  initial begin
    assert (DIV >= 2) else $error("clk_div: DIV must be at least 2");
  end

endmodule
