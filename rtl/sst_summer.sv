// sst_summer: Synchronous Summation Technique front end.
//
// Every SPAD input is first latched on the TDC clock (stage 1). A pulse is
// counted in the clock cycle in which its latched level goes from 0 to 1, so
// a pulse that stays high across several clock edges is counted once. The
// number of inputs that started a pulse in that cycle is summed in stage 2
// and registered, giving one photon count per TDC clock cycle.
//
// Interface: spad_i are the asynchronous SPAD pulses (one per SPAD, already
// shaped by the analog front end), count_o is the number of new pulses.
// Timing: a pulse sampled high at clock edge E for the first time appears in
// count_o after edge E+1, i.e. the block has a latency of LATENCY = 2 edges
// from the sampling window to the registered sum.
//
// From the reference study: latch on the TDC clock, then sum the pulses of each
// cycle. This design's choices: the rising-edge rule, the flip-flop sampler
// (no metastability filter, since any resolution delay only affects the
// bin of a pulse that arrives at the sampling edge) and the two-stage split.
module sst_summer #(
  parameter int unsigned N_SPAD  = 100,
  parameter int unsigned COUNT_W = $clog2(N_SPAD + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_SPAD-1:0]  spad_i,
  output logic [COUNT_W-1:0] count_o
);

  logic [N_SPAD-1:0] latched_q;  // stage 1: sampled SPAD levels
  logic [N_SPAD-1:0] prev_q;     // levels sampled one edge earlier
  logic [N_SPAD-1:0] new_pulse;
  logic [COUNT_W-1:0] sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched_q <= '0;
      prev_q    <= '0;
      count_o   <= '0;
    end else begin
      latched_q <= spad_i;
      prev_q    <= latched_q;
      count_o   <= sum;
    end
  end

  assign new_pulse = latched_q & ~prev_q;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < N_SPAD; i++) begin
      sum = sum + COUNT_W'(new_pulse[i]);
    end
  end

endmodule
