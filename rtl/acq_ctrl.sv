// acq_ctrl: acquisition timebase and frame sequencer.
//
// A histogram (frame) is built from num_shots capture cycles. Each capture
// cycle starts at a trigger (the laser shot) and then steps through bins
// 0 .. hist_len-1, one bin per TDC clock cycle, so the TDC resolution is one
// TDC clock period. For every bin it presents {bin_v_o, bin_o, first_o},
// where first_o marks the first capture cycle of a frame (the histogram
// memory overwrites instead of adding). After the last capture cycle the
// block waits until the capture pipeline has drained (pipe_busy_i low), then
// swaps the two histogram banks (cap_sel_o toggles), pulses frame_done_o and
// counts the frame. The bank just filled is then offered for readout while
// the next frame is captured into the other bank.
//
// Triggers are accepted only while enabled and idle; a trigger during a
// capture cycle or the final flush is dropped and reported on
// trig_drop_o. Clearing enable lets the current capture cycle finish and
// then stops; a frame left incomplete continues at the next enable.
// hist_len values of 0 or above BINS are taken as BINS, and a num_shots of
// 0 as 1.
//
// From the reference study: capture over multiple capture cycles into a histogram,
// bin width equal to the TDC clock period, a 2 us histogram in 1024 bins,
// and two banks for simultaneous capture and readout. This design's
// choices: the trigger input, the programmable length and shot count, the
// drain-then-swap rule and the dropped-trigger behaviour.
module acq_ctrl #(
  parameter int unsigned BINS   = 1024,
  parameter int unsigned BIN_W  = $clog2(BINS),
  parameter int unsigned CFG_W  = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable_i,
  input  logic             trig_i,
  input  logic [CFG_W-1:0] hist_len_i,
  input  logic [CFG_W-1:0] num_shots_i,
  input  logic             pipe_busy_i,
  output logic             bin_v_o,
  output logic [BIN_W-1:0] bin_o,
  output logic             first_o,
  output logic             cap_sel_o,
  output logic             busy_o,
  output logic             frame_done_o,
  output logic [CFG_W-1:0] frame_cnt_o,
  output logic             trig_drop_o
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_t;

  state_t           state_q;
  logic [CFG_W-1:0] shot_q;       // capture cycles done in this frame
  logic [CFG_W-1:0] last_bin;     // hist_len - 1, clamped
  logic [CFG_W-1:0] last_shot;    // num_shots - 1, clamped
  logic [1:0]       flush_wait_q; // lets the bin delay line fill busy

  always_comb begin
    if (hist_len_i == '0 || hist_len_i > CFG_W'(BINS)) begin
      last_bin = CFG_W'(BINS - 1);
    end else begin
      last_bin = hist_len_i - 1'b1;
    end
    last_shot = (num_shots_i == '0) ? '0 : num_shots_i - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      shot_q       <= '0;
      bin_v_o      <= 1'b0;
      bin_o        <= '0;
      first_o      <= 1'b0;
      cap_sel_o    <= 1'b0;
      frame_done_o <= 1'b0;
      frame_cnt_o  <= '0;
      trig_drop_o  <= 1'b0;
      flush_wait_q <= '0;
    end else begin
      frame_done_o <= 1'b0;
      trig_drop_o  <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (trig_i && enable_i) begin
            state_q <= S_RUN;
            bin_v_o <= 1'b1;
            bin_o   <= '0;
            first_o <= (shot_q == '0);
          end
        end
        S_RUN: begin
          if (trig_i) trig_drop_o <= 1'b1;
          if (CFG_W'(bin_o) == last_bin) begin
            bin_v_o <= 1'b0;
            if (shot_q >= last_shot) begin
              state_q      <= S_FLUSH;
              flush_wait_q <= 2'd3;
              shot_q       <= '0;
            end else begin
              state_q <= S_IDLE;
              shot_q  <= shot_q + 1'b1;
            end
          end else begin
            bin_o <= bin_o + 1'b1;
          end
        end
        S_FLUSH: begin
          if (trig_i) trig_drop_o <= 1'b1;
          if (flush_wait_q != '0) begin
            flush_wait_q <= flush_wait_q - 1'b1;
          end else if (!pipe_busy_i) begin
            state_q      <= S_IDLE;
            cap_sel_o    <= ~cap_sel_o;
            frame_done_o <= 1'b1;
            frame_cnt_o  <= frame_cnt_o + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state_q != S_IDLE);

endmodule
