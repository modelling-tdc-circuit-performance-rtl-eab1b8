// acq_ctrl_tb: checks the acquisition timebase and frame sequencer.
//
// For each capture cycle the test raises the trigger for one cycle and then
// expects bins 0..LEN-1 on consecutive cycles (one bin per TDC cycle), with
// first_o only in the first capture cycle of a frame. A trigger given in
// the middle of a capture cycle must be dropped and reported. After the last
// capture cycle the test holds pipe_busy_i high for a while and expects the
// bank swap, frame_done_o and the frame count only after it falls. Also
// covered: triggers ignored while disabled, a histogram paused by clearing
// enable and resumed, and the clamping of a zero length and a zero shot
// count.
module acq_ctrl_tb;
  localparam int unsigned BINS = 64, BIN_W = 6, CFG_W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, trig = 1'b0, pipe_busy = 1'b0;
  logic [CFG_W-1:0] hist_len = 16'd20, num_shots = 16'd3;
  logic bin_v, first, cap_sel, busy, frame_done, trig_drop;
  logic [BIN_W-1:0] bin;
  logic [CFG_W-1:0] frame_cnt;
  int checks = 0, failures = 0, drops = 0, swaps = 0;

  acq_ctrl #(.BINS(BINS), .CFG_W(CFG_W)) dut (
    .clk(clk), .rst_n(rst_n), .enable_i(enable), .trig_i(trig),
    .hist_len_i(hist_len), .num_shots_i(num_shots), .pipe_busy_i(pipe_busy),
    .bin_v_o(bin_v), .bin_o(bin), .first_o(first), .cap_sel_o(cap_sel), .busy_o(busy),
    .frame_done_o(frame_done), .frame_cnt_o(frame_cnt), .trig_drop_o(trig_drop));

  always #1 clk = ~clk;
  always @(posedge clk) if (trig_drop) drops++;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one capture cycle of len bins; optionally a stray trigger in the middle
  task automatic shot(input int len, input bit first_exp, input bit stray);
    trig = 1'b1;
    @(negedge clk);
    trig = 1'b0;
    for (int i = 0; i < len; i++) begin
      check(int'(bin_v), 1, $sformatf("bin_v in bin %0d", i));
      check(int'(bin), i % BINS, "bin number");
      check(int'(first), int'(first_exp), "first flag");
      trig = stray && (i == len / 2);
      @(negedge clk);
      trig = 1'b0;
    end
    check(int'(bin_v), 0, "bin_v after the last bin");
  endtask

  // frame of shots shots of len bins, then the drain and swap
  task automatic frame(input int len, input int shots, input bit resumed = 1'b0);
    logic sel_before;
    int unsigned cnt_before;
    sel_before = cap_sel;
    cnt_before = int'(frame_cnt);
    for (int s = 0; s < shots; s++) begin
      repeat (2) @(negedge clk);
      shot(len, s == 0 && !resumed, s == 1);
    end
    pipe_busy = 1'b1;
    repeat (6) begin
      check(int'(frame_done), 0, "no frame_done while the pipeline is busy");
      check(int'(cap_sel), int'(sel_before), "no swap while busy");
      @(negedge clk);
    end
    pipe_busy = 1'b0;
    @(negedge clk);
    check(int'(frame_done), 1, "frame_done one cycle after the drain");
    check(int'(cap_sel), int'(!sel_before), "bank swap");
    check(int'(frame_cnt), int'(cnt_before + 1), "frame count");
    swaps++;
    @(negedge clk);
    check(int'(frame_done), 0, "frame_done is a pulse");
    check(int'(busy), 0, "idle after the frame");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // disabled: trigger ignored
    trig = 1'b1; @(negedge clk); trig = 1'b0;
    check(int'(bin_v), 0, "trigger ignored while disabled");
    enable = 1'b1;
    frame(20, 3);
    frame(20, 3);
    num_shots = 16'd2; hist_len = 16'd7;
    frame(7, 2);
    // disable after the first capture cycle: triggers are ignored and the
    // histogram resumes, without the first flag, once enabled again
    hist_len = 16'd9; num_shots = 16'd2;
    repeat (2) @(negedge clk);
    shot(9, 1'b1, 1'b0);
    enable = 1'b0;
    repeat (2) @(negedge clk);
    trig = 1'b1; @(negedge clk); trig = 1'b0;
    check(int'(bin_v), 0, "trigger ignored while paused");
    check(int'(busy), 0, "idle while paused");
    enable = 1'b1;
    frame(9, 1, 1'b1);  // the remaining capture cycle of the paused histogram
    // zero length means all bins, zero shots means one
    hist_len = 16'd0; num_shots = 16'd0;
    frame(BINS, 1);
    check(drops, 3, "dropped triggers (one per frame of two or more shots)");
    check(swaps, 5, "frames");
    $display("drops=%0d swaps=%0d", drops, swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
