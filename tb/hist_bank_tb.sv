// hist_bank_tb: checks a histogram bank in the 1 GHz arrangement (DIV = 4
// interleaved SRAMs) with 64 bins.
//
// Each frame is several capture cycles that present bins 0..LEN-1 on
// consecutive clock cycles, as the acquisition timebase does, with random
// counts; the first capture cycle of a frame carries the first flag. After
// the frame the test checks that busy_o falls within 2*DIV+1 cycles, then
// reads all bins in a random order, one request per cycle, and checks that
// each answer arrives exactly two cycles after its request with the
// reference value.
module hist_bank_tb;
  localparam int unsigned BINS = 64, DIV = 4, WIDTH = 12, CNT_W = 7, BIN_W = 6;
  localparam int unsigned FRAMES = 5, SHOTS = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [DIV-1:0] slot;
  logic in_v = 1'b0, in_first = 1'b0, busy;
  logic [BIN_W-1:0] in_bin = '0, ro_bin = '0;
  logic [CNT_W-1:0] in_cnt = '0;
  logic ro_en = 1'b0, ro_valid;
  logic [WIDTH-1:0] ro_data;
  logic [WIDTH-1:0] bist_rdata [DIV];
  int unsigned ref_hist [BINS];
  int checks = 0, failures = 0;
  logic clkd;

  clk_div #(.DIV(DIV)) u_div (.clk(clk), .rst_n(rst_n), .clk_div_o(clkd), .phase_o(slot));

  hist_bank #(.BINS(BINS), .DIV(DIV), .WIDTH(WIDTH), .CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .slot_i(slot),
    .in_v_i(in_v), .in_bin_i(in_bin), .in_cnt_i(in_cnt), .in_first_i(in_first), .busy_o(busy),
    .ro_en_i(ro_en), .ro_bin_i(ro_bin), .ro_valid_o(ro_valid), .ro_data_o(ro_data),
    .bist_en_i(1'b0), .bist_re_i(1'b0), .bist_we_i(1'b0), .bist_addr_i('0), .bist_wdata_i('0),
    .bist_rdata_o(bist_rdata));

  always #1 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int wait_cycles;
    int unsigned order [BINS];
    int unsigned req_q [$];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int s = 0; s < SHOTS; s++) begin
        repeat ($urandom_range(7)) @(negedge clk);
        for (int b = 0; b < BINS; b++) begin
          in_v = 1'b1; in_bin = BIN_W'(b); in_first = (s == 0);
          in_cnt = CNT_W'($urandom_range(100));
          ref_hist[b] = (s == 0) ? int'(in_cnt) : ref_hist[b] + int'(in_cnt);
          @(negedge clk);
        end
        in_v = 1'b0;
      end
      wait_cycles = 1;
      while (busy && wait_cycles < 10 * DIV) begin @(negedge clk); wait_cycles++; end
      checks++;
      if (wait_cycles > 2 * DIV + 1) begin
        failures++;
        $display("frame %0d: drain took %0d cycles", f, wait_cycles);
      end
      // random read order
      for (int b = 0; b < BINS; b++) order[b] = b;
      for (int b = BINS - 1; b > 0; b--) begin
        automatic int j = $urandom_range(b);
        automatic int unsigned t = order[b];
        order[b] = order[j]; order[j] = t;
      end
      for (int k = 0; k < BINS + 2; k++) begin
        // answer to the request made two cycles ago
        if (k >= 2) begin
          automatic int unsigned b = req_q.pop_front();
          check(int'(ro_valid), 1, "ro_valid two cycles after request");
          check(int'(ro_data), int'(ref_hist[b]), $sformatf("frame %0d bin %0d", f, b));
        end else begin
          check(int'(ro_valid), 0, "ro_valid before any request");
        end
        ro_en = (k < BINS);
        if (k < BINS) begin ro_bin = BIN_W'(order[k]); req_q.push_back(order[k]); end
        @(negedge clk);
      end
      ro_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (SHOTS * (BINS + 8) + BINS + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
