// tdc_hist_1ghz_tb: end-to-end test of the TDC histogram block in its 1 GHz
// configuration (100 SPADs, 2048 bins of 12 bits, four SRAMs per bank, a
// 2000-bin capture window = 2 us at 1 GHz); otherwise as tdc_hist_top_tb.
//
// Sequence: SPI reads of the ID and reset values; an MBIST run started over
// SPI and polled through STATUS; four histograms of three capture cycles of
// 1000 bins (the 2 us window) with random SPAD activity and bursts in which
// all SPADs fire; each histogram is read out through the readout port while
// the next one is being captured into the other bank; a trigger given in the
// middle of a capture cycle; and a short histogram of 42 capture cycles
// whose first bins receive 100 photons per capture cycle, which saturates
// them at 4095. A reference histogram is built from the SPAD vectors the test
// drives (a pulse counts in the bin in whose cycle it rises). Each mechanism
// is counted and a failure is counted for one that never happened. The
// readout latency (two cycles) and the capture rate (one bin per clock,
// frame_done at most a few cycles after the last bin) are checked too.
module tdc_hist_1ghz_tb;
  import tdc_pkg::*;
  localparam int N_SPAD = 100, BINS = 2048, WIDTH = 12, BIN_W = 11, DIV = 4;
  localparam int HALF = 4;           // TDC cycles per half SCLK period
  localparam int LEN = 2000, SHOTS = 3, FRAMES = 4;
  localparam int SAT_LEN = 64, SAT_SHOTS = 42, SAT_BINS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_SPAD-1:0] spad = '0;
  logic trig = 1'b0;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  logic ro_en = 1'b0, ro_valid, ro_bank, frame_done, clk_div;
  logic [BIN_W-1:0] ro_bin = '0;
  logic [WIDTH-1:0] ro_data;

  int unsigned ref_hist [FRAMES + 1][BINS];
  int checks = 0, failures = 0;
  int frames_done = 0;
  bit capturing = 1'b0;
  // mechanism counters
  int n_multi = 0, n_burst = 0, n_swap = 0, n_concurrent = 0, n_overwrite = 0;
  int n_sat = 0, n_drop = 0, n_bist = 0, n_spi = 0;

  tdc_hist_top #(.N_SPAD(N_SPAD), .BINS(BINS), .DIV(DIV), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .spad_i(spad), .trig_i(trig),
    .sclk_i(sclk), .cs_n_i(cs_n), .mosi_i(mosi), .miso_o(miso),
    .ro_en_i(ro_en), .ro_bin_i(ro_bin), .ro_valid_o(ro_valid), .ro_data_o(ro_data),
    .ro_bank_o(ro_bank), .frame_done_o(frame_done), .clk_div_o(clk_div));

  always #1 clk = ~clk;
  always @(posedge clk) if (frame_done) frames_done++;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic spi_xfer(input bit rw, input reg_addr_t addr, input reg_data_t wdata,
                          output reg_data_t rdata);
    logic [SPI_FRAME_BITS-1:0] f;
    f = {rw, addr, wdata};
    rdata = '0;
    cs_n = 1'b0;
    repeat (HALF) @(negedge clk);
    for (int i = SPI_FRAME_BITS - 1; i >= 0; i--) begin
      mosi = f[i];
      repeat (HALF) @(negedge clk);
      sclk = 1'b1;
      if (i < SPI_DATA_BITS) rdata[i] = miso;
      repeat (HALF) @(negedge clk);
      sclk = 1'b0;
    end
    repeat (HALF) @(negedge clk);
    cs_n = 1'b1;
    repeat (2 * HALF) @(negedge clk);
    n_spi++;
  endtask

  task automatic wr(input reg_addr_t a, input reg_data_t d);
    reg_data_t dummy;
    spi_xfer(1'b1, a, d, dummy);
  endtask

  task automatic rd(input reg_addr_t a, output reg_data_t d);
    spi_xfer(1'b0, a, '0, d);
  endtask

  function automatic logic [N_SPAD-1:0] rand_vec(input int unsigned pct);
    logic [N_SPAD-1:0] v;
    for (int i = 0; i < N_SPAD; i++) v[i] = ($urandom_range(99) < pct);
    return v;
  endfunction

  // One capture cycle: trigger, then one SPAD vector per bin. mode 0:
  // random activity with bursts; mode 1: all SPADs on even bins below
  // SAT_BINS. stray_at >= 0 raises the trigger again in that bin.
  task automatic capture_shot(input int fr, input int len, input int mode, input int stray_at);
    logic [N_SPAD-1:0] prev, v;
    int rises;
    prev = '0;
    trig = 1'b1;
    @(negedge clk);
    trig = 1'b0;
    for (int b = 0; b < len; b++) begin
      if (mode == 0) begin
        if (b % 97 == 13) v = '1;
        else if (b % 97 == 14) v = '0;
        else v = rand_vec(4 + (b % 5) * 3);
      end else begin
        v = (b < SAT_BINS && b % 2 == 0) ? '1 : '0;
      end
      spad = v;
      trig = (b == stray_at);
      rises = $countones(v & ~prev);
      ref_hist[fr][b] += rises;
      if (rises > 1) n_multi++;
      if (rises == N_SPAD) n_burst++;
      prev = v;
      @(negedge clk);
      trig = 1'b0;
    end
    spad = '0;
  endtask

  // A whole histogram: shots capture cycles, then wait for frame_done and
  // check that it came within the drain time after the last bin.
  task automatic capture_frame(input int fr, input int len, input int shots, input int mode,
                               input bit stray);
    int start_done, wait_cycles;
    start_done = frames_done;
    for (int b = 0; b < BINS; b++) ref_hist[fr][b] = 0;
    capturing = 1'b1;
    for (int s = 0; s < shots; s++) begin
      repeat (3) @(negedge clk);
      capture_shot(fr, len, mode, (stray && s == 1) ? len / 2 : -1);
    end
    wait_cycles = 0;
    while (frames_done == start_done && wait_cycles < 100) begin
      @(negedge clk);
      wait_cycles++;
    end
    capturing = 1'b0;
    checks++;
    // bins leave the summer 2 cycles late; the lanes drain in 2*DIV cycles
    if (wait_cycles > 2 + 2 * DIV + 6) begin
      failures++;
      $display("frame %0d: frame_done %0d cycles after the last bin", fr, wait_cycles);
    end
    n_swap++;
  endtask

  // Read bins 0..len-1 of the readout bank, one request per cycle, and
  // compare with the reference, two cycles after each request.
  task automatic readout_frame(input int fr, input int len);
    for (int k = 0; k < len + 2; k++) begin
      if (k >= 2) begin
        int unsigned e;
        e = ref_hist[fr][k-2] > 4095 ? 4095 : ref_hist[fr][k-2];
        check(int'(ro_valid), 1, "ro_valid two cycles after the request");
        check(int'(ro_data), int'(e), $sformatf("frame %0d bin %0d", fr, k - 2));
      end else begin
        check(int'(ro_valid), 0, "no ro_valid before a request");
      end
      ro_en = (k < len);
      ro_bin = BIN_W'(k);
      if (capturing && k < len) n_concurrent++;
      @(negedge clk);
    end
    ro_en = 1'b0;
  endtask

  initial begin
    reg_data_t d;
    int polls;
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    rd(REG_ID, d);            check(int'(d), int'(ID_VALUE), "ID");
    wr(REG_HIST_LEN, 16'(LEN));
    rd(REG_HIST_LEN, d);      check(int'(d), LEN, "histogram length 2000 bins");

    // memory self test
    wr(REG_CTRL, 16'h0002);
    polls = 0;
    do begin
      repeat (200) @(negedge clk);
      rd(REG_STATUS, d);
      polls++;
    end while (!d[4] && polls < 100);
    check(int'(d[4]), 1, "MBIST done");
    check(int'(d[5]), 0, "MBIST pass");
    check(int'(d[15:8]), 0, "MBIST fail mask");
    if (d[4]) n_bist++;

    // histograms with readout of the previous one during capture
    wr(REG_NUM_SHOTS, 16'(SHOTS));
    wr(REG_CTRL, 16'h0001);
    for (int fr = 0; fr < FRAMES; fr++) begin
      check(int'(ro_bank), fr % 2 == 0 ? 1 : 0, "readout bank before the frame");
      fork
        capture_frame(fr, LEN, SHOTS, 0, fr == 1);
        if (fr > 0) begin
          repeat (10) @(negedge clk);
          readout_frame(fr - 1, LEN);
          if (fr - 1 >= 2) n_overwrite++;
        end
      join
      check(int'(ro_bank), fr % 2 == 0 ? 0 : 1, "readout bank after the frame");
    end
    readout_frame(FRAMES - 1, LEN);

    // saturation
    wr(REG_HIST_LEN, 16'(SAT_LEN));
    wr(REG_NUM_SHOTS, 16'(SAT_SHOTS));
    capture_frame(FRAMES, SAT_LEN, SAT_SHOTS, 1, 1'b0);
    readout_frame(FRAMES, SAT_LEN);
    for (int b = 0; b < SAT_LEN; b++) if (ref_hist[FRAMES][b] > 4095) n_sat++;

    rd(REG_FRAME_CNT, d);     check(int'(d), FRAMES + 1, "FRAME_CNT");
    rd(REG_DROP_CNT, d);      check(int'(d), 1, "DROP_CNT");
    n_drop = int'(d);
    rd(REG_STATUS, d);        check(int'(d[2]), 0, "acquisition idle");
    check(frames_done, FRAMES + 1, "frame_done pulses");

    $display("mechanisms: multi=%0d burst=%0d swap=%0d concurrent_readout=%0d overwrite=%0d",
             n_multi, n_burst, n_swap, n_concurrent, n_overwrite);
    $display("            saturated_bins=%0d dropped_triggers=%0d mbist=%0d spi=%0d",
             n_sat, n_drop, n_bist, n_spi);
    checks++; if (n_multi == 0)      begin failures++; $display("no multi-photon bin"); end
    checks++; if (n_burst == 0)      begin failures++; $display("no full burst"); end
    checks++; if (n_swap == 0)       begin failures++; $display("no bank swap"); end
    checks++; if (n_concurrent == 0) begin failures++; $display("no concurrent readout"); end
    checks++; if (n_overwrite == 0)  begin failures++; $display("no overwrite of an old histogram"); end
    checks++; if (n_sat == 0)        begin failures++; $display("no saturation"); end
    checks++; if (n_drop == 0)       begin failures++; $display("no dropped trigger"); end
    checks++; if (n_bist == 0)       begin failures++; $display("no MBIST run"); end
    checks++; if (n_spi == 0)        begin failures++; $display("no SPI access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
