// hist_lane_tb: checks one SRAM lane's read-add-write pipeline.
//
// The lane runs with DIV = 4 slots (one slot every 4 cycles) and 8-bit
// words so that saturation is reached quickly. Each frame is several
// passes over all WORDS addresses; a pass feeds one bin every DIV cycles,
// starting at a random offset from the slot phase, and the first pass of a
// frame carries the first flag. A reference array models the expected
// contents (overwrite on the first pass, saturating add afterwards). After
// each frame the test checks that busy_o falls within 2*DIV+1 cycles of the
// last bin, then reads every word through the readout port.
module hist_lane_tb;
  localparam int unsigned WORDS = 16, WIDTH = 8, CNT_W = 7, AW = 4, DIV = 4;
  localparam int unsigned FRAMES = 6, PASSES = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic slot;
  logic in_v = 1'b0, in_first = 1'b0, busy;
  logic [AW-1:0] in_addr = '0, ro_addr = '0;
  logic [CNT_W-1:0] in_cnt = '0;
  logic ro_en = 1'b0;
  logic [WIDTH-1:0] rdata;
  int unsigned ref_mem [WORDS];
  int checks = 0, failures = 0, saturations = 0, overwrites = 0;
  int unsigned phase_cnt = 0;

  hist_lane #(.WORDS(WORDS), .WIDTH(WIDTH), .CNT_W(CNT_W)) dut (
    .clk(clk), .rst_n(rst_n), .slot_i(slot),
    .in_v_i(in_v), .in_addr_i(in_addr), .in_cnt_i(in_cnt), .in_first_i(in_first),
    .busy_o(busy), .ro_en_i(ro_en), .ro_addr_i(ro_addr), .rdata_o(rdata),
    .bist_en_i(1'b0), .bist_re_i(1'b0), .bist_we_i(1'b0), .bist_addr_i('0), .bist_wdata_i('0));

  always #1 clk = ~clk;
  always_ff @(posedge clk) phase_cnt <= (phase_cnt + 1) % DIV;
  assign slot = (phase_cnt == 0);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int wait_cycles;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int p = 0; p < PASSES; p++) begin
        repeat ($urandom_range(DIV + 3)) @(negedge clk);
        for (int a = 0; a < WORDS; a++) begin
          in_v = 1'b1; in_addr = AW'(a); in_first = (p == 0);
          in_cnt = (f == FRAMES - 1) ? CNT_W'(100) : CNT_W'($urandom_range(100));
          if (p == 0) begin
            ref_mem[a] = int'(in_cnt); overwrites++;
          end else if (ref_mem[a] + int'(in_cnt) > 255) begin
            ref_mem[a] = 255; saturations++;
          end else begin
            ref_mem[a] = ref_mem[a] + int'(in_cnt);
          end
          @(negedge clk);
          in_v = 1'b0;
          repeat (DIV - 1) @(negedge clk);
        end
      end
      // drain: the last bin was loaded DIV cycles ago
      wait_cycles = DIV;
      while (busy && wait_cycles < 10 * DIV) begin @(negedge clk); wait_cycles++; end
      checks++;
      if (wait_cycles > 2 * DIV + 1) begin
        failures++;
        $display("frame %0d: drain took %0d cycles", f, wait_cycles);
      end
      // readout, one word per cycle, data one edge after the request
      for (int a = 0; a <= WORDS; a++) begin
        if (a > 0) check(int'(rdata), int'(ref_mem[a-1]), $sformatf("frame %0d word %0d", f, a - 1));
        ro_en = (a < WORDS); ro_addr = AW'(a);
        @(negedge clk);
      end
      ro_en = 1'b0;
    end
    check(int'(saturations > 0), 1, "saturation exercised");
    $display("overwrites=%0d saturations=%0d", overwrites, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (PASSES * (WORDS * DIV + DIV + 4) + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
