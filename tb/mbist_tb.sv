// mbist_tb: checks the March C- self test on three memories modelled in
// this testbench (registered read, like hist_sram), into which faults can be
// injected: a bit stuck at 1, a bit stuck at 0, and an address decoder
// fault that makes writes to one word also land in its neighbour. Each run
// must take 10*WORDS+1 cycles, flag exactly the faulty memories and pass
// when no fault is injected.
module mbist_tb;
  localparam int unsigned WORDS = 32, WIDTH = 12, NUM_MEM = 3, AW = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic bist_en, re, we, busy, done, fail;
  logic [AW-1:0] addr;
  logic [WIDTH-1:0] wdata;
  logic [WIDTH-1:0] rdata [NUM_MEM];
  logic [NUM_MEM-1:0] fail_mask;
  logic [WIDTH-1:0] mem [NUM_MEM][WORDS];
  int fault_kind [NUM_MEM];   // 0 none, 1 stuck-at-1, 2 stuck-at-0, 3 decoder
  int checks = 0, failures = 0;

  localparam int unsigned FADDR = 9, FBIT = 4;

  mbist #(.WORDS(WORDS), .WIDTH(WIDTH), .NUM_MEM(NUM_MEM)) dut (
    .clk(clk), .rst_n(rst_n), .start_i(start), .bist_en_o(bist_en), .re_o(re), .we_o(we),
    .addr_o(addr), .wdata_o(wdata), .rdata_i(rdata), .busy_o(busy), .done_o(done),
    .fail_o(fail), .fail_mask_o(fail_mask));

  always #1 clk = ~clk;

  // faulty memory models
  always @(posedge clk) begin
    for (int m = 0; m < NUM_MEM; m++) begin
      if (re) begin
        rdata[m] <= mem[m][addr];
        if (fault_kind[m] == 1 && addr == AW'(FADDR)) rdata[m][FBIT] <= 1'b1;
        if (fault_kind[m] == 2 && addr == AW'(FADDR)) rdata[m][FBIT] <= 1'b0;
      end
      if (we) begin
        mem[m][addr] <= wdata;
        if (fault_kind[m] == 3 && addr == AW'(FADDR)) mem[m][FADDR + 1] <= wdata;
      end
    end
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int k0, input int k1, input int k2, input int exp_mask);
    int cycles;
    fault_kind[0] = k0; fault_kind[1] = k1; fault_kind[2] = k2;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (busy && cycles < 20 * WORDS) begin
      check(int'(bist_en), 1, "bist_en while busy");
      if (cycles == 5) begin
        // a start request while busy must not restart the run
        start = 1'b1; @(negedge clk); start = 1'b0; cycles++;
      end else begin
        @(negedge clk); cycles++;
      end
    end
    check(cycles, 10 * WORDS + 1, "run length in cycles");
    check(int'(done), 1, "done");
    check(int'(fail_mask), exp_mask, "fail mask");
    check(int'(fail), int'(exp_mask != 0), "fail");
    check(int'(bist_en), 0, "bist_en released");
  endtask

  initial begin
    for (int m = 0; m < NUM_MEM; m++) fault_kind[m] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(int'(busy), 0, "idle after reset");
    check(int'(done), 0, "not done after reset");
    run(0, 0, 0, int'(3'b000));
    run(0, 0, 1, int'(3'b100));
    run(0, 2, 0, int'(3'b010));
    run(3, 0, 0, int'(3'b001));
    run(1, 3, 2, int'(3'b111));
    run(0, 0, 0, int'(3'b000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * (10 * WORDS + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
