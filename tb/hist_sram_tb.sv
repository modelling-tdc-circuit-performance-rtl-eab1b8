// hist_sram_tb: checks the SRAM model against a reference array: random
// writes and reads, read data one edge after the read and held while no
// read is enabled, and a read of the word written at the same edge
// returning the old contents.
module hist_sram_tb;
  localparam int unsigned WORDS = 64, WIDTH = 12, AW = 6;
  localparam int unsigned CYCLES = 4000;

  logic clk = 1'b0;
  logic re = 1'b0, we = 1'b0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] ref_mem [WORDS];
  logic [WIDTH-1:0] exp_q;
  logic             exp_v = 1'b0;
  int checks = 0, failures = 0, rdw = 0;

  hist_sram #(.WORDS(WORDS), .WIDTH(WIDTH)) dut (
    .clk(clk), .re(re), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  always #1 clk = ~clk;

  initial begin
    // fill every word first so that every read has a known value
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = WIDTH'($urandom); ref_mem[a] = wdata;
    end
    for (int n = 0; n < CYCLES; n++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata != exp_q) begin
          failures++;
          if (failures < 10) $display("cycle %0d: rdata %h expected %h", n, rdata, exp_q);
        end
      end
      re = ($urandom_range(3) != 0);
      we = ($urandom_range(1) != 0);
      raddr = AW'($urandom);
      waddr = (n % 16 == 0) ? raddr : AW'($urandom);
      wdata = WIDTH'($urandom);
      if (re && we && raddr == waddr) rdw++;
      if (re) begin exp_q = ref_mem[raddr]; exp_v = 1'b1; end
      if (we) ref_mem[waddr] = wdata;
    end
    checks++;
    if (rdw == 0) begin failures++; $display("no read-during-write exercised"); end
    $display("read_during_write=%0d", rdw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + WORDS + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
