// clk_div_tb: checks the divider for DIV = 2 (500 MHz design) and DIV = 4
// (1 GHz design): after reset, phase_o is one-hot with bit (n mod DIV) set
// in TDC cycle n, and clk_div_o is high in the first half of each period.
module clk_div_tb;
  localparam int unsigned CYCLES = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       cd2, cd4;
  logic [1:0] ph2;
  logic [3:0] ph4;
  int checks = 0, failures = 0;

  clk_div #(.DIV(2)) dut2 (.clk(clk), .rst_n(rst_n), .clk_div_o(cd2), .phase_o(ph2));
  clk_div #(.DIV(4)) dut4 (.clk(clk), .rst_n(rst_n), .clk_div_o(cd4), .phase_o(ph4));

  always #1 clk = ~clk;

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < CYCLES; n++) begin
      expect_eq(int'(ph2), 1 << (n % 2), "phase DIV=2");
      expect_eq(int'(ph4), 1 << (n % 4), "phase DIV=4");
      expect_eq(int'(cd2), int'((n % 2) < 1), "clk_div DIV=2");
      expect_eq(int'(cd4), int'((n % 4) < 2), "clk_div DIV=4");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
