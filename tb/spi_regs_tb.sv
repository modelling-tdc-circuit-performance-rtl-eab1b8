// spi_regs_tb: checks the SPI slave and register file with a mode-0 SPI
// master (SCLK = TDC clock / 8): reset values, write and read-back of the
// writable registers, the register outputs, the read-only status, frame and
// dropped-trigger counters, the ID, unmapped addresses, and the one-cycle
// bist_start pulse.
module spi_regs_tb;
  import tdc_pkg::*;
  localparam int HALF = 4;  // TDC cycles per half SCLK period

  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk = 1'b0, cs_n = 1'b1, mosi = 1'b0, miso;
  acq_cfg_t  cfg;
  logic      bist_start;
  status_t   status = '0;
  reg_data_t frame_cnt = '0, drop_cnt = '0;
  int checks = 0, failures = 0, bist_pulses = 0, bist_pulse_len = 0, max_pulse = 0;

  spi_regs dut (.clk(clk), .rst_n(rst_n), .sclk_i(sclk), .cs_n_i(cs_n), .mosi_i(mosi),
                .miso_o(miso), .cfg_o(cfg), .bist_start_o(bist_start), .status_i(status),
                .frame_cnt_i(frame_cnt), .drop_cnt_i(drop_cnt));

  always #1 clk = ~clk;

  always @(posedge clk) begin
    if (bist_start) bist_pulse_len++;
    else if (bist_pulse_len != 0) begin
      bist_pulses++;
      if (bist_pulse_len > max_pulse) max_pulse = bist_pulse_len;
      bist_pulse_len = 0;
    end
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0h expected %0h", what, got, exp);
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
  endtask

  task automatic wr(input reg_addr_t a, input reg_data_t d);
    reg_data_t dummy;
    spi_xfer(1'b1, a, d, dummy);
  endtask

  task automatic rd_check(input reg_addr_t a, input reg_data_t exp, input string what);
    reg_data_t d;
    spi_xfer(1'b0, a, '0, d);
    check(int'(d), int'(exp), what);
  endtask

  initial begin
    reg_data_t v;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    rd_check(REG_ID, ID_VALUE, "ID");
    rd_check(REG_HIST_LEN, HIST_LEN_RESET, "HIST_LEN reset");
    rd_check(REG_NUM_SHOTS, NUM_SHOTS_RESET, "NUM_SHOTS reset");
    rd_check(REG_CTRL, 16'h0000, "CTRL reset");
    for (int n = 0; n < 6; n++) begin
      v = reg_data_t'($urandom);
      wr(REG_HIST_LEN, v);
      check(int'(cfg.hist_len), int'(v), "hist_len output");
      rd_check(REG_HIST_LEN, v, "HIST_LEN read back");
      v = reg_data_t'($urandom);
      wr(REG_NUM_SHOTS, v);
      check(int'(cfg.num_shots), int'(v), "num_shots output");
      rd_check(REG_NUM_SHOTS, v, "NUM_SHOTS read back");
      status = status_t'($urandom);
      frame_cnt = reg_data_t'($urandom);
      drop_cnt = reg_data_t'($urandom);
      rd_check(REG_STATUS, reg_data_t'(status), "STATUS");
      rd_check(REG_FRAME_CNT, frame_cnt, "FRAME_CNT");
      rd_check(REG_DROP_CNT, drop_cnt, "DROP_CNT");
    end
    wr(REG_CTRL, 16'h0001);
    check(int'(cfg.enable), 1, "enable set");
    rd_check(REG_CTRL, 16'h0001, "CTRL read back");
    check(bist_pulses, 0, "no bist_start yet");
    wr(REG_CTRL, 16'h0003);
    check(bist_pulses, 1, "bist_start after CTRL bit 1");
    check(max_pulse, 1, "bist_start is one cycle");
    rd_check(REG_CTRL, 16'h0001, "bist_start reads 0");
    wr(REG_CTRL, 16'h0000);
    check(int'(cfg.enable), 0, "enable cleared");
    wr(REG_ID, 16'h1234);
    rd_check(REG_ID, ID_VALUE, "ID is read only");
    rd_check(7'h55, 16'h0000, "unmapped address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
