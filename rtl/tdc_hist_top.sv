// tdc_hist_top: SPAD time-to-digital converter with histogram acquisition,
// one block per LiDAR pixel.
//
// Datapath, all on the TDC clock clk (bin width = one clk period):
//   sst_summer  latches the N_SPAD SPAD inputs and counts the pulses that
//               started in each clock cycle (Synchronous Summation).
//   acq_ctrl    after a trigger (laser shot) steps through the histogram
//               bins, one per cycle; its bin number is delayed by the two
//               cycles of the summer so that each count meets its bin.
//   hist_bank   two banks; the capture bank adds every count into its bin
//               with a read-add-write, using DIV interleaved SRAMs that each
//               work at clk/DIV (slots from clk_div). The other bank is
//               read out by the DSP at the same time. The banks swap when a
//               histogram of num_shots capture cycles is complete.
//   spi_regs    SPI control and status registers.
//   mbist       March C- self test of all 2*DIV SRAMs, started over SPI.
//
// Interface: spad_i (asynchronous pulses), trig_i (start of a capture cycle,
// one clk cycle high), SPI pins, and the readout port ro_en_i/ro_bin_i ->
// ro_valid_o/ro_data_o two cycles later, reading the bank named by
// ro_bank_o. frame_done_o pulses when a histogram is ready for readout.
// A SPAD pulse first sampled at the clock edge that ends bin b is counted in
// bin b (the first bin starts at the edge that samples trig_i high plus one
// cycle).
//
// Defaults are the 500 MHz configuration of the reference study: 100 SPADs, 1024
// bins of 12 bits, two SRAMs per bank, a 1000-bin (2 us) capture window.
// Its 1 GHz configuration is BINS = 2048, DIV = 4 with HIST_LEN set to 2000.
// The trigger input, the readout port, the register map and the self-test
// algorithm are this design's choices.
module tdc_hist_top
  import tdc_pkg::*;
#(
  parameter int unsigned N_SPAD = 100,
  parameter int unsigned BINS   = 1024,
  parameter int unsigned DIV    = 2,
  parameter int unsigned WIDTH  = 12,
  parameter int unsigned BIN_W  = $clog2(BINS),
  parameter int unsigned CNT_W  = $clog2(N_SPAD + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_SPAD-1:0] spad_i,
  input  logic              trig_i,
  // SPI
  input  logic              sclk_i,
  input  logic              cs_n_i,
  input  logic              mosi_i,
  output logic              miso_o,
  // readout to the DSP
  input  logic              ro_en_i,
  input  logic [BIN_W-1:0]  ro_bin_i,
  output logic              ro_valid_o,
  output logic [WIDTH-1:0]  ro_data_o,
  output logic              ro_bank_o,
  output logic              frame_done_o,
  output logic              clk_div_o
);

  localparam int unsigned SST_LAT = 2;
  localparam int unsigned WORDS   = BINS / DIV;
  localparam int unsigned AW      = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef struct packed {
    logic             v;
    logic             first;
    logic [BIN_W-1:0] bin;
  } bin_tag_t;

  acq_cfg_t         cfg;
  status_t          status;
  reg_data_t        frame_cnt, drop_cnt;
  logic             bist_start, bist_busy, bist_done, bist_fail;
  logic [CNT_W-1:0] count;
  logic [DIV-1:0]   slot;
  bin_tag_t         tag, tag_d [SST_LAT];
  logic             cap_sel, acq_busy, trig_drop;
  logic [1:0]       bank_busy, bank_ro_valid;
  logic [WIDTH-1:0] bank_ro_data [2];
  logic             pipe_busy;

  logic             bist_en, bist_re, bist_we;
  logic [AW-1:0]    bist_addr;
  logic [WIDTH-1:0] bist_wdata;
  logic [WIDTH-1:0] bist_rdata [2*DIV];
  logic [WIDTH-1:0] bank_bist_rdata [2][DIV];
  logic [2*DIV-1:0] bist_fail_mask;

  spi_regs u_spi (
    .clk          (clk),
    .rst_n        (rst_n),
    .sclk_i       (sclk_i),
    .cs_n_i       (cs_n_i),
    .mosi_i       (mosi_i),
    .miso_o       (miso_o),
    .cfg_o        (cfg),
    .bist_start_o (bist_start),
    .status_i     (status),
    .frame_cnt_i  (frame_cnt),
    .drop_cnt_i   (drop_cnt)
  );

  sst_summer #(.N_SPAD(N_SPAD), .COUNT_W(CNT_W)) u_sst (
    .clk     (clk),
    .rst_n   (rst_n),
    .spad_i  (spad_i),
    .count_o (count)
  );

  clk_div #(.DIV(DIV)) u_div (
    .clk       (clk),
    .rst_n     (rst_n),
    .clk_div_o (clk_div_o),
    .phase_o   (slot)
  );

  acq_ctrl #(.BINS(BINS), .BIN_W(BIN_W), .CFG_W(SPI_DATA_BITS)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable_i     (cfg.enable && !bist_busy),
    .trig_i       (trig_i),
    .hist_len_i   (cfg.hist_len),
    .num_shots_i  (cfg.num_shots),
    .pipe_busy_i  (pipe_busy),
    .bin_v_o      (tag.v),
    .bin_o        (tag.bin),
    .first_o      (tag.first),
    .cap_sel_o    (cap_sel),
    .busy_o       (acq_busy),
    .frame_done_o (frame_done_o),
    .frame_cnt_o  (frame_cnt),
    .trig_drop_o  (trig_drop)
  );

  // saturating count of triggers dropped while busy
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_cnt <= '0;
    end else if (trig_drop && drop_cnt != '1) begin
      drop_cnt <= drop_cnt + 1'b1;
    end
  end

  // align the bin tag with the summer output
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < SST_LAT; i++) tag_d[i] <= '0;
    end else begin
      tag_d[0] <= tag;
      for (int unsigned i = 1; i < SST_LAT; i++) tag_d[i] <= tag_d[i-1];
    end
  end

  always_comb begin
    pipe_busy = |bank_busy;
    for (int unsigned i = 0; i < SST_LAT; i++) pipe_busy |= tag_d[i].v;
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    hist_bank #(
      .BINS(BINS), .DIV(DIV), .WIDTH(WIDTH), .CNT_W(CNT_W), .BIN_W(BIN_W),
      .WORDS(WORDS), .AW(AW)
    ) u_bank (
      .clk          (clk),
      .rst_n        (rst_n),
      .slot_i       (slot),
      .in_v_i       (tag_d[SST_LAT-1].v && (cap_sel == 1'(b))),
      .in_bin_i     (tag_d[SST_LAT-1].bin),
      .in_cnt_i     (count),
      .in_first_i   (tag_d[SST_LAT-1].first),
      .busy_o       (bank_busy[b]),
      .ro_en_i      (ro_en_i && (cap_sel != 1'(b))),
      .ro_bin_i     (ro_bin_i),
      .ro_valid_o   (bank_ro_valid[b]),
      .ro_data_o    (bank_ro_data[b]),
      .bist_en_i    (bist_en),
      .bist_re_i    (bist_re),
      .bist_we_i    (bist_we),
      .bist_addr_i  (bist_addr),
      .bist_wdata_i (bist_wdata),
      .bist_rdata_o (bank_bist_rdata[b])
    );
    for (genvar k = 0; k < DIV; k++) begin : g_rd
      assign bist_rdata[b*DIV + k] = bank_bist_rdata[b][k];
    end
  end

  assign ro_valid_o = |bank_ro_valid;
  assign ro_data_o  = bank_ro_valid[1] ? bank_ro_data[1] : bank_ro_data[0];
  assign ro_bank_o  = ~cap_sel;

  mbist #(.WORDS(WORDS), .WIDTH(WIDTH), .NUM_MEM(2*DIV), .AW(AW)) u_bist (
    .clk         (clk),
    .rst_n       (rst_n),
    .start_i     (bist_start && !acq_busy),
    .bist_en_o   (bist_en),
    .re_o        (bist_re),
    .we_o        (bist_we),
    .addr_o      (bist_addr),
    .wdata_o     (bist_wdata),
    .rdata_i     (bist_rdata),
    .busy_o      (bist_busy),
    .done_o      (bist_done),
    .fail_o      (bist_fail),
    .fail_mask_o (bist_fail_mask)
  );

  initial begin
    assert (2 * DIV <= 8) else $error("tdc_hist_top: STATUS reports at most 8 SRAMs (DIV <= 4)");
  end

  always_comb begin
    status           = '0;
    status.bist_fail_mask = 8'(bist_fail_mask);
    status.cap_bank  = cap_sel;
    status.ro_bank   = ~cap_sel;
    status.acq_busy  = acq_busy;
    status.bist_busy = bist_busy;
    status.bist_done = bist_done;
    status.bist_fail = bist_fail;
  end

endmodule
