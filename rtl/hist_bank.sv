// hist_bank: one histogram memory bank of BINS words of WIDTH bits, built
// from DIV interleaved SRAM lanes.
//
// The SRAM multiplexor sends bin b to lane b % DIV, word b / DIV. Since the
// acquisition timebase advances one bin per TDC cycle, each lane sees a new
// bin at most once every DIV cycles and does its read-add-write at the
// divided rate (see hist_lane). The lane slots come from clk_div.
//
// Capture port: in_v_i/in_bin_i/in_cnt_i/in_first_i, one bin per TDC cycle
// at most. busy_o is high while any lane still has a bin to read or write;
// it falls at most 2*DIV cycles after the last bin.
// Readout port: ro_en_i with ro_bin_i requests a bin; ro_valid_o and
// ro_data_o follow two edges later (SRAM read, then output register). Reads
// may be issued every cycle while the bank is not capturing.
// MBIST port: common commands to all lanes, per-lane read data.
//
// From the reference study: two SRAMs per bank at 500 MHz, four at 1 GHz, 1024 and
// 2048 bins of 12 bits. This design's choices: modulo interleaving, the
// readout latency and sharing of the SRAM read port with readout.
module hist_bank #(
  parameter int unsigned BINS  = 1024,
  parameter int unsigned DIV   = 2,
  parameter int unsigned WIDTH = 12,
  parameter int unsigned CNT_W = 7,
  parameter int unsigned BIN_W = $clog2(BINS),
  parameter int unsigned WORDS = BINS / DIV,
  parameter int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV-1:0]   slot_i,
  // capture
  input  logic             in_v_i,
  input  logic [BIN_W-1:0] in_bin_i,
  input  logic [CNT_W-1:0] in_cnt_i,
  input  logic             in_first_i,
  output logic             busy_o,
  // readout
  input  logic             ro_en_i,
  input  logic [BIN_W-1:0] ro_bin_i,
  output logic             ro_valid_o,
  output logic [WIDTH-1:0] ro_data_o,
  // MBIST
  input  logic             bist_en_i,
  input  logic             bist_re_i,
  input  logic             bist_we_i,
  input  logic [AW-1:0]    bist_addr_i,
  input  logic [WIDTH-1:0] bist_wdata_i,
  output logic [WIDTH-1:0] bist_rdata_o [DIV]
);

  localparam int unsigned LW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [LW-1:0]    in_lane, ro_lane, ro_lane_q;
  logic [AW-1:0]    in_addr, ro_addr;
  logic [DIV-1:0]   lane_busy;
  logic [WIDTH-1:0] lane_rdata [DIV];
  logic             ro_pend_q;

  assign in_lane = LW'(in_bin_i % BIN_W'(DIV));
  assign in_addr = AW'(in_bin_i / BIN_W'(DIV));
  assign ro_lane = LW'(ro_bin_i % BIN_W'(DIV));
  assign ro_addr = AW'(ro_bin_i / BIN_W'(DIV));

  for (genvar k = 0; k < DIV; k++) begin : g_lane
    hist_lane #(.WORDS(WORDS), .WIDTH(WIDTH), .CNT_W(CNT_W), .AW(AW)) u_lane (
      .clk          (clk),
      .rst_n        (rst_n),
      .slot_i       (slot_i[k]),
      .in_v_i       (in_v_i && (in_lane == LW'(k))),
      .in_addr_i    (in_addr),
      .in_cnt_i     (in_cnt_i),
      .in_first_i   (in_first_i),
      .busy_o       (lane_busy[k]),
      .ro_en_i      (ro_en_i && (ro_lane == LW'(k))),
      .ro_addr_i    (ro_addr),
      .rdata_o      (lane_rdata[k]),
      .bist_en_i    (bist_en_i),
      .bist_re_i    (bist_re_i),
      .bist_we_i    (bist_we_i),
      .bist_addr_i  (bist_addr_i),
      .bist_wdata_i (bist_wdata_i)
    );
    assign bist_rdata_o[k] = lane_rdata[k];
  end

  assign busy_o = |lane_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_pend_q  <= 1'b0;
      ro_lane_q  <= '0;
      ro_valid_o <= 1'b0;
      ro_data_o  <= '0;
    end else begin
      ro_pend_q  <= ro_en_i;
      ro_lane_q  <= ro_lane;
      ro_valid_o <= ro_pend_q;
      if (ro_pend_q) begin
        ro_data_o <= lane_rdata[ro_lane_q];
      end
    end
  end

  initial begin
    assert (BINS % DIV == 0) else $error("hist_bank: BINS must be a multiple of DIV");
  end

endmodule
