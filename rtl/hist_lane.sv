// hist_lane: one interleaved SRAM of a histogram bank with its
// read-add-write pipeline.
//
// Histogram acquisition needs, for every TDC clock cycle, a read of the bin
// word, an addition of the photon count and a write back. The SRAM cannot do
// that at the TDC rate, so a bank holds DIV lanes and consecutive bins go to
// consecutive lanes. A lane therefore receives a new bin at most once every
// DIV cycles and does its SRAM work only in its own slot (slot_i, one TDC
// cycle in every DIV):
//
//   hold      : in_v_i loads {addr, count, first} into a holding register
//   read slot : the held bin is read from the SRAM and moves to stage P
//   next slot : the word read is added to the count (saturating at
//               2**WIDTH-1) and written back while the next bin is read
//
// The addition has a full slot period (DIV TDC cycles) to settle. On the
// first capture cycle of a histogram (first flag) the old word is ignored and
// the count is written, which clears the histogram without a separate pass.
// A pending write completes at the next slot even without new input, so the
// lane drains within 2*DIV cycles of its last input (busy_o low after that).
//
// When the lane has no capture work in a slot, the read port serves the
// readout port (ro_en_i/ro_addr_i, data in rdata_o one edge later). The MBIST
// port (bist_en_i) takes over both SRAM ports. Priority: MBIST, capture,
// readout.
//
// From the reference study: a read, summation and write per memory location and
// pipelining of several SRAMs to meet the TDC rate. This design's choices:
// the holding register and slot schedule, saturation, the first-capture
// overwrite and the shared read port.
module hist_lane #(
  parameter int unsigned WORDS   = 512,
  parameter int unsigned WIDTH   = 12,
  parameter int unsigned CNT_W   = 7,
  parameter int unsigned AW      = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot_i,
  // capture input, one bin
  input  logic             in_v_i,
  input  logic [AW-1:0]    in_addr_i,
  input  logic [CNT_W-1:0] in_cnt_i,
  input  logic             in_first_i,
  output logic             busy_o,
  // readout / MBIST read data
  input  logic             ro_en_i,
  input  logic [AW-1:0]    ro_addr_i,
  output logic [WIDTH-1:0] rdata_o,
  // MBIST access
  input  logic             bist_en_i,
  input  logic             bist_re_i,
  input  logic             bist_we_i,
  input  logic [AW-1:0]    bist_addr_i,
  input  logic [WIDTH-1:0] bist_wdata_i
);

  localparam logic [WIDTH-1:0] MAX = '1;

  // holding register (written at TDC rate, read once per slot)
  logic             h_pend_q, h_first_q;
  logic [AW-1:0]    h_addr_q;
  logic [CNT_W-1:0] h_cnt_q;
  // stage P: bin whose word is being read, written at the next slot
  logic             p_v_q, p_first_q;
  logic [AW-1:0]    p_addr_q;
  logic [CNT_W-1:0] p_cnt_q;

  logic             cap_rd, cap_wr;
  logic [WIDTH:0]   sum;
  logic [WIDTH-1:0] new_word;

  logic             sram_re, sram_we;
  logic [AW-1:0]    sram_raddr, sram_waddr;
  logic [WIDTH-1:0] sram_wdata;

  assign cap_rd = slot_i && h_pend_q;
  assign cap_wr = slot_i && p_v_q;

  // saturating read-add; the first capture cycle starts from zero
  always_comb begin
    sum = p_first_q ? (WIDTH+1)'(p_cnt_q) : ({1'b0, rdata_o} + (WIDTH+1)'(p_cnt_q));
    new_word = sum[WIDTH] ? MAX : sum[WIDTH-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_pend_q  <= 1'b0;
      h_first_q <= 1'b0;
      h_addr_q  <= '0;
      h_cnt_q   <= '0;
      p_v_q     <= 1'b0;
      p_first_q <= 1'b0;
      p_addr_q  <= '0;
      p_cnt_q   <= '0;
    end else begin
      if (in_v_i) begin
        h_pend_q  <= 1'b1;
        h_addr_q  <= in_addr_i;
        h_cnt_q   <= in_cnt_i;
        h_first_q <= in_first_i;
      end else if (slot_i) begin
        h_pend_q  <= 1'b0;
      end
      if (slot_i) begin
        p_v_q     <= h_pend_q;
        p_addr_q  <= h_addr_q;
        p_cnt_q   <= h_cnt_q;
        p_first_q <= h_first_q;
      end
    end
  end

  // SRAM port multiplexing
  always_comb begin
    if (bist_en_i) begin
      sram_re    = bist_re_i;
      sram_raddr = bist_addr_i;
      sram_we    = bist_we_i;
      sram_waddr = bist_addr_i;
      sram_wdata = bist_wdata_i;
    end else begin
      sram_re    = cap_rd || ro_en_i;
      sram_raddr = cap_rd ? h_addr_q : ro_addr_i;
      sram_we    = cap_wr;
      sram_waddr = p_addr_q;
      sram_wdata = new_word;
    end
  end

  hist_sram #(.WORDS(WORDS), .WIDTH(WIDTH), .AW(AW)) u_sram (
    .clk   (clk),
    .re    (sram_re),
    .raddr (sram_raddr),
    .rdata (rdata_o),
    .we    (sram_we),
    .waddr (sram_waddr),
    .wdata (sram_wdata)
  );

  assign busy_o = h_pend_q || p_v_q;

  // A bin must be consumed before the next one for this lane arrives, and a
  // word must not be read in the slot in which it is still being written.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    in_v_i && h_pend_q |-> slot_i)
    else $error("hist_lane: new bin before the held one was read");
  a_no_raw: assert property (@(posedge clk) disable iff (!rst_n)
    cap_rd && cap_wr |-> h_addr_q != p_addr_q)
    else $error("hist_lane: read of a word that is being written");
  a_ro_free: assert property (@(posedge clk) disable iff (!rst_n)
    ro_en_i |-> !h_pend_q && !p_v_q && !bist_en_i)
    else $error("hist_lane: readout collides with capture or MBIST");

endmodule
