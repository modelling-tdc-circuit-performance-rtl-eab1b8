// spi_regs: SPI slave and control/status register file.
//
// The SPI pins are brought into the TDC clock domain through two-flop
// synchronisers and the SCLK edges are detected there, so SCLK must be
// slower than a quarter of the TDC clock. Protocol: SPI mode 0 (SCLK idle
// low, MOSI sampled on the rising edge, MISO changed on the falling edge),
// MSB first, 24-bit frames {rw, addr[6:0], data[15:0]} framed by CS_N low.
// rw = 1 writes data to addr when the 24th bit has been received. rw = 0
// reads: the register at addr is captured after the 8th bit and shifted out
// on MISO during bits 9..24. MISO is driven low while CS_N is high. Bits
// after the 24th are ignored until CS_N rises.
//
// Registers (tdc_pkg): CTRL [0] enable, [1] bist_start (write 1 to start an
// MBIST run, reads 0); HIST_LEN; NUM_SHOTS; STATUS (read only, status_t);
// FRAME_CNT (read only); ID (read only); DROP_CNT (read only,
// triggers that arrived while a capture cycle was running). Unmapped addresses read 0.
//
// From the reference study: the block has SPI register control and testability.
// The frame format, the register map and the reset values are this
// design's own.
module spi_regs
  import tdc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // SPI pins
  input  logic      sclk_i,
  input  logic      cs_n_i,
  input  logic      mosi_i,
  output logic      miso_o,
  // register fields
  output acq_cfg_t  cfg_o,
  output logic      bist_start_o,
  input  status_t   status_i,
  input  reg_data_t frame_cnt_i,
  input  reg_data_t drop_cnt_i
);

  logic [2:0] sclk_s, cs_n_s;  // [0] first synchroniser stage
  logic [1:0] mosi_s;
  logic       sclk_rise, sclk_fall, cs_act, cs_end;

  logic [4:0]                  bit_cnt_q;
  logic [SPI_FRAME_BITS-2:0]   rx_q;      // bits received so far (last one arrives in the frame)
  logic [SPI_DATA_BITS-1:0]    tx_q;
  logic [SPI_FRAME_BITS-1:0]   frame;
  reg_data_t                   rd_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_n_s <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk_i};
      cs_n_s <= {cs_n_s[1:0], cs_n_i};
      mosi_s <= {mosi_s[0], mosi_i};
    end
  end

  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign sclk_fall = !sclk_s[1] && sclk_s[2];
  assign cs_act    = !cs_n_s[1];
  assign cs_end    = cs_n_s[1] && !cs_n_s[2];

  assign frame    = {rx_q, mosi_s[1]};

  // register read multiplexer (header = {rw, addr} after 8 bits)
  always_comb begin
    unique case (frame[SPI_ADDR_BITS-1:0])
      REG_CTRL:      rd_val = reg_data_t'({cfg_o.enable});
      REG_HIST_LEN:  rd_val = cfg_o.hist_len;
      REG_NUM_SHOTS: rd_val = cfg_o.num_shots;
      REG_STATUS:    rd_val = reg_data_t'(status_i);
      REG_FRAME_CNT: rd_val = frame_cnt_i;
      REG_ID:        rd_val = ID_VALUE;
      REG_DROP_CNT:  rd_val = drop_cnt_i;
      default:       rd_val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt_q       <= '0;
      rx_q            <= '0;
      tx_q            <= '0;
      cfg_o.enable    <= 1'b0;
      cfg_o.hist_len  <= HIST_LEN_RESET;
      cfg_o.num_shots <= NUM_SHOTS_RESET;
      bist_start_o    <= 1'b0;
    end else begin
      bist_start_o <= 1'b0;
      if (!cs_act || cs_end) begin
        bit_cnt_q <= '0;
      end else if (sclk_rise) begin
        rx_q      <= frame[SPI_FRAME_BITS-2:0];
        if (bit_cnt_q != 5'(SPI_FRAME_BITS)) begin
          bit_cnt_q <= bit_cnt_q + 1'b1;  // bits past the 24th are ignored
        end
        if (bit_cnt_q == 5'd7) begin
          // header complete: capture the register to be read
          tx_q <= rd_val;
        end
        if (bit_cnt_q == 5'(SPI_FRAME_BITS - 1) && frame[SPI_FRAME_BITS-1]) begin
          unique case (frame[SPI_FRAME_BITS-2 -: SPI_ADDR_BITS])
            REG_CTRL: begin
              cfg_o.enable <= frame[0];
              bist_start_o <= frame[1];
            end
            REG_HIST_LEN:  cfg_o.hist_len  <= frame[SPI_DATA_BITS-1:0];
            REG_NUM_SHOTS: cfg_o.num_shots <= frame[SPI_DATA_BITS-1:0];
            default: ;
          endcase
        end
      end else if (sclk_fall && bit_cnt_q >= 5'd9) begin
        tx_q <= {tx_q[SPI_DATA_BITS-2:0], 1'b0};
      end
    end
  end

  assign miso_o = cs_act && (bit_cnt_q >= 5'd8) && tx_q[SPI_DATA_BITS-1];

endmodule
