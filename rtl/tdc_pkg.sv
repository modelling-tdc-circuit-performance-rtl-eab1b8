// tdc_pkg: constants and types shared by the TDC histogram acquisition block.
//
// Holds the SPI register map and the SPI frame layout used by spi_regs and
// the top level, and the reset values of the programmable acquisition
// settings. The default histogram length (1000 bins) is the 2 us histogram
// window at the 500 MHz TDC clock; the register map, frame layout and the
// default number of capture cycles are choices of this design.
package tdc_pkg;

  // SPI frame: {rw, addr[6:0], data[15:0]}, MSB first, 24 SCLK cycles.
  localparam int unsigned SPI_FRAME_BITS = 24;
  localparam int unsigned SPI_ADDR_BITS  = 7;
  localparam int unsigned SPI_DATA_BITS  = 16;

  typedef logic [SPI_ADDR_BITS-1:0] reg_addr_t;
  typedef logic [SPI_DATA_BITS-1:0] reg_data_t;

  // Register map.
  localparam reg_addr_t REG_CTRL      = 7'h00; // [0] enable, [1] bist_start (self clearing)
  localparam reg_addr_t REG_HIST_LEN  = 7'h01; // bins per capture cycle
  localparam reg_addr_t REG_NUM_SHOTS = 7'h02; // capture cycles per histogram
  localparam reg_addr_t REG_STATUS    = 7'h03; // read only, see status_t
  localparam reg_addr_t REG_FRAME_CNT = 7'h04; // read only, completed histograms
  localparam reg_addr_t REG_ID        = 7'h05; // read only, constant ID_VALUE
  localparam reg_addr_t REG_DROP_CNT  = 7'h06; // read only, triggers dropped while busy

  localparam reg_data_t ID_VALUE = 16'h7DC1;

  // Reset values of the programmable settings.
  localparam reg_data_t HIST_LEN_RESET  = 16'd1000; // 2 us at 500 MHz
  localparam reg_data_t NUM_SHOTS_RESET = 16'd32;

  // Status word, REG_STATUS.
  typedef struct packed {
    logic [7:0] bist_fail_mask; // [15:8] failing SRAMs of the last MBIST run
    logic [1:0] rsvd;           // [7:6] reads 0
    logic bist_fail;  // [5] last MBIST run found an error
    logic bist_done;  // [4] an MBIST run has finished
    logic bist_busy;  // [3] MBIST running
    logic acq_busy;   // [2] capture cycle or flush in progress
    logic ro_bank;    // [1] bank currently offered for readout
    logic cap_bank;   // [0] bank currently receiving capture
  } status_t;

  // Control settings from the register file.
  typedef struct packed {
    logic      enable;
    reg_data_t hist_len;
    reg_data_t num_shots;
  } acq_cfg_t;

endpackage
