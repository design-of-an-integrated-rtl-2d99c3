// daq_pkg: constants and types shared by the acceleration acquisition datapath.
//
// The acquisition path samples four auxiliary analog channels with the FPGA's
// built-in dual ADC (XADC), reads the four 12-bit results over the XADC's
// Dynamic Reconfiguration Port (DRP) after every end of sequence, and ships each
// result off-chip as one 16-bit word on a transmit-only SPI bus.
//
// The channel count, the 12-bit result and 16-bit word widths, the status
// register addresses 0x10-0x13, the 100 MHz system clock, the divide-by-5 SPI
// clock and the 26-ADCCLK conversion time follow the design description. The
// XADC_INIT_* words are the XADC control register settings that description
// asks for (continuous sequence mode, ADCCLK = DCLK/4, averaging and alarms
// off, auxiliary channels 0-3 in the sequence, bipolar inputs); their bit
// encodings follow the 7-series XADC user guide and are this design's choice
// of how to express those settings. They are meant for the XADC primitive's
// INIT_40..INIT_4D attributes, which sit outside this RTL.
package daq_pkg;

  localparam int unsigned NUM_CH    = 4;   // three acceleration axes and temperature
  localparam int unsigned RESULT_W  = 12;  // XADC conversion result width
  localparam int unsigned WORD_W    = 16;  // SPI transaction width
  localparam int unsigned HEADER_W  = WORD_W - RESULT_W;
  localparam int unsigned DRP_AW    = 7;   // DRP address width
  localparam int unsigned DRP_DW    = 16;  // DRP data width

  localparam int unsigned SYS_CLK_HZ  = 100_000_000;
  localparam int unsigned SPI_DIV     = 5;   // 100 MHz / 5 = 20 MHz SCLK
  localparam int unsigned ADCCLK_DIV  = 4;   // 100 MHz / 4 = 25 MHz ADCCLK
  localparam int unsigned ADCCLK_PER_CONV = 26;
  // DCLK cycles for one four-channel sequence: 4 * 26 * 4 = 416 (4.16 us)
  localparam int unsigned SEQ_DCLK = NUM_CH * ADCCLK_PER_CONV * ADCCLK_DIV;

  // XADC status registers of auxiliary channels 0..3
  localparam logic [DRP_AW-1:0] VAUX0_ADDR = 7'h10;

  // XADC control register initial values (see header comment)
  localparam logic [15:0] XADC_INIT_40 = 16'h0000; // no averaging, external mux off
  localparam logic [15:0] XADC_INIT_41 = 16'h2F0F; // continuous sequence, alarms and calibration off
  localparam logic [15:0] XADC_INIT_42 = 16'h0400; // ADCCLK = DCLK / 4
  localparam logic [15:0] XADC_INIT_48 = 16'h0000; // no on-chip sensors in the sequence
  localparam logic [15:0] XADC_INIT_49 = 16'h000F; // VAUX0..VAUX3 in the sequence
  localparam logic [15:0] XADC_INIT_4D = 16'h000F; // VAUX0..VAUX3 bipolar

  typedef logic [RESULT_W-1:0] result_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [DRP_AW-1:0]   drp_addr_t;
  typedef logic [DRP_DW-1:0]   drp_data_t;
  typedef logic [$clog2(NUM_CH)-1:0] ch_sel_t;

endpackage
