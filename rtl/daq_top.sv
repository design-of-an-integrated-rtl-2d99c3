// daq_top: FPGA logic of the acceleration data acquisition subsystem.
//
// Four accelerometer channels (X, Y, Z, temperature) are converted by the
// FPGA's XADC in continuous sequence mode: 26 ADCCLK cycles per channel at
// ADCCLK = 25 MHz, so a fresh set of four 12-bit results every 4.16 us
// (240.38 kHz per channel). After each end of sequence (EOS) the reader FSM
// fetches the four results over the XADC's DRP into s_xadc0..3 and pulses
// LD_BEGIN. The loader FSM then walks the 4-to-1 word multiplexer over the
// channels and loads each 16-bit word into the SPI master, which sends it to
// the processing board over a three-wire, transmit-only SPI bus (CS_B, SCLK at
// 20 MHz, MOSI). Four words take 4 x 900 ns = 3.6 us, inside the 4.16 us
// window, so the bus keeps up with the converter.
//
// The XADC itself is the FPGA's hard analog block and is not part of this
// RTL: its DRP and status pins are ports of this module (xadc_*), to be wired
// to an XADC primitive configured with the daq_pkg::XADC_INIT_* values and
// with DCLK = clk, RESET = reset, DWE = 0 and VAUXP/VAUXN[3:0] on the analog
// inputs.
//
// Following the design description: the block structure and connections
// (XADC, reader FSM, loader FSM, 4-to-1 multiplexer, SPI master bus, shared
// 100 MHz clock and reset), the word layout and the bipolar sign-bit
// inversion. This design's own choices are listed in the submodules.
//
// Parameters: HEADER, the four bits above the result in each word (0 in the
// final design, 0x7 for driving a DAC directly); INVERT_MSB, invert the
// result's bit 11 (two's complement to offset binary).
module daq_top
  import daq_pkg::*;
#(
  parameter logic [HEADER_W-1:0] HEADER     = '0,
  parameter bit                  INVERT_MSB = 1'b1
) (
  input  logic      clk,          // 100 MHz system clock, also XADC DCLK
  input  logic      reset,        // synchronous, active high
  // XADC DRP and status
  input  drp_data_t xadc_do,
  input  logic      xadc_drdy,
  input  logic      xadc_eos,
  input  logic      xadc_busy,
  output logic      xadc_den,
  output drp_addr_t xadc_daddr,
  // SPI bus to the processing subsystem
  output logic      spi_cs_b,
  output logic      spi_sclk,
  output logic      spi_mosi
);
  result_t s_xadc [NUM_CH];
  logic    ld_begin;
  ch_sel_t sel;
  logic    load;
  word_t   data_in;
  logic    spi_busy;

  reader_fsm u_reader (
    .CLK      (clk),
    .RESET    (reset),
    .D        (xadc_do),
    .EOS      (xadc_eos),
    .DRDY     (xadc_drdy),
    .BUSY     (xadc_busy),
    .S_XADC   (s_xadc),
    .LD_BEGIN (ld_begin),
    .DEN      (xadc_den),
    .DADDR    (xadc_daddr)
  );

  loader_fsm u_loader (
    .CLK   (clk),
    .RESET (reset),
    .START (ld_begin),
    .BUSY  (spi_busy),
    .SEL   (sel),
    .LOAD  (load)
  );

  word_mux #(.HEADER(HEADER), .INVERT_MSB(INVERT_MSB)) u_mux (
    .s_xadc   (s_xadc),
    .sel      (sel),
    .data_out (data_in)
  );

  spi_master_bus u_spi (
    .CLK     (clk),
    .RESET   (reset),
    .LD      (load),
    .DATA_IN (data_in),
    .CS_B    (spi_cs_b),
    .MOSI    (spi_mosi),
    .SCLK    (spi_sclk),
    .BUSY    (spi_busy)
  );
endmodule
