// word_mux: the 4-to-1 multiplexer between the stored conversion results and
// the SPI master's DATA_IN, which also builds the 16-bit transaction word.
//
// SEL picks one of the four 12-bit results. The word is {HEADER, result},
// with the result's sign bit (bit 11) inverted when INVERT_MSB is set. In
// bipolar mode the XADC returns two's complement; inverting bit 11 turns it
// into offset binary, so mid-scale input maps to 0x800 and a DAC on the bus
// reproduces a continuous waveform.
//
// Following the design description: the 4-to-1 multiplexer selected by the
// loader, the word layout (bits 15:12 header, 11:0 result), a zero header in
// the final design and the header 0x7 of the first hardware test (set
// HEADER = 4'h7 for that), and the inversion of the result's top bit in the
// final design. Combinational, no clock.
module word_mux
  import daq_pkg::*;
#(
  parameter logic [HEADER_W-1:0] HEADER     = '0,
  parameter bit                  INVERT_MSB = 1'b1
) (
  input  result_t s_xadc [NUM_CH],
  input  ch_sel_t sel,
  output word_t   data_out
);
  result_t r;

  always_comb begin
    r = s_xadc[sel];
    if (INVERT_MSB) r[RESULT_W-1] = !r[RESULT_W-1];
    data_out = {HEADER, r};
  end
endmodule
