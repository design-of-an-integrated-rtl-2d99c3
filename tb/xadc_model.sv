// xadc_model: behavioural model of the FPGA's XADC as this design uses it:
// continuous sequence over auxiliary channels 0..3, ADCCLK = DCLK / 4,
// 26 ADCCLK cycles per conversion, read-only access to the status registers
// over the DRP. Not synthesizable; for simulation only.
//
// Each conversion of channel c ends SEQ_DCLK/4 DCLK cycles after the previous
// one; at that point the status register 0x10 + c is written with the next
// sample, EOC pulses for one DCLK, and with the last channel EOS pulses too.
// BUSY stays low for STARTUP cycles after reset and is high from then on.
// A DEN pulse captures DADDR; DRDY pulses with DO after a random latency of
// 1..MAX_LAT DCLK cycles (the real part answers a DRP read within a few DCLK
// cycles). Samples come from sample(), a hash of sequence number and channel,
// so a checker can predict them; the low four bits of DO carry junk, as the
// real status registers keep the result MSB-justified. With ONLY_CH >= 0 all
// other channels read 0 (no signal on those inputs). With EXT set, each
// conversion instead returns the value on ext_val for its channel, so a
// testbench can feed it codes derived from an analog stimulus.
module xadc_model
  import daq_pkg::*;
#(
  parameter int unsigned STARTUP = 20,
  parameter int unsigned MAX_LAT = 4,
  parameter int          ONLY_CH = -1,
  parameter bit          EXT     = 1'b0
) (
  input  logic      DCLK,
  input  logic      RESET,
  input  logic      DEN,
  input  logic      DWE,
  input  drp_addr_t DADDR,
  input  result_t   ext_val [NUM_CH], // with EXT: the value each conversion returns
  output drp_data_t DO,
  output logic      DRDY,
  output logic      EOC,
  output logic      EOS,
  output logic      BUSY,
  output int unsigned seq_num      // sequences completed so far
);
  localparam int unsigned CONV_DCLK = ADCCLK_PER_CONV * ADCCLK_DIV;  // 104

  function automatic result_t sample(int unsigned n, int unsigned c);
    int unsigned h;
    if (ONLY_CH >= 0 && int'(c) != ONLY_CH) return '0;
    h = (n * 32'h9E37_79B1) ^ (c * 32'h85EB_CA6B) ^ 32'h1234_5678;
    h = h ^ (h >> 13);
    h = h * 32'hC2B2_AE35;
    h = h ^ (h >> 16);
    return result_t'(h);
  endfunction

  drp_data_t   status [NUM_CH];
  int unsigned cyc, ch, startup_cnt;
  int          lat;
  drp_addr_t   addr_q;

  always_ff @(posedge DCLK) begin
    if (RESET) begin
      cyc <= 0; ch <= 0; seq_num <= 0; startup_cnt <= 0;
      EOC <= 1'b0; EOS <= 1'b0; BUSY <= 1'b0;
      DRDY <= 1'b0; DO <= '0; lat <= -1; addr_q <= '0;
      for (int i = 0; i < NUM_CH; i++) status[i] <= '0;
    end else begin
      EOC  <= 1'b0;
      EOS  <= 1'b0;
      DRDY <= 1'b0;
      if (startup_cnt < STARTUP) begin
        startup_cnt <= startup_cnt + 1;
      end else begin
        BUSY <= 1'b1;
        if (cyc == CONV_DCLK - 1) begin
          cyc <= 0;
          status[ch] <= {EXT ? ext_val[ch] : sample(seq_num, ch), 4'($urandom)};
          EOC <= 1'b1;
          if (ch == NUM_CH - 1) begin
            EOS     <= 1'b1;
            ch      <= 0;
            seq_num <= seq_num + 1;
          end else begin
            ch <= ch + 1;
          end
        end else begin
          cyc <= cyc + 1;
        end
      end
      // DRP read
      if (DEN) begin
        if (DWE) $error("xadc_model: DRP write not modelled");
        addr_q <= DADDR;
        lat    <= int'($urandom_range(MAX_LAT - 1, 0));
      end else if (lat == 0) begin
        DRDY <= 1'b1;
        if (addr_q >= VAUX0_ADDR && int'(addr_q) < int'(VAUX0_ADDR) + NUM_CH)
          DO <= status[2'(addr_q - VAUX0_ADDR)];
        else
          DO <= 16'hDEAD;
        lat  <= -1;
      end else if (lat > 0) begin
        lat <= lat - 1;
      end
    end
  end
endmodule
