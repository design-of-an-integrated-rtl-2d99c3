// reader_fsm: reads the four auxiliary-channel conversion results out of the
// XADC over its Dynamic Reconfiguration Port (DRP) after every conversion
// sequence.
//
// After reset the FSM waits for the XADC to report BUSY (conversions have
// started). It then sits in the read state of channel 0 with DADDR = 0x10
// until EOS (end of sequence) arrives. For each channel k = 0..3 it presents
// DADDR = 0x10 + k, issues a one-clock DEN pulse and waits for DRDY; on DRDY it
// latches the result into s_xadc[k] and moves to the next channel. After
// channel 3 it pulses LD_BEGIN for one clock, so the loader can start sending,
// and goes back to waiting for EOS.
//
// Following the design description: the states (an initial state left on
// BUSY, a read state and a wait-for-DRDY state per status register 0x10..0x13),
// waiting for EOS before the first read, and the DEN pulse made by loading
// the two-bit den_reg with binary 10 in the read state and shifting it right
// each cycle DRDY is low, with DEN = den_reg[0]. This design's own choices:
// the 12-bit result is taken from DO[15:4], where the XADC places it
// (MSB-justified), and DO[3:0] are unused; DWE is not driven here and must
// be tied low at the XADC; LD_BEGIN is a registered pulse in the cycle
// after the fourth result is stored; reset is synchronous and active high.
//
// Timing: DEN rises two clocks after the FSM enters a channel's read state
// (one cycle in READ, then one in WAITDRDY while den_reg shifts), and each
// channel costs 3 clocks plus the XADC's DRDY latency.
module reader_fsm
  import daq_pkg::*;
(
  input  logic      CLK,
  input  logic      RESET,
  input  drp_data_t D,          // XADC DO
  input  logic      EOS,
  input  logic      DRDY,
  input  logic      BUSY,       // XADC BUSY
  output result_t   S_XADC [NUM_CH],
  output logic      LD_BEGIN,
  output logic      DEN,
  output drp_addr_t DADDR
);
  typedef enum logic [1:0] {R_INIT, R_READ, R_WAITDRDY} rd_state_e;

  rd_state_e state;
  ch_sel_t   ch;
  logic [1:0] den_reg;

  always_ff @(posedge CLK) begin
    if (RESET) begin
      state    <= R_INIT;
      ch       <= '0;
      den_reg  <= '0;
      DADDR    <= VAUX0_ADDR;
      LD_BEGIN <= 1'b0;
      for (int i = 0; i < NUM_CH; i++) S_XADC[i] <= '0;
    end else begin
      LD_BEGIN <= 1'b0;
      unique case (state)
        R_INIT: if (BUSY) state <= R_READ;
        R_READ: begin
          DADDR   <= VAUX0_ADDR + drp_addr_t'(ch);
          den_reg <= 2'b10;
          // channel 0 waits for a fresh sequence; the others follow at once
          if (ch != '0 || EOS) state <= R_WAITDRDY;
        end
        R_WAITDRDY: begin
          if (!DRDY) begin
            den_reg <= den_reg >> 1;
          end else begin
            den_reg   <= '0;
            S_XADC[ch] <= D[DRP_DW-1 -: RESULT_W];
            ch        <= ch + 1'b1;
            state     <= R_READ;
            if (ch == ch_sel_t'(NUM_CH - 1)) LD_BEGIN <= 1'b1;
          end
        end
        default: state <= R_INIT;
      endcase
    end
  end

  assign DEN = den_reg[0];

  // DEN must be a single-cycle pulse
  a_den_pulse: assert property (@(posedge CLK) disable iff (RESET) DEN |=> !DEN)
    else $error("reader_fsm: DEN held for more than one cycle");
endmodule
