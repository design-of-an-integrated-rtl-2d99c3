// loader_fsm: hands the four stored conversion results to the SPI master one
// after another.
//
// A START pulse (the reader's "all four results stored" strobe) begins a
// round. For each channel k = 0..3 the FSM presents SEL = k to the result
// multiplexer and pulses LOAD for one clock, waits until the SPI master has
// started the transaction (BUSY high) and then until it has finished (BUSY
// low), and moves on. After channel 3 it returns to idle with SEL back at 0
// and waits for the next START. SEL advances in the clock after LOAD, so
// during the transaction of channel k SEL already shows k+1 (mod 4), as in the
// loader's simulation waveform in the design description.
//
// Following the description: the ports (RESET, CLK, START, BUSY, SEL, LOAD),
// the channel order 0..3, one LOAD per channel, waiting for BUSY to fall
// before the next load, idling until the next START. This design's own
// choices: the state encoding, waiting for BUSY to rise before waiting for it
// to fall (the SPI master keeps BUSY low for one SPI period after a load),
// and ignoring START while a round is running.
//
// Timing: LOAD is registered and rises in the clock after START is seen;
// each later LOAD rises in the clock after BUSY is seen low.
module loader_fsm
  import daq_pkg::*;
(
  input  logic    CLK,
  input  logic    RESET,
  input  logic    START,
  input  logic    BUSY,
  output ch_sel_t SEL,
  output logic    LOAD
);
  typedef enum logic [1:0] {L_IDLE, L_LOAD, L_WAIT_HI, L_WAIT_LO} ld_state_e;

  ld_state_e state;

  always_ff @(posedge CLK) begin
    if (RESET) begin
      state <= L_IDLE;
      SEL   <= '0;
      LOAD  <= 1'b0;
    end else begin
      LOAD <= 1'b0;
      unique case (state)
        L_IDLE: if (START) begin
          state <= L_LOAD;
          LOAD  <= 1'b1;
        end
        L_LOAD: begin
          // LOAD is high in this cycle with SEL steady; advance SEL now
          SEL   <= SEL + 1'b1;
          state <= L_WAIT_HI;
        end
        L_WAIT_HI: if (BUSY) state <= L_WAIT_LO;
        L_WAIT_LO: if (!BUSY) begin
          if (SEL == '0) begin
            state <= L_IDLE;          // all four channels sent
          end else begin
            state <= L_LOAD;
            LOAD  <= 1'b1;
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end

  // LOAD is a single-cycle pulse
  a_load_pulse: assert property (@(posedge CLK) disable iff (RESET) LOAD |=> !LOAD)
    else $error("loader_fsm: LOAD held for more than one cycle");
endmodule
