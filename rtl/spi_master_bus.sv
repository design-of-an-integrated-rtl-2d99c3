// spi_master_bus: transmit-only SPI master that sends one 16-bit word per load.
//
// A pulse on LD copies DATA_IN into the shift register. The transmission FSM
// then moves IDLE -> WAIT -> TRANSMIT on successive SPI clock periods, stays
// in TRANSMIT for 16 SPI clock periods while the shift register presents one
// bit per period on MOSI (MSB first) and returns to IDLE. CS_B is low and
// BUSY high exactly while in TRANSMIT, and SCLK is the divided clock let
// through only while BUSY is high. MOSI changes half a system clock after a
// falling SCLK edge and is sampled by the slave on the rising edge.
//
// What follows the design description: the three states and their outputs
// (CS_B and BUSY high/low as in the state diagram, BUSY the inverse of CS_B),
// a one-period WAIT after the load, a 16-bit count of transmitted bits, the
// divide-by-5 clock and SCLK gated by BUSY, MSB first, data changing on the
// falling SCLK edge. The description's state diagram ends TRANSMIT when the
// count equals 15, its text "once the counter reaches 16"; both mean 16 bits,
// and here the count runs 0..15 and TRANSMIT ends on the period after 15.
// This design's own choices: the FSM runs on the system clock and advances
// once per SPI period on the divider's fall strobe rather than being clocked
// by the divided clock; an LD pulse seen in IDLE is remembered until the next
// SPI period boundary, so a one-system-clock LD is never lost; LD outside
// IDLE is ignored (and flagged by an assertion); MOSI is 0 outside TRANSMIT.
//
// Timing at 100 MHz: CS_B is low for 16 SPI periods (800 ns) with 16 rising
// SCLK edges, the first 15-20 ns after CS_B falls (depending on the divider
// phase set by reset release). IDLE and WAIT each last one
// SPI period between loads, so back-to-back words are 900 ns apart with CS_B
// high for 100 ns.
module spi_master_bus
  import daq_pkg::*;
#(
  parameter int unsigned WIDTH = WORD_W,
  parameter int unsigned DIV   = SPI_DIV
) (
  input  logic             CLK,
  input  logic             RESET,
  input  logic             LD,
  input  logic [WIDTH-1:0] DATA_IN,
  output logic             CS_B,
  output logic             MOSI,
  output logic             SCLK,
  output logic             BUSY
);
  typedef enum logic [1:0] {IDLE, WAIT, TRANSMIT} spi_state_e;

  localparam int unsigned CNTW = $clog2(WIDTH);

  spi_state_e      state;
  logic [CNTW-1:0] shift_cnt;
  logic            ld_pend;
  logic            clk_out, tick;
  logic            sr_q;

  clk_div5 #(.DIV(DIV)) u_div (
    .clk      (CLK),
    .reset    (RESET),
    .clk_out  (clk_out),
    .fall_stb (tick)
  );

  wire accept = (state == IDLE) && LD;
  wire shift  = tick && (state == TRANSMIT) && (shift_cnt != CNTW'(WIDTH - 1));

  spi_shift_reg #(.WIDTH(WIDTH)) u_sr (
    .clk   (CLK),
    .reset (RESET),
    .ld    (accept),
    .d     (DATA_IN),
    .shift (shift),
    .q     (sr_q)
  );

  always_ff @(posedge CLK) begin
    if (RESET) begin
      state     <= IDLE;
      shift_cnt <= '0;
      ld_pend   <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          shift_cnt <= '0;
          if (tick && (ld_pend || LD)) begin
            state   <= WAIT;
            ld_pend <= 1'b0;
          end else if (LD) begin
            ld_pend <= 1'b1;
          end
        end
        WAIT: begin
          shift_cnt <= '0;
          if (tick) state <= TRANSMIT;
        end
        TRANSMIT: begin
          if (tick) begin
            if (shift_cnt == CNTW'(WIDTH - 1)) state <= IDLE;
            else shift_cnt <= shift_cnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign BUSY = (state == TRANSMIT);
  assign CS_B = !BUSY;
  assign MOSI = BUSY && sr_q;
  assign SCLK = clk_out && BUSY;

  // A new word may only be loaded while the bus is idle.
  a_ld_when_idle: assert property (@(posedge CLK) disable iff (RESET) LD |-> state == IDLE)
    else $error("spi_master_bus: LD while a transaction is in progress");
endmodule
