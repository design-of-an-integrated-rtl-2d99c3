// clk_div5: odd-ratio clock divider that turns the 100 MHz system clock into
// the 20 MHz SPI clock with a 50% duty cycle.
//
// A divide-by-5 cannot give an even duty cycle from rising edges alone, so two
// counters run side by side, as the design description specifies: one counts
// rising edges of CLK, the other falling edges. Each drives its output high for
// the first two edges of a five-edge cycle and low for the next three, so each
// is high for 2 of 5 source periods. The falling-edge copy lags by half a
// period, and the union of the two (an OR; the description only says the two
// waveforms are overlapped) is high for 2.5 periods and low for 2.5.
//
// Ports
//   clk      system clock (100 MHz)
//   reset    synchronous, active high; both counters restart at 0
//   clk_out  divided clock, DIV periods of clk per period, high for DIV/2
//   fall_stb one-clk-cycle strobe, high in the clk cycle during which clk_out
//            has just fallen (rising-edge counter at 3); clk-domain logic that
//            acts on it updates at least half a clk period after clk_out falls, so
//            it can change what the next clk_out rise samples. This strobe
//            is this design's addition: it lets the SPI master run in the clk
//            domain instead of on the divided clock.
//
// Timing: after reset the rising-edge counter is 0, clk_out rises on the first
// rising clk edge after reset is released and has period DIV.
module clk_div5 #(
  parameter int unsigned DIV = 5
) (
  input  logic clk,
  input  logic reset,
  output logic clk_out,
  output logic fall_stb
);
  localparam int unsigned CW   = $clog2(DIV);
  localparam int unsigned HIGH = DIV / 2;  // 2 edges high out of 5

  logic [CW-1:0] cnt_p, cnt_n;
  logic          q_p, q_n;

  // rising-edge counter
  always_ff @(posedge clk) begin
    if (reset) begin
      cnt_p <= '0;
      q_p   <= 1'b0;
    end else begin
      cnt_p <= (cnt_p == CW'(DIV - 1)) ? '0 : cnt_p + 1'b1;
      q_p   <= (cnt_p < CW'(HIGH));
    end
  end

  // falling-edge counter, half a period behind
  always_ff @(negedge clk) begin
    if (reset) begin
      cnt_n <= '0;
      q_n   <= 1'b0;
    end else begin
      cnt_n <= (cnt_n == CW'(DIV - 1)) ? '0 : cnt_n + 1'b1;
      q_n   <= (cnt_n < CW'(HIGH));
    end
  end

  assign clk_out  = q_p | q_n;
  assign fall_stb = !reset && (cnt_p == CW'(HIGH + 1));
endmodule
