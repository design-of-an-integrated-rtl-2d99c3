// spi_shift_reg: parallel-in, serial-out, shift-left register that holds the
// word being sent on MOSI.
//
// The register is loaded whole from d when ld is high and shifts one place
// towards the MSB when shift is high; q is the MSB, so the word leaves MSB
// first and zeros enter at the LSB. Width (16) and shift direction follow the
// design description. The description has the register load asynchronously
// and clock on the gated SPI clock; here load and shift are synchronous
// enables on the system clock, which keeps the whole SPI master in one clock
// domain. Load wins over shift.
//
// Ports: clk (system clock), reset (synchronous, active high, clears the
// register), ld / d (parallel load), shift (shift enable), q (serial output,
// the current MSB). Both load and shift take effect at the next rising clk.
module spi_shift_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  input  logic             shift,
  output logic             q
);
  logic [WIDTH-1:0] sr;

  always_ff @(posedge clk) begin
    if (reset)      sr <= '0;
    else if (ld)    sr <= d;
    else if (shift) sr <= {sr[WIDTH-2:0], 1'b0};
  end

  assign q = sr[WIDTH-1];
endmodule
