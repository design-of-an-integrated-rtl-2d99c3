// daq_top_stim_tb: the acquisition logic driven by a recorded accelerometer
// stimulus, in the unipolar DAC bring-up configuration (HEADER = 4'h7,
// INVERT_MSB = 0).
//
// The stimulus is three axes of measured acceleration, sampled every 250 us,
// given as voltages on VAUXP[0..2] with VAUXN at 0 V; VAUX3 has no signal.
// The XADC model turns each voltage into the ideal unipolar 12-bit code,
// floor(V / 1 V * 4096), holding each step until the next. For the step at
// 250 us (0.6070 V, 0.5992 V, 0.5982 V) the four words on the bus must be
// 0x79B6, 0x7996, 0x7992 and 0x7000. Every word is also checked against the
// code of the step in force when its conversion finished, and each group of
// four must complete before the next end of sequence.
module daq_top_stim_tb;
  import daq_pkg::*;

  localparam int NSTEP = 3;
  localparam realtime STEP = 250us;
  // stimulus: volts on VAUXP[0..2] at 0, 250 and 500 us
  localparam real STIM [NSTEP][3] = '{
    '{0.5973, 0.6325, 0.6090},
    '{0.6070, 0.5992, 0.5982},
    '{0.6246, 0.6080, 0.6139}
  };

  logic        clk = 1'b0, reset = 1'b1;
  drp_data_t   xadc_do;
  logic        xadc_drdy, xadc_eos, xadc_eoc, xadc_busy, xadc_den;
  drp_addr_t   xadc_daddr;
  logic        spi_cs_b, spi_sclk, spi_mosi;
  int unsigned seq_num;
  result_t     ext_q [NUM_CH], ext_d [NUM_CH];
  int          checks = 0, failures = 0;

  xadc_model #(.STARTUP(300), .MAX_LAT(4), .EXT(1'b1)) xadc (
    .DCLK(clk), .RESET(reset), .DEN(xadc_den), .DWE(1'b0), .ext_val(ext_q), .DADDR(xadc_daddr),
    .DO(xadc_do), .DRDY(xadc_drdy), .EOC(xadc_eoc), .EOS(xadc_eos), .BUSY(xadc_busy),
    .seq_num(seq_num)
  );

  daq_top #(.HEADER(4'h7), .INVERT_MSB(1'b0)) dut (
    .clk, .reset,
    .xadc_do, .xadc_drdy, .xadc_eos, .xadc_busy, .xadc_den, .xadc_daddr,
    .spi_cs_b, .spi_sclk, .spi_mosi
  );

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic result_t code(real v);
    real c;
    c = $floor(v * 4096.0);
    if (c > 4095.0) c = 4095.0;
    if (c < 0.0) c = 0.0;
    return result_t'(int'(c));
  endfunction

  // analog stimulus as codes, one step every 250 us
  always @(posedge clk) begin
    int s;
    s = int'($floor($realtime / STEP));
    if (s >= NSTEP) s = NSTEP - 1;
    for (int c = 0; c < NUM_CH; c++)
      ext_q[c] <= (c < 3) ? code(STIM[s][c]) : '0;
    ext_d <= ext_q;
  end

  // expected results, recorded as the model finishes each conversion
  result_t exp_q [NUM_CH][$];
  int      eoc_ch = 0, n_eos = 0;
  always @(posedge clk) if (!reset) begin
    if (xadc_eoc) begin
      exp_q[eoc_ch].push_back(ext_d[eoc_ch]);
      eoc_ch = (eoc_ch + 1) % NUM_CH;
    end
    if (xadc_eos) n_eos++;
  end

  // SPI slave
  logic [15:0] rx;
  logic [15:0] grp [NUM_CH];
  int          words = 0, n_fig = 0;
  always @(posedge spi_sclk) rx = {rx[14:0], spi_mosi};
  always @(posedge spi_cs_b) if (!reset && $realtime > 0) begin
    int k;
    k = words % NUM_CH;
    if (exp_q[k].size() > 0) begin
      result_t e;
      e = exp_q[k].pop_front();
      check(rx == {4'h7, e}, $sformatf("word %0d: got %h expected %h", words, rx, {4'h7, e}));
    end else check(0, "word without a conversion");
    grp[k] = rx;
    if (k == NUM_CH - 1) begin
      check(n_eos == words / NUM_CH + 1, "group done before the next EOS");
      if (grp[0] == 16'h79B6 && grp[1] == 16'h7996 && grp[2] == 16'h7992 && grp[3] == 16'h7000)
        n_fig++;
    end
    words++;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    #(NSTEP * STEP + 10us);
    check(words / NUM_CH >= 120, $sformatf("groups received (%0d)", words / NUM_CH));
    check(n_fig >= 50, $sformatf("groups 0x79B6 0x7996 0x7992 0x7000 seen (%0d)", n_fig));
    $display("groups with the 250 us step values: %0d", n_fig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NSTEP * STEP + 100us);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
