// reader_fsm_tb: runs the reader against the XADC behavioural model and
// checks the DRP reads. Before the XADC reports BUSY the reader must not
// read; after each EOS it must issue exactly four one-clock DEN pulses, at
// DADDR 0x10, 0x11, 0x12, 0x13 in that order, latch DO[15:4] of each answer
// into S_XADC[0..3] (compared with the model's predicted samples), pulse
// LD_BEGIN once, and read nothing more until the next EOS. The number of
// clocks from EOS to LD_BEGIN must equal the sum over channels of
// (3 + DRDY latency).
module reader_fsm_tb;
  import daq_pkg::*;
  logic        clk = 1'b0, reset = 1'b1;
  drp_data_t   do_w;
  logic        eos, eoc, drdy, xbusy, den, ld_begin;
  drp_addr_t   daddr;
  result_t     s_xadc [NUM_CH];
  int unsigned seq_num;
  int          checks = 0, failures = 0;

  xadc_model #(.STARTUP(600), .MAX_LAT(5)) xadc (
    .DCLK(clk), .RESET(reset), .DEN(den), .DWE(1'b0), .ext_val('{default: '0}), .DADDR(daddr),
    .DO(do_w), .DRDY(drdy), .EOC(eoc), .EOS(eos), .BUSY(xbusy), .seq_num(seq_num)
  );

  reader_fsm dut (
    .CLK(clk), .RESET(reset), .D(do_w), .EOS(eos), .DRDY(drdy), .BUSY(xbusy),
    .S_XADC(s_xadc), .LD_BEGIN(ld_begin), .DEN(den), .DADDR(daddr)
  );

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int n_den = 0, n_ld = 0, n_eos = 0, cyc = 0, t_eos = 0, t_den = 0, lat_sum = 0;
  int n_waits = 0;
  bit den_q = 0;

  always @(posedge clk) if (!reset) begin
    cyc++;
    if (den) begin
      check(xbusy, "no read before the XADC is busy");
      check(daddr == VAUX0_ADDR + drp_addr_t'(n_den), $sformatf("DADDR %h at read %0d", daddr, n_den));
      check(n_den < NUM_CH, "at most four reads per sequence");
      check(!den_q, "DEN is one clock long");
      n_den++;
      t_den = cyc;
    end
    if (drdy) begin
      lat_sum += cyc - t_den;
      if (cyc - t_den > 1) n_waits++;
    end
    den_q = den;
    if (eos && xbusy) begin
      n_eos++;
      check(n_den == 0 || n_den == NUM_CH, "reads of the previous sequence complete");
      n_den = 0; lat_sum = 0;
      t_eos = cyc;
    end
    if (ld_begin) begin
      n_ld++;
      check(n_den == NUM_CH, "LD_BEGIN after the fourth read");
      check(cyc - t_eos == 3 * NUM_CH + lat_sum,
            $sformatf("EOS to LD_BEGIN %0d clocks, expected %0d", cyc - t_eos, 3 * NUM_CH + lat_sum));
      // the results of the sequence just finished (seq_num already counts it)
      @(negedge clk);
      for (int c = 0; c < NUM_CH; c++)
        check(s_xadc[c] == xadc.sample(seq_num - 1, c),
              $sformatf("s_xadc%0d = %h expected %h", c, s_xadc[c], xadc.sample(seq_num - 1, c)));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    // XADC idle for 600 clocks: nothing may be read
    repeat (590) @(posedge clk);
    check(n_den == 0, "reader waits for XADC BUSY");
    repeat (40 * SEQ_DCLK) @(posedge clk);
    check(n_eos >= 39, $sformatf("EOS seen (%0d)", n_eos));
    check(n_ld == n_eos || n_ld == n_eos - 1, $sformatf("one LD_BEGIN per EOS (%0d/%0d)", n_ld, n_eos));
    check(n_waits > 0, "DRDY latency above one clock exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
