// daq_top_tb: end-to-end test of the acquisition logic at its default
// parameters, with the XADC behavioural model on the DRP side and an SPI
// slave model on the bus side.
//
// The XADC model converts auxiliary channels 0..3 continuously (416 clocks,
// 4.16 us, per sequence) with predictable sample values. The slave samples
// MOSI on rising SCLK while CS_B is low and groups the words by four. Checks:
// - word k of group g equals {4'b0, sample(g, k) with bit 11 inverted};
// - each word has 16 SCLK rises and CS_B low for 800 ns;
// - words of a group start 900 ns apart, CS_B high 100 ns in between;
// - the four words of group g are complete before EOS of sequence g + 1;
// - LD_BEGIN to the end of the fourth word is 3.56-3.60 us (nominal 3.6 us:
//   four 900 ns slots, less up to 40 ns of SPI clock phase);
// - no DRP read happens before the XADC reports BUSY.
// Each mechanism the design has is counted and must occur at least once:
// waiting for XADC BUSY, a DRDY later than one clock, a load waiting in the
// SPI master for its clock period (seen as a group taking longer than the
// shortest possible 356 clocks), the SPI WAIT period between words, sign
// bit 0 and 1 results, a complete four-word group (SEL wrapping to 0).
module daq_top_tb;
  import daq_pkg::*;
  localparam int unsigned NSEQ = 200;

  logic        clk = 1'b0, reset = 1'b1;
  drp_data_t   xadc_do;
  logic        xadc_drdy, xadc_eos, xadc_eoc, xadc_busy, xadc_den;
  drp_addr_t   xadc_daddr;
  logic        spi_cs_b, spi_sclk, spi_mosi;
  int unsigned seq_num;
  int          checks = 0, failures = 0;

  xadc_model #(.STARTUP(300), .MAX_LAT(4)) xadc (
    .DCLK(clk), .RESET(reset), .DEN(xadc_den), .DWE(1'b0), .ext_val('{default: '0}), .DADDR(xadc_daddr),
    .DO(xadc_do), .DRDY(xadc_drdy), .EOC(xadc_eoc), .EOS(xadc_eos), .BUSY(xadc_busy),
    .seq_num(seq_num)
  );

  daq_top dut (
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

  // mechanism counters
  int n_busy_wait = 0, n_drdy_wait = 0, n_ld_pend = 0, n_gap = 0;
  int n_sign0 = 0, n_sign1 = 0, n_groups = 0, n_deadline = 0;

  // clock-level monitors
  int  cyc = 0, t_den = 0, n_eos = 0, t_ldb = -1, n_drdy = 0;
  int  span_min = 1 << 30, span_max = 0;
  always @(posedge clk) if (!reset) begin
    cyc++;
    if (!xadc_busy) begin
      n_busy_wait++;
      check(!xadc_den, "no DRP read before XADC BUSY");
    end
    if (xadc_den) t_den = cyc;
    if (xadc_drdy && cyc - t_den > 1) n_drdy_wait++;
    if (xadc_eos) n_eos++;
    // the reader raises LD_BEGIN in the clock after the fourth DRDY
    if (xadc_drdy) begin
      n_drdy++;
      if (n_drdy % NUM_CH == 0) t_ldb = cyc + 1;
    end
  end

  // SPI slave
  logic [15:0] rx;
  int          bits = 0, words = 0;
  realtime     t_fall = -1, t_rise = -1, t_first_fall = -1;

  always @(posedge spi_sclk) begin
    check(!spi_cs_b, "SCLK only during CS_B low");
    rx = {rx[14:0], spi_mosi};
    bits++;
  end
  always @(negedge spi_cs_b) if (!reset) begin
    if (words % NUM_CH == 0) t_first_fall = $realtime;
    else begin
      check($realtime - t_fall == 900.0, "words of a group 900 ns apart");
      check($realtime - t_rise == 100.0, "CS_B high 100 ns between words");
      n_gap++;
    end
    t_fall = $realtime;
    bits = 0;
  end
  always @(posedge spi_cs_b) if (!reset && t_fall >= 0) begin
    int g, k;
    result_t s;
    t_rise = $realtime;
    g = words / NUM_CH;
    k = words % NUM_CH;
    s = xadc.sample(g, k);
    check(bits == 16, $sformatf("16 bits per word (got %0d)", bits));
    check($realtime - t_fall == 800.0, "CS_B low 800 ns");
    check(rx == {4'h0, !s[11], s[10:0]},
          $sformatf("group %0d word %0d: got %h expected %h", g, k, rx, {4'h0, !s[11], s[10:0]}));
    if (s[11]) n_sign1++; else n_sign0++;
    if (k == NUM_CH - 1) begin
      n_groups++;
      // EOS of sequence g seen, EOS of sequence g + 1 not yet
      check(n_eos == g + 1, $sformatf("group %0d done before the next EOS (EOS count %0d)", g, n_eos));
      if (n_eos == g + 1) n_deadline++;
      check($realtime - t_first_fall == 3500.0, "first CS_B fall to last CS_B rise 3.5 us");
      span_min = (cyc - t_ldb < span_min) ? cyc - t_ldb : span_min;
      span_max = (cyc - t_ldb > span_max) ? cyc - t_ldb : span_max;
      if (cyc - t_ldb > 356) n_ld_pend++;
      check(cyc - t_ldb >= 356 && cyc - t_ldb <= 360,
            $sformatf("LD_BEGIN to end of group %0d clocks (3.6 us nominal)", cyc - t_ldb));
    end
    words++;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    wait (words == NSEQ * NUM_CH);
    repeat (10) @(posedge clk);
    check(n_groups == NSEQ, "all groups received");
    check(n_busy_wait > 0,  "mechanism: wait for XADC BUSY");
    check(n_drdy_wait > 0,  "mechanism: DRDY wait longer than one clock");
    check(n_ld_pend > 0,    "mechanism: load held until the SPI clock period");
    check(n_gap > 0,        "mechanism: SPI WAIT gap between words");
    check(n_sign0 > 0,      "mechanism: result with sign bit 0");
    check(n_sign1 > 0,      "mechanism: result with sign bit 1");
    check(n_deadline == NSEQ, "mechanism: four words inside the 4.16 us window");
    $display("LD_BEGIN to end of group: %0d..%0d clocks", span_min, span_max);
    $display("mechanisms: busy_wait=%0d drdy_wait=%0d ld_pend=%0d gaps=%0d sign0=%0d sign1=%0d groups=%0d",
             n_busy_wait, n_drdy_wait, n_ld_pend, n_gap, n_sign0, n_sign1, n_groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #((NSEQ + 5) * 4.16us);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
