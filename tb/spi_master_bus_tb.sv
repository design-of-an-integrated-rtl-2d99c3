// spi_master_bus_tb: drives the SPI master like the loader does and checks
// the bus with a slave model that samples MOSI on rising SCLK edges.
//
// Checked for every word: the 16 bits received equal the word loaded; there
// are exactly 16 rising SCLK edges while CS_B is low; CS_B stays low for
// 800 ns; the first SCLK rise comes 10-30 ns after CS_B falls; SCLK is quiet
// while CS_B is high; MOSI only changes while SCLK is low; BUSY is the inverse
// of CS_B. Back-to-back words, reloaded one clock after BUSY falls, must start
// 900 ns apart with CS_B high for 100 ns. LD pulses are issued at random
// phases of the SPI clock, including one long idle gap.
module spi_master_bus_tb;
  logic        clk = 1'b0, reset = 1'b1;
  logic        ld = 1'b0;
  logic [15:0] data_in = '0;
  logic        cs_b, mosi, sclk, busy;
  int          checks = 0, failures = 0;

  spi_master_bus dut (
    .CLK(clk), .RESET(reset), .LD(ld), .DATA_IN(data_in),
    .CS_B(cs_b), .MOSI(mosi), .SCLK(sclk), .BUSY(busy)
  );

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // slave model
  logic [15:0] rx_word;
  int          rx_bits = 0, n_words = 0;
  realtime     t_csfall = -1, t_csrise = -1, t_prev_csfall = -1;
  bit          first_edge;
  logic [15:0] expect_q [$];
  int          n_b2b = 0;
  bit          back_to_back = 0;

  always @(posedge sclk) begin
    check(!cs_b, "SCLK edge only with CS_B low");
    if (first_edge) begin
      check($realtime - t_csfall >= 10.0 && $realtime - t_csfall <= 30.0,
            "first SCLK rise 10-30 ns after CS_B falls");
      first_edge = 0;
    end
    rx_word = {rx_word[14:0], mosi};
    rx_bits++;
  end
  always @(mosi) if (!reset) check(!sclk, "MOSI changes only while SCLK is low");
  always @(negedge cs_b) if (!reset) begin
    if (back_to_back && t_prev_csfall >= 0) begin
      check($realtime - t_prev_csfall == 900.0, "back-to-back words 900 ns apart");
      check($realtime - t_csrise == 100.0, "CS_B high 100 ns between words");
      n_b2b++;
    end
    t_prev_csfall = $realtime;
    t_csfall = $realtime;
    rx_bits = 0;
    first_edge = 1;
  end
  always @(posedge cs_b) if (!reset && t_csfall >= 0) begin
    t_csrise = $realtime;
    check($realtime - t_csfall == 800.0, "CS_B low for 800 ns");
    check(rx_bits == 16, $sformatf("16 SCLK rising edges (got %0d)", rx_bits));
    if (expect_q.size() > 0) begin
      logic [15:0] e;
      e = expect_q.pop_front();
      check(rx_word == e, $sformatf("received %h expected %h", rx_word, e));
    end else check(0, "word without load");
    n_words++;
  end
  always @(posedge clk) if (!reset) check(busy == !cs_b, "BUSY is the inverse of CS_B");

  task automatic load(input logic [15:0] w);
    @(negedge clk);
    ld = 1'b1; data_in = w;
    expect_q.push_back(w);
    @(negedge clk);
    ld = 1'b0; data_in = 16'($urandom);
  endtask

  task automatic wait_done();
    // BUSY rises within two SPI periods of the load, then falls
    @(posedge busy);
    @(negedge busy);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (7) @(posedge clk);
    check(cs_b && !sclk && !mosi, "bus idle after reset");
    // single words with random gaps (random phase against the SPI clock)
    load(16'h798E);
    wait_done();
    for (int i = 0; i < 10; i++) begin
      repeat ($urandom_range(12, 0)) @(posedge clk);
      load(16'($urandom));
      wait_done();
    end
    repeat (500) @(posedge clk);
    // back-to-back words, reloaded one clock after BUSY falls
    back_to_back = 1;
    t_prev_csfall = -1;
    load(16'hFFFF);
    wait_done();
    for (int i = 0; i < 8; i++) begin
      load(i == 0 ? 16'h0000 : 16'($urandom));
      wait_done();
    end
    repeat (20) @(posedge clk);
    check(n_words == 20, $sformatf("20 words sent (got %0d)", n_words));
    check(n_b2b == 8, "back-to-back gaps measured");
    check(expect_q.size() == 0, "every load transmitted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
