// spi_shift_reg_tb: loads random 16-bit words and checks that they leave q
// MSB first, one bit per shift, that the register holds without shift, that
// load overrides shift, and that zeros follow the word.
module spi_shift_reg_tb;
  logic        clk = 1'b0, reset = 1'b1;
  logic        ld = 1'b0, shift = 1'b0, q;
  logic [15:0] d = '0;
  int          checks = 0, failures = 0;

  spi_shift_reg #(.WIDTH(16)) dut (.clk, .reset, .ld, .d, .shift, .q);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [15:0] w;
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    #1 check(q == 1'b0, "cleared by reset");
    for (int t = 0; t < 50; t++) begin
      w = 16'($urandom);
      if (t == 0) w = 16'h798E;
      @(negedge clk); ld = 1'b1; d = w; shift = (t % 2 == 1);  // load beats shift
      @(negedge clk); ld = 1'b0; shift = 1'b0; d = ~w;
      for (int b = 15; b >= 0; b--) begin
        check(q == w[b], $sformatf("bit %0d of %h", b, w));
        // hold a random number of cycles without shift
        repeat ($urandom_range(2, 0)) begin
          @(negedge clk);
          check(q == w[b], "hold without shift");
        end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
      check(q == 1'b0, "zeros after the word");
    end
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
