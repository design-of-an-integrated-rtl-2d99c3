// clk_div5_tb: checks the divide-by-5 clock divider against edge times.
// With a 10 ns source clock, clk_out must have a 50 ns period and be high for
// 25 ns (2.5 source periods) on every cycle, and fall_stb must be high for
// exactly one source cycle per output period, sampled at a rising clk edge
// 5 or 10 ns after clk_out fell and while clk_out is low.
module clk_div5_tb;
  logic clk = 1'b0, reset = 1'b1;
  logic clk_out, fall_stb;
  int   checks = 0, failures = 0;

  clk_div5 dut (.clk(clk), .reset(reset), .clk_out(clk_out), .fall_stb(fall_stb));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  realtime t_rise = -1, t_fall = -1;
  int      n_rise = 0, n_stb = 0, stb_since_rise = 0;

  always @(posedge clk_out) if (!reset) begin
    if (t_rise >= 0) check($realtime - t_rise == 50.0, "clk_out period 50 ns");
    if (t_rise >= 0) check(stb_since_rise == 1, "one fall_stb per period");
    t_rise = $realtime;
    stb_since_rise = 0;
    n_rise++;
  end
  always @(negedge clk_out) if (!reset) begin
    if (t_rise >= 0) check($realtime - t_rise == 25.0, "clk_out high 25 ns");
    t_fall = $realtime;
  end
  always @(posedge clk) if (!reset && fall_stb) begin
    n_stb++;
    stb_since_rise++;
    check(clk_out == 1'b0, "clk_out low at fall_stb");
    if (t_fall >= 0) check($realtime - t_fall == 5.0 || $realtime - t_fall == 10.0,
                           "fall_stb 5-10 ns after clk_out falls");
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 reset = 1'b0;
    repeat (200) @(posedge clk);
    // reset again, released on the other clock phase
    @(negedge clk); reset = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk); #1 reset = 1'b0;
    t_rise = -1; t_fall = -1;
    repeat (200) @(posedge clk);
    check(n_rise >= 75, "clk_out toggled");
    check(n_stb >= 75, "fall_stb pulsed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
