// loader_fsm_tb: runs the loader against a model of the SPI master's BUSY
// output (low for a random 1..12 clocks after each LOAD, then high for a
// random 3..40 clocks) and checks that every START produces exactly four
// one-clock LOAD pulses, with SEL = 0, 1, 2, 3 at those pulses; that LOAD
// comes one clock after START and one clock after BUSY falls; that no LOAD
// is issued while a transaction is pending or running; that SEL returns to 0
// and the FSM idles until the next START; and that a START during a round is
// ignored.
module loader_fsm_tb;
  import daq_pkg::*;
  logic    clk = 1'b0, reset = 1'b1;
  logic    start = 1'b0, busy = 1'b0;
  ch_sel_t sel;
  logic    load;
  int      checks = 0, failures = 0;

  loader_fsm dut (.CLK(clk), .RESET(reset), .START(start), .BUSY(busy), .SEL(sel), .LOAD(load));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // BUSY model: a load starts a transaction after a delay
  int  pend = -1, run = 0;
  bit  in_txn = 0;
  int  loads_in_round = 0;
  int  cyc_since_start = -1, cyc_since_busy_fall = -1;
  bit  busy_q = 0;

  always @(posedge clk) if (!reset) begin
    // checks on what the DUT drives in this cycle
    if (load) begin
      check(!in_txn, "LOAD only when no transaction pending or running");
      check(sel == ch_sel_t'(loads_in_round), $sformatf("SEL %0d at load %0d", sel, loads_in_round));
      if (loads_in_round == 0) check(cyc_since_start == 1, "first LOAD one clock after START");
      else check(cyc_since_busy_fall == 1, "next LOAD one clock after BUSY falls");
      loads_in_round++;
      in_txn = 1;
      pend   = $urandom_range(12, 1);
    end
    // BUSY model
    if (pend > 0) begin
      pend--;
      if (pend == 0) begin busy <= 1'b1; run = $urandom_range(40, 3); pend = -1; end
    end else if (busy && run > 0) begin
      run--;
      if (run == 0) begin busy <= 1'b0; in_txn = 0; end
    end
    if (cyc_since_start >= 0) cyc_since_start++;
    if (cyc_since_busy_fall >= 0) cyc_since_busy_fall++;
    if (busy_q && !busy) cyc_since_busy_fall = 1;
    busy_q = busy;
  end

  always @(posedge clk) if (!reset && load) @(posedge clk) check(!load, "LOAD is one clock long");

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    repeat (5) @(posedge clk);
    check(!load && sel == 0, "idle after reset");
    for (int r = 0; r < 30; r++) begin
      loads_in_round = 0;
      @(negedge clk); start = 1'b1;
      @(posedge clk); cyc_since_start = 0;
      @(negedge clk); start = 1'b0;
      // a stray START in the middle of the round must be ignored
      if (r % 3 == 1) begin
        wait (loads_in_round == 2);
        @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
      end
      // wait for four transactions to complete
      wait (loads_in_round == 4 && !in_txn);
      repeat (30) @(posedge clk);
      check(loads_in_round == 4, $sformatf("four loads per START (got %0d)", loads_in_round));
      check(sel == 0, "SEL back to 0 after the round");
      cyc_since_start = -1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
