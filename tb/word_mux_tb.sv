// word_mux_tb: checks the result multiplexer and word format in both
// configurations: the final one (zero header, bit 11 inverted) and the DAC
// test one (header 0x7, result unchanged), including the worked values
// 0x98E -> 0x798E and 0xE97 -> 0x7E97.
module word_mux_tb;
  import daq_pkg::*;
  result_t s [NUM_CH];
  ch_sel_t sel;
  word_t   w_final, w_dac;
  int      checks = 0, failures = 0;

  word_mux dut_final (.s_xadc(s), .sel(sel), .data_out(w_final));
  word_mux #(.HEADER(4'h7), .INVERT_MSB(1'b0)) dut_dac (.s_xadc(s), .sel(sel), .data_out(w_dac));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NUM_CH; i++) s[i] = result_t'($urandom);
      if (t == 0) begin s[0] = 12'h98E; s[1] = 12'hE97; s[2] = 12'h000; s[3] = 12'h7FF; end
      for (int k = 0; k < NUM_CH; k++) begin
        sel = ch_sel_t'(k);
        #1;
        check(w_final == {4'h0, ~s[k][11], s[k][10:0]},
              $sformatf("final word ch%0d %h -> %h", k, s[k], w_final));
        check(w_dac == {4'h7, s[k]}, $sformatf("dac word ch%0d %h -> %h", k, s[k], w_dac));
      end
      if (t == 0) begin
        sel = 0; #1 check(w_dac == 16'h798E, "0x98E -> 0x798E");
        sel = 1; #1 check(w_dac == 16'h7E97, "0xE97 -> 0x7E97");
        sel = 2; #1 check(w_final == 16'h0800, "bipolar zero -> mid-scale");
        sel = 3; #1 check(w_final == 16'h0FFF, "bipolar +full scale -> 0xFFF");
      end
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
