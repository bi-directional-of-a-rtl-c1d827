// tb_tsig_gen: checks the test signal against T = V_DC + V_AC sin(2 pi f t).
// With a 10 ns sample clock it compares each sample after reset with the
// formula (within 2 mV), checks the 0 V .. 1.6 V swing, measures the period
// between upward crossings of the offset (1000 ns at 1 MHz) and checks that
// reset returns the phase to zero (Tsig = V_DC).
module tb_tsig_gen;
  logic sample_clk = 1'b0, rst_n = 1'b0;
  int tsig_mv;
  int checks = 0, failures = 0;
  int vmin = 99999, vmax = -99999;
  int last_cross = -1, prev = 800;

  tsig_gen dut (.sample_clk, .rst_n, .tsig_mv);

  always #5ns sample_clk = ~sample_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #22ns check(tsig_mv == 800, "reset: phase 0 gives V_DC");
    @(negedge sample_clk) rst_n = 1'b1;
    for (int n = 1; n <= 500; n++) begin
      real expv;
      @(posedge sample_clk); #1ns;
      expv = 800.0 + 800.0 * $sin(6.283185307179586 * 1.0e6 * n * 10.0e-9);
      check(tsig_mv >= int'(expv) - 2 && tsig_mv <= int'(expv) + 2,
            $sformatf("sample %0d: %0d vs %f", n, tsig_mv, expv));
      if (tsig_mv < vmin) vmin = tsig_mv;
      if (tsig_mv > vmax) vmax = tsig_mv;
      if (prev < 800 && tsig_mv >= 800) begin
        if (last_cross >= 0) check(n * 10 - last_cross == 1000, "AC period 1000 ns");
        last_cross = n * 10;
      end
      prev = tsig_mv;
    end
    check(vmin <= 2 && vmin >= -2, "minimum 0 V");
    check(vmax >= 1598 && vmax <= 1600, "maximum 1.6 V");
    rst_n = 1'b0;
    #1ns check(tsig_mv == 800, "reset returns to phase 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
