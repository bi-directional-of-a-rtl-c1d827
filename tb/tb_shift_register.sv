// tb_shift_register: self-checking test of the SR.
//
// Drives the SR input as the first IC of a chain sees it (a step that stays H)
// and as a later IC sees it (a one-cycle pulse), and checks every cycle that
// exactly one H pulse walks Q_1 .. Q_N, one stage per TCK, starting on the
// first rising edge after the input goes H, that no second pulse is launched
// while the input stays H, and that RST clears everything.
module tb_shift_register;
  localparam int N = 4;

  logic tck = 1'b0, rst_n = 1'b0, sr_in = 1'b0;
  logic [N-1:0] q;
  logic sr_out;
  int checks = 0, failures = 0;

  shift_register #(.N(N)) dut (.tck, .rst_n, .sr_in, .q, .sr_out);

  always #1000ns tck = ~tck;   // 500 kHz TCK

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%b sr_out=%b)", what, q, sr_out); end
  endtask

  // expected Q after 'k' rising edges since the input was first sampled H
  function automatic logic [N-1:0] expect_q(int k);
    return (k >= 1 && k <= N) ? N'(1) << (k - 1) : '0;
  endfunction

  task automatic run_pulse(input bit hold_input, input string tag);
    @(negedge tck) sr_in = 1'b1;
    for (int k = 1; k <= N + 4; k++) begin
      @(posedge tck); #1ns;
      if (!hold_input) sr_in = 1'b0;
      check(q == expect_q(k), $sformatf("%s Q after edge %0d", tag, k));
      check(sr_out == (k == N), $sformatf("%s sr_out after edge %0d", tag, k));
    end
  endtask

  initial begin
    repeat (2) @(posedge tck);
    #1ns check(q == '0 && !sr_out, "cleared in reset");
    sr_in = 1'b1;                     // TMi rises while RST is still L
    @(posedge tck) #1ns check(q == '0, "no pulse during reset");
    sr_in = 1'b0;
    @(negedge tck) rst_n = 1'b1;
    @(posedge tck) #1ns check(q == '0, "idle after reset");
    run_pulse(1'b1, "step");          // step input: one pulse only
    // asynchronous reset mid-pulse, then a one-cycle input pulse
    @(negedge tck) rst_n = 1'b0; sr_in = 1'b0;
    #1ns check(q == '0, "async reset");
    @(negedge tck) rst_n = 1'b1;
    run_pulse(1'b0, "pulse");
    // after a pulse has been launched, a new input pulse is ignored
    @(negedge tck) sr_in = 1'b1;
    @(negedge tck) sr_in = 1'b0;
    repeat (N + 1) begin
      @(posedge tck) #1ns check(q == '0, "RS-FF blocks a second pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
