// tb_tc_cell: self-checking test of the sensing cell model.
//
// Sweeps Tsig from 0 V to 3.3 V for every pin state (driven L, driven H,
// open), both Q levels, both TIS levels and both TMS levels, and compares the
// inverter current with a triangle worked out here in floating point
// (V_i1 = 0.7 V, V_i2 = 2.6 V, 1 mA at V_DD/2, within 2 uA for integer
// rounding) and the cell outputs with the expected multiplexer behaviour.
// It also checks the point of the method: at Tsig's 1.6 V crest an open
// selected pin exceeds i_TH while a driven one draws nothing.
module tb_tc_cell;
  import bist_pkg::*;

  logic q, tms, tis;
  pin_t di_lvl, do_lvl;
  int   tsig_mv, idd_ua;
  logic out_fwd, out_rev;
  int checks = 0, failures = 0;

  tc_cell dut (.q, .tms, .tis, .di_lvl, .do_lvl, .tsig_mv, .out_fwd, .out_rev, .idd_ua);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real tri_ua(real v);
    if (v <= 700.0 || v >= 2600.0) return 0.0;
    if (v <= 1650.0) return 1000.0 * (v - 700.0) / 950.0;
    return 1000.0 * (2600.0 - v) / 950.0;
  endfunction

  initial begin
    for (int s = 0; s < 2; s++)          // TIS
      for (int m = 0; m < 2; m++)        // TMS
        for (int qq = 0; qq < 2; qq++)
          for (int p = 0; p < 3; p++)    // 0: L, 1: H, 2: open
            for (int v = 0; v <= 3300; v += 50) begin
              pin_t tgt, other;
              real  node, exp_i;
              logic exp_out;
              tis = s[0]; tms = m[0]; q = qq[0]; tsig_mv = v;
              tgt   = (p == 2) ? PIN_Z : drive(p[0]);
              other = drive(~p[0]);                   // the pin not selected
              di_lvl = tis ? other : tgt;
              do_lvl = tis ? tgt : other;
              #1ns;
              node  = !q ? 0.0 : (p == 2) ? real'(v) : (p == 1) ? 3300.0 : 0.0;
              exp_i = tri_ua(node);
              check(idd_ua >= int'(exp_i) - 2 && idd_ua <= int'(exp_i) + 2,
                    $sformatf("idd tis=%0d q=%0d pin=%0d tsig=%0d: %0d vs %f", s, qq, p, v, idd_ua, exp_i));
              exp_out = tms ? (p == 1) : (node >= 1650.0);
              check((tis ? out_rev : out_fwd) == exp_out, "selected output");
              check((tis ? out_fwd : out_rev) == 1'b0, "other output idle");
            end
    // detection margin at the Tsig crest
    tis = 0; tms = 0; q = 1; tsig_mv = VDC_MV + VAC_MV; do_lvl = drive(0);
    di_lvl = PIN_Z;     #1ns check(idd_ua >= ITH_UA, "open pin exceeds i_TH");
    di_lvl = drive(1);  #1ns check(idd_ua == 0, "driven H pin draws no current");
    q = 0; di_lvl = PIN_Z; #1ns check(idd_ua == 0, "unselected open pin draws no current");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
