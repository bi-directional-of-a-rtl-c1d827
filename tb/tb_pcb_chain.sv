// tb_pcb_chain: the board top with a longer daisy chain, four ICs of three
// targeted inputs and outputs each.
//
// For both test directions it runs the defect-free board, every single open
// interconnect, and pairs of opens on different nets, and checks that the
// supply current reaches i_TH in exactly the TCK cycles that select the
// receiving cells of the open nets.  The expected cycles are worked out from
// the chain order: with TIS = L the pulse visits IC#1 .. IC#4, cells 1..3
// each, and an open between IC#i and IC#i+1 on net j is sensed by IC#i+1's
// cell j; with TIS = H the order is IC#4 .. IC#1 and the same open is sensed
// by IC#i's cell j.  It also checks that normal mode carries the tester's
// levels through all four ICs.
module tb_pcb_chain;
  import bist_pkg::*;
  localparam int NUM_IC = 4, N_I = 3, M_I = 3;
  localparam int SLOTS = NUM_IC * N_I;
  localparam int NETS = (NUM_IC - 1) * M_I;

  logic tsig_clk = 1'b0, tck = 1'b0, rst_n = 1'b0, tms = 1'b1, tis = 1'b0;
  pin_t tmi_drv = PIN_Z, tmo_drv = PIN_Z, tmi_pad, tmo_pad;
  pin_t [N_I-1:0] di_drv, di_pad;
  pin_t [M_I-1:0] do_drv, do_pad;
  logic [NUM_IC-2:0][M_I-1:0] open_defect = '0;
  int tsig_mv, idds_ua;
  logic [NUM_IC-1:0][N_I-1:0] q_all;
  int checks = 0, failures = 0, cyc_max;
  int n_single = 0, n_double = 0;

  pcb_assembly #(.NUM_IC(NUM_IC), .N_I(N_I), .M_I(M_I)) dut (
    .tsig_clk, .tck, .rst_n, .tms, .tis, .tmi_drv, .tmi_pad, .tmo_drv, .tmo_pad,
    .di_drv, .di_pad, .do_drv, .do_pad, .open_defect, .tsig_mv, .idds_ua, .q_all);

  always #5ns tsig_clk = ~tsig_clk;
  always #1000ns tck = ~tck;

  always begin
    @(posedge tck) cyc_max = 0;
    repeat (199) begin
      #10ns if (idds_ua > cyc_max) cyc_max = idds_ua;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cycle(output int peak);
    @(posedge tck); #1ns;
    @(negedge tck); #990ns;
    peak = cyc_max;
  endtask

  // slot (1-based) in which an open on net (i, j) is sensed
  function automatic int slot_of(int i, int j, bit rev);
    return rev ? (NUM_IC - 1 - i) * N_I + j + 1 : (i + 1) * N_I + j + 1;
  endfunction

  // run one test; returns the set of slots with i_DDS >= i_TH
  task automatic run_test(input bit rev, output logic [SLOTS:1] seen);
    int peak;
    @(negedge tck);
    rst_n = 1'b0; tms = 1'b0; tis = rev; tmi_drv = PIN_Z; tmo_drv = PIN_Z;
    for (int k = 0; k < N_I; k++) di_drv[k] = rev ? PIN_Z : drive(k[0]);
    for (int j = 0; j < M_I; j++) do_drv[j] = rev ? drive(~j[0]) : PIN_Z;
    repeat (2) cycle(peak);
    @(negedge tck) rst_n = 1'b1;
    #300ns if (rev) tmo_drv = drive(1'b1); else tmi_drv = drive(1'b1);
    seen = '0;
    for (int s = 1; s <= SLOTS + 1; s++) begin
      cycle(peak);
      if (s <= SLOTS) seen[s] = (peak >= ITH_UA);
      else check(peak < ITH_UA && q_all == '0, "pulse has left the chain");
    end
  endtask

  initial begin
    logic [SLOTS:1] seen, want;
    int peak;
    // normal mode through the whole chain
    for (int k = 0; k < N_I; k++) di_drv[k] = drive(k == 1);
    do_drv = '{PIN_Z, PIN_Z, PIN_Z};
    cycle(peak);
    check(do_pad == '{drive(1'b0), drive(1'b1), drive(1'b0)}, "normal mode through four ICs");

    for (int r = 0; r < 2; r++) begin
      open_defect = '0;
      run_test(r[0], seen);
      check(seen == '0, $sformatf("dir %0d: defect-free board", r));
      for (int n = 0; n < NETS; n++) begin
        open_defect = '0;
        open_defect[n / M_I][n % M_I] = 1'b1;
        run_test(r[0], seen);
        want = '0; want[slot_of(n / M_I, n % M_I, r[0])] = 1'b1;
        check(seen == want, $sformatf("dir %0d: single open on net %0d (seen %b)", r, n, seen));
        if (seen == want) n_single++;
      end
      for (int t = 0; t < 3; t++) begin
        int a, b;
        a = $urandom_range(NETS - 1);
        b = (a + 1 + $urandom_range(NETS - 2)) % NETS;
        open_defect = '0;
        open_defect[a / M_I][a % M_I] = 1'b1;
        open_defect[b / M_I][b % M_I] = 1'b1;
        run_test(r[0], seen);
        want = '0;
        want[slot_of(a / M_I, a % M_I, r[0])] = 1'b1;
        want[slot_of(b / M_I, b % M_I, r[0])] = 1'b1;
        check(seen == want, $sformatf("dir %0d: opens on nets %0d and %0d (seen %b)", r, a, b, seen));
        if (seen == want) n_double++;
      end
    end
    check(n_single > 0 && n_double > 0, "single and double opens located");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
