// tb_pcb_assembly: end-to-end test of the board, two testable ICs with two
// targeted inputs and two targeted outputs each, all parameters at their
// defaults.
//
// It replays the two-IC experiment: TCK and Di_1 at 500 kHz, Di_2 held H,
// normal mode first, then RST released and TMi raised in test mode.  Each
// test run walks the SR pulse through both ICs (four TCK cycles, one per
// interconnect) and records the peak supply current of every cycle.  From
// the cycle in which i_DDS >= i_TH the bench locates the open interconnect
// and compares it with the one it injected.  Runs cover the defect-free
// board and every single open, in both test directions (TIS = L: input
// interconnects sensed at the receiving IC's Di; TIS = H: output
// interconnects sensed at the receiving IC's Do), plus an open tester
// connection on IC#1's Di.  Each mechanism seen is counted and one never
// seen is a failure.
module tb_pcb_assembly;
  import bist_pkg::*;
  localparam int NUM_IC = 2, N_I = 2, M_I = 2;
  localparam int SLOTS = NUM_IC * N_I;

  logic tck = 1'b0, rst_n = 1'b0, tms = 1'b1, tis = 1'b0;
  pin_t tmi_drv = PIN_Z, tmo_drv = PIN_Z, tmi_pad, tmo_pad;
  pin_t [N_I-1:0] di_drv, di_pad;
  pin_t [M_I-1:0] do_drv, do_pad;
  logic [NUM_IC-2:0][M_I-1:0] open_defect = '0;
  int tsig_mv, idds_ua;
  logic [NUM_IC-1:0][N_I-1:0] q_all;

  int checks = 0, failures = 0;
  int cyc_max;
  logic di1_clk = 1'b1;       // Di_1: 500 kHz square wave
  bit   di_tester_open [N_I];

  // mechanism counters
  int n_normal = 0, n_init = 0, n_single = 0, n_handoff = 0, n_fwd = 0, n_rev = 0;
  int n_detect = 0, n_located = 0, n_clean = 0;

  logic tsig_clk = 1'b0;
  always #5ns tsig_clk = ~tsig_clk;

  pcb_assembly dut (
    .tsig_clk, .tck, .rst_n, .tms, .tis, .tmi_drv, .tmi_pad, .tmo_drv, .tmo_pad,
    .di_drv, .di_pad, .do_drv, .do_pad, .open_defect, .tsig_mv, .idds_ua, .q_all);

  always #1000ns tck = ~tck;
  always #1000ns di1_clk = ~di1_clk;

  // tester drives IC#1's Di pads only while the input interconnects are tested
  always_comb begin
    for (int k = 0; k < N_I; k++)
      di_drv[k] = (tis || di_tester_open[k]) ? PIN_Z : drive(k == 0 ? di1_clk : 1'b1);
  end

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

  // Which SR output is expected H in slot s (1-based), as {IC, cell}.
  function automatic logic [NUM_IC-1:0][N_I-1:0] expect_q(int s, bit rev);
    logic [NUM_IC-1:0][N_I-1:0] e = '0;
    int ic, cl;
    if (s >= 1 && s <= SLOTS) begin
      ic = (s - 1) / N_I;
      cl = (s - 1) % N_I;
      if (rev) ic = NUM_IC - 1 - ic;
      e[ic][cl] = 1'b1;
    end
    return e;
  endfunction

  // One complete test: initialization, then the pulse through all ICs.
  // exp_slot: slot in which the open is expected to show, 0 for none.
  task automatic run_test(input bit rev, input int exp_slot, input string tag);
    int peak, hits, first;
    bit held;
    @(negedge tck);
    rst_n = 1'b0; tms = 1'b0; tis = rev; tmi_drv = PIN_Z; tmo_drv = PIN_Z;
    do_drv = rev ? '{drive(1'b1), drive(1'b0)} : '{PIN_Z, PIN_Z};
    repeat (2) begin
      cycle(peak);
      check(q_all == '0 && peak < ITH_UA, {tag, ": initialization"});
      if (q_all == '0 && peak < ITH_UA) n_init++;
    end
    @(negedge tck) rst_n = 1'b1;
    #300ns if (rev) tmo_drv = drive(1'b1); else tmi_drv = drive(1'b1);
    hits = 0; first = 0; held = 1'b1;
    for (int s = 1; s <= SLOTS + 3; s++) begin
      cycle(peak);
      check(q_all == expect_q(s, rev), $sformatf("%s: SR outputs in slot %0d", tag, s));
      if (s == N_I + 1 && q_all == expect_q(s, rev)) n_handoff++;
      if (s > SLOTS) held &= (q_all == '0);
      check(peak <= IPEAK_UA, $sformatf("%s: current bounded in slot %0d", tag, s));
      if (peak >= ITH_UA) begin
        hits++;
        if (first == 0) first = s;
      end
    end
    if (held) n_single++;     // TMi/TMo stayed H: no second pulse
    if (rev) n_rev++; else n_fwd++;
    if (exp_slot == 0) begin
      check(hits == 0, {tag, ": defect-free board draws no current"});
      if (hits == 0) n_clean++;
    end else begin
      check(hits == 1 && first == exp_slot,
            $sformatf("%s: open seen in slot %0d only (hits %0d, first %0d)", tag, exp_slot, hits, first));
      if (hits >= 1) n_detect++;
      if (hits == 1 && first == exp_slot) n_located++;
    end
    tmi_drv = PIN_Z; tmo_drv = PIN_Z;
  endtask

  initial begin
    int peak;
    for (int k = 0; k < N_I; k++) di_tester_open[k] = 1'b0;
    do_drv = '{PIN_Z, PIN_Z};

    // normal mode: Di of IC#1 reaches Do of IC#2 through both ICs
    repeat (3) begin
      cycle(peak);
      check(do_pad[0] == drive(di1_clk) && do_pad[1] == drive(1'b1), "normal mode: data path");
      check(peak < ITH_UA, "normal mode: no current");
      if (do_pad[0] == drive(di1_clk)) n_normal++;
    end

    // input interconnects (TIS = L)
    run_test(1'b0, 0, "fwd clean");
    for (int j = 0; j < M_I; j++) begin
      open_defect = '0; open_defect[0][j] = 1'b1;        // open between IC#1 Do_j and IC#2 Di_j
      run_test(1'b0, N_I + j + 1, $sformatf("fwd open net %0d", j + 1));
    end
    open_defect = '0;
    di_tester_open[1] = 1'b1;                            // IC#1 Di_2 left open
    run_test(1'b0, 2, "fwd open IC#1 Di_2");
    di_tester_open[1] = 1'b0;

    // output interconnects (TIS = H): pulse enters IC#2 first
    run_test(1'b1, 0, "rev clean");
    for (int j = 0; j < M_I; j++) begin
      open_defect = '0; open_defect[0][j] = 1'b1;        // sensed by IC#1 cell j on Do_j
      run_test(1'b1, N_I + j + 1, $sformatf("rev open net %0d", j + 1));
    end
    open_defect = '0;

    $display("mechanisms: normal=%0d init=%0d single_pulse=%0d handoff=%0d fwd=%0d rev=%0d detect=%0d located=%0d clean=%0d",
             n_normal, n_init, n_single, n_handoff, n_fwd, n_rev, n_detect, n_located, n_clean);
    check(n_normal > 0,  "mechanism: normal mode data path");
    check(n_init > 0,    "mechanism: initialization");
    check(n_single > 0,  "mechanism: single SR pulse");
    check(n_handoff > 0, "mechanism: daisy-chain hand-off");
    check(n_fwd > 0,     "mechanism: input-interconnect direction");
    check(n_rev > 0,     "mechanism: output-interconnect direction");
    check(n_detect > 0,  "mechanism: open detected");
    check(n_located > 0, "mechanism: open located");
    check(n_clean > 0,   "mechanism: defect-free pass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
