// tb_test_circuit: self-checking test of the test circuit of one IC with
// three targeted inputs and two targeted outputs.
//
// Three phases, each with RST applied first:
//   normal mode   (TMS = H) Di levels must reach the core, no current flows.
//   input test    (TIS = L) Di_1 = H, Di_2 open, Di_3 = L; TMi held H.  The
//                 SR must select cell 1, 2, 3 on the first three TCK cycles
//                 after TMi rises, the current must reach i_TH only in cycle 2,
//                 Do pads must carry the core outputs and TMo must carry Q_3.
//   output test   (TIS = H) Do_1 open, Do_2 = H; the pulse enters on the TMo
//                 pad.  Current only in cycle 1, cell 2 must drive H out on
//                 Di_2 in cycle 2, cell 3 (no Do_3) never draws current, and
//                 the TMi pad must carry Q_3.
// The peak current of each TCK cycle is sampled every 10 ns.
module tb_test_circuit;
  import bist_pkg::*;
  localparam int N_I = 3, M_I = 2;

  logic tck = 1'b0, rst_n = 1'b0, tms = 1'b1, tis = 1'b0;
  pin_t tmi_pad_in = PIN_Z, tmo_pad_in = PIN_Z, tmi_pad_out, tmo_pad_out;
  pin_t [N_I-1:0] di_pad_in, di_pad_out;
  pin_t [M_I-1:0] do_pad_in, do_pad_out;
  logic [N_I-1:0] core_in, q;
  logic [M_I-1:0] core_out = 2'b10;
  int tsig_mv, idd_ua;
  int checks = 0, failures = 0;
  int cyc_max;

  logic tsig_clk = 1'b0;
  always #5ns tsig_clk = ~tsig_clk;
  tsig_gen u_tsig (.sample_clk(tsig_clk), .rst_n(1'b1), .tsig_mv);
  test_circuit #(.N_I(N_I), .M_I(M_I)) dut (
    .tck, .rst_n, .tms, .tis, .tmi_pad_in, .tmi_pad_out, .tmo_pad_in, .tmo_pad_out,
    .di_pad_in, .di_pad_out, .do_pad_in, .do_pad_out, .core_in, .core_out,
    .tsig_mv, .q, .idd_ua);

  always #1000ns tck = ~tck;

  // peak current since the last rising TCK edge
  always begin
    @(posedge tck) cyc_max = 0;
    repeat (199) begin
      #10ns if (idd_ua > cyc_max) cyc_max = idd_ua;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // wait to the middle of the next cycle, check state, then collect its peak
  task automatic cycle(output int peak);
    @(posedge tck); #1ns;
    @(negedge tck); #990ns;
    peak = cyc_max;
  endtask

  int peak;

  initial begin
    di_pad_in = '{drive(1'b0), drive(1'b1), drive(1'b1)};
    do_pad_in = '{PIN_Z, PIN_Z};
    // normal mode while RST is L
    repeat (2) begin
      cycle(peak);
      check(core_in == 3'b011, "normal mode: Di levels reach the core");
      check(peak == 0, "normal mode: no current");
      check(q == '0, "normal mode: SR cleared");
    end

    // input interconnect test
    tms = 1'b0;
    di_pad_in = '{drive(1'b0), PIN_Z, drive(1'b1)};
    cycle(peak);
    check(peak == 0 && core_in == '0, "initialization: no current, cells give L");
    @(negedge tck) rst_n = 1'b1;
    #300ns tmi_pad_in = drive(1'b1);
    for (int k = 1; k <= N_I + 2; k++) begin
      cycle(peak);
      check(q == ((k <= N_I) ? N_I'(1) << (k - 1) : '0), $sformatf("fwd: Q one-hot in cycle %0d", k));
      check((peak >= ITH_UA) == (k == 2), $sformatf("fwd: detection in cycle %0d (peak %0d uA)", k, peak));
      check(core_in == ((k == 1) ? 3'b001 : 3'b000), $sformatf("fwd: core inputs in cycle %0d", k));
      check(do_pad_out == '{drive(1'b1), drive(1'b0)}, "fwd: Do pads carry the core outputs");
      check(tmo_pad_out == drive(k == N_I), "fwd: TMo carries Q_N");
      check(!tmi_pad_out.drv && !di_pad_out[0].drv && !di_pad_out[1].drv && !di_pad_out[2].drv,
            "fwd: input pads not driven");
    end

    // output interconnect test
    @(negedge tck) rst_n = 1'b0; tmi_pad_in = PIN_Z; tis = 1'b1;
    di_pad_in = '{PIN_Z, PIN_Z, PIN_Z};
    do_pad_in = '{drive(1'b1), PIN_Z};
    cycle(peak);
    check(peak == 0, "reverse initialization: no current");
    @(negedge tck) rst_n = 1'b1;
    #300ns tmo_pad_in = drive(1'b1);
    for (int k = 1; k <= N_I + 2; k++) begin
      cycle(peak);
      check(q == ((k <= N_I) ? N_I'(1) << (k - 1) : '0), $sformatf("rev: Q one-hot in cycle %0d", k));
      check((peak >= ITH_UA) == (k == 1), $sformatf("rev: detection in cycle %0d (peak %0d uA)", k, peak));
      check(di_pad_out == '{drive(1'b0), drive(k == 2), drive(1'b0)}, $sformatf("rev: Di pads in cycle %0d", k));
      check(tmi_pad_out == drive(k == N_I), "rev: TMi pad carries Q_N");
      check(!tmo_pad_out.drv && !do_pad_out[0].drv && !do_pad_out[1].drv, "rev: output pads not driven");
    end

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
