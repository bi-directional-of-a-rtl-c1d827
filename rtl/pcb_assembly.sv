// pcb_assembly: an assembled board of NUM_IC testable ICs tested as a daisy
// chain, the top of this design.
//
// TCK, RST, TMS, TIS and Tsig are shared by all ICs; all V_DDS pins share one
// supply, so idds_ua is the sum of every IC's cell current.  TMo of IC#k is
// wired to TMi of IC#k+1, so the SR pulse runs through IC#1 .. IC#NUM_IC in
// turn (in the reverse order when TIS = H) and each interconnect gets its own
// TCK cycle: an i_DDS rise in a given cycle both detects an open and tells
// which interconnect it is on.  Output Do_j of IC#k is wired to input Di_j of
// IC#k+1 by a pcb_net whose open_defect bit cuts it.  The core of each IC
// passes input j to output j, as the buffer chains of the two-IC experiment
// do.  The tester drives IC#1's TMi and Di pads and IC#NUM_IC's TMo and Do
// pads through *_drv and reads them back through *_pad.  The Tsig model is
// stepped by tsig_clk (period TSIG_STEP_NS) and restarts its phase while RST
// is L.
//
// The chain, the shared signals and the two-IC default follow the document;
// the core model and the pad-level interface are this design's choices.
// The sizes used: NUM_IC ICs of N_I inputs, M_I outputs; M_I = N_I is
// required because Do_j of one IC feeds Di_j of the next.
module pcb_assembly
  import bist_pkg::*;
#(
  parameter int NUM_IC = 2,
  parameter int N_I    = 2,
  parameter int M_I    = 2,
  parameter int TSIG_STEP_NS = 10
) (
  input  logic                       tsig_clk,  // Tsig sample clock, period TSIG_STEP_NS
  input  logic                       tck,
  input  logic                       rst_n,
  input  logic                       tms,
  input  logic                       tis,
  input  pin_t                       tmi_drv,
  output pin_t                       tmi_pad,
  input  pin_t                       tmo_drv,
  output pin_t                       tmo_pad,
  input  pin_t [N_I-1:0]             di_drv,
  output pin_t [N_I-1:0]             di_pad,
  input  pin_t [M_I-1:0]             do_drv,
  output pin_t [M_I-1:0]             do_pad,
  input  logic [NUM_IC-2:0][M_I-1:0] open_defect,
  output int                         tsig_mv,
  output int                         idds_ua,
  output logic [NUM_IC-1:0][N_I-1:0] q_all
);

  initial assert (M_I == N_I && NUM_IC >= 2)
    else $fatal(1, "pcb_assembly needs M_I == N_I and NUM_IC >= 2");

  // pad levels seen by, and drives from, each IC
  pin_t [NUM_IC-1:0]          tmi_in, tmi_out, tmo_in, tmo_out;
  pin_t [NUM_IC-1:0][N_I-1:0] di_in, di_out;
  pin_t [NUM_IC-1:0][M_I-1:0] do_in, do_out;
  logic [NUM_IC-1:0][N_I-1:0] core_in;
  int                         idd [NUM_IC];

  // level on a pad driven from either side
  function automatic pin_t merge(pin_t a, pin_t b);
    return a.drv ? a : b;
  endfunction

  tsig_gen #(.STEP_NS(TSIG_STEP_NS)) u_tsig (.sample_clk(tsig_clk), .rst_n, .tsig_mv);

  for (genvar i = 0; i < NUM_IC; i++) begin : g_ic
    test_circuit #(.N_I(N_I), .M_I(M_I)) u_tc (
      .tck, .rst_n, .tms, .tis,
      .tmi_pad_in(tmi_in[i]), .tmi_pad_out(tmi_out[i]),
      .tmo_pad_in(tmo_in[i]), .tmo_pad_out(tmo_out[i]),
      .di_pad_in(di_in[i]),   .di_pad_out(di_out[i]),
      .do_pad_in(do_in[i]),   .do_pad_out(do_out[i]),
      .core_in(core_in[i]),   .core_out(core_in[i]),   // experiment's core
      .tsig_mv, .q(q_all[i]), .idd_ua(idd[i]));
  end

  // board edges: the tester's drivers
  assign tmi_in[0]        = tmi_drv;
  assign tmo_in[NUM_IC-1] = tmo_drv;
  assign tmi_pad = merge(tmi_drv, tmi_out[0]);
  assign tmo_pad = merge(tmo_drv, tmo_out[NUM_IC-1]);
  for (genvar k = 0; k < N_I; k++) begin : g_edge_di
    assign di_in[0][k] = di_drv[k];
    assign di_pad[k]   = merge(di_drv[k], di_out[0][k]);
  end
  for (genvar j = 0; j < M_I; j++) begin : g_edge_do
    assign do_in[NUM_IC-1][j] = do_drv[j];
    assign do_pad[j]          = merge(do_drv[j], do_out[NUM_IC-1][j]);
  end

  // board interconnects between IC#i and IC#i+1
  for (genvar i = 0; i < NUM_IC - 1; i++) begin : g_link
    // TMo of IC#i to TMi of IC#i+1 (kept intact)
    pcb_net u_tm (.open_defect(1'b0), .a_drv(tmo_out[i]), .b_drv(tmi_out[i+1]),
                  .a_lvl(tmo_in[i]), .b_lvl(tmi_in[i+1]));
    for (genvar j = 0; j < M_I; j++) begin : g_net
      pcb_net u_net (.open_defect(open_defect[i][j]),
                     .a_drv(do_out[i][j]), .b_drv(di_out[i+1][j]),
                     .a_lvl(do_in[i][j]),  .b_lvl(di_in[i+1][j]));
    end
  end

  always_comb begin
    idds_ua = 0;
    for (int i = 0; i < NUM_IC; i++) idds_ua += idd[i];
  end

endmodule
