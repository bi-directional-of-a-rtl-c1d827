// test_circuit: the built-in test circuit TC of one IC with N_I targeted
// input interconnects (Di) and M_I targeted output interconnects (Do).
//
// It holds N_I+1 input buffers (IB_1 on TMi, IB_2.. on Di), M_I+1 output
// buffers (OB_1 on TMo, OB_2.. on Do), the shift register SR and N_I cells.
// TIS sets the test direction:
//   TIS = L  Di pads and TMi are inputs, Do pads and TMo are outputs.  The SR
//            takes its input from TMi and sends Q_N out on TMo; cell k senses
//            Di_k and feeds the core; Do_j carries core output j.
//   TIS = H  every buffer turns round.  The SR takes its input from the TMo
//            pad and sends Q_N out on the TMi pad; cell k senses Do_k and its
//            output is driven out on Di_k, so levels applied to the last IC's
//            Do pads pass backwards through each IC to the one before it.
// TMS = H is normal mode (cells pass their pin to the core), TMS = L test
// mode.  RST = L initializes; after RST and the SR input go H the SR pulse
// selects cell 1, 2, .. N_I on successive TCK cycles, and a cell whose pin is
// open makes the inverter current idd_ua rise with Tsig during its cycle.
//
// Pads are pin_t pairs: *_pad_in is what the board drives onto the pad from
// outside (floating when nothing outside drives it), *_pad_out what this IC
// drives onto it.  All pad paths are combinational; only the SR is clocked.
//
// The block list and the two directions follow the document.  How the
// reverse buffers of IB_1/OB_1 reach the SR, that cell k senses Do_k in the
// reverse direction (cells beyond M_I then see a driven L) and that cell
// outputs drive the Di pads in that direction are this design's reading.
module test_circuit
  import bist_pkg::*;
#(
  parameter int N_I = 2,
  parameter int M_I = 2
) (
  input  logic           tck,
  input  logic           rst_n,
  input  logic           tms,
  input  logic           tis,
  input  pin_t           tmi_pad_in,
  output pin_t           tmi_pad_out,
  input  pin_t           tmo_pad_in,
  output pin_t           tmo_pad_out,
  input  pin_t [N_I-1:0] di_pad_in,
  output pin_t [N_I-1:0] di_pad_out,
  input  pin_t [M_I-1:0] do_pad_in,
  output pin_t [M_I-1:0] do_pad_out,
  output logic [N_I-1:0] core_in,
  input  logic [M_I-1:0] core_out,
  input  int             tsig_mv,
  output logic [N_I-1:0] q,
  output int             idd_ua
);

  pin_t           ib1_in, ob1_in;
  logic           sr_in, sr_out;
  pin_t [N_I-1:0] di_lvl;
  pin_t [M_I-1:0] do_lvl;
  logic [N_I-1:0] cell_fwd, cell_rev;
  int             cell_idd [N_I];

  // IB_1 / OB_1 around the shift register
  dir_buffer #(.PAD_OUT_WHEN_TIS(1'b1)) u_ib1 (
    .tis, .pad_in(tmi_pad_in), .pad_out(tmi_pad_out), .to_core(ib1_in), .from_core(sr_out));
  dir_buffer #(.PAD_OUT_WHEN_TIS(1'b0)) u_ob1 (
    .tis, .pad_in(tmo_pad_in), .pad_out(tmo_pad_out), .to_core(ob1_in), .from_core(sr_out));

  assign sr_in = tis ? (ob1_in.drv & ob1_in.val) : (ib1_in.drv & ib1_in.val);

  shift_register #(.N(N_I)) u_sr (.tck, .rst_n, .sr_in, .q, .sr_out);

  // IB_2 .. IB_{N_I+1} on the input interconnects
  for (genvar k = 0; k < N_I; k++) begin : g_ib
    dir_buffer #(.PAD_OUT_WHEN_TIS(1'b1)) u_ib (
      .tis, .pad_in(di_pad_in[k]), .pad_out(di_pad_out[k]), .to_core(di_lvl[k]),
      .from_core(cell_rev[k]));
  end

  // OB_2 .. OB_{M_I+1} on the output interconnects
  for (genvar j = 0; j < M_I; j++) begin : g_ob
    dir_buffer #(.PAD_OUT_WHEN_TIS(1'b0)) u_ob (
      .tis, .pad_in(do_pad_in[j]), .pad_out(do_pad_out[j]), .to_core(do_lvl[j]),
      .from_core(core_out[j]));
  end

  // Cell_1 .. Cell_{N_I}
  for (genvar k = 0; k < N_I; k++) begin : g_cell
    pin_t do_k;
    if (k < M_I) begin : g_do
      assign do_k = do_lvl[k];
    end else begin : g_nodo
      assign do_k = drive(1'b0);
    end
    tc_cell u_cell (
      .q(q[k]), .tms, .tis, .di_lvl(di_lvl[k]), .do_lvl(do_k), .tsig_mv,
      .out_fwd(cell_fwd[k]), .out_rev(cell_rev[k]), .idd_ua(cell_idd[k]));
  end

  assign core_in = cell_fwd;

  always_comb begin
    idd_ua = 0;
    for (int k = 0; k < N_I; k++) idd_ua += cell_idd[k];
  end

endmodule
