// tc_cell: behavioural model of one sensing cell of the test circuit.  It is a
// model of a mixed-signal part (transmission gates, a pass transistor and an
// inverter used as a current sensor), not synthesizable logic.
//
// The input multiplexer picks the targeted pin: Di_k while TIS = L, Do_k
// while TIS = H.  With Q_k = L, AS_1 and AS_2 are off and NM_1 pulls the
// inverter input to ground.  With Q_k = H, AS_1 joins the pin to the inverter
// input and AS_2 joins Tsig to it through R_S, and NM_1 is off: a pin driven
// to H or L by the other IC overrides the weak Tsig path and the node sits at
// V_DD or 0 V, while an open pin leaves the node to follow Tsig.  The
// inverter draws short-circuit current whenever its input lies between V_i1
// and V_i2 (Fig. 1 of the method); here that current is a triangle peaking at
// IPEAK_UA for V_DD/2 and falling to 0 at V_i1 and V_i2.  The output
// multiplexer passes the pin level in normal mode (TMS = H) and the inverter
// input level in test mode (TMS = L), so a cell not under test gives L.
//
// Interface: all inputs and outputs are combinational; node_mv and idd_ua
// follow tsig_mv immediately.  Voltages are mV, currents uA.
//
// The switch set and its control by Q_k follow the document.  Which signal
// steers each multiplexer, the ideal (resistance-free) switches, the
// threshold V_DD/2 for the node's logic level, and the triangular current
// shape with its thresholds and peak are this model's own choices.
module tc_cell
  import bist_pkg::*;
#(
  parameter int VI1   = VI1_MV,
  parameter int VI2   = VI2_MV,
  parameter int IPEAK = IPEAK_UA
) (
  input  logic q,
  input  logic tms,
  input  logic tis,
  input  pin_t di_lvl,
  input  pin_t do_lvl,
  input  int   tsig_mv,
  output logic out_fwd,
  output logic out_rev,
  output int   idd_ua
);

  localparam int VM = VDD_MV / 2;

  // Inverter input voltage for a given targeted pin (AS_1, AS_2, NM_1).
  function automatic int node_of(pin_t p, logic sel, int tsig);
    if (!sel)      return 0;                    // NM_1 on, AS_1/AS_2 off
    else if (p.drv) return p.val ? VDD_MV : 0;  // pin overrides Tsig via R_S
    else            return tsig;                // open pin: node follows Tsig
  endfunction

  // Output multiplexer: pin level in normal mode, node level in test mode.
  function automatic logic level_of(pin_t p, logic sel, logic normal, int tsig);
    if (normal) return p.drv & p.val;
    else        return node_of(p, sel, tsig) >= VM;
  endfunction

  int node_mv;

  // input multiplexer: TIS picks the targeted pin
  assign node_mv = node_of(tis ? do_lvl : di_lvl, q, tsig_mv);

  always_comb begin
    if (node_mv <= VI1 || node_mv >= VI2)
      idd_ua = 0;
    else if (node_mv <= VM)
      idd_ua = IPEAK * (node_mv - VI1) / (VM - VI1);
    else
      idd_ua = IPEAK * (VI2 - node_mv) / (VI2 - VM);
  end

  assign out_fwd = !tis && level_of(di_lvl, q, tms, tsig_mv);
  assign out_rev =  tis && level_of(do_lvl, q, tms, tsig_mv);

endmodule
