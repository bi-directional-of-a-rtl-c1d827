// bist_pkg: types and constants shared by the interconnect test circuit.
//
// A pad or interconnect is modelled as a pin_t pair {drv, val}: drv says
// whether anything drives the node to a logic level, val is that level.  A
// node with drv = 0 is floating; this is the state an open interconnect
// leaves behind, and it is what the sensing cell converts into supply
// current.  Two-valued simulators have no z, so this pair takes the place of
// tristate nets.  Voltages are carried as integers in millivolts and currents
// in microamperes.
//
// Supply voltage, Tsig offset and amplitude and R_S follow the values of the
// two-IC experiment (3.3 V, 0.8 V, 0.8 V, 2.5 kOhm).  The inverter thresholds
// V_i1/V_i2, the peak inverter current and the detection threshold i_TH have
// no printed values and are this design's own choices.
package bist_pkg;

  typedef struct packed {
    logic drv;   // 1: node driven to a logic level, 0: floating
    logic val;   // level when driven
  } pin_t;

  localparam pin_t PIN_Z = '{drv: 1'b0, val: 1'b0};

  localparam int VDD_MV   = 3300;  // V_DDS
  localparam int VDC_MV   = 800;   // Tsig DC offset
  localparam int VAC_MV   = 800;   // Tsig amplitude
  localparam int RS_OHM   = 2500;  // Tsig series resistor
  localparam int VI1_MV   = 700;   // lowest input at which N_1 conducts (assumed)
  localparam int VI2_MV   = 2600;  // highest input at which P_1 conducts (assumed)
  localparam int IPEAK_UA = 1000;  // inverter short-circuit current at V_DD/2 (assumed)
  localparam int ITH_UA   = 100;   // detection threshold i_TH of Eq. (3) (assumed)

  function automatic pin_t drive(input logic v);
    return '{drv: 1'b1, val: v};
  endfunction

endpackage
