// pcb_net: behavioural model of one PCB interconnect between an output pad
// (end x) of one IC and an input pad (end y) of the next.
//
// Each end offers its own drive (a_drv, b_drv) and receives what the far end
// drives (a_lvl, b_lvl).  An intact net carries each end's drive to the other
// end.  With open_defect = 1 the net is cut and both ends receive nothing, so
// a receiving pad floats, which is the defect the test circuit detects.
// Giving each end only the far end's drive, not the merged net level, keeps a
// pad's own driver out of its input path.  The parasitic R_P = 0.1 Ohm and C_P = 10 pF of
// the experiment give a time constant of 1 ps, far below a TCK period, and are
// kept only as parameters.  Both ends driving an intact net at once is a
// contention and is flagged by an assertion.
module pcb_net
  import bist_pkg::*;
#(
  parameter int RP_MOHM = 100,
  parameter int CP_PF   = 10
) (
  input  logic open_defect,
  input  pin_t a_drv,
  input  pin_t b_drv,
  output pin_t a_lvl,
  output pin_t b_lvl
);

  assign a_lvl = open_defect ? PIN_Z : b_drv;
  assign b_lvl = open_defect ? PIN_Z : a_drv;

  always_comb begin
    if (!open_defect)
      a_no_contention: assert final (!(a_drv.drv && b_drv.drv))
        else $error("pcb_net: both ends drive the interconnect");
  end

endmodule
