// dir_buffer: one IB or OB of the test circuit, two opposed tristate buffers
// between a pad and the inside of the IC.
//
// TIS selects which buffer is enabled.  PAD_OUT_WHEN_TIS gives the TIS level
// at which the pad is an output: 1 for an input buffer IB (the pad receives
// while TIS = L, the input interconnects are tested) and 0 for an output
// buffer OB (the pad drives while TIS = L).  When the pad is an output,
// pad_out drives from_core and to_core is left floating; when it is an input,
// pad_out floats and to_core carries the pad level, floating or not, so that
// a cell behind it can see an open interconnect.  Purely combinational.
//
// That IB and OB are two tristate buffers steered by TIS follows the
// document; the polarity assignment per buffer type is this design's reading
// of the two test directions.
module dir_buffer
  import bist_pkg::*;
#(
  parameter bit PAD_OUT_WHEN_TIS = 1'b1
) (
  input  logic tis,
  input  pin_t pad_in,
  output pin_t pad_out,
  output pin_t to_core,
  input  logic from_core
);

  logic pad_is_out;
  assign pad_is_out = (tis == PAD_OUT_WHEN_TIS);

  always_comb begin
    if (pad_is_out) begin
      pad_out = drive(from_core);
      to_core = PIN_Z;
    end else begin
      pad_out = PIN_Z;
      to_core = pad_in;
    end
  end

endmodule
