// tsig_gen: model of the test signal generator, an AC source in series with
// a DC offset that feeds the cells through R_S.
//
// It produces tsig_mv = VDC + VAC * sin(2*pi*F_AC*t) in mV, one sample per
// rising edge of sample_clk, whose period must be STEP_NS.  The sine over one
// AC period (1e9 / (F_AC_HZ * STEP_NS) samples) is tabulated at elaboration
// from $sin; a phase counter steps through the table, and rst_n (active low)
// returns it to phase 0.  With the default 0.8 V offset and 0.8 V amplitude
// Tsig swings between 0 V and 1.6 V, about half of V_DD, so an open pin that
// follows Tsig enters the range where both transistors of a cell's inverter
// conduct.  R_S is a parameter for reference only: the cell model treats the
// Tsig path as weak against any driven pin.
//
// Offset, amplitude and R_S follow the document's experiment.  The AC
// frequency has no printed value; 1 MHz (two periods per 500 kHz TCK period)
// is this model's choice, as are the sampled form and the reset.
module tsig_gen
  import bist_pkg::*;
#(
  parameter int VDC     = VDC_MV,
  parameter int VAC     = VAC_MV,
  parameter int F_AC_HZ = 1_000_000,
  parameter int RS      = RS_OHM,
  parameter int STEP_NS = 10
) (
  input  logic sample_clk,
  input  logic rst_n,
  output int   tsig_mv
);

  localparam int  PERIOD = 1_000_000_000 / (F_AC_HZ * STEP_NS);  // samples per AC period
  localparam real TWO_PI = 6.283185307179586;

  typedef int sine_t [PERIOD];

  function automatic sine_t make_sine();
    sine_t t;
    for (int n = 0; n < PERIOD; n++)
      t[n] = VDC + $rtoi(VAC * $sin(TWO_PI * n / PERIOD));
    return t;
  endfunction

  localparam sine_t SINE = make_sine();

  int phase;

  always_ff @(posedge sample_clk or negedge rst_n) begin
    if (!rst_n) phase <= 0;
    else        phase <= (phase >= PERIOD - 1 || phase < 0) ? 0 : phase + 1;
  end

  assign tsig_mv = SINE[phase];

endmodule
