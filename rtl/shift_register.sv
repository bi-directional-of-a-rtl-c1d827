// shift_register: the SR of the test circuit, which selects one cell at a
// time.
//
// N D-FFs in a chain clocked by TCK.  The chain input is a two-input AND of
// the SR input (TMi through IB_1, or OB_1 in the other direction) and the
// inverted state of an RS-FF.  The RS-FF is cleared by RST and set by Q_1, so
// however long the SR input stays H, exactly one H pulse of one TCK period is
// launched after each reset; it then moves one D-FF per TCK cycle from Q_1 to
// Q_N and leaves through sr_out (= Q_N) towards the next IC.  RST (active low)
// clears all flip-flops asynchronously: Q_1..Q_N are L during initialization.
//
// Timing: sr_in sampled H on a rising TCK edge gives Q_1 = H for the next
// cycle, Q_k = H in cycle k, sr_out = H in cycle N.
//
// The D-FF chain, the AND gate and the RS-FF follow the document's
// description.  Its RS-FF is level sensitive; here it is a flip-flop set on
// the same TCK edge that loads Q_1, which closes the AND gate at the same
// moment and avoids a latch.  Rising-edge clocking is this design's choice.
module shift_register #(
  parameter int N = 2
) (
  input  logic         tck,
  input  logic         rst_n,
  input  logic         sr_in,
  output logic [N-1:0] q,      // q[k-1] is Q_k
  output logic         sr_out
);

  logic rs_q;       // RS-FF state, 1 once a pulse has been launched
  logic and_out;

  assign and_out = sr_in & ~rs_q;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      rs_q <= 1'b0;
    end else begin
      q    <= N'({q, and_out});       // Q_1 <= AND output, Q_k <= Q_{k-1}
      rs_q <= rs_q | and_out;   // S input driven by Q_1
    end
  end

  assign sr_out = q[N-1];

  // At most one cell is selected at a time.
  a_onehot: assert property (@(posedge tck) disable iff (!rst_n) $onehot0(q));

endmodule
