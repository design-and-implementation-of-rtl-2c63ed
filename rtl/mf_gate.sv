// mf_gate: 3x3 modified Fredkin (MF) reversible gate, quantum cost 4.
//
// Mapping (A, B, C) -> (P, Q, R) = (A', A'B + AC, AB + A'C): the controlled
// swap of a Fredkin gate with the control line inverted on its way out. The
// document names this gate, its cost and two facts about it: driven as
// (E, Q, D) its Q output is the latch equation Q+ = D.E + E'.Q, and a
// flip-flop that takes its clock from an MF gate's first output sees the
// clock inverted. This mapping is the one that meets both; the exact gate
// is otherwise this design's own reading. It is reversible: a
// bijection on the eight input patterns. Purely combinational.
module mf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = ~a;
    q = a ? c : b;
    r = a ? b : c;
  end

endmodule
