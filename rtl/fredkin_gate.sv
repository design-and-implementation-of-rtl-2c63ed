// fredkin_gate: 3x3 reversible controlled-swap (Fredkin) gate.
//
// Mapping (A, B, C) -> (P, Q, R) = (A, A'B + AC, AB + A'C): B and C pass
// straight through while A = 0 and are swapped while A = 1. The gate is
// conservative (it keeps the number of ones) and is its own inverse.
// In the master-slave flip-flop it is the slave latch, and its P output hands
// the clock on to the next stage unchanged. Purely combinational. Quantum
// cost 5.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = a ? c : b;
    r = a ? b : c;
  end

endmodule
