// feynman_gate: 2x2 reversible controlled-NOT (Feynman) gate.
//
// Mapping (A, B) -> (P, Q) = (A, A xor B). With B tied to 0 it copies A onto
// two lines, which is how the register library avoids fan-out; with two data
// lines on A and B it forms their exclusive-OR (the LFSR feedback).
// Purely combinational. Quantum cost 1.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb begin
    p = a;
    q = a ^ b;
  end

endmodule
