// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// (A, B) -> (P, Q) = (A, A xor B). With A = 1 the gate inverts B, with B = 0
// it copies A, which is how a reversible circuit gets fan-out. The mapping is
// a bijection on {0,1}^2. Quantum cost 1. Combinational, no timing.
// The gate function is the published one; port names P/Q are this library's.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
