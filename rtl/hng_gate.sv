// hng_gate: 4x4 reversible HNG gate.
//
// (A, B, C, D) -> (P, Q, R, S) = (A, B, A xor B xor C, (A xor B)C xor AB xor D).
// With D = 0, R is the full-adder sum of A, B, C and S the carry, so one HNG
// gate is a complete one-bit full adder (A and B come out as garbage). The
// mapping is a bijection on {0,1}^4. Quantum cost 6. Combinational, no
// timing. The gate function is the published one; port names are this
// library's.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = b;
  assign r = a ^ b ^ c;
  assign s = ((a ^ b) & c) ^ (a & b) ^ d;
endmodule
