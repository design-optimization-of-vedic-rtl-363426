// bvppg_gate: 5x5 reversible BVPPG gate (partial-product generator).
//
// (A, B, C, D, E) -> (P, Q, R, S, T) = (A, B, AB xor C, D, AD xor E).
// With C = E = 0 it produces two partial products at once, AB and AD, and
// passes B and D on so they can be used again (reversible logic allows no
// fan-out). The mapping is a bijection on {0,1}^5. Quantum cost 10.
// Combinational, no timing. The gate function is the published one; port
// names are this library's.
module bvppg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
  assign s = d;
  assign t = (a & d) ^ e;
endmodule
