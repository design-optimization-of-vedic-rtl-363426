// peres_gate: 3x3 reversible Peres gate.
//
// (A, B, C) -> (P, Q, R) = (A, A xor B, AB xor C). With C = 0 it is a half
// adder (Q = sum, R = carry) and also a 2-input AND with copies of its
// inputs. The mapping is a bijection on {0,1}^3. Quantum cost 4.
// Combinational, no timing. The gate function is the published one; port
// names P/Q/R are this library's.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
