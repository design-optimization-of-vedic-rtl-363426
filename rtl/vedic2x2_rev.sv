// vedic2x2_rev: 2x2 Urdhva Tiryakbhyam ("vertically and crosswise")
// multiplier in reversible logic, q = a * b.
//
// The four product bits are
//   q0 = a0 b0                       (vertical, LSBs)
//   q1 = a1 b0 xor a0 b1             (crosswise)
//   q2 = (a0 a1 b0 b1) xor a1 b1     (vertical, MSBs, plus the cross carry)
//   q3 = a0 a1 b0 b1                 (carry out)
// and are built from five gates so that every signal, primary inputs
// included, drives exactly one gate input:
//   BVPPG (a0, b0, 0, b1, 0) -> a0 (garbage), b0, q0 = a0b0, b1, a0b1
//   PG    (a1, b0, 0)        -> a1, garbage, a1b0
//   PG    (a1, b1, 0)        -> garbage, garbage, a1b1
//   PG    (a0b1, a1b0, 0)    -> garbage, q1, a0a1b0b1
//   FG    (a0a1b0b1, a1b1)   -> q3, q2
// 5 gates, 5 constant inputs, 5 garbage outputs, quantum cost 23.
// Combinational. The gate arrangement is the published one; the Feynman
// gate's outputs are assigned so that q2 and q3 meet the equations above,
// and the garbage order (BVPPG A copy, PG1 Q, PG2 P, PG2 Q, PG3 P) is this
// design's own.
module vedic2x2_rev (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q,
  output logic [4:0] garbage
);
  logic b0_c, b1_c, a1_c;        // copies passed on by the gates
  logic a0b1, a1b0, a1b1, a0a1b0b1;

  bvppg_gate u_bvppg (
    .a(a[0]), .b(b[0]), .c(1'b0), .d(b[1]), .e(1'b0),
    .p(garbage[0]), .q(b0_c), .r(q[0]), .s(b1_c), .t(a0b1)
  );

  peres_gate u_pg1 (
    .a(a[1]), .b(b0_c), .c(1'b0),
    .p(a1_c), .q(garbage[1]), .r(a1b0)
  );

  peres_gate u_pg2 (
    .a(a1_c), .b(b1_c), .c(1'b0),
    .p(garbage[2]), .q(garbage[3]), .r(a1b1)
  );

  peres_gate u_pg3 (
    .a(a0b1), .b(a1b0), .c(1'b0),
    .p(garbage[4]), .q(q[1]), .r(a0a1b0b1)
  );

  feynman_gate u_fg (
    .a(a0a1b0b1), .b(a1b1),
    .p(q[3]), .q(q[2])
  );
endmodule
