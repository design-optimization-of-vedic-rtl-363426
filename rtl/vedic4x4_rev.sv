// vedic4x4_rev: 4x4 unsigned multiplier, r = a * b, built from reversible
// gates on the Urdhva Tiryakbhyam ("vertically and crosswise") scheme.
//
// Each operand is split into 2-bit halves and four reversible 2x2
// multipliers form the sub-products
//   I = a[1:0]*b[1:0]   J = a[3:2]*b[1:0]   K = a[1:0]*b[3:2]   L = a[3:2]*b[3:2]
// so that a*b = I + (J + K)*4 + L*16. The sub-products are summed by
//   - a 4-bit adder:         r3..r0   + c1 = J + K
//   - a 4-bit adder:         R5..R2   + c2 = r3..r0 + {L1, L0, I3, I2}
//   - a Peres half adder:    {hc, hs}      = c1 + c2
//   - a 2-bit adder:         R7R6          = {L3, L2} + {hc, hs}
// and R1R0 = I1I0. The 2-bit adder's carry would weigh 256, which no 4x4
// product reaches, so it is always 0; it is left out of the product and
// brought out as c_last. Every other unused gate output is a garbage bit.
// Unlike an earlier reversible arrangement that added the sub-products at
// the wrong place values (correct only while a[3:2] or b[3:2] is zero), this
// network is exact for all 256 operand pairs.
//
// Totals: 31 gates, 31 constant inputs, 38 garbage outputs, quantum cost
// 150 (rev_pkg::COST_V4X4; an elaboration check ties the garbage port
// width to it). Purely combinational: no clock, the result is
// valid one propagation delay after the operands. The adder network follows
// the published block diagram; the port list and the garbage bit order
// (2x2 I, J, K, L, then the adders in the order listed above) are this
// design's own.
module vedic4x4_rev (
  input  logic [3:0]  a,
  input  logic [3:0]  b,
  output logic [7:0]  r,
  output logic        c_last,
  output logic [37:0] garbage
);
  logic [3:0] i_p, j_p, k_p, l_p;   // sub-products I, J, K, L
  logic [3:0] sum_jk;               // r3..r0
  logic       c1, c2, hs, hc;

  vedic2x2_rev u_mul_i (.a(a[1:0]), .b(b[1:0]), .q(i_p), .garbage(garbage[4:0]));
  vedic2x2_rev u_mul_j (.a(a[3:2]), .b(b[1:0]), .q(j_p), .garbage(garbage[9:5]));
  vedic2x2_rev u_mul_k (.a(a[1:0]), .b(b[3:2]), .q(k_p), .garbage(garbage[14:10]));
  vedic2x2_rev u_mul_l (.a(a[3:2]), .b(b[3:2]), .q(l_p), .garbage(garbage[19:15]));

  rca4_rev u_add_jk (
    .a(k_p), .b(j_p), .s(sum_jk), .cout(c1), .garbage(garbage[26:20])
  );

  rca4_rev u_add_mid (
    .a({l_p[1:0], i_p[3:2]}), .b(sum_jk), .s(r[5:2]), .cout(c2), .garbage(garbage[33:27])
  );

  peres_ha u_ha (
    .a(c1), .b(c2), .s(hs), .c(hc), .garbage(garbage[34])
  );

  rca2_rev u_add_hi (
    .a(l_p[3:2]), .b({hc, hs}), .s(r[7:6]), .cout(c_last), .garbage(garbage[37:35])
  );

  assign r[1:0] = i_p[1:0];

  // The garbage port must carry exactly the garbage outputs counted in the
  // cost bookkeeping.
  if ($bits(garbage) != rev_pkg::COST_V4X4.garbage) begin : g_garbage_width_check
    $error("garbage port width differs from rev_pkg::COST_V4X4.garbage");
  end
endmodule
