// rca4_rev: 4-bit reversible ripple-carry adder, s + cout*16 = a + b.
//
// The carry-in is always zero, so bit 0 is a Peres-gate half adder
// (peres_ha). Bits 1..3 are HNG gates used as full adders: inputs A = a[i],
// B = b[i], C = carry from bit i-1, D = constant 0; output R is the sum bit
// and S the carry. The carry of bit 3 is cout. Cost: 4 gates, 4 constant
// inputs, 7 garbage outputs (A and B copies of each HNG gate, A copy of the
// Peres gate), quantum cost 22. Combinational; the carry ripples through the
// three HNG gates. Structure as published; garbage bit order is this
// design's own: garbage[0] is the Peres gate's, then two per HNG gate from
// bit 1 upward (A copy, then B copy).
module rca4_rev (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] s,
  output logic       cout,
  output logic [6:0] garbage
);
  logic [4:1] carry;   // carry[i] enters bit i

  peres_ha u_ha0 (
    .a(a[0]), .b(b[0]), .s(s[0]), .c(carry[1]), .garbage(garbage[0])
  );

  for (genvar i = 1; i < 4; i++) begin : g_fa
    hng_gate u_hng (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
      .p(garbage[2*i-1]), .q(garbage[2*i]), .r(s[i]), .s(carry[i+1])
    );
  end

  assign cout     = carry[4];
endmodule
