// rca2_rev: 2-bit reversible ripple-carry adder, s + cout*4 = a + b.
//
// Bit 0 is a Peres-gate half adder (carry-in is zero), bit 1 an HNG gate
// used as a full adder (D = 0). Cost: 2 gates, 2 constant inputs, 3 garbage
// outputs, quantum cost 10. Combinational. Structure as published; garbage
// order is this design's own: {HNG B copy, HNG A copy, Peres A copy}.
module rca2_rev (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] s,
  output logic       cout,
  output logic [2:0] garbage
);
  logic c1;

  peres_ha u_ha0 (
    .a(a[0]), .b(b[0]), .s(s[0]), .c(c1), .garbage(garbage[0])
  );

  hng_gate u_hng1 (
    .a(a[1]), .b(b[1]), .c(c1), .d(1'b0),
    .p(garbage[1]), .q(garbage[2]), .r(s[1]), .s(cout)
  );
endmodule
