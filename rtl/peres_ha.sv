// peres_ha: half adder made of one Peres gate.
//
// The Peres gate (A, B, C) -> (A, A xor B, AB xor C) with its C input tied to
// the constant 0 gives sum = A xor B and carry = AB; its first output (a copy
// of A) has no use and is brought out as a garbage bit. One gate, one
// constant input, one garbage output, quantum cost 4. Combinational.
// Used for bit 0 of both ripple-carry adders (their carry-in is always 0) and
// for adding the two carries of the 4x4 multiplier, as published.
module peres_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c,
  output logic garbage
);
  peres_gate u_pg (
    .a(a), .b(b), .c(1'b0),
    .p(garbage), .q(s), .r(c)
  );
endmodule
