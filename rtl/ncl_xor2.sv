// ncl_xor2: input-complete dual-rail XOR, Z = A xor B.
//
// Z0 = A0B0 + A1B1 and Z1 = A0B1 + A1B0, each a THxor0 gate. Every product
// term holds one rail of each operand, so Z becomes DATA only after both
// A and B are DATA, and returns to NULL only after both are NULL.
// Interface: dual-rail operands a, b and result z (see ncl_pkg).
// The design asks for an input-complete NCL XOR; the two-THxor0 form is the
// usual one and is this implementation's choice.
module ncl_xor2
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t z
);

  ncl_thxor0 u_z0 (.a(a.r0), .b(b.r0), .c(a.r1), .d(b.r1), .z(z.r0));
  ncl_thxor0 u_z1 (.a(a.r0), .b(b.r1), .c(a.r1), .d(b.r0), .z(z.r1));

endmodule
