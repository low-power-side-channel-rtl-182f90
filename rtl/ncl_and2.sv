// ncl_and2: input-complete dual-rail AND, Z = A and B.
//
// Z1 = TH22(A1, B1); Z0 = THand0(A0, B0, A1, B1) = A0B0 + A1B0 + A0B1. Both
// rails need both operands to be DATA before they set, so the gate is
// input-complete, and both hold until all four inputs are NULL.
// Interface: dual-rail operands a, b and result z (see ncl_pkg).
// The design asks for an input-complete NCL AND; the TH22/THand0 form is
// the usual one and is this implementation's choice.
module ncl_and2
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t z
);

  ncl_th #(.M(2), .N(2)) u_z1 (.in({a.r1, b.r1}), .rst(1'b0), .z(z.r1));
  ncl_thand0 u_z0 (.a(a.r0), .b(b.r0), .c(a.r1), .d(b.r1), .z(z.r0));

endmodule
