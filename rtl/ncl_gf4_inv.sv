// ncl_gf4_inv: multiplicative inverse in GF(2^4) = GF(2)[x]/(x^4+x+1),
// dual-rail; 0 maps to 0.
//
// Since a^15 = 1 for a /= 0, a^-1 = a^14 = a^2 * a^4 * a^8. Three squarers
// in series give a^2, a^4 and a^8 (linear, XOR only) and two modular
// multipliers form the product; a = 0 gives 0, as the S-Box requires.
// Built only from input-complete XOR and AND gates, so it is
// input-complete itself. Combinational, no handshake. The design only
// names this inverter; computing it as a^14 is this implementation's choice.
module ncl_gf4_inv
  import ncl_pkg::*;
(
  input  dr_t [3:0] a,
  output dr_t [3:0] q
);

  dr_t [3:0] a2, a4, a8, a6;

  ncl_gf4_square u_sq1 (.a(a),  .q(a2));
  ncl_gf4_square u_sq2 (.a(a2), .q(a4));
  ncl_gf4_square u_sq3 (.a(a4), .q(a8));
  ncl_gf4_mul    u_m1  (.a(a2), .b(a4), .q(a6));
  ncl_gf4_mul    u_m2  (.a(a6), .b(a8), .q(q));

endmodule
