// ncl_gf8_inv: multiplicative inverse in GF(2^8) (AES field) through the
// composite field GF((2^4)^2), dual-rail; 0 maps to 0.
//
// The byte is mapped to a^h*y + a^l (ncl_iso_map), where y^2 = y + lambda.
// Then
//   d   = lambda*(a^h)^2 ^ (a^h ^ a^l)*a^l      (a GF(2^4) element)
//   q^h = a^h * d^-1,   q^l = (a^h ^ a^l) * d^-1
// and {q^h, q^l} is mapped back (ncl_inv_iso_map). Only GF(2^4) blocks are
// needed: one squarer, one constant multiplier, three modular multipliers,
// one inverter and eight XORs. Combinational, no handshake.
// The dataflow follows the design's block diagram of the inversion (map,
// square, modular multiplications, XORs, GF(2^4) inverse, inverse map).
module ncl_gf8_inv
  import ncl_pkg::*;
(
  input  dr_t [7:0] a,
  output dr_t [7:0] q
);

  dr_t [7:0] m, r;
  dr_t [3:0] ah, al, hsq, hsql, hxl, hxll, d, dinv, qh, ql;

  ncl_iso_map u_map (.a(a), .q(m));
  assign ah = m[7:4];
  assign al = m[3:0];

  ncl_gf4_square     u_sq   (.a(ah), .q(hsq));
  ncl_gf4_mul_lambda u_lam  (.a(hsq), .q(hsql));

  for (genvar k = 0; k < 4; k++) begin : g_xor
    ncl_xor2 u_hxl (.a(ah[k]),   .b(al[k]),   .z(hxl[k]));
    ncl_xor2 u_d   (.a(hsql[k]), .b(hxll[k]), .z(d[k]));
  end

  ncl_gf4_mul u_mul_l (.a(hxl), .b(al),   .q(hxll));
  ncl_gf4_inv u_inv   (.a(d),   .q(dinv));
  ncl_gf4_mul u_mul_h (.a(ah),  .b(dinv), .q(qh));
  ncl_gf4_mul u_mul_o (.a(hxl), .b(dinv), .q(ql));

  assign r = {qh, ql};
  ncl_inv_iso_map u_imap (.a(r), .q(q));

endmodule
