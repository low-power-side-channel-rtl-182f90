// sbox_ref_pkg: reference models for the testbenches.
//
// Plain-binary arithmetic written independently of the dual-rail RTL:
// GF(2^8) multiplication with the AES polynomial 0x11B, inversion by
// exhaustive search, the AES affine transform from its definition
// (b_k ^ b_(k+4) ^ ... ^ c_k), GF(2^4) arithmetic mod x^4+x+1, products in
// the composite field GF((2^4)^2) with y^2 = y + lambda, and
// conversion between bytes and dual-rail vectors.
package sbox_ref_pkg;
  import ncl_pkg::*;

  function automatic logic [7:0] gf8_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = 8'h00;
    x = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] gf8_inv(input logic [7:0] a);
    for (int b = 1; b < 256; b++)
      if (gf8_mul(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    logic [7:0] r;
    for (int k = 0; k < 8; k++)
      r[k] = b[k] ^ b[(k+4)%8] ^ b[(k+5)%8] ^ b[(k+6)%8] ^ b[(k+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_affine(input logic [7:0] b);
    logic [7:0] r;
    for (int k = 0; k < 8; k++)
      r[k] = b[(k+2)%8] ^ b[(k+5)%8] ^ b[(k+7)%8];
    return r ^ 8'h05;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return affine(gf8_inv(a));
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    return gf8_inv(inv_affine(a));
  endfunction

  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [3:0] r, x;
    r = 4'h0;
    x = a;
    for (int k = 0; k < 4; k++) begin
      if (b[k]) r ^= x;
      x = x[3] ? ((x << 1) ^ 4'h3) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [3:0] gf4_inv(input logic [3:0] a);
    for (int b = 1; b < 16; b++)
      if (gf4_mul(a, 4'(b)) == 4'h1) return 4'(b);
    return 4'h0;
  endfunction

  // Product in GF((2^4)^2): (ah*y + al)(bh*y + bl) with y^2 = y + lambda.
  function automatic logic [7:0] comp_mul(input logic [7:0] x, input logic [7:0] y,
                                          input logic [3:0] lambda);
    logic [3:0] hh, h, l;
    hh = gf4_mul(x[7:4], y[7:4]);
    h  = hh ^ gf4_mul(x[7:4], y[3:0]) ^ gf4_mul(x[3:0], y[7:4]);
    l  = gf4_mul(x[3:0], y[3:0]) ^ gf4_mul(hh, lambda);
    return {h, l};
  endfunction

  function automatic dr_t [7:0] enc8(input logic [7:0] v);
    dr_t [7:0] r;
    for (int k = 0; k < 8; k++) r[k] = dr_enc(v[k]);
    return r;
  endfunction

  function automatic dr_t [3:0] enc4(input logic [3:0] v);
    dr_t [3:0] r;
    for (int k = 0; k < 4; k++) r[k] = dr_enc(v[k]);
    return r;
  endfunction

  // Decoded value of a dual-rail vector (DATA1 rail), and checks that all
  // bits are DATA / all NULL.
  function automatic logic [7:0] dec8(input dr_t [7:0] v);
    logic [7:0] r;
    for (int k = 0; k < 8; k++) r[k] = v[k].r1;
    return r;
  endfunction

  function automatic logic [3:0] dec4(input dr_t [3:0] v);
    logic [3:0] r;
    for (int k = 0; k < 4; k++) r[k] = v[k].r1;
    return r;
  endfunction

  function automatic logic all_data8(input dr_t [7:0] v);
    for (int k = 0; k < 8; k++) if (!dr_is_data(v[k])) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic all_null8(input dr_t [7:0] v);
    return v == '0;
  endfunction

  function automatic logic all_data4(input dr_t [3:0] v);
    for (int k = 0; k < 4; k++) if (!dr_is_data(v[k])) return 1'b0;
    return 1'b1;
  endfunction

endpackage
