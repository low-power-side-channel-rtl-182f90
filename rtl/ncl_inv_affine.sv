// ncl_inv_affine: AES inverse affine transformation on a dual-rail byte
// (decryption path, before the GF(2^8) inverse).
//
//   q_k = i_(k+2) ^ i_(k+5) ^ i_(k+7) ^ d_k,  d = 0x05,
//
// indices mod 8: three inputs per output, 16 two-input XORs in all. The
// constant on q0 and q2 is a rail swap. Combinational, no handshake.
// The equations are the design's inverse-affine table; the constant is the
// standard 0x05, which the inverse S-Box values of the design require.
module ncl_inv_affine
  import ncl_pkg::*;
(
  input  dr_t [7:0] i,
  output dr_t [7:0] q
);

  localparam logic [7:0][7:0] IAFF = {
    8'b01010010,  // q7 = i1^i4^i6
    8'b00101001,  // q6 = i0^i3^i5
    8'b10010100,  // q5 = i2^i4^i7
    8'b01001010,  // q4 = i1^i3^i6
    8'b00100101,  // q3 = i0^i2^i5
    8'b10010010,  // q2 = i1^i4^i7 ^1
    8'b01001001,  // q1 = i0^i3^i6
    8'b10100100   // q0 = i2^i5^i7 ^1
  };

  ncl_linear #(.NI(8), .NO(8), .MAT(IAFF), .C(8'h05)) u_map (.a(i), .q(q));

endmodule
