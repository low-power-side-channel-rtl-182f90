// ncl_affine: AES affine transformation on a dual-rail byte (encryption
// path, after the GF(2^8) inverse).
//
//   q_k = i_k ^ i_(k+4) ^ i_(k+5) ^ i_(k+6) ^ i_(k+7) ^ c_k,  c = 0x63,
//
// indices mod 8. Each output is a chain of input-complete dual-rail XORs
// and the constant is a rail swap (see ncl_linear). Combinational, no
// handshake of its own: q is DATA once i is DATA and NULL once i is NULL.
// The equations are the design's affine-transformation table (the standard
// AES definition); building them from XOR chains is this implementation's
// choice.
module ncl_affine
  import ncl_pkg::*;
(
  input  dr_t [7:0] i,
  output dr_t [7:0] q
);

  // Row k lists which input bits feed q_k (bit 7 on the left).
  localparam logic [7:0][7:0] AFF = {
    8'b11111000,  // q7 = i3^i4^i5^i6^i7
    8'b01111100,  // q6 = i2^i3^i4^i5^i6 ^1
    8'b00111110,  // q5 = i1^i2^i3^i4^i5 ^1
    8'b00011111,  // q4 = i0^i1^i2^i3^i4
    8'b10001111,  // q3 = i0^i1^i2^i3^i7
    8'b11000111,  // q2 = i0^i1^i2^i6^i7
    8'b11100011,  // q1 = i0^i1^i5^i6^i7 ^1
    8'b11110001   // q0 = i0^i4^i5^i6^i7 ^1
  };

  ncl_linear #(.NI(8), .NO(8), .MAT(AFF), .C(8'h63)) u_map (.a(i), .q(q));

endmodule
