// ncl_sbox: combinational dual-rail AES S-Box with an encryption and a
// decryption path.
//
//   encryption (mode = DATA0):  dout = affine(inv(din))           = S(din)
//   decryption (mode = DATA1):  dout = inv(inv_affine(din))       = S^-1(din)
//
// One GF(2^8) inverter (ncl_gf8_inv) is shared. The first NCL multiplexer
// feeds it either the raw input (encryption) or the inverse-affine
// output (decryption); the second picks the affine output (encryption) or
// the inverter output (decryption). Both transforms always compute, so the
// muxes see both operands and the whole block stays input-complete:
// dout becomes DATA only once din and mode are DATA and returns to NULL
// only once they are NULL. No clock and no handshake of its own; it is
// meant to sit between two NCL registers (ncl_sbox_top). The two paths and
// the two multiplexers follow the design; which mode value selects which
// path is this implementation's choice.
module ncl_sbox
  import ncl_pkg::*;
(
  input  dr_t [7:0] din,
  input  dr_t       mode,
  output dr_t [7:0] dout
);

  dr_t [7:0] iaff, inv_in, inv_out, aff;

  ncl_inv_affine u_iaff (.i(din), .q(iaff));

  // DATA0 (encrypt): raw input; DATA1 (decrypt): inverse affine of input.
  ncl_mux2 #(.W(8)) u_mux_in (.a(din), .b(iaff), .s(mode), .z(inv_in));

  ncl_gf8_inv u_inv (.a(inv_in), .q(inv_out));

  ncl_affine u_aff (.i(inv_out), .q(aff));

  // DATA0 (encrypt): affine of the inverse; DATA1 (decrypt): the inverse.
  ncl_mux2 #(.W(8)) u_mux_out (.a(aff), .b(inv_out), .s(mode), .z(dout));

endmodule
