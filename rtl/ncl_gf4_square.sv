// ncl_gf4_square: squaring in GF(2^4) = GF(2)[x]/(x^4+x+1), dual-rail.
//
// Squaring is linear over GF(2): (a0 + a1x + a2x^2 + a3x^3)^2 =
// a0 + a1x^2 + a2x^4 + a3x^6, and with x^4 = x+1, x^6 = x^3+x^2:
//   q3 = a3,  q2 = a1^a3,  q1 = a2,  q0 = a0^a2.
// Two XOR gates (q3 and q1 are plain wires); combinational, no handshake.
// Squaring as a step of the inversion follows the design; the field
// polynomial x^4+x+1 is this implementation's choice.
module ncl_gf4_square
  import ncl_pkg::*;
(
  input  dr_t [3:0] a,
  output dr_t [3:0] q
);

  localparam logic [3:0][3:0] SQ = {
    4'b1000,  // q3
    4'b1010,  // q2
    4'b0100,  // q1
    4'b0101   // q0
  };

  ncl_linear #(.NI(4), .NO(4), .MAT(SQ)) u_map (.a(a), .q(q));

endmodule
