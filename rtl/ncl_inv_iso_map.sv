// ncl_inv_iso_map: inverse isomorphic mapping delta^-1 from the composite
// field GF((2^4)^2) back to GF(2^8) with the AES polynomial.
//
// The matrix is the GF(2) inverse of the one in ncl_iso_map, so
// delta^-1(delta(a)) = a for every byte. Combinational, no handshake.
// Like the forward map, its matrix is this implementation's choice.
module ncl_inv_iso_map
  import ncl_pkg::*;
(
  input  dr_t [7:0] a,
  output dr_t [7:0] q
);

  localparam logic [7:0][7:0] DELTA_INV = {
    8'b10110100,  // q7 = a2^a4^a5^a7
    8'b10011110,  // q6 = a1^a2^a3^a4^a7
    8'b00110100,  // q5 = a2^a4^a5
    8'b10111010,  // q4 = a1^a3^a4^a5^a7
    8'b01110010,  // q3 = a1^a4^a5^a6
    8'b10110010,  // q2 = a1^a4^a5^a7
    8'b10110000,  // q1 = a4^a5^a7
    8'b00010001   // q0 = a0^a4
  };

  ncl_linear #(.NI(8), .NO(8), .MAT(DELTA_INV)) u_map (.a(a), .q(q));

endmodule
