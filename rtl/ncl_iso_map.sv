// ncl_iso_map: isomorphic mapping delta from GF(2^8) (AES polynomial
// x^8+x^4+x^3+x+1) to the composite field GF((2^4)^2).
//
// The result {q[7:4], q[3:0]} = {a^h, a^l} stands for a^h*y + a^l, where
// GF(2^4) = GF(2)[x]/(x^4+x+1) and y^2 = y + lambda with lambda = 0xE.
// With aA = a1^a7, aB = a5^a7, aC = a4^a6:
//   q7 = aB            q6 = aB^a2^a3     q5 = aA^aC        q4 = aC^a5
//   q3 = a2^a4         q2 = aA           q1 = a1^a2        q0 = aC^a0^a5
// Written below as a flat XOR matrix; combinational, no handshake.
// The design names this map step but gives no matrix. This is the classic
// composite-field mapping; for the input 0x36 it yields a^h = 1000 and
// a^l = 0100, the nibbles the design's reference simulation shows.
module ncl_iso_map
  import ncl_pkg::*;
(
  input  dr_t [7:0] a,
  output dr_t [7:0] q
);

  localparam logic [7:0][7:0] DELTA = {
    8'b10100000,  // q7
    8'b10101100,  // q6
    8'b11010010,  // q5
    8'b01110000,  // q4
    8'b00010100,  // q3
    8'b10000010,  // q2
    8'b00000110,  // q1
    8'b01110001   // q0
  };

  ncl_linear #(.NI(8), .NO(8), .MAT(DELTA)) u_map (.a(a), .q(q));

endmodule
