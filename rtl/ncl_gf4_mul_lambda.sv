// ncl_gf4_mul_lambda: multiplication by the constant lambda in
// GF(2^4) = GF(2)[x]/(x^4+x+1), dual-rail.
//
// lambda is the constant term of the extension polynomial y^2 + y + lambda
// that builds GF(2^8) from GF(2^4). Multiplying by a constant is linear, so
// the matrix (column i = lambda * x^i) is worked out at elaboration time
// from LAMBDA and realised with XOR chains. For the default 0xE:
//   q3 = a0^a1^a2^a3,  q2 = a0^a1^a2,  q1 = a0^a1,  q0 = a1^a2^a3.
// LAMBDA must match the isomorphic mapping (ncl_iso_map); x^2+x+LAMBDA
// must be irreducible. Combinational, no handshake. The value of lambda is
// this implementation's choice (it goes with the mapping in ncl_iso_map).
module ncl_gf4_mul_lambda
  import ncl_pkg::*;
#(
  parameter logic [3:0] LAMBDA = 4'hE
) (
  input  dr_t [3:0] a,
  output dr_t [3:0] q
);

  // Polynomial product mod x^4+x+1 on plain bits (elaboration only).
  function automatic logic [3:0] gf4_mul_const(input logic [3:0] x, input logic [3:0] y);
    logic [6:0] p;
    p = '0;
    for (int k = 0; k < 4; k++) if (y[k]) p ^= 7'(x) << k;
    for (int k = 6; k >= 4; k--) if (p[k]) p ^= 7'b0010011 << (k - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0][3:0] lambda_matrix(input logic [3:0] l);
    logic [3:0][3:0] m;
    logic [3:0]      col;
    for (int i = 0; i < 4; i++) begin
      col = gf4_mul_const(l, 4'(1 << i));
      for (int j = 0; j < 4; j++) m[j][i] = col[j];
    end
    return m;
  endfunction

  localparam logic [3:0][3:0] LM = lambda_matrix(LAMBDA);

  ncl_linear #(.NI(4), .NO(4), .MAT(LM)) u_map (.a(a), .q(q));

endmodule
