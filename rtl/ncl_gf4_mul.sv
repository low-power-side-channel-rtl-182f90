// ncl_gf4_mul: modular multiplier in GF(2^4) = GF(2)[x]/(x^4+x+1),
// dual-rail.
//
// The sixteen partial products a_i*b_j are formed with input-complete
// dual-rail AND gates. Product bit s_d is the XOR of the a_i*b_j with
// i+j = d (d = 0..6), and the modular reduction (x^4 = x+1, x^5 = x^2+x,
// x^6 = x^3+x^2) folds s4..s6 back:
//   q0 = s0^s4,  q1 = s1^s4^s5,  q2 = s2^s5^s6,  q3 = s3^s6.
// Both steps are one XOR matrix over the partial products (ncl_linear).
// Combinational, no handshake: q is DATA once a and b are both DATA.
// Product-then-reduce follows the design's description of the modular
// multiplier; the polynomial x^4+x+1 is this implementation's choice.
module ncl_gf4_mul
  import ncl_pkg::*;
(
  input  dr_t [3:0] a,
  input  dr_t [3:0] b,
  output dr_t [3:0] q
);

  // Column 4*i+j (partial product a_i*b_j) feeds output bit k when x^(i+j)
  // reduced mod x^4+x+1 has the term x^k.
  function automatic logic [3:0][15:0] reduction_matrix();
    logic [3:0][15:0] m;
    logic [3:0]       red [7];
    red = '{4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0011, 4'b0110, 4'b1100};
    m = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        for (int k = 0; k < 4; k++)
          m[k][4*i+j] = red[i+j][k];
    return m;
  endfunction

  localparam logic [3:0][15:0] RED = reduction_matrix();

  dr_t [15:0] pp;

  for (genvar i = 0; i < 4; i++) begin : g_a
    for (genvar j = 0; j < 4; j++) begin : g_b
      ncl_and2 u_and (.a(a[i]), .b(b[j]), .z(pp[4*i+j]));
    end
  end

  ncl_linear #(.NI(16), .NO(4), .MAT(RED)) u_reduce (.a(pp), .q(q));

endmodule
