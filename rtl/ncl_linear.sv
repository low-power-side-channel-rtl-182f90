// ncl_linear: dual-rail GF(2)-linear (affine) map q = MAT * a + C.
//
// Output bit j is the XOR of the input bits i with MAT[j][i] = 1, built as
// an ncl_xor_n chain, and is inverted when C[j] = 1. In dual-rail logic an
// inversion (XOR with constant 1) is a rail swap and costs no gate, and an
// XOR with constant 0 disappears, so no constant ever enters a gate and the
// map stays input-complete. Every row of MAT needs at least one 1.
// All the linear parts of the S-Box (affine and inverse affine transform,
// isomorphic map and its inverse, GF(2^4) squaring, multiplication by
// lambda) are instances of this module with their own matrix.
module ncl_linear
  import ncl_pkg::*;
#(
  parameter int                    NI  = 8,
  parameter int                    NO  = 8,
  parameter logic [NO-1:0][NI-1:0] MAT = '{default: '1},
  parameter logic [NO-1:0]         C   = '0
) (
  input  dr_t [NI-1:0] a,
  output dr_t [NO-1:0] q
);

  // Number of ones in row j.
  function automatic int row_ones(input int j);
    int n;
    n = 0;
    for (int i = 0; i < NI; i++) n += int'(MAT[j][i]);
    return n;
  endfunction

  // Column index of the k-th one (counting from 0) in row j.
  function automatic int row_index(input int j, input int k);
    int n;
    n = 0;
    for (int i = 0; i < NI; i++) begin
      if (MAT[j][i]) begin
        if (n == k) return i;
        n++;
      end
    end
    return 0;
  endfunction

  for (genvar j = 0; j < NO; j++) begin : g_row
    localparam int CNT = row_ones(j);
    dr_t [CNT-1:0] terms;
    dr_t           par;

    for (genvar k = 0; k < CNT; k++) begin : g_term
      assign terms[k] = a[row_index(j, k)];
    end

    ncl_xor_n #(.N(CNT)) u_par (.a(terms), .z(par));

    assign q[j] = C[j] ? dr_not(par) : par;
  end

endmodule
