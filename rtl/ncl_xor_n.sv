// ncl_xor_n: dual-rail parity (XOR) of N dual-rail bits.
//
// A chain of N-1 input-complete ncl_xor2 gates; for N = 1 the bit passes
// through unchanged. Since every stage is input-complete, the output is
// DATA only when all N inputs are DATA and NULL only when all are NULL.
// Purely combinational (threshold gates), no handshake of its own.
module ncl_xor_n
  import ncl_pkg::*;
#(
  parameter int N = 2
) (
  input  dr_t [N-1:0] a,
  output dr_t         z
);

  dr_t [N-1:0] acc;

  assign acc[0] = a[0];

  for (genvar k = 1; k < N; k++) begin : g_chain
    ncl_xor2 u_xor (.a(acc[k-1]), .b(a[k]), .z(acc[k]));
  end

  assign z = acc[N-1];

endmodule
