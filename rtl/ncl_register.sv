// ncl_register: W-bit dual-rail NCL register with Ki/Ko handshake.
//
// Each rail is a resettable TH22 gate of the data rail and ki, so a DATA
// wavefront passes only while ki = 1 (request for data, rfd) and a NULL
// wavefront only while ki = 0 (request for null, rfn); otherwise the
// register holds. ko[k] = NOR of bit k's output rails: 1 (rfd) while the
// bit holds NULL, 0 (rfn) while it holds DATA. ko goes to the previous
// stage through completion detection (ncl_completion). rst clears the
// register to NULL. No clock: the timing comes only from the handshake.
// Ko/Ki and their rfd/rfn meaning follow the design; the TH22 rail gates
// and the reset are this implementation's choice.
module ncl_register
  import ncl_pkg::*;
#(
  parameter int W = 8
) (
  input  logic         rst,
  input  dr_t  [W-1:0] d,
  input  logic         ki,
  output dr_t  [W-1:0] q,
  output logic [W-1:0] ko
);

  for (genvar k = 0; k < W; k++) begin : g_bit
    ncl_th #(.M(2), .N(2)) u_r0 (.in({d[k].r0, ki}), .rst(rst), .z(q[k].r0));
    ncl_th #(.M(2), .N(2)) u_r1 (.in({d[k].r1, ki}), .rst(rst), .z(q[k].r1));
    assign ko[k] = !(q[k].r0 | q[k].r1);

    // Dual-rail rule, checked once the logic has settled: a bit never holds
    // both rails (that would mean new DATA arrived without a NULL between).
    always_comb begin
      assert final (!(q[k].r0 && q[k].r1))
        else $error("ncl_register: bit %0d holds both rails", k);
    end
  end

endmodule
