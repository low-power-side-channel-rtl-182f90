// ncl_mux2: input-complete dual-rail 2:1 multiplexer, W bits wide with one
// shared select, z = (s == DATA0) ? a : b.
//
// The plain sum of products Z0 = A0S0 + S1B0, Z1 = A1S0 + S1B1 would let
// the output become DATA before the unselected input has arrived. Each term
// is therefore also gated with the completeness of the other operand:
//   Z0 = S0 A0 (B0+B1) + S1 B0 (A0+A1)
//   Z1 = S0 A1 (B0+B1) + S1 B1 (A0+A1)
// (the factor of a term's own operand is redundant and dropped). Each
// product is a TH33 gate, each sum a TH12 gate, and (X0+X1) is a TH12 gate
// shared by both rails. The output is DATA only when s, a and b are all
// DATA, and returns to NULL only when all three are NULL. The two
// input-complete equations are the design's; mapping them onto TH33 and
// TH12 gates is this implementation's choice.
// Combinational, no handshake of its own.
module ncl_mux2
  import ncl_pkg::*;
#(
  parameter int W = 8
) (
  input  dr_t [W-1:0] a,
  input  dr_t [W-1:0] b,
  input  dr_t         s,
  output dr_t [W-1:0] z
);

  for (genvar k = 0; k < W; k++) begin : g_bit
    logic a_any, b_any;      // operand k is DATA (either rail)
    logic t0a, t0b, t1a, t1b;

    ncl_th #(.M(1), .N(2)) u_aany (.in({a[k].r1, a[k].r0}), .rst(1'b0), .z(a_any));
    ncl_th #(.M(1), .N(2)) u_bany (.in({b[k].r1, b[k].r0}), .rst(1'b0), .z(b_any));

    ncl_th #(.M(3), .N(3)) u_t0a (.in({s.r0, a[k].r0, b_any}), .rst(1'b0), .z(t0a));
    ncl_th #(.M(3), .N(3)) u_t0b (.in({s.r1, b[k].r0, a_any}), .rst(1'b0), .z(t0b));
    ncl_th #(.M(3), .N(3)) u_t1a (.in({s.r0, a[k].r1, b_any}), .rst(1'b0), .z(t1a));
    ncl_th #(.M(3), .N(3)) u_t1b (.in({s.r1, b[k].r1, a_any}), .rst(1'b0), .z(t1b));

    ncl_th #(.M(1), .N(2)) u_z0 (.in({t0a, t0b}), .rst(1'b0), .z(z[k].r0));
    ncl_th #(.M(1), .N(2)) u_z1 (.in({t1a, t1b}), .rst(1'b0), .z(z[k].r1));
  end

endmodule
