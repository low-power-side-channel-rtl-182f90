// ncl_thand0: the NCL gate THand0, Z = AB + BC + AD with hysteresis.
//
// With A = A0, B = B0, C = A1, D = B1 it gives the DATA0 rail of the
// dual-rail AND (A0B0 + A1B0 + A0B1): it only sets once both operands are
// DATA, so the AND is input-complete. Resets only when all inputs are 0.
// Modelled as a set/hold latch; the latch is the gate's hysteresis.
// The NOLATCH note that Verilator gives on instances of this gate is
// spurious: the output is held on the path where neither condition is
// true.
module ncl_thand0 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  always_latch begin
    if ((a & b) | (b & c) | (a & d)) z = 1'b1;
    else if (!(a | b | c | d))         z = 1'b0;
  end

endmodule
