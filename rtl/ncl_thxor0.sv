// ncl_thxor0: the NCL gate THxor0, Z = AB + CD with hysteresis.
//
// Sets when A and B, or C and D, are both 1; resets only when all four
// inputs are 0. Two of these form the input-complete dual-rail XOR
// (ncl_xor2). Modelled as a set/hold latch like ncl_th; the latch is the
// gate's hysteresis and is intended.
// The NOLATCH note that Verilator gives on instances of this gate is
// spurious: the output is held on the path where neither condition is
// true.
module ncl_thxor0 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic z
);

  always_latch begin
    if ((a & b) | (c & d))   z = 1'b1;
    else if (!(a | b | c | d)) z = 1'b0;
  end

endmodule
