// ncl_th: THmn threshold gate with hysteresis, the basic NCL gate.
//
// The output rises once at least M of the N inputs are 1 and then holds 1
// until all N inputs are 0 again; in between it keeps its value. This
// set/hold behaviour is what makes NCL circuits delay-insensitive: a gate
// only changes after a complete DATA or a complete NULL wavefront. TH1n is
// an OR, THnn a C-element (AND with hysteresis). rst forces the output low,
// as in the resettable gates of NCL registers; tie it to 0 elsewhere.
//
// The gate is modelled at logic level as a latch: it is transparent while
// the set or the reset condition holds. The latch is the hysteresis of the
// NCL gate and is intended; lint tools report it as a latch, and inside a
// handshake loop (ncl_sbox_top) as circular combinational logic through z.
// Both are the nature of a state-holding NCL gate, not a fault. Verilator's
// NOLATCH note on instances is spurious: the output is held on the path
// where neither condition is true. No clock; the output follows the
// inputs combinationally.
module ncl_th #(
  parameter int M = 2,
  parameter int N = 2
) (
  input  logic [N-1:0] in,
  input  logic         rst,
  output logic         z
);

  logic set_c, clr_c;

  always_comb begin
    int cnt;
    cnt = 0;
    for (int k = 0; k < N; k++) cnt += int'(in[k]);
    set_c = (cnt >= M);
  end

  assign clr_c = (in == '0);

  always_latch begin
    if (rst)        z = 1'b0;
    else if (set_c) z = 1'b1;
    else if (clr_c) z = 1'b0;
  end

endmodule
