// ncl_completion: completion detection for an NCL register.
//
// The per-bit acknowledges ko[N-1:0] are combined by a cascade of TH22
// gates (two-input AND with hysteresis, the C-element):
// c0 = ko[0], c_k = TH22(c_(k-1), ko[k]), ko_all = c_(N-1). ko_all rises
// only after every bit has returned to NULL (all ko = 1) and falls only
// after every bit holds DATA (all ko = 0); a plain AND would fall at the
// first bit. ko_all drives the ki of the previous register. The delay grows
// with N; no clock. The cascade follows the design's completion detection;
// using TH22 rather than plain AND gates is this implementation's choice.
module ncl_completion #(
  parameter int N = 9
) (
  input  logic [N-1:0] ko,
  output logic         ko_all
);

  logic [N-1:0] c;

  assign c[0] = ko[0];

  for (genvar k = 1; k < N; k++) begin : g_cascade
    ncl_th #(.M(2), .N(2)) u_c (.in({c[k-1], ko[k]}), .rst(1'b0), .z(c[k]));
  end

  assign ko_all = c[N-1];

endmodule
