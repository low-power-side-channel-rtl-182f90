// ncl_sbox_top: clock-free NCL AES S-Box stage.
//
// The combinational dual-rail S-Box (ncl_sbox) is bracketed by an input
// NCL register (8 data bits plus the mode bit) and an output NCL register
// (8 bits). Each register's completion detection (ncl_completion) drives
// the ki of the register before it, so DATA and NULL wavefronts alternate
// through the stage with no clock (four-phase return-to-zero handshake):
//
//   producer: drive DATA on din/mode while ko = 1, then NULL once ko = 0.
//   consumer: read dout once it is DATA, answer ki = 0; raise ki = 1 again
//             once dout is NULL.
//
// mode = DATA0 computes the S-Box (encryption), DATA1 the inverse S-Box
// (decryption). rst clears both registers to NULL; ko is 1 after reset.
// Latency is the gate delay through the stage; there is no cycle count.
//
// The acknowledge path (output register -> completion -> input register ki)
// closes a loop through the datapath. That loop is the asynchronous
// handshake itself, so lint tools report circular combinational logic here
// by design; it settles because every NCL gate changes monotonically
// (0 -> 1 on a DATA wavefront, 1 -> 0 on a NULL wavefront).
//
// The structure (registers on both sides of the combinational S-Box, Ko
// gathered by completion detection into the previous Ki) follows the NCL
// scheme described for this design; the reset, the mode encoding and the
// port bundle are choices of this implementation.
module ncl_sbox_top
  import ncl_pkg::*;
(
  input  logic       rst,
  input  dr_t  [7:0] din,
  input  dr_t        mode,
  output logic       ko,
  input  logic       ki,
  output dr_t  [7:0] dout
);

  dr_t  [8:0] in_q;
  logic [8:0] in_ko;
  dr_t  [7:0] sbox_out;
  logic [7:0] out_ko;
  logic       out_done;   // completion of the output register

  ncl_register #(.W(9)) u_in_reg (
    .rst(rst), .d({mode, din}), .ki(out_done), .q(in_q), .ko(in_ko)
  );
  ncl_completion #(.N(9)) u_in_cd (.ko(in_ko), .ko_all(ko));

  ncl_sbox u_sbox (.din(in_q[7:0]), .mode(in_q[8]), .dout(sbox_out));

  ncl_register #(.W(8)) u_out_reg (
    .rst(rst), .d(sbox_out), .ki(ki), .q(dout), .ko(out_ko)
  );
  ncl_completion #(.N(8)) u_out_cd (.ko(out_ko), .ko_all(out_done));

endmodule
