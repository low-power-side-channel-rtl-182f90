# Clock-free dual-rail AES S-Box in Null Convention Logic

The S-Box is the only non-linear step of AES and the part of an AES core that
draws the most data-dependent power, which is what differential power analysis
(DPA) exploits. This design computes the AES S-Box and its inverse in
**Null Convention Logic (NCL)**, a delay-insensitive asynchronous logic style:

* every bit travels on **two wires** (dual-rail), so each evaluation switches
  the same number of wires whatever the data;
* there is **no clock**. Each result is followed by an all-zero "NULL"
  spacer, and neighbouring stages pace each other with a four-phase
  handshake;
* every gate is **monotonic** within a wavefront. Wires only rise while a
  result forms and only fall while it is cleared, so there are no glitches
  whose power depends on the data.

The S-Box itself is the usual combinational composite-field circuit. One
GF(2^8) inverter is shared by an encryption path (inverse, then affine
transform) and a decryption path (inverse affine transform, then inverse).
Two multiplexers choose the path. The whole circuit is built from dual-rail
XOR and AND gates, which are themselves NCL threshold gates.

## Dual-rail signals and wavefronts

A signal is a pair `{r1, r0}` (type `dr_t` in `ncl_pkg`):

| r1 r0 | meaning |
|-------|---------|
| 0 0   | NULL (no data yet / spacer) |
| 0 1   | DATA0 (logic 0) |
| 1 0   | DATA1 (logic 1) |
| 1 1   | illegal |

A bus is *DATA* when every bit is DATA0 or DATA1 and *NULL* when every bit is
NULL. Processing alternates between the two states. A **DATA wavefront**
(NULL to DATA) raises exactly one rail per bit, and a **NULL wavefront**
lowers them again. Inverting a bit, or XOR-ing it with the constant 1, is
just a swap of its two rails and costs no gate. XOR with the constant 0
disappears. No constant ever enters a gate, which matters because a
constant rail would never return to NULL.

## Threshold gates and input completeness

The circuit is built from NCL threshold gates. A gate sets its output when its
set function holds. It then **holds** the output until *all* its inputs are
0 (hysteresis). Because of this, a gate never drops its result halfway
through a wavefront.

| gate | module | set function |
|------|--------|--------------|
| THmn | `ncl_th #(M,N)` | at least M of the N inputs are 1 (TH1n = OR, THnn = C-element) |
| THxor0 | `ncl_thxor0` | AB + CD |
| THand0 | `ncl_thand0` | AB + BC + AD |

Each gate is modelled at logic level as a latch (`always_latch`). It is
transparent while its set condition holds, or while all its inputs are 0.

Delay-insensitivity also needs **input completeness**: a block may present
complete DATA only once *all* its inputs are DATA, and complete NULL only once
all are NULL. Otherwise a late input could still be in flight when the next
stage acts. The three composite gates are built for this:

* **XOR** (`ncl_xor2`): Z0 = A0B0 + A1B1 and Z1 = A0B1 + A1B0, each a THxor0.
  Each product term holds one rail of each operand, so completeness is
  built in.
* **AND** (`ncl_and2`): Z1 = TH22(A1, B1) and Z0 = THand0(A0, B0, A1, B1) =
  A0B0 + A1B0 + A0B1. Even a 0 result waits for both operands.
* **2:1 multiplexer** (`ncl_mux2`): a plain Z = S0·A + S1·B would go DATA
  without the unselected operand. Each term is therefore also gated with the
  completeness of the other operand:

      Z0 = S0·A0·(B0+B1) + S1·B0·(A0+A1)
      Z1 = S0·A1·(B0+B1) + S1·B1·(A0+A1)

  Each product is a TH33 gate, each sum a TH12 gate, and (X0+X1) is a TH12
  gate.

Each larger block is built only from these gates, so it is input-complete
too. The testbenches check this for every block. With any one input bit
still NULL, the output must not be complete DATA. After DATA, the output
must hold until every input has returned to NULL.

## The handshake stage (`ncl_sbox_top`)

```
             +-----------+     +----------------+     +------------+
 din,mode -->| input reg |---->|    ncl_sbox    |---->| output reg |--> dout
   (9 bits)  |  9 x TH22 |     | (combinational)|     |  8 x TH22  |
             +-----------+     +----------------+     +------------+
               | ko[8:0]                                | ko[7:0]   ^ ki
          ncl_completion                           ncl_completion |
               | ko (to producer)      ki of input reg <--+        |
```

Each register bit is a TH22 gate per rail, with inputs (data rail, `ki`).
So a DATA wavefront passes only while `ki = 1` (*request for data*, rfd),
and a NULL wavefront only while `ki = 0` (*request for null*, rfn). The
register's per-bit acknowledge is `ko = NOR(rails)`: 1 while the bit is
NULL, 0 while it holds DATA. A **completion detector** combines the
acknowledges of a register through a cascade of TH22 gates. The result
changes only when *every* bit has changed. It drives the `ki` of the
register before it. The output register's completion is the input
register's `ki`, and the input register's completion is the stage's `ko`.
A deferred assertion in each register bit flags a bit that holds both rails
at once. That happens only if new DATA arrives without a NULL in between.

One operation, seen from outside:

1. After `rst` (active high) both registers are NULL, `ko = 1` and `dout` is
   NULL. The consumer holds `ki = 1`.
2. The producer drives DATA on `din` and `mode`. The input register captures
   it, the S-Box evaluates, and the output register captures the result.
   `ko` falls once all nine input bits are captured.
3. The producer sees `ko = 0` and drives NULL. The input register clears
   as soon as the output register has the result.
4. The consumer reads `dout` (all bits DATA) and answers `ki = 0`. The
   output register clears, its completion rises, and `ko` returns to 1.
   The consumer sees `dout` NULL and raises `ki = 1`.

If the consumer withholds `ki`, the stage holds its result and does not take
the next DATA word: `ko` stays 1 with the next word waiting on `din`. There
is no cycle count. The latency is the gate delay of the stage.

`mode` is a dual-rail bit: DATA0 gives the S-Box (encryption) and DATA1 the
inverse S-Box (decryption). It passes through the input register with the
data byte, so the mode of each operation is part of its DATA wavefront.

## The S-Box arithmetic

`ncl_sbox` computes

    encryption:  dout = affine(inv(din))          = S(din)
    decryption:  dout = inv(inv_affine(din))      = S^-1(din)

* `ncl_affine`: q_k = i_k ^ i_(k+4) ^ i_(k+5) ^ i_(k+6) ^ i_(k+7) ^ c_k,
  with c = 0x63 and indices mod 8.
* `ncl_inv_affine`: q_k = i_(k+2) ^ i_(k+5) ^ i_(k+7) ^ d_k, with d = 0x05.
* `ncl_gf8_inv`: inversion in GF(2^8) (AES polynomial x^8+x^4+x^3+x+1)
  through the composite field GF((2^4)^2). The byte is mapped by an
  isomorphism to a^h·y + a^l, where GF(2^4) = GF(2)[x]/(x^4+x+1) and
  y^2 = y + λ with λ = 0xE (x^3+x^2+x). Then

      d   = λ·(a^h)^2 ⊕ (a^h ⊕ a^l)·a^l
      q^h = a^h · d^-1
      q^l = (a^h ⊕ a^l) · d^-1

  and the result is mapped back. The inverse of 0 comes out as 0, as AES
  requires.

| module | what it does | how |
|--------|--------------|-----|
| `ncl_iso_map` | GF(2^8) to GF((2^4)^2) | XOR matrix, aA = a1^a7, aB = a5^a7, aC = a4^a6; q7 = aB, q6 = aB^a2^a3, q5 = aA^aC, q4 = aC^a5, q3 = a2^a4, q2 = aA, q1 = a1^a2, q0 = aC^a0^a5 |
| `ncl_inv_iso_map` | back to GF(2^8) | GF(2) inverse of that matrix |
| `ncl_gf4_square` | a^2 | q3 = a3, q2 = a1^a3, q1 = a2, q0 = a0^a2 |
| `ncl_gf4_mul_lambda` | λ·a | matrix worked out at elaboration from parameter `LAMBDA` |
| `ncl_gf4_mul` | a·b mod x^4+x+1 | 16 dual-rail ANDs. The product bits s0..s6 are folded back with x^4 = x+1, x^5 = x^2+x, x^6 = x^3+x^2 |
| `ncl_gf4_inv` | a^-1 (0 maps to 0) | a^14 = a^2·a^4·a^8: three squarers, two multipliers |

All the linear maps are instances of `ncl_linear`, a generic dual-rail GF(2)
matrix-plus-constant block. Each output row is an XOR chain (`ncl_xor_n`)
over the inputs selected by the matrix. A constant 1 in the row becomes a
rail swap.

The mapping and λ belong together. The mapping above is the classic
composite-field choice, and with λ = 0xE it is a field isomorphism. The
testbench checks δ(a·b) = δ(a)·δ(b) for all 65,536 pairs. If you change
`LAMBDA`, you must also derive a matching mapping matrix.

## Files

| file | contents |
|------|----------|
| `rtl/ncl_pkg.sv` | `dr_t` type, NULL/DATA constants, rail helpers |
| `rtl/ncl_th.sv`, `ncl_thxor0.sv`, `ncl_thand0.sv` | threshold gates |
| `rtl/ncl_xor2.sv`, `ncl_and2.sv`, `ncl_xor_n.sv`, `ncl_mux2.sv` | dual-rail logic |
| `rtl/ncl_linear.sv` | generic dual-rail XOR matrix |
| `rtl/ncl_affine.sv`, `ncl_inv_affine.sv` | AES affine transforms |
| `rtl/ncl_iso_map.sv`, `ncl_inv_iso_map.sv`, `ncl_gf4_*.sv`, `ncl_gf8_inv.sv` | field arithmetic |
| `rtl/ncl_sbox.sv` | combinational S-Box with both paths |
| `rtl/ncl_register.sv`, `ncl_completion.sv` | NCL register and completion detection |
| `rtl/ncl_sbox_top.sv` | the complete handshake stage |
| `tb/sbox_ref_pkg.sv` | plain-binary reference models (GF arithmetic, S-Box, rail conversion) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog that counts a failure if it hangs. For example, the
end-to-end test:

```
verilator --binary --timing -Wno-fatal \
    rtl/ncl_pkg.sv tb/sbox_ref_pkg.sv tb/tb_ncl_sbox_top.sv \
    -y rtl -y tb --top-module tb_ncl_sbox_top
./obj_dir/Vtb_ncl_sbox_top
```

Replace the testbench name to run any other test. `-Wno-fatal` is needed
because Verilator warns, correctly, that the threshold gates are latches
and that the handshake closes a combinational loop (see below).

What the tests establish:

* `tb_ncl_sbox_top` sends all 256 bytes in both modes, plus the six
  reference pairs below, through the handshake stage. It checks each result
  and that each NULL wavefront returns. It checks that reset leaves the stage
  empty and that no rail pair is ever 11. It checks that wires inside the
  stage and at `dout` change monotonically within each wavefront. Every
  seventh item the consumer stalls, and the test checks that the stage holds
  its output and refuses the next word. It counts DATA and NULL wavefronts,
  both modes, stalls and monotonic wavefronts, and fails if any count is
  zero. The stage has no parameters, so this is also the full-size run.
* `tb_ncl_sbox` tests the combinational S-Box exhaustively in both modes,
  including input completeness with respect to `mode`. It also checks some
  internal values for inputs 26, 32 and 51: the inverse-affine output and the
  inverter's input and output.
* Reference pairs: S(9) = 0x01, S(26) = 0xA2, S(106) = 0x02, S^-1(32) =
  0x54, S^-1(51) = 0x66, S^-1(156) = 0x1C (inputs in decimal).
* Every arithmetic block is tested exhaustively against independent
  binary arithmetic. The gates, multiplexer, register and completion
  detector are tested over every order of input arrival and departure.

## How far to trust it, and where it is this implementation's own

* **Logic-level model.** The gates are zero-delay latches. The simulation
  checks the logic and the NCL protocol: completeness, hysteresis and
  handshake. It does not check timing, orphans, or real delay-insensitivity
  under arbitrary wire delays. Nor does it check the power, noise and DPA
  resistance that motivate the design. Those need a transistor-level
  implementation in an NCL gate library. A standard-cell or FPGA synthesis of
  this RTL turns every threshold gate into a latch built from ordinary logic.
  That shows size, but not the real circuit.
* **Choices the design description leaves open**, made here:
  * the GF(2^4) polynomial x^4+x+1, λ = 0xE and the isomorphic mapping. For
    input 0x36 the mapping gives the nibbles a^h = 1000 and a^l = 0100,
    which agree with the reference simulation of the original design;
  * the GF(2^4) inverter's insides (a^14);
  * how the XOR/AND/multiplexer equations map onto threshold gates;
  * TH22 gates in the completion cascade (plain AND gates would let the
    acknowledge move before every bit has changed);
  * the reset (registers clear to NULL);
  * the mode encoding (DATA0 = encrypt).
* **Gate counts.** The original design quotes 16 XOR gates for the affine
  transform, 12 for the inverse affine transform and 95 for the map, square
  and multiply steps. Here each output is an unshared chain of two-input
  XORs: 32 for the affine transform and 16 for the inverse. The function is
  the same, but the gate count is higher. Sharing common sub-terms between
  rows would bring it down.
* **Only the gates needed are modelled.** NCL has 27 fundamental threshold
  gates. This design uses THmn (TH12, TH22, TH33), THxor0 and THand0.
* **Scope.** This is a single S-Box stage. A full AES round or cipher around
  it (ShiftRows, MixColumns, AddRoundKey, key expansion) is not part of the
  design.

## Changing it

* `ncl_mux2 #(W)`, `ncl_register #(W)` and `ncl_completion #(N)` are
  width-parameterised. Wider NCL pipelines can be built by chaining
  register-logic-register stages, with each completion output driving the
  previous register's `ki`.
* New linear maps need only a matrix (`ncl_linear #(NI, NO, MAT, C)`). Every
  row must select at least one input.
* Keep every new block input-complete. An OR-style shortcut that lets an
  output go DATA early breaks the handshake silently in a real circuit. In
  this model the tests catch it through their completeness checks.
