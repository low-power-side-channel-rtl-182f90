// tb_ncl_sbox: exhaustive test of the combinational dual-rail S-Box.
//
// For every byte and both modes: apply DATA, check the result against the
// reference S-Box / inverse S-Box, then apply NULL and check that the
// output returns to NULL. Also checks input completeness: with the data
// applied but the mode still NULL, the output must stay NULL. Includes the
// six input/output pairs listed for the design (9, 26, 106 encrypt;
// 32, 51, 156 decrypt) and, for 26, 32 and 51, the inverse-affine output
// and the inverter's input and output.
module tb_ncl_sbox;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  dr_t [7:0] din, dout;
  dr_t       mode;
  int checks = 0, failures = 0;

  ncl_sbox dut (.din(din), .mode(mode), .dout(dout));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Internal values seen while the last DATA word was applied: inverse
  // affine output, inverter input and inverter output.
  logic [7:0] seen_iaff, seen_inv_in, seen_inv_out;

  task automatic apply(input logic [7:0] v, input logic m, output logic [7:0] res);
    din = enc8(v);
    #1;
    check(all_null8(dout), $sformatf("output left NULL before mode arrives (%0d)", v));
    mode = dr_enc(m);
    #1;
    check(all_data8(dout), $sformatf("output DATA for %0d", v));
    res = dec8(dout);
    seen_iaff    = dec8(dut.iaff);
    seen_inv_in  = dec8(dut.inv_in);
    seen_inv_out = dec8(dut.inv_out);
    din = '0;
    #1;
    check(all_data8(dout) && dec8(dout) == res, "output held while mode is still DATA");
    mode = DR_NULL;
    #1;
    check(all_null8(dout), "output back to NULL");
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r;
    din = '0;
    mode = DR_NULL;
    #1;
    // Values listed with the design.
    apply(8'd9, 1'b0, r);   check(r == 8'b00000001, "S(9)");
    apply(8'd26, 1'b0, r);  check(r == 8'b10100010, "S(26)");
    check(seen_iaff == 8'b01100111 && seen_inv_in == 8'b00011010 && seen_inv_out == 8'b11111101,
          "internal values for 26");
    apply(8'd106, 1'b0, r); check(r == 8'b00000010, "S(106)");
    apply(8'd32, 1'b1, r);  check(r == 8'b01010100, "S^-1(32)");
    check(seen_iaff == 8'b01001100 && seen_inv_in == 8'b01001100 && seen_inv_out == 8'b01010100,
          "internal values for 32");
    apply(8'd51, 1'b1, r);  check(r == 8'b01100110, "S^-1(51)");
    check(seen_iaff == 8'b00110110 && seen_inv_in == 8'b00110110 && seen_inv_out == 8'b01100110,
          "internal values for 51");
    apply(8'd156, 1'b1, r); check(r == 8'b00011100, "S^-1(156)");
    for (int v = 0; v < 256; v++) begin
      apply(8'(v), 1'b0, r);
      check(r == sbox(8'(v)), $sformatf("S(%02h) = %02h, expected %02h", v, r, sbox(8'(v))));
      apply(8'(v), 1'b1, r);
      check(r == inv_sbox(8'(v)), $sformatf("S^-1(%02h) = %02h, expected %02h", v, r, inv_sbox(8'(v))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
