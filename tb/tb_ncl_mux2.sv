// tb_ncl_mux2: test of the input-complete dual-rail 2:1 multiplexer
// (8 bits, one select).
//
// For random operand pairs and both select values: the output stays NULL
// while the select or either operand is still NULL, then equals a (select
// DATA0) or b (select DATA1). It must hold its DATA while the operands
// return to NULL with the select still DATA, and return to NULL once all
// inputs are NULL.
module tb_ncl_mux2;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  dr_t [7:0] a, b, z;
  dr_t       s;
  int checks = 0, failures = 0;

  ncl_mux2 #(.W(8)) dut (.a(a), .b(b), .s(s), .z(z));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    b = '0;
    s = DR_NULL;
    #1;
    check(all_null8(z), "NULL in, NULL out");
    for (int n = 0; n < 200; n++) begin
      logic [7:0] va, vb;
      logic       sel;
      va  = 8'($urandom);
      vb  = 8'($urandom);
      sel = n[0];
      a = enc8(va);
      #1;
      check(all_null8(z), "waits for b and select");
      s = dr_enc(sel);
      #1;
      check(!all_data8(z), "waits for the unselected operand too");
      b = enc8(vb);
      #1;
      check(all_data8(z) && dec8(z) == (sel ? vb : va),
            $sformatf("sel %0d a %02h b %02h -> %02h", sel, va, vb, dec8(z)));
      a = '0;
      b = '0;
      #1;
      check(all_data8(z) && dec8(z) == (sel ? vb : va), "holds while select is DATA");
      s = DR_NULL;
      #1;
      check(all_null8(z), "returns to NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
