// tb_ncl_gf4_mul: exhaustive test of the dual-rail GF(2^4) modular
// multiplier.
//
// For all 256 operand pairs the product must be DATA, equal the reference
// (shift-and-add with reduction by x^4+x+1) and return to NULL. Input
// completeness: with either operand (or one bit of it) still NULL the
// product must not be complete DATA.
module tb_ncl_gf4_mul;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  dr_t [3:0] a, b, q;
  int checks = 0, failures = 0;

  ncl_gf4_mul dut (.a(a), .b(b), .q(q));

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
    #1;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        logic [3:0] exp;
        exp = gf4_mul(4'(x), 4'(y));
        a = enc4(4'(x));
        #1;
        check(!all_data4(q), "waits for operand b");
        b = enc4(4'(y));
        #1;
        check(all_data4(q) && dec4(q) == exp,
              $sformatf("%h * %h = %h, expected %h", x, y, dec4(q), exp));
        a = '0;
        #1;
        check(all_data4(q), "holds DATA until both operands are NULL");
        b = '0;
        #1;
        check(q == '0, "returns to NULL");
      end
    for (int k = 0; k < 4; k++) begin
      a = enc4(4'h7);
      b = enc4(4'h9);
      b[k] = DR_NULL;
      #1;
      check(!all_data4(q), $sformatf("waits for operand bit b%0d", k));
      a = '0;
      b = '0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
