// tb_ncl_gf4_inv: exhaustive test of ncl_gf4_inv (GF(2^4) inverse, 0 -> 0).
//
// For all 16 inputs the dual-rail output must be DATA, equal the reference
// (plain GF(2^4) arithmetic mod x^4+x+1) and return to NULL with the
// input; with any one input bit NULL the output must not be complete DATA.
module tb_ncl_gf4_inv;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  dr_t [3:0] a, q;
  int checks = 0, failures = 0;

  ncl_gf4_inv dut (.a(a), .q(q));

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
    #1;
    check(q == '0, "NULL in, NULL out");
    for (int v = 0; v < 16; v++) begin
      logic [3:0] x, exp;
      x = 4'(v);
      exp = gf4_inv(x);
      check(x == 0 ? exp == 0 : gf4_mul(x, exp) == 4'h1, "reference inverse");
      a = enc4(x);
      #1;
      check(all_data4(q) && dec4(q) == exp,
            $sformatf("in %h: out %h, expected %h", v, dec4(q), exp));
      a = '0;
      #1;
      check(q == '0, "returns to NULL");
    end
    for (int b = 0; b < 4; b++) begin
      a = enc4(4'hB);
      a[b] = DR_NULL;
      #1;
      check(!all_data4(q), $sformatf("output waits for input bit %0d", b));
      a = '0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
