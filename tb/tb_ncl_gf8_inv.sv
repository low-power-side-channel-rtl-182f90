// tb_ncl_gf8_inv: exhaustive test of ncl_gf8_inv (GF(2^8) multiplicative inverse, 0 -> 0).
//
// For all 256 input bytes: the dual-rail output must be DATA and equal the
// reference gf8_inv, and must return to NULL with the input. Input
// completeness: with any one input bit still NULL, the output must not be
// complete DATA.
module tb_ncl_gf8_inv;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  dr_t [7:0] a, q;
  int checks = 0, failures = 0;

  ncl_gf8_inv dut (.a(a), .q(q));

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
    check(all_null8(q), "NULL in, NULL out");
    for (int v = 0; v < 256; v++) begin
      logic [7:0] exp;
      exp = gf8_inv(8'(v));
      a = enc8(8'(v));
      #1;
      check(all_data8(q) && dec8(q) == exp,
            $sformatf("in %02h: out %02h, expected %02h", v, dec8(q), exp));
      a = '0;
      #1;
      check(all_null8(q), "returns to NULL");
    end
    for (int b = 0; b < 8; b++) begin
      a = enc8(8'h96);
      a[b] = DR_NULL;
      #1;
      check(!all_data8(q), $sformatf("output waits for input bit %0d", b));
      a = '0;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
