// tb_ncl_inv_affine: exhaustive test of ncl_inv_affine (AES inverse affine transformation, constant 0x05).
//
// For all 256 input bytes: the dual-rail output must be DATA and equal the
// reference inv_affine, and must return to NULL with the input. Input
// completeness: with any one input bit still NULL, the output must not be
// complete DATA.
module tb_ncl_inv_affine;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  dr_t [7:0] a, q;
  int checks = 0, failures = 0;

  ncl_inv_affine dut (.i(a), .q(q));

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
      exp = inv_affine(8'(v));
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
