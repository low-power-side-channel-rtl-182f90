// tb_ncl_inv_iso_map: test of ncl_inv_iso_map, the inverse mapping GF((2^4)^2) -> GF(2^8).
//
// The output for all 256 inputs is collected (checking DATA and the
// return to NULL each time). The table must be a bijection and a field
// isomorphism: it maps composite-field products to AES-field products, for every pair of
// bytes, and 1 must map to 1. Input completeness: with any one input bit
// NULL the output must not be complete DATA.
module tb_ncl_inv_iso_map;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  localparam logic [3:0] LAMBDA = 4'hE;

  dr_t [7:0] a, q;
  logic [7:0] tbl [256];
  logic [255:0] seen;
  int checks = 0, failures = 0;

  ncl_inv_iso_map dut (.a(a), .q(q));

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
    int bad;
    a = '0;
    seen = '0;
    #1;
    for (int v = 0; v < 256; v++) begin
      a = enc8(8'(v));
      #1;
      check(all_data8(q), "output DATA");
      tbl[v] = dec8(q);
      seen[dec8(q)] = 1'b1;
      a = '0;
      #1;
      check(all_null8(q), "returns to NULL");
    end
    check(&seen, "mapping is a bijection");
    check(tbl[1] == 8'h01, "1 maps to 1");
    bad = 0;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        logic [7:0] a_, b_;
        a_ = 8'(x);
        b_ = 8'(y);
        if (!(tbl[comp_mul(a_,b_,LAMBDA)] == gf8_mul(tbl[a_], tbl[b_]))) bad++;
      end
    check(bad == 0, $sformatf("multiplication preserved (%0d pairs wrong)", bad));
    for (int b = 0; b < 8; b++) begin
      a = enc8(8'h5B);
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
