// tb_ncl_and2: test of the input-complete dual-rail AND gate.
//
// Walks every order of arrival: for each operand pair, A then B and B then
// A. The output must stay NULL while only one operand is DATA (input
// completeness), become the AND of the two once both are DATA, hold it
// while only one operand has returned to NULL, and return to NULL after
// both.
module tb_ncl_and2;
  import ncl_pkg::*;

  dr_t a, b, z;
  int checks = 0, failures = 0;

  ncl_and2 dut (.a(a), .b(b), .z(z));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = DR_NULL;
    b = DR_NULL;
    #1;
    check(z == DR_NULL, "NULL in, NULL out");
    for (int n = 0; n < 8; n++) begin
      logic x, y, a_first;
      x = n[0];
      y = n[1];
      a_first = n[2];
      if (a_first) a = dr_enc(x); else b = dr_enc(y);
      #1;
      check(z == DR_NULL, "waits for the second operand");
      if (a_first) b = dr_enc(y); else a = dr_enc(x);
      #1;
      check(z == dr_enc(x & y), $sformatf("%0d AND %0d", x, y));
      if (a_first) a = DR_NULL; else b = DR_NULL;
      #1;
      check(z == dr_enc(x & y), "holds DATA until both operands are NULL");
      if (a_first) b = DR_NULL; else a = DR_NULL;
      #1;
      check(z == DR_NULL, "returns to NULL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
