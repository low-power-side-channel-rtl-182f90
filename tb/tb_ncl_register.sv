// tb_ncl_register: test of the 8-bit dual-rail NCL register.
//
// After reset the register holds NULL and requests data (ko all 1). A DATA
// word passes only while ki = 1 (rfd) and is then held, whatever the input
// does, until ki = 0 (rfn); NULL passes only while ki = 0. Each ko bit is 0
// exactly while its bit holds DATA. rst clears a held DATA word. (The
// producer never offers new DATA before the register has returned to NULL,
// so that case is not driven.)
module tb_ncl_register;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  logic       rst, ki;
  dr_t [7:0]  d, q;
  logic [7:0] ko;
  int checks = 0, failures = 0;

  ncl_register #(.W(8)) dut (.rst(rst), .d(d), .ki(ki), .q(q), .ko(ko));

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
    rst = 1'b1;
    ki  = 1'b0;
    d   = '0;
    #1;
    rst = 1'b0;
    #1;
    check(all_null8(q) && ko == 8'hFF, "reset: NULL, rfd");
    for (int n = 0; n < 100; n++) begin
      logic [7:0] v;
      v = 8'($urandom);
      // DATA arrives while rfn: blocked.
      ki = 1'b0;
      d  = enc8(v);
      #1;
      check(all_null8(q) && ko == 8'hFF, "DATA blocked while ki = rfn");
      ki = 1'b1;
      #1;
      check(all_data8(q) && dec8(q) == v && ko == 8'h00, "DATA passes on rfd");
      d = '0;
      #1;
      check(all_data8(q) && dec8(q) == v, "DATA held while ki = rfd");
      check(ko == 8'h00, "ko = rfn while DATA is held");
      ki = 1'b0;
      #1;
      check(all_null8(q) && ko == 8'hFF, "NULL passes on rfn");
    end
    // Partial word: only the DATA bits acknowledge.
    ki = 1'b1;
    d = '0;
    d[2] = DR_DATA1;
    d[5] = DR_DATA0;
    #1;
    check(ko == 8'b1101_1011, "per-bit ko");
    ki = 1'b0;
    d = '0;
    #1;
    check(all_null8(q), "partial word cleared");
    ki = 1'b1;
    d = enc8(8'hA5);
    #1;
    rst = 1'b1;
    #1;
    check(all_null8(q), "rst clears DATA");
    rst = 1'b0;
    d = '0;
    ki = 1'b0;
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
