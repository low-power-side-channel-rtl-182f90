// tb_ncl_th: test of the THmn threshold gate with hysteresis.
//
// Instances TH12, TH22, TH23 and TH33 are driven through every input
// vector on the way up (inputs rising one by one from all-0) and on the
// way down (falling one by one). Reference: on the way up the output is 1
// once at least M inputs are 1; on the way down it stays 1 until all
// inputs are 0. Also checks that rst forces the output low.
module tb_ncl_th;
  logic [2:0] in3;
  logic [1:0] in2;
  logic       rst;
  logic       z12, z22, z23, z33;
  int checks = 0, failures = 0;

  ncl_th #(.M(1), .N(2)) u12 (.in(in2), .rst(1'b0), .z(z12));
  ncl_th #(.M(2), .N(2)) u22 (.in(in2), .rst(rst),  .z(z22));
  ncl_th #(.M(2), .N(3)) u23 (.in(in3), .rst(1'b0), .z(z23));
  ncl_th #(.M(3), .N(3)) u33 (.in(in3), .rst(1'b0), .z(z33));

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
    rst = 1'b0;
    in2 = '0;
    in3 = '0;
    #1;
    check(!z12 && !z22 && !z23 && !z33, "all low");
    // Every order in which three inputs can rise and fall.
    for (int p = 0; p < 6; p++) begin
      int ord [3];
      int cnt;
      case (p)
        0: ord = '{0, 1, 2};
        1: ord = '{0, 2, 1};
        2: ord = '{1, 0, 2};
        3: ord = '{1, 2, 0};
        4: ord = '{2, 0, 1};
        default: ord = '{2, 1, 0};
      endcase
      cnt = 0;
      for (int k = 0; k < 3; k++) begin
        in3[ord[k]] = 1'b1;
        if (ord[k] < 2) in2[ord[k]] = 1'b1;
        cnt++;
        #1;
        check(z23 == (cnt >= 2), $sformatf("TH23 rising, %0d high", cnt));
        check(z33 == (cnt >= 3), $sformatf("TH33 rising, %0d high", cnt));
        check(z12 == (in2 != 0), "TH12 rising");
        check(z22 == (in2 == 2'b11), "TH22 rising");
      end
      for (int k = 0; k < 3; k++) begin
        in3[ord[k]] = 1'b0;
        if (ord[k] < 2) in2[ord[k]] = 1'b0;
        cnt--;
        #1;
        check(z23 == (cnt > 0), $sformatf("TH23 holds until all low, %0d high", cnt));
        check(z33 == (cnt > 0), $sformatf("TH33 holds until all low, %0d high", cnt));
        check(z12 == (in2 != 0), "TH12 falling");
        check(z22 == (in2 != 0), "TH22 holds until both low");
      end
    end
    in2 = 2'b11;
    #1;
    check(z22, "TH22 set");
    rst = 1'b1;
    #1;
    check(!z22, "rst clears");
    rst = 1'b0;
    in2 = 2'b01;
    #1;
    check(!z22, "stays low after rst with one input high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
