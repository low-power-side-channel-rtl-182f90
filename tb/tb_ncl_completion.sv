// tb_ncl_completion: test of the completion-detection cascade (9 inputs).
//
// The per-bit acknowledges fall one by one in a random order, then rise one
// by one in another: the combined acknowledge must change only after the
// last of them has changed, and hold its value until then.
module tb_ncl_completion;
  localparam int N = 9;
  logic [N-1:0] ko;
  logic         ko_all;
  int checks = 0, failures = 0;

  ncl_completion #(.N(N)) dut (.ko(ko), .ko_all(ko_all));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic shuffle(ref int ord [N]);
    for (int k = 0; k < N; k++) ord[k] = k;
    for (int k = N - 1; k > 0; k--) begin
      int j, t;
      j = int'($urandom_range(k, 0));
      t = ord[k];
      ord[k] = ord[j];
      ord[j] = t;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ord [N];
    ko = '1;
    #1;
    check(ko_all, "all rfd -> rfd");
    for (int n = 0; n < 50; n++) begin
      shuffle(ord);
      for (int k = 0; k < N; k++) begin
        ko[ord[k]] = 1'b0;
        #1;
        check(ko_all == (k < N - 1), $sformatf("falling, %0d of %0d low", k + 1, N));
      end
      shuffle(ord);
      for (int k = 0; k < N; k++) begin
        ko[ord[k]] = 1'b1;
        #1;
        check(ko_all == (k == N - 1), $sformatf("rising, %0d of %0d high", k + 1, N));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
