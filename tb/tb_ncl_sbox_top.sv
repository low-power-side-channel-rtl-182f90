// tb_ncl_sbox_top: end-to-end test of the clock-free NCL S-Box stage.
//
// A producer and a consumer run the four-phase handshake around the stage:
// the producer offers DATA while ko = 1 and NULL once ko = 0; the consumer
// checks each DATA result against the reference S-Box, answers ki = 0,
// waits for NULL and answers ki = 1. All 256 bytes are sent in both modes,
// plus the six listed input/output pairs. Every few items the consumer
// withholds its acknowledge: the stage must then hold its output and
// refuse the next DATA (ko stays 1). Also checked: reset leaves the stage
// empty (NULL, ko = 1), no rail pair is ever 11, and every wavefront is
// monotonic both inside the stage and at dout: wires only rise on the way
// from NULL to DATA and only fall on the way back, so the output never
// changes while it holds DATA. Counts of DATA and NULL wavefronts, both
// modes and stalls must all be non-zero. Runs at the design's defaults
// (the stage has no parameters).
module tb_ncl_sbox_top;
  import ncl_pkg::*;
  import sbox_ref_pkg::*;

  logic      rst, ko, ki;
  dr_t [7:0] din, dout;
  dr_t       mode;
  int checks = 0, failures = 0;
  int n_data = 0, n_null = 0, n_enc = 0, n_dec = 0, n_stall = 0;

  ncl_sbox_top dut (.rst(rst), .din(din), .mode(mode), .ko(ko), .ki(ki), .dout(dout));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Wait (in steps of one time unit) until cond_val() holds; bounded.
  task automatic wait_ko(input logic val, input string what);
    int n;
    n = 0;
    while (ko !== val && n < 50) begin #1; n++; end
    check(ko === val, what);
  endtask

  // Rail pairs must never be 11.
  always @(dout or din or mode) begin
    for (int k = 0; k < 8; k++) begin
      if (dout[k] == 2'b11) begin failures++; $display("FAIL: illegal rails on dout[%0d]", k); end
    end
  end

  // Monotonic wavefronts: between an all-NULL and an all-DATA state of the
  // S-Box output (inside the stage) and of dout, wires may only rise; from
  // all-DATA back to all-NULL they may only fall.
  logic [15:0] prev_core, prev_out;
  logic        core_rising = 1'b1, out_rising = 1'b1;
  int          n_mono = 0;

  always @(dut.sbox_out) begin
    logic [15:0] now;
    now = dut.sbox_out;
    if (core_rising && ((prev_core & ~now) != 0)) begin
      failures++; $display("FAIL: S-Box output wire fell during a DATA wavefront");
    end
    if (!core_rising && ((~prev_core & now) != 0)) begin
      failures++; $display("FAIL: S-Box output wire rose during a NULL wavefront");
    end
    if (all_data8(dut.sbox_out)) begin core_rising = 1'b0; n_mono++; end
    if (all_null8(dut.sbox_out)) core_rising = 1'b1;
    prev_core = now;
  end

  always @(dout) begin
    if (out_rising && ((prev_out & ~dout) != 0)) begin
      failures++; $display("FAIL: dout wire fell during a DATA wavefront");
    end
    if (!out_rising && ((~prev_out & dout) != 0)) begin
      failures++; $display("FAIL: dout wire rose during a NULL wavefront");
    end
    if (all_data8(dout)) out_rising = 1'b0;
    if (all_null8(dout)) out_rising = 1'b1;
    prev_out = dout;
  end

  // Item sequence (value, mode, consumer stall) run through the stage.
  typedef struct { logic [7:0] v; logic m; logic [7:0] exp; } item_t;
  item_t items[$];

  // Producer.
  task automatic produce();
    foreach (items[n]) begin
      wait_ko(1'b1, "producer: rfd before DATA");
      din  = enc8(items[n].v);
      mode = dr_enc(items[n].m);
      wait_ko(1'b0, "producer: data acknowledged");
      din  = '0;
      mode = DR_NULL;
      #1;
    end
  endtask

  // Consumer.
  task automatic consume();
    logic [7:0] got;
    foreach (items[n]) begin
      int t;
      t = 0;
      while (!all_data8(dout) && t < 100) begin #1; t++; end
      check(all_data8(dout), $sformatf("item %0d arrives", n));
      got = dec8(dout);
      check(got == items[n].exp, $sformatf("item %0d: %02h -> %02h, expected %02h (mode %0d)",
                                           n, items[n].v, got, items[n].exp, items[n].m));
      n_data++;
      if (items[n].m) n_dec++; else n_enc++;
      if (n % 7 == 3) begin
        // Stall: hold the acknowledge; the stage must keep its output and
        // must not take in the next DATA (ko stays 1 once the producer has
        // offered it).
        #20;
        check(dec8(dout) == got && all_data8(dout), "output held during stall");
        if (n + 1 < items.size()) begin
          check(ko == 1'b1 && all_data8(din), "next DATA offered but not accepted while output is held");
          n_stall++;
        end
      end
      ki = 1'b0;
      t = 0;
      while (!all_null8(dout) && t < 100) begin #1; t++; end
      check(all_null8(dout), $sformatf("item %0d: NULL wavefront", n));
      n_null++;
      ki = 1'b1;
      #1;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    items.push_back('{8'd9,   1'b0, 8'b00000001});
    items.push_back('{8'd26,  1'b0, 8'b10100010});
    items.push_back('{8'd106, 1'b0, 8'b00000010});
    items.push_back('{8'd32,  1'b1, 8'b01010100});
    items.push_back('{8'd51,  1'b1, 8'b01100110});
    items.push_back('{8'd156, 1'b1, 8'b00011100});
    for (int v = 0; v < 256; v++) begin
      items.push_back('{8'(v), 1'b0, sbox(8'(v))});
      items.push_back('{8'(v ^ 8'h5A), 1'b1, inv_sbox(8'(v ^ 8'h5A))});
    end

    prev_core = '0;
    prev_out  = '0;
    rst  = 1'b1;
    ki   = 1'b1;
    din  = '0;
    mode = DR_NULL;
    #5;
    rst = 1'b0;
    #2;
    check(ko == 1'b1 && all_null8(dout), "reset: stage empty, rfd");

    fork
      produce();
      consume();
    join

    check(n_data == items.size(), "every item delivered");
    check(n_null == items.size(), "NULL after every item");
    check(n_enc > 0, "encryption mode used");
    check(n_dec > 0, "decryption mode used");
    check(n_stall > 0, "consumer stall exercised");
    check(n_mono >= items.size(), "monotonic DATA wavefronts observed inside the stage");
    $display("wavefronts: DATA %0d NULL %0d, encrypt %0d decrypt %0d, stalls %0d, monotonic %0d",
             n_data, n_null, n_enc, n_dec, n_stall, n_mono);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
