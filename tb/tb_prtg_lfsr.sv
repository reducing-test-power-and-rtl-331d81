// tb_prtg_lfsr: checks the PRTG LFSR.
// A 16-stage instance must run through all 2^16 - 1 non-zero states before
// repeating. A 30-stage (default) instance is compared step by step with a
// reference written here as a left-shifting Galois LFSR on the bit-reversed
// state, from the polynomial x^30+x^6+x^4+x+1. Seed loading, the all-zero seed
// rule and holding with `en` low are checked too.
module tb_prtg_lfsr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic        load16, en16;
  logic [15:0] seed16, st16;
  logic        load30, en30;
  logic [29:0] seed30, st30;

  prtg_lfsr #(.WIDTH(16)) u16 (.clk, .rst_n, .load(load16), .seed(seed16), .en(en16), .state(st16));
  prtg_lfsr              u30 (.clk, .rst_n, .load(load30), .seed(seed30), .en(en30), .state(st30));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [29:0] rev30(input logic [29:0] v);
    logic [29:0] r;
    for (int i = 0; i < 30; i++) r[i] = v[29-i];
    return r;
  endfunction

  // x^30 + x^6 + x^4 + x + 1, reference on the reversed state
  function automatic logic [29:0] ref30_step(input logic [29:0] s);
    logic [29:0] t;
    logic        msb;
    t   = rev30(s);
    msb = t[29];
    t   = t << 1;
    if (msb) t = t ^ 30'b1000011;
    t[4] = t[4] ^ msb;
    return rev30(t);
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [65536];
    int period;
    logic [29:0] model;
    logic [15:0] first;
    load16 = 0; en16 = 0; seed16 = 16'hACE1;
    load30 = 0; en30 = 0; seed30 = 30'h0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(st16 == 16'd1 && st30 == 30'd1, "reset value is 1");

    // zero seed is replaced by 1
    load30 = 1; @(negedge clk); load30 = 0;
    check(st30 == 30'd1, "zero seed loads 1");

    // hold with en low
    load16 = 1; @(negedge clk); load16 = 0;
    check(st16 == 16'hACE1, "seed loaded");
    repeat (3) @(negedge clk);
    check(st16 == 16'hACE1, "state holds when en is low");

    // full period of the 16-stage register
    first = st16;
    period = 0;
    en16 = 1;
    do begin
      seen[st16] = 1'b1;
      @(negedge clk);
      period++;
      if (st16 == 16'd0) begin
        check(0, "16-stage LFSR reached zero");
        break;
      end
      if (st16 != first && seen[st16]) begin
        check(0, "16-stage LFSR repeated a state early");
        break;
      end
    end while (st16 != first && period < 70000);
    en16 = 0;
    check(period == 65535, $sformatf("16-stage period %0d, expected 65535", period));

    // 30-stage against the reference
    seed30 = 30'h2A5F_0C31;
    load30 = 1; @(negedge clk); load30 = 0;
    model = 30'h2A5F_0C31;
    en30 = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      model = ref30_step(model);
      if (i % 100 == 0 || st30 != model)
        check(st30 == model, $sformatf("30-stage step %0d: %h vs %h", i, st30, model));
    end
    en30 = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
