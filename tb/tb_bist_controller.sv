// tb_bist_controller: runs the controller alone (M = 5) for several pattern
// counts and checks, clock by clock, the expected flow: one init clock, then
// per pattern M shift clocks and one capture clock with a CSR rotation, then M
// unload clocks, `done` after exactly 1 + P*(M+1) + M clocks, MISR enabled
// only on shifts after the first capture, and `pass` following the signature
// comparison. A start while busy must be ignored.
module tb_bist_controller;
  localparam int M = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start;
  logic [19:0] num_patterns, patterns_applied;
  logic [31:0] signature, expected_signature;
  logic init, shift_en, capture_en, csr_rotate, misr_en, busy, done, pass;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller #(.M(M)) dut (.clk, .rst_n, .start, .num_patterns, .signature, .expected_signature,
                                .init, .shift_en, .capture_en, .csr_rotate, .misr_en,
                                .busy, .done, .pass, .patterns_applied);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int p);
    int total, c, pat, pos;
    bit e_init, e_shift, e_cap, e_misr;
    num_patterns = 20'(p);
    start = 1; @(negedge clk); start = 0;
    total = 1 + p * (M + 1) + M;
    for (c = 0; c < total; c++) begin
      // expected outputs during clock c
      e_init = (c == 0);
      e_shift = 0; e_cap = 0; e_misr = 0;
      if (c > 0 && c <= p * (M + 1)) begin
        pat = (c - 1) / (M + 1);
        pos = (c - 1) % (M + 1);
        e_shift = (pos < M);
        e_cap = (pos == M);
        e_misr = e_shift && pat > 0;
      end else if (c > p * (M + 1)) begin
        e_shift = 1; e_misr = 1;
      end
      check(init == e_init && shift_en == e_shift && capture_en == e_cap &&
            csr_rotate == e_cap && misr_en == e_misr && busy && !done,
            $sformatf("P=%0d clock %0d: init %b shift %b cap %b rot %b misr %b busy %b",
                      p, c, init, shift_en, capture_en, csr_rotate, misr_en, busy));
      if (c == 2) begin
        // a second start while busy changes nothing
        num_patterns = 20'd99; start = 1;
      end
      @(negedge clk);
      start = 0;
    end
    check(done && !busy && patterns_applied == 20'(p), $sformatf("P=%0d done after %0d clocks", p, total));
    signature = 32'h1234_5678; expected_signature = 32'h1234_5678; #1;
    check(pass, "pass when signatures match");
    expected_signature = 32'h1234_5679; #1;
    check(!pass, "fail when signatures differ");
    repeat (3) @(negedge clk);
    check(done && !shift_en && !capture_en && !misr_en, "stays done and idle");
  endtask

  initial begin
    start = 0; num_patterns = '0; signature = '0; expected_signature = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done && !shift_en && !pass, "idle after reset");
    run(1);
    run(3);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
