// tb_toggle_rates: runs the scheme in the configurations of its evaluation and
// checks the transition probability at the scan inputs, 0.5^(K+1), for
// chains driven through the K-input AND gate, and 0.5 for the chain the CSR
// makes pseudorandom:
//   10 chains x 18 cells (s5378-sized), K = 1, 2, 3, MLSA mode;
//   15 chains x 43 cells (s13207-sized), K = 2, 40-stage LFSR, MLSA mode;
//   10 chains x 18 cells, K = 2, LSA mode (no pseudorandom chain);
//   10 chains x 18 cells, K = 3, two pseudorandom chains per pattern.
// It also checks the session length of each run. Rates must fall within 15 %
// of the expected value (several thousand samples each).
module tb_toggle_rates;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam int NR = 6;
  bit fin [NR];
  bit tok [NR];
  int tp [NR], cp [NR], tc [NR], cc [NR];

  toggle_probe #(.N(10), .M(18), .K(1), .P(300))                u0 (.clk, .rst_n, .finished(fin[0]), .tog_plain(tp[0]), .cyc_plain(cp[0]), .tog_csr(tc[0]), .cyc_csr(cc[0]), .timing_ok(tok[0]));
  toggle_probe #(.N(10), .M(18), .K(2), .P(300))                u1 (.clk, .rst_n, .finished(fin[1]), .tog_plain(tp[1]), .cyc_plain(cp[1]), .tog_csr(tc[1]), .cyc_csr(cc[1]), .timing_ok(tok[1]));
  toggle_probe #(.N(10), .M(18), .K(3), .P(300))                u2 (.clk, .rst_n, .finished(fin[2]), .tog_plain(tp[2]), .cyc_plain(cp[2]), .tog_csr(tc[2]), .cyc_csr(cc[2]), .timing_ok(tok[2]));
  toggle_probe #(.N(15), .M(43), .K(2), .LFSR_W(40), .P(150))   u3 (.clk, .rst_n, .finished(fin[3]), .tog_plain(tp[3]), .cyc_plain(cp[3]), .tog_csr(tc[3]), .cyc_csr(cc[3]), .timing_ok(tok[3]));
  toggle_probe #(.N(10), .M(18), .K(2), .P(300), .MODE(1'b0))   u4 (.clk, .rst_n, .finished(fin[4]), .tog_plain(tp[4]), .cyc_plain(cp[4]), .tog_csr(tc[4]), .cyc_csr(cc[4]), .timing_ok(tok[4]));

  toggle_probe #(.N(10), .M(18), .K(3), .P(300), .CSR_INIT(10'b0000100001))
                                                                u5 (.clk, .rst_n, .finished(fin[5]), .tog_plain(tp[5]), .cyc_plain(cp[5]), .tog_csr(tc[5]), .cyc_csr(cc[5]), .timing_ok(tok[5]));

  localparam int KS [NR] = '{1, 2, 3, 2, 2, 3};
  localparam bit MS [NR] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b1};
  localparam int NCSR [NR] = '{1, 1, 1, 1, 0, 2};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rp, rc, ep;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    for (int r = 0; r < NR; r++) begin
      ep = 0.5 ** (KS[r] + 1);
      rp = real'(tp[r]) / cp[r];
      $display("run %0d K=%0d mode=%s: plain %0d/%0d = %f (expected %f)", r, KS[r],
               MS[r] ? "MLSA" : "LSA", tp[r], cp[r], rp, ep);
      check(tok[r], $sformatf("run %0d session length", r));
      check(rp > 0.85 * ep && rp < 1.15 * ep, $sformatf("run %0d plain toggle rate", r));
      if (MS[r]) begin
        rc = real'(tc[r]) / cc[r];
        $display("run %0d CSR chain %0d/%0d = %f (expected 0.5)", r, tc[r], cc[r], rc);
        check(rc > 0.45 && rc < 0.55, $sformatf("run %0d CSR chain toggle rate", r));
        check(cc[r] == NCSR[r] * 300 * 17 || r == 3, $sformatf("run %0d number of pseudorandom chains", r));
      end else begin
        check(cc[r] == 0, "no pseudorandom chain in LSA mode");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
