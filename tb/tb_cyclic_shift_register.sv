// tb_cyclic_shift_register: checks the CSR at N = 10 against the state
// sequence 1000000000, 0100000000, ... 0000000001, 1000000000 (leftmost digit
// is chain 1), including the wrap, holding, and re-initialisation.
module tb_cyclic_shift_register;
  localparam int N = 10;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic init, rotate;
  logic [N-1:0] csr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cyclic_shift_register #(.N(N)) dut (.clk, .rst_n, .init, .rotate, .csr);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // printed form, chain 1 first
  function automatic string as_text(input logic [N-1:0] v);
    string s = "";
    for (int i = 0; i < N; i++) s = {s, v[i] ? "1" : "0"};
    return s;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string expected;
    init = 0; rotate = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(as_text(csr) == "1000000000", {"reset state ", as_text(csr)});
    for (int step = 1; step <= 2 * N + 3; step++) begin
      rotate = 1; @(negedge clk); rotate = 0;
      expected = "";
      for (int i = 0; i < N; i++) expected = {expected, (i == step % N) ? "1" : "0"};
      check(as_text(csr) == expected, $sformatf("step %0d: %s, expected %s", step, as_text(csr), expected));
      check($countones(csr) == 1, "exactly one pseudorandom chain");
      @(negedge clk);
      check(as_text(csr) == expected, "holds without rotate");
    end
    init = 1; @(negedge clk); init = 0;
    check(as_text(csr) == "1000000000", "init reloads the initial state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
