// tb_misr: checks a 20-input, 32-bit MISR against a reference written here
// (polynomial x^32+x^22+x^2+x+1, chain i into bit i), including clear and
// hold, and checks that a single flipped input bit changes the signature.
module tb_misr;
  localparam int N = 20;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, en;
  logic [N-1:0] din;
  logic [31:0] sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr #(.N(N), .WIDTH(32)) dut (.clk, .rst_n, .clear, .en, .din, .signature(sig));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] ref_step(input logic [31:0] s, input logic [N-1:0] d);
    logic [31:0] n;
    n = {s[30:0], 1'b0};
    if (s[31]) begin
      n[0] ^= 1'b1; n[1] ^= 1'b1; n[2] ^= 1'b1; n[22] ^= 1'b1;
    end
    for (int i = 0; i < N; i++) n[i] ^= d[i];
    return n;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] model, good;
    logic [N-1:0] stream [300];
    clear = 0; en = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(sig == '0, "reset clears");
    for (int t = 0; t < 300; t++) stream[t] = N'($urandom);
    for (int run = 0; run < 2; run++) begin
      clear = 1; @(negedge clk); clear = 0;
      check(sig == '0, "clear");
      model = '0;
      for (int t = 0; t < 300; t++) begin
        din = stream[t];
        if (run == 1 && t == 137) din[5] = ~din[5];
        en = (t % 7) != 3;
        @(negedge clk);
        if (en) model = ref_step(model, din);
        check(sig == model, $sformatf("run %0d step %0d", run, t));
      end
      en = 0;
      if (run == 0) good = sig;
      else check(sig != good, "single-bit error changes the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
