// tb_phase_shifter: checks the phase shifter at 30 inputs and 80 outputs (20
// chains of four outputs). The XOR mask of every output is found by driving
// one-hot LFSR states; each must have exactly three stages and all 80 must
// differ. Random states then check that the network is linear (every output
// equals the XOR of its one-hot responses) and that each output is 1 about
// half of the time.
module tb_phase_shifter;
  localparam int W = 30;
  localparam int NO = 80;
  int checks = 0, failures = 0;

  logic [W-1:0]  st;
  logic [NO-1:0] po;

  phase_shifter #(.W_IN(W), .N_OUT(NO)) dut (.lfsr_state(st), .ps_out(po));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] mask [NO];
    logic [NO-1:0] expect_o;
    int ones [NO];
    for (int j = 0; j < NO; j++) begin mask[j] = '0; ones[j] = 0; end
    st = '0; #1;
    check(po == '0, "zero state gives zero outputs");
    for (int b = 0; b < W; b++) begin
      st = W'(1) << b; #1;
      for (int j = 0; j < NO; j++) mask[j][b] = po[j];
    end
    for (int j = 0; j < NO; j++) begin
      check($countones(mask[j]) == 3, $sformatf("output %0d XORs %0d stages", j, $countones(mask[j])));
      for (int k = 0; k < j; k++)
        if (mask[k] == mask[j]) check(0, $sformatf("outputs %0d and %0d identical", k, j));
    end
    for (int t = 0; t < 4000; t++) begin
      st = W'({$urandom, $urandom}); #1;
      for (int j = 0; j < NO; j++) begin
        expect_o[j] = ^(st & mask[j]);
        ones[j] += po[j];
      end
      check(po == expect_o, "outputs are linear in the state");
    end
    for (int j = 0; j < NO; j++)
      check(ones[j] > 1700 && ones[j] < 2300, $sformatf("output %0d balance %0d/4000", j, ones[j]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
