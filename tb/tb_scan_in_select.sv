// tb_scan_in_select: exhaustive check of the scan input logic for K = 3 and
// K = 1: the multiplexer takes the phase-shifter data when all K control bits
// are 1 or the CSR bit is 1, and repeats the first scan cell otherwise.
module tb_scan_in_select;
  int checks = 0, failures = 0;

  logic [2:0] ctrl3;
  logic       ctrl1;
  logic       data, csr, hold;
  logic       sel3, out3, sel1, out1;

  scan_in_select           u3 (.ps_ctrl(ctrl3), .ps_data(data), .csr_bit(csr), .hold_val(hold), .sel(sel3), .scan_in(out3));
  scan_in_select #(.K(1))  u1 (.ps_ctrl(ctrl1), .ps_data(data), .csr_bit(csr), .hold_val(hold), .sel(sel1), .scan_in(out1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_sel, exp_out;
    for (int v = 0; v < 64; v++) begin
      {ctrl3, data, csr, hold} = 6'(v);
      ctrl1 = ctrl3[0];
      #1;
      exp_sel = (ctrl3 == 3'b111) || csr;
      exp_out = exp_sel ? data : hold;
      check(sel3 == exp_sel && out3 == exp_out, $sformatf("K=3 case %0d", v));
      exp_sel = ctrl1 || csr;
      exp_out = exp_sel ? data : hold;
      check(sel1 == exp_sel && out1 == exp_out, $sformatf("K=1 case %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
