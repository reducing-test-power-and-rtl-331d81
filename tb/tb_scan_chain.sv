// tb_scan_chain: drives an 8-cell scan chain with random clear, shift and
// capture clocks and compares cells, first cell and scan output with a queue model.
module tb_scan_chain;
  localparam int M = 8;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, shift_en, capture_en, scan_in, first_cell, scan_out;
  logic [M-1:0] capture_data, cells;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_chain #(.M(M)) dut (.clk, .rst_n, .clear, .shift_en, .capture_en, .scan_in, .capture_data,
                           .cells, .first_cell, .scan_out);

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
    logic model [M];   // model[0] = cell M (first), model[M-1] = cell 1 (last)
    clear = 0; shift_en = 0; capture_en = 0; scan_in = 0; capture_data = '0;
    for (int i = 0; i < M; i++) model[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      shift_en = ($urandom % 4) != 0;
      capture_en = ($urandom % 3) == 0;
      clear = ($urandom % 50) == 0;
      scan_in = 1'($urandom);
      capture_data = M'($urandom);
      @(negedge clk);
      if (clear) begin
        for (int i = 0; i < M; i++) model[i] = 1'b0;
      end else if (shift_en) begin
        for (int i = M - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = scan_in;
      end else if (capture_en) begin
        for (int i = 0; i < M; i++) model[i] = capture_data[M-1-i];
      end
      for (int i = 0; i < M; i++)
        check(cells[M-1-i] == model[i], $sformatf("t=%0d cell %0d", t, M - i));
      check(first_cell == model[0] && scan_out == model[M-1], "first cell and scan output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
