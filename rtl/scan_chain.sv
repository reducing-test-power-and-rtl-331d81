// scan_chain: one scan chain of the circuit under test, M scan cells.
//
// Cells are numbered M (first, next to the scan input) down to 1 (last, the
// scan output to the MISR). cells[M-1] is cell M and cells[0] is cell 1. With
// `shift_en` the chain moves one place towards cell 1, taking `scan_in` into
// cell M; with `capture_en` (normal mode) every cell loads its bit of
// `capture_data`, the response of the CUT logic. `cells` drives the CUT logic
// and `first_cell` returns cell M to the scan input multiplexer, which repeats
// it when the chain is to hold its value. `clear` (highest priority) and reset
// zero all cells: because the multiplexer can repeat the first cell, the first
// pattern of a test would otherwise depend on whatever the chain held before,
// and the signature would not be repeatable. The clear is this design's
// addition. Shift has priority over capture.
module scan_chain #(
  parameter int M = 87
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         shift_en,
  input  logic         capture_en,
  input  logic         scan_in,
  input  logic [M-1:0] capture_data,
  output logic [M-1:0] cells,
  output logic         first_cell,
  output logic         scan_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cells <= '0;
    else if (clear)
      cells <= '0;
    else if (shift_en)
      cells <= {scan_in, cells[M-1:1]};
    else if (capture_en)
      cells <= capture_data;
  end

  assign first_cell = cells[M-1];
  assign scan_out   = cells[0];

endmodule
