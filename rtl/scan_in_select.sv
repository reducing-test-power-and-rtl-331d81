// scan_in_select: the per-chain input logic of the (M)LSA-BIST scheme: a
// K-input AND gate, a 2-input OR gate and a 2-to-1 multiplexer.
//
// The K AND inputs come from phase-shifter outputs, so the AND output is 1 with
// probability 0.5^K. The OR gate adds the chain's CSR bit: with a 1 there the
// chain takes pseudorandom data for the whole pattern. The multiplexer passes
// the phase-shifter data bit (`ps_data`, input 1) when its control is 1 and
// otherwise the current value of the chain's first scan cell (`hold_val`,
// input 0), repeating it. A chain not selected by the CSR therefore toggles at
// its scan input with probability 0.5^(K+1). For K = 1 the single control bit
// drives the OR gate directly. For the first (LSA) scheme, which has no CSR,
// tie `csr_bit` to 0.
//
// Interface: combinational; `sel` is the multiplexer control, `scan_in` its
// output.
module scan_in_select #(
  parameter int K = 3
) (
  input  logic [K-1:0] ps_ctrl,
  input  logic         ps_data,
  input  logic         csr_bit,
  input  logic         hold_val,
  output logic         sel,
  output logic         scan_in
);

  always_comb begin
    sel     = (&ps_ctrl) | csr_bit;
    scan_in = sel ? ps_data : hold_val;
  end

endmodule
