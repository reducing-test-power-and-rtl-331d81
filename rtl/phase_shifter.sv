// phase_shifter: XOR network between the PRTG and the scan inputs.
//
// The LFSR stages are too few and too correlated (neighbouring stages carry
// the same sequence one clock apart) to feed many scan chains directly. Every
// output here is the XOR of lsa_bist_pkg::PS_XOR_IN distinct LFSR stages, the
// set chosen per output by lsa_bist_pkg::ps_mask, so all outputs are distinct
// linear combinations of the LFSR state. The XOR network itself follows the
// scheme; the three-input XORs and the way the stages are chosen are this
// design's own.
//
// Interface: purely combinational, lfsr_state in, ps_out (N_OUT bits) out.
module phase_shifter #(
  parameter int W_IN  = 30,
  parameter int N_OUT = 80
) (
  input  logic [W_IN-1:0]  lfsr_state,
  output logic [N_OUT-1:0] ps_out
);
  import lsa_bist_pkg::*;

  if (N_OUT > PS_MAX_OUT || N_OUT > (W_IN * (W_IN - 1) * (W_IN - 2)) / 6) begin : g_too_many
    $error("phase_shifter: %0d outputs cannot be separated with a %0d-stage LFSR", N_OUT, W_IN);
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    localparam logic [63:0] MASK = ps_mask(j, W_IN);
    assign ps_out[j] = ^(lfsr_state & MASK[W_IN-1:0]);
  end

endmodule
