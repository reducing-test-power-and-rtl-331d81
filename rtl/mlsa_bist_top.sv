// mlsa_bist_top: modified low-switching-activity logic BIST (MLSA-BIST).
//
// Scan-based BIST with reduced shift power. An LFSR (prtg_lfsr) feeds a phase
// shifter whose outputs go, K+1 per scan chain, to the chain's scan_in_select:
// one output is the pseudorandom data bit, K go to an AND gate. When the AND
// gate gives 0 the chain's multiplexer repeats the value of its first scan
// cell, so most chains see a transition at their scan input with probability
// only 0.5^(K+1). A one-hot cyclic shift register (CSR) ORed into the
// multiplexer controls makes one chain per pattern take fully pseudorandom
// data, and that chain changes cyclically from pattern to pattern; this keeps
// the fault coverage close to that of plain LFSR BIST. The N chain outputs are
// compacted by a MISR and a controller runs the shift / capture flow and
// compares the signature.
//
// `mlsa_en` = 1 selects the modified scheme (CSR active); 0 gates the CSR off,
// which gives the first, plain LSA-BIST scheme built from the same hardware.
// That switch is this design's own addition.
//
// The combinational logic of the circuit under test is outside this module:
// `cut_pattern[i]` are the scan cells of chain i+1 (bit M-1 is the first cell,
// next to the scan input) and `cut_response[i]` is what the chain captures in
// normal mode. `scan_sel`, `scan_in` and `csr_state` let a tester watch the
// scan inputs. Defaults: 20 chains of 87 cells, K = 3, a 30-stage LFSR, a
// 32-bit MISR, up to 2^20 - 1 patterns, and CSR_INIT = 10...0 (one
// pseudorandom chain per pattern, chain 1 first). The 20 chains, K = 3, the
// LFSR length and the single pseudorandom chain are the scheme's evaluated
// values; chain length, MISR width and counter width are this design's choice.
// Setting more ones in CSR_INIT makes several chains pseudorandom per pattern,
// the scheme's "small fraction" of chains. For timing see bist_controller.
module mlsa_bist_top #(
  parameter int N      = 20,
  parameter int M      = 87,
  parameter int K      = 3,
  parameter int LFSR_W = 30,
  parameter int SIG_W  = 32,
  parameter int PAT_W  = 20,
  parameter logic [N-1:0] CSR_INIT = N'(1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  mlsa_en,
  input  logic [LFSR_W-1:0]     seed,
  input  logic [PAT_W-1:0]      num_patterns,
  input  logic [SIG_W-1:0]      expected_signature,
  output logic [N-1:0][M-1:0]   cut_pattern,
  input  logic [N-1:0][M-1:0]   cut_response,
  output logic [N-1:0]          scan_sel,
  output logic [N-1:0]          scan_in,
  output logic [N-1:0]          csr_state,
  output logic [SIG_W-1:0]      signature,
  output logic [PAT_W-1:0]      patterns_applied,
  output logic                  busy,
  output logic                  done,
  output logic                  pass
);

  localparam int PS_OUT = N * (K + 1);

  logic              init, shift_en, capture_en, csr_rotate, misr_en;
  logic [LFSR_W-1:0] lfsr_state;
  logic [PS_OUT-1:0] ps_out;
  logic [N-1:0]      first_cell, scan_out;

  bist_controller #(.M(M), .PAT_W(PAT_W), .SIG_W(SIG_W)) u_ctrl (
    .clk, .rst_n, .start, .num_patterns, .signature, .expected_signature,
    .init, .shift_en, .capture_en, .csr_rotate, .misr_en,
    .busy, .done, .pass, .patterns_applied
  );

  prtg_lfsr #(.WIDTH(LFSR_W)) u_prtg (
    .clk, .rst_n, .load(init), .seed, .en(shift_en), .state(lfsr_state)
  );

  phase_shifter #(.W_IN(LFSR_W), .N_OUT(PS_OUT)) u_ps (
    .lfsr_state, .ps_out
  );

  cyclic_shift_register #(.N(N), .INIT(CSR_INIT)) u_csr (
    .clk, .rst_n, .init, .rotate(csr_rotate), .csr(csr_state)
  );

  for (genvar i = 0; i < N; i++) begin : g_chain
    scan_in_select #(.K(K)) u_sel (
      .ps_ctrl (ps_out[i*(K+1)+1 +: K]),
      .ps_data (ps_out[i*(K+1)]),
      .csr_bit (csr_state[i] & mlsa_en),
      .hold_val(first_cell[i]),
      .sel     (scan_sel[i]),
      .scan_in (scan_in[i])
    );

    scan_chain #(.M(M)) u_sc (
      .clk, .rst_n,
      .clear       (init),
      .shift_en,
      .capture_en,
      .scan_in     (scan_in[i]),
      .capture_data(cut_response[i]),
      .cells       (cut_pattern[i]),
      .first_cell  (first_cell[i]),
      .scan_out    (scan_out[i])
    );
  end

  misr #(.N(N), .WIDTH(SIG_W)) u_misr (
    .clk, .rst_n, .clear(init), .en(misr_en), .din(scan_out), .signature
  );

endmodule
