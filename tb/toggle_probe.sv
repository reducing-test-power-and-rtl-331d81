// toggle_probe: test helper that builds one mlsa_bist_top of a given shape,
// runs one BIST session of P patterns in the chosen mode and CSR start value and measures the
// transition rate at the scan inputs during shift. Transitions are counted
// between consecutive shift clocks of the same pattern, separately for chains
// whose CSR bit is set ("csr") and all others ("plain"). It also checks that
// `done` rises exactly 1 + P*(M+1) + M clocks after start. Results are
// published on its outputs once `finished` is 1.
module toggle_probe #(
  parameter int N      = 10,
  parameter int M      = 18,
  parameter int K      = 3,
  parameter int LFSR_W = 30,
  parameter int P      = 200,
  parameter bit MODE   = 1'b1,
  parameter logic [N-1:0] CSR_INIT = N'(1)
) (
  input  logic clk,
  input  logic rst_n,
  output bit   finished,
  output int   tog_plain,
  output int   cyc_plain,
  output int   tog_csr,
  output int   cyc_csr,
  output bit   timing_ok
);
  logic start;
  logic [LFSR_W-1:0] seed;
  logic [19:0] num_patterns, patterns_applied;
  logic [31:0] expected_signature, signature;
  logic [N-1:0][M-1:0] cut_pattern, cut_response;
  logic [N-1:0] scan_sel, scan_in, csr_state, prev_in;
  logic busy, done, pass;
  logic mlsa_en;

  mlsa_bist_top #(.N(N), .M(M), .K(K), .LFSR_W(LFSR_W), .CSR_INIT(CSR_INIT)) dut (.*);

  // stand-in CUT: each cell captures its neighbour XOR its own value
  always_comb
    for (int i = 0; i < N; i++)
      for (int b = 0; b < M; b++)
        cut_response[i][b] = cut_pattern[i][b] ^ cut_pattern[(i+1)%N][(b+1)%M];

  initial begin
    int total, pos;
    finished = 0; timing_ok = 0;
    tog_plain = 0; cyc_plain = 0; tog_csr = 0; cyc_csr = 0;
    start = 0; mlsa_en = MODE; seed = LFSR_W'(32'h2468_ACE1 + K);
    num_patterns = 20'(P); expected_signature = '0;
    prev_in = '0;
    @(posedge rst_n);
    @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    @(negedge clk);  // init clock
    total = 1 + P * (M + 1) + M;
    for (int c = 1; c < total; c++) begin
      if (c <= P * (M + 1)) begin
        pos = (c - 1) % (M + 1);
        if (pos > 0 && pos < M) begin
          for (int i = 0; i < N; i++) begin
            if (csr_state[i] && MODE) begin
              cyc_csr++; tog_csr += int'(scan_in[i] != prev_in[i]);
            end else begin
              cyc_plain++; tog_plain += int'(scan_in[i] != prev_in[i]);
            end
          end
        end
        prev_in = scan_in;
      end
      @(negedge clk);
    end
    timing_ok = done && patterns_applied == 20'(P);
    finished = 1;
  end
endmodule
