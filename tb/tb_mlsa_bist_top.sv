// tb_mlsa_bist_top: end-to-end test of the BIST scheme at its default size
// (20 scan chains of 87 cells, K = 3, 30-stage LFSR, 32-bit MISR).
//
// A small behavioural stand-in for the circuit under test (an XOR/AND network
// over the scan cells, with an optional stuck-at-0 fault) closes the loop.
// A reference model of the whole scheme, written here from the scheme's rules,
// runs in lockstep: every shift clock it predicts each chain's multiplexer
// control and scan input, every capture clock the loaded test pattern, and at
// the end the signature and the clock count 1 + P*(M+1) + M.
//
// Each session applies 128 patterns. Runs: MLSA mode fault-free (golden signature must give pass), MLSA mode with
// the fault (must give fail), and plain LSA mode. It counts how often each
// mechanism occurred (hold of the first cell, pseudorandom data through the AND
// gate, through the CSR, CSR wrap-around, capture, both modes, pass, fail) and
// fails if any never did. It also measures the scan input toggle rate: about
// 0.5^(K+1) = 1/16 for chains not selected by the CSR and about 1/2 for the
// chain selected by it.
module tb_mlsa_bist_top;
  import lsa_bist_pkg::*;

  localparam int N = 20, M = 87, K = 3, LW = 30, SW = 32, PW = 20;
  localparam int PSO = N * (K + 1);
  localparam int P = 128;  // the test length of s35932 in the evaluation

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start, mlsa_en;
  logic [LW-1:0] seed;
  logic [PW-1:0] num_patterns, patterns_applied;
  logic [SW-1:0] expected_signature, signature;
  logic [N-1:0][M-1:0] cut_pattern, cut_response;
  logic [N-1:0] scan_sel, scan_in, csr_state;
  logic busy, done, pass;
  bit fault_en;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_hold = 0, n_and = 0, n_csr = 0, n_wrap = 0, n_capture = 0;
  int n_mlsa = 0, n_lsa = 0, n_pass = 0, n_fail = 0;
  // toggle statistics at the scan inputs
  int tog_plain = 0, cyc_plain = 0, tog_csr = 0, cyc_csr = 0;

  always #5 clk = ~clk;

  mlsa_bist_top dut (.*);

  function automatic logic [N-1:0][M-1:0] cut_f(input logic [N-1:0][M-1:0] c, input bit flt);
    logic [N-1:0][M-1:0] r;
    for (int i = 0; i < N; i++)
      for (int b = 0; b < M; b++)
        r[i][b] = c[i][b] ^ (c[(i+1)%N][(b+1)%M] & c[(i+2)%N][(b+5)%M]) ^ c[(i+3)%N][(b+2)%M];
    if (flt) r[3][10] = 1'b0;
    return r;
  endfunction

  always_comb cut_response = cut_f(cut_pattern, fault_en);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  logic [LW-1:0] m_lfsr;
  logic [N-1:0]  m_csr;
  logic [SW-1:0] m_misr;
  logic [N-1:0][M-1:0] m_cells;
  logic [N-1:0] m_prev_in;

  function automatic logic [LW-1:0] m_lfsr_step(input logic [LW-1:0] s);
    logic [63:0] p = poly_taps(LW);
    logic [LW-1:0] n = s >> 1;
    if (s[0])
      for (int i = 0; i < LW; i++) if (p[i]) n[LW-1-i] ^= 1'b1;
    return n;
  endfunction

  function automatic logic [SW-1:0] m_misr_step(input logic [SW-1:0] s, input logic [N-1:0] d);
    logic [63:0] p = poly_taps(SW);
    logic [SW-1:0] n = s << 1;
    if (s[SW-1]) n ^= p[SW-1:0];
    for (int i = 0; i < N; i++) n[i % SW] ^= d[i];
    return n;
  endfunction

  // One BIST session; returns the final signature of the model.
  task automatic session(input bit mode, input bit flt, input logic [LW-1:0] sd,
                         input logic [SW-1:0] golden, output logic [SW-1:0] msig);
    int total, pat, pos;
    logic [PSO-1:0] ps;
    logic [N-1:0] e_sel, e_in, outs;
    logic [63:0] mk;
    bit shifting, first_shift;
    mlsa_en = mode; fault_en = flt; seed = sd; expected_signature = golden;
    num_patterns = PW'(P);
    start = 1; @(negedge clk); start = 0;
    // clock 0: init
    @(negedge clk);
    m_cells = '0;
    m_lfsr = (sd == '0) ? LW'(1) : sd;
    m_csr = N'(1);
    m_misr = '0;
    first_shift = 1;
    total = 1 + P * (M + 1) + M;
    for (int c = 1; c < total; c++) begin
      if (c <= P * (M + 1)) begin
        pat = (c - 1) / (M + 1);
        pos = (c - 1) % (M + 1);
        shifting = (pos < M);
      end else begin
        pat = P;
        shifting = 1;
      end
      check(busy && !done, $sformatf("busy at clock %0d", c));
      if (shifting) begin
        for (int j = 0; j < PSO; j++) begin
          mk = ps_mask(j, LW);
          ps[j] = ^(m_lfsr & mk[LW-1:0]);
        end
        for (int i = 0; i < N; i++) begin
          logic andg;
          andg = &ps[i*(K+1)+1 +: K];
          e_sel[i] = andg | (m_csr[i] & mode);
          e_in[i] = e_sel[i] ? ps[i*(K+1)] : m_cells[i][M-1];
          if (!e_sel[i]) n_hold++;
          else if (andg) n_and++;
          else n_csr++;
          if (pat < P) begin
            if (!first_shift) begin
              if (m_csr[i] & mode) begin cyc_csr++; tog_csr += (e_in[i] != m_prev_in[i]); end
              else begin cyc_plain++; tog_plain += (e_in[i] != m_prev_in[i]); end
            end
          end
          outs[i] = m_cells[i][0];
        end
        check(scan_sel == e_sel && scan_in == e_in,
              $sformatf("clock %0d: sel %h/%h in %h/%h", c, scan_sel, e_sel, scan_in, e_in));
        m_prev_in = e_in;
        first_shift = (pos == M - 1) && pat < P;
        @(negedge clk);
        if (pat > 0) m_misr = m_misr_step(m_misr, outs);
        for (int i = 0; i < N; i++) m_cells[i] = {e_in[i], m_cells[i][M-1:1]};
        m_lfsr = m_lfsr_step(m_lfsr);
      end else begin
        check(cut_pattern == m_cells, $sformatf("pattern %0d loaded into the chains", pat));
        check(csr_state == m_csr, $sformatf("CSR before pattern %0d capture", pat));
        n_capture++;
        @(negedge clk);
        m_cells = cut_f(m_cells, flt);
        if (m_csr[N-1]) n_wrap++;
        m_csr = {m_csr[N-2:0], m_csr[N-1]};
        first_shift = 1;
      end
    end
    check(done && !busy, $sformatf("done after %0d clocks", total));
    check(patterns_applied == PW'(P), "all patterns applied");
    check(signature == m_misr, $sformatf("signature %h, model %h", signature, m_misr));
    msig = m_misr;
    if (mode) n_mlsa++; else n_lsa++;
  endtask

  initial begin
    logic [SW-1:0] good, bad, lsa_sig;
    start = 0; mlsa_en = 1; seed = '0; num_patterns = '0; expected_signature = '0; fault_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // fault-free MLSA session: find the golden signature
    session(1'b1, 1'b0, 30'h1357_9BDF, '0, good);
    // repeat with the golden signature: must pass
    session(1'b1, 1'b0, 30'h1357_9BDF, good, good);
    check(pass, "fault-free circuit passes");
    if (pass) n_pass++;
    // faulty circuit: must fail
    session(1'b1, 1'b1, 30'h1357_9BDF, good, bad);
    check(!pass && bad != good, "stuck-at fault detected");
    if (!pass) n_fail++;
    // plain LSA scheme
    session(1'b0, 1'b0, 30'h0ACE_1234, good, lsa_sig);

    $display("mechanisms: hold=%0d and=%0d csr=%0d wrap=%0d capture=%0d mlsa=%0d lsa=%0d pass=%0d fail=%0d",
             n_hold, n_and, n_csr, n_wrap, n_capture, n_mlsa, n_lsa, n_pass, n_fail);
    check(n_hold > 0, "hold of the first cell happened");
    check(n_and > 0, "pseudorandom data through the AND gate happened");
    check(n_csr > 0, "pseudorandom data through the CSR happened");
    check(n_wrap > 0, "CSR wrapped around");
    check(n_capture > 0, "capture happened");
    check(n_mlsa > 0 && n_lsa > 0, "both schemes ran");
    check(n_pass > 0 && n_fail > 0, "both pass and fail verdicts happened");

    $display("toggle rate: plain chains %0d/%0d = %f, CSR chain %0d/%0d = %f",
             tog_plain, cyc_plain, real'(tog_plain) / cyc_plain, tog_csr, cyc_csr, real'(tog_csr) / cyc_csr);
    check(real'(tog_plain) / cyc_plain > 0.05 && real'(tog_plain) / cyc_plain < 0.075,
          "toggle rate of AND-controlled chains near 0.5^(K+1)");
    check(real'(tog_csr) / cyc_csr > 0.45 && real'(tog_csr) / cyc_csr < 0.55,
          "toggle rate of the pseudorandom chain near 0.5");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
