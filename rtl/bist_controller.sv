// bist_controller: sequences the test flow of the (M)LSA-BIST scheme.
//
// After `start` it seeds the PRTG, sets the CSR to its one-hot initial value
// and clears the MISR (one clock, `init`). Each test pattern is then shifted
// in for M clocks (`shift_en`, the PRTG advancing with it) while the
// response of the previous pattern is shifted out into the MISR, after which
// the CUT spends one clock in normal mode (`capture_en`). The CSR rotates in
// that capture clock (`csr_rotate`), just before the next pattern is shifted in,
// so every pattern has a pseudorandom scan chain and that chain changes
// cyclically. After `num_patterns` captures, M more shift clocks unload the last
// response and `done` rises with `pass` telling whether the signature equals
// `expected_signature`. The flow follows the scheme; the single capture clock,
// the MISR being idle while the first pattern is loaded (the chains then hold
// no response) and the final unload are this design's choices.
//
// Timing: a test of P patterns takes 1 + P*(M+1) + M clocks from the clock
// after `start` to `done`. `num_patterns` is sampled at `start` and 0 is
// treated as 1. Assertions check that shift and capture never coincide and
// that the pattern count never passes its target.
module bist_controller #(
  parameter int M     = 87,
  parameter int PAT_W = 20,
  parameter int SIG_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PAT_W-1:0] num_patterns,
  input  logic [SIG_W-1:0] signature,
  input  logic [SIG_W-1:0] expected_signature,
  output logic             init,
  output logic             shift_en,
  output logic             capture_en,
  output logic             csr_rotate,
  output logic             misr_en,
  output logic             busy,
  output logic             done,
  output logic             pass,
  output logic [PAT_W-1:0] patterns_applied
);
  import lsa_bist_pkg::*;

  localparam int CNT_W = (M > 1) ? $clog2(M) : 1;

  bist_state_e      state;
  logic [CNT_W-1:0] shift_cnt;
  logic [PAT_W-1:0] target;
  logic             last_shift;

  assign last_shift = (shift_cnt == CNT_W'(M - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= ST_IDLE;
      shift_cnt        <= '0;
      target           <= '0;
      patterns_applied <= '0;
      init             <= 1'b0;
    end else begin
      init <= 1'b0;
      case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            state            <= ST_SHIFT;
            shift_cnt        <= '0;
            patterns_applied <= '0;
            target           <= (num_patterns == '0) ? PAT_W'(1) : num_patterns;
            init             <= 1'b1;
          end
        end
        ST_SHIFT: begin
          if (!init) begin
            shift_cnt <= last_shift ? '0 : shift_cnt + 1'b1;
            if (last_shift) state <= ST_CAPTURE;
          end
        end
        ST_CAPTURE: begin
          patterns_applied <= patterns_applied + 1'b1;
          state <= (patterns_applied + 1'b1 == target) ? ST_UNLOAD : ST_SHIFT;
        end
        ST_UNLOAD: begin
          shift_cnt <= last_shift ? '0 : shift_cnt + 1'b1;
          if (last_shift) state <= ST_DONE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    shift_en   = ((state == ST_SHIFT) && !init) || (state == ST_UNLOAD);
    capture_en = (state == ST_CAPTURE);
    csr_rotate = capture_en;
    misr_en    = shift_en && (patterns_applied != '0);
    busy       = (state != ST_IDLE) && (state != ST_DONE);
    done       = (state == ST_DONE);
    pass       = done && (signature == expected_signature);
  end

  // Shift and capture are exclusive, and no pattern is counted past the target.
  a_shift_xor_capture: assert property (@(posedge clk) disable iff (!rst_n)
    !(shift_en && capture_en));
  a_count_bounded: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> patterns_applied <= target);

endmodule
