// lsa_bist_pkg: types and elaboration-time helpers shared by the low-switching-
// activity BIST blocks.
//
// poly_taps(w) returns the low-order terms of a primitive polynomial of degree w
// (bit i set for each term x^i, i < w, always including x^0). The polynomials
// are standard maximal-length choices for the widths the design is likely to be
// built at; the scheme itself does not fix a polynomial, so these are a design
// choice. The LFSR and the MISR both use them.
//
// ps_mask(j, w) returns, for phase-shifter output j, the set of w-bit LFSR
// stages XORed together to form that output. Every output XORs PS_XOR_IN
// distinct stages; the stages are drawn with an xorshift generator run at
// elaboration, and a draw that repeats an earlier output's set is rejected, so
// no two outputs are identical and neighbouring outputs are not plain shifted
// copies of one another.
package lsa_bist_pkg;

  // Number of LFSR stages XORed into every phase-shifter output.
  localparam int PS_XOR_IN = 3;
  // Largest number of phase-shifter outputs ps_mask() can separate.
  localparam int PS_MAX_OUT = 1024;

  // Test controller states.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for start
    ST_SHIFT   = 3'd1,  // shifting a pattern in and the previous response out
    ST_CAPTURE = 3'd2,  // CUT in normal mode for one clock, CSR rotates
    ST_UNLOAD  = 3'd3,  // shifting the last response out
    ST_DONE    = 3'd4   // signature ready
  } bist_state_e;

  function automatic logic [63:0] poly_taps(input int w);
    logic [63:0] m;
    m = '0;
    case (w)
      4:  m = (64'd1 << 1) | 64'd1;                                        // x^4+x+1
      8:  m = (64'd1 << 6) | (64'd1 << 5) | (64'd1 << 4) | 64'd1;          // x^8+x^6+x^5+x^4+1
      16: m = (64'd1 << 15) | (64'd1 << 13) | (64'd1 << 4) | 64'd1;        // x^16+x^15+x^13+x^4+1
      20: m = (64'd1 << 17) | 64'd1;                                       // x^20+x^17+1
      24: m = (64'd1 << 23) | (64'd1 << 22) | (64'd1 << 17) | 64'd1;       // x^24+x^23+x^22+x^17+1
      30: m = (64'd1 << 6) | (64'd1 << 4) | (64'd1 << 1) | 64'd1;          // x^30+x^6+x^4+x+1
      31: m = (64'd1 << 28) | 64'd1;                                       // x^31+x^28+1
      32: m = (64'd1 << 22) | (64'd1 << 2) | (64'd1 << 1) | 64'd1;         // x^32+x^22+x^2+x+1
      40: m = (64'd1 << 38) | (64'd1 << 21) | (64'd1 << 19) | 64'd1;       // x^40+x^38+x^21+x^19+1
      default: m = '0;
    endcase
    return m;
  endfunction

  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] t;
    t = s ^ (s << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  function automatic logic [63:0] ps_mask(input int j, input int w);
    logic [63:0] accepted [PS_MAX_OUT];
    logic [63:0] cand;
    logic [31:0] rng;
    int          nbits;
    logic [5:0]  pos;
    bit          dup;
    rng = 32'h9E37_79B9;
    cand = '0;
    for (int i = 0; i <= j; i++) begin
      dup = 1'b1;
      while (dup) begin
        cand  = '0;
        nbits = 0;
        while (nbits < PS_XOR_IN) begin
          rng = xorshift32(rng);
          pos = 6'(rng % 32'(w));
          if (!cand[pos]) begin
            cand[pos] = 1'b1;
            nbits++;
          end
        end
        dup = 1'b0;
        for (int p = 0; p < i; p++)
          if (accepted[p] == cand) dup = 1'b1;
      end
      accepted[i] = cand;
    end
    return cand;
  endfunction

endpackage
