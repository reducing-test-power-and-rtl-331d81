// prtg_lfsr: pseudorandom test generator (PRTG) of the BIST scheme, a
// maximal-length linear feedback shift register.
//
// The scheme uses an LFSR as its PRTG, 30 or 40 stages long in the evaluated
// configurations; WIDTH defaults to 30. Stages are numbered WIDTH-1 down to 0
// and the register shifts towards stage 0, whose output is fed back into the
// top stage and, through XOR gates, into the stages picked by the primitive
// polynomial from lsa_bist_pkg::poly_taps (internal, or Galois, feedback). The
// polynomial and the feedback form are this design's choice.
//
// Interface: `load` (priority) writes `seed` into the register, with an
// all-zero seed replaced by 1 so the register can never lock up; `en`
// advances it one step. `state` is the full register, read by the phase
// shifter. Both act on the rising clock edge; reset loads 1.
module prtg_lfsr #(
  parameter int WIDTH = 30
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  import lsa_bist_pkg::*;

  localparam logic [63:0] POLY = poly_taps(WIDTH);

  // Feedback mask for right shifting: term x^i of the polynomial enters at
  // stage WIDTH-1-i, which makes the register the bit-reversed image of a
  // left-shifting Galois LFSR and keeps its period at 2^WIDTH - 1.
  function automatic logic [WIDTH-1:0] fb_mask();
    logic [WIDTH-1:0] m;
    m = '0;
    for (int i = 0; i < WIDTH; i++)
      if (POLY[i]) m[WIDTH-1-i] = 1'b1;
    return m;
  endfunction

  localparam logic [WIDTH-1:0] FB = fb_mask();

  if (POLY == 64'd0) begin : g_bad_width
    $error("prtg_lfsr: no primitive polynomial known for WIDTH=%0d", WIDTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= WIDTH'(1);
    else if (load)
      state <= (seed == '0) ? WIDTH'(1) : seed;
    else if (en)
      state <= (state >> 1) ^ (state[0] ? FB : '0);
  end

endmodule
