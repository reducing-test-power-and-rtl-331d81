// misr: multiple input signature register compacting the N scan chain
// outputs into a WIDTH-bit signature.
//
// Each enabled clock the register is multiplied by x modulo the primitive
// polynomial of degree WIDTH (left-shifting Galois LFSR, lsa_bist_pkg::poly_taps)
// and the scan outputs are XORed in, chain i into bit i mod WIDTH. The final
// signature is compared with the fault-free one. The scheme only names the
// MISR; width, polynomial and input mapping are this design's choice.
//
// Interface: `clear` (priority) zeroes the signature, `en` compacts `din`,
// both on the rising clock edge; reset clears.
module misr #(
  parameter int N     = 20,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [N-1:0]     din,
  output logic [WIDTH-1:0] signature
);
  import lsa_bist_pkg::*;

  localparam logic [63:0] POLY = poly_taps(WIDTH);

  if (POLY == 64'd0) begin : g_bad_width
    $error("misr: no primitive polynomial known for WIDTH=%0d", WIDTH);
  end

  logic [WIDTH-1:0] folded;

  always_comb begin
    folded = '0;
    for (int i = 0; i < N; i++)
      folded[i % WIDTH] ^= din[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      signature <= '0;
    else if (clear)
      signature <= '0;
    else if (en)
      signature <= (signature << 1) ^ (signature[WIDTH-1] ? POLY[WIDTH-1:0] : '0) ^ folded;
  end

endmodule
