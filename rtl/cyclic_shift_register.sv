// cyclic_shift_register: the N-bit CSR of the modified (MLSA) scheme, a ring
// of D flip-flops, one bit per scan chain.
//
// A 1 in bit i forces the multiplexer of scan chain i to take pseudorandom
// data for a whole pattern, making that chain the "pseudorandom scan chain".
// At the start of the test the register is set so that only the first bit is
// 1 (INIT, default 10...0 reading chain 1 first). Between patterns it rotates
// one place towards the last chain, the last bit wrapping back to the first, so
// the pseudorandom chain walks cyclically over all chains. Bit 0 of `csr`
// belongs to chain 1 (SC_1), bit N-1 to chain N.
//
// Interface: `init` (priority) loads INIT, `rotate` advances one place, both
// on the rising clock edge. Reset also loads INIT. An assertion checks that
// the number of ones never changes.
module cyclic_shift_register #(
  parameter int           N    = 20,
  parameter logic [N-1:0] INIT = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         rotate,
  output logic [N-1:0] csr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      csr <= INIT;
    else if (init)
      csr <= INIT;
    else if (rotate)
      csr <= {csr[N-2:0], csr[N-1]};
  end

  // Rotation never creates or loses a pseudorandom chain.
  a_ones_kept: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(csr) == $countones(INIT));

endmodule
