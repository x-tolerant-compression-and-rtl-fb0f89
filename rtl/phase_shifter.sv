// phase_shifter: spreads the PRPG state over the internal scan chains so that
// neighbouring chains do not receive shifted copies of one another.
//
// Purely combinational. Output i (one per internal scan chain) is the XOR of
// exactly two PRPG bits, a = i mod LEN and (a + K) mod LEN, with K = 97 for
// the first LEN outputs and K = 211 for the rest, so all N_OUT tap pairs are
// distinct for odd LEN. This is the single two-input XOR per chain of the
// reference design; the tap choice is this design's, and the minimum phase
// distance between chains was not analysed.
module phase_shifter #(
  parameter int unsigned LEN   = xdbist_pkg::PRPG_LEN,
  parameter int unsigned N_OUT = xdbist_pkg::N_CHAINS
) (
  input  logic [LEN-1:0]   prpg,
  output logic [N_OUT-1:0] chain_si
);
  for (genvar i = 0; i < N_OUT; i++) begin : g_out
    localparam int unsigned A = xdbist_pkg::ps_tap_a(i, LEN);
    localparam int unsigned B = xdbist_pkg::ps_tap_b(i, LEN);
    assign chain_si[i] = prpg[A] ^ prpg[B];
  end
endmodule
