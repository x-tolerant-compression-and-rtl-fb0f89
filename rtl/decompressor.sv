// decompressor: turns compressed seeds from the tester into full scan loads
// for the internal chains.
//
// It chains the PRPG shadow, the PRPG LFSR and the phase shifter. While the
// chains shift (shift_en), the LFSR steps and the phase shifter drives a new
// bit into every chain each cycle; in the same cycles the tester loads the
// next seed into the shadow through shadow_si. On the capture cycle (capture
// high, shift_en low) the shadow is copied into the LFSR, so the next load
// starts from the new seed with no extra cycle. chain_si is combinational
// from the LFSR state: the value seen during a shift cycle is the one shifted
// into the chains at that clock edge.
//
// Structure, sizes and the 0-cycle re-seed follow the reference design;
// sharing one shift enable between chains and shadow is this design's choice
// (with chains longer than the shadow segments the tester pads the front).
module decompressor #(
  parameter int unsigned LEN      = xdbist_pkg::PRPG_LEN,
  parameter int unsigned N_SI     = xdbist_pkg::N_SHADOW_SI,
  parameter int unsigned N_CHAINS = xdbist_pkg::N_CHAINS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic                capture,
  input  logic [N_SI-1:0]     shadow_si,
  output logic [N_CHAINS-1:0] chain_si
);
  logic [LEN-1:0] seed, state;

  prpg_shadow #(.LEN(LEN), .N_SI(N_SI)) u_shadow (
    .clk, .rst_n, .shift_en, .si(shadow_si), .q(seed)
  );

  prpg_lfsr #(.LEN(LEN)) u_lfsr (
    .clk, .rst_n, .shift_en, .load(capture), .seed, .state
  );

  phase_shifter #(.LEN(LEN), .N_OUT(N_CHAINS)) u_ps (
    .prpg(state), .chain_si
  );

  a_no_shift_in_capture: assert property (@(posedge clk) disable iff (!rst_n)
    !(shift_en && capture));
endmodule
