// selector_shadow: shadow register of the observe selector, loaded from the
// tester in parallel with the PRPG shadow.
//
// Four 40-bit shift chains, chain c holding control-word bits 40c..40c+39.
// Scan input si[c] (observe_si0..observe_si3) enters at bit 40c+39 and the
// chain shifts toward bit 40c on every cycle with shift_en high, so after 40
// shift cycles the bit shifted first sits at bit 40c. The parallel output q
// is copied into the selector control register on the capture cycle. Reset
// (synchronous, active low) clears it.
//
// Four chains of 40 bits, 160 bits in all, follow the reference design; the
// bit order is this design's choice.
module selector_shadow
  import xdbist_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic [N_OBS_SI-1:0] si,
  output sel_ctl_t            q
);
  logic [N_OBS_SI-1:0][OBS_LEN-1:0] chains;

  always_ff @(posedge clk) begin
    if (!rst_n) chains <= '0;
    else if (shift_en)
      for (int c = 0; c < int'(N_OBS_SI); c++)
        chains[c] <= {si[c], chains[c][OBS_LEN-1:1]};
  end

  assign q = sel_ctl_t'(chains);
endmodule
