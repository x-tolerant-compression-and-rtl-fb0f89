// observe_selector: chooses, pattern by pattern, which 16 internal scan
// chains are unloaded to the tester.
//
// The tester shifts 160 control bits into the selector shadow (4 inputs, 40
// cycles) while the chains shift. On the capture cycle they move into the
// selector control register, where they steer the whole next unload.
// Control bits 0..47 are select lines 0..2 of the 16 pin muxes (sel0, sel1,
// sel2); bits 48..159 feed four 28-to-64 XOR decoders whose outputs are
// select lines 0..3 (sel3..sel6) of the 64 stage-1 muxes. The chain outputs
// reach so0..so15 combinationally.
//
// The structure (shadow, control register, XOR decoders, two-stage selector)
// and all sizes follow the reference design; the bit layout of the control
// word is this design's choice (xdbist_pkg::sel_ctl_t).
module observe_selector
  import xdbist_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_en,
  input  logic                capture,
  input  logic [N_OBS_SI-1:0] observe_si,
  input  logic [N_CHAINS-1:0] chain_so,
  output logic [N_SO-1:0]     so
);
  sel_ctl_t shadow_q, ctl;
  logic [N_DEC-1:0][DEC_OUT-1:0]  dec_out;   // dec_out[d] = sel(3+d)
  logic [N_MID-1:0][MID_SELW-1:0] mid_sel;
  logic [N_SO-1:0][SO_SELW-1:0]   so_sel;

  selector_shadow u_shadow (
    .clk, .rst_n, .shift_en, .si(observe_si), .q(shadow_q)
  );

  selector_control u_ctl (
    .clk, .rst_n, .load(capture), .d(shadow_q), .q(ctl)
  );

  for (genvar d = 0; d < N_DEC; d++) begin : g_dec
    xor_decoder u_dec (.din(ctl.dec[d]), .dout(dec_out[d]));
  end

  always_comb begin
    for (int m = 0; m < int'(N_MID); m++)
      for (int d = 0; d < int'(N_DEC); d++)
        mid_sel[m][d] = dec_out[d][m];
    for (int j = 0; j < int'(N_SO); j++)
      so_sel[j] = {ctl.sel2[j], ctl.sel1[j], ctl.sel0[j]};
  end

  scanout_selector u_sel (
    .chain_so, .mid_sel, .so_sel, .so
  );
endmodule
