// scanout_selector: routes 16 of the 512 internal scan-chain outputs to the
// scanout pins so0..so15 through two stages of multiplexers.
//
// Stage 1 has 64 16-to-1 muxes and every chain feeds two of them; stage 2
// has 16 8-to-1 muxes and every stage-1 mux feeds two of them. Each stage is
// wired as a simple graph of girth 4 (inputs are edges, muxes are vertices),
// so that small sets of chains can always be routed and most sets of up to
// 16 can. The wiring formulas are in xdbist_pkg (s1_chain, s2_mid). mid_sel[m]
// is the port chosen at stage-1 mux m (its select lines 0..3), so_sel[j] the
// port chosen at pin mux j. Purely combinational: chain outputs reach the
// pins in the same cycle.
//
// Sizes, fan-outs and girth follow the reference design. The reference
// design builds the muxes from decoded tri-state drivers; here they are
// ordinary multiplexers. The concrete graphs are this design's choice.
module scanout_selector
  import xdbist_pkg::*;
(
  input  logic [N_CHAINS-1:0]             chain_so,
  input  logic [N_MID-1:0][MID_SELW-1:0]  mid_sel,
  input  logic [N_SO-1:0][SO_SELW-1:0]    so_sel,
  output logic [N_SO-1:0]                 so
);
  logic [N_MID-1:0][MID_FANIN-1:0] mid_in;
  logic [N_MID-1:0]                mid;
  logic [N_SO-1:0][SO_FANIN-1:0]   so_in;

  for (genvar m = 0; m < N_MID; m++) begin : g_mid
    for (genvar p = 0; p < MID_FANIN; p++) begin : g_port
      localparam int unsigned C = s1_chain(m, p);
      assign mid_in[m][p] = chain_so[C];
    end
    assign mid[m] = mid_in[m][mid_sel[m]];
  end

  for (genvar j = 0; j < N_SO; j++) begin : g_so
    for (genvar p = 0; p < SO_FANIN; p++) begin : g_port
      localparam int unsigned M = s2_mid(j, p);
      assign so_in[j][p] = mid[M];
    end
    assign so[j] = so_in[j][so_sel[j]];
  end
endmodule
