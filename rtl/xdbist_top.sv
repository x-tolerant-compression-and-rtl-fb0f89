// xdbist_top: X-tolerant deterministic BIST test-data interface for
// N_UNITS groups of 512 internal scan chains.
//
// Per unit the tester sees 16 scan inputs and 16 scan outputs. Scan inputs
// shadow_si[u][11:0] load PRPG seeds and observe_si[u][3:0] load
// observe-selector control words; chain_si[u] drives the heads of the unit's
// 512 internal chains of the design under test and chain_so[u] takes their
// tails; so[u][15:0] carries the 16 selected chain outputs back to the tester, which compares or masks each bit
// (unknown values are masked there, so the core needs no X-blocking logic).
//
// Timing: every cycle with shift_en high shifts the chains, steps the PRPG
// and shifts both shadows; the unload of pattern n-1 overlaps the load of
// pattern n and the shadow loads of seed n+1 and control word n. The cycle
// with capture high is the functional capture cycle of the design under
// test; at its edge seed n+1 enters the LFSR and control word n enters the
// selector control, so no cycles are spent on re-seeding or re-selection.
// After reset the first seed is loaded into the shadow and moved into the
// LFSR with one capture pulse before the first load.
//
// Large designs use several independent units (one decompressor and one
// observe selector each, every unit with its own 16 scan inputs, 512 chains
// and 16 scanout pins); N_UNITS sets how many, each port being an array with
// one entry per unit. All units share shift_en and capture. The default is
// one unit, the basic configuration; the 257-bit PRPG alternative is chosen
// with PRPG_BITS = 257.
//
// The design under test, its scan chains and the tester are outside this
// module. Architecture, sizes and schedule follow the reference design; the
// two strobes shift_en and capture, the reset and the sharing of the strobes
// between units are this design's choices.
module xdbist_top
  import xdbist_pkg::*;
#(
  parameter int unsigned PRPG_BITS = PRPG_LEN,
  parameter int unsigned N_UNITS   = 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 shift_en,
  input  logic                                 capture,
  input  logic [N_UNITS-1:0][N_SHADOW_SI-1:0]  shadow_si,
  input  logic [N_UNITS-1:0][N_OBS_SI-1:0]     observe_si,
  output logic [N_UNITS-1:0][N_CHAINS-1:0]     chain_si,
  input  logic [N_UNITS-1:0][N_CHAINS-1:0]     chain_so,
  output logic [N_UNITS-1:0][N_SO-1:0]         so
);
  for (genvar u = 0; u < N_UNITS; u++) begin : g_unit
    decompressor #(.LEN(PRPG_BITS), .N_SI(N_SHADOW_SI), .N_CHAINS(N_CHAINS)) u_dec (
      .clk, .rst_n, .shift_en, .capture,
      .shadow_si(shadow_si[u]), .chain_si(chain_si[u])
    );

    observe_selector u_obs (
      .clk, .rst_n, .shift_en, .capture,
      .observe_si(observe_si[u]), .chain_so(chain_so[u]), .so(so[u])
    );
  end
endmodule
