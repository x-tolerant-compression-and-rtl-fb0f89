// xdbist_pkg: sizes, control-word layout and interconnect formulas shared by
// the X-tolerant deterministic BIST (XDBIST) test-data decompressor and
// observe selector.
//
// The sizes follow the reference configuration: 512 internal scan chains, a
// two-stage scanout selector (64 first-stage 16-to-1 muxes, 16 output 8-to-1
// muxes driving scanout pins so0..so15), a 160-bit selector control word
// loaded through 4 scan inputs of 40 bits each, four 28-to-64 XOR decoders,
// and a 479-bit PRPG loaded through 12 scan inputs.
//
// The exact wiring of the selector stages, of the decoders and of the phase
// shifter, and the LFSR feedback polynomial, are this design's own choices;
// only their shape is fixed (graph sizes, girth 4, two-input XOR per output).
// Each is given below as a closed-form formula:
//
//  * First stage (512 chains onto 64 muxes). Muxes are split into an even
//    side A (mux 2u) and an odd side B (mux 2v+1), u,v in 0..31. Chain k < 256
//    joins A-vertex u = k/8 and B-vertex v = (u + k%8) mod 32, on port k%8 of
//    both muxes. Chain k >= 256 joins B-vertex v = (k-256)/8 and A-vertex
//    u = (v + 8 + k%8) mod 32, on port 8 + k%8 of both. This is a bipartite
//    (triangle-free) simple 16-regular graph of girth 4; chain 0 reaches
//    muxes 0 and 1, chain 511 reaches mux 63.
//  * Second stage (64 first-stage outputs onto 16 pins). First-stage mux
//    m = 8a + b drives port b of pin mux so(2a) and port a of pin mux
//    so(2b+1): the complete bipartite graph K(8,8), girth 4.
//  * XOR decoders (28 inputs, 64 outputs). Inputs 0..13 form side X, 14..27
//    side Y. Output e XORs input x = e mod 14 with input
//    14 + ((x + DEC_OFS[e/14]) mod 14), DEC_OFS = {0,1,3,7,12}: bipartite,
//    simple, girth 4.
//  * Phase shifter. Output i XORs PRPG bits a = i mod L and
//    (a + K) mod L, with K = 97 for i < L and K = 211 for the rest.
//  * PRPG feedback: the trinomial x^L + x^k + 1, k = 105 for L = 479 and
//    k = 12 for L = 257 (both irreducible).
package xdbist_pkg;

  // ---- reference configuration -------------------------------------------
  localparam int unsigned N_CHAINS   = 512;  // internal scan chains
  localparam int unsigned N_MID      = 64;   // first-stage 16-to-1 muxes
  localparam int unsigned N_SO       = 16;   // scanout pins so0..so15
  localparam int unsigned MID_FANIN  = 16;
  localparam int unsigned SO_FANIN   = 8;
  localparam int unsigned MID_SELW   = 4;
  localparam int unsigned SO_SELW    = 3;
  localparam int unsigned N_OBS_SI   = 4;    // observe_si0..observe_si3
  localparam int unsigned OBS_LEN    = 40;   // bits per selector-shadow chain
  localparam int unsigned CTL_BITS   = N_OBS_SI * OBS_LEN;  // 160
  localparam int unsigned N_DEC      = 4;    // 28-to-64 XOR decoders
  localparam int unsigned DEC_IN     = 28;
  localparam int unsigned DEC_OUT    = 64;
  localparam int unsigned PRPG_LEN   = 479;  // main PRPG length
  localparam int unsigned N_SHADOW_SI = 12;  // shadow_si0..shadow_si11

  // ---- selector control word ---------------------------------------------
  // Bits 0..47 drive the output muxes directly (sel0, sel1, sel2 are select
  // lines 0, 1, 2 of the 16 pin muxes); bits 48..159 are the inputs of the
  // four decoders, whose outputs are select lines 0..3 (sel3..sel6) of the
  // 64 first-stage muxes.
  typedef struct packed {
    logic [N_DEC-1:0][DEC_IN-1:0] dec;   // dec[d] feeds decoder d -> sel(3+d)
    logic [N_SO-1:0]              sel2;
    logic [N_SO-1:0]              sel1;
    logic [N_SO-1:0]              sel0;
  } sel_ctl_t;

  // ---- first stage: (mux, port) -> chain --------------------------------
  function automatic int unsigned s1_chain(int unsigned mux, int unsigned port);
    int unsigned side, half, s;
    side = mux % 2;           // 0: A-vertex u = mux/2, 1: B-vertex v = mux/2
    half = mux / 2;
    if (port < 8) begin
      s = port;
      if (side == 0) return 8 * half + s;
      else           return 8 * ((half + 32 - s) % 32) + s;
    end else begin
      s = port - 8;
      if (side == 0) return 256 + 8 * ((half + 64 - 8 - s) % 32) + s;
      else           return 256 + 8 * half + s;
    end
  endfunction

  // ---- second stage: (pin mux, port) -> first-stage mux ------------------
  function automatic int unsigned s2_mid(int unsigned so, int unsigned port);
    if (so % 2 == 0) return 8 * (so / 2) + port;   // m = 8a+b on so(2a), port b
    else             return 8 * port + (so / 2);   // m = 8a+b on so(2b+1), port a
  endfunction

  // ---- decoder edges -------------------------------------------------------
  function automatic int unsigned dec_ofs(int unsigned d);
    case (d)
      0: return 0;
      1: return 1;
      2: return 3;
      3: return 7;
      default: return 12;
    endcase
  endfunction

  function automatic int unsigned dec_in_a(int unsigned e);
    return e % 14;
  endfunction

  function automatic int unsigned dec_in_b(int unsigned e);
    return 14 + ((e % 14 + dec_ofs(e / 14)) % 14);
  endfunction

  // ---- phase shifter taps --------------------------------------------------
  function automatic int unsigned ps_tap_a(int unsigned i, int unsigned len);
    return i % len;
  endfunction

  function automatic int unsigned ps_tap_b(int unsigned i, int unsigned len);
    int unsigned k;
    k = (i < len) ? 97 : 211;
    return (i % len + k) % len;
  endfunction

  // ---- PRPG feedback tap (the middle term of x^L + x^k + 1) --------------
  function automatic int unsigned prpg_tap(int unsigned len);
    case (len)
      479:     return 105;
      257:     return 12;
      default: return 1;   // other lengths: x^L + x + 1, not checked
    endcase
  endfunction

endpackage
