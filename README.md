# XDBIST: X-tolerant deterministic BIST interface

Deterministic scan-ATPG test sets give high fault coverage and precise diagnosis.
On large designs they also cost a lot of tester memory and tester cycles. Logic BIST
costs far less data. But it compresses the responses in a signature register, so a
single unknown (X) value in a scan cell makes the signature useless. To avoid that, the
core must be changed to block every X source.

XDBIST (X-tolerant deterministic BIST) keeps the deterministic patterns and the
tester's cell-by-cell compare. It shrinks both directions of scan data:

* **Load side.** The scan cells are split into many short internal chains (512 per
  unit). Every pattern is encoded as a 479-bit seed. A PRPG (an LFSR) expands the seed,
  and a phase shifter spreads it over the 512 chains. ATPG computes the seed so that
  every care bit gets its required value. All other cells get pseudo-random values.
* **Unload side.** No signature register is used. Each pattern unloads only 16 of the
  512 chains, straight to 16 scanout pins. A 160-bit control word, supplied with each
  pattern, chooses the 16 chains. The tester compares those bits and masks any it
  knows to be X. X values therefore never corrupt anything, and the core stays
  unchanged.
* **No added cycles.** Seeds and control words go into *shadow* registers while the
  chains shift. They move into the working registers in the functional capture cycle.

The tester sees an ordinary scan design with 16 scan-in and 16 scan-out pins. Each
pin drives a chain only 40 cycles long.

This repository holds synthesizable SystemVerilog for one or more such units, plus
self-checking testbenches. The design under test (its scan chains) and the ATPG that
computes seeds and control words are not included. The testbenches contain a
behavioural chain model and a small router/solver in their place.

## One pattern, cycle by cycle

A unit has two inputs that sequence it: `shift_en` (scan shift) and `capture` (the
design's functional capture cycle). A pattern takes 40 shift cycles and one capture
cycle. During the shift cycles of window *n*:

| register / chains     | does during the 40 shift cycles of window n              | at the capture edge ending window n        |
|-----------------------|-----------------------------------------------------------|--------------------------------------------|
| PRPG LFSR             | steps once per cycle, running from seed *n*               | loads seed *n+1* from the PRPG shadow       |
| internal chains       | load pattern *n* (via phase shifter), unload pattern *n-1* | capture the response to pattern *n*        |
| selector control      | holds control word *n-1*: the 16 observed chains          | loads control word *n* from the shadow      |
| PRPG shadow           | takes seed *n+1* from `shadow_si[11:0]`                   | –                                          |
| selector shadow       | takes control word *n* from `observe_si[3:0]`             | –                                          |
| `so[15:0]`            | show the 16 selected chain tails (combinational)          | –                                          |

After reset, the first window only fills the PRPG shadow with seed 0. Its capture
pulse starts the pipeline. The first unload carries no selection and is ignored.
Because the shift enable is shared, chains longer than 40 cells also work: the tester
pads the front of the seed and control streams, and only the last 40 bits of each
shadow segment survive. Chains shorter than 40 cells still need 40 shift cycles per
pattern.

`shift_en` and `capture` must never be high together. `decompressor.sv` contains an
assertion for this.

## Decompressor

`decompressor` = `prpg_shadow` → `prpg_lfsr` → `phase_shifter`.

* **PRPG shadow** (479 bits). It is split into 12 segments of `ceil(479/12) = 40`
  bits. The last segment has only 39 bits and drops the first bit shifted into it.
  Segment *c* covers bits `40c…` and is fed by `shadow_si[c]` at its top bit. It
  shifts toward its bottom bit, so the first bit shifted in ends at the segment's
  lowest index.
* **PRPG LFSR** (479 bits). A Fibonacci LFSR: state bit *i* after *t* steps is
  `s[t+i]` of the sequence `s[t+479] = s[t+105] ^ s[t]`, i.e. the trinomial
  x^479 + x^105 + 1. In the 257-bit variant it is x^257 + x^12 + 1, which is
  primitive. The 479-bit trinomial is irreducible, but whether it is primitive has not
  been established. Its period divides 2^479 − 1, whose prime factors all have the
  form 958k + 1, so the period is at least 959 steps. That is far above the 40 steps
  run per seed, which is all the scheme needs. On `capture` the state is replaced by
  the shadow (load wins over shift).
* **Phase shifter.** Chain *i* receives the XOR of exactly two LFSR bits: `a = i mod L`
  and `(a + K) mod L`, with K = 97 for the first L chains and K = 211 for the rest. All
  512 pairs are distinct. The minimum phase distance between chains has not been
  analysed. The original scheme promises at least 2048 cycles with its own choice of
  taps.

## Observe selector

`observe_selector` = `selector_shadow` → `selector_control` → 4 × `xor_decoder` →
`scanout_selector`.

### Why two stages and graphs

Observing any 16 of 512 chains with full crossbar muxes would take sixteen 512-to-1
muxes. At the other extreme, sixteen fixed 32-to-1 groups make most chain sets
unobservable. The middle ground used here has two stages:

* **Stage 1:** 64 muxes of 16-to-1. Every chain feeds **two** of them.
* **Stage 2:** 16 muxes of 8-to-1, one per pin. Every stage-1 mux feeds **two** of
  them.

Treat each stage as a graph: muxes are vertices and inputs are edges, each edge
joining the two muxes its input reaches. A set of selected inputs can be routed when
every selected edge can be given a vertex of its own. This can only fail when the
selected edges are crowded into a small, dense part of the graph. The shortest cycle
(the girth) sets how many edges are always safe. Both stages here are simple graphs
of girth 4.

* **Stage 1** is a bipartite circulant graph. Muxes `2u` (side A) and `2v+1`
  (side B), u, v = 0…31.
  * Chain k < 256 joins A-vertex `u = k/8` with B-vertex `v = (u + k%8) mod 32`. It
    enters both muxes on port `k%8`.
  * Chain k ≥ 256 joins B-vertex `v = (k-256)/8` with A-vertex
    `u = (v + 8 + k%8) mod 32`. It enters both on port `8 + k%8`.
  * The A–B offsets {0…7} and {17…24} are disjoint, so no two chains share both
    muxes. As a result, chain 0 reaches muxes 0 and 1, chain 1 reaches muxes 0 and 3,
    and chain 511 reaches mux 63.
* **Stage 2** is the complete bipartite graph K(8,8). Stage-1 mux `m = 8a + b`
  drives port `b` of pin `so(2a)` and port `a` of pin `so(2b+1)`.

The formulas live in `rtl/xdbist_pkg.sv` (`s1_chain`, `s2_mid`). Any other simple
girth-4 wiring would work. Change those two functions and the tables in the
testbenches together.

### The 160-bit control word

The word loads through 4 scan inputs × 40 bits. Chain *c* of the selector shadow holds
bits `40c…40c+39`, and the first bit shifted in ends at `40c`. The layout is the
packed struct `xdbist_pkg::sel_ctl_t`:

| bits      | field      | drives                                                    |
|-----------|------------|-----------------------------------------------------------|
| 0–15      | `sel0`     | select line 0 of pin mux j (bit j)                        |
| 16–31     | `sel1`     | select line 1 of pin mux j                                |
| 32–47     | `sel2`     | select line 2 of pin mux j                                |
| 48+28d …  | `dec[d]`   | input of XOR decoder d (d = 0…3), whose output m is select line d of stage-1 mux m (`sel3`…`sel6`) |

A full selection needs 48 + 256 = 304 select lines. Only 160 bits are loaded, so the
stage-1 select lines come from four **28-to-64 XOR decoders**. Each output is the XOR
of two inputs:

* Output e = `in[e mod 14] ^ in[14 + ((e mod 14 + OFS[e/14]) mod 14)]`, with
  OFS = {0, 1, 3, 7, 12}.
* This is again a bipartite graph of girth 4, now with inputs as vertices and outputs
  as edges.

At most 16 stage-1 muxes carry a routed chain in any pattern. Only their select lines
are required values, which gives up to 16 equations per decoder over GF(2). The
equations can be solved whenever the required edges contain no cycle. The remaining
48 muxes take whatever the solution gives them.

### Finding a control word (not in the RTL)

To observe a chosen set of chains, the test generator must:

1. Give each chain one of its two stage-1 muxes, all distinct.
2. Give each of those muxes one of its two pins, all distinct.
3. Write the pin-mux ports into `sel0..sel2`.
4. Solve the four decoder systems. The unknowns are the decoder inputs. Each used
   stage-1 mux contributes one equation per decoder, fixing its port bit d.

`tb/tb_selector_routability.sv` does exactly this. It does steps 1–2 as bipartite
matchings with random restarts and step 4 by Gaussian elimination. It then applies
every solution to the hardware. With 1000 random sets per size, it observed:

| chains wanted | 1–11 | 12    | 13    | 14    | 15    | 16    |
|---------------|------|-------|-------|-------|-------|-------|
| all observed  | 100% | 99.9% | 99.7% | 96.6% | 79.9% | 43.3% |

## Interface of `xdbist_top`

| port          | dir | width             | meaning                                             |
|---------------|-----|-------------------|-----------------------------------------------------|
| `clk`         | in  | 1                 | scan / capture clock                                |
| `rst_n`       | in  | 1                 | synchronous reset, active low                       |
| `shift_en`    | in  | 1                 | shift cycle (chains, PRPG, both shadows)            |
| `capture`     | in  | 1                 | functional capture cycle; re-seed and re-select     |
| `shadow_si`   | in  | N_UNITS × 12      | seed scan inputs                                    |
| `observe_si`  | in  | N_UNITS × 4       | control-word scan inputs                            |
| `chain_si`    | out | N_UNITS × 512     | to the heads of the internal chains                 |
| `chain_so`    | in  | N_UNITS × 512     | from the tails of the internal chains               |
| `so`          | out | N_UNITS × 16      | selected chain values to the tester                 |

Parameters:

* `PRPG_BITS` (default 479; 257 is the smaller variant).
* `N_UNITS` (default 1). Large designs use several independent units. All units share
  `shift_en` and `capture`, and each has its own pins and chains.

Paths from `chain_so` to `so` are purely combinational. Each one passes the stage-1
mux, then the stage-2 mux.

One 479-bit unit holds 958 flip-flops in the decompressor (shadow and LFSR) and 320 in
the observe selector (shadow and control). Its logic also includes 512 phase-shifter
XORs and 256 decoder XORs.

## Where this RTL makes its own choices

The overall architecture, every size, the schedule and the graph properties (simple,
girth 4, two-input XOR per decoder output and per phase-shifter output) follow the
published XDBIST scheme. The following are choices made here:

* The LFSR polynomials and the phase-shifter taps.
* The concrete graphs of both selector stages and of the decoders. Only their sizes
  and girth are given by the scheme.
* The control-word bit layout, the shadow segment order and the shift direction.
* Ordinary multiplexers instead of the decoded tri-state-driver muxes of the original
  implementation.
* A synchronous active-low reset: shadows and control clear to 0, the LFSR state to 1.
* One shared shift enable for chains and shadows, and `capture` as the transfer
  strobe.
* The scheme assumes internal chains of at least 40 cells. Its 16K-cell example
  instead uses 32-cell chains, which here costs 40 shift cycles per pattern rather
  than 32.

Not implemented:

* The extra logic for testing the decompressor and selector themselves. It is only
  mentioned in the scheme, never described.
* The design under test.
* The ATPG.

## Files and simulation

`rtl/`:

* `xdbist_pkg.sv`: sizes, control-word struct, wiring formulas.
* `xdbist_top.sv`, `decompressor.sv`, `prpg_shadow.sv`, `prpg_lfsr.sv`,
  `phase_shifter.sv`, `observe_selector.sv`, `selector_shadow.sv`,
  `selector_control.sv`, `xor_decoder.sv`, `scanout_selector.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

* `tb_xdbist_top.sv`: the full-size end-to-end run. 32 patterns through one default
  unit with a 512 × 40 chain model that captures unknown values in 1 of 64 cells.
  Both targeted and random selections are used, and loads and unloads are checked
  bit by bit.
* `tb_xdbist_units.sv`: the 257-bit PRPG with two units.
* `tb_selector_routability.sv`: the routability experiment above.
* `scan_chains_model.sv`: behavioural chain model.

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/xdbist_pkg.sv tb/tb_xdbist_top.sv --top-module tb_xdbist_top -o sim
./obj_dir/sim
```

Every testbench finishes in seconds.
