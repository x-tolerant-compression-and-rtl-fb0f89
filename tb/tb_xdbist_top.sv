// tb_xdbist_top: end-to-end test of the XDBIST interface at its full size
// (479-bit PRPG, 512 chains, 16 scanout pins, 160-bit selector control),
// acting as the tester around a behavioural model of 512 internal scan chains
// of 40 cells, 1 in 64 of which capture an unknown value.
//
// Windows of 40 shift cycles follow the overlapped schedule: in window w the
// chains load pattern w-1 from seed w-1 while pattern w-2 is unloaded through
// the selection chosen for it, the PRPG shadow takes seed w and the selector
// shadow takes the control word of pattern w-1; one capture cycle ends the
// window. Checked against reference models written here:
//  * after each load, every cell of every chain equals the phase-shifted
//    reference LFSR sequence started from the seed shifted in one window
//    earlier (so the re-seed cost no cycle);
//  * in every unload cycle, every pin equals the captured cell of the chain
//    the reference selector model routes to it, unknown cells being masked;
//  * for targeted patterns the testbench picks a set of chains, routes them
//    through both stages, solves the four XOR-decoder systems over GF(2) and
//    checks that each chosen chain is observed on its pin.
// It also checks that a pattern costs exactly 40 shift cycles and one capture
// cycle and 640 tester input bits (12 x 40 seed + 4 x 40 control).
// Counts each mechanism (re-seed, selector update, overlapped cycles, masked
// unknowns, random and targeted selections, solved and rejected chain sets)
// and fails if one never happened.
module tb_xdbist_top;
  localparam int NC = 512, NS = 16, NM = 64, L = 479, K = 105, CL = 40, PATS = 32;
  localparam int SEG = 40;

  logic clk = 0, rst_n = 0, shift_en = 0, capture = 0;
  logic [11:0]   shadow_si;
  logic [3:0]    observe_si;
  logic [NC-1:0] chain_si, chain_so;
  logic [NS-1:0] so;

  xdbist_top dut (.clk, .rst_n, .shift_en, .capture, .shadow_si, .observe_si,
                  .chain_si, .chain_so, .so);

  scan_chains_model #(.N(NC), .LEN(CL)) chains (
    .clk, .shift_en, .capture, .chain_si, .chain_so);

  int checks = 0, failures = 0;
  int n_reseed = 0, n_selupd = 0, n_overlap = 0, n_masked = 0, n_compared = 0;
  int n_random_sel = 0, n_targeted = 0, n_target_obs = 0, n_rejected = 0;
  int n_cycles = 0, n_tester_bits = 0;

  int fwd1 [NM][16];
  int fwd2 [NS][8];
  int ep_mux [NC][2];
  int ep_port [NC];

  logic [L-1:0]  seeds [PATS + 2];
  logic [159:0]  ctl_plan [PATS + 2];
  int            targets [PATS + 2][$];
  int            target_pin [PATS + 2][$];
  logic          snap  [NC][CL];
  bit            snapx [NC][CL];
  logic [159:0]  ctl_cur;
  int            cur_pat;
  logic          s [L + CL + 1];

  always #5 clk = ~clk;

  // clock cycles spent after reset: must be exactly 41 per window (40 shifts
  // and one capture), i.e. re-seeding and re-selection add no cycles
  always @(posedge clk) if (rst_n) n_cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ofs(int k);
    int t[5] = '{0, 1, 3, 7, 12};
    return t[k];
  endfunction

  function automatic int dec_a(int m); return m % 14; endfunction
  function automatic int dec_b(int m); return 14 + ((m % 14 + ofs(m / 14)) % 14); endfunction

  function automatic int chain_at_pin(int j, logic [159:0] ctl);
    int q, m, p;
    logic [27:0] din;
    q = {ctl[32 + j], ctl[16 + j], ctl[j]};
    m = fwd2[j][q];
    p = 0;
    for (int d = 0; d < 4; d++) begin
      din = ctl[48 + 28*d +: 28];
      p |= int'(din[dec_a(m)] ^ din[dec_b(m)]) << d;
    end
    return fwd1[m][p];
  endfunction

  function automatic logic [159:0] rnd160();
    logic [159:0] v;
    for (int w = 0; w < 5; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  // Plan a targeted selection: route `n` random chains and solve the decoders.
  // Returns 1 and fills ctl/targets/pins on success.
  task automatic plan_targeted(input int n, output bit ok, output logic [159:0] ctl,
                               output int tg[$], output int pins[$]);
    int mux_owner [NM];
    int pin_owner [NS];
    int mux_of [$];
    int pin_of [$];
    logic [27:0] rows [16];
    logic        rhs  [16];
    int          pivc [16];
    ok = 0; ctl = '0;
    tg.delete(); pins.delete();
    for (int m = 0; m < NM; m++) mux_owner[m] = -1;
    for (int j = 0; j < NS; j++) pin_owner[j] = -1;
    while (tg.size() < n) begin
      int k = $urandom % NC;
      bit dup = 0;
      foreach (tg[i]) if (tg[i] == k) dup = 1;
      if (!dup) tg.push_back(k);
    end
    // stage 1: give every chain one of its two muxes
    foreach (tg[i]) begin
      int h = $urandom % 2;
      if (mux_owner[ep_mux[tg[i]][h]] < 0)            mux_of.push_back(ep_mux[tg[i]][h]);
      else if (mux_owner[ep_mux[tg[i]][1-h]] < 0)     mux_of.push_back(ep_mux[tg[i]][1-h]);
      else begin ok = 0; return; end
      mux_owner[mux_of[i]] = i;
    end
    // stage 2: give every used mux one of its two pins
    foreach (mux_of[i]) begin
      int m = mux_of[i];
      int pa = 2 * (m / 8), pb = 2 * (m % 8) + 1;
      if (pin_owner[pa] < 0)      pin_of.push_back(pa);
      else if (pin_owner[pb] < 0) pin_of.push_back(pb);
      else begin ok = 0; return; end
      pin_owner[pin_of[i]] = i;
    end
    ctl = rnd160();
    foreach (pin_of[i]) begin
      int j = pin_of[i], m = mux_of[i];
      int q = (j % 2 == 0) ? m % 8 : m / 8;
      ctl[j] = q[0]; ctl[16 + j] = q[1]; ctl[32 + j] = q[2];
    end
    // stage-1 select lines: one GF(2) system per decoder
    for (int d = 0; d < 4; d++) begin
      int nr = 0, r = 0;
      logic [27:0] x;
      foreach (mux_of[i]) begin
        int m = mux_of[i];
        int port = (fwd1[m][ep_port[tg[i]]] == tg[i]) ? ep_port[tg[i]] : -1;
        rows[nr] = '0;
        rows[nr][dec_a(m)] = 1'b1;
        rows[nr][dec_b(m)] = 1'b1;
        rhs[nr] = port[d];
        nr++;
      end
      for (int col = 0; col < 28 && r < nr; col++) begin
        int piv = -1;
        for (int i = r; i < nr; i++) if (piv < 0 && rows[i][col]) piv = i;
        if (piv < 0) continue;
        begin
          logic [27:0] tr = rows[piv]; logic tb_ = rhs[piv];
          rows[piv] = rows[r]; rhs[piv] = rhs[r];
          rows[r] = tr; rhs[r] = tb_;
        end
        for (int i = 0; i < nr; i++)
          if (i != r && rows[i][col]) begin rows[i] ^= rows[r]; rhs[i] ^= rhs[r]; end
        pivc[r] = col;
        r++;
      end
      for (int i = r; i < nr; i++) if (rhs[i]) begin ok = 0; return; end   // inconsistent
      x = 28'($urandom);
      for (int i = 0; i < r; i++) x[pivc[i]] = 1'b0;
      for (int i = 0; i < r; i++) x[pivc[i]] = rhs[i] ^ (^(rows[i] & x));
      ctl[48 + 28*d +: 28] = x;
    end
    pins = pin_of;
    ok = 1;
  endtask

  task automatic prepare_selection(int pat);
    logic [159:0] c;
    if (pat % 2 == 0) begin
      ctl_plan[pat] = rnd160();
      targets[pat].delete();
      n_random_sel++;
    end else begin
      int n = 1 + (pat / 2) % 12;
      bit ok = 0;
      for (int tries = 0; tries < 200 && !ok; tries++) begin
        plan_targeted(n, ok, c, targets[pat], target_pin[pat]);
        if (!ok) n_rejected++;
      end
      if (!ok) begin
        failures++;
        $display("no routable chain set of size %0d found", n);
        ctl_plan[pat] = rnd160();
        targets[pat].delete();
      end else begin
        ctl_plan[pat] = c;
        n_targeted++;
      end
    end
  endtask

  task automatic check_load(int pat);
    int bad = 0;
    for (int i = 0; i < L; i++) s[i] = seeds[pat][i];
    for (int t = 0; t <= CL; t++) s[t + L] = s[t + K] ^ s[t];
    for (int c = 0; c < NC; c++) begin
      int a = c % L;
      int b = (a + ((c < L) ? 97 : 211)) % L;
      for (int t = 0; t < CL; t++)
        if (chains.cells[c][CL - 1 - t] !== (s[t + a] ^ s[t + b])) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("pattern %0d: %0d loaded cells differ", pat, bad);
    end
  endtask

  task automatic check_unload_cycle(int t);
    for (int j = 0; j < NS; j++) begin
      int c = chain_at_pin(j, ctl_cur);
      if (snapx[c][CL - 1 - t]) n_masked++;
      else begin
        checks++; n_compared++;
        if (so[j] !== snap[c][CL - 1 - t]) begin
          failures++;
          if (failures < 10) $display("pattern %0d cycle %0d so%0d: got %b exp %b (chain %0d)",
                                      cur_pat, t, j, so[j], snap[c][CL-1-t], c);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin
      automatic int sft = k % 8;
      if (k < 256) begin
        ep_mux[k][0] = 2*(k/8);
        ep_mux[k][1] = 2*((k/8 + sft) % 32) + 1;
        ep_port[k] = sft;
      end else begin
        ep_mux[k][0] = 2*((k-256)/8) + 1;
        ep_mux[k][1] = 2*(((k-256)/8 + 8 + sft) % 32);
        ep_port[k] = 8 + sft;
      end
      fwd1[ep_mux[k][0]][ep_port[k]] = k;
      fwd1[ep_mux[k][1]][ep_port[k]] = k;
    end
    for (int m = 0; m < NM; m++) begin
      fwd2[2*(m/8)][m%8] = m;
      fwd2[2*(m%8)+1][m/8] = m;
    end

    shadow_si = '0; observe_si = '0;
    ctl_cur = '0; cur_pat = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    for (int w = 0; w <= PATS + 1; w++) begin
      // selection for pattern w-1, shifted in during this window
      if (w >= 1 && w <= PATS) prepare_selection(w - 1);
      for (int t = 0; t < CL; t++) begin
        automatic int tp = t - (CL - SEG);       // position in the shadow segments
        shadow_si = 12'($urandom);
        if (tp >= 0)
          for (int c = 0; c < 12; c++) begin
            automatic int l = (c * SEG + SEG <= L) ? SEG : L - c * SEG;
            automatic int j = tp - (SEG - l);
            if (j >= 0 && w <= PATS) seeds[w][c * SEG + j] = shadow_si[c];
          end
        if (w >= 1 && w <= PATS && tp >= 0)
          for (int c = 0; c < 4; c++) observe_si[c] = ctl_plan[w - 1][40*c + tp];
        else
          observe_si = 4'($urandom);
        if (w >= 1 && w <= PATS && tp >= 0) n_tester_bits += 16;
        if (w >= 2) check_unload_cycle(t);
        if (w >= 2 && w <= PATS) n_overlap++;
        shift_en = 1;
        @(posedge clk); #1;
        shift_en = 0;
      end
      if (w >= 1 && w <= PATS) check_load(w - 1);
      // capture cycle: response captured, seed w and selection w-1 transferred
      capture = 1;
      @(posedge clk); #1;
      capture = 0;
      n_reseed++;
      if (w >= 1 && w <= PATS) begin
        n_selupd++;
        ctl_cur = ctl_plan[w - 1];
        cur_pat = w - 1;
        for (int c = 0; c < NC; c++)
          for (int j = 0; j < CL; j++) begin
            snap[c][j]  = chains.cells[c][j];
            snapx[c][j] = chains.xmask[c][j];
          end
        foreach (targets[w - 1][i]) begin
          checks++;
          if (chain_at_pin(target_pin[w - 1][i], ctl_cur) == targets[w - 1][i]) n_target_obs++;
          else begin
            failures++;
            $display("pattern %0d: chain %0d not routed to so%0d", w - 1, targets[w-1][i], target_pin[w-1][i]);
          end
        end
      end
    end

    checks++;
    if (n_cycles != (PATS + 2) * (CL + 1)) begin
      failures++;
      $display("%0d cycles used, expected %0d", n_cycles, (PATS + 2) * (CL + 1));
    end
    checks++;
    if (n_tester_bits != PATS * 640) begin
      failures++;
      $display("%0d tester input bits, expected 640 per pattern", n_tester_bits);
    end
    $display("cycles: %0d for %0d patterns (%0d per pattern), tester input bits per pattern: %0d",
             n_cycles, PATS, CL + 1, n_tester_bits / PATS);
    $display("re-seeds (0-cycle): %0d", n_reseed);
    $display("selector updates: %0d", n_selupd);
    $display("overlapped load/unload/shadow cycles: %0d", n_overlap);
    $display("unload bits compared: %0d, unknown bits masked: %0d", n_compared, n_masked);
    $display("random selections: %0d, targeted selections: %0d (chains observed %0d, chain sets rejected %0d)",
             n_random_sel, n_targeted, n_target_obs, n_rejected);
    if (n_reseed == 0)     begin failures++; $display("no re-seed happened"); end
    if (n_selupd == 0)     begin failures++; $display("no selector update happened"); end
    if (n_overlap == 0)    begin failures++; $display("no overlapped cycle happened"); end
    if (n_masked == 0)     begin failures++; $display("no unknown bit was masked"); end
    if (n_random_sel == 0) begin failures++; $display("no random selection"); end
    if (n_targeted == 0)   begin failures++; $display("no targeted selection"); end
    if (n_target_obs == 0) begin failures++; $display("no targeted chain observed"); end
    if (n_rejected == 0)   begin failures++; $display("no chain set was rejected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
