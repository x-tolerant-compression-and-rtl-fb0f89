// tb_xdbist_units: end-to-end test of the smaller and the multi-unit
// configurations: the top with the 257-bit PRPG (feedback x^257 + x^12 + 1)
// and two independent units, each with its own 512-chain model (40 cells,
// 1 in 64 capturing an unknown value), seeds and control words.
//
// Same overlapped schedule and reference models as the full-size test: after
// each load every cell of every chain of both units must equal the
// phase-shifted reference LFSR sequence of that unit's seed (the 257-bit
// shadow is 12 segments of 22 bits, the last one 15, loaded in the last 22
// of the 40 shift cycles), and in every unload cycle every pin of both units
// must equal the captured cell of the chain the reference selector routes to
// it, unknown cells masked. Counts re-seeds, selector updates, overlapped
// cycles and masked unknowns, and fails if one never happened.
module tb_xdbist_units;
  localparam int NU = 2, NC = 512, NS = 16, NM = 64, L = 257, K = 12, CL = 40, PATS = 8;
  localparam int SEG = (L + 11) / 12;   // 22

  logic clk = 0, rst_n = 0, shift_en = 0, capture = 0;
  logic [NU-1:0][11:0]   shadow_si;
  logic [NU-1:0][3:0]    observe_si;
  logic [NU-1:0][NC-1:0] chain_si, chain_so;
  logic [NU-1:0][NS-1:0] so;

  xdbist_top #(.PRPG_BITS(L), .N_UNITS(NU)) dut (
    .clk, .rst_n, .shift_en, .capture, .shadow_si, .observe_si, .chain_si, .chain_so, .so);

  scan_chains_model #(.N(NC), .LEN(CL)) chains0 (
    .clk, .shift_en, .capture, .chain_si(chain_si[0]), .chain_so(chain_so[0]));
  scan_chains_model #(.N(NC), .LEN(CL)) chains1 (
    .clk, .shift_en, .capture, .chain_si(chain_si[1]), .chain_so(chain_so[1]));

  int checks = 0, failures = 0;
  int n_reseed = 0, n_selupd = 0, n_overlap = 0, n_masked = 0;

  int fwd1 [NM][16];
  int fwd2 [NS][8];
  logic [L-1:0]  seeds [NU][PATS + 2];
  logic [159:0]  ctl_plan [NU][PATS + 2];
  logic [159:0]  ctl_cur [NU];
  logic          snap  [NU][NC][CL];
  bit            snapx [NU][NC][CL];
  logic          s [L + CL + 1];

  always #5 clk = ~clk;

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

  function automatic int chain_at_pin(int j, logic [159:0] ctl);
    int q, m, p;
    logic [27:0] din;
    q = {ctl[32 + j], ctl[16 + j], ctl[j]};
    m = fwd2[j][q];
    p = 0;
    for (int d = 0; d < 4; d++) begin
      din = ctl[48 + 28*d +: 28];
      p |= int'(din[m % 14] ^ din[14 + ((m % 14 + ofs(m / 14)) % 14)]) << d;
    end
    return fwd1[m][p];
  endfunction

  function automatic logic cell_val(int u, int c, int j);
    return (u == 0) ? chains0.cells[c][j] : chains1.cells[c][j];
  endfunction

  function automatic bit xcell(int u, int c, int j);
    return (u == 0) ? chains0.xmask[c][j] : chains1.xmask[c][j];
  endfunction

  task automatic check_load(int u, int pat);
    int bad = 0;
    for (int i = 0; i < L; i++) s[i] = seeds[u][pat][i];
    for (int t = 0; t <= CL; t++) s[t + L] = s[t + K] ^ s[t];
    for (int c = 0; c < NC; c++) begin
      int a = c % L;
      int b = (a + ((c < L) ? 97 : 211)) % L;
      for (int t = 0; t < CL; t++)
        if (cell_val(u, c, CL - 1 - t) !== (s[t + a] ^ s[t + b])) bad++;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("unit %0d pattern %0d: %0d loaded cells differ", u, pat, bad);
    end
  endtask

  task automatic check_unload_cycle(int t);
    for (int u = 0; u < NU; u++)
      for (int j = 0; j < NS; j++) begin
        int c = chain_at_pin(j, ctl_cur[u]);
        if (snapx[u][c][CL - 1 - t]) n_masked++;
        else begin
          checks++;
          if (so[u][j] !== snap[u][c][CL - 1 - t]) begin
            failures++;
            if (failures < 10) $display("unit %0d cycle %0d so%0d: got %b exp %b", u, t, j, so[u][j], snap[u][c][CL-1-t]);
          end
        end
      end
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin
      automatic int sft = k % 8;
      if (k < 256) begin
        fwd1[2*(k/8)][sft] = k;
        fwd1[2*((k/8 + sft) % 32) + 1][sft] = k;
      end else begin
        fwd1[2*((k-256)/8) + 1][8 + sft] = k;
        fwd1[2*(((k-256)/8 + 8 + sft) % 32)][8 + sft] = k;
      end
    end
    for (int m = 0; m < NM; m++) begin
      fwd2[2*(m/8)][m%8] = m;
      fwd2[2*(m%8)+1][m/8] = m;
    end
    for (int u = 0; u < NU; u++)
      for (int p = 0; p < PATS + 2; p++)
        for (int w = 0; w < 5; w++) ctl_plan[u][p][w*32 +: 32] = $urandom;

    shadow_si = '0; observe_si = '0;
    ctl_cur[0] = '0; ctl_cur[1] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    for (int w = 0; w <= PATS + 1; w++) begin
      for (int t = 0; t < CL; t++) begin
        automatic int tp = t - (CL - SEG);
        automatic int to = t - (CL - 40);
        for (int u = 0; u < NU; u++) begin
          shadow_si[u] = 12'($urandom);
          if (tp >= 0)
            for (int c = 0; c < 12; c++) begin
              automatic int l = (c * SEG + SEG <= L) ? SEG : L - c * SEG;
              automatic int j = tp - (SEG - l);
              if (j >= 0 && w <= PATS) seeds[u][w][c * SEG + j] = shadow_si[u][c];
            end
          if (w >= 1 && w <= PATS && to >= 0)
            for (int c = 0; c < 4; c++) observe_si[u][c] = ctl_plan[u][w - 1][40*c + to];
          else
            observe_si[u] = 4'($urandom);
        end
        if (w >= 2) check_unload_cycle(t);
        if (w >= 2 && w <= PATS) n_overlap++;
        shift_en = 1;
        @(posedge clk); #1;
        shift_en = 0;
      end
      if (w >= 1 && w <= PATS) for (int u = 0; u < NU; u++) check_load(u, w - 1);
      capture = 1;
      @(posedge clk); #1;
      capture = 0;
      n_reseed++;
      if (w >= 1 && w <= PATS) begin
        n_selupd++;
        for (int u = 0; u < NU; u++) begin
          ctl_cur[u] = ctl_plan[u][w - 1];
          for (int c = 0; c < NC; c++)
            for (int j = 0; j < CL; j++) begin
              snap[u][c][j]  = cell_val(u, c, j);
              snapx[u][c][j] = xcell(u, c, j);
            end
        end
      end
    end

    $display("re-seeds: %0d, selector updates: %0d, overlapped cycles: %0d, unknown bits masked: %0d",
             n_reseed, n_selupd, n_overlap, n_masked);
    if (n_reseed == 0)  begin failures++; $display("no re-seed happened"); end
    if (n_selupd == 0)  begin failures++; $display("no selector update happened"); end
    if (n_overlap == 0) begin failures++; $display("no overlapped cycle happened"); end
    if (n_masked == 0)  begin failures++; $display("no unknown bit was masked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
