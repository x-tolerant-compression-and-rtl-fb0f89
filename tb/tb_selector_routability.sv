// tb_selector_routability: repeats the observability experiment for the
// observe selector. For every set size n = 1..16 it draws TRIALS random sets
// of n distinct chains and tries to observe all of them in one pattern:
//  * route stage 1 (chains to distinct first-stage muxes) and stage 2 (those
//    muxes to distinct pins), each as a bipartite matching found with
//    augmenting paths, restarting with shuffled choices up to RESTARTS times;
//  * solve the four decoder systems over GF(2) (one equation per used
//    first-stage mux and decoder), free variables random.
// Each solved set is then applied to the hardware: the 160-bit control word
// is shifted in through observe_si and captured, random chain values are
// driven, and every chosen chain must appear on its pin in both polarities.
// The success rate per set size is printed. Sets of 1 to 3 chains must
// always succeed (every stage graph is simple and triangle-free, and three
// decoder equations can never be dependent); larger sets may fail, that is
// what the rate measures.
module tb_selector_routability;
  localparam int NC = 512, NM = 64, NS = 16, TRIALS = 1000, RESTARTS = 8;

  logic clk = 0, rst_n = 0, shift_en = 0, capture = 0;
  logic [3:0]    observe_si;
  logic [NC-1:0] chain_so;
  logic [NS-1:0] so;
  int checks = 0, failures = 0;
  int ep_mux [NC][2];
  int ep_port [NC];
  int success [17];

  observe_selector dut (.clk, .rst_n, .shift_en, .capture, .observe_si, .chain_so, .so);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ofs(int k);
    int t[5] = '{0, 1, 3, 7, 12};
    return t[k];
  endfunction

  // bipartite matching of nl left nodes (2 choices each) onto nr right nodes
  task automatic match2(input int nl, input int nr, input int adj [16][2],
                        output int ml [16], output bit ok);
    int mr [64];
    int par [64];
    bit vis [64];
    int queue [16];
    for (int r = 0; r < nr; r++) mr[r] = -1;
    for (int i = 0; i < nl; i++) ml[i] = -1;
    ok = 1;
    for (int s = 0; s < nl; s++) begin
      int qh = 0, qt = 0;
      bit found = 0;
      for (int r = 0; r < nr; r++) vis[r] = 0;
      queue[qt++] = s;
      while (qh < qt && !found) begin
        int u = queue[qh++];
        for (int h = 0; h < 2 && !found; h++) begin
          int r = adj[u][h];
          if (!vis[r]) begin
            vis[r] = 1; par[r] = u;
            if (mr[r] < 0) begin
              int rr = r;
              found = 1;
              while (rr >= 0) begin
                int uu = par[rr];
                int nxt = ml[uu];
                ml[uu] = rr; mr[rr] = uu;
                rr = nxt;
              end
            end else queue[qt++] = mr[r];
          end
        end
      end
      if (!found) begin ok = 0; return; end
    end
  endtask

  task automatic solve_decoders(input int n, input int tg [16], input int mux_of [16],
                       inout logic [159:0] ctl, output bit ok);
    logic [27:0] rows [16];
    logic        rhs  [16];
    int          pivc [16];
    ok = 1;
    for (int d = 0; d < 4; d++) begin
      int r = 0;
      logic [27:0] x;
      for (int i = 0; i < n; i++) begin
        int m = mux_of[i];
        rows[i] = '0;
        rows[i][m % 14] = 1'b1;
        rows[i][14 + ((m % 14 + ofs(m / 14)) % 14)] = 1'b1;
        rhs[i] = ep_port[tg[i]] >> d & 1;
      end
      for (int col = 0; col < 28 && r < n; col++) begin
        int piv = -1;
        for (int i = r; i < n; i++) if (piv < 0 && rows[i][col]) piv = i;
        if (piv >= 0) begin
          logic [27:0] tr = rows[piv];
          logic trh = rhs[piv];
          rows[piv] = rows[r]; rhs[piv] = rhs[r];
          rows[r] = tr; rhs[r] = trh;
          for (int i = 0; i < n; i++)
            if (i != r && rows[i][col]) begin rows[i] ^= rows[r]; rhs[i] ^= rhs[r]; end
          pivc[r] = col;
          r++;
        end
      end
      for (int i = r; i < n; i++) if (rhs[i]) ok = 0;
      x = 28'($urandom);
      for (int i = 0; i < r; i++) x[pivc[i]] = 1'b0;
      for (int i = 0; i < r; i++) x[pivc[i]] = rhs[i] ^ (^(rows[i] & x));
      ctl[48 + 28*d +: 28] = x;
    end
  endtask

  task automatic apply_and_check(input int n, input int tg [16], input int pin_of [16],
                                 input logic [159:0] ctl);
    for (int t = 0; t < 40; t++) begin
      for (int c = 0; c < 4; c++) observe_si[c] = ctl[40*c + t];
      shift_en = 1;
      @(posedge clk); #1;
    end
    shift_en = 0;
    capture = 1;
    @(posedge clk); #1;
    capture = 0;
    for (int v = 0; v < 2; v++) begin
      for (int w = 0; w < NC / 32; w++) chain_so[w*32 +: 32] = $urandom;
      for (int i = 0; i < n; i++) chain_so[tg[i]] = 1'(v ^ (i & 1));
      #1;
      for (int i = 0; i < n; i++) begin
        checks++;
        if (so[pin_of[i]] !== chain_so[tg[i]]) begin
          failures++;
          if (failures < 10) $display("chain %0d not seen on so%0d", tg[i], pin_of[i]);
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
    end
    observe_si = '0; chain_so = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 1; n <= 16; n++) begin
      success[n] = 0;
      for (int trial = 0; trial < TRIALS; trial++) begin
        automatic int tg [16];
        automatic int adj1 [16][2];
        automatic int adj2 [16][2];
        automatic int mux_of [16];
        automatic int pin_of [16];
        automatic logic [159:0] ctl;
        automatic bit ok = 0;
        for (int i = 0; i < n; i++) begin
          bit dup;
          do begin
            tg[i] = $urandom % NC;
            dup = 0;
            for (int j = 0; j < i; j++) if (tg[j] == tg[i]) dup = 1;
          end while (dup);
        end
        for (int rs = 0; rs < RESTARTS && !ok; rs++) begin
          bit ok1, ok2, ok3;
          for (int i = 0; i < n; i++) begin
            automatic int h = (rs == 0) ? 0 : $urandom % 2;
            adj1[i][0] = ep_mux[tg[i]][h];
            adj1[i][1] = ep_mux[tg[i]][1 - h];
          end
          match2(n, NM, adj1, mux_of, ok1);
          if (!ok1) continue;
          for (int i = 0; i < n; i++) begin
            automatic int h = (rs == 0) ? 0 : $urandom % 2;
            automatic int pa = 2 * (mux_of[i] / 8), pb = 2 * (mux_of[i] % 8) + 1;
            adj2[i][0] = h ? pb : pa;
            adj2[i][1] = h ? pa : pb;
          end
          match2(n, NS, adj2, pin_of, ok2);
          if (!ok2) continue;
          for (int w = 0; w < 5; w++) ctl[w*32 +: 32] = $urandom;
          for (int i = 0; i < n; i++) begin
            automatic int j = pin_of[i], m = mux_of[i];
            automatic int q = (j % 2 == 0) ? m % 8 : m / 8;
            ctl[j] = q[0]; ctl[16 + j] = q[1]; ctl[32 + j] = q[2];
          end
          solve_decoders(n, tg, mux_of, ctl, ok3);
          ok = ok3;
        end
        if (ok) begin
          success[n]++;
          apply_and_check(n, tg, pin_of, ctl);
        end
      end
      $display("chains selected %2d: observed in %4d of %0d sets (%0d.%01d%%)", n, success[n], TRIALS,
               success[n] * 100 / TRIALS, (success[n] * 1000 / TRIALS) % 10);
    end
    for (int n = 1; n <= 3; n++) begin
      checks++;
      if (success[n] != TRIALS) begin failures++; $display("set size %0d not always routable", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
