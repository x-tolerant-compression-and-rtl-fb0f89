// tb_scanout_selector: self-checking test of the two-stage scanout selector.
// The reference is the chain-to-mux map written from the chain's side:
// chain k < 256 reaches port k%8 of mux 2(k/8) and of mux 2((k/8 + k%8) mod 32)+1;
// chain k >= 256 (v = (k-256)/8) reaches port 8+k%8 of mux 2v+1 and of mux
// 2((v + 8 + k%8) mod 32); first-stage mux m reaches port m%8 of pin 2(m/8)
// and port m/8 of pin 2(m%8)+1. For every chain, each of its 2 first-stage
// paths and each of the 2 pin paths of that mux, the test sets those selects
// (others random), drives random chain values and checks that the pin follows
// the chain in both polarities. It also checks that this map is a bijection
// onto the mux ports, bipartite (triangle-free) and 16-regular, as the
// selector requires, and that chain 0 reaches muxes 0 and 1.
module tb_scanout_selector;
  localparam int NC = 512, NM = 64, NS = 16;
  logic [NC-1:0]      chain_so;
  logic [NM-1:0][3:0] mid_sel;
  logic [NS-1:0][2:0] so_sel;
  logic [NS-1:0]      so;
  int checks = 0, failures = 0;
  int paths = 0;

  scanout_selector dut (.chain_so, .mid_sel, .so_sel, .so);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chain k, path h (0/1) -> first-stage mux and port
  task automatic chain_path(input int k, input int h, output int mux, output int port);
    int s = k % 8;
    if (k < 256) begin
      int u = k / 8;
      port = s;
      mux = (h == 0) ? 2 * u : 2 * ((u + s) % 32) + 1;
    end else begin
      int v = (k - 256) / 8;
      port = 8 + s;
      mux = (h == 0) ? 2 * v + 1 : 2 * ((v + 8 + s) % 32);
    end
  endtask

  task automatic mid_path(input int m, input int h, output int pin, output int port);
    if (h == 0) begin pin = 2 * (m / 8);     port = m % 8; end
    else        begin pin = 2 * (m % 8) + 1; port = m / 8; end
  endtask

  initial begin
    int used [NM][16];
    int deg [NM];
    for (int m = 0; m < NM; m++) begin
      deg[m] = 0;
      for (int p = 0; p < 16; p++) used[m][p] = 0;
    end
    // properties of the reference map
    for (int k = 0; k < NC; k++) begin
      int m0, p0, m1, p1;
      chain_path(k, 0, m0, p0);
      chain_path(k, 1, m1, p1);
      used[m0][p0]++; used[m1][p1]++;
      deg[m0]++; deg[m1]++;
      checks++;
      if ((m0 % 2) == (m1 % 2)) begin failures++; $display("chain %0d joins muxes of one side", k); end
    end
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (deg[m] != 16) failures++;
      for (int p = 0; p < 16; p++) begin
        checks++;
        if (used[m][p] != 1) failures++;
      end
    end
    begin
      int m0, p0, m1, p1;
      chain_path(0, 0, m0, p0); chain_path(0, 1, m1, p1);
      checks++;
      if (!((m0 == 0 && m1 == 1) || (m0 == 1 && m1 == 0))) failures++;
    end
    // behaviour of the selector
    for (int k = 0; k < NC; k++)
      for (int h = 0; h < 2; h++)
        for (int g = 0; g < 2; g++) begin
          int m, p, pin, pp;
          chain_path(k, h, m, p);
          mid_path(m, g, pin, pp);
          for (int i = 0; i < NM; i++) mid_sel[i] = 4'($urandom);
          for (int i = 0; i < NS; i++) so_sel[i] = 3'($urandom);
          for (int w = 0; w < NC / 32; w++) chain_so[w*32 +: 32] = $urandom;
          mid_sel[m] = 4'(p);
          so_sel[pin] = 3'(pp);
          for (int v = 0; v < 2; v++) begin
            chain_so[k] = 1'(v);
            #1;
            checks++;
            if (so[pin] !== 1'(v)) begin
              failures++;
              if (failures < 10) $display("chain %0d via mux %0d port %0d to so%0d port %0d: got %b", k, m, p, pin, pp, so[pin]);
            end
          end
          paths++;
        end
    $display("routed paths tested: %0d", paths);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
