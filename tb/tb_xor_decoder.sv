// tb_xor_decoder: self-checking test of the 28-to-64 XOR decoder.
// One-hot inputs reveal the two inputs of every output; they must match the
// graph definition (output e joins input e mod 14 and input
// 14 + ((e mod 14 + OFS[e/14]) mod 14), OFS = {0,1,3,7,12}). The graph is
// then checked for what the selector relies on: 64 distinct edges, no
// triangle (girth at least 4) and at least one 4-cycle (girth exactly 4).
// Random inputs check the XOR function.
module tb_xor_decoder;
  localparam int NI = 28, NO = 64;
  logic [NI-1:0] din;
  logic [NO-1:0] dout;
  int checks = 0, failures = 0;
  int ea [NO], eb [NO], cnt [NO];
  bit adj [NI][NI];

  xor_decoder dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ofs(int k);
    int t[5] = '{0, 1, 3, 7, 12};
    return t[k];
  endfunction

  initial begin
    bit tri_found, sq_found;
    for (int e = 0; e < NO; e++) begin cnt[e] = 0; ea[e] = -1; eb[e] = -1; end
    for (int a = 0; a < NI; a++) for (int b = 0; b < NI; b++) adj[a][b] = 0;
    for (int v = 0; v < NI; v++) begin
      din = '0; din[v] = 1'b1; #1;
      for (int e = 0; e < NO; e++)
        if (dout[e]) begin
          cnt[e]++;
          if (ea[e] < 0) ea[e] = v; else eb[e] = v;
        end
    end
    for (int e = 0; e < NO; e++) begin
      automatic int x = e % 14, y = 14 + ((e % 14 + ofs(e / 14)) % 14);
      checks++;
      if (cnt[e] != 2 || ea[e] != x || eb[e] != y) begin
        failures++;
        $display("output %0d: inputs %0d,%0d (n=%0d), expected %0d,%0d", e, ea[e], eb[e], cnt[e], x, y);
      end
      if (ea[e] >= 0 && eb[e] >= 0) begin
        checks++;
        if (adj[ea[e]][eb[e]]) begin failures++; $display("duplicate edge %0d", e); end
        adj[ea[e]][eb[e]] = 1; adj[eb[e]][ea[e]] = 1;
      end
    end
    tri_found = 0; sq_found = 0;
    for (int a = 0; a < NI; a++)
      for (int b = 0; b < NI; b++)
        for (int c = 0; c < NI; c++) begin
          if (adj[a][b] && adj[b][c] && adj[c][a]) tri_found = 1;
          for (int d = 0; d < NI; d++)
            if (a != c && b != d && adj[a][b] && adj[b][c] && adj[c][d] && adj[d][a]) sq_found = 1;
        end
    checks += 2;
    if (tri_found) begin failures++; $display("graph has a triangle"); end
    if (!sq_found) begin failures++; $display("graph has no 4-cycle"); end
    for (int r = 0; r < 200; r++) begin
      din = NI'($urandom);
      #1;
      for (int e = 0; e < NO; e++) begin
        automatic int x = e % 14, y = 14 + ((e % 14 + ofs(e / 14)) % 14);
        checks++;
        if (dout[e] !== (din[x] ^ din[y])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
