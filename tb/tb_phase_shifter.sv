// tb_phase_shifter: self-checking test of the phase shifter.
// Drives one-hot PRPG states to find, for every chain output, which PRPG bits
// it depends on: each output must depend on exactly two bits, the pair
// a = i mod L, b = (a + K) mod L (K = 97 for i < L, else 211), and no two
// outputs may share a pair. Random states then check the XOR function.
// Runs the 479-bit reference size and the 257-bit alternative.
module tb_phase_shifter;
  localparam int L1 = 479, L2 = 257, N = 512;
  logic [L1-1:0] p1;
  logic [L2-1:0] p2;
  logic [N-1:0]  o1, o2;
  int checks = 0, failures = 0;

  phase_shifter #(.LEN(L1), .N_OUT(N)) dut1 (.prpg(p1), .chain_si(o1));
  phase_shifter #(.LEN(L2), .N_OUT(N)) dut2 (.prpg(p2), .chain_si(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap_b(int i, int l);
    return (i % l + ((i < l) ? 97 : 211)) % l;
  endfunction

  task automatic check_structure(input int l);
    int cnt [N];
    int ta [N], tb_ [N];
    logic [N-1:0] o;
    for (int i = 0; i < N; i++) begin cnt[i] = 0; ta[i] = -1; tb_[i] = -1; end
    for (int b = 0; b < l; b++) begin
      if (l == L1) begin p1 = '0; p1[b] = 1'b1; #1 o = o1; end
      else         begin p2 = '0; p2[b] = 1'b1; #1 o = o2; end
      for (int i = 0; i < N; i++)
        if (o[i]) begin
          cnt[i]++;
          if (ta[i] < 0) ta[i] = b; else tb_[i] = b;
        end
    end
    for (int i = 0; i < N; i++) begin
      int ea = i % l, eb = tap_b(i, l);
      int lo = (ea < eb) ? ea : eb, hi = (ea < eb) ? eb : ea;
      checks++;
      if (cnt[i] != 2 || ta[i] != lo || tb_[i] != hi) begin
        failures++;
        if (failures < 10) $display("L=%0d out %0d: taps %0d,%0d (n=%0d) expected %0d,%0d", l, i, ta[i], tb_[i], cnt[i], lo, hi);
      end
    end
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (ta[i] == ta[j] && tb_[i] == tb_[j]) begin
          checks++; failures++;
          $display("L=%0d outputs %0d and %0d share taps", l, i, j);
        end
  endtask

  initial begin
    check_structure(L1);
    check_structure(L2);
    for (int r = 0; r < 50; r++) begin
      for (int b = 0; b < L1; b++) p1[b] = 1'($urandom);
      for (int b = 0; b < L2; b++) p2[b] = 1'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        checks += 2;
        if (o1[i] !== (p1[i % L1] ^ p1[tap_b(i, L1)])) failures++;
        if (o2[i] !== (p2[i % L2] ^ p2[tap_b(i, L2)])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
