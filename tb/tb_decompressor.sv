// tb_decompressor: self-checking test of the decompressor (PRPG shadow,
// PRPG LFSR, phase shifter).
// Each pattern shifts the next 479-bit seed in through the 12 shadow inputs
// during the 40 shift cycles of the current load, then pulses capture once.
// The reference seed is assembled from the shifted bits (segment c = bits
// 40c.., first bit lowest, the 39-bit last segment dropping its first bit);
// the reference LFSR is the sequence s[t+479] = s[t+105] ^ s[t] from that
// seed, and chain i must receive s[t + a] ^ s[t + b] in shift cycle t, with
// a = i mod 479 and b = (a + K) mod 479 (K = 97 for i < 479, else 211). The
// first shift after every capture must already use the new seed (re-seeding
// costs no cycle).
module tb_decompressor;
  localparam int L = 479, K = 105, NSI = 12, SEG = 40, N = 512, PATS = 5, SH = 40;
  logic clk = 0, rst_n = 0, shift_en = 0, capture = 0;
  logic [NSI-1:0] shadow_si;
  logic [N-1:0]   chain_si;
  logic [L-1:0]   seed_next;
  logic s [L + SH + 1];
  int checks = 0, failures = 0, reseeds = 0;

  decompressor dut (.clk, .rst_n, .shift_en, .capture, .shadow_si, .chain_si);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tap_b(int i);
    return (i % L + ((i < L) ? 97 : 211)) % L;
  endfunction

  // one shift cycle: drive random shadow bits, record them into seed_next
  task automatic shift_cycle(input int t, input bit check);
    shadow_si = NSI'($urandom);
    for (int c = 0; c < NSI; c++) begin
      int l = (c * SEG + SEG <= L) ? SEG : L - c * SEG;
      int j = t - (SEG - l);             // position in segment, first kept bit lowest
      if (j >= 0) seed_next[c * SEG + j] = shadow_si[c];
    end
    if (check) begin
      logic ok = 1;
      for (int i = 0; i < N; i++)
        if (chain_si[i] !== (s[t + i % L] ^ s[t + tap_b(i)])) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 5) $display("chain values differ in shift cycle %0d", t);
      end
    end
    shift_en = 1;
    @(posedge clk); #1;
    shift_en = 0;
  endtask

  initial begin
    shadow_si = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int p = 0; p <= PATS; p++) begin
      for (int t = 0; t < SH; t++) shift_cycle(t, p > 0);
      capture = 1;
      @(posedge clk); #1;
      capture = 0;
      reseeds++;
      for (int i = 0; i < L; i++) s[i] = seed_next[i];
      for (int t = 0; t <= SH; t++) s[t + L] = s[t + K] ^ s[t];
    end
    $display("re-seeds: %0d", reseeds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
