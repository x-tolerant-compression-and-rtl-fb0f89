// tb_prpg_lfsr: self-checking test of the PRPG LFSR.
// Loads a random seed and steps the LFSR; the reference is the bit sequence
// s[t+L] = s[t+k] ^ s[t] (k = 105 for 479 bits, 12 for 257 bits) started from
// the seed, and state bit i must equal s[t+i] after t steps. Also checks that
// the state holds with shift_en low, that load wins over shift_en and that
// reset gives state 1.
module tb_prpg_lfsr;
  localparam int L = 479, K = 105, L2 = 257, K2 = 12, STEPS = 700;
  logic clk = 0, rst_n = 0, shift_en = 0, load = 0;
  logic [L-1:0]  seed, state;
  logic [L2-1:0] seed2, state2;
  logic s  [L + STEPS + 1];
  logic s2 [L2 + STEPS + 1];
  int checks = 0, failures = 0;

  prpg_lfsr #(.LEN(L))  dut  (.clk, .rst_n, .shift_en, .load, .seed(seed),   .state(state));
  prpg_lfsr #(.LEN(L2)) dut2 (.clk, .rst_n, .shift_en, .load, .seed(seed2), .state(state2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input int t);
    logic ok = 1;
    for (int i = 0; i < L; i++)  if (state[i]  !== s[t+i])  ok = 0;
    for (int i = 0; i < L2; i++) if (state2[i] !== s2[t+i]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 5) $display("mismatch after %0d steps", t);
    end
  endtask

  initial begin
    for (int i = 0; i < L; i++)  seed[i]  = 1'($urandom);
    for (int i = 0; i < L2; i++) seed2[i] = 1'($urandom);
    for (int i = 0; i < L; i++)  s[i]  = seed[i];
    for (int i = 0; i < L2; i++) s2[i] = seed2[i];
    for (int t = 0; t <= STEPS; t++) s[t+L]   = s[t+K]  ^ s[t];
    for (int t = 0; t <= STEPS; t++) s2[t+L2] = s2[t+K2] ^ s2[t];
    repeat (2) @(posedge clk); #1;
    checks++; if (state != L'(1) || state2 != L2'(1)) failures++;
    rst_n = 1;
    load = 1; shift_en = 1;          // load has priority
    @(posedge clk); #1;
    load = 0;
    cmp(0);
    for (int t = 1; t <= STEPS; t++) begin
      shift_en = (t % 7 != 0);
      @(posedge clk); #1;
      if (!shift_en) begin
        shift_en = 1;
        @(posedge clk); #1;
      end
      cmp(t);
    end
    shift_en = 0;
    repeat (4) @(posedge clk); #1;
    cmp(STEPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
