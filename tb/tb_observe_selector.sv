// tb_observe_selector: self-checking test of the observe selector.
// Each round shifts a random 160-bit control word in through observe_si
// (40 cycles), pulses capture, and then, while the next word is being
// shifted in, checks every pin against a reference model for random chain
// values. The model assembles the control word from the shifted bits (chain
// c holds bits 40c..40c+39, first bit lowest), decodes sel3..sel6 with the
// XOR graph (output m = in[m mod 14] ^ in[14 + (m mod 14 + OFS[m/14]) mod 14])
// and follows the two mux stages with tables built from the chain-side map.
// This also checks that the selection in use does not change while the
// shadow loads the next word.
module tb_observe_selector;
  localparam int NC = 512, NM = 64, NS = 16, ROUNDS = 6;
  logic clk = 0, rst_n = 0, shift_en = 0, capture = 0;
  logic [3:0]    observe_si;
  logic [NC-1:0] chain_so;
  logic [NS-1:0] so;
  int checks = 0, failures = 0;
  int fwd1 [NM][16];   // first-stage mux, port -> chain
  int fwd2 [NS][8];    // pin mux, port -> first-stage mux
  logic [159:0] ctl_new, ctl_cur;

  observe_selector dut (.clk, .rst_n, .shift_en, .capture, .observe_si, .chain_so, .so);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ofs(int k);
    int t[5] = '{0, 1, 3, 7, 12};
    return t[k];
  endfunction

  function automatic logic expected_pin(int j, logic [159:0] ctl, logic [NC-1:0] cs);
    int q, m, p;
    logic [27:0] din;
    q = {ctl[32 + j], ctl[16 + j], ctl[j]};
    m = fwd2[j][q];
    p = 0;
    for (int d = 0; d < 4; d++) begin
      din = ctl[48 + 28*d +: 28];
      p |= int'(din[m % 14] ^ din[14 + ((m % 14 + ofs(m / 14)) % 14)]) << d;
    end
    return cs[fwd1[m][p]];
  endfunction

  task automatic check_pins();
    for (int w = 0; w < NC / 32; w++) chain_so[w*32 +: 32] = $urandom;
    #1;
    for (int j = 0; j < NS; j++) begin
      checks++;
      if (so[j] !== expected_pin(j, ctl_cur, chain_so)) begin
        failures++;
        if (failures < 10) $display("so%0d mismatch", j);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin
      automatic int s = k % 8;
      if (k < 256) begin
        fwd1[2*(k/8)][s] = k;
        fwd1[2*((k/8 + s) % 32) + 1][s] = k;
      end else begin
        fwd1[2*((k-256)/8) + 1][8 + s] = k;
        fwd1[2*(((k-256)/8 + 8 + s) % 32)][8 + s] = k;
      end
    end
    for (int m = 0; m < NM; m++) begin
      fwd2[2*(m/8)][m%8] = m;
      fwd2[2*(m%8)+1][m/8] = m;
    end
    observe_si = '0; chain_so = '0;
    ctl_cur = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r <= ROUNDS; r++) begin
      for (int t = 0; t < 40; t++) begin
        observe_si = 4'($urandom);
        for (int c = 0; c < 4; c++) ctl_new[40*c + t] = observe_si[c];
        if (r > 0) check_pins();
        shift_en = 1;
        @(posedge clk); #1;
      end
      shift_en = 0;
      capture = 1;
      @(posedge clk); #1;
      capture = 0;
      ctl_cur = ctl_new;
      check_pins();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
