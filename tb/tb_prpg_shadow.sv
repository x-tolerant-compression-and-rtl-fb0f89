// tb_prpg_shadow: self-checking test of the PRPG shadow register.
// Shifts random bits into the 12 segments for more cycles than a segment is
// long, then compares every bit of the parallel output with a record of what
// was shifted into each segment. Also checks hold (shift_en low) and reset.
// Runs the 479-bit reference size and the 257-bit alternative.
module tb_prpg_shadow;
  localparam int L1 = 479, L2 = 257, NSI = 12, T = 47;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [NSI-1:0] si;
  logic [L1-1:0] q1;
  logic [L2-1:0] q2;
  int checks = 0, failures = 0;
  logic hist [NSI][T];

  prpg_shadow #(.LEN(L1), .N_SI(NSI)) dut1 (.clk, .rst_n, .shift_en, .si, .q(q1));
  prpg_shadow #(.LEN(L2), .N_SI(NSI)) dut2 (.clk, .rst_n, .shift_en, .si, .q(q2));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_len(input int len, input logic [L1-1:0] q, input int tshift);
    int seg = (len + NSI - 1) / NSI;
    for (int c = 0; c < NSI; c++) begin
      int base = c * seg;
      int l = (base + seg <= len) ? seg : len - base;
      for (int j = 0; j < l; j++) begin
        checks++;
        if (q[base + j] !== hist[c][tshift - l + j]) begin
          failures++;
          if (failures < 10) $display("len %0d seg %0d bit %0d: got %b exp %b", len, c, j, q[base+j], hist[c][tshift-l+j]);
        end
      end
    end
  endtask

  initial begin
    si = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < T; t++) begin
      si = NSI'($urandom);
      for (int c = 0; c < NSI; c++) hist[c][t] = si[c];
      shift_en = 1;
      @(posedge clk); #1;
    end
    shift_en = 0;
    check_len(L1, q1, T);
    check_len(L2, L1'(q2), T);
    // hold
    si = '1;
    repeat (3) @(posedge clk); #1;
    check_len(L1, q1, T);
    // reset
    rst_n = 0; @(posedge clk); #1;
    checks++; if (q1 != '0 || q2 != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
