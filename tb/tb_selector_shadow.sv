// tb_selector_shadow: self-checking test of the 4 x 40-bit selector shadow.
// Shifts 40 random bits into each chain and checks that control bit 40c+j
// holds the j-th bit shifted into chain c; then checks hold and reset.
module tb_selector_shadow;
  import xdbist_pkg::*;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic [3:0] si;
  sel_ctl_t q;
  logic [159:0] qv;
  logic hist [4][40];
  int checks = 0, failures = 0;

  selector_shadow dut (.clk, .rst_n, .shift_en, .si, .q);
  assign qv = q;

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int c = 0; c < 4; c++)
      for (int j = 0; j < 40; j++) begin
        checks++;
        if (qv[40*c + j] !== hist[c][j]) begin
          failures++;
          if (failures < 10) $display("chain %0d bit %0d: got %b exp %b", c, j, qv[40*c+j], hist[c][j]);
        end
      end
  endtask

  initial begin
    si = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int r = 0; r < 2; r++) begin
      for (int t = 0; t < 40; t++) begin
        si = 4'($urandom);
        for (int c = 0; c < 4; c++) hist[c][t] = si[c];
        shift_en = 1;
        @(posedge clk); #1;
      end
      shift_en = 0;
      check_all();
    end
    si = '1;
    repeat (5) @(posedge clk); #1;
    check_all();
    rst_n = 0; @(posedge clk); #1;
    checks++; if (qv != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
