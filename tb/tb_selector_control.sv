// tb_selector_control: self-checking test of the 160-bit selector control
// register: loads random words, checks that it holds them while load is low
// and that reset clears it.
module tb_selector_control;
  import xdbist_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  sel_ctl_t d, q;
  logic [159:0] exp_q;
  int checks = 0, failures = 0;

  selector_control dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [159:0] rnd160();
    logic [159:0] v;
    for (int w = 0; w < 5; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    d = '0;
    repeat (2) @(posedge clk); #1;
    checks++; if (q != '0) failures++;
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      exp_q = rnd160();
      d = sel_ctl_t'(exp_q);
      load = 1; @(posedge clk); #1; load = 0;
      checks++; if (160'(q) !== exp_q) failures++;
      for (int h = 0; h < 3; h++) begin
        d = sel_ctl_t'(rnd160());
        @(posedge clk); #1;
        checks++; if (160'(q) !== exp_q) failures++;
      end
    end
    rst_n = 0; @(posedge clk); #1;
    checks++; if (q != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
