// tb_sn_l1: self-checking test of the partial product generator and first
// summation level. The eight output words must add up (mod 2**32) to the
// product a * b, computed here with the * operator.
module tb_sn_l1;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  operand_t a, b;
  word_t ps [L1_W];
  int checks = 0, failures = 0;

  sn_l1 dut (.a, .b, .ps);

  task automatic check(input operand_t va, vb);
    word_t total;
    a = va; b = vb;
    #1;
    total = '0;
    for (int k = 0; k < int'(L1_W); k++) total += ps[k];
    checks++;
    if (total !== word_t'(va) * word_t'(vb)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: sum of partial sums %h", va, vb, total);
    end
  endtask

  initial begin
    #100ns;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    check(16'hffff, 16'hffff);
    check(16'h0002, 16'hffff);
    check(16'h0000, 16'hffff);
    check(16'hffe0, 16'hfff0);
    for (int n = 0; n < 2000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
