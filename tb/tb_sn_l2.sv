// tb_sn_l2: self-checking test of summation level 2. The output words must
// add up (mod 2**32) to the sum of the input words; inputs are random, all
// ones and single bits.
module tb_sn_l2;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  word_t pin [L1_W];
  word_t pout [L2_W];
  int checks = 0, failures = 0;

  sn_l2 dut (.ps_in(pin), .ps_out(pout));

  task automatic check();
    word_t total, expect_sum;
    #1;
    expect_sum = '0;
    for (int k = 0; k < int'(L1_W); k++) expect_sum += pin[k];
    total = '0;
    for (int k = 0; k < int'(L2_W); k++) total += pout[k];
    checks++;
    if (total !== expect_sum) begin
      failures++;
      if (failures < 10) $display("FAIL: outputs add to %h, inputs to %h", total, expect_sum);
    end
  endtask

  initial begin
    #100ns;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(L1_W); k++) pin[k] = '1;
    check();
    for (int k = 0; k < int'(L1_W); k++) pin[k] = word_t'(1) << (k * 3);
    check();
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < int'(L1_W); k++) pin[k] = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
