// tb_sn_l3: self-checking test of summation level 3. The output words must
// add up (mod 2**32) to the sum of the input words; inputs are random, all
// ones and single bits.
module tb_sn_l3;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  word_t pin [L2_W];
  word_t s, c;
  int checks = 0, failures = 0;

  sn_l3 dut (.ps_in(pin), .s(s), .c(c));

  task automatic check();
    word_t total, expect_sum;
    #1;
    expect_sum = '0;
    for (int k = 0; k < int'(L2_W); k++) expect_sum += pin[k];
    total = '0;
    total = s + c;
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
    for (int k = 0; k < int'(L2_W); k++) pin[k] = '1;
    check();
    for (int k = 0; k < int'(L2_W); k++) pin[k] = word_t'(1) << (k * 3);
    check();
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < int'(L2_W); k++) pin[k] = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
