// tb_cla_l2: self-checking test of the second carry-lookahead level. The
// testbench forms the per-block conditional sums, generate and propagate of
// two random words s and c itself (with the + operator), feeds them in and
// expects the product output to equal s + c. Operand pairs with long carry
// chains (all-propagate blocks) are included.
module tb_cla_l2;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  cla_mid_t mid;
  word_t product;
  int checks = 0, failures = 0;

  cla_l2 dut (.mid, .product);

  // Reference for the inputs, built with the + operator block by block.
  function automatic cla_mid_t make_mid(input word_t vs, vc);
    cla_mid_t m;
    logic [BLK_W:0] r0;
    for (int k = 0; k < int'(NUM_BLK); k++) begin
      r0 = {1'b0, vs[k*BLK_W +: BLK_W]} + {1'b0, vc[k*BLK_W +: BLK_W]};
      m.sum0[k*BLK_W +: BLK_W] = r0[BLK_W-1:0];
      m.sum1[k*BLK_W +: BLK_W] = r0[BLK_W-1:0] + 1'b1;
      m.gen[k]  = r0[BLK_W];
      m.prop[k] = (vs[k*BLK_W +: BLK_W] ^ vc[k*BLK_W +: BLK_W]) == '1;
    end
    return m;
  endfunction

  word_t vs, vc;
  always_comb mid = make_mid(vs, vc);

  task automatic check(input word_t s_in, c_in);
    vs = s_in; vc = c_in;
    #1;
    checks++;
    if (product !== word_t'(s_in + c_in)) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h: got %h", s_in, c_in, product);
    end
  endtask

  initial begin
    #100ns;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    check(32'hffff_ffff, 32'h0000_0001);
    check(32'h7fff_ffff, 32'h0000_0001);
    check(32'hf0f0_f0f0, 32'h0f0f_0f10);
    for (int n = 0; n < 2000; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
