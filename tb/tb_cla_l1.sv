// tb_cla_l1: self-checking test of the first carry-lookahead level. For
// every 4-bit block the reference sums s_blk + c_blk and s_blk + c_blk + 1
// are formed with the + operator; their low bits must match sum0 / sum1,
// the carry out of the first must match gen, and prop must be set exactly
// when s_blk ^ c_blk is all ones.
module tb_cla_l1;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;
  word_t s, c;
  cla_mid_t mid;
  int checks = 0, failures = 0;

  cla_l1 dut (.s, .c, .mid);

  // Number of blocks whose outputs differ from the + operator reference.
  function automatic int count_bad(input word_t vs, vc, input cla_mid_t m);
    logic [BLK_W:0] r0, r1;
    int bad = 0;
    for (int k = 0; k < int'(NUM_BLK); k++) begin
      r0 = {1'b0, vs[k*BLK_W +: BLK_W]} + {1'b0, vc[k*BLK_W +: BLK_W]};
      r1 = r0 + 1'b1;
      if (m.sum0[k*BLK_W +: BLK_W] !== r0[BLK_W-1:0] || m.sum1[k*BLK_W +: BLK_W] !== r1[BLK_W-1:0] ||
          m.gen[k] !== r0[BLK_W] || m.prop[k] !== ((vs[k*BLK_W +: BLK_W] ^ vc[k*BLK_W +: BLK_W]) == '1))
        bad++;
    end
    return bad;
  endfunction

  task automatic check(input word_t vs, vc);
    int bad;
    s = vs; c = vc;
    #1;
    bad = count_bad(vs, vc, mid);
    checks += int'(NUM_BLK);
    failures += bad;
    if (bad != 0 && failures < 10) $display("FAIL %h + %h: %0d blocks wrong", vs, vc, bad);
  endtask

  initial begin
    #100ns;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    check('1, '0);
    check('1, 32'h1);
    check(32'h5555_5555, 32'haaaa_aaaa);
    for (int n = 0; n < 1000; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
