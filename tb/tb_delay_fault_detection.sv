// tb_delay_fault_detection: the delay-fault experiment on the multiplier,
// run at a 100 MHz tester clock through the clock timing circuit model.
//
// The pipeline is assembled here from the multiplier's RTL stage modules
// (sn_l1, sn_l2, sn_l3, cla_l1, cla_l2) with registers R0..R5 on the clocks
// CK0..CK5 of clock_timing_circuit, and each stage's output is delayed by a
// testbench delay: the stage's path delay for the vectors applied (which
// includes clock-to-Q, setup and clock skew). For each of the eight
// published target paths (stage, path delay, Td one step above it) the
// initialisation vector and then the activation vector are applied; the
// product of the activation vector is read at its fixed cycle:
//  * fault-free path delay: the product must be right;
//  * path delay + 50 ps: the product must be wrong (fault detected);
//  * path delay + 50 ps with Td one step (50 ps) larger again than the fault
//    needs, i.e. Td >= faulty delay: the product must be right again.
// Two slack cases follow: a 20 ps fault on path 2 (15 ps slack) must be
// found, a 40 ps fault on path 3 (45 ps slack) must not.
// Then performance binning: with every stage at its worst-case delay, Td is
// swept up per stage until a changing vector pair passes; the first passing
// Td must be the step above the stage delay, and the largest (750 ps) is
// the normal-mode period. Normal mode (all registers on IPCLK) must then
// work at that period and fail 50 ps faster.
// The stage delays are transport delays (each change is scheduled on its
// own), so a clock period shorter than a delay is modelled correctly.
// The whole stage output is delayed as one, so a late stage hands on the
// previous (initialisation) value and the faulty product is the product of
// the initialisation vector; the published faulty products differ from the
// fault-free ones in single bits because there only the target path is late.
// Both are printed; only "differs from fault-free" is checked.
// The stages not under test get their Table I worst-case delays, which are
// far below the 10 ns slow period and so must never disturb the result.
module tb_delay_fault_detection;
  import ctc_pkg::*;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ipclk = 1'b0;
  mode_e mode = MODE_DUT_TEST;
  logic [2:0] stage = '0;
  logic [3:0] td_code = '0;
  logic [NUM_CK-1:0] ck;
  real vn;
  logic pll_locked, dll_locked;
  int checks = 0, failures = 0;

  clock_timing_circuit u_ctc (.ipclk, .mode, .stage, .td_code, .step(STEP_DL0), .ck,
                              .vn_mon(vn), .pll_locked, .dll_locked);

  int half_ps = 5000;   // 100 MHz tester clock
  always begin
    #(half_ps * 1ps);
    ipclk = ~ipclk;
  end

  // ---- pipeline with delayed stage outputs
  real stage_delay_ps [NUM_STAGES] = '{715.0, 655.0, 655.0, 665.0, 615.0};
  operand_t a = '0, b = '0, a_r0, b_r0;
  word_t sn1 [L1_W], sn1_d [L1_W], r1 [L1_W];
  word_t sn2 [L2_W], sn2_d [L2_W], r2 [L2_W];
  word_t sn3_s, sn3_c, sn3_s_d, sn3_c_d, r3_s, r3_c;
  cla_mid_t cla1, cla1_d, r4;
  word_t cla2, cla2_d, product;

  always_ff @(posedge ck[0]) begin a_r0 <= a; b_r0 <= b; end
  sn_l1 u_s1 (.a(a_r0), .b(b_r0), .ps(sn1));
  always @(sn1) fork
    automatic word_t v [L1_W] = sn1;
    automatic logic [22:0] d = ps_to_fs(stage_delay_ps[0]);
    begin wait_fs(d); sn1_d = v; end
  join_none
  always_ff @(posedge ck[1]) r1 <= sn1_d;
  sn_l2 u_s2 (.ps_in(r1), .ps_out(sn2));
  always @(sn2) fork
    automatic word_t v [L2_W] = sn2;
    automatic logic [22:0] d = ps_to_fs(stage_delay_ps[1]);
    begin wait_fs(d); sn2_d = v; end
  join_none
  always_ff @(posedge ck[2]) r2 <= sn2_d;
  sn_l3 u_s3 (.ps_in(r2), .s(sn3_s), .c(sn3_c));
  always @(sn3_s or sn3_c) fork
    automatic word_t vs = sn3_s, vc = sn3_c;
    automatic logic [22:0] d = ps_to_fs(stage_delay_ps[2]);
    begin wait_fs(d); sn3_s_d = vs; sn3_c_d = vc; end
  join_none
  always_ff @(posedge ck[3]) begin r3_s <= sn3_s_d; r3_c <= sn3_c_d; end
  cla_l1 u_c1 (.s(r3_s), .c(r3_c), .mid(cla1));
  always @(cla1) fork
    automatic cla_mid_t v = cla1;
    automatic logic [22:0] d = ps_to_fs(stage_delay_ps[3]);
    begin wait_fs(d); cla1_d = v; end
  join_none
  always_ff @(posedge ck[4]) r4 <= cla1_d;
  cla_l2 u_c2 (.mid(r4), .product(cla2));
  always @(cla2) fork
    automatic word_t v = cla2;
    automatic logic [22:0] d = ps_to_fs(stage_delay_ps[4]);
    begin wait_fs(d); cla2_d = v; end
  join_none
  always_ff @(posedge ck[5]) product <= cla2_d;

  // Apply init for 7 cycles, then the activation vector; return the product
  // read at the activation vector's cycle (four edges after R0 takes it).
  task automatic two_vector(input operand_t ia, ib, aa, ab, output word_t got);
    repeat (7) begin @(negedge ipclk); a = ia; b = ib; end
    @(negedge ipclk); a = aa; b = ab;          // R0 takes it at the next edge
    repeat (5) @(negedge ipclk);               // edges +0 .. +4 passed
    got = product;
    repeat (2) @(negedge ipclk);
  endtask

  // Normal mode: all registers on IPCLK with the given period; a new random
  // operand pair every cycle, each product checked five cycles later.
  // Returns the number of wrong products.
  task automatic run_normal(input int period_ps, output int errs);
    word_t exp [$];
    errs = 0;
    half_ps = period_ps / 2;
    repeat (4) @(negedge ipclk);
    for (int n = 0; n < 40; n++) begin
      @(negedge ipclk);
      if (n >= 6) begin
        if (product !== exp.pop_front()) errs++;
      end
      a = 16'($urandom); b = 16'($urandom);
      exp.push_back(word_t'(a) * word_t'(b));
    end
    half_ps = 5000;
  endtask

  initial begin
    #2ms;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // init / activation vector pairs of the eight target paths
    operand_t pa [16] = '{16'h0002, 16'h0000, 16'h000c, 16'h0008, 16'h0001, 16'h0000, 16'h0070, 16'h0040,
                          16'h0000, 16'hffff, 16'hffff, 16'h0000, 16'h0000, 16'hffe0, 16'hffe0, 16'h0000};
    operand_t pb [16] = '{16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff,
                          16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hfff0, 16'hfff0, 16'hffff};
    word_t ok_prod [8] = '{32'h0000_0000, 32'h0007_fff8, 32'h0000_0000, 32'h003f_ffc0,
                           32'hfffe_0001, 32'h0000_0000, 32'hffd0_0200, 32'h0000_0000};
    word_t tbl_faulty [8] = '{32'h0000_0008, 32'h0007_fff0, 32'h0000_0040, 32'h003f_ff80,
                              32'hfffd_0001, 32'h0001_0000, 32'hffc0_0200, 32'h0010_0000};
    int path_stage [8] = '{0, 0, 1, 1, 3, 3, 4, 4};
    real path_ps   [8] = '{715.0, 685.0, 655.0, 620.0, 665.0, 425.0, 615.0, 415.0};
    int path_td    [8] = '{750, 700, 700, 650, 700, 450, 650, 450};
    real worst [NUM_STAGES];
    word_t got;
    int detected = 0;
    int bin_ps, errs;
    foreach (worst[s]) worst[s] = stage_delay_ps[s];

    #3us;   // PLL lock and DLL calibration on DL0
    checks++;
    if (!dll_locked) begin failures++; $display("FAIL DLL not locked"); end
    for (int p = 0; p < 8; p++) begin
      int s;
      s = path_stage[p];
      stage = 3'(s);
      // fault-free
      td_code = 4'((path_td[p] - 250) / 50);
      stage_delay_ps[s] = path_ps[p];
      two_vector(pa[2*p], pb[2*p], pa[2*p+1], pb[2*p+1], got);
      checks++;
      if (got !== ok_prod[p]) begin
        failures++; $display("FAIL path %0d fault-free: %h, expected %h", p + 1, got, ok_prod[p]);
      end
      // 50 ps delay fault at the same Td
      stage_delay_ps[s] = path_ps[p] + 50.0;
      two_vector(pa[2*p], pb[2*p], pa[2*p+1], pb[2*p+1], got);
      checks++;
      if (got === ok_prod[p]) begin
        failures++; $display("FAIL path %0d: 50 ps fault not detected at Td %0d", p + 1, path_td[p]);
      end else detected++;
      $display("path %0d stage %0d delay %0.0f ps Td %0d ps: fault-free %h, +50 ps %h (published faulty %h)",
               p + 1, s, path_ps[p], path_td[p], ok_prod[p], got, tbl_faulty[p]);
      // the same faulty path passes once Td covers it (binning)
      td_code = 4'((path_td[p] - 250) / 50 + 1);
      two_vector(pa[2*p], pb[2*p], pa[2*p+1], pb[2*p+1], got);
      checks++;
      if (got !== ok_prod[p]) begin
        failures++; $display("FAIL path %0d: Td %0d should cover %0.0f ps", p + 1, path_td[p] + 50, path_ps[p] + 50.0);
      end
      stage_delay_ps[s] = worst[s];
    end
    // Slack: the smallest fault found is Td minus the path delay. Path 2
    // (685 ps at Td 700) shows a 20 ps fault; path 3 (655 ps at Td 700) hides
    // a 40 ps one.
    stage = 3'd0; td_code = 4'((700 - 250) / 50);
    stage_delay_ps[0] = 685.0 + 20.0;
    two_vector(pa[2], pb[2], pa[3], pb[3], got);
    checks++;
    if (got === ok_prod[1]) begin failures++; $display("FAIL path 2: 20 ps fault not detected"); end
    stage_delay_ps[0] = worst[0];
    stage = 3'd1;
    stage_delay_ps[1] = 655.0 + 40.0;
    two_vector(pa[4], pb[4], pa[5], pb[5], got);
    checks++;
    if (got !== ok_prod[2]) begin failures++; $display("FAIL path 3: 40 ps fault inside the slack was flagged"); end
    stage_delay_ps[1] = worst[1];
    $display("slack: path 2 +20 ps detected, path 3 +40 ps within slack");

    // Performance binning with the slow clock: with every stage at its
    // worst-case delay, sweep Td up for each stage until a changing vector
    // pair passes. The smallest passing Td is the next step above the stage
    // delay; the largest of them is the normal-mode period the part is
    // binned at.
    bin_ps = 0;
    for (int st = 0; st < NUM_STAGES; st++) begin
      int pass_td;
      int exp_td;
      pass_td = -1;
      stage = 3'(st);
      for (int m = 0; m < NUM_TAPS && pass_td < 0; m++) begin
        td_code = 4'(m);
        two_vector(16'h0002, 16'hffff, 16'hffff, 16'hffff, got);
        if (got === 32'hfffe_0001) pass_td = 250 + 50 * m;
      end
      exp_td = 250 + 50 * (int'(worst[st] - 250.0) / 50 + 1);
      checks++;
      if (pass_td != exp_td) begin
        failures++; $display("FAIL stage %0d (%0.0f ps): passes from Td %0d, expected %0d", st, worst[st], pass_td, exp_td);
      end
      $display("binning: stage %0d delay %0.0f ps passes from Td = %0d ps", st, worst[st], pass_td);
      if (pass_td > bin_ps) bin_ps = pass_td;
    end
    checks++;
    if (bin_ps != 750) begin failures++; $display("FAIL bin %0d ps, expected 750", bin_ps); end

    // Normal mode at the binned period must work, one step faster must not.
    mode = MODE_NORMAL;
    run_normal(bin_ps, errs);
    checks++;
    if (errs != 0) begin failures++; $display("FAIL normal mode at %0d ps: %0d wrong products", bin_ps, errs); end
    $display("normal mode at %0d ps: %0d wrong products", bin_ps, errs);
    run_normal(bin_ps - 50, errs);
    checks++;
    if (errs == 0) begin failures++; $display("FAIL normal mode at %0d ps should fail", bin_ps - 50); end
    $display("normal mode at %0d ps: %0d wrong products", bin_ps - 50, errs);
    checks++;
    if (detected != 8) begin failures++; $display("FAIL %0d of 8 faults detected", detected); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
