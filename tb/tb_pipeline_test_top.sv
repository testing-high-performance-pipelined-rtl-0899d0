// tb_pipeline_test_top: end-to-end test of the multiplier with its clock
// timing circuit, all parameters at their defaults. It plays the tester:
//
//  1. Normal mode, IPCLK at about 1.4 GHz (700 ps): random operands every
//     cycle; each product must equal a * b five cycles later.
//  2. DUT test mode, IPCLK at 100 MHz: after the PLL and DLL lock, every
//     stage 0..4 is targeted in turn with the init/activation vector pairs
//     of the published delay-fault test (Td one step above the path delay)
//     plus random operands. Each product must be right and arrive four slow
//     cycles after its operands, and the measured CK(s) -> CK(s+1) delay must
//     be the programmed Td.
//  3. Clock timing circuit test (the three-phase procedure): with HFCLK
//     through the delay lines the DLL is closed on C-H, B-G and A-E (phase 1,
//     Vn0..Vn2 must agree), A-F and B-E (phase 2, Vn3 = Vn4) and CK(i)-CK(i+1)
//     with Td = 1 ns (phase 3, Vn(5+i) = Vn0). The procedure is run on the
//     fault-free circuit (verdict: fault-free) and once for each of five
//     inserted delay faults: 60 ps in DL0, 100 ps in DL1, 200 ps in DL2
//     (phase 1 must flag them, with the faulty line's Vn higher), 60 ps on
//     the J-A path and 100 ps on the J-B path of the phase splitter (phase 2
//     must flag them, Vn3 - Vn4 negative and positive respectively).
//     Then the ten multiplexer and buffer path faults are inserted one at a
//     time by forcing the driven node (X, Y, DCLK, CK bus) to a copy with the
//     faulty path delayed: 60/100/200 ps on M3 paths A/B/C-X and on M4 paths
//     E/G/H-Y (phase 1), 200 ps on F-Y (phase 2), 60 ps on M2 tap 15-DCLK,
//     100 ps on M5 DCLK-CK4 and 200 ps on the U-CLK buffer (phase 3). Each
//     must be found in its phase, with Vn moving the expected way.
// Each mechanism (normal operation, each stage under test, PLL lock, DLL
// calibration, each test phase, each fault detection) is counted; one that
// never happened counts as a failure.
module tb_pipeline_test_top;
  import ctc_pkg::*;
  import mult_pkg::operand_t;
  import mult_pkg::word_t;
  timeunit 1ps; timeprecision 1fs;

  localparam real TOL_MV = 5.0;   // Vn values closer than this are "equal"

  logic ipclk = 1'b0;
  mode_e mode = MODE_NORMAL;
  logic [2:0] stage = '0;
  logic [3:0] td_code = '0;
  ctc_step_e step = STEP_DL0;
  operand_t a = '0, b = '0;
  word_t product;
  logic [NUM_CK-1:0] ck;
  real vn;
  logic pll_locked, dll_locked;
  int half_ps = 350;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_normal = 0, n_pll_lock = 0, n_dll_cal = 0;
  int n_stage [NUM_STAGES];
  int n_phase [3];
  int n_fault_found = 0;

  pipeline_test_top dut (
    .ipclk, .mode, .stage, .td_code, .step, .a, .b, .product, .ck,
    .vn_mon(vn), .pll_locked, .dll_locked
  );

  always begin
    #(half_ps * 1ps);
    ipclk = ~ipclk;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ---------------------------------------------------------------- pipeline
  // Stream vectors one per IPCLK cycle, each set up at a falling edge and
  // taken by R0 at the next rising edge; vector n's product must be in R5
  // after lat more rising edges (sampled at the falling edge after that).
  task automatic stream(input operand_t va [], input operand_t vb [], input int lat);
    int n_vec = va.size();
    for (int n = 0; n <= n_vec + lat; n++) begin
      @(negedge ipclk);
      a = (n < n_vec) ? va[n] : '0;
      b = (n < n_vec) ? vb[n] : '0;
      if (n > lat) begin
        checks++;
        if (product !== word_t'(va[n-lat-1]) * word_t'(vb[n-lat-1]))
          fail($sformatf("mode %s stage %0d: %h * %h gave %h", mode.name(), stage,
                         va[n-lat-1], vb[n-lat-1], product));
      end
    end
  endtask

  // ------------------------------------------------------------- DLL / Vn
  task automatic lock_and_read(input string what, output real v);
    #300ns;
    fork
      wait (dll_locked);
      #5us;
    join_any
    disable fork;
    #50ns;
    checks++;
    if (!dll_locked) fail($sformatf("DLL did not lock: %s", what));
    v = vn;
  endtask

  function automatic bit same(input real x, input real y);
    return (x - y < TOL_MV) && (y - x < TOL_MV);
  endfunction

  // The three-phase self-test. Returns 0 for fault-free, else the phase that
  // found a fault; vns holds Vn0..Vn9.
  task automatic ctc_self_test(output int verdict, output real vns [10]);
    mode = MODE_CTC_TEST;
    verdict = 0;
    foreach (vns[k]) vns[k] = 0.0;
    // phase 1
    step = STEP_DL0; lock_and_read("C-H", vns[0]);
    step = STEP_DL1; lock_and_read("B-G", vns[1]);
    step = STEP_DL2; lock_and_read("A-E", vns[2]);
    n_phase[0]++;
    if (!(same(vns[0], vns[1]) && same(vns[1], vns[2]) && same(vns[0], vns[2]))) begin
      verdict = 1; return;
    end
    // phase 2
    step = STEP_PSD_A; lock_and_read("A-F", vns[3]);
    step = STEP_PSD_B; lock_and_read("B-E", vns[4]);
    n_phase[1]++;
    if (!same(vns[3], vns[4])) begin verdict = 2; return; end
    // phase 3
    step = STEP_M5;
    for (int i = 0; i < 5; i++) begin
      stage = 3'(i);
      lock_and_read($sformatf("CK%0d-CK%0d", i, i + 1), vns[5+i]);
      if (!same(vns[5+i], vns[0])) begin verdict = 3; return; end
    end
    n_phase[2]++;
  endtask

  // ---- multiplexer and buffer path faults. The multiplexers have no delay
  // of their own in this model, so these faults are made here: the node a
  // multiplexer drives (X, Y, DCLK or the CK bus) is forced to the value the
  // multiplexer would give, except that the faulty path's source is replaced
  // by a copy delayed by mflt_ps. With mflt = 0 the forced values equal the
  // unforced ones. mflt is the fault number of the published fault list.
  int  mflt = 0;
  real mflt_ps = 0.0;
  logic src, src_late;
  logic f_x, f_y, f_dclk;
  logic [NUM_CK-1:0] f_ck;

  always_comb
    case (mflt)
      4:  src = dut.u_ctc.a;                 // M3, A-X
      5:  src = dut.u_ctc.b;                 // M3, B-X
      6:  src = dut.u_ctc.hfclk;             // M3, C-X
      7:  src = dut.u_ctc.dl2[DL2_LEN];      // M4, E-Y
      8:  src = dut.u_ctc.dl1[DL1_LEN-1];    // M4, G-Y
      9:  src = dut.u_ctc.dl0[DL0_LEN];      // M4, H-Y
      12: src = dut.u_ctc.dl1[DL1_LEN];      // M4, F-Y
      13: src = dut.u_ctc.m2_in[NUM_TAPS-1]; // M2, tap 15 - DCLK
      14: src = dut.u_ctc.dclk;              // M5, DCLK - CK4
      15: src = dut.u_ctc.u;                 // buffer U - CLK
      default: src = 1'b0;
    endcase

  always @(src) begin
    automatic logic v = src;
    wait_fs(ps_to_fs(mflt_ps));
    src_late = v;
  end

  always_comb begin
    logic [3:0] m3_in;
    logic [4:0] m4_in;
    logic clk_eff, dclk_eff;
    m3_in = {dut.u_ctc.d_node, dut.u_ctc.hfclk, dut.u_ctc.b, dut.u_ctc.a};
    if (mflt >= 4 && mflt <= 6) m3_in[mflt-4] = src_late;
    f_x = (dut.u_ctc.sel.m3 < 3'd4) ? m3_in[dut.u_ctc.sel.m3] : 1'b0;
    m4_in = {dut.u_ctc.i_node, dut.u_ctc.dl0[DL0_LEN], dut.u_ctc.dl1[DL1_LEN-1],
             dut.u_ctc.dl1[DL1_LEN], dut.u_ctc.dl2[DL2_LEN]};
    case (mflt)
      7: m4_in[0] = src_late;  12: m4_in[1] = src_late;
      8: m4_in[2] = src_late;  9:  m4_in[3] = src_late;
      default: ;
    endcase
    f_y = (dut.u_ctc.sel.m4 < 3'd5) ? m4_in[dut.u_ctc.sel.m4] : 1'b0;
    f_dclk = (mflt == 13 && dut.u_ctc.sel.m2 == 4'(NUM_TAPS - 1)) ? src_late
                                                                  : dut.u_ctc.m2_in[dut.u_ctc.sel.m2];
    dclk_eff = dut.u_ctc.dclk;
    clk_eff  = (mflt == 15) ? src_late : dut.u_ctc.u;
    for (int i = 0; i < NUM_CK; i++)
      f_ck[i] = dut.u_ctc.sel.m5_dclk[i] ? ((mflt == 14 && i == 4) ? src_late : dclk_eff) : clk_eff;
  end

  // Run the self-test with one multiplexer or buffer fault; it must be found
  // in phase exp_phase, with Vn[idx] above (dir > 0) or below Vn[ref_idx].
  task automatic mux_fault_test(input int f, input real ps, input int exp_phase,
                                input int idx, input int ref_idx, input int dir);
    int verdict;
    real vns [10];
    bit ok;
    mflt = f; mflt_ps = ps;
    ctc_self_test(verdict, vns);
    mflt = 0; mflt_ps = 0.0;
    // phase 3 stops at the first CK pair that differs: the last Vn it read
    if (exp_phase == 3) for (int k = 5; k < 10; k++) if (vns[k] != 0.0) idx = k;
    $display("fault F%0d (%0.0f ps): verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f, Vn[%0d] = %.1f mV",
             f, ps, verdict, vns[0], vns[1], vns[2], vns[3], vns[4], idx, vns[idx]);
    ok = (verdict == exp_phase) &&
         (dir > 0 ? vns[idx] > vns[ref_idx] + TOL_MV : vns[idx] < vns[ref_idx] - TOL_MV);
    checks++;
    if (ok) n_fault_found++;
    else fail($sformatf("F%0d: verdict %0d Vn %p", f, verdict, vns));
  endtask

  initial begin
    #20ms;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    operand_t ra [], rb [];
    realtime t0, t1;
    real vns [10];
    int verdict;
    // init / activation pairs, the pipeline stage they target and Td (ps)
    operand_t pa [16] = '{16'h0002, 16'h0000, 16'h000c, 16'h0008, 16'h0001, 16'h0000, 16'h0070, 16'h0040,
                          16'h0000, 16'hffff, 16'hffff, 16'h0000, 16'h0000, 16'hffe0, 16'hffe0, 16'h0000};
    operand_t pb [16] = '{16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff,
                          16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hfff0, 16'hfff0, 16'hffff};
    int path_stage [8] = '{0, 0, 1, 1, 3, 3, 4, 4};
    int path_td    [8] = '{750, 700, 700, 650, 700, 450, 650, 450};
    foreach (n_stage[s]) n_stage[s] = 0;
    foreach (n_phase[p]) n_phase[p] = 0;

    // ---- 1. normal mode
    ra = new[40]; rb = new[40];
    foreach (ra[n]) begin ra[n] = 16'($urandom); rb[n] = 16'($urandom); end
    ra[0] = 16'hffff; rb[0] = 16'hffff;
    repeat (3) @(posedge ipclk);
    stream(ra, rb, 5);
    n_normal++;

    // ---- 2. DUT test mode at 100 MHz
    half_ps = 5000;
    mode = MODE_DUT_TEST;
    #3us;
    checks++;
    if (pll_locked) n_pll_lock++; else fail("PLL not locked");
    lock_and_read("calibration", vns[0]);
    checks++;
    if (vns[0] > VN_NOM_MV - 1.0 && vns[0] < VN_NOM_MV + 1.0) n_dll_cal++;
    else fail($sformatf("calibrated Vn %f", vns[0]));
    for (int p = 0; p < 8; p++) begin
      operand_t va [], vb [];
      stage = 3'(path_stage[p]);
      td_code = 4'((path_td[p] - 250) / 50);
      @(posedge ck[stage]); t0 = $realtime;
      @(posedge ck[stage + 1]); t1 = $realtime;
      checks++;
      if (t1 - t0 < path_td[p] - 0.1 || t1 - t0 > path_td[p] + 0.1)
        fail($sformatf("path %0d: Td measured %f ps", p + 1, t1 - t0));
      va = new[2]; vb = new[2];
      va[0] = pa[2*p]; va[1] = pa[2*p+1]; vb[0] = pb[2*p]; vb[1] = pb[2*p+1];
      stream(va, vb, 4);
      n_stage[stage]++;
    end
    // every stage, including SN_L3 (no published vectors), with random operands
    for (int s = 0; s < int'(NUM_STAGES); s++) begin
      stage = 3'(s); td_code = 4'($urandom);
      ra = new[12]; rb = new[12];
      foreach (ra[n]) begin ra[n] = 16'($urandom); rb[n] = 16'($urandom); end
      stream(ra, rb, 4);
      n_stage[s]++;
    end

    // ---- 3. clock timing circuit test, fault-free and with inserted faults
    ctc_self_test(verdict, vns);
    $display("self-test: verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f mV",
             verdict, vns[0], vns[1], vns[2], vns[3], vns[4]);
    checks++;
    if (verdict != 0) fail($sformatf("fault-free circuit flagged in phase %0d (Vn %p)", verdict, vns));

    // F1: 60 ps in DL0
    dut.u_ctc.u_dl0.g_el[5].u_el.u_h0.extra_ps = 60.0;
    ctc_self_test(verdict, vns);
    $display("self-test: verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f mV",
             verdict, vns[0], vns[1], vns[2], vns[3], vns[4]);
    dut.u_ctc.u_dl0.g_el[5].u_el.u_h0.extra_ps = 0.0;
    checks++;
    if (verdict == 1 && vns[0] > vns[1] + TOL_MV) n_fault_found++;
    else fail($sformatf("DL0 fault: verdict %0d Vn %p", verdict, vns));
    // F2: 100 ps in DL1
    dut.u_ctc.u_dl1.g_el[3].u_el.u_h1.extra_ps = 100.0;
    ctc_self_test(verdict, vns);
    $display("self-test: verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f mV",
             verdict, vns[0], vns[1], vns[2], vns[3], vns[4]);
    dut.u_ctc.u_dl1.g_el[3].u_el.u_h1.extra_ps = 0.0;
    checks++;
    if (verdict == 1 && vns[1] > vns[0] + TOL_MV) n_fault_found++;
    else fail($sformatf("DL1 fault: verdict %0d Vn %p", verdict, vns));
    // F3: 200 ps in DL2
    dut.u_ctc.u_dl2.g_el[8].u_el.u_h0.extra_ps = 200.0;
    ctc_self_test(verdict, vns);
    $display("self-test: verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f mV",
             verdict, vns[0], vns[1], vns[2], vns[3], vns[4]);
    dut.u_ctc.u_dl2.g_el[8].u_el.u_h0.extra_ps = 0.0;
    checks++;
    if (verdict == 1 && vns[2] > vns[0] + TOL_MV) n_fault_found++;
    else fail($sformatf("DL2 fault: verdict %0d Vn %p", verdict, vns));
    // F10: 60 ps on J-A
    dut.u_ctc.u_psd.u_del.u_h0.extra_ps = 60.0;
    ctc_self_test(verdict, vns);
    $display("self-test: verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f mV",
             verdict, vns[0], vns[1], vns[2], vns[3], vns[4]);
    dut.u_ctc.u_psd.u_del.u_h0.extra_ps = 0.0;
    checks++;
    if (verdict == 2 && vns[3] < vns[4] - TOL_MV) n_fault_found++;
    else fail($sformatf("J-A fault: verdict %0d Vn %p", verdict, vns));
    // F11: 100 ps on J-B
    dut.u_ctc.u_psd.u_half.extra_ps = 100.0;
    ctc_self_test(verdict, vns);
    $display("self-test: verdict %0d, Vn0..Vn4 = %.1f %.1f %.1f %.1f %.1f mV",
             verdict, vns[0], vns[1], vns[2], vns[3], vns[4]);
    dut.u_ctc.u_psd.u_half.extra_ps = 0.0;
    checks++;
    if (verdict == 2 && vns[3] > vns[4] + TOL_MV) n_fault_found++;
    else fail($sformatf("J-B fault: verdict %0d Vn %p", verdict, vns));

    // F4..F9, F12..F15: multiplexer and buffer path faults
    force dut.u_ctc.x = f_x;
    force dut.u_ctc.y = f_y;
    force dut.u_ctc.dclk = f_dclk;
    force dut.u_ctc.ck = f_ck;
    ctc_self_test(verdict, vns);
    checks++;
    if (verdict != 0) fail($sformatf("forced nodes without a fault flagged in phase %0d", verdict));
    mux_fault_test(4,  60.0,  1, 2, 0, -1);
    mux_fault_test(5,  100.0, 1, 1, 0, -1);
    mux_fault_test(6,  200.0, 1, 0, 1, -1);
    mux_fault_test(7,  60.0,  1, 2, 0, +1);
    mux_fault_test(8,  100.0, 1, 1, 0, +1);
    mux_fault_test(9,  200.0, 1, 0, 1, +1);
    mux_fault_test(12, 200.0, 2, 3, 4, +1);
    mux_fault_test(13, 60.0,  3, 5, 0, +1);
    mux_fault_test(14, 100.0, 3, 5, 0, +1);
    mux_fault_test(15, 200.0, 3, 5, 0, -1);
    release dut.u_ctc.x;
    release dut.u_ctc.y;
    release dut.u_ctc.dclk;
    release dut.u_ctc.ck;

    // ---- back to normal mode
    mode = MODE_NORMAL; half_ps = 350;
    ra = new[10]; rb = new[10];
    foreach (ra[n]) begin ra[n] = 16'($urandom); rb[n] = 16'($urandom); end
    repeat (3) @(posedge ipclk);
    stream(ra, rb, 5);
    n_normal++;

    // ---- every mechanism must have happened
    checks++; if (n_normal < 2)      fail("normal operation not exercised");
    checks++; if (n_pll_lock < 1)    fail("PLL lock not exercised");
    checks++; if (n_dll_cal < 1)     fail("DLL calibration not exercised");
    foreach (n_stage[s]) begin checks++; if (n_stage[s] < 1) fail($sformatf("stage %0d never tested", s)); end
    foreach (n_phase[p]) begin checks++; if (n_phase[p] < 1) fail($sformatf("phase %0d never completed", p + 1)); end
    checks++; if (n_fault_found != 15) fail($sformatf("%0d of 15 faults found", n_fault_found));
    $display("mechanisms: normal=%0d pll_lock=%0d dll_cal=%0d stages=%p phases=%p faults_found=%0d",
             n_normal, n_pll_lock, n_dll_cal, n_stage, n_phase, n_fault_found);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
