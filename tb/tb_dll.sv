// tb_dll: self-checking test of the DLL model in a closed loop. The loop
// is a testbench delay (four equal sections) of D(Vn) = 2000 ps - Vn (in mV, as ps) from X to Y,
// independent of the delay element model. With a 1 ns clock the DLL must
// settle at Vn = 1000 mV (D = one period) and report lock; with a 1.25 ns
// clock at Vn = 750 mV. Vp must stay VDD - Vn.
module tb_dll;
  timeunit 1ps; timeprecision 1fs;
  logic x = 1'b0, y, en = 1'b1, locked;
  real vp, vn;
  int half_ps = 500;
  int checks = 0, failures = 0;

  dll dut (.x, .y, .en, .vp, .vn, .locked);

  always begin
    #(half_ps * 1ps);
    x = ~x;
  end
  // The loop delay is cut into four equal sections so that no section has
  // to hold more than one clock edge at a time.
  logic [4:0] sec;
  assign sec[0] = x;
  for (genvar k = 0; k < 4; k++) begin : g_sec
    initial sec[k+1] = 1'b0;
    always @(sec[k]) begin
      automatic logic v = sec[k];
      ctc_pkg::wait_fs(ctc_pkg::ps_to_fs((2000.0 - vn) / 4.0));
      sec[k+1] = v;
    end
  end
  assign y = sec[4];

  task automatic near(input string what, input real got, input real want, input real tol);
    checks++;
    if (got < want - tol || got > want + tol) begin
      failures++; $display("FAIL %s: %f, expected %f", what, got, want);
    end
  endtask

  initial begin
    #50us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #3us;
    near("Vn at 1 GHz", vn, 1000.0, 1.0);
    near("Vp at 1 GHz", vp, 800.0, 1.0);
    checks++; if (!locked) begin failures++; $display("FAIL no lock at 1 GHz"); end
    half_ps = 625;
    #5us;
    near("Vn at 800 MHz", vn, 750.0, 1.0);
    checks++; if (!locked) begin failures++; $display("FAIL no lock at 800 MHz"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
