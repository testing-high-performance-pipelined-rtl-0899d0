// tb_clock_mux: self-checking test of the N:1 clock multiplexer, built with
// 5 inputs (as M4) and 16 inputs (as M2). Every select value is tried with
// random inputs; out must equal in[sel], and 0 for select values past N.
module tb_clock_mux;
  timeunit 1ps; timeprecision 1fs;
  logic [4:0]  in5;  logic [2:0] sel5; logic out5;
  logic [15:0] in16; logic [3:0] sel16; logic out16;
  int checks = 0, failures = 0;

  clock_mux #(.N(5))  dut5  (.in(in5),  .sel(sel5),  .out(out5));
  clock_mux #(.N(16)) dut16 (.in(in16), .sel(sel16), .out(out16));

  initial begin
    #1us;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      for (int s = 0; s < 8; s++) begin
        in5 = 5'($urandom); sel5 = 3'(s); #1;
        checks++;
        if (out5 !== ((s < 5) ? in5[s] : 1'b0)) begin failures++; $display("FAIL N=5 sel=%0d", s); end
      end
      for (int s = 0; s < 16; s++) begin
        in16 = 16'($urandom); sel16 = 4'(s); #1;
        checks++;
        if (out16 !== in16[s]) begin failures++; $display("FAIL N=16 sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
