// tb_pipelined_multiplier: self-checking test of the five-stage multiplier.
//
// Part 1 clocks all six registers with one 500 MHz clock and streams the
// published test vectors and random operands, one pair per cycle; every
// product must equal a * b (computed with *) exactly five clock edges after
// the operands were taken.
// Part 2 repeats this for each stage s = 0..4 with the clock of register
// s+1 delayed by 300 ps against the others, as in the DUT test mode: data
// then crosses stage s on the same edge, so the latency must be four edges.
module tb_pipelined_multiplier;
  import mult_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int N_VEC = 64;
  logic clk = 1'b0, clk_d = 1'b0;
  int   skew_reg = -1;            // register on the delayed clock, -1: none
  logic [NUM_REGS-1:0] ck;
  operand_t a, b;
  word_t product;
  int checks = 0, failures = 0;
  int lat_checks = 0;

  operand_t va [N_VEC], vb [N_VEC];

  pipelined_multiplier dut (.ck, .a, .b, .product);

  always #1000 clk = ~clk;
  always @(clk) clk_d <= #300 clk;
  always_comb
    for (int i = 0; i < int'(NUM_REGS); i++) ck[i] = (i == skew_reg) ? clk_d : clk;

  // Vectors from the published delay-fault test (init/activation pairs), then random.
  initial begin
    automatic operand_t ta [16] = '{16'h0002, 16'h0000, 16'h000c, 16'h0008, 16'h0001, 16'h0000,
                                    16'h0070, 16'h0040, 16'h0000, 16'hffff, 16'hffff, 16'h0000,
                                    16'h0000, 16'hffe0, 16'hffe0, 16'h0000};
    automatic operand_t tb16 [16] = '{16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff,
                                      16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff, 16'hffff,
                                      16'hffff, 16'hfff0, 16'hfff0, 16'hffff};
    for (int n = 0; n < N_VEC; n++) begin
      va[n] = (n < 16) ? ta[n]   : 16'($urandom);
      vb[n] = (n < 16) ? tb16[n] : 16'($urandom);
    end
  end

  // Stream N_VEC vectors; expect vector n's product after the edge n + lat.
  task automatic run(input int lat);
    for (int n = 0; n < N_VEC + lat; n++) begin
      a = (n < N_VEC) ? va[n] : '0;
      b = (n < N_VEC) ? vb[n] : '0;
      @(posedge clk);
      #600;                                   // past the delayed edge too
      if (n >= lat) begin
        checks++;
        if (product !== word_t'(va[n-lat]) * word_t'(vb[n-lat])) begin
          failures++;
          if (failures < 10)
            $display("FAIL skew_reg=%0d: %h * %h gave %h", skew_reg, va[n-lat], vb[n-lat], product);
        end
      end
      @(negedge clk);
    end
    lat_checks++;
  endtask

  initial begin
    #2ms;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    skew_reg = -1;
    run(5);
    for (int s = 0; s < int'(NUM_STAGES); s++) begin
      skew_reg = s + 1;
      run(4);
    end
    checks += lat_checks;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
