// tb_compressor_4_2: self-checking test of the word-wide 4-2 compressor.
// Random and corner-case addends; the reference is plain modulo-2**32
// addition of the four inputs. Also checks that bit 0 of `carry` is 0.
module tb_compressor_4_2;
  timeunit 1ps; timeprecision 1fs;
  localparam int unsigned W = 32;
  logic [W-1:0] x1, x2, x3, x4, s, c;
  int checks = 0, failures = 0;

  compressor_4_2 #(.W(W)) dut (.x1, .x2, .x3, .x4, .sum(s), .carry(c));

  task automatic check(input logic [W-1:0] v1, v2, v3, v4);
    logic [W-1:0] ref_sum;
    x1 = v1; x2 = v2; x3 = v3; x4 = v4;
    #1;
    ref_sum = v1 + v2 + v3 + v4;
    checks++;
    if (W'(s + c) !== ref_sum || c[0] !== 1'b0) begin
      failures++;
      if (failures < 10) $display("FAIL %h %h %h %h: sum %h carry %h ref %h", v1, v2, v3, v4, s, c, ref_sum);
    end
  endtask

  initial begin
    #100ns;  // watchdog: counts as one failure
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

  initial begin
    check('1, '1, '1, '1);
    check('0, '0, '0, '0);
    check(32'h8000_0000, 32'h8000_0000, 32'h1, 32'h7fff_ffff);
    for (int n = 0; n < 2000; n++) check($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
