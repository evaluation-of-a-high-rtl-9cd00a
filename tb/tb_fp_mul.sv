// tb_fp_mul: self-checking test of the single-precision multiplier.
//
// Random normal operands (exponents kept away from overflow and underflow) are multiplied and
// compared bit for bit with the simulator's own double-precision product converted to single
// precision, which is correctly rounded because the exact product fits a double. Directed
// cases cover zero, infinity, NaN and the sign rule.
module tb_fp_mul;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(fp32_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = rand_fp(70, 110);
      b = rand_fp(70, 110);
      check(from_real(to_real(a) * to_real(b)), "random");
    end
    a = 32'h4040_0000; b = 32'hC000_0000; check(32'hC0C0_0000, "3*-2");
    a = FP32_ONE;      b = 32'h3F80_0001; check(32'h3F80_0001, "1*x");
    a = 32'h0000_0000; b = 32'hC120_0000; check(32'h8000_0000, "0*-10");
    a = FP32_PINF;     b = 32'h4000_0000; check(FP32_PINF, "inf*2");
    a = FP32_PINF;     b = FP32_ZERO;     check(FP32_QNAN, "inf*0");
    a = 32'h7F00_0000; b = 32'h4000_0000; check(FP32_PINF, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
