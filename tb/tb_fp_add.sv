// tb_fp_add: self-checking test of the single-precision adder/subtractor.
//
// Random operands, some with close exponents to exercise cancellation and others far apart to
// exercise the sticky bit, are added or subtracted and compared bit for bit with the double-
// precision result rounded to single precision. Directed cases cover exact cancellation,
// a carry into the exponent, infinities and NaN.
module tb_fp_add;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  fp32_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(fp32_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h %s %h = %h, expected %h", what, a, sub ? "-" : "+", b, y, exp_y);
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
    for (int i = 0; i < 3000; i++) begin
      a = rand_fp(100, 40);
      b = (i % 3 == 0) ? {a[31:23] ^ 9'(($urandom % 2) << 8), 23'($urandom)} : rand_fp(100, 40);
      sub = 1'($urandom);
      check(from_real(sub ? to_real(a) - to_real(b) : to_real(a) + to_real(b)), "random");
    end
    sub = 0;
    a = 32'h3F80_0000; b = 32'hBF80_0000; check(FP32_ZERO, "1+-1");
    a = 32'h3FFF_FFFF; b = 32'h3FFF_FFFF; check(32'h407F_FFFF, "carry");
    a = 32'h4B80_0000; b = 32'h3F80_0000; check(32'h4B80_0000, "tie to even");
    a = FP32_PINF;     b = 32'hFF80_0000; check(FP32_QNAN, "inf-inf");
    a = FP32_ZERO;     b = 32'hC2C8_0000; check(32'hC2C8_0000, "0+x");
    sub = 1;
    a = 32'h4120_0000; b = 32'h4120_0000; check(FP32_ZERO, "10-10");
    a = 32'h4120_0000; b = 32'h3F80_0000; check(32'h4110_0000, "10-1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
