// tb_fp_sqrt: self-checking test of the single-precision square root.
//
// Random positive operands with odd and even exponents are compared bit for bit with the
// double-precision square root rounded to single precision; directed cases cover perfect
// squares, zero, negative input and infinity.
module tb_fp_sqrt;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  fp32_t a, y;
  int checks = 0, failures = 0;

  fp_sqrt dut (.a(a), .y(y));

  task automatic check(fp32_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: sqrt(%h) = %h, expected %h", what, a, y, exp_y);
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
      a = rand_fp(1, 254);
      a[31] = 1'b0;
      check(from_real($sqrt(to_real(a))), "random");
    end
    a = 32'h4110_0000; check(32'h4040_0000, "sqrt 9");
    a = 32'h4080_0000; check(32'h4000_0000, "sqrt 4");
    a = 32'h4000_0000; check(32'h3FB5_04F3, "sqrt 2");
    a = 32'h8000_0000; check(32'h8000_0000, "sqrt -0");
    a = 32'hC080_0000; check(FP32_QNAN, "sqrt -4");
    a = FP32_PINF;     check(FP32_PINF, "sqrt inf");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
