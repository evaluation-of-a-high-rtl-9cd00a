// tb_fp_div: self-checking test of the single-precision divider.
//
// Random normal operands are divided and compared bit for bit with the double-precision
// quotient rounded to single precision; directed cases cover exact quotients, division by
// zero and zero divided by zero.
module tb_fp_div;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  fp32_t a, b, y;
  int checks = 0, failures = 0;

  fp_div dut (.a(a), .b(b), .y(y));

  task automatic check(fp32_t exp_y, string what);
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s: %h / %h = %h, expected %h", what, a, b, y, exp_y);
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
      a = rand_fp(80, 90);
      b = rand_fp(80, 90);
      check(from_real(to_real(a) / to_real(b)), "random");
    end
    a = 32'h40C0_0000; b = 32'h4000_0000; check(32'h4040_0000, "6/2");
    a = 32'h3F80_0000; b = 32'h4040_0000; check(32'h3EAA_AAAB, "1/3");
    a = 32'hC000_0000; b = FP32_ZERO;     check(32'hFF80_0000, "-2/0");
    a = FP32_ZERO;     b = FP32_ZERO;     check(FP32_QNAN, "0/0");
    a = FP32_ZERO;     b = 32'h4000_0000; check(FP32_ZERO, "0/2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
