// fp_div: combinational single-precision divider, y = a / b.
//
// The 24-bit significands are divided as integers after shifting the dividend left by 26
// places, which leaves 26 or 27 quotient bits; the remainder feeds the sticky bit and the
// result is rounded to nearest-even. x/0 gives a signed infinity, 0/0 and inf/inf give NaN.
// Subnormals count as zero. No clock: callers register around it.
module fp_div
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s;
    logic [49:0] num, q, r;
    int          e;
    s = a[31] ^ b[31];
    num = '0; q = '0; r = '0; e = 0;
    if (fp32_is_nan(a) || fp32_is_nan(b)) begin
      y = FP32_QNAN;
    end else if (fp32_is_inf(a)) begin
      y = fp32_is_inf(b) ? FP32_QNAN : {s, 8'hFF, 23'd0};
    end else if (fp32_is_inf(b)) begin
      y = {s, 31'd0};
    end else if (fp32_is_zero(b)) begin
      y = fp32_is_zero(a) ? FP32_QNAN : {s, 8'hFF, 23'd0};
    end else if (fp32_is_zero(a)) begin
      y = {s, 31'd0};
    end else begin
      num = {1'b1, a[22:0], 26'd0};
      q = num / {26'd0, 1'b1, b[22:0]};
      r = num % {26'd0, 1'b1, b[22:0]};
      e = int'(a[30:23]) - int'(b[30:23]) + 127;
      if (q[26])
        y = fp32_round_pack(s, e, q[26:3], q[2], (|q[1:0]) || (r != '0));
      else
        y = fp32_round_pack(s, e - 1, q[25:2], q[1], q[0] || (r != '0));
    end
  end

endmodule
