// fp_mul: combinational single-precision multiplier, y = a * b.
//
// The 24x24-bit significand product is normalised by at most one place and rounded to
// nearest-even through fp32_pkg::fp32_round_pack. Zero, infinity and NaN operands follow
// IEEE-754 (0 * inf gives NaN); subnormals count as zero. The unit has no clock: callers put
// registers around it to form pipeline stages.
module fp_mul
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  always_comb begin
    logic        s;
    logic [47:0] p;
    int          e;
    s = a[31] ^ b[31];
    p = '0;
    e = 0;
    if (fp32_is_nan(a) || fp32_is_nan(b)) begin
      y = FP32_QNAN;
    end else if (fp32_is_inf(a) || fp32_is_inf(b)) begin
      y = (fp32_is_zero(a) || fp32_is_zero(b)) ? FP32_QNAN : {s, 8'hFF, 23'd0};
    end else if (fp32_is_zero(a) || fp32_is_zero(b)) begin
      y = {s, 31'd0};
    end else begin
      p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
      e = int'(a[30:23]) + int'(b[30:23]) - 127;
      if (p[47])
        y = fp32_round_pack(s, e + 1, p[47:24], p[23], |p[22:0]);
      else
        y = fp32_round_pack(s, e, p[46:23], p[22], |p[21:0]);
    end
  end

endmodule
