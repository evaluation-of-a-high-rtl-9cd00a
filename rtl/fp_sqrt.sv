// fp_sqrt: combinational single-precision square root, y = sqrt(a).
//
// The exponent is made even by moving one factor of two into the significand, the scaled
// significand (50 bits) goes through a restoring bit-by-bit integer square root giving 25
// bits (24 result bits and a guard bit), and a non-zero remainder sets the sticky bit before
// rounding to nearest-even. sqrt(-x) gives NaN, sqrt(+-0) gives +-0, sqrt(+inf) gives +inf.
// Subnormals count as zero. No clock: callers register around it.
module fp_sqrt
  import fp32_pkg::*;
(
  input  fp32_t a,
  output fp32_t y
);

  always_comb begin
    logic [49:0] rad, rem, trial;
    logic [24:0] root;
    int          e;
    rad = '0; rem = '0; trial = '0; root = '0; e = 0;
    if (fp32_is_nan(a)) begin
      y = FP32_QNAN;
    end else if (fp32_is_zero(a)) begin
      y = {a[31], 31'd0};
    end else if (a[31]) begin
      y = FP32_QNAN;
    end else if (fp32_is_inf(a)) begin
      y = a;
    end else begin
      e = int'(a[30:23]) - 127;
      rad = {26'd0, 1'b1, a[22:0]} << 25;
      if (e[0]) begin
        rad = rad << 1;
        e = e - 1;
      end
      // Restoring square root, two radicand bits per result bit.
      rem = '0;
      root = '0;
      for (int i = 24; i >= 0; i--) begin
        rem = (rem << 2) | 50'((rad >> (2 * i)) & 50'd3);
        trial = {23'd0, root, 2'b01};
        if (rem >= trial) begin
          rem = rem - trial;
          root = (root << 1) | 25'd1;
        end else begin
          root = root << 1;
        end
      end
      y = fp32_round_pack(1'b0, (e >>> 1) + 127, root[24:1], root[0], rem != '0);
    end
  end

endmodule
