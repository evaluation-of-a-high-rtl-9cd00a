// fp_add: combinational single-precision adder, y = a + b, or a - b when sub is set.
//
// The operand of larger magnitude is kept, the other one's significand is shifted right by
// the exponent difference with three extra bits (guard, round, sticky), the two are added or
// subtracted, the result is normalised by a leading-zero count and rounded to nearest-even.
// An exact zero difference gives +0. Infinities and NaNs follow IEEE-754; subnormals count as
// zero. No clock: callers register around it.
module fp_add
  import fp32_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);

  always_comb begin
    fp32_t       bb, hi, lo;
    logic [26:0] mb, ms, shifted;
    logic [27:0] sum;
    logic        sticky;
    int          ebig, diff, lz;
    bb = {b[31] ^ sub, b[30:0]};
    hi = a;
    lo = bb;
    mb = '0; ms = '0; shifted = '0; sum = '0; sticky = 1'b0;
    ebig = 0; diff = 0; lz = 0;
    if (fp32_is_nan(a) || fp32_is_nan(bb)) begin
      y = FP32_QNAN;
    end else if (fp32_is_inf(a) && fp32_is_inf(bb)) begin
      y = (a[31] == bb[31]) ? a : FP32_QNAN;
    end else if (fp32_is_inf(a)) begin
      y = a;
    end else if (fp32_is_inf(bb)) begin
      y = bb;
    end else if (fp32_is_zero(a) && fp32_is_zero(bb)) begin
      y = {a[31] & bb[31], 31'd0};
    end else if (fp32_is_zero(bb)) begin
      y = a;
    end else if (fp32_is_zero(a)) begin
      y = bb;
    end else begin
      if (bb[30:0] > a[30:0]) begin
        hi = bb;
        lo = a;
      end
      ebig = int'(hi[30:23]);
      diff = ebig - int'(lo[30:23]);
      mb = {1'b1, hi[22:0], 3'b000};
      ms = {1'b1, lo[22:0], 3'b000};
      if (diff > 26) begin
        shifted = 27'd1;                       // only the sticky bit survives
      end else begin
        shifted = ms >> diff;
        for (int i = 0; i < 27; i++)
          if (i < diff && ms[i]) sticky = 1'b1;
        shifted[0] = shifted[0] | sticky;
      end
      if (hi[31] == lo[31]) begin
        sum = {1'b0, mb} + {1'b0, shifted};
        if (sum[27]) begin
          y = fp32_round_pack(hi[31], ebig + 1, sum[27:4], sum[3], |sum[2:0]);
        end else begin
          y = fp32_round_pack(hi[31], ebig, sum[26:3], sum[2], |sum[1:0]);
        end
      end else begin
        sum = {1'b0, mb} - {1'b0, shifted};
        if (sum == '0) begin
          y = FP32_ZERO;
        end else begin
          lz = 27;
          for (int i = 0; i < 27; i++)
            if (sum[i]) lz = 26 - i;
          sum = sum << lz;
          y = fp32_round_pack(hi[31], ebig - lz, sum[26:3], sum[2], |sum[1:0]);
        end
      end
    end
  end

endmodule
