// fp32_pkg: types, constants and the shared rounding step for the single-precision
// (IEEE-754 binary32) arithmetic used by both accelerators.
//
// All arithmetic units round to nearest, ties to even. Subnormal inputs are read as zero and
// subnormal results are flushed to zero; any NaN result is the quiet NaN 0x7FC00000. These
// simplifications are this design's own choice: the accelerators only need ordinary
// single-precision values, and only "single-precision floating point" is specified.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_fields_t;

  localparam fp32_t FP32_ZERO = 32'h0000_0000;
  localparam fp32_t FP32_ONE  = 32'h3F80_0000;
  localparam fp32_t FP32_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP32_PINF = 32'h7F80_0000;

  function automatic logic fp32_is_nan(fp32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] != '0);
  endfunction

  function automatic logic fp32_is_inf(fp32_t a);
    return (a[30:23] == 8'hFF) && (a[22:0] == '0);
  endfunction

  // Zero or subnormal: both count as zero here.
  function automatic logic fp32_is_zero(fp32_t a);
    return a[30:23] == 8'h00;
  endfunction

  // Round and pack. man is the 24-bit significand with its leading one in bit 23, exp the
  // biased exponent belonging to it (may be out of range), guard the next lower bit and
  // sticky the OR of all bits below that.
  function automatic fp32_t fp32_round_pack(logic sign, int exp, logic [23:0] man,
                                            logic guard, logic sticky);
    logic [24:0] r;
    int e;
    e = exp;
    r = {1'b0, man};
    if (guard && (sticky || man[0])) r = r + 25'd1;
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sign, 8'hFF, 23'd0};
    if (e <= 0)   return {sign, 31'd0};
    return {sign, e[7:0], r[22:0]};
  endfunction

  // Exact conversion of a small non-negative integer (below 2**24) to binary32.
  function automatic fp32_t fp32_from_uint(int unsigned v);
    int msb;
    logic [23:0] m;
    if (v == 0) return FP32_ZERO;
    msb = 0;
    for (int i = 0; i < 32; i++) if (v[i]) msb = i;
    m = 24'(v << (23 - msb));
    return {1'b0, 8'(127 + msb), m[22:0]};
  endfunction

endpackage
