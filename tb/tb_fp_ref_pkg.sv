// tb_fp_ref_pkg: reference conversions between binary32 bit patterns and the simulator's
// double-precision real, used by the testbenches to compute expected results.
//
// to_real widens exactly. from_real rounds a double to single precision, nearest-even,
// flushing results below the normal range to signed zero and sending overflow to infinity,
// the same conventions as the design. Because a double carries more than twice the bits of a
// single, a sum, product, quotient or square root of two singles computed in double and then
// rounded here is the correctly rounded single result.
package tb_fp_ref_pkg;

  function automatic real to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] from_real(real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    logic guard, sticky;
    d = $realtobits(r);
    if (d[62:52] == 11'h000) return {d[63], 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    guard = d[28];
    sticky = |d[27:0];
    if (guard && (sticky || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal single with exponent in [emin, emin+span).
  function automatic logic [31:0] rand_fp(int emin, int span);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(emin + ($urandom % span)), r[22:0]};
  endfunction

endpackage
