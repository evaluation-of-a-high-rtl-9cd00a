// tb_sb_sphere_calc: self-checking test of the per-sphere force and energy branch.
//
// Two instances run side by side, one with the default exponent 2 and one with exponent 3
// (exercising the power chain). Random distances, reciprocals, direction vectors, radii and
// force constants enter every cycle; energy k*delta^n and force n*k*delta^(n-1)*inv*d are
// checked against a double-precision reference within a small relative tolerance, and every
// result must appear exactly six cycles after its inputs.
module tb_sb_sphere_calc;
  import fp32_pkg::*;
  import sb_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_sb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       in_valid, v2, v3;
  fp32_t      radius, inv_dist, r_s, k_s;
  vec3_t      d;
  sb_result_t res2, res3;
  int checks = 0, failures = 0;

  sb_sphere_calc #(.EXP(2)) dut2 (.clk, .rst_n, .in_valid, .radius, .inv_dist, .d, .r_s, .k_s,
                                  .out_valid(v2), .res(res2));
  sb_sphere_calc #(.EXP(3)) dut3 (.clk, .rst_n, .in_valid, .radius, .inv_dist, .d, .r_s, .k_s,
                                  .out_valid(v3), .res(res3));

  typedef struct { real e2, f2x, f2y, f2z, e3, f3x, f3y, f3z; int t; } exp_t;
  exp_t exp_q [$];
  int   cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic bit rel_ok(logic [31:0] got, real want);
    return close(got, want, 1e-5 * absr(want) + 1e-30);
  endfunction

  always @(negedge clk) if (rst_n && (v2 || v3)) begin
    exp_t w;
    checks++;
    if (exp_q.size() == 0 || !v2 || !v3) begin
      failures++;
      $display("FAIL: unexpected or unaligned result");
    end else begin
      w = exp_q.pop_front();
      if (!rel_ok(res2.e, w.e2) || !rel_ok(res2.f.x, w.f2x) || !rel_ok(res2.f.y, w.f2y) ||
          !rel_ok(res2.f.z, w.f2z) || !rel_ok(res3.e, w.e3) || !rel_ok(res3.f.x, w.f3x) ||
          !rel_ok(res3.f.y, w.f3y) || !rel_ok(res3.f.z, w.f3z) || cycle - w.t != 6) begin
        failures++;
        $display("FAIL: E2=%g want %g, F2x=%g want %g, E3=%g want %g, latency %0d",
                 to_real(res2.e), w.e2, to_real(res2.f.x), w.f2x, to_real(res3.e), w.e3,
                 cycle - w.t);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t w;
    real rr, iv, rs, ks, dl, dx, dy, dz;
    in_valid = 0;
    {radius, inv_dist, r_s, k_s, d} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      // values on a coarse grid keep delta exact, so the tolerance can stay tight
      rr = real'(1 + $urandom % 120) / 4.0;
      rs = real'(1 + $urandom % 100) / 4.0;
      ks = real'(1 + $urandom % 40) / 8.0;
      radius = from_real(rr); r_s = from_real(rs); k_s = from_real(ks);
      inv_dist = from_real(1.0 / rr); iv = to_real(inv_dist);
      d.x = rand_fp(120, 10); d.y = rand_fp(120, 10); d.z = rand_fp(120, 10);
      dx = to_real(d.x); dy = to_real(d.y); dz = to_real(d.z);
      dl = rr - rs;
      w.e2 = ks * dl * dl;
      w.f2x = 2.0 * ks * dl * iv * dx; w.f2y = 2.0 * ks * dl * iv * dy; w.f2z = 2.0 * ks * dl * iv * dz;
      w.e3 = ks * dl * dl * dl;
      w.f3x = 3.0 * ks * dl * dl * iv * dx; w.f3y = 3.0 * ks * dl * dl * iv * dy;
      w.f3z = 3.0 * ks * dl * dl * iv * dz;
      w.t = cycle;
      exp_q.push_back(w);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      if ($urandom % 3 == 0) @(negedge clk);
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
