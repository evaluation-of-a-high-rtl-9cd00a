// tb_sb_pe: self-checking test of one spherical-boundary atom pipeline.
//
// Atoms are placed at random distances from 0 to 30 A around a centre, with an inner sphere
// of 12 A and an outer one of 20 A, so atoms fall inside the inner sphere, between the
// spheres and outside the outer one; one atom sits exactly at the centre. One atom enters per
// cycle (with random gaps). Each force component and energy is compared with a double-
// precision reference within a tolerance scaled to the force constant, each result must come
// out 12 cycles after its atom, and both spheres must have been used.
module tb_sb_pe;
  import fp32_pkg::*;
  import sb_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_sb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sb_cfg_t    cfg;
  logic       in_valid, out_valid;
  vec3_t      pos;
  sb_result_t res;
  int checks = 0, failures = 0;
  int n_inner = 0, n_outer = 0;

  sb_pe dut (.*);

  sb_ref_t exp_q [$];
  int      t_q [$];
  int      cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  real cx = 5.5, cy = -3.25, cz = 40.0, ri = 12.0, ki = 2.5, ro = 20.0, ko = 10.0;

  always @(negedge clk) if (rst_n && out_valid) begin
    sb_ref_t w;
    real tf, te;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected result");
    end else begin
      w = exp_q.pop_front();
      if (w.outer) n_outer++; else n_inner++;
      tf = 1e-4 * (absr(w.fx) + absr(w.fy) + absr(w.fz)) + 1e-3 * ko;
      te = 1e-4 * absr(w.e) + 1e-3 * ko;
      if (!close(res.f.x, w.fx, tf) || !close(res.f.y, w.fy, tf) || !close(res.f.z, w.fz, tf)
          || !close(res.e, w.e, te) || cycle - t_q[0] != 12) begin
        failures++;
        $display("FAIL: F=(%g %g %g) E=%g, expected (%g %g %g) %g, latency %0d",
                 to_real(res.f.x), to_real(res.f.y), to_real(res.f.z), to_real(res.e),
                 w.fx, w.fy, w.fz, w.e, cycle - t_q[0]);
      end
      void'(t_q.pop_front());
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
    real px, py, pz, r, ux, uy, uz, un;
    cfg.center.x = from_real(cx); cfg.center.y = from_real(cy); cfg.center.z = from_real(cz);
    cfg.r_inner = from_real(ri); cfg.k_inner = from_real(ki);
    cfg.r_outer = from_real(ro); cfg.k_outer = from_real(ko);
    in_valid = 0;
    pos = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      in_valid = 0;
      if ($urandom % 4 == 0) @(negedge clk);
      ux = real'(int'($urandom % 2001) - 1000);
      uy = real'(int'($urandom % 2001) - 1000);
      uz = real'(int'($urandom % 2001) - 1000);
      un = $sqrt(ux*ux + uy*uy + uz*uz) + 1e-9;
      r = (n == 0) ? 0.0 : 30.0 * real'($urandom % 10000) / 10000.0;
      pos.x = from_real(cx + r * ux / un);
      pos.y = from_real(cy + r * uy / un);
      pos.z = from_real(cz + r * uz / un);
      px = to_real(pos.x); py = to_real(pos.y); pz = to_real(pos.z);
      exp_q.push_back(sb_reference(px, py, pz, cx, cy, cz, ri, ki, ro, ko, 2));
      t_q.push_back(cycle);
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (15) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_inner == 0 || n_outer == 0) begin
      failures++;
      $display("FAIL: %0d results missing, inner %0d, outer %0d", exp_q.size(), n_inner, n_outer);
    end
    $display("inner-sphere atoms %0d, outer-sphere atoms %0d", n_inner, n_outer);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
