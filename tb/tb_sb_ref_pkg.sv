// tb_sb_ref_pkg: double-precision reference for the spherical-boundary force and energy.
//
// For atom position p, centre c, radii and force constants of the inner and outer sphere and
// exponent n: rad = |p - c|; the outer sphere applies when rad exceeds its radius, the
// inner one otherwise; delta = rad - r_s; E = k_s*delta^n; F = n*k_s*delta^(n-1) * (c-p)/rad,
// with zero force at rad = 0. check_close compares a single-precision result with a real
// within an absolute tolerance.
package tb_sb_ref_pkg;
  import tb_fp_ref_pkg::*;

  typedef struct {
    real fx, fy, fz, e;
    bit  outer;
  } sb_ref_t;

  function automatic real ipow(real x, int n);
    real r = 1.0;
    for (int i = 0; i < n; i++) r *= x;
    return r;
  endfunction

  function automatic sb_ref_t sb_reference(real px, real py, real pz, real cx, real cy, real cz,
                                           real ri, real ki, real ro, real ko, int n);
    sb_ref_t o;
    real dx, dy, dz, rad, rs, ks, delta, s;
    dx = cx - px; dy = cy - py; dz = cz - pz;
    rad = $sqrt(dx*dx + dy*dy + dz*dz);
    o.outer = rad > ro;
    rs = o.outer ? ro : ri;
    ks = o.outer ? ko : ki;
    delta = rad - rs;
    o.e = ks * ipow(delta, n);
    s = (rad == 0.0) ? 0.0 : n * ks * ipow(delta, n - 1) / rad;
    o.fx = s * dx; o.fy = s * dy; o.fz = s * dz;
    return o;
  endfunction

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic bit close(logic [31:0] got, real want, real tol);
    return absr(to_real(got) - want) <= tol;
  endfunction

endpackage
