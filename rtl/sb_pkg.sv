// sb_pkg: shared types of the spherical-boundary (SB) force and energy accelerator.
//
// An atom position is three single-precision coordinates in Angstroms. The configuration
// holds the sphere centre and, for the inner and the outer sphere, its radius r_s and force
// constant k_s (kcal/mol/A^2). A result is the force vector and the energy of one atom. The
// word layouts in memory put x (or Fx) in the low 32 bits, then y, z, and the unused word
// (or the energy) in the high 32 bits.
package sb_pkg;
  import fp32_pkg::*;

  typedef struct packed {
    fp32_t z;
    fp32_t y;
    fp32_t x;
  } vec3_t;

  typedef struct packed {
    vec3_t center;
    fp32_t r_inner;
    fp32_t k_inner;
    fp32_t r_outer;
    fp32_t k_outer;
  } sb_cfg_t;

  typedef struct packed {
    fp32_t e;
    vec3_t f;
  } sb_result_t;

  // 128-bit memory word to position: the top 32 bits are unused.
  function automatic vec3_t word_to_pos(logic [127:0] w);
    return w[95:0];
  endfunction

  // Result to 128-bit memory word: Fx, Fy, Fz from the low end, energy in the top 32 bits.
  function automatic logic [127:0] result_to_word(sb_result_t r);
    return r;
  endfunction

endpackage
