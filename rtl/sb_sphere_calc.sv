// sb_sphere_calc: force and energy of one atom against one boundary sphere.
//
// With radius = |r_i - r_c|, delta = radius - r_s and d = r_c - r_i, it computes
//   energy E = k_s * delta^EXP
//   force  F = (EXP * k_s * delta^(EXP-1)) * d / radius
// where d / radius is the unit vector from the atom towards the centre, supplied here as d and
// inv_dist = 1/radius so that one divider in the caller serves both spheres. EXP is the
// integer exponent shared by both spheres (2 by default). The computation is a six-stage
// pipeline: (1) delta, (2) delta^(EXP-1) by a chain of EXP-2 multipliers, (3) k*delta^(EXP-1),
// (4) energy and EXP*k*delta^(EXP-1) in parallel, (5) scale by inv_dist, (6) the three force
// components. One atom can enter per cycle; results leave LAT = 6 cycles later with
// out_valid. The formulas follow the boundary-condition equations; the staging is this
// design's choice.
module sb_sphere_calc
  import fp32_pkg::*;
  import sb_pkg::*;
#(
  parameter int unsigned EXP = 2
)(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  fp32_t      radius,
  input  fp32_t      inv_dist,
  input  vec3_t      d,
  input  fp32_t      r_s,
  input  fp32_t      k_s,
  output logic       out_valid,
  output sb_result_t res
);

  localparam fp32_t EXP_F = fp32_from_uint(EXP);

  // stage registers
  logic  v [6];
  fp32_t delta1, delta2, delta3;
  fp32_t inv1, inv2, inv3, inv4;
  fp32_t k1, k2;
  vec3_t d1, d2, d3, d4, d5;
  fp32_t pw2, kp3, e4, fs4, e5, s5;

  // combinational results of each stage
  fp32_t delta_c, pw_c, kp_c, e_c, fs_c, s_c;
  vec3_t f_c;

  fp_add u_delta (.a(radius), .b(r_s), .sub(1'b1), .y(delta_c));

  // delta^(EXP-1): 1.0 for EXP = 1, delta for EXP = 2, a multiplier chain above that
  if (EXP <= 1) begin : g_pw1
    assign pw_c = FP32_ONE;
  end else begin : g_pw
    fp32_t chain [EXP-1];
    assign chain[0] = delta1;
    for (genvar i = 1; i < EXP - 1; i++) begin : g_chain
      fp_mul u_pow (.a(chain[i-1]), .b(delta1), .y(chain[i]));
    end
    assign pw_c = chain[EXP-2];
  end

  fp_mul u_kp (.a(k2), .b(pw2), .y(kp_c));
  fp_mul u_e  (.a(kp3), .b(delta3), .y(e_c));
  fp_mul u_fs (.a(kp3), .b(EXP_F), .y(fs_c));
  fp_mul u_s  (.a(fs4), .b(inv4), .y(s_c));
  fp_mul u_fx (.a(s5), .b(d5.x), .y(f_c.x));
  fp_mul u_fy (.a(s5), .b(d5.y), .y(f_c.y));
  fp_mul u_fz (.a(s5), .b(d5.z), .y(f_c.z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) v[i] <= 1'b0;
      {delta1, delta2, delta3, inv1, inv2, inv3, inv4, k1, k2} <= '0;
      {d1, d2, d3, d4, d5} <= '0;
      {pw2, kp3, e4, fs4, e5, s5} <= '0;
      res <= '0;
    end else begin
      v[0] <= in_valid;
      for (int i = 1; i < 6; i++) v[i] <= v[i-1];
      // 1
      delta1 <= delta_c; inv1 <= inv_dist; k1 <= k_s; d1 <= d;
      // 2
      pw2 <= pw_c; delta2 <= delta1; inv2 <= inv1; k2 <= k1; d2 <= d1;
      // 3
      kp3 <= kp_c; delta3 <= delta2; inv3 <= inv2; d3 <= d2;
      // 4
      e4 <= e_c; fs4 <= fs_c; inv4 <= inv3; d4 <= d3;
      // 5
      s5 <= s_c; e5 <= e4; d5 <= d4;
      // 6
      res.f <= f_c;
      res.e <= e5;
    end
  end

  assign out_valid = v[5];

endmodule
