// sb_pe: one atom pipeline of the spherical-boundary accelerator.
//
// For an atom at r_i and sphere centre r_c it forms d = r_c - r_i, the squared distance and
// its square root dist, and the reciprocal 1/dist (stages 1 to 5). "Determine boundary" then
// picks the sphere: an atom beyond the outer radius uses the outer sphere's potential, any
// other atom the inner sphere's. As in the dataflow picture of the design, both spheres'
// force and energy are computed side by side (two sb_sphere_calc branches, six stages each)
// and the boundary decision selects one result in a final register stage. One atom can enter
// per cycle and its result leaves LAT = 12 cycles later with out_valid.
//
// An atom exactly at the centre has no direction; it gets 1/dist = 0 and hence zero force, a
// choice of this design. The configuration (centre, radii, constants) must be held steady
// while atoms are in flight.
module sb_pe
  import fp32_pkg::*;
  import sb_pkg::*;
#(
  parameter int unsigned EXP = 2
)(
  input  logic       clk,
  input  logic       rst_n,
  input  sb_cfg_t    cfg,
  input  logic       in_valid,
  input  vec3_t      pos,
  output logic       out_valid,
  output sb_result_t res
);

  localparam int unsigned CALC_LAT = 6;

  logic  v1, v2, v3, v4, v5;
  vec3_t d_c, d1, d2, d3, d4, d5;
  vec3_t sq_c, sq2;
  fp32_t sxy_c, sum_c, sum3, dist_c, dist4, dist5, inv_c, inv5;
  logic  outer5;
  logic  outer_pipe [CALC_LAT];

  fp_add u_dx (.a(cfg.center.x), .b(pos.x), .sub(1'b1), .y(d_c.x));
  fp_add u_dy (.a(cfg.center.y), .b(pos.y), .sub(1'b1), .y(d_c.y));
  fp_add u_dz (.a(cfg.center.z), .b(pos.z), .sub(1'b1), .y(d_c.z));

  fp_mul u_sx (.a(d1.x), .b(d1.x), .y(sq_c.x));
  fp_mul u_sy (.a(d1.y), .b(d1.y), .y(sq_c.y));
  fp_mul u_sz (.a(d1.z), .b(d1.z), .y(sq_c.z));

  fp_add u_sxy  (.a(sq2.x), .b(sq2.y), .sub(1'b0), .y(sxy_c));
  fp_add u_sxyz (.a(sxy_c), .b(sq2.z), .sub(1'b0), .y(sum_c));

  fp_sqrt u_sqrt (.a(sum3), .y(dist_c));

  fp_div u_inv (.a(FP32_ONE), .b(dist4), .y(inv_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, v3, v4, v5} <= '0;
      {d1, d2, d3, d4, d5, sq2} <= '0;
      {sum3, dist4, dist5, inv5} <= '0;
      outer5 <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2; v4 <= v3; v5 <= v4;
      d1 <= d_c;
      sq2 <= sq_c;   d2 <= d1;
      sum3 <= sum_c; d3 <= d2;
      dist4 <= dist_c; d4 <= d3;
      // determine boundary; both operands are non-negative, so their bit patterns order
      outer5 <= dist4[30:0] > cfg.r_outer[30:0];
      inv5   <= fp32_is_zero(dist4) ? FP32_ZERO : inv_c;
      dist5  <= dist4;
      d5     <= d4;
    end
  end

  logic       vi, vo;
  sb_result_t res_in, res_out;

  sb_sphere_calc #(.EXP(EXP)) u_inner (
    .clk, .rst_n, .in_valid(v5), .radius(dist5), .inv_dist(inv5), .d(d5),
    .r_s(cfg.r_inner), .k_s(cfg.k_inner), .out_valid(vi), .res(res_in));

  sb_sphere_calc #(.EXP(EXP)) u_outer (
    .clk, .rst_n, .in_valid(v5), .radius(dist5), .inv_dist(inv5), .d(d5),
    .r_s(cfg.r_outer), .k_s(cfg.k_outer), .out_valid(vo), .res(res_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < CALC_LAT; i++) outer_pipe[i] <= 1'b0;
      out_valid <= 1'b0;
      res <= '0;
    end else begin
      outer_pipe[0] <= outer5;
      for (int i = 1; i < CALC_LAT; i++) outer_pipe[i] <= outer_pipe[i-1];
      out_valid <= vi;
      res <= outer_pipe[CALC_LAT-1] ? res_out : res_in;
    end
  end

  a_branches_in_step: assert property (@(posedge clk) disable iff (!rst_n) vi == vo)
    else $error("sb_pe: sphere branches out of step");

endmodule
