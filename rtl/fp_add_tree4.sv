// fp_add_tree4: pipelined two-level reduction tree that sums four single-precision values.
//
// Level one adds the pairs (x[0]+x[1]) and (x[2]+x[3]) and registers both; level two adds
// the two partial sums and registers the total. A new set of four values can enter every
// cycle and its sum appears two cycles later with out_valid. The pairing follows the
// balanced two-level tree of the optimized dot-product design; the register after each level
// is this design's choice. The same tree sums the four products inside a subrow
// dot-product element and the four element outputs after it.
module fp_add_tree4
  import fp32_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t x [4],
  output logic  out_valid,
  output fp32_t sum
);

  fp32_t s01, s23, s01_q, s23_q, total;
  logic  v1_q;

  fp_add u_add01 (.a(x[0]), .b(x[1]), .sub(1'b0), .y(s01));
  fp_add u_add23 (.a(x[2]), .b(x[3]), .sub(1'b0), .y(s23));
  fp_add u_addt  (.a(s01_q), .b(s23_q), .sub(1'b0), .y(total));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1_q      <= 1'b0;
      out_valid <= 1'b0;
      s01_q     <= FP32_ZERO;
      s23_q     <= FP32_ZERO;
      sum       <= FP32_ZERO;
    end else begin
      v1_q      <= in_valid;
      out_valid <= v1_q;
      if (in_valid) begin
        s01_q <= s01;
        s23_q <= s23;
      end
      if (v1_q) sum <= total;
    end
  end

endmodule
