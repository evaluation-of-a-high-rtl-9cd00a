// subrow_dot_pe: one optimized subrow dot-product element.
//
// Four single-precision multipliers form the products a[i]*b[i] of a four-element matrix
// subrow and the matching four elements of the column vector; the products are registered
// and then summed by a two-level reduction tree (fp_add_tree4). One subrow can enter every
// cycle; its dot product leaves three cycles later (one multiply stage, two adder levels)
// with out_valid. The four-lane width matches the four floats held in one 128-bit memory
// word. The pipeline registers are this design's choice.
module subrow_dot_pe
  import fp32_pkg::*;
#(
  parameter int unsigned ELEMS = 4
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a [ELEMS],
  input  fp32_t b [ELEMS],
  output logic  out_valid,
  output fp32_t dot
);

  fp32_t prod [ELEMS];
  fp32_t prod_q [ELEMS];
  logic  pv_q;

  for (genvar i = 0; i < ELEMS; i++) begin : g_mul
    fp_mul u_mul (.a(a[i]), .b(b[i]), .y(prod[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pv_q <= 1'b0;
      for (int i = 0; i < ELEMS; i++) prod_q[i] <= FP32_ZERO;
    end else begin
      pv_q <= in_valid;
      if (in_valid) prod_q <= prod;
    end
  end

  fp_add_tree4 u_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(pv_q), .x(prod_q), .out_valid(out_valid), .sum(dot)
  );

  initial assert (ELEMS == 4) else $error("subrow_dot_pe: the reduction tree takes four products");

endmodule
