// row_accumulator: loop-dependent accumulation of a row dot product.
//
// Each valid input is one partial dot product (the reduced sum of several subrows). The first
// input of a row loads the accumulator, the following ITERS-1 inputs are added to it with a
// single-cycle adder, and on the ITERS-th input the finished row dot product is presented on
// row_sum with row_valid for one cycle, after which the next row starts. Inputs may arrive on
// any cycle, at most one per cycle. ITERS = 128 matches a 2048-element row split into 512
// four-element subrows consumed four at a time. Keeping the adder combinational, so the loop
// closes in one cycle, is this design's choice.
module row_accumulator
  import fp32_pkg::*;
#(
  parameter int unsigned ITERS = 128
)(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t in_data,
  output logic  row_valid,
  output fp32_t row_sum
);

  localparam int unsigned CW = (ITERS > 1) ? $clog2(ITERS) : 1;

  fp32_t          acc, acc_next;
  logic [CW-1:0]  cnt;

  fp_add u_add (.a(acc), .b(in_data), .sub(1'b0), .y(acc_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= FP32_ZERO;
      cnt       <= '0;
      row_valid <= 1'b0;
      row_sum   <= FP32_ZERO;
    end else begin
      row_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(ITERS - 1)) begin
          cnt       <= '0;
          row_valid <= 1'b1;
          row_sum   <= (ITERS == 1) ? in_data : acc_next;
          acc       <= FP32_ZERO;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= (cnt == '0) ? in_data : acc_next;
        end
      end
    end
  end

endmodule
