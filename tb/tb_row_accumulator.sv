// tb_row_accumulator: self-checking test of the loop-dependent row accumulation, ITERS = 8.
//
// Random partial sums arrive with random gaps (including back-to-back). The reference adds
// them in arrival order, rounding each step to single precision, so every row result must
// match bit for bit, come out exactly once per ITERS inputs, and appear one cycle after the
// row's last input.
module tb_row_accumulator;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned ITERS = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, row_valid;
  fp32_t in_data, row_sum;
  int checks = 0, failures = 0;

  row_accumulator #(.ITERS(ITERS)) dut (.*);

  fp32_t exp_q [$];
  int    t_q [$];
  int    cycle = 0;
  int    rows_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && row_valid) begin
    checks++;
    rows_out++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected row output");
    end else begin
      if (row_sum !== exp_q[0] || cycle - t_q[0] != 1) begin
        failures++;
        $display("FAIL: row %h expected %h, latency %0d", row_sum, exp_q[0], cycle - t_q[0]);
      end
      void'(exp_q.pop_front());
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
    real acc;
    in_valid = 0;
    in_data = FP32_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < 50; row++) begin
      for (int k = 0; k < ITERS; k++) begin
        in_valid = 0;
        repeat ($urandom % 3) @(negedge clk);
        in_valid = 1;
        in_data = rand_fp(115, 20);
        acc = (k == 0) ? to_real(in_data) : to_real(from_real(acc + to_real(in_data)));
        if (k == ITERS - 1) begin
          exp_q.push_back(from_real(acc));
          t_q.push_back(cycle);
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (rows_out != 50) begin
      failures++;
      $display("FAIL: %0d rows came out, expected 50", rows_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
