// tb_fp_add_tree4: self-checking test of the pipelined four-input reduction tree.
//
// A new random set of four values enters every cycle, with occasional idle cycles. Each
// expected sum is formed as ((x0+x1)+(x2+x3)) with every addition rounded to single precision
// in the reference, so results must match bit for bit, and each must appear exactly two
// cycles after its inputs.
module tb_fp_add_tree4;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, out_valid;
  fp32_t x [4];
  fp32_t sum;
  int checks = 0, failures = 0;

  fp_add_tree4 dut (.*);

  fp32_t exp_q [$];
  int    t_q [$];
  int    cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL: unexpected output");
    end else begin
      if (sum !== exp_q[0] || cycle - t_q[0] != 2) begin
        failures++;
        $display("FAIL: sum %h expected %h, latency %0d", sum, exp_q[0], cycle - t_q[0]);
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
    real s01, s23;
    in_valid = 0;
    for (int i = 0; i < 4; i++) x[i] = FP32_ZERO;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      for (int i = 0; i < 4; i++) x[i] = rand_fp(110, 30);
      if (in_valid) begin
        s01 = to_real(from_real(to_real(x[0]) + to_real(x[1])));
        s23 = to_real(from_real(to_real(x[2]) + to_real(x[3])));
        exp_q.push_back(from_real(s01 + s23));
        t_q.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d sums never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
