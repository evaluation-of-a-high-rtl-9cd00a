// tb_dmvm_engine: self-checking test of the matrix-vector multiply engine at N = 64.
//
// Three multiplies are run. The first uses small integers, whose products and sums are exact
// in single precision, so every row result must match the integer dot product bit for bit.
// The second uses random reals over a partial block of 7 rows, exercising the zero-filled last
// result word, and is checked against a double-precision reference within a relative
// tolerance. The third repeats the integer case with a different vector to show no state
// leaks between runs. Each run also checks the cycle count: one word per bank per cycle for
// num_rows*N/4 cycles plus a short pipeline tail.
module tb_dmvm_engine;
  import fp32_pkg::*;
  import tb_fp_ref_pkg::*;

  localparam int unsigned N = 64;
  localparam int unsigned SUBROWS = N / 4;
  localparam int unsigned AW = $clog2(N * SUBROWS);
  localparam int unsigned LAT = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  logic [$clog2(N+1)-1:0] num_rows;
  logic m_rd_en, v_rd_en, m_rd_valid, v_rd_valid, r_wr_en;
  logic [AW-1:0] m_rd_addr, v_rd_addr, r_wr_addr;
  logic [127:0] m_rd_data, v_rd_data, r_wr_data;

  dmvm_engine #(.N(N)) dut (.*);

  tb_sram_model #(.AW(AW), .LAT(LAT)) u_ram0 (
    .clk, .rd_en(m_rd_en), .rd_addr(m_rd_addr), .rd_valid(m_rd_valid), .rd_data(m_rd_data),
    .wr_en(1'b0), .wr_addr('0), .wr_data('0));
  tb_sram_model #(.AW(AW), .LAT(LAT)) u_ram1 (
    .clk, .rd_en(v_rd_en), .rd_addr(v_rd_addr), .rd_valid(v_rd_valid), .rd_data(v_rd_data),
    .wr_en(1'b0), .wr_addr('0), .wr_data('0));
  tb_sram_model #(.AW(AW), .LAT(LAT)) u_res (
    .clk, .rd_en(1'b0), .rd_addr('0), .rd_valid(), .rd_data(),
    .wr_en(r_wr_en), .wr_addr(r_wr_addr), .wr_data(r_wr_data));

  int checks = 0, failures = 0;
  real A [N][N];
  real B [N];

  task automatic load(bit integers, int seed);
    for (int c = 0; c < N; c++) begin
      B[c] = integers ? real'(int'($urandom % 17) - 8) : to_real(rand_fp(120, 8));
      B[c] = to_real(from_real(B[c]));
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        A[r][c] = integers ? real'(int'($urandom % 33) - 16 + seed) : to_real(rand_fp(122, 6));
        A[r][c] = to_real(from_real(A[r][c]));
      end
    for (int r = 0; r < N; r++)
      for (int s = 0; s < SUBROWS; s++)
        for (int e = 0; e < 4; e++)
          u_ram0.mem[r*SUBROWS + s][32*e +: 32] = from_real(A[r][4*s + e]);
    for (int s = 0; s < SUBROWS; s++)
      for (int e = 0; e < 4; e++) u_ram1.mem[s][32*e +: 32] = from_real(B[4*s + e]);
    for (int i = 0; i < N / 4; i++) u_res.mem[i] = {4{32'hDEAD_BEEF}};
  endtask

  task automatic run(int rows, bit exact, string what);
    int t0, cyc, min_cyc;
    real ref_v, mag, got, tol;
    logic [31:0] word;
    @(negedge clk);
    num_rows = ($clog2(N+1))'(rows);
    start = 1;
    @(negedge clk);
    start = 0;
    t0 = 0;
    while (!done) begin
      @(negedge clk);
      t0++;
    end
    cyc = t0;
    min_cyc = rows * SUBROWS;
    checks++;
    if (cyc < min_cyc || cyc > min_cyc + LAT + 12) begin
      failures++;
      $display("FAIL %s: took %0d cycles, expected %0d..%0d", what, cyc, min_cyc, min_cyc + LAT + 12);
    end
    for (int r = 0; r < rows; r++) begin
      ref_v = 0.0;
      mag = 0.0;
      for (int c = 0; c < N; c++) begin
        ref_v += A[r][c] * B[c];
        mag += (A[r][c] * B[c] < 0.0) ? -(A[r][c] * B[c]) : A[r][c] * B[c];
      end
      word = u_res.mem[r / 4][32*(r % 4) +: 32];
      got = to_real(word);
      tol = exact ? 0.0 : mag * 1.0e-5;
      checks++;
      if ((got - ref_v > tol) || (ref_v - got > tol)) begin
        failures++;
        $display("FAIL %s row %0d: got %g (%h), expected %g", what, r, got, word, ref_v);
      end
    end
    // lanes past the last row of a partial word are zero-filled
    for (int r = rows; r < ((rows + 3) / 4) * 4; r++) begin
      checks++;
      if (u_res.mem[r / 4][32*(r % 4) +: 32] !== 32'h0) begin
        failures++;
        $display("FAIL %s: padding lane %0d not zero", what, r);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    num_rows = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(1, 0);
    run(N, 1, "integer");
    load(0, 0);
    run(7, 0, "random 7 rows");
    load(1, 3);
    run(N, 1, "integer again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
