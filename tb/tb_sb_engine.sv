// tb_sb_engine: self-checking test of the four-pipeline spherical-boundary engine.
//
// Bank A is filled with random atom positions (unused top word set to garbage, which must be
// ignored). Three blocks are run: 64 atoms (whole groups of four), 37 atoms (a partial last
// group) at different base addresses, and a single atom. Every result word in bank B is
// compared with a double-precision reference, words outside the block must stay untouched,
// and each block must finish within count + 24 cycles, i.e. one atom per cycle.
module tb_sb_engine;
  import fp32_pkg::*;
  import sb_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_sb_ref_pkg::*;

  localparam int unsigned AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sb_cfg_t cfg;
  logic start, busy, done, rd_en, rd_valid, wr_en;
  logic [AW-1:0] in_base, out_base, rd_addr, wr_addr;
  logic [AW:0] count;
  logic [127:0] rd_data, wr_data;

  sb_engine #(.ADDR_W(AW)) dut (.*);

  tb_sb_bank_pair #(.AW(AW)) u_mem (.*);

  int checks = 0, failures = 0;
  real cx = -2.0, cy = 7.5, cz = 1.25, ri = 8.0, ki = 1.5, ro = 16.0, ko = 6.0;

  task automatic run_block(int ib, int ob, int n);
    int cyc;
    sb_ref_t w;
    real tf, te;
    logic [127:0] got;
    for (int i = 0; i < n; i++) begin
      u_mem.bank_a.mem[ib + i] = {$urandom, from_real(cz + real'(int'($urandom % 4001) - 2000) / 80.0),
                                  from_real(cy + real'(int'($urandom % 4001) - 2000) / 80.0),
                                  from_real(cx + real'(int'($urandom % 4001) - 2000) / 80.0)};
    end
    for (int i = 0; i < (1 << AW); i++) u_mem.bank_b.mem[i] = {4{32'hA5A5_5A5A}};
    @(negedge clk);
    in_base = AW'(ib); out_base = AW'(ob); count = (AW + 1)'(n);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc > n + 24) begin
      failures++;
      $display("FAIL block of %0d: %0d cycles", n, cyc);
    end
    for (int i = 0; i < n; i++) begin
      logic [127:0] a;
      a = u_mem.bank_a.mem[ib + i];
      w = sb_reference(to_real(a[31:0]), to_real(a[63:32]), to_real(a[95:64]),
                       cx, cy, cz, ri, ki, ro, ko, 2);
      got = u_mem.bank_b.mem[ob + i];
      tf = 1e-4 * (absr(w.fx) + absr(w.fy) + absr(w.fz)) + 1e-3 * ko;
      te = 1e-4 * absr(w.e) + 1e-3 * ko;
      checks++;
      if (!close(got[31:0], w.fx, tf) || !close(got[63:32], w.fy, tf) ||
          !close(got[95:64], w.fz, tf) || !close(got[127:96], w.e, te)) begin
        failures++;
        $display("FAIL atom %0d: got %h", i, got);
      end
    end
    checks++;
    if (u_mem.bank_b.mem[ob + n] !== {4{32'hA5A5_5A5A}} ||
        (ob > 0 && u_mem.bank_b.mem[ob - 1] !== {4{32'hA5A5_5A5A}})) begin
      failures++;
      $display("FAIL: write outside block");
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg.center.x = from_real(cx); cfg.center.y = from_real(cy); cfg.center.z = from_real(cz);
    cfg.r_inner = from_real(ri); cfg.k_inner = from_real(ki);
    cfg.r_outer = from_real(ro); cfg.k_outer = from_real(ko);
    start = 0; in_base = '0; out_base = '0; count = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_block(0, 0, 64);
    run_block(100, 300, 37);
    run_block(5, 9, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
