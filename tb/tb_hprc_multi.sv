// tb_hprc_multi: the four-device runs, with four default-size hprc_accel_top instances.
//
// DMVM: the 2048 x 2048 product is split into four row blocks of 512 rows, one per device,
// all started together; the four result blocks together must equal the full product
// (integer data, so bit-exact), and each device must finish in 512*512 cycles plus a short
// tail, a quarter of the single-device time. SB: the 2,097,152-atom data set is split into
// four shares of 524,288 atoms, one input half-bank per device; every force and energy is
// checked against a double-precision reference and each device must process its share at
// one atom per cycle. Atom distances lie on a grid that misses the outer radius by at least
// 0.003 A: an atom exactly on it may fall on either side once the distance is rounded to
// single precision, and the reference would then pick the other sphere.
module tb_hprc_multi;
  import fp32_pkg::*;
  import sb_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_sb_ref_pkg::*;

  localparam int unsigned N = 2048;
  localparam int unsigned SUBROWS = N / 4;
  localparam int unsigned SEG = 1 << 19;
  localparam int DEV = 4;
  localparam int ROWS = N / DEV;
  localparam int ATOMS = 4 * SEG / DEV;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int A [N][N];
  int B [N];
  real cx = -6.0, cy = 2.5, cz = 18.0, ri = 15.0, ki = 2.0, ro = 24.0, ko = 5.0;
  sb_cfg_t sb_cfg;
  logic go = 0;
  int dev_done = 0;
  int checks = 0, failures = 0;
  int n_inner = 0, n_outer = 0;

  for (genvar d = 0; d < DEV; d++) begin : g_dev
    logic dmvm_start, dmvm_busy, dmvm_done;
    logic [$clog2(N+1)-1:0] dmvm_num_rows;
    logic ram0_rd_en, ram0_rd_valid, ram1_rd_en, ram1_rd_valid, res_wr_en;
    logic [19:0] ram0_rd_addr, ram1_rd_addr, res_wr_addr;
    logic [127:0] ram0_rd_data, ram1_rd_data, res_wr_data;
    logic sb_enable, sb_in_loaded, sb_in_loaded_seg, sb_out_ready, sb_out_ready_seg;
    logic sb_out_unloaded, sb_out_unloaded_seg, sb_wait_load, sb_wait_unload, sb_busy;
    logic [$clog2(SEG+1)-1:0] sb_in_loaded_count, sb_out_ready_count;
    logic [1:0] sb_in_free;
    logic [31:0] sb_seg_count;
    logic bank_a_rd_en, bank_a_rd_valid, bank_b_wr_en;
    logic [19:0] bank_a_rd_addr, bank_b_wr_addr;
    logic [127:0] bank_a_rd_data, bank_b_wr_data;

    hprc_accel_top dut (.*);

    tb_sram_model #(.DEPTH(ROWS * SUBROWS)) u_ram0 (.clk, .rd_en(ram0_rd_en), .rd_addr(ram0_rd_addr),
      .rd_valid(ram0_rd_valid), .rd_data(ram0_rd_data), .wr_en(1'b0), .wr_addr('0), .wr_data('0));
    tb_sram_model #(.DEPTH(SUBROWS)) u_ram1 (.clk, .rd_en(ram1_rd_en), .rd_addr(ram1_rd_addr),
      .rd_valid(ram1_rd_valid), .rd_data(ram1_rd_data), .wr_en(1'b0), .wr_addr('0), .wr_data('0));
    tb_sram_model #(.DEPTH(ROWS / 4)) u_res (.clk, .rd_en(1'b0), .rd_addr('0), .rd_valid(), .rd_data(),
      .wr_en(res_wr_en), .wr_addr(res_wr_addr), .wr_data(res_wr_data));
    tb_sb_bank_pair u_sbmem (.clk, .rd_en(bank_a_rd_en), .rd_addr(bank_a_rd_addr),
      .rd_valid(bank_a_rd_valid), .rd_data(bank_a_rd_data),
      .wr_en(bank_b_wr_en), .wr_addr(bank_b_wr_addr), .wr_data(bank_b_wr_data));

    // host thread of device d
    initial begin
      int cyc;
      longint ref_v;
      logic [127:0] a, got;
      sb_ref_t w;
      real tf, te, ux, uy, uz, un, r;
      int bad;
      dmvm_start = 0; dmvm_num_rows = '0; sb_enable = 0;
      sb_in_loaded = 0; sb_in_loaded_seg = 0; sb_in_loaded_count = '0;
      sb_out_unloaded = 0; sb_out_unloaded_seg = 0;
      wait (go);
      // this device's row block and the whole vector
      for (int rr = 0; rr < ROWS; rr++)
        for (int s = 0; s < SUBROWS; s++)
          for (int e = 0; e < 4; e++)
            u_ram0.mem[rr*SUBROWS + s][32*e +: 32] = from_real(real'(A[d*ROWS + rr][4*s + e]));
      for (int s = 0; s < SUBROWS; s++)
        for (int e = 0; e < 4; e++) u_ram1.mem[s][32*e +: 32] = from_real(real'(B[4*s + e]));
      // this device's share of the atoms, in input half A0
      for (int i = 0; i < ATOMS; i++) begin
        ux = real'(int'($urandom % 2001) - 1000);
        uy = real'(int'($urandom % 2001) - 1000);
        uz = real'(int'($urandom % 2001) - 1000);
        un = $sqrt(ux*ux + uy*uy + uz*uz) + 1e-9;
        r = 31.0 * real'($urandom % 10000) / 10000.0;   // never exactly 24.0
        u_sbmem.bank_a.mem[i] = {32'h0, from_real(cz + r*uz/un), from_real(cy + r*uy/un), from_real(cx + r*ux/un)};
      end
      @(negedge clk);
      dmvm_num_rows = ($clog2(N+1))'(ROWS);
      dmvm_start = 1;
      @(negedge clk);
      dmvm_start = 0;
      cyc = 1;
      while (!dmvm_done) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc < ROWS * SUBROWS || cyc > ROWS * SUBROWS + 16) begin
        failures++;
        $display("FAIL device %0d DMVM: %0d cycles", d, cyc);
      end
      $display("device %0d: DMVM block of %0d rows in %0d cycles", d, ROWS, cyc);
      bad = 0;
      for (int rr = 0; rr < ROWS; rr++) begin
        ref_v = 0;
        for (int c = 0; c < N; c++) ref_v += longint'(A[d*ROWS + rr][c]) * longint'(B[c]);
        if (u_res.mem[rr / 4][32*(rr % 4) +: 32] !== from_real(real'(ref_v))) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL device %0d: %0d wrong rows", d, bad);
      end
      // SB share
      sb_enable = 1;
      sb_in_loaded = 1; sb_in_loaded_seg = 0; sb_in_loaded_count = ($clog2(SEG+1))'(ATOMS);
      @(negedge clk);
      sb_in_loaded = 0;
      cyc = 1;
      while (!sb_out_ready) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc > ATOMS + 32 || sb_out_ready_seg != 1'b1) begin
        failures++;
        $display("FAIL device %0d SB: %0d cycles, half B%0d", d, cyc, sb_out_ready_seg);
      end
      $display("device %0d: SB share of %0d atoms in %0d cycles", d, ATOMS, cyc);
      bad = 0;
      for (int i = 0; i < ATOMS; i++) begin
        a = u_sbmem.bank_a.mem[i];
        got = u_sbmem.bank_b.mem[SEG + i];
        w = sb_reference(to_real(a[31:0]), to_real(a[63:32]), to_real(a[95:64]),
                         cx, cy, cz, ri, ki, ro, ko, 2);
        if (w.outer) n_outer++; else n_inner++;
        tf = 1e-4 * (absr(w.fx) + absr(w.fy) + absr(w.fz)) + 1e-3 * ko;
        te = 1e-4 * absr(w.e) + 1e-3 * ko;
        if (!close(got[31:0], w.fx, tf) || !close(got[63:32], w.fy, tf) ||
            !close(got[95:64], w.fz, tf) || !close(got[127:96], w.e, te)) bad++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        $display("FAIL device %0d: %0d wrong atoms", d, bad);
      end
      dev_done++;
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sb_cfg.center.x = from_real(cx); sb_cfg.center.y = from_real(cy); sb_cfg.center.z = from_real(cz);
    sb_cfg.r_inner = from_real(ri); sb_cfg.k_inner = from_real(ki);
    sb_cfg.r_outer = from_real(ro); sb_cfg.k_outer = from_real(ko);
    for (int c = 0; c < N; c++) B[c] = int'($urandom % 17) - 8;
    for (int rr = 0; rr < N; rr++)
      for (int c = 0; c < N; c++) A[rr][c] = int'($urandom % 33) - 16;
    repeat (3) @(negedge clk);
    rst_n = 1;
    go = 1;
    wait (dev_done == DEV);
    checks++;
    if (n_inner == 0 || n_outer == 0) begin
      failures++;
      $display("FAIL: inner %0d outer %0d", n_inner, n_outer);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
