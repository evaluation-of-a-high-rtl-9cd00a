// tb_hprc_body.svh: the body shared by the top-level testbenches; the including module sets
// N, SUBROWS, SEG, NUM_DMVM_RUNS, DMVM_ROWS, NUM_SEGS, SEG_ATOMS, HOST_DELAY, WATCHDOG and
// ALL_MECH (whether every mechanism counter must be non-zero; evenly sized workloads never
// produce partial words or groups).
// It instantiates hprc_accel_top with its default parameters, the five SRAM bank models and
// a host model, runs the DMVM blocks and then the SB stream, and prints TB_RESULT.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // DMVM ports
  logic dmvm_start, dmvm_busy, dmvm_done;
  logic [$clog2(N+1)-1:0] dmvm_num_rows;
  logic ram0_rd_en, ram0_rd_valid, ram1_rd_en, ram1_rd_valid, res_wr_en;
  logic [19:0] ram0_rd_addr, ram1_rd_addr, res_wr_addr;
  logic [127:0] ram0_rd_data, ram1_rd_data, res_wr_data;
  // SB ports
  sb_cfg_t sb_cfg;
  logic sb_enable, sb_in_loaded, sb_in_loaded_seg, sb_out_ready, sb_out_ready_seg;
  logic sb_out_unloaded, sb_out_unloaded_seg, sb_wait_load, sb_wait_unload, sb_busy;
  logic [$clog2(SEG+1)-1:0] sb_in_loaded_count, sb_out_ready_count;
  logic [1:0] sb_in_free;
  logic [31:0] sb_seg_count;
  logic bank_a_rd_en, bank_a_rd_valid, bank_b_wr_en;
  logic [19:0] bank_a_rd_addr, bank_b_wr_addr;
  logic [127:0] bank_a_rd_data, bank_b_wr_data;

  hprc_accel_top dut (.*);

  tb_sram_model u_ram0 (.clk, .rd_en(ram0_rd_en), .rd_addr(ram0_rd_addr), .rd_valid(ram0_rd_valid),
                        .rd_data(ram0_rd_data), .wr_en(1'b0), .wr_addr('0), .wr_data('0));
  tb_sram_model u_ram1 (.clk, .rd_en(ram1_rd_en), .rd_addr(ram1_rd_addr), .rd_valid(ram1_rd_valid),
                        .rd_data(ram1_rd_data), .wr_en(1'b0), .wr_addr('0), .wr_data('0));
  tb_sram_model #(.DEPTH(N / 4)) u_res (.clk, .rd_en(1'b0), .rd_addr('0), .rd_valid(), .rd_data(),
                        .wr_en(res_wr_en), .wr_addr(res_wr_addr), .wr_data(res_wr_data));
  tb_sb_bank_pair u_sbmem (.clk, .rd_en(bank_a_rd_en), .rd_addr(bank_a_rd_addr),
                           .rd_valid(bank_a_rd_valid), .rd_data(bank_a_rd_data),
                           .wr_en(bank_b_wr_en), .wr_addr(bank_b_wr_addr), .wr_data(bank_b_wr_data));

  int checks = 0, failures = 0;

  // mechanism counters
  int n_pe_groups = 0, n_rows = 0, n_full_words = 0, n_partial_words = 0, n_row_blocks = 0;
  int n_inner = 0, n_outer = 0, n_partial_groups = 0, n_seg_a0 = 0, n_seg_a1 = 0;
  int n_wait_load = 0, n_wait_unload = 0, n_overlap = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.u_dmvm.fire) n_pe_groups++;
    if (dut.u_dmvm.row_valid) n_rows++;
    if (sb_wait_load) n_wait_load++;
    if (sb_wait_unload) n_wait_unload++;
    if (dut.u_sb.fire && dut.u_sb.fire_mask != 4'hF) n_partial_groups++;
    if (dut.u_stream.eng_start) begin
      if (dut.u_stream.eng_in_base == 0) n_seg_a0++; else n_seg_a1++;
    end
    // the host loads one half of bank A while the engine works on the other
    if (sb_in_loaded && sb_busy) n_overlap++;
  end

  // ---------------- DMVM ----------------
  int A [N][N];
  int B [N];

  task automatic dmvm_load();
    for (int c = 0; c < N; c++) B[c] = int'($urandom % 17) - 8;
    for (int s = 0; s < SUBROWS; s++)
      for (int e = 0; e < 4; e++) u_ram1.mem[s][32*e +: 32] = from_real(real'(B[4*s + e]));
  endtask

  task automatic dmvm_run(int rows);
    int cyc;
    longint ref_v;
    // each device of a multi-device run holds its own row block from address 0
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < N; c++) A[r][c] = int'($urandom % 33) - 16;
    for (int r = 0; r < rows; r++)
      for (int s = 0; s < SUBROWS; s++)
        for (int e = 0; e < 4; e++)
          u_ram0.mem[r*SUBROWS + s][32*e +: 32] = from_real(real'(A[r][4*s + e]));
    for (int i = 0; i < N / 4; i++) u_res.mem[i] = {4{32'hDEAD_BEEF}};
    @(negedge clk);
    dmvm_num_rows = ($clog2(N+1))'(rows);
    dmvm_start = 1;
    @(negedge clk);
    dmvm_start = 0;
    cyc = 1;
    while (!dmvm_done) begin
      @(negedge clk);
      cyc++;
    end
    n_row_blocks++;
    if (rows % 4 == 0) n_full_words += rows / 4;
    else begin
      n_full_words += rows / 4;
      n_partial_words++;
    end
    checks++;
    if (cyc < rows * SUBROWS || cyc > rows * SUBROWS + 16) begin
      failures++;
      $display("FAIL dmvm %0d rows: %0d cycles, expected %0d + tail", rows, cyc, rows * SUBROWS);
    end
    for (int r = 0; r < rows; r++) begin
      ref_v = 0;
      for (int c = 0; c < N; c++) ref_v += longint'(A[r][c]) * longint'(B[c]);
      checks++;
      if (u_res.mem[r / 4][32*(r % 4) +: 32] !== from_real(real'(ref_v))) begin
        failures++;
        if (failures < 10)
          $display("FAIL dmvm row %0d: got %h expected %0d", r, u_res.mem[r / 4][32*(r % 4) +: 32], ref_v);
      end
    end
    $display("DMVM block of %0d rows: %0d cycles (%0d per row)", rows, cyc, cyc / rows);
  endtask

  // ---------------- SB ----------------
  real cx = 12.5, cy = -4.0, cz = 30.0, ri = 14.0, ki = 1.5, ro = 22.0, ko = 8.0;
  int  seg_loaded = 0, seg_checked = 0;

  task automatic sb_fill(int seg, int n);
    real ux, uy, uz, un, r;
    for (int i = 0; i < n; i++) begin
      ux = real'(int'($urandom % 2001) - 1000);
      uy = real'(int'($urandom % 2001) - 1000);
      uz = real'(int'($urandom % 2001) - 1000);
      un = $sqrt(ux*ux + uy*uy + uz*uz) + 1e-9;
      r = 30.0 * real'($urandom % 10000) / 10000.0;
      u_sbmem.bank_a.mem[seg * SEG + i] = {32'h0, from_real(cz + r*uz/un), from_real(cy + r*uy/un),
                                           from_real(cx + r*ux/un)};
    end
  endtask

  task automatic sb_check(int oseg, int n);
    sb_ref_t w;
    logic [127:0] a, got;
    real tf, te;
    int iseg = 1 - oseg;
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      a = u_sbmem.bank_a.mem[iseg * SEG + i];
      got = u_sbmem.bank_b.mem[oseg * SEG + i];
      w = sb_reference(to_real(a[31:0]), to_real(a[63:32]), to_real(a[95:64]),
                       cx, cy, cz, ri, ki, ro, ko, 2);
      if (w.outer) n_outer++; else n_inner++;
      tf = 1e-4 * (absr(w.fx) + absr(w.fy) + absr(w.fz)) + 1e-3 * ko;
      te = 1e-4 * absr(w.e) + 1e-3 * ko;
      if (!close(got[31:0], w.fx, tf) || !close(got[63:32], w.fy, tf) ||
          !close(got[95:64], w.fz, tf) || !close(got[127:96], w.e, te)) begin
        bad++;
        if (bad < 5) $display("FAIL sb segment B%0d atom %0d: got %h", oseg, i, got);
      end
    end
    checks++;
    if (bad != 0) failures++;
  endtask

  // host: loads input halves in turn, as soon as they are free
  initial begin
    sb_in_loaded = 0; sb_in_loaded_seg = 0; sb_in_loaded_count = '0;
    wait (rst_n && sb_enable);
    repeat (HOST_DELAY) @(negedge clk);       // controller first waits for a load
    for (int k = 0; k < NUM_SEGS; k++) begin
      while (!sb_in_free[k % 2]) @(negedge clk);
      // the input half is rewritten only after its results have been checked
      while (seg_checked < k - 1) @(negedge clk);
      sb_fill(k % 2, SEG_ATOMS[k]);
      sb_in_loaded = 1; sb_in_loaded_seg = 1'(k % 2);
      sb_in_loaded_count = ($clog2(SEG+1))'(SEG_ATOMS[k]);
      @(negedge clk);
      sb_in_loaded = 0;
      seg_loaded++;
    end
  end

  // out_ready is a one-cycle pulse: the host records each one
  int ready_seg_q [$];
  int ready_cnt_q [$];
  always @(negedge clk) if (rst_n && sb_out_ready) begin
    ready_seg_q.push_back(int'(sb_out_ready_seg));
    ready_cnt_q.push_back(int'(sb_out_ready_count));
  end

  // host: unloads output halves, slowly, so the controller also waits for an unload
  initial begin
    sb_out_unloaded = 0; sb_out_unloaded_seg = 0;
    wait (rst_n && sb_enable);
    for (int k = 0; k < NUM_SEGS; k++) begin
      while (ready_seg_q.size() == 0) @(negedge clk);
      checks++;
      if (ready_seg_q[0] != (k + 1) % 2 || ready_cnt_q[0] != SEG_ATOMS[k]) begin
        failures++;
        $display("FAIL sb out_ready %0d: seg %0d count %0d", k, ready_seg_q[0], ready_cnt_q[0]);
      end
      void'(ready_seg_q.pop_front());
      void'(ready_cnt_q.pop_front());
      sb_check((k + 1) % 2, SEG_ATOMS[k]);
      seg_checked++;
      repeat (HOST_DELAY) @(negedge clk);
      sb_out_unloaded = 1; sb_out_unloaded_seg = 1'((k + 1) % 2);
      @(negedge clk);
      sb_out_unloaded = 0;
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mech(string name, int n, bit always_needed = 1'b1);
    checks++;
    $display("  %-40s %0d", name, n);
    if (n == 0 && (ALL_MECH || always_needed)) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    dmvm_start = 0; dmvm_num_rows = '0; sb_enable = 0;
    sb_cfg.center.x = from_real(cx); sb_cfg.center.y = from_real(cy); sb_cfg.center.z = from_real(cz);
    sb_cfg.r_inner = from_real(ri); sb_cfg.k_inner = from_real(ki);
    sb_cfg.r_outer = from_real(ro); sb_cfg.k_outer = from_real(ko);
    repeat (3) @(negedge clk);
    rst_n = 1;
    dmvm_load();
    for (int i = 0; i < NUM_DMVM_RUNS; i++) dmvm_run(DMVM_ROWS[i]);
    sb_enable = 1;
    while (seg_checked < NUM_SEGS) @(negedge clk);
    repeat (HOST_DELAY + 5) @(negedge clk);
    checks++;
    if (sb_seg_count != 32'(NUM_SEGS)) begin
      failures++;
      $display("FAIL: %0d segments counted", sb_seg_count);
    end
    $display("mechanisms:");
    mech("DMVM element groups fired (16 products)", n_pe_groups);
    mech("DMVM rows accumulated", n_rows);
    mech("DMVM row blocks (one per device)", n_row_blocks);
    mech("DMVM full result words", n_full_words);
    mech("DMVM partial result words", n_partial_words, 1'b0);
    mech("SB atoms on the inner sphere", n_inner);
    mech("SB atoms on the outer sphere", n_outer);
    mech("SB partial groups of atoms", n_partial_groups, 1'b0);
    mech("SB segments A0->B1", n_seg_a0);
    mech("SB segments A1->B0", n_seg_a1);
    mech("SB cycles waiting for a load", n_wait_load);
    mech("SB cycles waiting for an unload", n_wait_unload, 1'b0);
    mech("SB loads overlapping computation", n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
