// sb_engine: spherical-boundary force and energy over a block of atoms, four atoms at a time.
//
// Input bank A holds one atom per 128-bit word (x, y, z from the low end, top word unused);
// output bank B receives one result per word (Fx, Fy, Fz from the low end, energy on top),
// at the same index. After start the engine reads count words from in_base, one per cycle.
// Returning words are gathered in groups of PES atoms and handed to PES atom pipelines
// (sb_pe) in parallel; the last group may be partial. Finished groups enter a result queue of
// 2*PES entries that drains one word per cycle to bank B from out_base upwards. busy is high
// from start until the last result word has been written, and done pulses after it.
//
// Timing: count read cycles, then the pipeline latency (12 cycles) plus the gather and drain
// of the last group, so count + about 20 cycles per block. Memory reads return after any fixed
// latency with rd_valid; both ports are always ready. The four parallel pipelines and the
// memory layouts follow the design; the one-word-per-cycle gather and drain, which keeps the
// banks at their 128 bits per cycle, is this design's choice. The configuration is sampled
// at start.
module sb_engine
  import fp32_pkg::*;
  import sb_pkg::*;
#(
  parameter int unsigned PES    = 4,
  parameter int unsigned EXP    = 2,
  parameter int unsigned ADDR_W = 20
)(
  input  logic              clk,
  input  logic              rst_n,
  input  sb_cfg_t           cfg,
  input  logic              start,
  input  logic [ADDR_W-1:0] in_base,
  input  logic [ADDR_W-1:0] out_base,
  input  logic [ADDR_W:0]   count,
  output logic              busy,
  output logic              done,
  // bank A: atom positions
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_valid,
  input  logic [127:0]      rd_data,
  // bank B: forces and energies
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [127:0]      wr_data
);

  localparam int unsigned GW = (PES > 1) ? $clog2(PES) : 1;
  localparam int unsigned QD = 2 * PES;
  localparam int unsigned QW = $clog2(QD);

  sb_cfg_t           cfg_q;
  logic [ADDR_W:0]   rd_left, rx_left, wr_left;
  logic [ADDR_W-1:0] rd_ptr, wr_ptr;

  // gather
  vec3_t             gpos [PES];
  logic [PES-1:0]    gmask;
  logic [GW-1:0]     gidx;
  logic              fire;
  logic [PES-1:0]    fire_mask;

  // pipelines
  logic              pe_valid [PES];
  sb_result_t        pe_res [PES];
  logic [PES-1:0]    mask_pipe [12];

  // result queue
  sb_result_t        q [QD];
  logic [QW-1:0]     q_head, q_tail;
  logic [QW:0]       q_cnt;
  int unsigned       push_n;

  assign rd_en   = busy && (rd_left != '0);
  assign rd_addr = rd_ptr;

  always_comb begin
    push_n = 0;
    if (pe_valid[0])
      for (int p = 0; p < PES; p++) if (mask_pipe[11][p]) push_n++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q   <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      rd_left <= '0;
      rx_left <= '0;
      wr_left <= '0;
      rd_ptr  <= '0;
      wr_ptr  <= '0;
      gidx    <= '0;
      gmask   <= '0;
      fire    <= 1'b0;
      fire_mask <= '0;
      for (int p = 0; p < PES; p++) gpos[p] <= '0;
      for (int i = 0; i < 12; i++) mask_pipe[i] <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
      q_head  <= '0;
      q_tail  <= '0;
      q_cnt   <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      fire  <= 1'b0;

      if (start && !busy && count != '0) begin
        busy    <= 1'b1;
        cfg_q   <= cfg;
        rd_left <= count;
        rx_left <= count;
        wr_left <= count;
        rd_ptr  <= in_base;
        wr_ptr  <= out_base;
        gidx    <= '0;
        gmask   <= '0;
      end

      if (rd_en) begin
        rd_ptr  <= rd_ptr + 1'b1;
        rd_left <= rd_left - 1'b1;
      end

      // gather PES atoms, or fewer at the end of the block
      if (rd_valid && busy) begin
        gpos[gidx]  <= word_to_pos(rd_data);
        rx_left     <= rx_left - 1'b1;
        if (gidx == GW'(PES - 1) || rx_left == (ADDR_W + 1)'(1)) begin
          gidx      <= '0;
          gmask     <= '0;
          fire      <= 1'b1;
          fire_mask <= gmask | (PES'(1) << gidx);
        end else begin
          gidx  <= gidx + 1'b1;
          gmask <= gmask | (PES'(1) << gidx);
        end
      end

      // lane masks travel beside the pipelines (12 stages, as sb_pe)
      mask_pipe[0] <= fire ? fire_mask : '0;
      for (int i = 1; i < 12; i++) mask_pipe[i] <= mask_pipe[i-1];

      // queue: push a finished group, pop one word per cycle
      if (pe_valid[0]) begin
        for (int p = 0; p < PES; p++)
          if (mask_pipe[11][p]) q[QW'(int'(q_tail) + p)] <= pe_res[p];
        q_tail <= QW'(int'(q_tail) + push_n);
      end
      if (q_cnt != '0) begin
        wr_en   <= 1'b1;
        wr_addr <= wr_ptr;
        wr_data <= result_to_word(q[q_head]);
        wr_ptr  <= wr_ptr + 1'b1;
        q_head  <= q_head + 1'b1;
        wr_left <= wr_left - 1'b1;
      end
      q_cnt <= q_cnt + (QW + 1)'(push_n) - ((q_cnt != '0) ? (QW + 1)'(1) : '0);

      // the last result word was written on the previous edge
      if (busy && wr_left == '0 && !wr_en) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  for (genvar p = 0; p < PES; p++) begin : g_pe
    sb_pe #(.EXP(EXP)) u_pe (
      .clk, .rst_n, .cfg(cfg_q), .in_valid(fire), .pos(gpos[p]),
      .out_valid(pe_valid[p]), .res(pe_res[p]));
  end

  a_queue_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) q_cnt <= (QW + 1)'(QD))
    else $error("sb_engine: result queue overflow");

  initial assert (QD == (1 << QW)) else $error("sb_engine: PES must be a power of two");

endmodule
