// dmvm_engine: single-precision dense matrix-vector multiply, y = A * b.
//
// The N x N matrix A sits row by row in memory bank RAM0 and the length-N column vector b in
// bank RAM1, both as 128-bit words of four floats (element 0 in the low 32 bits), so a row is
// SUBROWS = N/4 subrows and row r, subrow s lives at RAM0 word r*SUBROWS + s, vector subrow s
// at RAM1 word s. Each cycle the address generator reads one word from each bank. Returning
// words are gathered in groups of PES subrows; a full group goes to PES subrow dot-product
// elements in parallel (4 x 4 = 16 products), their outputs are summed by a second two-level
// reduction tree, and row_accumulator adds ITERS = SUBROWS/PES of those sums into the row's
// dot product. Row results are packed four to a 128-bit word (row 4k+j in lane j) and written
// to the result port at word address row/4; a final partial word is zero-filled.
//
// Interface: pulse start with num_rows (1..N, the rows of the block this device holds);
// busy stays high until the last result word has been written, then done pulses. Memory reads
// return on *_rd_valid after any fixed latency, identical for both banks; both are
// always-ready, as are writes. Timing: reading takes num_rows*SUBROWS cycles (one 128-bit
// word per bank per cycle), and the last result follows about eight cycles after the last
// read returns. The bank layout, the four parallel elements and the two reduction trees
// follow the optimized design; the one-word-per-cycle gather, the result packing and the
// handshake are this design's choices.
module dmvm_engine
  import fp32_pkg::*;
#(
  parameter int unsigned N      = 2048,
  parameter int unsigned ELEMS  = 4,
  parameter int unsigned PES    = 4,
  localparam int unsigned SUBROWS = N / ELEMS,
  localparam int unsigned ITERS   = SUBROWS / PES,
  localparam int unsigned ADDR_W  = $clog2(N * SUBROWS),
  localparam int unsigned ROW_W   = $clog2(N + 1),
  localparam int unsigned WORD_W  = 32 * ELEMS
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ROW_W-1:0]  num_rows,
  output logic              busy,
  output logic              done,
  // RAM0: matrix rows
  output logic              m_rd_en,
  output logic [ADDR_W-1:0] m_rd_addr,
  input  logic              m_rd_valid,
  input  logic [WORD_W-1:0] m_rd_data,
  // RAM1: column vector
  output logic              v_rd_en,
  output logic [ADDR_W-1:0] v_rd_addr,
  input  logic              v_rd_valid,
  input  logic [WORD_W-1:0] v_rd_data,
  // result words
  output logic              r_wr_en,
  output logic [ADDR_W-1:0] r_wr_addr,
  output logic [WORD_W-1:0] r_wr_data
);

  localparam int unsigned GW = (PES > 1) ? $clog2(PES) : 1;
  localparam int unsigned SW = (SUBROWS > 1) ? $clog2(SUBROWS) : 1;

  // ---------------- address generation ----------------
  logic              reading;
  logic [ADDR_W:0]   rd_left;
  logic [ADDR_W-1:0] m_addr;
  logic [SW-1:0]     v_sub;
  logic [ROW_W-1:0]  rows_q;

  assign m_rd_en   = reading;
  assign v_rd_en   = reading;
  assign m_rd_addr = m_addr;
  assign v_rd_addr = ADDR_W'(v_sub);

  // ---------------- gather ----------------
  fp32_t          ga [PES][ELEMS];
  fp32_t          gb [PES][ELEMS];
  logic [GW-1:0]  gidx;
  logic           fire;

  // ---------------- compute ----------------
  logic           pe_valid [PES];
  fp32_t          pe_dot   [PES];
  logic           tree_valid;
  fp32_t          tree_sum;
  logic           row_valid;
  fp32_t          row_sum;

  // ---------------- result packing ----------------
  logic [ROW_W-1:0]   rows_done;
  fp32_t              pack [ELEMS];
  int unsigned        lane;
  logic               last_q;

  assign lane = int'(rows_done) % ELEMS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      busy      <= 1'b0;
      done      <= 1'b0;
      rd_left   <= '0;
      m_addr    <= '0;
      v_sub     <= '0;
      rows_q    <= '0;
      gidx      <= '0;
      fire      <= 1'b0;
      rows_done <= '0;
      last_q    <= 1'b0;
      r_wr_en   <= 1'b0;
      r_wr_addr <= '0;
      r_wr_data <= '0;
      for (int p = 0; p < PES; p++)
        for (int e = 0; e < ELEMS; e++) begin
          ga[p][e] <= FP32_ZERO;
          gb[p][e] <= FP32_ZERO;
        end
      for (int j = 0; j < ELEMS; j++) pack[j] <= FP32_ZERO;
    end else begin
      done    <= 1'b0;
      r_wr_en <= 1'b0;
      last_q  <= 1'b0;
      // the last result word was written on the previous edge
      if (last_q) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
      fire    <= 1'b0;

      if (start && !busy && num_rows != '0) begin
        busy      <= 1'b1;
        reading   <= 1'b1;
        rd_left   <= (ADDR_W + 1)'(num_rows) * (ADDR_W + 1)'(SUBROWS);
        m_addr    <= '0;
        v_sub     <= '0;
        rows_q    <= num_rows;
        rows_done <= '0;
        gidx      <= '0;
        for (int j = 0; j < ELEMS; j++) pack[j] <= FP32_ZERO;
      end else if (reading) begin
        m_addr  <= m_addr + 1'b1;
        v_sub   <= (v_sub == SW'(SUBROWS - 1)) ? '0 : v_sub + 1'b1;
        rd_left <= rd_left - 1'b1;
        if (rd_left == (ADDR_W + 1)'(1)) reading <= 1'b0;
      end

      // gather PES subrows from each bank, then fire the elements
      if (m_rd_valid) begin
        for (int e = 0; e < ELEMS; e++) begin
          ga[gidx][e] <= m_rd_data[32*e +: 32];
          gb[gidx][e] <= v_rd_data[32*e +: 32];
        end
        if (gidx == GW'(PES - 1)) begin
          gidx <= '0;
          fire <= 1'b1;
        end else begin
          gidx <= gidx + 1'b1;
        end
      end

      // pack finished rows, four per result word
      if (row_valid) begin
        pack[lane] <= row_sum;
        rows_done <= rows_done + 1'b1;
        if (lane == ELEMS - 1 || rows_done + 1'b1 == rows_q) begin
          r_wr_en   <= 1'b1;
          r_wr_addr <= ADDR_W'(int'(rows_done) / ELEMS);
          for (int j = 0; j < ELEMS; j++) begin
            if (j == lane)      r_wr_data[32*j +: 32] <= row_sum;
            else if (j < lane)  r_wr_data[32*j +: 32] <= pack[j];
            else                             r_wr_data[32*j +: 32] <= FP32_ZERO;
          end
        end
        if (rows_done + 1'b1 == rows_q) last_q <= 1'b1;
      end
    end
  end

  for (genvar p = 0; p < PES; p++) begin : g_pe
    subrow_dot_pe #(.ELEMS(ELEMS)) u_pe (
      .clk(clk), .rst_n(rst_n), .in_valid(fire), .a(ga[p]), .b(gb[p]),
      .out_valid(pe_valid[p]), .dot(pe_dot[p])
    );
  end

  fp_add_tree4 u_pe_tree (
    .clk(clk), .rst_n(rst_n), .in_valid(pe_valid[0]), .x(pe_dot),
    .out_valid(tree_valid), .sum(tree_sum)
  );

  row_accumulator #(.ITERS(ITERS)) u_acc (
    .clk(clk), .rst_n(rst_n), .in_valid(tree_valid), .in_data(tree_sum),
    .row_valid(row_valid), .row_sum(row_sum)
  );

  // Both banks are read in lock step and must answer in the same cycle.
  a_banks_aligned: assert property (@(posedge clk) disable iff (!rst_n) m_rd_valid == v_rd_valid)
    else $error("dmvm_engine: RAM0 and RAM1 read data out of step");

  initial begin
    assert (PES == 4) else $error("dmvm_engine: the element reduction tree takes four inputs");
    assert (N % (ELEMS * PES) == 0) else $error("dmvm_engine: N must be a multiple of ELEMS*PES");
  end

endmodule
