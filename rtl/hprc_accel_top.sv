// hprc_accel_top: the two single-precision accelerators, side by side.
//
// Each half is a separate application for one FPGA of a reconfigurable computer whose FPGAs
// sit between a host and their own external SRAM banks (128 bits per cycle per bank):
//
//  * DMVM, dense matrix-vector multiply: dmvm_engine reads matrix rows from bank RAM0 and the
//    column vector from bank RAM1, runs four subrow dot-product elements in parallel with two
//    levels of reduction trees and a loop-carried row accumulator, and writes the row results
//    (four per word) to a result port. Multi-device runs give each device a block of rows
//    (dmvm_num_rows).
//  * SB, spherical boundary conditions: sb_engine pushes atoms from input bank A through four
//    atom pipelines and writes force and energy words to output bank B, while stream_ctrl
//    alternates between the two halves of each bank so the host can load and unload the other
//    half at the same time.
//
// The memories, the host and its transfers are outside this module: their signals are ports.
// All ports are synchronous to clk (100 MHz on the original platform); rst_n is an
// active-low asynchronous reset. Default sizes: a 2048 x 2048 matrix in 16 MB banks, and
// 16 MB SB banks split into two 8 MB segments of 524288 atoms.
module hprc_accel_top
  import fp32_pkg::*;
  import sb_pkg::*;
#(
  parameter int unsigned DMVM_N       = 2048,
  parameter int unsigned DMVM_PES     = 4,
  parameter int unsigned SB_PES       = 4,
  parameter int unsigned SB_EXP       = 2,
  parameter int unsigned SB_ADDR_W    = 20,
  parameter int unsigned SB_SEG_WORDS = 1 << 19,
  localparam int unsigned D_ADDR_W = $clog2(DMVM_N * DMVM_N / 4),
  localparam int unsigned D_ROW_W  = $clog2(DMVM_N + 1),
  localparam int unsigned SEG_CW   = $clog2(SB_SEG_WORDS + 1)
)(
  input  logic                 clk,
  input  logic                 rst_n,

  // ---------------- DMVM ----------------
  input  logic                 dmvm_start,
  input  logic [D_ROW_W-1:0]   dmvm_num_rows,
  output logic                 dmvm_busy,
  output logic                 dmvm_done,
  output logic                 ram0_rd_en,
  output logic [D_ADDR_W-1:0]  ram0_rd_addr,
  input  logic                 ram0_rd_valid,
  input  logic [127:0]         ram0_rd_data,
  output logic                 ram1_rd_en,
  output logic [D_ADDR_W-1:0]  ram1_rd_addr,
  input  logic                 ram1_rd_valid,
  input  logic [127:0]         ram1_rd_data,
  output logic                 res_wr_en,
  output logic [D_ADDR_W-1:0]  res_wr_addr,
  output logic [127:0]         res_wr_data,

  // ---------------- SB ----------------
  input  sb_cfg_t              sb_cfg,
  input  logic                 sb_enable,
  input  logic                 sb_in_loaded,
  input  logic                 sb_in_loaded_seg,
  input  logic [SEG_CW-1:0]    sb_in_loaded_count,
  output logic [1:0]           sb_in_free,
  output logic                 sb_out_ready,
  output logic                 sb_out_ready_seg,
  output logic [SEG_CW-1:0]    sb_out_ready_count,
  input  logic                 sb_out_unloaded,
  input  logic                 sb_out_unloaded_seg,
  output logic                 sb_wait_load,
  output logic                 sb_wait_unload,
  output logic [31:0]          sb_seg_count,
  output logic                 sb_busy,
  output logic                 bank_a_rd_en,
  output logic [SB_ADDR_W-1:0] bank_a_rd_addr,
  input  logic                 bank_a_rd_valid,
  input  logic [127:0]         bank_a_rd_data,
  output logic                 bank_b_wr_en,
  output logic [SB_ADDR_W-1:0] bank_b_wr_addr,
  output logic [127:0]         bank_b_wr_data
);

  dmvm_engine #(.N(DMVM_N), .PES(DMVM_PES)) u_dmvm (
    .clk, .rst_n,
    .start(dmvm_start), .num_rows(dmvm_num_rows), .busy(dmvm_busy), .done(dmvm_done),
    .m_rd_en(ram0_rd_en), .m_rd_addr(ram0_rd_addr), .m_rd_valid(ram0_rd_valid), .m_rd_data(ram0_rd_data),
    .v_rd_en(ram1_rd_en), .v_rd_addr(ram1_rd_addr), .v_rd_valid(ram1_rd_valid), .v_rd_data(ram1_rd_data),
    .r_wr_en(res_wr_en), .r_wr_addr(res_wr_addr), .r_wr_data(res_wr_data)
  );

  logic                 eng_start, eng_done;
  logic [SB_ADDR_W-1:0] eng_in_base, eng_out_base;
  logic [SB_ADDR_W:0]   eng_count;

  stream_ctrl #(.ADDR_W(SB_ADDR_W), .SEG_WORDS(SB_SEG_WORDS)) u_stream (
    .clk, .rst_n, .enable(sb_enable),
    .in_loaded(sb_in_loaded), .in_loaded_seg(sb_in_loaded_seg), .in_loaded_count(sb_in_loaded_count),
    .in_free(sb_in_free),
    .out_ready(sb_out_ready), .out_ready_seg(sb_out_ready_seg), .out_ready_count(sb_out_ready_count),
    .out_unloaded(sb_out_unloaded), .out_unloaded_seg(sb_out_unloaded_seg),
    .wait_load(sb_wait_load), .wait_unload(sb_wait_unload), .seg_count(sb_seg_count),
    .eng_start, .eng_in_base, .eng_out_base, .eng_count, .eng_done
  );

  sb_engine #(.PES(SB_PES), .EXP(SB_EXP), .ADDR_W(SB_ADDR_W)) u_sb (
    .clk, .rst_n, .cfg(sb_cfg),
    .start(eng_start), .in_base(eng_in_base), .out_base(eng_out_base), .count(eng_count),
    .busy(sb_busy), .done(eng_done),
    .rd_en(bank_a_rd_en), .rd_addr(bank_a_rd_addr), .rd_valid(bank_a_rd_valid), .rd_data(bank_a_rd_data),
    .wr_en(bank_b_wr_en), .wr_addr(bank_b_wr_addr), .wr_data(bank_b_wr_data)
  );

endmodule
