// tb_hprc_full: full-size run of both accelerators with every top-level parameter at its
// default.
//
// DMVM: one complete 2048 x 2048 matrix-vector multiply, i.e. all 2048 rows held by a single
// device (about 1.05 million cycles). SB: the full 32 MB data set of 2,097,152 atoms,
// streamed as four segments of 524,288 atoms through the two halves of banks A and B (about
// 2.1 million cycles). Checks, mechanism counters and host behaviour are those of
// tb_hprc_accel_top.
module tb_hprc_full;
  import fp32_pkg::*;
  import sb_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_sb_ref_pkg::*;

  localparam int unsigned N = 2048;
  localparam int unsigned SUBROWS = N / 4;
  localparam int unsigned SEG = 1 << 19;
  localparam int NUM_DMVM_RUNS = 1;
  localparam int DMVM_ROWS [NUM_DMVM_RUNS] = '{2048};
  localparam int NUM_SEGS = 4;
  localparam int SEG_ATOMS [NUM_SEGS] = '{524288, 524288, 524288, 524288};
  localparam int HOST_DELAY = 60;
  localparam bit ALL_MECH = 1'b0;
  localparam longint WATCHDOG = 64'd6_000_000;
`include "tb_hprc_body.svh"
endmodule
