// tb_hprc_accel_top: end-to-end test of both accelerators at the top level's default sizes.
//
// DMVM: a 2048 x 2048 integer-valued matrix and vector are placed in the RAM0/RAM1 models and
// several row blocks are multiplied (as separate devices of a multi-device run would), with
// block sizes that end on a full and on a partial result word. Integer data makes every
// single-precision sum exact, so results are compared bit for bit, and each run must take
// num_rows*512 cycles plus a short tail.
//
// SB: a host process streams atoms through the two halves of bank A and collects results from
// the two halves of bank B, loading and unloading with delays so that the controller has to
// wait for both. Atom blocks include partial groups of four and atoms inside the inner
// sphere, between the spheres and beyond the outer one. Results are checked against a
// double-precision reference.
//
// Each mechanism is counted and a failure is recorded for any that never happened.
// The sizes of the workloads are the localparams below.
module tb_hprc_accel_top;
  import fp32_pkg::*;
  import sb_pkg::*;
  import tb_fp_ref_pkg::*;
  import tb_sb_ref_pkg::*;

  localparam int unsigned N = 2048;
  localparam int unsigned SUBROWS = N / 4;
  localparam int unsigned SEG = 1 << 19;
  localparam int NUM_DMVM_RUNS = 2;
  localparam int DMVM_ROWS [NUM_DMVM_RUNS] = '{4, 7};
  localparam int NUM_SEGS = 5;
  localparam int SEG_ATOMS [NUM_SEGS] = '{40, 13, 64, 1, 30};
  localparam int HOST_DELAY = 60;
  localparam bit ALL_MECH = 1'b1;
  localparam longint WATCHDOG = 64'd2_000_000;
`include "tb_hprc_body.svh"
endmodule
