# Single-precision FPGA kernels: dense matrix-vector multiply and spherical boundary forces

This is SystemVerilog RTL for two floating-point kernels that were originally written in a
dataflow high-level language for an FPGA-accelerated server (an SGI Altix with RASC RC100
blades, described in *Evaluation of a High-Level-Language Methodology for High-Performance
Reconfigurable Computers*). Each FPGA sits between a host and its own external QDR SRAM
banks. Each bank delivers one 128-bit word, four single-precision floats, per 100 MHz
cycle. The two kernels are:

* **DMVM**, the dense matrix-vector product `y = A·b` for a 2048 × 2048 matrix. The matrix
  streams from one bank and the vector from another. Four dot-product elements of four
  multipliers each, two adder trees and a loop-carried accumulator turn them into row results.
* **SB**, spherical boundary conditions for molecular dynamics. Each atom of a protein in
  water gets a harmonic restraining force and energy from two concentric spheres. Four
  independent atom pipelines run side by side. A double-buffering controller streams data
  sets larger than the banks through them.

The top module `hprc_accel_top` holds both kernels side by side. On the original platform
they were separate FPGA images. They share only clock and reset. The memories and the host
stay outside the RTL and connect through ports.

## Number format

All arithmetic is IEEE-754 binary32 with round-to-nearest-even. Subnormal inputs are
treated as zero and subnormal results are flushed to zero. Every NaN result is `0x7FC00000`.
The operators (`fp_add`, `fp_mul`, `fp_div`, `fp_sqrt`) are **combinational**. The blocks
that use them put a register after each operator, so every pipeline stage is one
operator deep. This is correct but would not reach 100 MHz on an FPGA. For that, the divider,
the square root and the adder would need internal pipelining, and every block's latency
would grow. The shared rounding step is `fp32_round_pack` in `fp32_pkg`.

## DMVM: how a row is computed

**Layout.** A row of 2048 floats is 512 *subrows* of four floats, one 128-bit word each.
Row `r`, subrow `s` lives in RAM0 at word `r*512 + s`. Vector subrow `s` lives in RAM1 at
word `s`. Element 0 is in bits 31:0 of a word. The whole matrix is 1,048,576 words: exactly one
16 MB bank.

**Dataflow** (`dmvm_engine`):

```
 RAM0 word ─┐                 ┌ subrow_dot_pe 0 ┐
            ├─ gather 4 words ┼ subrow_dot_pe 1 ┼─ fp_add_tree4 ── row_accumulator ── pack 4 rows ── result port
 RAM1 word ─┘   (4 cycles)    ├ subrow_dot_pe 2 ┤   (2 levels)      (128 sums/row)
                              └ subrow_dot_pe 3 ┘
```

* The address generator reads one word from each bank every cycle, running through
  `num_rows × 512` matrix words. The vector address wraps every 512 words.
* The returning words are gathered in groups of four subrow pairs. A full group *fires*
  the four `subrow_dot_pe` elements together. Each element forms four products and sums them in a
  two-level tree: `(p0+p1)+(p2+p3)`. That makes 16 products per firing.
* A second two-level tree (`fp_add_tree4`) sums the four element results.
* `row_accumulator` adds 128 such sums, one per firing, into the row's dot product. Its
  adder closes the loop in a single cycle, so arrivals at any rate are safe.
* Row results are packed four per word (row `4k+j` in lane `j`) and written to word `k` of the
  result port. A final partial word is zero-filled.

**Rate.** The banks deliver only 128 bits per cycle, so the 16-product datapath fires once
every four cycles. The engine sustains 4 multiply-adds per cycle, and a row takes 512 cycles.
A full 2048-row product takes 1,048,576 cycles plus an 11-cycle pipeline tail, which is
10.5 ms at 100 MHz. A four-device run (512 rows each) takes 262,155 cycles per device.
The engine is limited by memory bandwidth. The four elements and the trees matter because they cut the loop-carried accumulation from 512 to 128 additions per row.
If wider memory were available, only the gather stage would change.

**Multi-FPGA runs** split the matrix into row blocks, one block per device. Each device
holds its block from address 0 and is started with its row count on `dmvm_num_rows`.

**Handshake.** Pulse `dmvm_start` with `dmvm_num_rows` set (1 to 2048). `dmvm_busy` stays high until
the last result word has been written. `dmvm_done` then pulses for one cycle. Reads are
issued without back-pressure. Both banks must return data with the same fixed latency,
flagged by `*_rd_valid`; an assertion checks this.

## SB: force and energy of one atom

For atom position **r**ᵢ, sphere centre **r**c, sphere radius `r_s`, force constant `k_s` and
exponent `n` (2 by default):

```
dist  = |r_i − r_c|
E     = k_s · (dist − r_s)^n
F     = n · k_s · (dist − r_s)^(n−1) · (r_c − r_i) / dist
```

The unit vector points from the atom towards the centre. An atom farther from the centre than
the outer radius uses the outer sphere's `r_s`, `k_s`. Every other atom uses the inner
sphere's values, including atoms inside the inner sphere. An atom exactly at the centre gets
zero force.

**Pipeline** (`sb_pe`, 12 cycles, one atom per cycle):

| stage | work |
|---|---|
| 1 | `d = r_c − r_i` (three subtractions) |
| 2 | squares of the components |
| 3 | their sum |
| 4 | square root: `dist` |
| 5 | `1/dist` (one divider shared by both spheres), boundary decision `dist > r_outer` |
| 6–11 | two `sb_sphere_calc` branches in parallel, inner and outer: `delta`, `delta^(n−1)`, `k·delta^(n−1)`, energy and `n·k·delta^(n−1)`, scale by `1/dist`, three force components |
| 12 | the boundary decision (delayed alongside) selects one branch's result |

Both branches are computed and one result is selected, as in the original dataflow design.
The exponent is an integer elaboration parameter (`SB_EXP`): `delta^(n−1)` is a chain of
`n−2` multipliers.

**Memory words.** An input word holds x, y and z from bit 0 upwards; the top 32 bits are ignored.
An output word holds Fx, Fy and Fz from bit 0 upwards, with the energy in bits 127:96. Result
`i` is written at the same offset as atom `i`.

**Engine** (`sb_engine`). The engine reads `count` words from `in_base`, one per cycle. It
gathers four atoms and starts the four pipelines together. The last group may be partial:
a lane mask travels alongside the pipelines. Finished groups enter an 8-entry queue that
writes one word per cycle from `out_base`. Throughput is one atom per cycle, matching one
128-bit bank word per cycle in each direction. A block of `count` atoms takes about
`count + 20` cycles. Through the streaming controller, from the host's load pulse to
`sb_out_ready`, it is the atom count plus 25 cycles: 524,313 cycles for a half of 524,288
atoms. The configuration (centre, radii, constants) is sampled at start.

## SB: streaming through half-banks

The full data set, 2,097,152 atoms (32 MB), is larger than the 16 MB input bank. Bank A
(input) and bank B (output) are each split into two halves of 524,288 words. While the engine
works on input half `s` and writes output half `1−s`, the host fills the other input half
and drains the other output half. `stream_ctrl` sequences this:

```
  segment 0: A0 → B1      host meanwhile loads A1, unloads B0
  segment 1: A1 → B0      host meanwhile loads A0, unloads B1
  segment 2: A0 → B1      ...
```

* Host → controller: `sb_in_loaded` (pulse) with `sb_in_loaded_seg` and
  `sb_in_loaded_count` announces a filled input half. `sb_out_unloaded` (pulse) with
  `sb_out_unloaded_seg` returns an output half after the host has copied it out.
* Controller → host: `sb_in_free[1:0]` shows which input halves may be (re)filled.
  `sb_out_ready` (pulse) with `sb_out_ready_seg` and `sb_out_ready_count` announces a
  finished output half. `sb_seg_count` counts finished segments.
* A segment starts when its input half is loaded **and** its output half has been unloaded.
  Otherwise the controller waits, and `sb_wait_load` or `sb_wait_unload` shows which side it
  waits for. Halves are processed alternately, starting with A0, so the host must fill them
  in that order.
* Assertions flag a load into a half still in use and an unload of a half that is not full.

Multi-FPGA SB runs give each device a share of the atoms (1,048,576 or 524,288 for two or
four devices), i.e. two segments or one.

## Parameters of `hprc_accel_top`

| parameter | default | meaning |
|---|---|---|
| `DMVM_N` | 2048 | matrix order; must be a multiple of 16 |
| `DMVM_PES` | 4 | subrow dot-product elements (the reduction tree is fixed at four) |
| `SB_PES` | 4 | atom pipelines (power of two) |
| `SB_EXP` | 2 | integer exponent of the boundary potential |
| `SB_ADDR_W` | 20 | word address width of the SB banks (16 MB of 128-bit words) |
| `SB_SEG_WORDS` | 524288 | atoms per half-bank segment |

The DMVM address width follows from `DMVM_N`: 20 bits at 2048.

## Where this RTL makes its own choices

These points were not fixed by the original description and were decided here:

* number format details: rounding, subnormals, NaN; combinational operators
* one 128-bit word per bank per cycle with a gather stage, hence 4 (DMVM) multiply-adds and
  1 (SB) atom per cycle
* where DMVM results go (a separate result port, four per word) and the start/busy/done
  handshake
* the matrix word address `row*512 + subrow` and the lane order inside words
* the SB boundary rule for atoms inside the inner sphere and at the centre; the strict `>`
  at the outer radius
* the half-bank size (half of the 16 MB bank), the order of halves and the host handshake
  of the streaming controller
* all pipeline depths and the active-low asynchronous reset

Not built: the external SRAMs, the vendor memory/communication wrapper, the TIO/NUMAlink
interconnect, the loader FPGA and all host software (partitioning, wide-scaling, threads).
Testbenches model the SRAM banks (`tb_sram_model`) and the host.

## Verification

Each block has a self-checking testbench in `tb/` ending with a
`TB_RESULT checks=N failures=M` line. Expected values are computed independently. A
testbench package converts between binary32 and double and rounds doubles to single
precision. Because double precision has more than twice the significand bits, an add, multiply,
divide or square root done in double and then rounded is the correctly rounded single result.
The operator testbenches therefore compare bit for bit.

| testbench | what it shows |
|---|---|
| `tb_fp_mul`, `tb_fp_add`, `tb_fp_div`, `tb_fp_sqrt` | thousands of random operands bit-exact, plus special values |
| `tb_fp_add_tree4`, `tb_subrow_dot_pe` | bit-exact sums/dot products, latencies 2 and 3 |
| `tb_row_accumulator` | bit-exact row sums with random input gaps, one result per 8 inputs |
| `tb_dmvm_engine` | N = 64: exact integer products, random data, a partial last word, cycle count |
| `tb_sb_sphere_calc` | exponents 2 and 3, latency 6 |
| `tb_sb_pe` | inner, between and outer atoms, atom at the centre, latency 12 |
| `tb_sb_engine` | blocks of 64, 37 and 1 atoms at different base addresses, one atom per cycle |
| `tb_stream_ctrl` | half ordering, base addresses, waits for load and for unload |
| `tb_hprc_accel_top` | default-size top: DMVM row blocks of 4 and 7 rows, five SB segments with slow host; counts every mechanism (element firings, partial words, both spheres, partial groups, both halves, both waits, overlapped loads) |
| `tb_hprc_multi` | four default-size tops as a four-device run: the 2048 × 2048 product as four 512-row blocks (bit-exact, a quarter of the single-device time each) and 4 × 524,288 atoms, one share per device |
| `tb_hprc_full` | default-size top, full workloads: one complete 2048 × 2048 product (bit-exact on integer data) and all 2,097,152 atoms streamed as four segments; about 20 s of simulation |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_hprc_accel_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/fp32_pkg.sv rtl/sb_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_sb_ref_pkg.sv tb/tb_hprc_accel_top.sv
./obj_dir/Vtb_hprc_accel_top
```

Replace the top-module name and the last file to run another testbench. The SB checks use a
tolerance of 1e-4 relative plus 1e-3·k absolute, because the double-precision reference does
not round after each step. The design is checked only in simulation: it has not been
placed and routed on an FPGA.

## Files

`rtl/`: `fp32_pkg` (types, rounding), `fp_add`, `fp_mul`, `fp_div`, `fp_sqrt`,
`fp_add_tree4`, `subrow_dot_pe`, `row_accumulator`, `dmvm_engine`, `sb_pkg` (SB types and word
layouts), `sb_sphere_calc`, `sb_pe`, `sb_engine`, `stream_ctrl`, `hprc_accel_top`.

`tb/`: one testbench per block as listed above, and the helpers `tb_fp_ref_pkg`,
`tb_sb_ref_pkg`, `tb_sram_model`, `tb_sb_bank_pair` and `tb_hprc_body.svh`. The last one is
the body shared by the two top-level testbenches.
