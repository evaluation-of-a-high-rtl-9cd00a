// tb_sram_model: behavioural model of one external QDR SRAM bank as the accelerator sees it.
//
// Separate read and write ports, as on a QDR part, each able to take one word per cycle. A
// read returns rd_data with rd_valid exactly LAT cycles after rd_en; a write lands at the
// clock edge. The array "mem" is public so a testbench can load and inspect it directly,
// standing in for the host's DMA transfers. The real bank (8 MB per DIMM, 128 bits per cycle
// at 100 MHz) is a memory chip, so only this model exists.
module tb_sram_model #(
  parameter int unsigned AW    = 20,
  parameter int unsigned DW    = 128,
  parameter int unsigned DEPTH = 1 << AW,
  parameter int unsigned LAT   = 2
)(
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);

  logic [DW-1:0] mem [DEPTH];
  logic          v_pipe [LAT];
  logic [DW-1:0] d_pipe [LAT];

  initial begin
    for (int i = 0; i < LAT; i++) begin
      v_pipe[i] = 1'b0;
      d_pipe[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    v_pipe[0] <= rd_en;
    d_pipe[0] <= (rd_en && int'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
    for (int i = 1; i < LAT; i++) begin
      v_pipe[i] <= v_pipe[i-1];
      d_pipe[i] <= d_pipe[i-1];
    end
    if (wr_en && int'(wr_addr) < DEPTH) mem[wr_addr] <= wr_data;
  end

  assign rd_valid = v_pipe[LAT-1];
  assign rd_data  = d_pipe[LAT-1];

endmodule
