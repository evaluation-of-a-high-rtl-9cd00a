// tb_sb_bank_pair: the two SRAM banks an SB engine works on, bank A (positions, read) and
// bank B (results, written), as behavioural models with a two-cycle read latency.
module tb_sb_bank_pair #(
  parameter int unsigned AW = 20
)(
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_valid,
  output logic [127:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [127:0]  wr_data
);
  tb_sram_model #(.AW(AW)) bank_a (
    .clk, .rd_en, .rd_addr, .rd_valid, .rd_data, .wr_en(1'b0), .wr_addr('0), .wr_data('0));
  tb_sram_model #(.AW(AW)) bank_b (
    .clk, .rd_en(1'b0), .rd_addr('0), .rd_valid(), .rd_data(), .wr_en, .wr_addr, .wr_data);
endmodule
