// sram_bank_dp: one true dual-port SRAM cut, DEPTH words of W bits.
//
// Two independent synchronous ports A and B, each with chip select, write
// enable, address and data, as in sram_bank_sp. Both ports may access the cut
// in the same cycle. If both write the same word in one cycle, port A's data is
// kept (this design's choice). A read of a word being written by the other
// port in the same cycle returns the old contents. Contents are not reset.
module sram_bank_dp #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic          a_cs_i,
  input  logic          a_we_i,
  input  logic [AW-1:0] a_addr_i,
  input  logic [W-1:0]  a_wdata_i,
  output logic [W-1:0]  a_rdata_o,
  input  logic          b_cs_i,
  input  logic          b_we_i,
  input  logic [AW-1:0] b_addr_i,
  input  logic [W-1:0]  b_wdata_i,
  output logic [W-1:0]  b_rdata_o
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_cs_i && b_we_i) mem[b_addr_i] <= b_wdata_i;
    if (a_cs_i && a_we_i) mem[a_addr_i] <= a_wdata_i;
    if (a_cs_i && !a_we_i) a_rdata_o <= mem[a_addr_i];
    if (b_cs_i && !b_we_i) b_rdata_o <= mem[b_addr_i];
  end

endmodule
