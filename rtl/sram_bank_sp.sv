// sram_bank_sp: one single-port SRAM cut, DEPTH words of W bits.
//
// Stands for one memory macro of a partitioned SRAM. Synchronous: a write
// happens at the clock edge with cs_i and we_i high; a read with cs_i high and
// we_i low returns the word in rdata_o after the edge. With cs_i low the cut
// does nothing and rdata_o holds its last value. Contents are not reset.
module sram_bank_sp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = 10
) (
  input  logic          clk,
  input  logic          cs_i,
  input  logic          we_i,
  input  logic [AW-1:0] addr_i,
  input  logic [W-1:0]  wdata_i,
  output logic [W-1:0]  rdata_o
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs_i) begin
      if (we_i) mem[addr_i] <= wdata_i;
      else      rdata_o     <= mem[addr_i];
    end
  end

endmodule
