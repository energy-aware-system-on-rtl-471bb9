// partitioned_sram_sp: single-port SRAM built from several cuts of unequal size.
//
// The memory looks like one SRAM of WORDS words to its user, but is made of
// NBANKS cuts. A mem_select_decoder picks the cut holding each address and
// drives only that cut's chip select, so an access powers one small cut
// instead of the whole array. The default is the document's 16 KB single-port
// SRAM split into a 3.4 KB and a 12.6 KB cut (870 and 3226 words of 32 bits;
// 3.4 KB is not a whole number of words, so the first cut is rounded down to
// 3480 bytes and the second takes the rest). Which cut sits low in the range is
// this design's choice: cut 0 is at the bottom.
//
// Interface and timing: synchronous single port. cs_i/we_i/addr_i (word
// address)/wdata_i at a clock edge; read data in rdata_o after the edge, held
// until the next read. bank_cs_o shows which cut was enabled, oor_o flags an
// address beyond WORDS (nothing is accessed then; a read returns zero).
module partitioned_sram_sp #(
  parameter int unsigned NBANKS = 2,
  parameter int unsigned BANK_WORDS [NBANKS] = '{870, 3226},
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 12
) (
  input  logic              clk,
  input  logic              cs_i,
  input  logic              we_i,
  input  logic [AW-1:0]     addr_i,
  input  logic [W-1:0]      wdata_i,
  output logic [W-1:0]      rdata_o,
  output logic [NBANKS-1:0] bank_cs_o,
  output logic              oor_o
);

  localparam int unsigned IW = $clog2(NBANKS + 1);

  logic [AW-1:0]     local_addr;
  logic [IW-1:0]     idx;
  logic              miss;
  logic [W-1:0]      bank_rdata [NBANKS];
  logic [IW-1:0]     rd_idx_q;
  logic              rd_miss_q;

  mem_select_decoder #(.NBANKS(NBANKS), .BANK_WORDS(BANK_WORDS), .AW(AW)) u_sel (
    .en_i   (cs_i),
    .addr_i (addr_i),
    .cs_o   (bank_cs_o),
    .local_o(local_addr),
    .idx_o  (idx),
    .miss_o (miss)
  );

  assign oor_o = miss;

  for (genvar g = 0; g < NBANKS; g++) begin : g_bank
    localparam int unsigned BAW = (BANK_WORDS[g] > 1) ? $clog2(BANK_WORDS[g]) : 1;
    sram_bank_sp #(.DEPTH(BANK_WORDS[g]), .W(W), .AW(BAW)) u_bank (
      .clk    (clk),
      .cs_i   (bank_cs_o[g]),
      .we_i   (we_i),
      .addr_i (local_addr[BAW-1:0]),
      .wdata_i(wdata_i),
      .rdata_o(bank_rdata[g])
    );
  end

  // Remember which cut a read went to, to steer its data out after the edge
  always_ff @(posedge clk) begin
    if (cs_i && !we_i) begin
      rd_idx_q  <= idx;
      rd_miss_q <= miss;
    end
  end

  always_comb begin
    rdata_o = '0;
    for (int unsigned i = 0; i < NBANKS; i++)
      if (!rd_miss_q && rd_idx_q == IW'(i)) rdata_o = bank_rdata[i];
  end

endmodule
