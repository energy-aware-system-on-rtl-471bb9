// partitioned_sram_dp: dual-port SRAM built from several cuts of unequal size.
//
// The dual-port SRAM is the mailbox between the two buses: one bus places a
// large block of data in it for the other to read. Like partitioned_sram_sp it
// is split into cuts, each a true dual-port macro, and each port has its own
// memory selection decoder, so an access of either port enables only the cut
// that holds its address. The default is the document's 120 KB dual-port SRAM
// split into a 1 KB and a 119 KB cut (256 and 30464 words of 32 bits). Cut 0
// at the bottom of the range is this design's choice. If both ports write one
// word in the same cycle, port A wins.
//
// Interface and timing: two synchronous ports, A (primary bus side) and B
// (secondary bus side), each as in partitioned_sram_sp, with read data after
// the clock edge.
module partitioned_sram_dp #(
  parameter int unsigned NBANKS = 2,
  parameter int unsigned BANK_WORDS [NBANKS] = '{256, 30464},
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 15
) (
  input  logic              clk,
  input  logic              a_cs_i,
  input  logic              a_we_i,
  input  logic [AW-1:0]     a_addr_i,
  input  logic [W-1:0]      a_wdata_i,
  output logic [W-1:0]      a_rdata_o,
  output logic [NBANKS-1:0] a_bank_cs_o,
  output logic              a_oor_o,
  input  logic              b_cs_i,
  input  logic              b_we_i,
  input  logic [AW-1:0]     b_addr_i,
  input  logic [W-1:0]      b_wdata_i,
  output logic [W-1:0]      b_rdata_o,
  output logic [NBANKS-1:0] b_bank_cs_o,
  output logic              b_oor_o
);

  localparam int unsigned IW = $clog2(NBANKS + 1);

  logic [AW-1:0] a_local, b_local;
  logic [IW-1:0] a_idx, b_idx, a_idx_q, b_idx_q;
  logic          a_miss_q, b_miss_q;
  logic [W-1:0]  a_bank_rdata [NBANKS];
  logic [W-1:0]  b_bank_rdata [NBANKS];

  mem_select_decoder #(.NBANKS(NBANKS), .BANK_WORDS(BANK_WORDS), .AW(AW)) u_sel_a (
    .en_i(a_cs_i), .addr_i(a_addr_i), .cs_o(a_bank_cs_o), .local_o(a_local),
    .idx_o(a_idx), .miss_o(a_oor_o)
  );

  mem_select_decoder #(.NBANKS(NBANKS), .BANK_WORDS(BANK_WORDS), .AW(AW)) u_sel_b (
    .en_i(b_cs_i), .addr_i(b_addr_i), .cs_o(b_bank_cs_o), .local_o(b_local),
    .idx_o(b_idx), .miss_o(b_oor_o)
  );

  for (genvar g = 0; g < NBANKS; g++) begin : g_bank
    localparam int unsigned BAW = (BANK_WORDS[g] > 1) ? $clog2(BANK_WORDS[g]) : 1;
    sram_bank_dp #(.DEPTH(BANK_WORDS[g]), .W(W), .AW(BAW)) u_bank (
      .clk      (clk),
      .a_cs_i   (a_bank_cs_o[g]),
      .a_we_i   (a_we_i),
      .a_addr_i (a_local[BAW-1:0]),
      .a_wdata_i(a_wdata_i),
      .a_rdata_o(a_bank_rdata[g]),
      .b_cs_i   (b_bank_cs_o[g]),
      .b_we_i   (b_we_i),
      .b_addr_i (b_local[BAW-1:0]),
      .b_wdata_i(b_wdata_i),
      .b_rdata_o(b_bank_rdata[g])
    );
  end

  always_ff @(posedge clk) begin
    if (a_cs_i && !a_we_i) begin
      a_idx_q  <= a_idx;
      a_miss_q <= a_oor_o;
    end
    if (b_cs_i && !b_we_i) begin
      b_idx_q  <= b_idx;
      b_miss_q <= b_oor_o;
    end
  end

  always_comb begin
    a_rdata_o = '0;
    b_rdata_o = '0;
    for (int unsigned i = 0; i < NBANKS; i++) begin
      if (!a_miss_q && a_idx_q == IW'(i)) a_rdata_o = a_bank_rdata[i];
      if (!b_miss_q && b_idx_q == IW'(i)) b_rdata_o = b_bank_rdata[i];
    end
  end

endmodule
