// mem_select_decoder: the memory selection block of a partitioned SRAM.
//
// A partitioned SRAM splits one address range into NBANKS consecutive cuts of
// BANK_WORDS[i] words each, so that frequently used ("hot") addresses live in a
// small cut. For each access this decoder raises the chip select of the one cut
// that holds the address and gives the address relative to that cut's base;
// every other cut stays deselected and draws no access power. Cut sizes need
// not be powers of two, so the decode is a compare against the cut bounds, not
// a bit slice. The decoder itself follows the document's description (one chip
// select per cut from a selection block); placing cut 0 at the bottom of the
// range is this design's choice.
//
// Interface: en_i and addr_i (word address) in; cs_o (one-hot or zero),
// local_o (address within the selected cut), idx_o (number of the selected
// cut) and miss_o (address beyond the last cut) out. Combinational.
module mem_select_decoder #(
  parameter int unsigned NBANKS = 2,
  parameter int unsigned BANK_WORDS [NBANKS] = '{870, 3226},
  parameter int unsigned AW = 12
) (
  input  logic                      en_i,
  input  logic [AW-1:0]             addr_i,
  output logic [NBANKS-1:0]         cs_o,
  output logic [AW-1:0]             local_o,
  output logic [$clog2(NBANKS+1)-1:0] idx_o,
  output logic                      miss_o
);

  // Lowest word address of cut i
  function automatic int unsigned base_of(int unsigned i);
    int unsigned b = 0;
    for (int unsigned j = 0; j < i; j++) b += BANK_WORDS[j];
    return b;
  endfunction

  always_comb begin
    cs_o    = '0;
    local_o = '0;
    idx_o   = '0;
    miss_o  = en_i;
    for (int unsigned i = 0; i < NBANKS; i++) begin
      if (en_i && addr_i >= AW'(base_of(i)) && 33'(addr_i) < 33'(base_of(i) + BANK_WORDS[i])) begin
        cs_o[i] = 1'b1;
        local_o = addr_i - AW'(base_of(i));
        idx_o   = ($clog2(NBANKS+1))'(i);
        miss_o  = 1'b0;
      end
    end
  end

endmodule
