// gray_encoder: binary-to-Gray conversion for the secondary address bus.
//
// Consecutive binary values differ in exactly one bit once Gray coded, so a
// processor stepping through sequential word addresses toggles a single address
// line per transfer. The document applies Gray coding to the address lines of
// the secondary bus; the circuit is the standard one, g = b ^ (b >> 1).
//
// Interface: bin_i (W bits) in, gray_o (W bits) out. Purely combinational.
module gray_encoder #(
  parameter int unsigned W = 30
) (
  input  logic [W-1:0] bin_i,
  output logic [W-1:0] gray_o
);

  always_comb gray_o = bin_i ^ (bin_i >> 1);

endmodule
