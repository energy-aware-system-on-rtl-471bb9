// gray_decoder: Gray-to-binary conversion at the receiving side of the
// secondary address bus.
//
// Each binary bit is the XOR of all Gray bits at and above its position, which
// is computed from the top bit downwards. Undoes gray_encoder exactly.
//
// Interface: gray_i (W bits) in, bin_o (W bits) out. Purely combinational.
module gray_decoder #(
  parameter int unsigned W = 30
) (
  input  logic [W-1:0] gray_i,
  output logic [W-1:0] bin_o
);

  always_comb begin
    bin_o[W-1] = gray_i[W-1];
    for (int i = int'(W) - 2; i >= 0; i--)
      bin_o[i] = bin_o[i+1] ^ gray_i[i];
  end

endmodule
