// bus_invert_decoder: recovers the data word from bus-invert coded lines.
//
// When the invert line is high the data lines carry the complement of the
// word, so the word is the lines XORed with the invert bit.
//
// Interface: bus_i (W bits) and inv_i in, data_o (W bits) out. Combinational.
module bus_invert_decoder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] bus_i,
  input  logic         inv_i,
  output logic [W-1:0] data_o
);

  always_comb data_o = bus_i ^ {W{inv_i}};

endmodule
