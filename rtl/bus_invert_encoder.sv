// bus_invert_encoder: bus-invert coding of a W-bit data bus.
//
// For every new word the encoder counts how many bus lines would toggle
// (Hamming distance between the word and the value now on the lines). If more
// than half would toggle it drives the complement instead and raises the extra
// invert line, so no transfer toggles more than W/2 data lines plus the invert
// line. The document uses bus-invert coding on the secondary data bus; the
// majority rule is the standard one. Registered outputs: the lines keep their
// value while no transfer is made, which is what saves the toggling.
//
// Interface: load_i with data_i presents a word; one cycle later bus_o and
// inv_o carry its coded form. Reset clears the lines to zero, not inverted.
module bus_invert_encoder #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [W-1:0] data_i,
  output logic [W-1:0] bus_o,
  output logic         inv_o
);

  logic [$clog2(W+1)-1:0] hdist;
  logic                   invert;

  always_comb begin
    hdist = '0;
    for (int i = 0; i < int'(W); i++)
      hdist += {{($clog2(W+1)-1){1'b0}}, data_i[i] ^ bus_o[i]};
    invert = (int'(hdist) > int'(W / 2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_o <= '0;
      inv_o <= 1'b0;
    end else if (load_i) begin
      bus_o <= invert ? ~data_i : data_i;
      inv_o <= invert;
    end
  end

endmodule
