// tb_bus_invert_decoder: checks that the decoder returns the lines unchanged
// with the invert bit low and their complement with it high.
module tb_bus_invert_decoder;
  localparam int W = 32;
  logic [W-1:0] bus, data, word;
  logic inv;
  int checks = 0, failures = 0;

  bus_invert_decoder #(.W(W)) dut (.bus_i(bus), .inv_i(inv), .data_o(data));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      word = $urandom;
      inv  = n[0];
      bus  = inv ? ~word : word;
      #1;
      checks++;
      if (data !== word) begin
        failures++;
        $display("mismatch: bus=%h inv=%b got=%h exp=%h", bus, inv, data, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
