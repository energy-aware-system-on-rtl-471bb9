// tb_gray_decoder: feeds Gray codes built by a reference in the testbench and
// checks that the decoder returns the original binary values.
module tb_gray_decoder;
  localparam int W = 30;
  logic [W-1:0] g, b, v;
  int checks = 0, failures = 0;

  gray_decoder #(.W(W)) dut (.gray_i(g), .bin_o(b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      v = (n < 64) ? W'(n) : W'({$urandom, $urandom});
      g = v ^ (v >> 1);
      #1;
      checks++;
      if (b !== v) begin
        failures++;
        $display("mismatch: gray=%h got=%h exp=%h", g, b, v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
