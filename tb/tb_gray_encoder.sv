// tb_gray_encoder: checks binary-to-Gray conversion against a bitwise
// reference (g[i] = b[i] xor b[i+1]) for random and sequential values, and that
// consecutive values give codes one bit apart.
module tb_gray_encoder;
  localparam int W = 30;
  logic [W-1:0] b, g;
  int checks = 0, failures = 0;

  gray_encoder #(.W(W)) dut (.bin_i(b), .gray_o(g));

  function automatic logic [W-1:0] ref_gray(logic [W-1:0] v);
    logic [W-1:0] r;
    for (int i = 0; i < W - 1; i++) r[i] = v[i] ^ v[i+1];
    r[W-1] = v[W-1];
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    for (int n = 0; n < 2000; n++) begin
      b = W'({$urandom, $urandom});
      #1;
      checks++;
      if (g !== ref_gray(b)) begin
        failures++;
        $display("mismatch: b=%h g=%h exp=%h", b, g, ref_gray(b));
      end
    end
    b = W'(32'h0000_1234);
    #1 prev = g;
    for (int n = 0; n < 500; n++) begin
      b = b + 1'b1;
      #1;
      checks++;
      if ($countones(g ^ prev) != 1) begin
        failures++;
        $display("sequential step toggled %0d lines", $countones(g ^ prev));
      end
      prev = g;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
