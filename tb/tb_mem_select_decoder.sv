// tb_mem_select_decoder: sweeps every address of a 3-cut range (the 28 K /
// 4 K / 32 K example of the memory partitioning discussion, scaled to words)
// and of the 2-cut default, checking chip select, local address and miss
// against bounds computed in the testbench.
module tb_mem_select_decoder;
  int checks = 0, failures = 0;

  // 3 cuts: 28, 4 and 30 units (1 unit = 16 words), so the top 32 words miss
  localparam int unsigned B3 [3] = '{448, 64, 480};
  logic        en3;
  logic [9:0]  a3, l3;
  logic [2:0]  cs3;
  logic [1:0]  i3;
  logic        m3;
  mem_select_decoder #(.NBANKS(3), .BANK_WORDS(B3), .AW(10)) dut3 (
    .en_i(en3), .addr_i(a3), .cs_o(cs3), .local_o(l3), .idx_o(i3), .miss_o(m3));

  // default: 870 + 3226 words
  logic        en2;
  logic [11:0] a2, l2;
  logic [1:0]  cs2, i2;
  logic        m2;
  mem_select_decoder dut2 (
    .en_i(en2), .addr_i(a2), .cs_o(cs2), .local_o(l2), .idx_o(i2), .miss_o(m2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, lo;
    en3 = 1; en2 = 1;
    for (int a = 0; a < 1024; a++) begin
      a3 = 10'(a);
      #1;
      b  = (a < 448) ? 0 : (a < 512) ? 1 : (a < 992) ? 2 : 3;
      lo = (b == 0) ? a : (b == 1) ? a - 448 : a - 512;
      checks++;
      if (b == 3) begin
        if (cs3 != 0 || !m3) begin
          failures++;
          $display("3-cut a=%0d should miss", a);
        end
      end else if (cs3 != 3'(1 << b) || l3 != 10'(lo) || i3 != 2'(b) || m3) begin
        failures++;
        $display("3-cut a=%0d cs=%b local=%0d idx=%0d", a, cs3, l3, i3);
      end
    end
    for (int a = 0; a < 4096; a++) begin
      a2 = 12'(a);
      #1;
      checks++;
      if (a < 870) begin
        if (cs2 != 2'b01 || l2 != 12'(a) || i2 != 0 || m2) failures++;
      end else if (a < 4096) begin
        if (cs2 != 2'b10 || l2 != 12'(a - 870) || i2 != 1 || m2) failures++;
      end
    end
    en3 = 0; a3 = 10'd5;
    #1;
    checks++;
    if (cs3 != 0 || m3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
