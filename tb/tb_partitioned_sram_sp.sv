// tb_partitioned_sram_sp: writes the whole 16 KB single-port SRAM (default
// 870 + 3226 word cuts) with an address-derived pattern, reads it back in
// random order against a shadow array, and checks that each access enables
// exactly the cut that holds its address and that the read latency is one
// clock.
module tb_partitioned_sram_sp;
  localparam int WORDS = 4096;
  logic clk = 0, cs = 0, we = 0;
  logic [11:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0]  bank_cs;
  logic        oor;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0, hits0 = 0, hits1 = 0;

  partitioned_sram_sp dut (.clk, .cs_i(cs), .we_i(we), .addr_i(addr), .wdata_i(wdata),
                           .rdata_o(rdata), .bank_cs_o(bank_cs), .oor_o(oor));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < WORDS; a++) begin
      cs = 1; we = 1; addr = 12'(a);
      wdata = 32'(a) * 32'h9E37_79B9 ^ 32'hA5A5_0000;
      shadow[a] = wdata;
      #1;
      chk(bank_cs == ((a < 870) ? 2'b01 : 2'b10) && !oor, $sformatf("cut select on write %0d", a));
      @(negedge clk);
    end
    for (int n = 0; n < 6000; n++) begin
      int a;
      a = (n % 3 == 0) ? int'($urandom % 870) : int'($urandom % WORDS);
      cs = 1; we = 0; addr = 12'(a);
      #1;
      if (bank_cs == 2'b01) hits0++;
      if (bank_cs == 2'b10) hits1++;
      @(negedge clk);
      cs = 0;
      chk(rdata == shadow[a], $sformatf("read %0d got %h exp %h", a, rdata, shadow[a]));
      // a random overwrite now and then
      if (n % 7 == 0) begin
        cs = 1; we = 1; addr = 12'($urandom % WORDS); wdata = $urandom;
        shadow[addr] = wdata;
        @(negedge clk);
        cs = 0;
      end
    end
    // idle: no cut enabled
    cs = 0; #1;
    chk(bank_cs == 2'b00, "no cut enabled when idle");
    chk(hits0 > 0 && hits1 > 0, "both cuts used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
