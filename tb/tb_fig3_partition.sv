// tb_fig3_partition: the three-cut partitioning example. A 64 KB SRAM
// (16384 words) is split into a 28 KB, a 4 KB and a 32 KB cut, with the 4 KB
// cut holding the "hot" middle of the address range. An access stream with
// that profile (most accesses in the hot 4 KB, a low level elsewhere) runs
// against a shadow memory. Checks every read, that each access enables exactly
// the one cut holding its address, and reports how the accesses spread over
// the cuts; fails if the hot cut does not take the majority.
module tb_fig3_partition;
  localparam int unsigned CUTS [3] = '{7168, 1024, 8192};
  localparam int WORDS = 16384, NACC = 40000;

  logic clk = 0, cs = 0, we = 0;
  logic [13:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [2:0]  bank_cs;
  logic        oor;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0, per_cut [3];

  partitioned_sram_sp #(.NBANKS(3), .BANK_WORDS(CUTS), .AW(14)) dut (
    .clk, .cs_i(cs), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata),
    .bank_cs_o(bank_cs), .oor_o(oor));

  always #5 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", m); end
  endtask

  function automatic int cut_of(int a);
    return (a < 7168) ? 0 : (a < 8192) ? 1 : 2;
  endfunction

  initial begin
    @(negedge clk);
    // initialise everything
    for (int a = 0; a < WORDS; a++) begin
      cs = 1; we = 1; addr = 14'(a); wdata = $urandom; shadow[a] = wdata;
      @(negedge clk);
    end
    cs = 0;
    per_cut = '{0, 0, 0};
    for (int n = 0; n < NACC; n++) begin
      int a, r;
      r = int'($urandom % 100);
      // profile: 80 % in the hot 4 KB (denser in its lower half), the rest spread
      if (r < 80)      a = 7168 + int'($urandom % 1024) / (1 + int'($urandom % 2));
      else if (r < 90) a = int'($urandom % 7168);
      else             a = 8192 + int'($urandom % 8192);
      if (a < 7168 && r < 80) a = 7168 + (a % 1024);
      we = (n % 4 == 0);
      cs = 1; addr = 14'(a);
      if (we) begin wdata = $urandom; shadow[a] = wdata; end
      #1;
      chk(bank_cs == 3'(1 << cut_of(a)) && !oor, $sformatf("cut select for %0d", a));
      per_cut[cut_of(a)]++;
      @(negedge clk);
      if (!we) chk(rdata == shadow[a], $sformatf("read %0d", a));
    end
    cs = 0;
    $display("accesses per cut: 28 KB %0d, 4 KB %0d, 32 KB %0d", per_cut[0], per_cut[1], per_cut[2]);
    chk(per_cut[1] * 2 > NACC, "hot cut takes most accesses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
