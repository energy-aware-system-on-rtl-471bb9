// tb_partitioned_sram_dp: exercises both ports of the 120 KB dual-port SRAM
// (256 + 30464 word cuts): port A fills the whole range while port B reads
// back words A wrote earlier, then B writes a block that A reads, as the two
// buses do when they pass data through it. Checks data against a shadow
// array, the one-cycle read latency, per-port cut selection, and that port A
// wins a same-word write collision.
module tb_partitioned_sram_dp;
  localparam int WORDS = 30720;
  logic clk = 0;
  logic a_cs = 0, a_we = 0, b_cs = 0, b_we = 0;
  logic [14:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [1:0]  a_bcs, b_bcs;
  logic        a_oor, b_oor;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  partitioned_sram_dp dut (
    .clk,
    .a_cs_i(a_cs), .a_we_i(a_we), .a_addr_i(a_addr), .a_wdata_i(a_wdata), .a_rdata_o(a_rdata),
    .a_bank_cs_o(a_bcs), .a_oor_o(a_oor),
    .b_cs_i(b_cs), .b_we_i(b_we), .b_addr_i(b_addr), .b_wdata_i(b_wdata), .b_rdata_o(b_rdata),
    .b_bank_cs_o(b_bcs), .b_oor_o(b_oor));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    int rb;
    @(negedge clk);
    // A writes everything; B reads the word A wrote 16 cycles earlier
    for (int a = 0; a < WORDS; a++) begin
      a_cs = 1; a_we = 1; a_addr = 15'(a); a_wdata = {16'(a), 16'(~a)} ^ 32'h3C3C_0F0F;
      shadow[a] = a_wdata;
      rb = a - 16;
      b_cs = (rb >= 0); b_we = 0; b_addr = 15'((rb >= 0) ? rb : 0);
      #1;
      if (a % 61 == 0)
        chk(a_bcs == ((a < 256) ? 2'b01 : 2'b10) && !a_oor, "port A cut select");
      @(negedge clk);
      if (rb >= 0) chk(b_rdata == shadow[rb], $sformatf("B read %0d", rb));
    end
    a_cs = 0; b_cs = 0;
    // B writes a block into the small cut and the large cut, A reads it
    for (int n = 0; n < 600; n++) begin
      int a;
      a = (n < 300) ? n % 256 : 256 + int'($urandom % (WORDS - 256));
      b_cs = 1; b_we = 1; b_addr = 15'(a); b_wdata = $urandom;
      shadow[a] = b_wdata;
      #1;
      chk(b_bcs == ((a < 256) ? 2'b01 : 2'b10), "port B cut select");
      @(negedge clk);
      b_cs = 0;
      a_cs = 1; a_we = 0; a_addr = 15'(a);
      @(negedge clk);
      a_cs = 0;
      chk(a_rdata == shadow[a], $sformatf("A read %0d got %h exp %h", a, a_rdata, shadow[a]));
    end
    // collision: both write word 100, port A must win
    a_cs = 1; a_we = 1; a_addr = 15'd100; a_wdata = 32'hAAAA_0001;
    b_cs = 1; b_we = 1; b_addr = 15'd100; b_wdata = 32'hBBBB_0002;
    @(negedge clk);
    a_we = 0; b_we = 0;
    @(negedge clk);
    a_cs = 0; b_cs = 0;
    chk(a_rdata == 32'hAAAA_0001 && b_rdata == 32'hAAAA_0001, "port A wins collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
