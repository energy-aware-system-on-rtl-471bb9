// tb_power_management: writes the PMU registers over its bus port and follows
// each domain's sequence cycle by cycle against a reference timeline:
// shutdown = clock off, then isolation, then supply off; wake-up = supply on,
// PWR_UP_CYCLES+1 cycles of settling with isolation, isolation off, then clock
// on. Also checks that the other domains are untouched, that CLK_EN gates a
// running domain's clock alone, and the register read-back.
module tb_power_management;
  localparam int NDOM = 4, PUP = 16;
  logic clk = 0, rst_n = 0;
  logic sel = 0, we = 0, ready;
  logic [3:0]  addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [NDOM-1:0] clk_en, iso, sw;
  int checks = 0, failures = 0;

  power_management #(.NDOM(NDOM), .PWR_UP_CYCLES(PUP)) dut (
    .clk, .rst_n, .s_sel_i(sel), .s_we_i(we), .s_addr_i(addr), .s_wdata_i(wdata),
    .s_ready_o(ready), .s_rdata_o(rdata), .clk_en_o(clk_en), .iso_o(iso), .pwr_sw_o(sw));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %0t: %s", $time, m); end
  endtask

  task automatic access(input logic w, input logic [3:0] a, input logic [31:0] d, output logic [31:0] r);
    int n = 0;
    if (ready) @(negedge clk);   // a new select starts after the previous ready, as on the bus
    sel = 1; we = w; addr = a; wdata = d;
    do begin @(negedge clk); n++; end while (!ready);
    chk(n == 1, "ready one cycle after select");
    r = rdata;
    sel = 0; we = 0;
  endtask

  // expect outputs of one domain
  task automatic expect_dom(int d, logic c, logic i, logic s, string m);
    chk(clk_en[d] == c && iso[d] == i && sw[d] == s,
        $sformatf("dom %0d %s: clk_en=%b iso=%b sw=%b", d, m, clk_en[d], iso[d], sw[d]));
  endtask

  initial begin
    logic [31:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int d = 0; d < NDOM; d++) expect_dom(d, 1, 0, 1, "after reset");
    access(0, 4'h8, 0, r);
    chk(r[NDOM-1:0] == '1, "status all running");
    // shut down domain 2
    access(1, 4'h4, 32'b1011, r);
    expect_dom(2, 1, 0, 1, "write cycle");
    @(negedge clk); expect_dom(2, 0, 0, 1, "clock stopped");
    @(negedge clk); expect_dom(2, 0, 1, 1, "isolated");
    @(negedge clk); expect_dom(2, 0, 1, 0, "supply off");
    repeat (5) @(negedge clk);
    expect_dom(2, 0, 1, 0, "stays off");
    for (int d = 0; d < NDOM; d++) if (d != 2) expect_dom(d, 1, 0, 1, "untouched");
    access(0, 4'h8, 0, r);
    chk(r[NDOM-1:0] == 4'b1011, "status shows domain 2 off");
    access(0, 4'h4, 0, r);
    chk(r[NDOM-1:0] == 4'b1011, "PWR_ON read back");
    // wake it up
    access(1, 4'h4, 32'b1111, r);
    @(negedge clk);
    for (int k = 0; k <= PUP; k++) begin
      expect_dom(2, 0, 1, 1, "settling");
      @(negedge clk);
    end
    expect_dom(2, 0, 0, 1, "isolation removed");
    @(negedge clk);
    expect_dom(2, 1, 0, 1, "running again");
    // clock gating alone
    access(1, 4'h0, 32'b1110, r);
    expect_dom(0, 0, 0, 1, "clock gated by CLK_EN");
    expect_dom(1, 1, 0, 1, "other clock running");
    access(0, 4'h0, 0, r);
    chk(r[NDOM-1:0] == 4'b1110, "CLK_EN read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
