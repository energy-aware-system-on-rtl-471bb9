// tb_primary_bus: an AHB master model sends pipelined transfers to random
// regions while three slave models answer with address-dependent wait states
// (HADDR[5:4] cycles) and read data that names the slave. Checks the address
// decode (region 1 -> slave 0, region 2 -> slave 1, others -> slave 2), that
// HREADY, HRDATA and HRESP come from the slave owning the data phase, and the
// resulting wait-state count.
module tb_primary_bus;
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  logic [31:0]      haddr;
  logic [1:0]       htrans;
  logic [2:0]       hsel, hreadyout, hresp;
  logic             hready, hresp_m;
  logic [31:0]      hrdata_m;
  logic [2:0][31:0] hrdata;

  primary_bus dut (.hclk(clk), .hresetn(rst_n), .haddr_i(haddr), .htrans_i(htrans),
    .hsel_o(hsel), .hready_o(hready), .hrdata_o(hrdata_m), .hresp_o(hresp_m),
    .hreadyout_i(hreadyout), .hrdata_i(hrdata), .hresp_i(hresp));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, per_slave [3], stalls = 0;
  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave models
  logic [2:0]  act;
  int          cntr [3];
  logic [31:0] tag [3];
  for (genvar i = 0; i < 3; i++) begin : g_s
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        act[i] <= 1'b0;
      end else if (hready) begin
        act[i]  <= hsel[i] && htrans[1];
        cntr[i] <= int'(haddr[5:4]);
        tag[i]  <= haddr;
      end else if (act[i] && cntr[i] > 0) cntr[i] <= cntr[i] - 1;
    end
    assign hreadyout[i] = !(act[i] && cntr[i] > 0);
    assign hrdata[i]    = act[i] ? {4'(i + 1), tag[i][27:0]} : 32'hFFFF_FFFF;
    assign hresp[i]     = act[i] && tag[i][3];
  end

  initial begin
    int ap, dp, w;
    logic [31:0] t_addr [N];
    logic        t_idle [N];
    for (int i = 0; i < N; i++) begin
      t_idle[i] = ($urandom % 5) == 0;
      t_addr[i] = {4'($urandom % 4), 22'($urandom), 4'($urandom), 2'b00};
    end
    haddr = 0; htrans = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ap = 0; dp = -1; w = 0;
    while (ap < N || dp >= 0) begin
      @(negedge clk);
      haddr  = (ap < N) ? t_addr[ap] : 32'h0;
      htrans = (ap < N && !t_idle[ap]) ? 2'b10 : 2'b00;
      #1;
      if (ap < N) begin
        int es;
        es = (haddr[31:28] == 4'h1) ? 0 : (haddr[31:28] == 4'h2) ? 1 : 2;
        chk(hsel == 3'(1 << es), $sformatf("decode %h -> %b", haddr, hsel));
      end
      if (!hready) begin w++; stalls++; continue; end
      if (dp >= 0) begin
        int es;
        es = (t_addr[dp][31:28] == 4'h1) ? 0 : (t_addr[dp][31:28] == 4'h2) ? 1 : 2;
        per_slave[es]++;
        chk(hrdata_m == {4'(es + 1), t_addr[dp][27:0]}, $sformatf("read data from slave %0d", es));
        chk(hresp_m == t_addr[dp][3], "response routed");
        chk(w == int'(t_addr[dp][5:4]), "wait states routed");
      end
      w  = 0;
      dp = (ap < N && !t_idle[ap]) ? ap : -1;
      if (ap < N) ap++;
    end
    chk(per_slave[0] > 0 && per_slave[1] > 0 && per_slave[2] > 0 && stalls > 0, "all slaves and stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
