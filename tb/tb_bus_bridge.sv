// tb_bus_bridge: an AHB master model runs pipelined transfers (with idle
// cycles) into the bridge, and a secondary-bus model acknowledges each request
// after a random delay. Checks that every AHB transfer becomes exactly one
// secondary transfer with the masked address, the right direction and write
// data, that read data comes back on HRDATA, and that the AHB data phase is
// stretched by exactly the secondary-bus delay.
module tb_bus_bridge;
  import easy_pkg::*;
  localparam int N = 2000;

  logic clk = 0, rst_n = 0;
  logic        hsel, hwrite, hready, hresp;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        m_req, m_ack;
  sec_req_t    mreq;
  logic [31:0] m_rdata;

  bus_bridge dut (
    .hclk(clk), .hresetn(rst_n), .hsel_i(hsel), .haddr_i(haddr), .htrans_i(htrans),
    .hwrite_i(hwrite), .hwdata_i(hwdata), .hready_i(hready), .hreadyout_o(hready),
    .hrdata_o(hrdata), .hresp_o(hresp),
    .m_req_o(m_req), .m_o(mreq), .m_ack_i(m_ack), .m_rdata_i(m_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, sec_count = 0, stretched = 0;
  logic [31:0] t_addr [N], t_wdata [N];
  logic        t_write [N], t_idle [N];
  int          t_delay [N];
  logic [31:0] mem [logic [31:0]];

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

  // secondary-bus model, called once per cycle: acknowledge the pending
  // request after the delay planned for its transfer
  int cnt = 0;
  task automatic respond(int cur);
    m_ack = 1'b0;
    if (m_req && cur >= 0) begin
      if (cnt == 0) begin
        sec_count++;
        chk(mreq.addr == (t_addr[cur] & 32'h0FFF_FFFF), "masked address");
        chk(mreq.we == t_write[cur], "direction");
        if (t_write[cur]) chk(mreq.wdata == t_wdata[cur], "write data");
      end
      if (cnt == t_delay[cur]) begin
        m_ack = 1'b1;
        if (mreq.we) mem[mreq.addr] = mreq.wdata;
        m_rdata = mem.exists(mreq.addr) ? mem[mreq.addr] : 32'hDEAD_0000;
        cnt = 0;
      end else cnt++;
    end
  endtask

  initial begin
    int ap, dp, w;
    logic [31:0] exp_mem [logic [31:0]];
    for (int i = 0; i < N; i++) begin
      t_idle[i]  = ($urandom % 5) == 0;
      t_addr[i]  = 32'h2000_0000 | (($urandom % 64) << 2) | (($urandom % 4) << 20);
      t_write[i] = (i < 30) || (($urandom % 2) != 0);
      t_wdata[i] = $urandom;
      t_delay[i] = 2 + int'($urandom % 5);
    end
    hsel = 0; htrans = 0; haddr = 0; hwrite = 0; hwdata = 0; m_ack = 0; m_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ap = 0; dp = -1; w = 0;
    while (ap < N || dp >= 0) begin
      @(negedge clk);
      hsel   = (ap < N) && !t_idle[ap];
      htrans = hsel ? 2'b10 : 2'b00;
      haddr  = (ap < N) ? t_addr[ap] : 32'h0;
      hwrite = (ap < N) ? t_write[ap] : 1'b0;
      hwdata = (dp >= 0) ? t_wdata[dp] : 32'h0;
      #1;
      respond(dp);
      #1;
      if (!hready) begin w++; continue; end
      if (dp >= 0) begin
        logic [31:0] sa;
        sa = t_addr[dp] & 32'h0FFF_FFFF;
        chk(w == t_delay[dp], $sformatf("wait states %0d, expected %0d", w, t_delay[dp]));
        if (w > 0) stretched++;
        chk(hresp == 1'b0, "OKAY response");
        if (t_write[dp]) exp_mem[sa] = t_wdata[dp];
        else if (exp_mem.exists(sa)) chk(hrdata == exp_mem[sa], $sformatf("read %h got %h", sa, hrdata));
      end
      w  = 0;
      dp = (ap < N && !t_idle[ap]) ? ap : -1;
      if (ap < N) ap++;
    end
    chk(sec_count > N / 2, "secondary transfers made");
    chk(stretched > 0, "data phases stretched");
    $display("secondary transfers %0d", sec_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
