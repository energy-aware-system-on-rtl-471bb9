// tb_ahb_sram_port: an AHB master model runs pipelined transfers (back-to-back
// writes and reads, a read directly after a write to the same word, idle
// cycles, out-of-range addresses) through the port into an SRAM cut. Checks
// read data against a shadow memory, exactly one wait state per read and none
// per write, and the two-cycle ERROR response.
module tb_ahb_sram_port;
  localparam int WORDS = 200;   // not a power of two: addresses 200..255 are out of range
  localparam int N = 3000;

  logic clk = 0, rst_n = 0;
  logic        hsel, hwrite, hready, hresp;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        cs, we;
  logic [7:0]  addr;
  logic [31:0] wdata, rdata;

  ahb_sram_port #(.WORDS(WORDS), .AW(8)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel_i(hsel), .haddr_i(haddr), .htrans_i(htrans),
    .hwrite_i(hwrite), .hwdata_i(hwdata), .hready_i(hready), .hreadyout_o(hready),
    .hrdata_o(hrdata), .hresp_o(hresp),
    .cs_o(cs), .we_o(we), .addr_o(addr), .wdata_o(wdata), .rdata_i(rdata));

  sram_bank_sp #(.DEPTH(256), .W(32), .AW(8)) mem (
    .clk, .cs_i(cs), .we_i(we), .addr_i(addr), .wdata_i(wdata), .rdata_o(rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] t_addr [N];
  logic        t_write [N];
  logic        t_idle [N];
  logic [31:0] t_wdata [N];
  logic [31:0] shadow [WORDS];
  bit          written [WORDS];
  int          waits [N];
  int          n_err = 0, n_rd = 0, n_wr = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    int ap, dp, w;
    // build the transfer list
    for (int i = 0; i < N; i++) begin
      t_idle[i]  = ($urandom % 6) == 0;
      t_write[i] = (i < 40) || (($urandom % 2) == 0);
      t_addr[i]  = {22'h0, 8'((i % 9 == 8) ? 200 + $urandom % 56 : $urandom % WORDS), 2'b00};
      if (i > 0 && i % 5 == 0) begin            // read right after a write of the same word
        t_addr[i] = t_addr[i-1]; t_write[i] = 0; t_idle[i] = 0;
      end
      t_wdata[i] = $urandom;
    end
    hsel = 0; htrans = 0; haddr = 0; hwrite = 0; hwdata = 0;
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
      #4;
      if (!hready) begin
        w++;
        if (dp >= 0 && hresp) begin
          // first ERROR cycle
        end
        continue;
      end
      if (dp >= 0) begin
        int wa;
        wa = int'(t_addr[dp][31:2]);
        if (wa >= WORDS) begin
          n_err++;
          chk(hresp == 1'b1 && w == 1, $sformatf("ERROR response for %0d", wa));
        end else if (t_write[dp]) begin
          n_wr++;
          chk(hresp == 0 && w == 0, "write without wait state");
          shadow[wa] = t_wdata[dp]; written[wa] = 1;
        end else begin
          n_rd++;
          chk(hresp == 0 && w == 1, $sformatf("read with one wait state (%0d)", w));
          if (written[wa]) chk(hrdata == shadow[wa], $sformatf("read %0d got %h exp %h", wa, hrdata, shadow[wa]));
        end
      end
      w  = 0;
      dp = (ap < N && !t_idle[ap]) ? ap : -1;
      if (ap < N) ap++;
    end
    chk(n_err > 0 && n_rd > 0 && n_wr > 0, "all kinds of transfer seen");
    $display("reads %0d writes %0d errors %0d", n_rd, n_wr, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
