// tb_easy_soc_top: end-to-end test of the memory and interconnect subsystem at
// its default sizes. Models stand in for the two processors (an AHB master on
// the primary bus and a request/acknowledge master on the secondary bus) and
// for the external slaves. The scenario follows how the two protocol layers
// cooperate:
//   1. the primary side fills the whole 120 KB dual-port SRAM with a data block
//      and the secondary side reads every word back (mailbox downstream);
//   2. the secondary side writes a block into it (both cuts) which the primary
//      side reads (mailbox upstream), with one AHB wait state per read;
//   3. the secondary side writes the whole 16 KB single-port SRAM; the primary
//      side pulls words of it and pushes control words into it through the
//      bridge, while the secondary side keeps the bus busy (contention);
//   4. the primary side reaches the external secondary slave through the
//      bridge and the external primary slave directly;
//   5. the primary side shuts a power domain down and wakes it up through the
//      bridge and the power-management registers;
//   6. an access beyond the dual-port SRAM gets the AHB ERROR response.
// Counts each mechanism (bridge stalls, arbitration contention, bus-invert on
// the write and read lines, each SRAM cut enabled, ERROR responses, domain
// shutdown and wake-up, external accesses) and fails any that never happened.
// Also reports line toggles of the coded secondary bus against the plain
// binary values it carried.
module tb_easy_soc_top;
  import easy_pkg::*;

  localparam int DPW = 30720, SPW = 4096;

  logic clk = 0, rst_n = 0;
  logic [31:0] p_haddr = 0, p_hwdata = 0, p_hrdata;
  logic [1:0]  p_htrans = 0;
  logic        p_hwrite = 0, p_hready, p_hresp;
  logic        pe_hsel;
  logic        pe_hreadyout;
  logic [31:0] pe_hrdata;
  logic        pe_hresp;
  logic        c_req = 0, c_ack;
  sec_req_t    c = '0;
  logic [31:0] c_rdata;
  logic        se_sel, se_we, se_ready;
  logic [31:0] se_addr, se_wdata, se_rdata;
  logic [3:0]  pd_clk_en, pd_iso, pd_pwr_sw;
  logic [1:0]  sp_bcs, dpa_bcs, dpb_bcs;
  logic [29:0] addr_lines;
  logic [31:0] wl, rl;
  logic        wi, ri, sbusy;

  easy_soc_top dut (
    .clk, .rst_n,
    .p_haddr_i(p_haddr), .p_htrans_i(p_htrans), .p_hwrite_i(p_hwrite), .p_hwdata_i(p_hwdata),
    .p_hready_o(p_hready), .p_hrdata_o(p_hrdata), .p_hresp_o(p_hresp),
    .pe_hsel_o(pe_hsel), .pe_hreadyout_i(pe_hreadyout), .pe_hrdata_i(pe_hrdata), .pe_hresp_i(pe_hresp),
    .c_req_i(c_req), .c_i(c), .c_ack_o(c_ack), .c_rdata_o(c_rdata),
    .se_sel_o(se_sel), .se_we_o(se_we), .se_addr_o(se_addr), .se_wdata_o(se_wdata),
    .se_ready_i(se_ready), .se_rdata_i(se_rdata),
    .pd_clk_en_o(pd_clk_en), .pd_iso_o(pd_iso), .pd_pwr_sw_o(pd_pwr_sw),
    .mon_sp_bank_cs_o(sp_bcs), .mon_dp_a_bank_cs_o(dpa_bcs), .mon_dp_b_bank_cs_o(dpb_bcs),
    .mon_sec_addr_lines_o(addr_lines), .mon_sec_wdata_lines_o(wl), .mon_sec_wdata_inv_o(wi),
    .mon_sec_rdata_lines_o(rl), .mon_sec_rdata_inv_o(ri), .mon_sec_busy_o(sbusy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit cond, string m);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, m); end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- external slave models ----------------
  logic [31:0] pe_mem [logic [31:0]];
  logic [31:0] se_mem [logic [31:0]];
  logic        pe_act = 0, pe_wr = 0;
  logic [31:0] pe_a = 0;
  int          pe_wait = 0, se_cnt = 0;
  int          n_pe = 0, n_se = 0;

  // external primary slave: one wait state on every transfer
  always @(posedge clk) begin
    if (pe_act && pe_wait == 0 && pe_wr) pe_mem[pe_a] = p_hwdata;
    if (p_hready) begin
      pe_act  <= pe_hsel && p_htrans[1];
      pe_wr   <= p_hwrite;
      pe_a    <= p_haddr;
      pe_wait <= 1;
      if (pe_hsel && p_htrans[1]) n_pe++;
    end else if (pe_act && pe_wait > 0) pe_wait <= pe_wait - 1;
  end
  assign pe_hreadyout = !(pe_act && pe_wait > 0);
  assign pe_hrdata    = (pe_act && pe_mem.exists(pe_a)) ? pe_mem[pe_a] : 32'h0;
  assign pe_hresp     = 1'b0;

  // external secondary slave: ready after two cycles of select
  always @(posedge clk) begin
    if (se_sel && se_ready) begin
      if (se_we) se_mem[se_addr] = se_wdata;
      se_cnt <= 0;
      n_se++;
    end else if (se_sel) se_cnt <= se_cnt + 1;
  end
  assign se_ready = se_sel && (se_cnt == 2);
  assign se_rdata = se_mem.exists(se_addr) ? se_mem[se_addr] : 32'h0;

  // ---------------- processor models ----------------
  int bridge_stall_cycles = 0, read_wait_cycles = 0, n_error = 0;

  // one non-pipelined AHB transfer
  task automatic ahb(input logic w, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] r, output logic resp, output int waits);
    @(negedge clk);
    p_htrans = 2'b10; p_haddr = a; p_hwrite = w;
    @(negedge clk);
    p_htrans = 2'b00; p_hwdata = d;
    waits = 0;
    #1;
    while (!p_hready) begin
      waits++;
      @(negedge clk);
      #1;
    end
    r = p_hrdata;
    resp = p_hresp;
    if (a[31:28] == 4'h2) bridge_stall_cycles += waits;
    if (resp) n_error++;
  endtask

  // one secondary-bus transfer of the modem-control processor
  task automatic sec(input logic w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] r);
    @(negedge clk);
    c_req = 1; c.we = w; c.addr = a; c.wdata = d;
    do @(negedge clk); while (!c_ack);
    r = c_rdata;
    @(posedge clk);
    #1 c_req = 0;
  endtask

  function automatic logic [31:0] pat(int i, int s);
    return 32'(i) * 32'h9E37_79B9 + 32'(s) * 32'h0101_0101 ^ ((i % 3 == 0) ? 32'hFFFF_0000 : 32'h0);
  endfunction

  // ---------------- monitors ----------------
  int contention = 0, w_inv = 0, r_inv = 0;
  int sp_cut [2], dpa_cut [2], dpb_cut [2];
  int toggles_addr_coded = 0, toggles_addr_plain = 0;
  int toggles_data_coded = 0, toggles_data_plain = 0;
  logic [29:0] prev_lines = '0, prev_bin = '0;
  logic [31:0] prev_wl = '0, prev_wplain = '0;
  logic        prev_wi = 0;
  always @(posedge clk) if (rst_n) begin
    logic [29:0] b;
    if (dut.u_sbus.state_q == dut.u_sbus.S_IDLE && dut.m_req == 2'b11) contention++;
    for (int k = 0; k < 2; k++) begin
      if (sp_bcs[k])  sp_cut[k]++;
      if (dpa_bcs[k]) dpa_cut[k]++;
      if (dpb_bcs[k]) dpb_cut[k]++;
    end
    if (addr_lines != prev_lines) begin
      b[29] = addr_lines[29];
      for (int k = 28; k >= 0; k--) b[k] = b[k+1] ^ addr_lines[k];
      toggles_addr_coded += $countones(addr_lines ^ prev_lines);
      toggles_addr_plain += $countones(b ^ prev_bin);
      prev_lines = addr_lines;
      prev_bin = b;
    end
    if (wl != prev_wl || wi != prev_wi) begin
      logic [31:0] plain;
      plain = wl ^ {32{wi}};
      toggles_data_coded += $countones(wl ^ prev_wl) + (wi != prev_wi);
      toggles_data_plain += $countones(plain ^ prev_wplain);
      if (wi) w_inv++;
      prev_wl = wl; prev_wi = wi; prev_wplain = plain;
    end
  end
  logic [31:0] prev_rl = '0;
  logic        prev_ri = 0;
  always @(posedge clk) if (rst_n) begin
    if ((rl != prev_rl || ri != prev_ri) && ri) r_inv++;
    prev_rl <= rl; prev_ri <= ri;
  end

  // ---------------- scenario ----------------
  int sec_done = 0;
  initial begin
    logic [31:0] r;
    logic        resp;
    int          w, n_bad;
    time         t0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. primary fills the dual-port SRAM; secondary reads it all back
    t0 = $time;
    for (int i = 0; i < DPW; i++) begin
      ahb(1, 32'h1000_0000 + 32'(i * 4), pat(i, 1), r, resp, w);
      if (i % 97 == 0) chk(w == 0 && !resp, "dual-port write without wait state");
    end
    $display("primary wrote %0d words in %0d cycles", DPW, ($time - t0) / 10);
    n_bad = 0;
    for (int i = 0; i < DPW; i++) begin
      sec(0, 32'h0010_0000 + 32'(i * 4), 0, r);
      if (r != pat(i, 1)) n_bad++;
    end
    chk(n_bad == 0, $sformatf("secondary read back the mailbox (%0d bad words)", n_bad));
    checks += DPW - 1;

    // 2. secondary writes a block (spanning both cuts), primary reads it
    for (int i = 200; i < 400; i++) sec(1, 32'h0010_0000 + 32'(i * 4), pat(i, 2), r);
    for (int i = 200; i < 400; i++) begin
      ahb(0, 32'h1000_0000 + 32'(i * 4), 0, r, resp, w);
      read_wait_cycles += w;
      chk(r == pat(i, 2) && w == 1 && !resp, $sformatf("primary reads secondary's block word %0d", i));
    end

    // 3. secondary writes the single-port SRAM while the primary works through the bridge
    fork
      begin
        for (int i = 0; i < SPW; i++) sec(1, 32'(i * 4), pat(i, 3), r);
        sec_done = 1;
      end
      begin
        // pushes of control words to the top of the SRAM, which the secondary
        // side does not write; pulls of words the secondary side has written
        for (int k = 0; k < 64; k++) begin
          ahb(1, 32'h2000_0000 + 32'((SPW - 1 - k) * 4), pat(k, 4), r, resp, w);
          chk(!resp && w >= 3, "bridge write stalls for the secondary transfer");
        end
        wait (sec_done != 0);
        for (int k = 0; k < 64; k++) begin
          ahb(0, 32'h2000_0000 + 32'((SPW - 1 - k) * 4), 0, r, resp, w);
          chk(r == pat(SPW - 1 - k, 3), "secondary data overwrote the pushed words later");
        end
      end
    join
    for (int k = 0; k < 300; k++) begin
      int i;
      i = (k * 37) % SPW;
      ahb(0, 32'h2000_0000 + 32'(i * 4), 0, r, resp, w);
      chk(r == pat(i, 3), $sformatf("primary pulls SRAM word %0d through the bridge", i));
    end
    // push, then the secondary processor picks the value up; uncontended
    // bridge latency: 2 wait states for an SRAM write, 3 for an SRAM read
    ahb(1, 32'h2000_0010, 32'hC0DE_0001, r, resp, w);
    chk(w == 2, $sformatf("bridge write to SRAM: %0d wait states", w));
    ahb(0, 32'h2000_0010, 0, r, resp, w);
    chk(w == 3 && r == 32'hC0DE_0001, $sformatf("bridge read of SRAM: %0d wait states", w));
    sec(0, 32'h0000_0010, 0, r);
    chk(r == 32'hC0DE_0001, "secondary sees the pushed control word");

    // 4. external slaves
    for (int k = 0; k < 16; k++) begin
      ahb(1, 32'h2400_0000 + 32'(k * 4), pat(k, 5), r, resp, w);
      ahb(1, 32'h3000_0000 + 32'(k * 4), pat(k, 6), r, resp, w);
    end
    for (int k = 0; k < 16; k++) begin
      ahb(0, 32'h2400_0000 + 32'(k * 4), 0, r, resp, w);
      chk(r == pat(k, 5), "external secondary slave through the bridge");
      sec(0, 32'h0400_0000 + 32'(k * 4), 0, r);
      chk(r == pat(k, 5), "external secondary slave from the secondary master");
      ahb(0, 32'h3000_0000 + 32'(k * 4), 0, r, resp, w);
      chk(r == pat(k, 6), "external primary slave");
    end

    // 5. power management through the bridge
    ahb(1, 32'h2030_0004, 32'b0111, r, resp, w);   // supply off for domain 3
    repeat (4) @(negedge clk);
    chk(pd_pwr_sw[3] == 0 && pd_iso[3] == 1 && pd_clk_en[3] == 0, "domain 3 shut down");
    chk(pd_pwr_sw[2:0] == 3'b111 && pd_clk_en[2:0] == 3'b111, "other domains running");
    ahb(0, 32'h2030_0008, 0, r, resp, w);
    chk(r[3:0] == 4'b0111, "status shows domain 3 off");
    ahb(1, 32'h2030_0004, 32'b1111, r, resp, w);   // wake it
    repeat (25) @(negedge clk);
    chk(pd_pwr_sw[3] == 1 && pd_iso[3] == 0 && pd_clk_en[3] == 1, "domain 3 awake");

    // 6. beyond the dual-port SRAM
    ahb(0, 32'h1000_0000 + 32'(DPW * 4), 0, r, resp, w);
    chk(resp == 1, "ERROR response beyond the dual-port SRAM");

    // mechanisms
    chk(bridge_stall_cycles > 0, "bridge stalls");
    chk(read_wait_cycles > 0, "dual-port read wait states");
    chk(contention > 0, "secondary bus contention");
    chk(w_inv > 0, "bus-invert on write lines");
    chk(r_inv > 0, "bus-invert on read lines");
    chk(sp_cut[0] > 0 && sp_cut[1] > 0, "both single-port cuts used");
    chk(dpa_cut[0] > 0 && dpa_cut[1] > 0 && dpb_cut[0] > 0 && dpb_cut[1] > 0, "both dual-port cuts used from both ports");
    chk(n_error > 0, "ERROR response");
    chk(n_pe > 0 && n_se > 0, "external slaves used");
    $display("bridge stall cycles %0d, contention %0d, inverted write/read transfers %0d/%0d, errors %0d",
             bridge_stall_cycles, contention, w_inv, r_inv, n_error);
    $display("cut enables: sp %0d/%0d dpA %0d/%0d dpB %0d/%0d", sp_cut[0], sp_cut[1],
             dpa_cut[0], dpa_cut[1], dpb_cut[0], dpb_cut[1]);
    $display("secondary address line toggles: Gray %0d, binary %0d", toggles_addr_coded, toggles_addr_plain);
    $display("secondary write data toggles: bus-invert %0d (with invert line), plain %0d",
             toggles_data_coded, toggles_data_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
