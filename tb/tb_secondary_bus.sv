// tb_secondary_bus: two master models issue random reads and writes to all four
// secondary slaves while slave models answer (the two SRAM slaves with a fixed
// one-cycle read latency, the others after random delays). Checks that every
// transfer reaches the right slave with the right address and data, that read
// data returns to the right master, that the address lines carry the Gray code
// of the word address, that no coded data transfer toggles more than 16 data
// lines, and that contention is resolved round-robin. Counts contention and
// inverted transfers and fails if either never happened.
module tb_secondary_bus;
  import easy_pkg::*;

  localparam int NOPS = 1500;

  logic clk = 0, rst_n = 0;
  logic [1:0]        m_req, m_ack;
  sec_req_t [1:0]    m;
  logic [31:0]       m_rdata;
  logic [3:0]        s_sel, s_ready;
  logic              s_we;
  logic [31:0]       s_addr, s_wdata;
  logic [3:0][31:0]  s_rdata;
  logic [SEC_WAW-1:0] addr_lines;
  logic [31:0]       wl, rl;
  logic              wi, ri, busy;

  secondary_bus dut (
    .clk, .rst_n, .m_req_i(m_req), .m_i(m), .m_ack_o(m_ack), .m_rdata_o(m_rdata),
    .s_sel_o(s_sel), .s_we_o(s_we), .s_addr_o(s_addr), .s_wdata_o(s_wdata),
    .s_ready_i(s_ready), .s_rdata_i(s_rdata),
    .addr_lines_o(addr_lines), .wdata_lines_o(wl), .wdata_inv_o(wi),
    .rdata_lines_o(rl), .rdata_inv_o(ri), .busy_o(busy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int contention = 0, rr_ok = 0, w_inverted = 0, r_inverted = 0, done [2];
  int per_slave [4];
  logic [31:0] mem [logic [31:0]];

  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int region_of(logic [31:0] a);
    if (a < 32'h4000) return 0;
    if (a >= 32'h0010_0000 && a < 32'h0010_0000 + 32'd122880) return 1;
    if (a[31:8] == 24'h003000) return 2;
    return 3;
  endfunction

  // ---- slave models ----
  logic [31:0] fix_rdata;
  int          delay, wait_cnt;
  always @(posedge clk) begin
    if ((s_sel[0] || s_sel[1]) && s_we)  mem[s_addr] = s_wdata;
    if ((s_sel[0] || s_sel[1]) && !s_we) fix_rdata <= mem.exists(s_addr) ? mem[s_addr] : 32'h0;
    if ((s_sel[2] || s_sel[3]) && s_ready[2] | s_ready[3]) begin
      if (s_we) mem[s_addr] = s_wdata;
      wait_cnt <= 0;
      delay    <= $urandom % 4;
    end else if (s_sel[2] || s_sel[3]) wait_cnt <= wait_cnt + 1;
  end
  always_comb begin
    s_ready = '0;
    s_ready[2] = s_sel[2] && (wait_cnt >= delay);
    s_ready[3] = s_sel[3] && (wait_cnt >= delay);
    s_rdata[0] = fix_rdata;
    s_rdata[1] = fix_rdata;
    s_rdata[2] = mem.exists(s_addr) ? mem[s_addr] : 32'h0;
    s_rdata[3] = mem.exists(s_addr) ? mem[s_addr] : 32'h0;
  end

  // ---- line and routing monitors ----
  logic [31:0] prev_wl = '0, prev_rl = '0;
  logic        prev_wi = 1'b0, prev_ri = 1'b0;
  logic [1:0]  pending_seen;
  always @(negedge clk) if (rst_n) begin
    if (|s_sel) begin
      int r;
      r = region_of(s_addr);
      chk(s_sel == 4'(1 << r), $sformatf("slave select %b for %h", s_sel, s_addr));
      chk(addr_lines == (s_addr[31:2] ^ (s_addr[31:2] >> 1)), "address lines carry Gray code");
      per_slave[r]++;
    end
    if (wl != prev_wl || wi != prev_wi) begin
      chk($countones(wl ^ prev_wl) <= 16, "write data toggle bound");
      if (wi) w_inverted++;
    end
    if (rl != prev_rl || ri != prev_ri) begin
      chk($countones(rl ^ prev_rl) <= 16, "read data toggle bound");
      if (ri) r_inverted++;
    end
    prev_wl = wl; prev_wi = wi; prev_rl = rl; prev_ri = ri;
  end

  // round-robin: when both wait in IDLE, the grant must alternate
  logic last_gnt = 1;
  always @(posedge clk) if (rst_n) begin
    if (dut.state_q == dut.S_IDLE && m_req == 2'b11) begin
      contention++;
      checks++;
      if (dut.gnt_n == last_gnt) begin failures++; $display("FAIL: round robin"); end
      else rr_ok++;
    end
    if (dut.state_q == dut.S_IDLE && |m_req) last_gnt <= dut.gnt_n;
  end

  // ---- master models: master i uses word addresses with bit 2 == i ----
  logic [31:0] exp_mem [2][logic [31:0]];
  function automatic logic [31:0] pick_addr(int i);
    logic [31:0] a;
    case ($urandom % 4)
      0: a = ($urandom % 32'h4000);
      1: a = 32'h0010_0000 + ($urandom % 32'd122880);
      2: a = 32'h0030_0000 + ($urandom % 32'h100);
      default: a = 32'h0200_0000 + ($urandom % 32'h1000);
    endcase
    a[1:0] = 2'b00;
    a[2]   = i[0];
    if (a[2] == 1'b1 && a == 32'h0000_4000) a = 32'h0000_3FFC;
    return a;
  endfunction

  for (genvar i = 0; i < 2; i++) begin : g_m
    initial begin
      logic [31:0] a, d;
      logic w;
      m_req[i] = 0;
      m[i] = '0;
      wait (rst_n);
      for (int n = 0; n < NOPS; n++) begin
        repeat ($urandom % 3) @(negedge clk);
        a = pick_addr(i);
        w = !exp_mem[i].exists(a) || (($urandom % 2) != 0);
        d = $urandom;
        if ($urandom % 3 == 0) d = ~m[i].wdata;   // many toggles: invert
        m[i].we = w; m[i].addr = a; m[i].wdata = d;
        m_req[i] = 1;
        do @(negedge clk); while (!m_ack[i]);
        // a synchronous master sees the acknowledge at the next edge
        @(posedge clk);
        #1 m_req[i] = 0;
        if (w) exp_mem[i][a] = d;
        done[i]++;
      end
    end
  end

  // read data is checked in the acknowledge cycle
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++)
      if (m_ack[i] && !m[i].we)
        chk(m_rdata == exp_mem[i][m[i].addr], $sformatf("master %0d read %h got %h exp %h",
            i, m[i].addr, m_rdata, exp_mem[i][m[i].addr]));
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] == NOPS && done[1] == NOPS);
    repeat (3) @(negedge clk);
    chk(contention > 10, "contention happened");
    chk(w_inverted > 10 && r_inverted > 10, "bus-invert happened on both data buses");
    for (int s = 0; s < 4; s++) chk(per_slave[s] > 50, $sformatf("slave %0d used", s));
    $display("contention %0d, inverted writes %0d, inverted reads %0d", contention, w_inverted, r_inverted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
