// easy_soc_top: memory and interconnect subsystem of a dual-bus 5 GHz WLAN SoC.
//
// The SoC splits the protocol stack over two buses, each with its own
// processor: the primary "protocol" bus (AMBA AHB) for the upper layers and the
// secondary "modem-control" bus for the lower MAC and the baseband modem. The
// buses meet in two places: a 120 KB dual-port SRAM, where one side leaves
// large data blocks for the other, and a bridge through which the primary bus
// reads and writes small items on the secondary bus. This top wires together
// the parts of that structure that are built here:
//   primary_bus         AHB decode/mux: dual-port SRAM port A, bridge, external
//   ahb_sram_port       AHB slave for port A of the dual-port SRAM
//   bus_bridge          primary -> secondary bus bridge (secondary master 0)
//   secondary_bus       arbitration, decode, Gray-coded address lines and
//                       bus-invert coded data lines
//   partitioned_sram_sp 16 KB single-port SRAM (3.4 KB + 12.6 KB cuts)
//   partitioned_sram_dp 120 KB dual-port SRAM (1 KB + 119 KB cuts)
//   power_management    clock-gating and supply-shutdown sequencer
// The processors, DMA, modem, MAC accelerator and peripherals are not built:
// the primary master port (processor), the secondary master port (modem-
// control processor), an external primary slave port and an external
// secondary slave port are brought out for them, with the power domain
// controls.
//
// Address maps (this design's): primary 0x1xxx_xxxx dual-port SRAM,
// 0x2xxx_xxxx bridge window onto secondary 0x0xxx_xxxx, others external.
// Secondary 0x0000_0000 16 KB SRAM, 0x0010_0000 120 KB dual-port SRAM,
// 0x0030_0000 power management, others external.
module easy_soc_top
  import easy_pkg::*;
#(
  parameter int unsigned NDOM          = 4,
  parameter int unsigned PWR_UP_CYCLES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // primary bus master port (upper-layer processor)
  input  logic [31:0]     p_haddr_i,
  input  logic [1:0]      p_htrans_i,
  input  logic            p_hwrite_i,
  input  logic [31:0]     p_hwdata_i,
  output logic            p_hready_o,
  output logic [31:0]     p_hrdata_o,
  output logic            p_hresp_o,
  // external primary slave (uses p_haddr_i etc. and p_hready_o)
  output logic            pe_hsel_o,
  input  logic            pe_hreadyout_i,
  input  logic [31:0]     pe_hrdata_i,
  input  logic            pe_hresp_i,
  // secondary bus master port (modem-control processor)
  input  logic            c_req_i,
  input  sec_req_t        c_i,
  output logic            c_ack_o,
  output logic [31:0]     c_rdata_o,
  // external secondary slave
  output logic            se_sel_o,
  output logic            se_we_o,
  output logic [31:0]     se_addr_o,
  output logic [31:0]     se_wdata_o,
  input  logic            se_ready_i,
  input  logic [31:0]     se_rdata_i,
  // power domain controls
  output logic [NDOM-1:0] pd_clk_en_o,
  output logic [NDOM-1:0] pd_iso_o,
  output logic [NDOM-1:0] pd_pwr_sw_o,
  // monitors: enabled SRAM cuts and the coded secondary bus lines
  output logic [1:0]         mon_sp_bank_cs_o,
  output logic [1:0]         mon_dp_a_bank_cs_o,
  output logic [1:0]         mon_dp_b_bank_cs_o,
  output logic [SEC_WAW-1:0] mon_sec_addr_lines_o,
  output logic [31:0]        mon_sec_wdata_lines_o,
  output logic               mon_sec_wdata_inv_o,
  output logic [31:0]        mon_sec_rdata_lines_o,
  output logic               mon_sec_rdata_inv_o,
  output logic               mon_sec_busy_o
);

  // ---------------- primary bus ----------------
  logic [2:0]       hsel, hreadyout, hresp;
  logic [2:0][31:0] hrdata;
  logic             hready;

  primary_bus u_pbus (
    .hclk(clk), .hresetn(rst_n),
    .haddr_i(p_haddr_i), .htrans_i(p_htrans_i),
    .hsel_o(hsel), .hready_o(hready), .hrdata_o(p_hrdata_o), .hresp_o(p_hresp_o),
    .hreadyout_i(hreadyout), .hrdata_i(hrdata), .hresp_i(hresp)
  );
  assign p_hready_o   = hready;
  assign pe_hsel_o    = hsel[2];
  assign hreadyout[2] = pe_hreadyout_i;
  assign hrdata[2]    = pe_hrdata_i;
  assign hresp[2]     = pe_hresp_i;

  // dual-port SRAM, port A on the primary bus
  logic              a_cs, a_we;
  logic [14:0]       a_addr;
  logic [31:0]       a_wdata, a_rdata;
  logic [1:0]        a_bank_cs, b_bank_cs;
  logic              a_oor, b_oor;

  ahb_sram_port #(.WORDS(DP_WORDS), .AW(15)) u_dp_ahb (
    .hclk(clk), .hresetn(rst_n),
    .hsel_i(hsel[0]), .haddr_i(p_haddr_i), .htrans_i(p_htrans_i), .hwrite_i(p_hwrite_i),
    .hwdata_i(p_hwdata_i), .hready_i(hready),
    .hreadyout_o(hreadyout[0]), .hrdata_o(hrdata[0]), .hresp_o(hresp[0]),
    .cs_o(a_cs), .we_o(a_we), .addr_o(a_addr), .wdata_o(a_wdata), .rdata_i(a_rdata)
  );

  // bridge
  logic [1:0]      m_req, m_ack;
  sec_req_t [1:0]  m_bus;
  logic [31:0]     m_rdata;

  bus_bridge u_bridge (
    .hclk(clk), .hresetn(rst_n),
    .hsel_i(hsel[1]), .haddr_i(p_haddr_i), .htrans_i(p_htrans_i), .hwrite_i(p_hwrite_i),
    .hwdata_i(p_hwdata_i), .hready_i(hready),
    .hreadyout_o(hreadyout[1]), .hrdata_o(hrdata[1]), .hresp_o(hresp[1]),
    .m_req_o(m_req[0]), .m_o(m_bus[0]), .m_ack_i(m_ack[0]), .m_rdata_i(m_rdata)
  );

  // ---------------- secondary bus ----------------
  assign m_req[1] = c_req_i;
  assign m_bus[1] = c_i;
  assign c_ack_o  = m_ack[1];
  assign c_rdata_o = m_rdata;

  logic [3:0]       s_sel, s_ready;
  logic             s_we;
  logic [31:0]      s_addr, s_wdata;
  logic [3:0][31:0] s_rdata;
  logic [SEC_WAW-1:0] addr_lines;
  logic [31:0]      wdata_lines, rdata_lines;
  logic             wdata_inv, rdata_inv, sec_busy;

  secondary_bus u_sbus (
    .clk(clk), .rst_n(rst_n),
    .m_req_i(m_req), .m_i(m_bus), .m_ack_o(m_ack), .m_rdata_o(m_rdata),
    .s_sel_o(s_sel), .s_we_o(s_we), .s_addr_o(s_addr), .s_wdata_o(s_wdata),
    .s_ready_i(s_ready), .s_rdata_i(s_rdata),
    .addr_lines_o(addr_lines), .wdata_lines_o(wdata_lines), .wdata_inv_o(wdata_inv),
    .rdata_lines_o(rdata_lines), .rdata_inv_o(rdata_inv), .busy_o(sec_busy)
  );

  // single-port SRAM
  logic [1:0] sp_bank_cs;
  logic       sp_oor;

  partitioned_sram_sp u_sram (
    .clk(clk), .cs_i(s_sel[SEC_S_SRAM]), .we_i(s_we),
    .addr_i(s_addr[13:2]), .wdata_i(s_wdata), .rdata_o(s_rdata[SEC_S_SRAM]),
    .bank_cs_o(sp_bank_cs), .oor_o(sp_oor)
  );
  assign s_ready[SEC_S_SRAM] = 1'b0;  // fixed latency, not used by the bus

  // dual-port SRAM, port B on the secondary bus
  logic [31:0] dp_off;
  assign dp_off = s_addr - SEC_DPRAM_BASE;

  partitioned_sram_dp u_dpram (
    .clk(clk),
    .a_cs_i(a_cs), .a_we_i(a_we), .a_addr_i(a_addr), .a_wdata_i(a_wdata),
    .a_rdata_o(a_rdata), .a_bank_cs_o(a_bank_cs), .a_oor_o(a_oor),
    .b_cs_i(s_sel[SEC_S_DPRAM]), .b_we_i(s_we), .b_addr_i(dp_off[16:2]), .b_wdata_i(s_wdata),
    .b_rdata_o(s_rdata[SEC_S_DPRAM]), .b_bank_cs_o(b_bank_cs), .b_oor_o(b_oor)
  );
  assign s_ready[SEC_S_DPRAM] = 1'b0;  // fixed latency, not used by the bus

  // power management
  power_management #(.NDOM(NDOM), .PWR_UP_CYCLES(PWR_UP_CYCLES)) u_pmu (
    .clk(clk), .rst_n(rst_n),
    .s_sel_i(s_sel[SEC_S_PMU]), .s_we_i(s_we), .s_addr_i(s_addr[3:0]), .s_wdata_i(s_wdata),
    .s_ready_o(s_ready[SEC_S_PMU]), .s_rdata_o(s_rdata[SEC_S_PMU]),
    .clk_en_o(pd_clk_en_o), .iso_o(pd_iso_o), .pwr_sw_o(pd_pwr_sw_o)
  );

  // external secondary slave
  assign se_sel_o   = s_sel[SEC_S_EXT];
  assign se_we_o    = s_we;
  assign se_addr_o  = s_addr;
  assign se_wdata_o = s_wdata;
  assign s_ready[SEC_S_EXT] = se_ready_i;
  assign s_rdata[SEC_S_EXT] = se_rdata_i;

  assign mon_sp_bank_cs_o      = sp_bank_cs;
  assign mon_dp_a_bank_cs_o    = a_bank_cs;
  assign mon_dp_b_bank_cs_o    = b_bank_cs;
  assign mon_sec_addr_lines_o  = addr_lines;
  assign mon_sec_wdata_lines_o = wdata_lines;
  assign mon_sec_wdata_inv_o   = wdata_inv;
  assign mon_sec_rdata_lines_o = rdata_lines;
  assign mon_sec_rdata_inv_o   = rdata_inv;
  assign mon_sec_busy_o        = sec_busy;

endmodule
