// secondary_bus: the modem-control bus, with encoded address and data lines.
//
// Two masters share the bus: master 0 is the bus bridge from the primary bus,
// master 1 is the port of the modem-control processor. Four slaves sit on it:
// the single-port SRAM, port B of the dual-port SRAM, the power management
// registers and an external port for the slaves not built here.
//
// The document reduces the toggling of this bus by coding its lines: the
// address lines carry the word address in Gray code, and the data lines (write
// data and read data) carry bus-invert code with one invert line each. So the
// bus is built as: master mux -> Gray encoder / bus-invert encoder -> bus line
// registers -> Gray decoder / bus-invert decoder -> slaves, and back through a
// bus-invert encoder/decoder pair for read data. The line registers hold their
// value between transfers, so an idle bus does not toggle; the write data
// lines are loaded only by writes and the read data lines only by reads.
//
// Transfer sequence (this design's own protocol; the document gives none):
//   IDLE    a master holds m_req_i; round-robin arbitration picks one; its
//           address and write data are coded into the line registers.
//   XFER    the address is decoded from the lines and the slave's select is
//           raised. The two SRAMs answer one cycle later (fixed latency); the
//           other slaves hold select until they raise s_ready_i.
//   MEMWAIT (SRAM reads only) read data is taken from the SRAM.
//   RESP    read data, decoded from the read lines, and a one-cycle m_ack_o go
//           to the granted master.
// A master must hold its request unchanged until its acknowledge.
module secondary_bus
  import easy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // masters
  input  logic [1:0]        m_req_i,
  input  sec_req_t [1:0]    m_i,
  output logic [1:0]        m_ack_o,
  output logic [31:0]       m_rdata_o,
  // slaves (address is the decoded byte address)
  output logic [3:0]        s_sel_o,
  output logic              s_we_o,
  output logic [31:0]       s_addr_o,
  output logic [31:0]       s_wdata_o,
  input  logic [3:0]        s_ready_i,
  input  logic [3:0][31:0]  s_rdata_i,
  // the coded bus lines, for observation
  output logic [SEC_WAW-1:0] addr_lines_o,
  output logic [31:0]        wdata_lines_o,
  output logic               wdata_inv_o,
  output logic [31:0]        rdata_lines_o,
  output logic               rdata_inv_o,
  output logic               busy_o
);

  typedef enum logic [1:0] {S_IDLE, S_XFER, S_MEMWAIT, S_RESP} state_e;

  state_e            state_q;
  logic              gnt_q, last_q, gnt_n;
  logic              we_q;
  logic [SEC_WAW-1:0] addr_gray, addr_lines_q, addr_bin;
  logic              load_w, load_r;
  logic [31:0]       wdata_dec, rdata_dec, rdata_sel;
  sec_slave_e        slave;
  sec_req_t          req;

  // Round-robin between the two masters: on a tie the one not served last wins
  always_comb begin
    if (m_req_i[0] && m_req_i[1]) gnt_n = !last_q;
    else                          gnt_n = m_req_i[1];
    req = m_i[gnt_n];
  end

  gray_encoder #(.W(SEC_WAW)) u_genc (.bin_i(req.addr[31:2]), .gray_o(addr_gray));
  gray_decoder #(.W(SEC_WAW)) u_gdec (.gray_i(addr_lines_q), .bin_o(addr_bin));

  assign load_w = (state_q == S_IDLE) && (|m_req_i) && req.we;

  bus_invert_encoder #(.W(32)) u_wenc (
    .clk(clk), .rst_n(rst_n), .load_i(load_w), .data_i(req.wdata),
    .bus_o(wdata_lines_o), .inv_o(wdata_inv_o)
  );
  bus_invert_decoder #(.W(32)) u_wdec (
    .bus_i(wdata_lines_o), .inv_i(wdata_inv_o), .data_o(wdata_dec)
  );

  // Address decode of the secondary bus map
  always_comb begin
    logic [31:0] a;
    a = {addr_bin, 2'b00};
    if (a >= SEC_SRAM_BASE && a < SEC_SRAM_BASE + 32'(SP_WORDS * 4))
      slave = SEC_S_SRAM;
    else if (a >= SEC_DPRAM_BASE && a < SEC_DPRAM_BASE + 32'(DP_WORDS * 4))
      slave = SEC_S_DPRAM;
    else if (a[31:8] == SEC_PMU_BASE[31:8])
      slave = SEC_S_PMU;
    else
      slave = SEC_S_EXT;
  end

  logic fixed_latency;
  assign fixed_latency = (slave == SEC_S_SRAM) || (slave == SEC_S_DPRAM);
  assign rdata_sel     = s_rdata_i[slave];

  assign load_r = !we_q && (((state_q == S_XFER) && !fixed_latency && s_ready_i[slave]) ||
                            (state_q == S_MEMWAIT));

  bus_invert_encoder #(.W(32)) u_renc (
    .clk(clk), .rst_n(rst_n), .load_i(load_r), .data_i(rdata_sel),
    .bus_o(rdata_lines_o), .inv_o(rdata_inv_o)
  );
  bus_invert_decoder #(.W(32)) u_rdec (
    .bus_i(rdata_lines_o), .inv_i(rdata_inv_o), .data_o(rdata_dec)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      gnt_q        <= 1'b0;
      last_q       <= 1'b1;
      we_q         <= 1'b0;
      addr_lines_q <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (|m_req_i) begin
          gnt_q        <= gnt_n;
          last_q       <= gnt_n;
          we_q         <= req.we;
          addr_lines_q <= addr_gray;
          state_q      <= S_XFER;
        end
        S_XFER: begin
          if (fixed_latency)          state_q <= we_q ? S_RESP : S_MEMWAIT;
          else if (s_ready_i[slave])  state_q <= S_RESP;
        end
        S_MEMWAIT: state_q <= S_RESP;
        S_RESP:    state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    s_sel_o         = '0;
    s_sel_o[slave]  = (state_q == S_XFER);
    s_we_o          = we_q;
    s_addr_o        = {addr_bin, 2'b00};
    s_wdata_o       = wdata_dec;
    m_ack_o         = '0;
    m_ack_o[gnt_q]  = (state_q == S_RESP);
    m_rdata_o       = rdata_dec;
    addr_lines_o    = addr_lines_q;
    busy_o          = (state_q != S_IDLE);
  end

  // A master keeps its request until it is acknowledged
  for (genvar i = 0; i < 2; i++) begin : g_req_rule
    a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
      m_req_i[i] && !m_ack_o[i] |=> m_req_i[i]);
  end
  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_sel_o));

endmodule
