// bus_bridge: AHB slave on the primary bus that is a master of the secondary
// bus.
//
// Through the bridge the upper-layer processor on the primary bus pushes (or
// pulls) small amounts of control information and data to (or from) the
// secondary, modem-control bus, as the document describes; large blocks go
// through the dual-port SRAM instead. Each AHB transfer into the bridge window
// becomes one secondary-bus transfer: the address phase is captured, and in the
// data phase the bridge requests the secondary bus and holds HREADYOUT low
// until the secondary bus acknowledges. Read data is passed to HRDATA in the
// acknowledge cycle. The primary address is mapped to the secondary bus by
// masking with WINDOW_MASK.
//
// Timing: a transfer costs as many wait states as the secondary bus takes:
// on an idle bus two for an SRAM write and three for an SRAM read. Transfers are
// not posted. Interface choices (request held until a one-cycle acknowledge on
// the secondary side; 32-bit AHB transfers only) are this design's.
module bus_bridge
  import easy_pkg::*;
#(
  parameter logic [31:0] WINDOW_MASK = BRIDGE_WINDOW_MASK
) (
  input  logic        hclk,
  input  logic        hresetn,
  // AHB slave side (primary bus)
  input  logic        hsel_i,
  input  logic [31:0] haddr_i,
  input  logic [1:0]  htrans_i,
  input  logic        hwrite_i,
  input  logic [31:0] hwdata_i,
  input  logic        hready_i,
  output logic        hreadyout_o,
  output logic [31:0] hrdata_o,
  output logic        hresp_o,
  // Secondary bus master side
  output logic        m_req_o,
  output sec_req_t    m_o,
  input  logic        m_ack_i,
  input  logic [31:0] m_rdata_i
);

  logic        pending_q;
  logic        write_q;
  logic [31:0] addr_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      pending_q <= 1'b0;
      write_q   <= 1'b0;
      addr_q    <= '0;
    end else if (hready_i) begin
      // hready_i high ends the current data phase (ours only with m_ack_i)
      pending_q <= hsel_i && htrans_i[1];
      if (hsel_i && htrans_i[1]) begin
        write_q <= hwrite_i;
        addr_q  <= haddr_i & WINDOW_MASK;
      end
    end
  end

  always_comb begin
    m_req_o       = pending_q;
    m_o.we        = write_q;
    m_o.addr      = addr_q;
    m_o.wdata     = hwdata_i;  // AHB holds HWDATA for the whole data phase
    hreadyout_o   = !pending_q || m_ack_i;
    hrdata_o      = m_ack_i ? m_rdata_i : 32'h0;
    hresp_o       = 1'b0;
  end

endmodule
