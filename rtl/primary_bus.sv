// primary_bus: slave side of the primary (protocol) AMBA AHB bus.
//
// The primary bus connects the upper-layer processor and its peripherals. This
// module is its address decoder and response multiplexer for one master port:
// the top nibble of HADDR selects port A of the dual-port SRAM (region 1), the
// bridge to the secondary bus (region 2) or, for every other address, an
// external slave port where the peripherals not built here connect. The
// slave that owns the current data phase is remembered, and its HREADYOUT,
// HRDATA and HRESP are returned to the master; its HREADYOUT is also fed back
// to all slaves as HREADY.
//
// The document names the bus (AMBA AHB) and its slaves but gives no address
// map; the map is this design's. Master arbitration (processor and DMA) is not
// built: one master port is brought out.
module primary_bus
  import easy_pkg::*;
(
  input  logic              hclk,
  input  logic              hresetn,
  input  logic [31:0]       haddr_i,
  input  logic [1:0]        htrans_i,
  output logic [2:0]        hsel_o,       // 0 dual-port SRAM, 1 bridge, 2 external
  output logic              hready_o,     // to the master and to every slave
  output logic [31:0]       hrdata_o,
  output logic              hresp_o,
  input  logic [2:0]        hreadyout_i,
  input  logic [2:0][31:0]  hrdata_i,
  input  logic [2:0]        hresp_i
);

  logic [1:0] dsel_q;   // slave of the current data phase, 3 = none
  logic [1:0] asel;

  always_comb begin
    unique case (haddr_i[31:28])
      PRI_DPRAM_REGION:  asel = 2'd0;
      PRI_BRIDGE_REGION: asel = 2'd1;
      default:           asel = 2'd2;
    endcase
    hsel_o       = '0;
    hsel_o[asel] = 1'b1;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)      dsel_q <= 2'd3;
    else if (hready_o) dsel_q <= htrans_i[1] ? asel : 2'd3;
  end

  always_comb begin
    if (dsel_q == 2'd3) begin
      hready_o = 1'b1;
      hrdata_o = 32'h0;
      hresp_o  = 1'b0;
    end else begin
      hready_o = hreadyout_i[dsel_q];
      hrdata_o = hrdata_i[dsel_q];
      hresp_o  = hresp_i[dsel_q];
    end
  end

endmodule
