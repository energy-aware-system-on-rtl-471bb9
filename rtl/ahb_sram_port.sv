// ahb_sram_port: AMBA AHB slave that gives the primary bus access to one port
// of an on-chip SRAM (here port A of the dual-port SRAM).
//
// An AHB transfer has an address phase and a data phase one cycle later. The
// port samples the address phase when HSEL, HREADY and a NONSEQ/SEQ HTRANS are
// present. In the data phase a write is performed at once (no wait state)
// using HWDATA; a read issues the SRAM read in the first data-phase cycle with
// HREADYOUT low and returns HRDATA in the second, so reads take one wait state.
// Performing reads in the data phase means a read that directly follows a
// write always sees the written word. An address beyond WORDS gets the
// two-cycle AHB ERROR response and touches nothing. Only HADDR bits below
// REGION_BITS are looked at: the bits above select the slave on the bus.
//
// This design's choices (the document gives only "AMBA AHB" for the primary
// bus): 32-bit word transfers only (HSIZE is not decoded, HADDR[1:0] are
// ignored), no byte writes, and no HPROT/HBURST decoding (bursts work as
// sequences of single transfers).
module ahb_sram_port #(
  parameter int unsigned WORDS = 30720,
  parameter int unsigned AW    = 15,
  parameter int unsigned REGION_BITS = 28   // HADDR bits below the slave's region select
) (
  input  logic          hclk,
  input  logic          hresetn,
  // AHB slave side
  input  logic          hsel_i,
  input  logic [31:0]   haddr_i,
  input  logic [1:0]    htrans_i,
  input  logic          hwrite_i,
  input  logic [31:0]   hwdata_i,
  input  logic          hready_i,
  output logic          hreadyout_o,
  output logic [31:0]   hrdata_o,
  output logic          hresp_o,
  // SRAM port side
  output logic          cs_o,
  output logic          we_o,
  output logic [AW-1:0] addr_o,
  output logic [31:0]   wdata_o,
  input  logic [31:0]   rdata_i
);

  typedef enum logic [2:0] {
    DP_NONE,    // no data phase for this slave
    DP_WRITE,   // write data phase
    DP_READ1,   // read issued, wait state
    DP_READ2,   // read data returned
    DP_ERR1,    // first ERROR cycle
    DP_ERR2     // second ERROR cycle
  } dphase_e;

  dphase_e       dp_q, dp_d;
  logic [AW-1:0] addr_q;
  logic          start;
  logic          in_range;

  assign start    = hsel_i && hready_i && htrans_i[1];
  assign in_range = (haddr_i[REGION_BITS-1:2] < (REGION_BITS-2)'(WORDS));

  // Next data phase
  always_comb begin
    dp_d = dp_q;
    unique case (dp_q)
      DP_READ1: dp_d = DP_READ2;
      DP_ERR1:  dp_d = DP_ERR2;
      default: begin
        if (hready_i) begin
          if (!start)         dp_d = DP_NONE;
          else if (!in_range) dp_d = DP_ERR1;
          else if (hwrite_i)  dp_d = DP_WRITE;
          else                dp_d = DP_READ1;
        end
      end
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_q   <= DP_NONE;
      addr_q <= '0;
    end else begin
      dp_q <= dp_d;
      if (start && hready_i && (dp_q != DP_READ1) && (dp_q != DP_ERR1))
        addr_q <= haddr_i[AW+1:2];
    end
  end

  always_comb begin
    cs_o        = (dp_q == DP_WRITE) || (dp_q == DP_READ1);
    we_o        = (dp_q == DP_WRITE);
    addr_o      = addr_q;
    wdata_o     = hwdata_i;
    hreadyout_o = !((dp_q == DP_READ1) || (dp_q == DP_ERR1));
    hresp_o     = (dp_q == DP_ERR1) || (dp_q == DP_ERR2);
    hrdata_o    = (dp_q == DP_READ2) ? rdata_i : 32'h0;
  end

endmodule
