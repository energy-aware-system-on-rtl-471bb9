// easy_pkg: shared constants and types of the memory and interconnect subsystem.
//
// The SoC has two buses: a primary "protocol" bus (AMBA AHB) carrying the
// upper-layer processor and a secondary "modem-control" bus reached from the
// primary bus through a bridge. A dual-port SRAM connects to both. The sizes of
// the two on-chip SRAMs and of their cuts are the document's (Table 1); the
// address maps below are this design's own choice, since no memory map is given.
//
// All buses carry 32-bit words. The secondary bus is word addressed on its
// lines: address bits [1:0] are not transmitted.
package easy_pkg;

  localparam int unsigned AW = 32;   // byte address width of both buses
  localparam int unsigned DW = 32;   // data width of both buses
  localparam int unsigned SEC_WAW = AW - 2;  // word address lines of the secondary bus

  // AHB transfer types (HTRANS)
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Primary bus map (top nibble of HADDR selects the slave)
  localparam logic [3:0] PRI_DPRAM_REGION  = 4'h1;  // dual-port SRAM, port A
  localparam logic [3:0] PRI_BRIDGE_REGION = 4'h2;  // window onto the secondary bus
  // every other region goes to the external primary slave port

  // The bridge window maps 0x2xxx_xxxx on the primary bus to 0x0xxx_xxxx on the
  // secondary bus.
  localparam logic [AW-1:0] BRIDGE_WINDOW_MASK = 32'h0FFF_FFFF;

  // Secondary bus map (byte addresses)
  localparam logic [AW-1:0] SEC_SRAM_BASE  = 32'h0000_0000;  // 16 KB single-port SRAM
  localparam logic [AW-1:0] SEC_DPRAM_BASE = 32'h0010_0000;  // 120 KB dual-port SRAM, port B
  localparam logic [AW-1:0] SEC_PMU_BASE   = 32'h0030_0000;  // power management registers
  // every other address goes to the external secondary slave port

  // On-chip SRAM sizes in 32-bit words (document: 16 KB and 120 KB)
  localparam int unsigned SP_WORDS = 16 * 1024 / 4;    // 4096
  localparam int unsigned DP_WORDS = 120 * 1024 / 4;   // 30720

  // Secondary bus slave indices
  typedef enum logic [1:0] {
    SEC_S_SRAM  = 2'd0,
    SEC_S_DPRAM = 2'd1,
    SEC_S_PMU   = 2'd2,
    SEC_S_EXT   = 2'd3
  } sec_slave_e;

  // A request of a secondary-bus master
  typedef struct packed {
    logic          we;
    logic [AW-1:0] addr;   // byte address, bits [1:0] ignored
    logic [DW-1:0] wdata;
  } sec_req_t;

endpackage
