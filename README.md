# Dual-bus memory and interconnect subsystem for a 5 GHz WLAN SoC

A HIPERLAN/2 and IEEE 802.11a terminal chip splits its protocol stack over two
processors on two buses. The upper layers (convergence, error control, radio
link control) run on a processor on the **primary bus**, an AMBA AHB bus. The
lower MAC and the control of the OFDM baseband modem run on a second processor
on the **secondary bus**, the "modem-control" bus. Each layer keeps its own bus,
so neither waits for the other. The two buses meet in two places:

* a **120 KB dual-port SRAM**, a mailbox where one side leaves large data
  blocks for the other side to read;
* a **bus bridge**, through which the primary side pushes or pulls single
  control words on the secondary bus.

Power is the main design constraint. This RTL contains the hardware parts of
three power measures:

* **Partitioned SRAMs.** Each on-chip SRAM is split into cuts of unequal size,
  so that frequently used addresses sit in a small cut. An access enables only
  the cut that holds its address.
* **Coded secondary bus.** The address lines carry Gray code. The data lines
  carry bus-invert code, so sequential addresses and uncorrelated data toggle
  fewer wires.
* **Power management.** A controller sequences clock gating and supply
  shutdown per power domain.

This repository gives synthesizable SystemVerilog for that memory and
interconnect subsystem. The processors, the modem, the 802.11a MAC accelerator
and the peripherals are not included. Their bus ports come out of the top
module as plain ports.

## Structure

```
 primary master port (processor / DMA)
        |
   primary_bus ---- region 1 ---- ahb_sram_port --- port A --+
   (AHB decode,                                             |
    response mux)-- region 2 ---- bus_bridge                 |  partitioned_sram_dp
        |                          | master 0                |  120 KB = 1 KB + 119 KB cuts
        +-- other --> external     |                         |
                      primary    secondary_bus ---- port B --+
                      slave        | master 1 <-- secondary master port (modem-control processor)
                                   |-- partitioned_sram_sp   16 KB = 3.4 KB + 12.6 KB cuts
                                   |-- power_management      clock gating / supply shutdown
                                   +-- external secondary slave (modem control, UART, ...)
```

`easy_soc_top` wires these together. The shared types and the address map are
in `easy_pkg`.

## The secondary bus and its coded lines

This is the part that takes the most care. `secondary_bus` has two masters,
the bridge (0) and the modem-control processor port (1). It has four slaves:
the single-port SRAM, port B of the dual-port SRAM, the power-management
registers, and an external port. The bus wires themselves are coded:

```
 master mux --> gray_encoder -----------> [addr line reg] --> gray_decoder --> slave address
           \--> bus_invert_encoder (reg) --> wdata lines + inv --> bus_invert_decoder --> slave wdata
 slave mux ---> bus_invert_encoder (reg) --> rdata lines + inv --> bus_invert_decoder --> master rdata
```

* The **address lines** carry the Gray code of the 30-bit word address
  (`g = b ^ (b >> 1)`). A sweep through consecutive words toggles one line per
  transfer instead of about two on average.
* Each **data direction** has 32 lines plus an invert line. Before a word is
  sent, the encoder counts how many of the 32 lines would change. If that is
  more than 16, it sends the complement and raises the invert line. The
  receiver XORs the lines with the invert bit.
* The line registers are loaded only by a transfer that uses them. Writes load
  the write lines, reads load the read lines, and nothing toggles while the bus
  is idle. This is what turns the coding into saved transitions.

**Transfer protocol.** A master raises `m_req_i` with a `sec_req_t` (write
flag, byte address, write data). It holds them until `m_ack_o` is high for one
cycle, and in that cycle `m_rdata_o` carries the read data. The bus steps
through four states:

| state   | what happens |
|---------|--------------|
| IDLE    | Round-robin arbitration if both masters request. The granted request is coded into the line registers. |
| XFER    | The address is decoded from the lines, and the slave's `s_sel_o` bit is high. SRAM slaves take one cycle. The PMU and the external slave keep select high until they raise `s_ready_i`. |
| MEMWAIT | SRAM reads only: the SRAM's read data is loaded into the read lines. |
| RESP    | `m_ack_o` goes to the granted master, with the decoded read data. |

An SRAM write takes 3 cycles from request to acknowledge, and an SRAM read
takes 4. An external slave access takes 3 cycles plus its ready delay. Two
assertions check the rules: a request stays up until its acknowledge, and at
most one slave is selected.

## Partitioned SRAMs

`mem_select_decoder` is the memory selection block. It takes a list of cut
sizes `BANK_WORDS[]`, and the sizes need not be powers of two. It compares the
address with each cut's bounds, raises that cut's chip select, and gives the
address minus the cut's base. Cut 0 is at the bottom of the range.

* `partitioned_sram_sp` holds 4096 words as cuts of 870 and 3226 words. This is
  16 KB as 3.4 KB + 12.6 KB: 3.4 KB is not a whole number of words, so the
  first cut is 3480 bytes.
* `partitioned_sram_dp` holds 30720 words as cuts of 256 and 30464 words, that
  is 1 KB + 119 KB. It is true dual-port, and each port has its own selection
  decoder. If both ports write the same word in one cycle, port A's value is
  kept.

Both have a synchronous read with one cycle of latency. Both output each cut's
chip select (`bank_cs_o`) so that per-cut activity can be observed. Each cut is
an inferred array (`sram_bank_sp` / `sram_bank_dp`) standing in for one SRAM
macro. For a real chip, replace those two files with macro wrappers of the same
ports.

The split only saves power if the small cut really holds the hot addresses of
the application. The cut sizes come from an access profile of the target
software. If the software changes, change `BANK_WORDS`.

## Primary bus side

* `primary_bus` decodes `HADDR[31:28]`. Region 1 goes to the dual-port SRAM,
  region 2 to the bridge, and all other regions to the external primary slave.
  It remembers which slave owns the data phase and returns that slave's
  `HREADYOUT`, `HRDATA` and `HRESP`. It has one master port; AHB master
  arbitration is not included.
* `ahb_sram_port` is an AHB slave for port A of the dual-port SRAM. Writes
  complete without wait states. A read issues the SRAM read in its data phase
  and so adds one wait state, which also means a read directly after a write
  sees the new data. An address beyond the memory gets the two-cycle ERROR
  response.
* `bus_bridge` turns each AHB transfer in its window into one secondary-bus
  transfer, at secondary address `HADDR & 0x0FFF_FFFF`. It holds `HREADYOUT`
  low until the secondary bus acknowledges. On an idle secondary bus that is
  two wait states for an SRAM write and three for an SRAM read, plus any wait
  for arbitration. Writes are not posted.

All AHB transfers are treated as 32-bit words. `HSIZE`, `HBURST` and `HPROT`
are not decoded, and bursts work as sequences of single transfers.

## Power management

`power_management` is a register slave of the secondary bus with `NDOM`
domains (default 4):

| offset | register | meaning |
|--------|----------|---------|
| 0x0 | CLK_EN (rw, reset all 1) | clock enable request per domain |
| 0x4 | PWR_ON (rw, reset all 1) | supply request per domain |
| 0x8 | STATUS (ro) | domain powered and running |

Clearing a `PWR_ON` bit runs this sequence:

1. The clock stops.
2. The outputs are isolated.
3. The supply switch opens.

Setting the bit again reverses it:

1. The switch closes.
2. The domain waits `PWR_UP_CYCLES + 1` cycles for the supply to settle, still
   isolated.
3. Isolation is removed.
4. The clock restarts, if `CLK_EN` asks for it.

The outputs `clk_en_o`, `iso_o` and `pwr_sw_o` drive clock-gating cells,
isolation cells and supply switches, which are library cells outside this
RTL. The register layout, the number of domains and the sequence are this
design's own. It sits only on the secondary bus; the primary side reaches it
through the bridge.

## Address maps

These maps are this design's own choice. They are defined in `easy_pkg`.

| bus | address | target |
|-----|---------|--------|
| primary | `0x1xxx_xxxx` | dual-port SRAM (port A), 120 KB from offset 0 |
| primary | `0x2xxx_xxxx` | bridge window, to secondary `0x0xxx_xxxx` |
| primary | other | external primary slave port |
| secondary | `0x0000_0000`–`0x0000_3FFF` | 16 KB single-port SRAM |
| secondary | `0x0010_0000`–`0x0011_DFFF` | dual-port SRAM (port B) |
| secondary | `0x0030_00xx` | power management |
| secondary | other | external secondary slave port |

## What is not here

The following are not in this RTL. Their bus connections are ports of
`easy_soc_top`:

* the two processor cores (ARM946E-S with cache, ARM7TDMI), which are licensed
  IP;
* the IEEE 802.11a MAC hardware accelerator;
* the baseband modem and the HIPERLAN/2 MAC/PHY interface;
* the DMA controller;
* the timers, watchdog and interrupt controller;
* the UARTs;
* the PCI, Ethernet and SDRAM/Flash interfaces;
* the test/debug controller;
* the RF controller;
* the pads.

The modem has ports on both buses. Connect it to the two external slave ports.

## How far to trust it and where it departs

* **Given for this design:**
  * the dual-bus structure;
  * the sizes of both SRAMs and of their cuts;
  * the use of chip-select-gated cuts behind a selection decoder;
  * Gray coding on the secondary address bus and bus-invert coding on its data
    bus;
  * the roles of the bridge and of the dual-port SRAM;
  * a power manager that gates clocks and shuts down supplies.
* **This design's own choices:**
  * the address maps;
  * the bus widths (32-bit words, no byte enables);
  * the secondary bus protocol and its round-robin arbitration;
  * the AHB slave timing;
  * where the cuts are placed in the address range;
  * the PMU registers and sequence;
  * the reset style (asynchronous, active low, memories not reset);
  * a single clock domain.
* The bus-invert rule counts only the 32 data lines when deciding, not the
  invert line.
* The saving of the coded bus depends on the traffic. In the end-to-end test,
  mostly sequential block transfers, the Gray-coded address lines toggled
  36521 times where plain binary would have toggled 73041 times. The
  bus-invert write lines toggled 63881 times, invert line included, against
  72554 uncoded. Other traffic will give other numbers.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/easy_pkg.sv tb/tb_easy_soc_top.sv --top-module tb_easy_soc_top -o sim
./obj_dir/sim
```

`tb_easy_soc_top` runs the whole subsystem at its default sizes in a few
seconds. The primary side fills all 120 KB of the dual-port SRAM and the
secondary side reads it back, then the test sends a block the other way. It
then writes the whole single-port SRAM from the secondary side while the
primary side pushes and pulls words through the bridge. Finally it uses the
external slaves, powers a domain down and up through the bridge, and provokes
an AHB ERROR.

It counts each mechanism and fails any that never happened:

* bridge stalls;
* contention on the secondary bus;
* inversions on the write and read lines;
* each cut enabled from each port;
* ERROR responses;
* domain sequencing.

The unit testbenches cover the rest:

* pipelined AHB traffic with wait states;
* exact round-robin behaviour;
* the bus-invert threshold at exactly 16 and 17 toggles;
* a three-cut decoder;
* the exact PMU timeline.

`tb_fig3_partition` builds a 64 KB SRAM from three cuts of 28 KB, 4 KB and
32 KB, with the small cut in the middle of the range. It drives an access
profile concentrated on that middle region and checks every access. In the
run, 32088 of 40000 accesses enabled only the 4 KB cut.

To change sizes, override the parameters:

* `BANK_WORDS` / `NBANKS` / `AW` on the partitioned SRAMs;
* `NDOM` / `PWR_UP_CYCLES` on the top.

If the SRAM sizes change, also update `SP_WORDS` / `DP_WORDS` in `easy_pkg`,
since the secondary bus decodes with them.
