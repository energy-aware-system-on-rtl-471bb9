// power_management: clock gating and supply shutdown control of NDOM domains.
//
// The document's power management unit accounts for the circuitry for clock
// gating and supply shutdown of the chip's macrocells; its registers and
// sequencing are not given, so this is the simplest controller that does it.
// It is a register slave of the secondary bus:
//   offset 0x0  CLK_EN  (rw, reset all ones) clock enable request per domain
//   offset 0x4  PWR_ON  (rw, reset all ones) supply request per domain
//   offset 0x8  STATUS  (ro) bit d = domain d is powered and running
// Each domain has a sequencer. Shutdown: stop the clock, then isolate the
// domain's outputs, then open the supply switch. Wake-up: close the switch,
// wait PWR_UP_CYCLES for the supply to settle, remove isolation, then let the
// clock run again (if CLK_EN asks for it). clk_en_o is meant for the enable
// input of a clock-gating cell; iso_o and pwr_sw_o for isolation cells and
// supply switches, which are process cells outside this module.
//
// Bus timing: s_ready_o rises the cycle after s_sel_i; a write takes effect at
// that edge, read data is valid with s_ready_o.
module power_management #(
  parameter int unsigned NDOM          = 4,
  parameter int unsigned PWR_UP_CYCLES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_sel_i,
  input  logic            s_we_i,
  input  logic [3:0]      s_addr_i,
  input  logic [31:0]     s_wdata_i,
  output logic            s_ready_o,
  output logic [31:0]     s_rdata_o,
  output logic [NDOM-1:0] clk_en_o,
  output logic [NDOM-1:0] iso_o,
  output logic [NDOM-1:0] pwr_sw_o
);

  typedef enum logic [2:0] {D_ON, D_CLKOFF, D_ISO, D_OFF, D_WAKE, D_DEISO} dom_e;

  localparam int unsigned CW = $clog2(PWR_UP_CYCLES + 1);

  logic [NDOM-1:0] clk_req_q, pwr_req_q, running;
  dom_e            st_q [NDOM];
  logic [CW-1:0]   cnt_q [NDOM];

  // Register interface
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_req_q <= '1;
      pwr_req_q <= '1;
      s_ready_o <= 1'b0;
      s_rdata_o <= '0;
    end else begin
      s_ready_o <= s_sel_i && !s_ready_o;
      if (s_sel_i && !s_ready_o) begin
        if (s_we_i) begin
          if (s_addr_i[3:2] == 2'd0) clk_req_q <= s_wdata_i[NDOM-1:0];
          if (s_addr_i[3:2] == 2'd1) pwr_req_q <= s_wdata_i[NDOM-1:0];
        end
        unique case (s_addr_i[3:2])
          2'd0:    s_rdata_o <= 32'(clk_req_q);
          2'd1:    s_rdata_o <= 32'(pwr_req_q);
          2'd2:    s_rdata_o <= 32'(running);
          default: s_rdata_o <= '0;
        endcase
      end
    end
  end

  // Per-domain sequencers
  for (genvar d = 0; d < NDOM; d++) begin : g_dom
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_q[d]  <= D_ON;
        cnt_q[d] <= '0;
      end else begin
        unique case (st_q[d])
          D_ON:     if (!pwr_req_q[d]) st_q[d] <= D_CLKOFF;
          D_CLKOFF: st_q[d] <= D_ISO;
          D_ISO:    st_q[d] <= D_OFF;
          D_OFF:    if (pwr_req_q[d]) begin
                      st_q[d]  <= D_WAKE;
                      cnt_q[d] <= CW'(PWR_UP_CYCLES);
                    end
          D_WAKE:   if (cnt_q[d] == '0) st_q[d] <= D_DEISO;
                    else cnt_q[d] <= cnt_q[d] - 1'b1;
          D_DEISO:  st_q[d] <= D_ON;
          default:  st_q[d] <= D_ON;
        endcase
      end
    end

    always_comb begin
      running[d]  = (st_q[d] == D_ON);
      clk_en_o[d] = running[d] && clk_req_q[d];
      iso_o[d]    = (st_q[d] == D_ISO) || (st_q[d] == D_OFF) || (st_q[d] == D_WAKE);
      pwr_sw_o[d] = !((st_q[d] == D_OFF));
    end
  end

endmodule
