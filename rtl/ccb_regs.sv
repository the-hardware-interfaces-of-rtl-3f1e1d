// ccb_regs -- PCI-visible register file of the CCB FPGA.
//
// Holds the control register and the per-integration configuration registers
// (samples-per-cycle, phase-switch-a/b, cycles-per-integ, long/short sample
// intervals, phase-switch and integrator-reset delays, cal-diode states and
// settling time) at byte offsets 0x40-0x68, with the reset values and widths
// of the CCB register map; unused high bits read as 0 and ignore writes.
// The two interrupt status registers, sent-1pps and sent-integ-done, live in
// the interrupt unit; they read back here at 0x6C and 0x70, and writing a
// value with bit 0 clear to either one clears it (offsets and clear rule are
// this design's choice).
//
// After reset the control register is zero.  The sequencers are held idle
// (`run_enable` low) until the driver first sets interrupt-enable; clearing
// interrupt-enable later only masks interrupts.  `reload_req` mirrors the
// reset-fpga bit and asks the configuration logic to reload the firmware.
//
// Bus: a local register port behind the PCI target core.  reg_wr with byte
// enables reg_be (bit 0 = bits 7:0, little-endian) writes on the rising
// edge; reg_rdata is combinational from reg_addr.
module ccb_regs
  import ccb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // local register bus
  input  logic        reg_wr,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  input  logic [3:0]  reg_be,
  output logic [31:0] reg_rdata,
  // register contents
  output ctrl_t       ctrl,
  output cfg_t        cfg,
  output logic        run_enable,
  output logic        reload_req,
  // interrupt status registers (held in the interrupt unit)
  input  logic        sent_1pps,
  input  logic        sent_integ,
  output logic        clr_1pps,
  output logic        clr_integ
);

  logic [31:0] wmask;
  always_comb
    for (int b = 0; b < 4; b++) wmask[8*b +: 8] = {8{reg_be[b]}};

  // merge the enabled bytes of a write into a register value
  function automatic logic [31:0] merge(input logic [31:0] old_v);
    return (old_v & ~wmask) | (reg_wdata & wmask);
  endfunction

  logic [31:0] m_ctrl, m_spc, m_pa, m_pb, m_cpi, m_long, m_short, m_pdt, m_rdt, m_cal, m_cdt;
  always_comb begin
    m_ctrl  = merge({24'd0, ctrl});
    m_spc   = merge({26'd0, cfg.spc});
    m_pa    = merge(cfg.phs_a);
    m_pb    = merge(cfg.phs_b);
    m_cpi   = merge({16'd0, cfg.cpi});
    m_long  = merge({16'd0, cfg.long_dt});
    m_short = merge({16'd0, cfg.short_dt});
    m_pdt   = merge({24'd0, cfg.phs_dt});
    m_rdt   = merge({24'd0, cfg.reset_dt});
    m_cal   = merge({30'd0, cfg.cal_states});
    m_cdt   = merge(cfg.cal_dt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl       <= '0;
      cfg        <= CFG_DEFAULT;
      run_enable <= 1'b0;
    end else begin
      if (reg_wr) begin
        unique case (reg_addr)
          ADDR_CONTROL:    ctrl           <= ctrl_t'(m_ctrl[CTRL_BITS-1:0]);
          ADDR_SPC:        cfg.spc        <= m_spc[5:0];
          ADDR_PHS_A:      cfg.phs_a      <= m_pa;
          ADDR_PHS_B:      cfg.phs_b      <= m_pb;
          ADDR_CPI:        cfg.cpi        <= m_cpi[15:0];
          ADDR_LONG_DT:    cfg.long_dt    <= m_long[15:0];
          ADDR_SHORT_DT:   cfg.short_dt   <= m_short[15:0];
          ADDR_PHS_DT:     cfg.phs_dt     <= m_pdt[7:0];
          ADDR_RESET_DT:   cfg.reset_dt   <= m_rdt[7:0];
          ADDR_CAL_STATES: cfg.cal_states <= m_cal[1:0];
          ADDR_CAL_DT:     cfg.cal_dt     <= m_cdt;
          default: ;
        endcase
      end
      if (ctrl.irq_enable) run_enable <= 1'b1;
    end
  end

  assign reload_req = ctrl.reset_fpga;

  // status registers clear when the driver writes bit 0 = 0 to them
  assign clr_1pps  = reg_wr && reg_addr == ADDR_SENT_1PPS  && reg_be[0] && !reg_wdata[0];
  assign clr_integ = reg_wr && reg_addr == ADDR_SENT_INTEG && reg_be[0] && !reg_wdata[0];

  always_comb begin
    unique case (reg_addr)
      ADDR_CONTROL:    reg_rdata = {24'd0, ctrl};
      ADDR_SPC:        reg_rdata = {26'd0, cfg.spc};
      ADDR_PHS_A:      reg_rdata = cfg.phs_a;
      ADDR_PHS_B:      reg_rdata = cfg.phs_b;
      ADDR_CPI:        reg_rdata = {16'd0, cfg.cpi};
      ADDR_LONG_DT:    reg_rdata = {16'd0, cfg.long_dt};
      ADDR_SHORT_DT:   reg_rdata = {16'd0, cfg.short_dt};
      ADDR_PHS_DT:     reg_rdata = {24'd0, cfg.phs_dt};
      ADDR_RESET_DT:   reg_rdata = {24'd0, cfg.reset_dt};
      ADDR_CAL_STATES: reg_rdata = {30'd0, cfg.cal_states};
      ADDR_CAL_DT:     reg_rdata = cfg.cal_dt;
      ADDR_SENT_1PPS:  reg_rdata = {31'd0, sent_1pps};
      ADDR_SENT_INTEG: reg_rdata = {31'd0, sent_integ};
      default:         reg_rdata = 32'd0;
    endcase
  end

endmodule
