// ccb_top -- the CCB FPGA: phase-switch, cal-diode and integrator sequencing
// with PCI register, DMA and interrupt interfaces.
//
// The host driver writes the configuration of the next integration into the
// register file (ccb_regs).  The integration state machine (ccb_integ_fsm)
// starts a scan on start-scan, optionally on the next 1-PPS edge, waits for
// the calibration diodes to settle and then runs integrations back to back,
// latching the configuration registers at each integration boundary.  Within
// an integration the sample state machine (ccb_sample_fsm) and the phase-
// switch sequencer (ccb_phase_seq) produce phase-switch cycles of 1-32
// samples, each sample being an integrator window closed by an A/D
// conversion strobe and an integrator reset, with a phase-switch settling
// delay at the start of every cycle and before every switch change.  The
// integrator bank (ccb_accum) sums the 16 A/D channels separately for each
// of the 4 phase-switch states; at the end of an integration the 64 sums,
// their overflow flags and the last A/D samples are copied out, written to
// host DMA memory (ccb_dma_writer), and only then is the integration
// interrupt raised (ccb_irq).
//
// External parts and how they attach:
//   * PCI core: reg_* is its target-side register port, dma_* its
//     bus-master write port (byte offsets within the DMA area); irq drives
//     the interrupt line (active high here).
//   * A/D converters: adc_data is sampled in the cycle adc_strobe is high.
//   * Analog integrators: integ_reset is high while they are discharged.
//   * Phase switches and cal diodes: *_out is the commanded state (1 = on),
//     *_oe the enable of the line's driver, from the drive-* control bits.
//   * fpga_reload requests a firmware reload (reset-fpga bit).
//   * pps_in is the asynchronous 1-PPS timing input.
// If an integration ends while the previous block is still being written
// to DMA memory, its results are dropped (the sums are still cleared) and
// dma_overrun pulses; this rule
// is this design's own.  The clock is nominally 10 MHz: all intervals count
// 100 ns periods.
module ccb_top
  import ccb_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // register port of the PCI target
  input  logic                          reg_wr,
  input  logic [7:0]                    reg_addr,
  input  logic [31:0]                   reg_wdata,
  input  logic [3:0]                    reg_be,
  output logic [31:0]                   reg_rdata,
  // DMA write port of the PCI bus master
  output logic                          dma_valid,
  output logic [DMA_ADDR_W-1:0]         dma_addr,
  output logic [31:0]                   dma_data,
  input  logic                          dma_ready,
  output logic                          dma_overrun,
  output logic                          irq,
  input  logic                          pps_in,
  // A/D converters and analog integrators
  input  logic [NUM_ADC-1:0][ADC_W-1:0] adc_data,
  output logic                          adc_strobe,
  output logic                          integ_reset,
  // front-end control lines
  output logic                          phs_a_out,
  output logic                          phs_a_oe,
  output logic                          phs_b_out,
  output logic                          phs_b_oe,
  output logic                          cal_a_out,
  output logic                          cal_a_oe,
  output logic                          cal_b_out,
  output logic                          cal_b_oe,
  output logic                          fpga_reload
);

  ctrl_t ctrl;
  cfg_t  cfg_live, cfg, cfg_next;
  logic  run_enable;
  logic  sent_1pps, sent_integ, clr_1pps, clr_integ, pps_edge;

  integ_state_t  istate;
  sample_state_t sstate;
  logic integrate, integ_start, integ_end;
  logic [1:0] cal_states, phs_state;
  logic phase_shift, cycle_comp, integ_comp;
  logic sample_done, phase_blank;
  logic dma_busy, dma_done, snap;

  logic [NUM_VALUES-1:0][ACC_W-1:0] result;
  logic [NUM_VALUES-1:0]            result_ovf;
  logic [NUM_ADC-1:0][ADC_W-1:0]    result_diag;

  ccb_regs u_regs (
    .clk, .rst_n,
    .reg_wr, .reg_addr, .reg_wdata, .reg_be, .reg_rdata,
    .ctrl, .cfg(cfg_live), .run_enable, .reload_req(fpga_reload),
    .sent_1pps, .sent_integ, .clr_1pps, .clr_integ);

  ccb_irq u_irq (
    .clk, .rst_n, .pps_in, .irq_enable(ctrl.irq_enable),
    .integ_event(dma_done), .clr_1pps, .clr_integ,
    .pps_edge, .sent_1pps, .sent_integ, .irq);

  ccb_integ_fsm u_integ (
    .clk, .rst_n, .run_enable,
    .start_scan(ctrl.start_scan), .wait_1pps(ctrl.wait_1pps), .pps_edge,
    .int_complete(sample_done && integ_comp), .cfg_live,
    .state(istate), .integrate, .cfg, .cfg_next, .cal_out(cal_states),
    .integ_start, .integ_end);

  ccb_phase_seq u_phase (
    .clk, .rst_n, .cfg, .cfg_next,
    .idle(sstate == S_WAIT_INTEG_START), .sample_done,
    .phs_state, .phase_shift, .cycle_comp, .integ_comp);

  // interval registers take effect on the edge that latches them
  ccb_sample_fsm u_sample (
    .clk, .rst_n, .integrate, .phase_shift, .cycle_comp, .integ_comp,
    .long_dt(cfg_next.long_dt), .short_dt(cfg_next.short_dt),
    .phs_dt(cfg_next.phs_dt), .reset_dt(cfg_next.reset_dt),
    .state(sstate), .adc_strobe, .sample_done, .integ_reset, .phase_blank);

  assign snap        = integ_end && !dma_busy;
  assign dma_overrun = integ_end && dma_busy;

  ccb_accum u_accum (
    .clk, .rst_n,
    .clear(integ_start || integ_end), .snap,
    .adc_strobe, .phs_state, .adc_data,
    .result, .result_ovf, .result_diag);

  ccb_dma_writer u_dma (
    .clk, .rst_n, .start(snap), .result, .result_ovf, .result_diag,
    .busy(dma_busy), .done(dma_done),
    .dma_valid, .dma_addr, .dma_data, .dma_ready);

  // front-end control lines
  assign phs_a_out = phs_state[0];
  assign phs_b_out = phs_state[1];
  assign cal_a_out = cal_states[0];
  assign cal_b_out = cal_states[1];
  assign phs_a_oe  = ctrl.drive_phs_a;
  assign phs_b_oe  = ctrl.drive_phs_b;
  assign cal_a_oe  = ctrl.drive_cal_a;
  assign cal_b_oe  = ctrl.drive_cal_b;

  // sequencing rules
  a_sample_only_when_integrating: assert property (@(posedge clk) disable iff (!rst_n)
    adc_strobe |-> integrate && !phase_blank);
  a_dma_stable: assert property (@(posedge clk) disable iff (!rst_n)
    dma_valid && !dma_ready |=> dma_valid && $stable(dma_addr) && $stable(dma_data));

endmodule
