// ccb_integ_fsm -- integration state machine of the CCB FPGA.
//
// Runs a scan as a sequence of integrations.  States and transitions:
//   WAIT_SCAN_START --1 START_SCAN & (!WAIT_1PPS | 1-PPS edge)--> WAIT_CAL_DIODE
//   WAIT_CAL_DIODE  --2 CAL_DIODE_SETTLED--> INTEGRATE
//   INTEGRATE       --3 INT_COMPLETE & CAL_DIODE_CHANGE--> WAIT_CAL_DIODE
//   any state       --4 !START_SCAN--> WAIT_SCAN_START
// An integration that ends without a cal-diode change is followed at once by
// the next one, without leaving INTEGRATE.  Every scan passes through
// WAIT_CAL_DIODE, whose length is cal-diode-dt (at least one clock), so the
// diodes and phase switches, whose state is unknown before a scan, settle.
//
// Configuration latching: the working copy `cfg` of the configuration
// registers is loaded from `cfg_live` in the first cycle in which start-scan
// is seen set in WAIT_SCAN_START (before any wait for the 1-PPS edge), and
// on every integration boundary (`int_complete` while integrating).  `cfg_next` is the value `cfg` takes
// at the coming clock edge, for units that load on that edge.  The cal-diode
// lines `cal_out` follow the latched cal-diode-states, so new diode states
// are commanded on the boundary that latches them.  CAL_DIODE_CHANGE
// compares the freshly written cal-diode-states with the diode states in
// force.  Nothing runs until `run_enable` (interrupt-enable first set).
//
// Pulses: `integ_start` on the edge that starts an integration (entering
// INTEGRATE, or a boundary that stays in INTEGRATE), `integ_end` on the edge
// that ends one.  `pps_edge` is a synchronised one-cycle pulse.
module ccb_integ_fsm
  import ccb_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run_enable,
  input  logic         start_scan,
  input  logic         wait_1pps,
  input  logic         pps_edge,
  input  logic         int_complete,  // last sample of the integration done
  input  cfg_t         cfg_live,
  output integ_state_t state,
  output logic         integrate,
  output cfg_t         cfg,
  output cfg_t         cfg_next,
  output logic [1:0]   cal_out,
  output logic         integ_start,
  output logic         integ_end
);

  integ_state_t next;
  logic cal_settled, cal_change, latch;
  logic armed;  // scan start seen, configuration of the first integration latched

  assign cal_change = (cfg_live.cal_states != cfg.cal_states);

  always_comb begin
    next = state;
    if (!start_scan || !run_enable) next = I_WAIT_SCAN_START;                   // 4
    else begin
      unique case (state)
        I_WAIT_SCAN_START: if (!wait_1pps || pps_edge) next = I_WAIT_CAL_DIODE; // 1
        I_WAIT_CAL_DIODE:  if (cal_settled) next = I_INTEGRATE;                 // 2
        I_INTEGRATE:       if (int_complete && cal_change) next = I_WAIT_CAL_DIODE; // 3
        default:           next = I_WAIT_SCAN_START;
      endcase
    end
  end

  assign latch = (state == I_WAIT_SCAN_START && start_scan && run_enable && !armed) ||
                 (state == I_INTEGRATE && next != I_WAIT_SCAN_START && int_complete);

  assign cfg_next = latch ? cfg_live : cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_WAIT_SCAN_START;
      cfg   <= CFG_DEFAULT;
      armed <= 1'b0;
    end else begin
      state <= next;
      cfg   <= cfg_next;
      armed <= (state == I_WAIT_SCAN_START) && start_scan && run_enable;
    end
  end

  ccb_timer #(.W(32)) u_cal_timer (
    .clk, .rst_n,
    .load (next == I_WAIT_CAL_DIODE && state != I_WAIT_CAL_DIODE),
    .value(cfg_next.cal_dt),
    .done (cal_settled));

  assign integrate   = (state == I_INTEGRATE);
  assign cal_out     = cfg.cal_states;
  assign integ_end   = (state == I_INTEGRATE) && int_complete;
  assign integ_start = (next == I_INTEGRATE) &&
                       (state == I_WAIT_CAL_DIODE || int_complete);

endmodule
