// ccb_sample_fsm -- sample state machine of the CCB FPGA.
//
// Sequences the analog integrators and A/D samples within an integration.
// States and numbered transitions:
//   WAIT_INTEG_START --1 INTEGRATE--> PHASE_SHIFT
//   PHASE_SHIFT      --8 PHASE_SHIFT_COMP--> SHORT_SAMPLE
//   SHORT_SAMPLE     --2 S_SAMPLE_COMP--> WAIT_S_RESET
//   WAIT_S_RESET     --3 RESET_COMP & !(PHASE_SHIFT|CYCLE_COMP|INTEGRATE_COMP)--> LONG_SAMPLE
//                    --7 RESET_COMP &  (PHASE_SHIFT|CYCLE_COMP|INTEGRATE_COMP)--> PHASE_SHIFT
//   LONG_SAMPLE      --4 L_SAMPLE_COMP--> WAIT_L_RESET
//   WAIT_L_RESET     --5 (as 3)--> LONG_SAMPLE,  --6 (as 7)--> PHASE_SHIFT
// A sample that follows a phase-switch settling delay is a short sample
// (short-sample-dt = long-sample-dt - phase-switch-dt), every other sample is
// a long one, so every sample spans the same time.  Every cycle and every
// integration begins with a phase shift delay whether or not a switch
// changes, which keeps the time in each phase-switch state equal.
// Transitions 3 and 5 also require the opposite of 6/7 so that the two
// branches are exclusive, and leaving INTEGRATE (integration state machine
// not integrating) returns to WAIT_INTEG_START from any state; both are this
// design's reading of the diagram.
//
// Each state is timed by its own ccb_timer (phase shift, short sample, long
// sample, and one sample-reset timer shared by both reset states), loaded
// with the interval registers of the running integration.
// Outputs: `adc_strobe` is high in the last cycle of a sample state (the
// integrator output is digitised at that edge), `sample_done` in the last
// cycle of a reset state (advances the phase-switch sequencer),
// `integ_reset` while an integrator reset state is active, `phase_blank`
// during PHASE_SHIFT.
module ccb_sample_fsm
  import ccb_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          integrate,    // INTEGRATE from the integration state machine
  input  logic          phase_shift,  // PHASE_SHIFT comparator
  input  logic          cycle_comp,   // CYCLE_COMP
  input  logic          integ_comp,   // INTEGRATE_COMP
  input  logic [15:0]   long_dt,
  input  logic [15:0]   short_dt,
  input  logic [7:0]    phs_dt,
  input  logic [7:0]    reset_dt,
  output sample_state_t state,
  output logic          adc_strobe,
  output logic          sample_done,
  output logic          integ_reset,
  output logic          phase_blank
);

  sample_state_t next;
  logic reset_comp, phase_shift_comp, s_sample_comp, l_sample_comp;
  logic entering;

  always_comb begin
    next = state;
    if (!integrate) next = S_WAIT_INTEG_START;
    else begin
      unique case (state)
        S_WAIT_INTEG_START: next = S_PHASE_SHIFT;                                  // 1
        S_PHASE_SHIFT:      if (phase_shift_comp) next = S_SHORT_SAMPLE;          // 8
        S_SHORT_SAMPLE:     if (s_sample_comp)    next = S_WAIT_S_RESET;          // 2
        S_LONG_SAMPLE:      if (l_sample_comp)    next = S_WAIT_L_RESET;          // 4
        S_WAIT_S_RESET, S_WAIT_L_RESET:
          if (reset_comp)
            next = (phase_shift || cycle_comp || integ_comp) ? S_PHASE_SHIFT      // 6, 7
                                                             : S_LONG_SAMPLE;     // 3, 5
        default:            next = S_WAIT_INTEG_START;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) state <= S_WAIT_INTEG_START;
    else        state <= next;

  assign entering = (next != state);

  ccb_timer #(.W(8)) u_reset_timer (
    .clk, .rst_n,
    .load (entering && (next == S_WAIT_S_RESET || next == S_WAIT_L_RESET)),
    .value(reset_dt), .done(reset_comp));

  ccb_timer #(.W(8)) u_phase_timer (
    .clk, .rst_n,
    .load (entering && next == S_PHASE_SHIFT),
    .value(phs_dt), .done(phase_shift_comp));

  ccb_timer #(.W(16)) u_short_timer (
    .clk, .rst_n,
    .load (entering && next == S_SHORT_SAMPLE),
    .value(short_dt), .done(s_sample_comp));

  ccb_timer #(.W(16)) u_long_timer (
    .clk, .rst_n,
    .load (entering && next == S_LONG_SAMPLE),
    .value(long_dt), .done(l_sample_comp));

  assign adc_strobe  = integrate && ((state == S_SHORT_SAMPLE && s_sample_comp) ||
                                     (state == S_LONG_SAMPLE  && l_sample_comp));
  assign sample_done = integrate && (state == S_WAIT_S_RESET || state == S_WAIT_L_RESET)
                                 && reset_comp;
  assign integ_reset = (state == S_WAIT_S_RESET || state == S_WAIT_L_RESET);
  assign phase_blank = (state == S_PHASE_SHIFT);

endmodule
