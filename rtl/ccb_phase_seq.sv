// ccb_phase_seq -- phase-switch state machine and sample counters.
//
// The states of phase switches A and B in the (up to) 32 samples of a
// phase-switch cycle come from two 32-bit shift registers.  Each is loaded
// from phase-switch-a/-b at the start of a cycle and shifted right by one
// after every sample, so bit 0 is always the state for the current sample
// and bit 1 the state for the next one (a 1 means the switch inserts its
// 180 degree shift).  A comparator of bit 0 against bit 1 gives PHASE_SHIFT:
// the next sample needs a phase-switch settling delay first.
//
// Two counters follow the samples.  The cycle sample counter raises
// CYCLE_COMP during the last sample of a cycle (samples-per-cycle samples);
// the integrate sample counter raises INTEGRATE_COMP during the last sample
// of an integration (samples-per-cycle x cycles-per-integ samples).  Both
// advance on `sample_done`, the end of a sample's integrator reset.
//
// `idle` (sample state machine waiting for an integration) clears the
// counters and keeps the shift registers loaded, so the phase-switch lines
// show the first state of the cycle before the first sample.  Reloads use
// `cfg_next`, the configuration that is in force after the current clock
// edge, so a new integration starts with its own switching pattern.
// samples-per-cycle values of 0 act as 1 and values above 32 as 32;
// cycles-per-integ 0 acts as 1 (driver ranges are 1-32 and 1-65535).
module ccb_phase_seq
  import ccb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cfg_t       cfg,          // configuration of the running integration
  input  cfg_t       cfg_next,     // configuration after this clock edge
  input  logic       idle,
  input  logic       sample_done,
  output logic [1:0] phs_state,    // {B, A} for the current sample
  output logic       phase_shift,  // PHASE_SHIFT
  output logic       cycle_comp,   // CYCLE_COMP
  output logic       integ_comp    // INTEGRATE_COMP
);

  logic [31:0] sr_a, sr_b;
  logic [4:0]  cyc_cnt;    // sample index within the cycle
  logic [20:0] int_cnt;    // sample index within the integration

  logic [5:0]  spc_eff;
  logic [15:0] cpi_eff;
  logic [20:0] samples_per_integ;

  always_comb begin
    spc_eff = (cfg.spc == 6'd0) ? 6'd1 : (cfg.spc > 6'd32) ? 6'd32 : cfg.spc;
    cpi_eff = (cfg.cpi == 16'd0) ? 16'd1 : cfg.cpi;
    samples_per_integ = 21'(spc_eff) * 21'(cpi_eff);
  end

  assign cycle_comp  = ({1'b0, cyc_cnt} + 6'd1) >= spc_eff;
  assign integ_comp  = (int_cnt + 21'd1) >= samples_per_integ;
  assign phase_shift = (sr_a[1] ^ sr_a[0]) | (sr_b[1] ^ sr_b[0]);
  assign phs_state   = {sr_b[0], sr_a[0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_a    <= '0;
      sr_b    <= '0;
      cyc_cnt <= '0;
      int_cnt <= '0;
    end else if (idle) begin
      sr_a    <= cfg_next.phs_a;
      sr_b    <= cfg_next.phs_b;
      cyc_cnt <= '0;
      int_cnt <= '0;
    end else if (sample_done) begin
      if (cycle_comp || integ_comp) begin
        sr_a    <= cfg_next.phs_a;
        sr_b    <= cfg_next.phs_b;
        cyc_cnt <= '0;
      end else begin
        sr_a    <= sr_a >> 1;
        sr_b    <= sr_b >> 1;
        cyc_cnt <= cyc_cnt + 5'd1;
      end
      int_cnt <= integ_comp ? '0 : int_cnt + 21'd1;
    end
  end

endmodule
