// tb_ccb_sample_fsm -- self-checking test of the sample state machine.
// The testbench plays the phase-switch sequencer: it keeps its own sample
// index and a random "switch change before sample n" pattern and drives
// PHASE_SHIFT, CYCLE_COMP and INTEGRATE_COMP from them.  From the same
// pattern it builds the expected sequence of (state, length) segments:
// each sample after a cycle start or a switch change is PHASE_SHIFT
// (phase-switch-dt) + SHORT_SAMPLE (short-sample-dt) + WAIT_S_RESET
// (analog-reset-dt), every other one LONG_SAMPLE (long-sample-dt) +
// WAIT_L_RESET, with 0 meaning one cycle.  The observed state trace must
// match segment by segment, one A/D strobe must come in the last cycle of
// every sample state, the integrator-reset and blanking outputs must follow
// the reset and PHASE_SHIFT states, and dropping INTEGRATE must return to
// WAIT_INTEG_START.
module tb_ccb_sample_fsm;
  import ccb_pkg::*;
  logic clk = 0, rst_n = 0, integrate = 0;
  logic phase_shift, cycle_comp, integ_comp;
  logic [15:0] long_dt, short_dt;
  logic [7:0] phs_dt, reset_dt;
  sample_state_t state;
  logic adc_strobe, sample_done, integ_reset, phase_blank;
  int checks = 0, failures = 0;

  ccb_sample_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sequencer model
  int spc, samples, n_cyc, n_int;
  bit change[$];  // change[k]: switch state changes between sample k and k+1 of a cycle
  assign phase_shift = change[n_cyc];
  assign cycle_comp  = (n_cyc == spc - 1);
  assign integ_comp  = (n_int == samples - 1);
  always @(posedge clk)
    if (sample_done) begin
      n_cyc <= cycle_comp ? 0 : n_cyc + 1;
      n_int <= integ_comp ? 0 : n_int + 1;
    end

  // observed segments
  sample_state_t seg_state[$];
  int            seg_len[$];
  int            strobes, strobe_bad;
  sample_state_t prev;
  int            cur_len;
  always @(posedge clk) begin
    if (adc_strobe) begin
      strobes++;
      if (!(state inside {S_SHORT_SAMPLE, S_LONG_SAMPLE})) strobe_bad++;
    end
    if (rst_n) begin
      checks++;
      if (integ_reset != (state inside {S_WAIT_S_RESET, S_WAIT_L_RESET}) ||
          phase_blank != (state == S_PHASE_SHIFT)) begin
        failures++; $display("FAIL: integ_reset/phase_blank wrong in %s", state.name());
      end
    end
    if (integrate || state != S_WAIT_INTEG_START) begin
      if (state == prev && cur_len > 0) cur_len++;
      else begin
        if (cur_len > 0) begin seg_state.push_back(prev); seg_len.push_back(cur_len); end
        prev = state; cur_len = 1;
      end
    end
  end

  function automatic int len(input int v);
    return (v == 0) ? 1 : v;
  endfunction

  task automatic run_case(input int p_spc, input int p_cpi, input int l, input int s,
                          input int p, input int r);
    sample_state_t es[$];
    int            el[$];
    int            k, total;
    spc = p_spc; samples = p_spc * p_cpi;
    long_dt = 16'(l); short_dt = 16'(s); phs_dt = 8'(p); reset_dt = 8'(r);
    change.delete();
    for (int i = 0; i < 32; i++) change.push_back(bit'($urandom_range(0, 3) == 0));
    n_cyc = 0; n_int = 0;
    seg_state.delete(); seg_len.delete(); cur_len = 0; strobes = 0; strobe_bad = 0;
    // expected: two integrations back to back
    for (int i = 0; i < 2 * samples; i++) begin
      k = i % spc;
      if (k == 0 || change[k-1]) begin
        es.push_back(S_PHASE_SHIFT);  el.push_back(len(p));
        es.push_back(S_SHORT_SAMPLE); el.push_back(len(s));
        es.push_back(S_WAIT_S_RESET); el.push_back(len(r));
      end else begin
        es.push_back(S_LONG_SAMPLE);  el.push_back(len(l));
        es.push_back(S_WAIT_L_RESET); el.push_back(len(r));
      end
    end
    total = 0;
    foreach (el[i]) total += el[i];
    @(negedge clk);
    integrate = 1;
    @(negedge clk);  // WAIT_INTEG_START -> PHASE_SHIFT
    repeat (total) @(negedge clk);
    #1;
    checks++;
    if (state != S_PHASE_SHIFT) begin
      failures++; $display("FAIL: state %s after two integrations, expected PHASE_SHIFT", state.name());
    end
    integrate = 0;
    @(negedge clk);
    checks++;
    if (state != S_WAIT_INTEG_START) begin
      failures++; $display("FAIL: not back in WAIT_INTEG_START");
    end
    // WAIT_INTEG_START of one cycle first, then the expected segments
    checks++;
    if (seg_state.size() < es.size() + 1) begin
      failures++; $display("FAIL: %0d segments, expected %0d", seg_state.size(), es.size() + 1);
    end else begin
      for (int i = 0; i < es.size(); i++) begin
        checks++;
        if (seg_state[i+1] != es[i] || seg_len[i+1] != el[i]) begin
          failures++;
          $display("FAIL: segment %0d is %s x%0d, expected %s x%0d", i,
                   seg_state[i+1].name(), seg_len[i+1], es[i].name(), el[i]);
          break;
        end
      end
    end
    checks++;
    if (strobes != 2 * samples || strobe_bad != 0) begin
      failures++; $display("FAIL: %0d A/D strobes (%0d misplaced), expected %0d", strobes, strobe_bad, 2 * samples);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_case(1, 3, 250, 250, 0, 0);   // register defaults, shortened period
    run_case(8, 2, 20, 15, 5, 3);     // switched cycle
    run_case(32, 1, 7, 4, 3, 2);
    run_case(4, 3, 1, 1, 1, 1);       // shortest intervals
    for (int i = 0; i < 10; i++)
      run_case($urandom_range(1, 32), $urandom_range(1, 3), $urandom_range(1, 30),
               $urandom_range(0, 20), $urandom_range(0, 10), $urandom_range(0, 6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
