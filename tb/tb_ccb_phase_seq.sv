// tb_ccb_phase_seq -- self-checking test of the phase-switch sequencer.
// For random phase-switch patterns, samples-per-cycle and cycles-per-integ it
// steps through whole integrations with sample_done pulses (random gaps) and
// checks, for every sample n of every cycle, the switch states against bit n
// of the patterns, PHASE_SHIFT against bits n and n+1, CYCLE_COMP in the
// last sample of a cycle and INTEGRATE_COMP in the last sample of the
// integration.  A second configuration presented on cfg_next at the last
// sample must take effect in the first sample of the next integration.
module tb_ccb_phase_seq;
  import ccb_pkg::*;
  logic clk = 0, rst_n = 0, idle = 1, sample_done = 0;
  cfg_t cfg, cfg_next;
  logic [1:0] phs_state;
  logic phase_shift, cycle_comp, integ_comp;
  int checks = 0, failures = 0;

  ccb_phase_seq dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic cfg_t rand_cfg();
    cfg_t c = CFG_DEFAULT;
    c.spc   = 6'($urandom_range(1, 32));
    c.cpi   = 16'($urandom_range(1, 4));
    c.phs_a = $urandom;
    c.phs_b = $urandom;
    return c;
  endfunction

  // step through one integration of configuration c; nxt goes on cfg_next
  // during the last sample
  task automatic run_integration(input cfg_t c, input cfg_t nxt);
    int spc = int'(c.spc);
    for (int cy = 0; cy < int'(c.cpi); cy++) begin
      for (int n = 0; n < spc; n++) begin
        logic last_of_integ = (cy == int'(c.cpi) - 1) && (n == spc - 1);
        logic exp_ps = (n == 31) ? (c.phs_a[31] | c.phs_b[31])  // bits shifted in are 0
                                 : ((c.phs_a[n] ^ c.phs_a[n+1]) | (c.phs_b[n] ^ c.phs_b[n+1]));
        repeat ($urandom_range(0, 2)) @(negedge clk);
        if (last_of_integ) cfg_next = nxt;
        #1;
        chk(phs_state == {c.phs_b[n], c.phs_a[n]},
            $sformatf("switch states in sample %0d (got %b)", n, phs_state));
        if (n != spc - 1) chk(phase_shift == exp_ps, $sformatf("PHASE_SHIFT in sample %0d", n));
        chk(cycle_comp == (n == spc - 1), $sformatf("CYCLE_COMP in sample %0d of %0d", n, spc));
        chk(integ_comp == last_of_integ, $sformatf("INTEGRATE_COMP in cycle %0d sample %0d", cy, n));
        sample_done = 1;
        @(negedge clk);
        sample_done = 0;
        if (last_of_integ) cfg = nxt;  // the integration state machine latches here
      end
    end
  endtask

  initial begin
    cfg = rand_cfg();
    cfg_next = cfg;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    idle = 1;
    @(negedge clk);
    chk(phs_state == {cfg.phs_b[0], cfg.phs_a[0]}, "first state shown while idle");
    idle = 0;
    for (int i = 0; i < 40; i++) begin
      cfg_t nxt;
      nxt = rand_cfg();
      run_integration(cfg, nxt);
    end
    // idle clears the counters mid-cycle
    cfg.spc = 6'd8; cfg.cpi = 16'd2; cfg.phs_a = 32'h0F; cfg.phs_b = 32'h33; cfg_next = cfg;
    idle = 1; @(negedge clk); idle = 0;
    repeat (3) begin sample_done = 1; @(negedge clk); sample_done = 0; end
    idle = 1; @(negedge clk); idle = 0;
    run_integration(cfg, cfg);
    // out-of-range samples-per-cycle: 0 acts as 1
    cfg.spc = 6'd0; cfg.cpi = 16'd3; cfg_next = cfg;
    idle = 1; @(negedge clk); idle = 0; #1;
    chk(cycle_comp && !integ_comp, "samples-per-cycle 0 acts as 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
