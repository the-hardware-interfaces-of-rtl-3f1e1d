// tb_ccb_integ_fsm -- self-checking test of the integration state machine.
// Plays the host and the sample state machine around the integration state
// machine and checks: nothing starts before run_enable; start-scan without
// wait-1pps enters WAIT_CAL_DIODE at once and stays there cal-diode-dt
// cycles; with wait-1pps it waits for the 1-PPS edge; integrations without a
// cal-diode change follow each other inside INTEGRATE; a change goes back
// through WAIT_CAL_DIODE with the new cal-diode-dt; the working
// configuration and cal lines change only on integration boundaries;
// clearing start-scan returns to WAIT_SCAN_START from any state.
module tb_ccb_integ_fsm;
  import ccb_pkg::*;
  logic clk = 0, rst_n = 0, run_enable = 0, start_scan = 0, wait_1pps = 0;
  logic pps_edge = 0, int_complete = 0;
  cfg_t cfg_live, cfg, cfg_next;
  integ_state_t state;
  logic integrate, integ_start, integ_end;
  logic [1:0] cal_out;
  int checks = 0, failures = 0;
  int n_start = 0, n_end = 0;

  ccb_integ_fsm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && integ_start) n_start++;
    if (rst_n && integ_end) n_end++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  // count cycles spent in WAIT_CAL_DIODE, starting in it
  task automatic expect_cal_wait(input int n, input string what);
    int c = 0;
    while (state == I_WAIT_CAL_DIODE) begin @(negedge clk); c++; end
    chk(c == ((n == 0) ? 1 : n) && state == I_INTEGRATE,
        $sformatf("%s: cal wait lasted %0d, expected %0d", what, c, n));
  endtask

  task automatic end_integration();
    @(negedge clk); int_complete = 1; @(negedge clk); int_complete = 0;
  endtask

  initial begin
    cfg_live = CFG_DEFAULT;
    cfg_live.cal_dt = 32'd7;
    cfg_live.cal_states = 2'b01;
    cfg_live.cpi = 16'd11;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // start-scan is ignored until run_enable
    start_scan = 1;
    repeat (5) @(negedge clk);
    chk(state == I_WAIT_SCAN_START, "held before run_enable");
    chk(cfg.cpi == 16'd40, "configuration not latched before run_enable");
    run_enable = 1;
    @(negedge clk);
    chk(state == I_WAIT_CAL_DIODE, "transition 1 without wait-1pps");
    chk(cfg.cpi == 16'd11 && cal_out == 2'b01, "configuration latched at scan start");
    expect_cal_wait(7, "first cal wait");
    chk(n_start == 1, "integ_start at entering INTEGRATE");
    // boundary without cal-diode change: stay in INTEGRATE, latch new cfg
    cfg_live.cpi = 16'd22;
    cfg_live.cal_dt = 32'd3;
    repeat (4) @(negedge clk);
    chk(cfg.cpi == 16'd11, "configuration held within an integration");
    end_integration();
    chk(state == I_INTEGRATE, "no cal change stays in INTEGRATE");
    chk(cfg.cpi == 16'd22, "configuration latched at boundary");
    chk(n_start == 2 && n_end == 1, "start/end pulses at boundary");
    // boundary with a cal change: transition 3
    cfg_live.cal_states = 2'b10;
    cfg_live.cal_dt = 32'd12;
    @(negedge clk);
    chk(cal_out == 2'b01, "cal lines held until boundary");
    end_integration();
    chk(state == I_WAIT_CAL_DIODE, "transition 3 on cal change");
    chk(cal_out == 2'b10, "cal lines switched at boundary");
    expect_cal_wait(12, "cal wait after change");
    chk(n_start == 3 && n_end == 2, "start/end pulses after cal wait");
    // zero settling time: one cycle
    cfg_live.cal_states = 2'b00; cfg_live.cal_dt = 32'd0;
    end_integration();
    chk(state == I_WAIT_CAL_DIODE, "second cal change");
    expect_cal_wait(0, "zero cal-diode-dt");
    // transition 4 from INTEGRATE and from WAIT_CAL_DIODE
    start_scan = 0; @(negedge clk);
    chk(state == I_WAIT_SCAN_START, "transition 4 from INTEGRATE");
    cfg_live.cal_dt = 32'd50;
    start_scan = 1; @(negedge clk);
    chk(state == I_WAIT_CAL_DIODE, "restart");
    repeat (5) @(negedge clk);
    start_scan = 0; @(negedge clk);
    chk(state == I_WAIT_SCAN_START, "transition 4 from WAIT_CAL_DIODE");
    // wait-1pps: stay until the edge
    wait_1pps = 1; cfg_live.cal_dt = 32'd4; cfg_live.cpi = 16'd33;
    @(negedge clk); start_scan = 1;
    @(negedge clk);
    cfg_live.cpi = 16'd44;  // driver writes the next integration's configuration
    repeat (20) @(negedge clk);
    chk(state == I_WAIT_SCAN_START, "waiting for 1-PPS");
    chk(cfg.cpi == 16'd33, "configuration latched once at scan start");
    pps_edge = 1; @(negedge clk); pps_edge = 0;
    chk(state == I_WAIT_CAL_DIODE, "1-PPS edge starts the scan");
    expect_cal_wait(4, "cal wait after 1-PPS start");
    chk(cfg.cpi == 16'd33, "first integration keeps the configuration latched at start");
    // run_enable low acts like start-scan low
    run_enable = 0; @(negedge clk);
    chk(state == I_WAIT_SCAN_START, "stopped without run_enable");
    chk(!integrate, "integrate low when stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
