// tb_ccb_top -- end-to-end test of the CCB FPGA at its default parameters.
//
// The testbench acts as the host driver (register writes and reads, an
// interrupt service routine that clears the status registers, reads the DMA
// block and writes the configuration of the next-but-one integration), as
// host DMA memory with random back-pressure, as the 16 A/D converters
// (random data, or full scale) and as the 1-PPS source.
//
// An independent reference follows the A/D strobes: from the configuration
// the driver wrote it knows, for every sample, its place in the cycle, the
// phase-switch states it must see on the control lines, and which of the 64
// sums it goes to; it builds the expected DMA block of every integration.
// It also predicts, from the sample-timing rule (a sample after a cycle
// start or a switch change costs phase-switch-dt + short-sample-dt +
// analog-reset-dt, any other long-sample-dt + analog-reset-dt, 0 counting
// as one clock), the clock cycle of the first A/D strobe of every
// integration and scan, and checks it exactly.
//
// Scenarios: the register-default configuration (one 1.008 ms integration =
// 40 cycles of one 25.2 us sample), the nominal analog timing (25 us
// samples, 0.5 us reset, 2 us switch settling), switched cycles with and without cal
// diode changes, a scan started on 1-PPS, a scan aborted by clearing
// start-scan, interrupts masked, an integration whose sums overflow, and
// integrations shorter than the DMA transfer (overrun).  Every mechanism is
// counted and one that never happened counts as a failure.
module tb_ccb_top;
  import ccb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_wr = 0;
  logic [7:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [3:0] reg_be = 0;
  logic dma_valid, dma_ready = 1, dma_overrun, irq;
  logic [DMA_ADDR_W-1:0] dma_addr;
  logic [31:0] dma_data;
  logic pps_in = 0;
  logic [NUM_ADC-1:0][ADC_W-1:0] adc_data = '0;
  logic adc_strobe, integ_reset;
  logic phs_a_out, phs_a_oe, phs_b_out, phs_b_oe;
  logic cal_a_out, cal_a_oe, cal_b_out, cal_b_oe, fpga_reload;

  ccb_top dut (.*);

  always #50 clk = ~clk;  // 10 MHz, 100 ns

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ mechanisms seen
  int n_scan_now, n_scan_pps, n_cal_wait, n_back_to_back, n_short, n_long;
  int n_switch_change, n_integ_irq, n_pps_irq, n_abort, n_overflow, n_overrun;
  int n_backpressure, n_masked, n_blocks_checked, n_overrun_blocks;
  always @(posedge clk) begin
    if (rst_n && dma_overrun) n_overrun++;
    if (rst_n && dma_valid && !dma_ready) n_backpressure++;
  end

  // ------------------------------------------------ A/D converters
  bit full_scale = 0;
  always @(negedge clk)
    for (int c = 0; c < NUM_ADC; c++) adc_data[c] <= full_scale ? 16'hFFFF : 16'($urandom);

  // ------------------------------------------------ host DMA memory
  bit backpressure = 1;
  logic [7:0] mem [512];
  always @(posedge clk)
    if (rst_n && dma_valid && dma_ready)
      for (int b = 0; b < 4; b++) mem[int'(dma_addr) + b] <= dma_data[8*b +: 8];
  always @(negedge clk) dma_ready <= backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;

  // ------------------------------------------------ 1-PPS source
  longint unsigned pps_period = 30000;  // scaled from 1 s
  longint unsigned last_pps_edge = 0;   // clock edge that first samples the rising edge
  initial begin
    forever begin
      repeat (int'(pps_period) - 200) @(negedge clk);
      pps_in = 1;
      @(posedge clk); last_pps_edge = cyc + 1;  // cyc updates at this edge
      repeat (199) @(negedge clk);
      pps_in = 0;
    end
  end

  // ------------------------------------------------ driver's register shadow
  cfg_t shadow;
  function automatic int one(input longint v); return (v == 0) ? 1 : int'(v); endfunction

  function automatic int eff_spc(input cfg_t c);
    return (c.spc == 0) ? 1 : (c.spc > 32) ? 32 : int'(c.spc);
  endfunction

  function automatic bit starts_with_shift(input cfg_t c, input int k);
    return (k == 0) || (c.phs_a[k] != c.phs_a[k-1]) || (c.phs_b[k] != c.phs_b[k-1]);
  endfunction

  // clocks in one integration of configuration c
  function automatic longint integ_clocks(input cfg_t c);
    longint t = 0;
    for (int k = 0; k < eff_spc(c); k++)
      t += starts_with_shift(c, k) ? one(c.phs_dt) + one(c.short_dt) + one(c.reset_dt)
                                   : one(c.long_dt) + one(c.reset_dt);
    return t * ((c.cpi == 0) ? 1 : c.cpi);
  endfunction

  function automatic int first_strobe_offset(input cfg_t c);
    return one(c.phs_dt) + one(c.short_dt);
  endfunction

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d; reg_be = 4'hF;
    @(negedge clk); reg_wr = 0; reg_be = 0;
    case (a)
      ADDR_SPC:        shadow.spc = d[5:0];
      ADDR_PHS_A:      shadow.phs_a = d;
      ADDR_PHS_B:      shadow.phs_b = d;
      ADDR_CPI:        shadow.cpi = d[15:0];
      ADDR_LONG_DT:    shadow.long_dt = d[15:0];
      ADDR_SHORT_DT:   shadow.short_dt = d[15:0];
      ADDR_PHS_DT:     shadow.phs_dt = d[7:0];
      ADDR_RESET_DT:   shadow.reset_dt = d[7:0];
      ADDR_CAL_STATES: shadow.cal_states = d[1:0];
      ADDR_CAL_DT:     shadow.cal_dt = d;
      default: ;
    endcase
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  task automatic write_cfg(input cfg_t c);
    wr(ADDR_SPC, 32'(c.spc));
    wr(ADDR_PHS_A, c.phs_a);
    wr(ADDR_PHS_B, c.phs_b);
    wr(ADDR_CPI, 32'(c.cpi));
    wr(ADDR_LONG_DT, 32'(c.long_dt));
    wr(ADDR_SHORT_DT, 32'(c.short_dt));
    wr(ADDR_PHS_DT, 32'(c.phs_dt));
    wr(ADDR_RESET_DT, 32'(c.reset_dt));
    wr(ADDR_CAL_STATES, 32'(c.cal_states));
    wr(ADDR_CAL_DT, c.cal_dt);
  endtask

  // ------------------------------------------------ reference model
  typedef struct {
    longint unsigned sum[NUM_VALUES];
    logic [ADC_W-1:0] last[NUM_ADC];
  } block_t;
  block_t expected[$];
  block_t cur;
  cfg_t   ref_cfg;
  bit     ref_on = 0;        // reference follows the strobes
  bit     ref_check = 1;     // compare the DMA blocks
  int     ref_n = 0;         // sample index in the integration
  longint unsigned predicted_first = 0;  // clock edge of the next integration's first strobe
  bit     predict_valid = 0;
  logic [7:0] ctrl_bits = 0;

  function automatic void ref_reset(input cfg_t c);
    ref_cfg = c;
    ref_n = 0;
    foreach (cur.sum[i]) cur.sum[i] = 0;
    foreach (cur.last[i]) cur.last[i] = 0;
  endfunction

  longint unsigned first_strobe_time = 0;  // clock edge of the running integration's first strobe
  logic [1:0]      prev_state;
  int              reset_left = -1;  // integrator-reset clocks still expected after a strobe
  int              n_reset_checked;

  // the integrator reset follows every A/D strobe for analog-reset-dt clocks
  always @(posedge clk) begin
    if (!ref_on) reset_left = -1;
    else if (reset_left > 0) begin
      checks++;
      if (!integ_reset) begin failures++; $display("FAIL @%0d: integrator reset ended early", cyc); end
      reset_left--;
    end else if (reset_left == 0) begin
      checks++;
      if (integ_reset) begin failures++; $display("FAIL @%0d: integrator reset too long", cyc); end
      n_reset_checked++;
      reset_left = -1;
    end
    if (adc_strobe && ref_on) begin
      checks++;
      if (integ_reset) begin failures++; $display("FAIL @%0d: sampling during integrator reset", cyc); end
      reset_left = one(ref_cfg.reset_dt);
    end
  end
  always @(posedge clk) begin
    if (adc_strobe && ref_on) begin
      int spc, k;
      logic [1:0] st;
      spc = eff_spc(ref_cfg);
      k = ref_n % spc;
      st = {ref_cfg.phs_b[k], ref_cfg.phs_a[k]};
      if (ref_n == 0) first_strobe_time = cyc + 1;
      if (ref_n == 0 && predict_valid) begin
        checks++;
        if (cyc + 1 != predicted_first) begin
          failures++;
          $display("FAIL: first strobe of integration at %0d, predicted %0d (spc %0d cpi %0d)",
                   cyc + 1, predicted_first, ref_cfg.spc, ref_cfg.cpi);
        end
      end
      checks++;
      if ({phs_b_out, phs_a_out} != st) begin
        failures++; $display("FAIL @%0d: phase switches %b in sample %0d, expected %b", cyc, {phs_b_out, phs_a_out}, k, st);
      end
      if (k > 0) begin
        if (starts_with_shift(ref_cfg, k)) n_short++; else n_long++;
        if (st != prev_state) n_switch_change++;
      end
      prev_state = st;
      for (int c = 0; c < NUM_ADC; c++) begin
        cur.sum[NUM_PHS*c + st] += adc_data[c];
        cur.last[c] = adc_data[c];
      end
      ref_n++;
      if (ref_n == spc * ((ref_cfg.cpi == 0) ? 1 : int'(ref_cfg.cpi))) begin
        // integration over: the hardware latches the registers now
        cfg_t nxt;
        bit change;
        nxt = shadow;
        change = (nxt.cal_states != ref_cfg.cal_states);
        
        expected.push_back(cur);
        if (change) n_cal_wait++; else n_back_to_back++;
        predicted_first = first_strobe_time + integ_clocks(ref_cfg)
                          - first_strobe_offset(ref_cfg) + first_strobe_offset(nxt)
                          + (change ? one(nxt.cal_dt) + 1 : 0);
        predict_valid = 1;
        ref_reset(nxt);
      end
    end
  end

  // ------------------------------------------------ interrupt service
  cfg_t sched[$];   // configurations still to be written by the ISR

  task automatic check_block();
    block_t b;
    logic [63:0] ovf;
    if (!ref_check) begin
      // overrun scan: one sample per integration, switches held at {0,0};
      // a delivered block must hold exactly one sample per channel
      for (int i = 0; i < NUM_VALUES; i++) begin
        logic [31:0] w = {mem[4*i+3], mem[4*i+2], mem[4*i+1], mem[4*i]};
        checks++;
        if ((i % NUM_PHS) != 0 ? (w != 0) : (w > 32'hFFFF)) begin
          failures++; $display("FAIL @%0d: value %0d = %0d holds more than one integration", cyc, i, w);
        end
      end
      n_overrun_blocks++;
      return;
    end
    if (expected.size() == 0) begin
      chk(0, "DMA block without an expected integration");
      return;
    end
    b = expected.pop_front();
    for (int n = 0; n < 64; n++) ovf[n] = mem[256 + 7 - n/8][n%8];
    for (int i = 0; i < NUM_VALUES; i++) begin
      logic [31:0] w = {mem[4*i+3], mem[4*i+2], mem[4*i+1], mem[4*i]};
      checks++;
      if (w != 32'(b.sum[i]) || ovf[i] != (b.sum[i] > 64'hFFFF_FFFF)) begin
        failures++;
        $display("FAIL @%0d: integrated value %0d = %0d ovf %0b, expected %0d ovf %0b", cyc, i, w,
                 ovf[i], 32'(b.sum[i]), b.sum[i] > 64'hFFFF_FFFF);
      end
      if (ovf[i]) n_overflow++;
    end
    for (int c = 0; c < NUM_ADC; c++) begin
      checks++;
      if ({mem[264 + 2*c + 1], mem[264 + 2*c]} != b.last[c]) begin
        failures++; $display("FAIL @%0d: A/D diagnostic %0d", cyc, c);
      end
    end
    n_blocks_checked++;
  endtask

  task automatic service();
    logic [31:0] s;
    rd(ADDR_SENT_INTEG, s);
    if (s[0]) begin
      wr(ADDR_SENT_INTEG, 0);
      n_integ_irq++;
      check_block();
      if (sched.size() > 0) write_cfg(sched.pop_front());
    end
    rd(ADDR_SENT_1PPS, s);
    if (s[0]) begin
      wr(ADDR_SENT_1PPS, 0);
      n_pps_irq++;
    end
  endtask

  // run for n clocks, answering interrupts
  task automatic run(input longint unsigned n);
    longint unsigned t_end = cyc + n;
    while (cyc < t_end) begin
      @(negedge clk);
      if (irq) service();
    end
  endtask

  task automatic set_ctrl(input logic [7:0] v);
    ctrl_bits = v;
    wr(ADDR_CONTROL, 32'(v));
  endtask

  // start-intra-scan / start-data-scan as the driver does it
  task automatic start_scan(input cfg_t first, input cfg_t second, input bit on_pps);
    longint unsigned w;
    set_ctrl(ctrl_bits & ~8'h01);
    set_ctrl(on_pps ? (ctrl_bits | 8'h02) : (ctrl_bits & ~8'h02));
    write_cfg(first);
    expected.delete();
    ref_on = 0;
    if (on_pps) begin
      // wait for a 1-PPS interrupt, then arm the start
      int n_before;
      n_before = n_pps_irq;
      while (n_pps_irq == n_before) run(1);
    end
    @(negedge clk); reg_wr = 1; reg_addr = ADDR_CONTROL; reg_wdata = 32'(ctrl_bits | 8'h01); reg_be = 4'hF;
    @(posedge clk); w = cyc + 1;
    @(negedge clk); reg_wr = 0;
    ctrl_bits = ctrl_bits | 8'h01;
    ref_reset(first);
    ref_on = 1;
    if (!on_pps) begin
      predicted_first = w + one(first.cal_dt) + 2 + first_strobe_offset(first);
      predict_valid = 1;
      n_scan_now++;
    end else begin
      predict_valid = 0;
    end
    write_cfg(second);   // registers now hold the second integration
    if (on_pps) begin
      // the scan starts from the next 1-PPS rising edge
      longint unsigned armed;
      armed = last_pps_edge;
      while (last_pps_edge == armed) run(1);
      predicted_first = last_pps_edge + one(first.cal_dt) + 3 + first_strobe_offset(first);
      predict_valid = 1;
      n_scan_pps++;
    end
  endtask

  function automatic cfg_t switched(input int spc, input int cpi, input logic [1:0] cal);
    cfg_t c = CFG_DEFAULT;
    int half = spc / 2, q = spc / 4;
    c.spc = 6'(spc); c.cpi = 16'(cpi);
    c.long_dt = 16'd25; c.phs_dt = 8'd6; c.short_dt = 16'd19; c.reset_dt = 8'd5;
    // two-switch cycle: equal, contiguous runs of each state
    c.phs_a = 0; c.phs_b = 0;
    for (int k = 0; k < spc; k++) begin
      c.phs_a[k] = ((k / q) % 2) == 1;
      c.phs_b[k] = (k >= half);
    end
    c.cal_states = cal; c.cal_dt = 32'd40;
    return c;
  endfunction

  initial begin
    cfg_t c, d;
    logic [31:0] r;
    foreach (mem[i]) mem[i] = 0;
    shadow = CFG_DEFAULT;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // nothing runs before interrupt-enable, even with start-scan set
    set_ctrl(8'h01);
    run(200);
    chk(n_scan_now == 0 && !dut.integrate, "state machines wait for interrupt-enable");
    set_ctrl(8'h00);

    // ---- scan 1: register defaults, 1-sample unswitched cycles, 40 per integration
    set_ctrl(8'hF8);   // interrupt-enable and all line drivers
    chk(phs_a_oe && phs_b_oe && cal_a_oe && cal_b_oe, "line drivers enabled");
    start_scan(CFG_DEFAULT, CFG_DEFAULT, 0);
    run(4 * 10080 + 500);
    chk(n_blocks_checked >= 3, "default integrations delivered");
    chk(integ_clocks(CFG_DEFAULT) == 10080, "default integration lasts 1.008 ms");

    // ---- scan 2: switched cycles, cal diode changes
    sched.delete();
    c = switched(8, 3, 2'b01);
    sched.push_back(switched(8, 3, 2'b01));   // no cal change: back to back
    sched.push_back(switched(8, 2, 2'b11));   // cal change
    sched.push_back(switched(16, 2, 2'b11));
    d = switched(16, 2, 2'b00); d.cal_dt = 0; sched.push_back(d);  // change, zero settling
    sched.push_back(switched(32, 1, 2'b00));
    sched.push_back(switched(4, 5, 2'b10));
    start_scan(c, switched(8, 3, 2'b01), 0);
    chk(cal_a_out == 1 && cal_b_out == 0, "cal diodes driven to their first states");
    run(20000);
    chk(n_cal_wait >= 2, "cal-diode waits in scan 2");

    // ---- nominal analog timing: 25 us samples, 0.5 us integrator reset,
    // 2 us switch settling, two-switch 8-sample cycles, 5 cycles = 1.02 ms
    sched.delete();
    c = switched(8, 5, 2'b00);
    c.long_dt = 16'd250; c.phs_dt = 8'd20; c.short_dt = 16'd230; c.reset_dt = 8'd5;
    c.cal_dt = 32'd100;
    d = c; d.cal_dt = 32'd0;
    sched.push_back(d);
    sched.push_back(d);
    chk(integ_clocks(c) == 10200, "nominal integration lasts 1.02 ms");
    start_scan(c, d, 0);
    run(3 * 10200 + 400);

    // abort in the middle of an integration
    begin
      int blocks;
      blocks = n_blocks_checked;
      set_ctrl(ctrl_bits & ~8'h01);
      ref_on = 0;
      expected.delete();
      run(500);
      begin
        int strobes;
        strobes = 0;
        for (int i = 0; i < 300; i++) begin @(negedge clk); if (adc_strobe) strobes++; end
        chk(strobes == 0 && !dut.integrate, "scan stopped by clearing start-scan");
      end
      if (n_blocks_checked <= blocks + 1) n_abort++;
    end

    // ---- interrupts masked: 1-PPS edges set nothing
    begin
      int n_before;
      n_before = n_pps_irq;
      set_ctrl(ctrl_bits & ~8'h08);
      run(pps_period + 100);
      chk(!irq && !dut.sent_1pps, "no interrupt while interrupt-enable is clear");
      chk(n_pps_irq == n_before, "no 1-PPS interrupt while masked");
      n_masked++;
      set_ctrl(ctrl_bits | 8'h08);
    end

    // ---- scan 3: start-data-scan, synchronised to 1-PPS
    sched.delete();
    c = switched(8, 4, 2'b10);
    c.cal_dt = 32'd120;        // longest of the phase-switch and diode times
    sched.push_back(switched(8, 4, 2'b10));
    sched.push_back(switched(8, 4, 2'b10));
    start_scan(c, switched(8, 4, 2'b10), 1);
    run(8000);

    // ---- scan 4: overflow, 65568 full-scale samples per integration
    sched.delete();
    c = CFG_DEFAULT;
    c.spc = 6'd32; c.cpi = 16'd2049; c.long_dt = 16'd1; c.short_dt = 16'd1;
    c.phs_dt = 8'd0; c.reset_dt = 8'd1; c.cal_dt = 32'd3;
    full_scale = 1;
    d = c; d.cpi = 16'd4;
    start_scan(c, d, 0);
    run(integ_clocks(c) + 600);
    full_scale = 0;
    run(integ_clocks(d) + 600);
    chk(n_overflow >= 16, "overflow flags delivered");
    set_ctrl(ctrl_bits & ~8'h01);
    ref_on = 0;
    run(300);

    // ---- scan 5: integrations shorter than the DMA transfer
    c = CFG_DEFAULT;
    c.spc = 6'd1; c.cpi = 16'd1; c.long_dt = 16'd1; c.short_dt = 16'd1;
    c.phs_dt = 8'd1; c.reset_dt = 8'd1; c.cal_dt = 32'd1;
    backpressure = 0;
    ref_check = 0;
    start_scan(c, c, 0);
    ref_on = 0;           // too fast for the driver's model
    run(1000);
    set_ctrl(ctrl_bits & ~8'h01);
    run(300);
    chk(n_overrun > 0, "overruns reported");
    chk(n_overrun_blocks > 0, "blocks delivered between overruns");
    ref_check = 1;
    backpressure = 1;

    // ---- firmware reload request
    chk(!fpga_reload, "no reload request");
    set_ctrl(ctrl_bits | 8'h04);
    chk(fpga_reload, "reload request from reset-fpga");
    set_ctrl(8'h00);
    chk(!phs_a_oe && !cal_b_oe, "line drivers off");
    rd(ADDR_CONTROL, r);
    chk(r == 0, "control register read-back");

    $display("mechanisms: scan_now=%0d scan_1pps=%0d cal_wait=%0d back_to_back=%0d short=%0d long=%0d",
             n_scan_now, n_scan_pps, n_cal_wait, n_back_to_back, n_short, n_long);
    $display("            switch_change=%0d integ_irq=%0d pps_irq=%0d abort=%0d overflow=%0d overrun=%0d",
             n_switch_change, n_integ_irq, n_pps_irq, n_abort, n_overflow, n_overrun);
    $display("            backpressure=%0d masked=%0d blocks_checked=%0d resets_checked=%0d", n_backpressure,
             n_masked, n_blocks_checked, n_reset_checked);
    chk(n_scan_now > 0, "scan started immediately");
    chk(n_scan_pps > 0, "scan started on 1-PPS");
    chk(n_cal_wait > 0, "cal-diode wait between integrations");
    chk(n_back_to_back > 0, "integrations back to back");
    chk(n_short > 0, "short samples after a switch change");
    chk(n_long > 0, "long samples");
    chk(n_switch_change > 0, "phase-switch changes within a cycle");
    chk(n_integ_irq > 0, "integration interrupts");
    chk(n_pps_irq > 0, "1-PPS interrupts");
    chk(n_abort > 0, "scan aborted");
    chk(n_overflow > 0, "overflow");
    chk(n_overrun > 0, "DMA overrun");
    chk(n_backpressure > 0, "DMA back-pressure");
    chk(n_masked > 0, "interrupts masked");
    chk(n_reset_checked > 0, "integrator resets timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
