// tb_ccb_accum -- self-checking test of the integrator bank.
// Feeds random A/D samples with random phase-switch states, keeps 64
// reference sums (index 4*channel + state) in the testbench, and checks the
// snapshot after each integration, that the accumulators restart from zero
// after snap and clear, the last-sample diagnostics, and the overflow flags
// (a full-scale channel overflows after 65538 samples, one short of that it
// does not, and the flag is set only for the affected value).
module tb_ccb_accum;
  import ccb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, snap = 0, adc_strobe = 0;
  logic [1:0] phs_state = 0;
  logic [NUM_ADC-1:0][ADC_W-1:0] adc_data = '0;
  logic [NUM_VALUES-1:0][ACC_W-1:0] result;
  logic [NUM_VALUES-1:0] result_ovf;
  logic [NUM_ADC-1:0][ADC_W-1:0] result_diag;
  int checks = 0, failures = 0;

  ccb_accum dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned ref_sum[NUM_VALUES];
  logic [ADC_W-1:0] ref_last[NUM_ADC];

  task automatic ref_clear();
    foreach (ref_sum[i]) ref_sum[i] = 0;
  endtask

  task automatic sample(input logic [1:0] st, input bit full_scale = 0);
    @(negedge clk);
    phs_state = st;
    for (int c = 0; c < NUM_ADC; c++) begin
      adc_data[c] = full_scale ? 16'hFFFF : 16'($urandom);
      ref_sum[NUM_PHS*c + st] += adc_data[c];
      ref_last[c] = adc_data[c];
    end
    adc_strobe = 1;
    @(negedge clk);
    adc_strobe = 0;
    adc_data = '0;
  endtask

  task automatic do_snap_and_check(input string what);
    @(negedge clk); snap = 1; @(negedge clk); snap = 0;
    for (int i = 0; i < NUM_VALUES; i++) begin
      checks++;
      if (result[i] != ACC_W'(ref_sum[i]) || result_ovf[i] != (ref_sum[i] > 64'hFFFF_FFFF)) begin
        failures++;
        $display("FAIL: %s value %0d = %0d ovf %0b, expected %0d ovf %0b", what, i,
                 result[i], result_ovf[i], ACC_W'(ref_sum[i]), ref_sum[i] > 64'hFFFF_FFFF);
      end
    end
    for (int c = 0; c < NUM_ADC; c++) begin
      checks++;
      if (result_diag[c] != ref_last[c]) begin
        failures++; $display("FAIL: %s diagnostic %0d", what, c);
      end
    end
    ref_clear();
  endtask

  initial begin
    ref_clear();
    foreach (ref_last[c]) ref_last[c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random integrations
    for (int it = 0; it < 6; it++) begin
      repeat ($urandom_range(5, 60)) sample(2'($urandom));
      do_snap_and_check($sformatf("integration %0d", it));
    end
    // clear discards without a snapshot
    repeat (10) sample(2'($urandom));
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_clear();
    repeat (10) sample(2'($urandom));
    do_snap_and_check("after clear");
    // just below overflow: 65537 full-scale samples sum to 2^32-1
    repeat (65537) sample(2'd2, 1);
    do_snap_and_check("full scale without overflow");
    checks++;
    if (result_ovf != '0 || result[NUM_PHS*5 + 2] != 32'hFFFF_FFFF) begin
      failures++; $display("FAIL: overflow flagged too early");
    end
    // one more sample overflows state 1 of every channel only
    repeat (65538) sample(2'd1, 1);
    sample(2'd3);
    do_snap_and_check("overflow");
    checks++;
    if (result_ovf != {NUM_ADC{4'b0010}}) begin
      failures++; $display("FAIL: overflow mask %h", result_ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
