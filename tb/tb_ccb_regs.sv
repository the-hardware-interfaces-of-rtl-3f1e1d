// tb_ccb_regs -- self-checking test of the register file.
// Checks the reset values of every register, full and byte-enabled writes
// with truncation to each register's width, the control-register bits, the
// run-enable latch (set by the first interrupt-enable, kept afterwards),
// the reload request and the clear strobes of the interrupt status registers.
module tb_ccb_regs;
  import ccb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_wr = 0;
  logic [7:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0, reg_rdata;
  logic [3:0] reg_be = 0;
  ctrl_t ctrl;
  cfg_t cfg;
  logic run_enable, reload_req, sent_1pps = 0, sent_integ = 0, clr_1pps, clr_integ;
  int checks = 0, failures = 0;

  ccb_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] be = 4'hF);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d; reg_be = be;
    @(negedge clk); reg_wr = 0; reg_be = 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [31:0] exp, input string what);
    @(negedge clk); reg_addr = a; #1;
    checks++;
    if (reg_rdata !== exp) begin
      failures++;
      $display("FAIL: %s at 0x%02h read 0x%08h, expected 0x%08h", what, a, reg_rdata, exp);
    end
  endtask

  task automatic expect_bit(input logic v, input logic exp, input string what);
    checks++;
    if (v !== exp) begin failures++; $display("FAIL: %s = %0b, expected %0b", what, v, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset values of the register map
    expect_rd(8'h40, 32'd0,   "control reset");
    expect_rd(8'h44, 32'd1,   "samples-per-cycle reset");
    expect_rd(8'h48, 32'd0,   "phase-switch-a reset");
    expect_rd(8'h4C, 32'd0,   "phase-switch-b reset");
    expect_rd(8'h50, 32'd40,  "cycles-per-integ reset");
    expect_rd(8'h54, 32'd250, "long-sample-dt reset");
    expect_rd(8'h58, 32'd250, "short-sample-dt reset");
    expect_rd(8'h5C, 32'd0,   "phase-switch-dt reset");
    expect_rd(8'h60, 32'd0,   "analog-reset-dt reset");
    expect_rd(8'h64, 32'd0,   "cal-diode-states reset");
    expect_rd(8'h68, 32'd0,   "cal-diode-dt reset");
    expect_bit(run_enable, 0, "run_enable after reset");
    // writes are truncated to the register widths
    wr(8'h44, 32'hFFFF_FF20); expect_rd(8'h44, 32'h20, "samples-per-cycle width");
    wr(8'h48, 32'hA5A5_0F0F); expect_rd(8'h48, 32'hA5A5_0F0F, "phase-switch-a");
    wr(8'h4C, 32'h1234_5678); expect_rd(8'h4C, 32'h1234_5678, "phase-switch-b");
    wr(8'h50, 32'hDEAD_BEEF); expect_rd(8'h50, 32'hBEEF, "cycles-per-integ width");
    wr(8'h54, 32'h0001_00FA); expect_rd(8'h54, 32'h00FA, "long-sample-dt width");
    wr(8'h58, 32'h0000_00E6); expect_rd(8'h58, 32'h00E6, "short-sample-dt");
    wr(8'h5C, 32'h0000_0114); expect_rd(8'h5C, 32'h14, "phase-switch-dt width");
    wr(8'h60, 32'h0000_0005); expect_rd(8'h60, 32'h05, "analog-reset-dt");
    wr(8'h64, 32'h0000_0007); expect_rd(8'h64, 32'h3, "cal-diode-states width");
    wr(8'h68, 32'hFEDC_BA98); expect_rd(8'h68, 32'hFEDC_BA98, "cal-diode-dt");
    checks++;
    if (cfg.cal_dt !== 32'hFEDC_BA98 || cfg.long_dt !== 16'h00FA || cfg.spc !== 6'h20) begin
      failures++; $display("FAIL: cfg outputs do not match the registers");
    end
    // byte enables: little-endian byte lanes
    wr(8'h68, 32'h1122_3344, 4'b0101); expect_rd(8'h68, 32'hFE22_BA44, "cal-diode-dt byte enables");
    wr(8'h48, 32'h0000_FF00, 4'b0010); expect_rd(8'h48, 32'hA5A5_FF0F, "phase-switch-a byte 1");
    // unmapped offset reads zero and writes nothing
    wr(8'h7C, 32'hFFFF_FFFF); expect_rd(8'h7C, 32'd0, "unmapped offset");
    expect_rd(8'h44, 32'h20, "samples-per-cycle after unmapped write");
    // control register bits
    wr(8'h40, 32'h0000_00F3);
    expect_rd(8'h40, 32'hF3, "control");
    expect_bit(ctrl.start_scan, 1, "start-scan");
    expect_bit(ctrl.wait_1pps, 1, "wait-1pps");
    expect_bit(ctrl.drive_cal_b, 1, "drive-cal-b");
    expect_bit(run_enable, 0, "run_enable before interrupt-enable");
    wr(8'h40, 32'h0000_0008);
    @(negedge clk);
    expect_bit(run_enable, 1, "run_enable after interrupt-enable");
    wr(8'h40, 32'h0000_0000);
    @(negedge clk);
    expect_bit(run_enable, 1, "run_enable kept after interrupt-enable cleared");
    expect_bit(reload_req, 0, "reload request idle");
    wr(8'h40, 32'h0000_0004);
    expect_bit(reload_req, 1, "reload request from reset-fpga");
    // status register read-back and clear strobes
    sent_1pps = 1; sent_integ = 0;
    expect_rd(8'h6C, 32'd1, "sent-1pps read");
    expect_rd(8'h70, 32'd0, "sent-integ-done read");
    @(negedge clk); reg_wr = 1; reg_addr = 8'h6C; reg_wdata = 0; reg_be = 4'hF; #1;
    expect_bit(clr_1pps, 1, "clear of sent-1pps");
    expect_bit(clr_integ, 0, "no clear of sent-integ-done");
    reg_addr = 8'h70; #1;
    expect_bit(clr_integ, 1, "clear of sent-integ-done");
    reg_wdata = 1; #1;
    expect_bit(clr_integ, 0, "writing 1 does not clear");
    @(negedge clk); reg_wr = 0;
    // reset returns everything to the defaults
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_rd(8'h50, 32'd40, "cycles-per-integ after second reset");
    expect_rd(8'h40, 32'd0, "control after second reset");
    expect_bit(run_enable, 0, "run_enable after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
