// tb_ccb_irq -- self-checking test of the interrupt unit.
// Drives an asynchronous 1-PPS input and integration events and checks the
// synchronised edge pulse (one per rising edge, 2-3 cycles late), the
// setting and clearing of both status registers, the shared line, masking
// by interrupt-enable, and that an event in the same cycle as a clear wins.
module tb_ccb_irq;
  logic clk = 0, rst_n = 0;
  logic pps_in = 0, irq_enable = 0, integ_event = 0, clr_1pps = 0, clr_integ = 0;
  logic pps_edge, sent_1pps, sent_integ, irq;
  int checks = 0, failures = 0, edges = 0;

  ccb_irq dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && pps_edge) edges++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(input logic s1, input logic si, input logic l, input string what);
    checks++;
    if (sent_1pps !== s1 || sent_integ !== si || irq !== l) begin
      failures++;
      $display("FAIL: %s: sent_1pps=%0b sent_integ=%0b irq=%0b, expected %0b %0b %0b",
               what, sent_1pps, sent_integ, irq, s1, si, l);
    end
  endtask

  task automatic pulse_pps();
    int lat;
    #3 pps_in = 1;  // off the clock edge
    lat = 0;
    while (!pps_edge) begin @(negedge clk); lat++; end
    checks++;
    if (lat < 1 || lat > 3) begin failures++; $display("FAIL: 1-PPS latency %0d", lat); end
    repeat (10) @(negedge clk);
    #2 pps_in = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect3(0, 0, 0, "after reset");
    // events while interrupts are disabled set nothing
    pulse_pps();
    @(negedge clk); integ_event = 1; @(negedge clk); integ_event = 0;
    expect3(0, 0, 0, "events while disabled");
    checks++; if (edges != 1) begin failures++; $display("FAIL: %0d edges for one pulse", edges); end
    // enabled: 1-PPS
    irq_enable = 1;
    pulse_pps();
    expect3(1, 0, 1, "1-PPS interrupt");
    checks++; if (edges != 2) begin failures++; $display("FAIL: %0d edges for two pulses", edges); end
    // integration interrupt as well
    @(negedge clk); integ_event = 1; @(negedge clk); integ_event = 0;
    expect3(1, 1, 1, "both interrupts");
    // clear sent-1pps: line stays up for the other
    clr_1pps = 1; @(negedge clk); clr_1pps = 0;
    expect3(0, 1, 1, "after clearing sent-1pps");
    // masking by interrupt-enable
    irq_enable = 0; #1;
    expect3(0, 1, 0, "masked line");
    irq_enable = 1; #1;
    expect3(0, 1, 1, "unmasked line");
    clr_integ = 1; @(negedge clk); clr_integ = 0;
    expect3(0, 0, 0, "all cleared");
    // event and clear in the same cycle: the event wins
    integ_event = 1; clr_integ = 1; @(negedge clk); integ_event = 0; clr_integ = 0;
    expect3(0, 1, 1, "event beats clear");
    clr_integ = 1; @(negedge clk); clr_integ = 0;
    expect3(0, 0, 0, "cleared again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
