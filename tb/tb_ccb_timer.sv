// tb_ccb_timer -- self-checking test of the state timer.
// Loads intervals of 0, 1, 2, 5, 255 and random values and measures how many
// cycles pass from the load edge until done is seen (expected max(N,1)),
// and checks that a reload in mid-count restarts the interval.
module tb_ccb_timer;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] value = 0;
  logic done;
  int checks = 0, failures = 0;

  ccb_timer #(.W(8)) dut (.clk, .rst_n, .load, .value, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // length of the state started by a load: cycles in which the state is
  // held, the last one being the cycle where done is high
  task automatic measure(input logic [7:0] n);
    int len;
    @(negedge clk); load = 1; value = n;
    @(negedge clk); load = 0; value = $urandom;
    len = 1;
    while (!done) begin @(negedge clk); len++; end
    checks++;
    if (len != ((n == 0) ? 1 : int'(n))) begin
      failures++;
      $display("FAIL: interval %0d lasted %0d cycles", n, len);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (!done) begin failures++; $display("FAIL: not done after reset"); end
    measure(0); measure(1); measure(2); measure(5); measure(255);
    repeat (20) measure(8'($urandom_range(0, 60)));
    // reload in the middle of an interval
    @(negedge clk); load = 1; value = 10;
    @(negedge clk); load = 0;
    repeat (4) @(negedge clk);
    load = 1; value = 3;
    @(negedge clk); load = 0;
    checks++; if (done) begin failures++; $display("FAIL: done right after reload"); end
    @(negedge clk);
    checks++; if (done) begin failures++; $display("FAIL: reload interval too short"); end
    @(negedge clk);
    checks++; if (!done) begin failures++; $display("FAIL: reload interval not 3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
