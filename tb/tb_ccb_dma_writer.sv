// tb_ccb_dma_writer -- self-checking test of the DMA writer.
// A memory model with random back-pressure on dma_ready collects the words
// written; the testbench then decodes the block as the host driver would
// (little-endian 32-bit words, 8-byte overflow mask with bit 0 in the LSB of
// the highest byte, 16-bit diagnostics) and compares with the inputs.  It
// also checks that done follows the last word, that a start while busy is
// ignored, and that without back-pressure a block takes 74 transfer cycles (done
// is seen 75 cycles after the start edge).
module tb_ccb_dma_writer;
  import ccb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dma_ready = 0;
  logic [NUM_VALUES-1:0][ACC_W-1:0] result;
  logic [NUM_VALUES-1:0] result_ovf;
  logic [NUM_ADC-1:0][ADC_W-1:0] result_diag;
  logic busy, done, dma_valid;
  logic [DMA_ADDR_W-1:0] dma_addr;
  logic [31:0] dma_data;
  int checks = 0, failures = 0;
  bit backpressure = 1;

  ccb_dma_writer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host memory, bytes
  logic [7:0] mem [512];
  int writes, dones;
  always @(posedge clk) begin
    if (rst_n && dma_valid && dma_ready) begin
      for (int b = 0; b < 4; b++) mem[int'(dma_addr) + b] <= dma_data[8*b +: 8];
      writes++;
    end
    if (done && rst_n) dones++;
  end
  always @(negedge clk) dma_ready <= backpressure ? ($urandom_range(0, 2) != 0) : 1'b1;

  function automatic logic [31:0] word32(input int off);
    return {mem[off+3], mem[off+2], mem[off+1], mem[off]};
  endfunction

  task automatic check_block(input string what);
    logic [63:0] ovf;
    for (int i = 0; i < NUM_VALUES; i++) begin
      checks++;
      if (word32(4*i) != result[i]) begin
        failures++; $display("FAIL: %s data word %0d = %h, expected %h", what, i, word32(4*i), result[i]);
      end
    end
    // bit n of the mask is bit (n mod 8) of byte (7 - n/8) of the mask area
    for (int n = 0; n < 64; n++) ovf[n] = mem[256 + 7 - n/8][n%8];
    checks++;
    if (ovf != result_ovf) begin
      failures++; $display("FAIL: %s overflow mask %h, expected %h", what, ovf, result_ovf);
    end
    for (int c = 0; c < NUM_ADC; c++) begin
      checks++;
      if ({mem[264 + 2*c + 1], mem[264 + 2*c]} != result_diag[c]) begin
        failures++; $display("FAIL: %s diagnostic %0d", what, c);
      end
    end
  endtask

  task automatic randomize_inputs();
    foreach (result[i]) result[i] = $urandom;
    result_ovf = {$urandom, $urandom};
    foreach (result_diag[c]) result_diag[c] = 16'($urandom);
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 0;
    writes = 0; dones = 0;
    randomize_inputs();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 4; blk++) begin
      int t;
      backpressure = (blk != 3);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      t = 1;
      // a second start while busy is ignored
      @(negedge clk); start = 1; @(negedge clk); start = 0; t += 2;
      while (!done) begin @(negedge clk); t++; end
      checks++;
      if (writes != 74 * (blk + 1)) begin failures++; $display("FAIL: %0d words written", writes); end
      if (blk == 3) begin
        checks++;
        if (t != 75) begin failures++; $display("FAIL: block took %0d cycles, expected 75", t); end
      end
      check_block($sformatf("block %0d", blk));
      @(negedge clk);
      checks++;
      if (busy || dones != blk + 1) begin failures++; $display("FAIL: busy after done or %0d dones", dones); end
      randomize_inputs();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
