// ccb_irq -- interrupt unit of the CCB FPGA.
//
// Two events share one interrupt line: the integration interrupt (results of
// an integration are in DMA memory and the next integration has started) and
// the 1-PPS interrupt (rising edge of the one-pulse-per-second timing
// input).  Each event first sets its own status register, sent-integ-done or
// sent-1pps, and the line is the OR of the two registers; the driver's
// handler reads and clears them one by one, which keeps the clear of one
// event from losing the other.  While interrupt-enable is clear, events set
// nothing and the line stays low; clearing interrupt-enable also masks the
// line at once.  An event in the same cycle as a clear wins.
//
// The asynchronous 1-PPS input passes a two-stage synchroniser; `pps_edge`
// is a one-cycle pulse on its rising edge, also used to start scans on the
// second.  `irq` is active high (the board's PCI INTA# is its inverse).
module ccb_irq (
  input  logic clk,
  input  logic rst_n,
  input  logic pps_in,
  input  logic irq_enable,
  input  logic integ_event,  // DMA block written
  input  logic clr_1pps,
  input  logic clr_integ,
  output logic pps_edge,
  output logic sent_1pps,
  output logic sent_integ,
  output logic irq
);

  logic [2:0] pps_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pps_sync   <= '0;
      sent_1pps  <= 1'b0;
      sent_integ <= 1'b0;
    end else begin
      pps_sync <= {pps_sync[1:0], pps_in};
      if (irq_enable && pps_edge)    sent_1pps <= 1'b1;
      else if (clr_1pps)             sent_1pps <= 1'b0;
      if (irq_enable && integ_event) sent_integ <= 1'b1;
      else if (clr_integ)            sent_integ <= 1'b0;
    end
  end

  assign pps_edge = pps_sync[1] && !pps_sync[2];
  assign irq      = irq_enable && (sent_1pps || sent_integ);

endmodule
