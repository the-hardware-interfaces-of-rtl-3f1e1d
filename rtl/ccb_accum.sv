// ccb_accum -- integrator bank of the CCB FPGA.
//
// Adds each A/D sample into one of 64 32-bit accumulators: one per A/D
// converter (16) and phase-switch state (4).  Value index = 4*channel +
// state, where channel is the A/D index (radiometer, band, detector, with
// the detector varying fastest) and state = {switch B, switch A} of the
// sample, so indices 4c..4c+3 are integrations 1..4 of channel c.  Sums are
// unsigned and wrap modulo 2^32; a carry out of any addition sets that
// value's overflow flag for the rest of the integration.
//
// The last sample of every converter is also kept as a diagnostic.
// `snap` (end of an integration) copies sums, overflow flags and the last
// samples into the result registers read by the DMA writer and clears the
// accumulators in the same cycle, so the next integration starts from zero
// without a gap.  `clear` zeroes the accumulators without copying (start of
// the first integration of a scan).  A sample strobed in the same cycle as
// `snap` or `clear` counts towards the new integration.
//
// Timing: adc_data is sampled on the rising edge where adc_strobe is high;
// results change on the edge where snap is high.
module ccb_accum
  import ccb_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     snap,
  input  logic                     adc_strobe,
  input  logic [1:0]               phs_state,
  input  logic [NUM_ADC-1:0][ADC_W-1:0] adc_data,
  output logic [NUM_VALUES-1:0][ACC_W-1:0] result,
  output logic [NUM_VALUES-1:0]    result_ovf,
  output logic [NUM_ADC-1:0][ADC_W-1:0] result_diag
);

  logic [NUM_VALUES-1:0][ACC_W-1:0] acc;
  logic [NUM_VALUES-1:0]            ovf;
  logic [NUM_ADC-1:0][ADC_W-1:0]    last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      ovf         <= '0;
      last        <= '0;
      result      <= '0;
      result_ovf  <= '0;
      result_diag <= '0;
    end else begin
      if (snap) begin
        result      <= acc;
        result_ovf  <= ovf;
        result_diag <= last;
      end
      for (int c = 0; c < NUM_ADC; c++) begin
        for (int s = 0; s < NUM_PHS; s++) begin
          logic [ACC_W:0] base, sum;
          base = (snap || clear) ? '0 : {1'b0, acc[NUM_PHS*c+s]};
          sum  = base + ((adc_strobe && phs_state == 2'(s)) ? (ACC_W+1)'(adc_data[c]) : '0);
          acc[NUM_PHS*c+s] <= sum[ACC_W-1:0];
          ovf[NUM_PHS*c+s] <= ((snap || clear) ? 1'b0 : ovf[NUM_PHS*c+s]) | sum[ACC_W];
        end
      end
      if (adc_strobe) last <= adc_data;
    end
  end

endmodule
