// ccb_timer -- state timer of the CCB sequencers.
//
// Every timed state of the integration and sample state machines (integrator
// reset, phase shift, short sample, long sample, cal-diode settling) owns one
// of these timers.  The state machine pulses `load` on the clock edge that
// enters the state, with the state's length `value` in clock periods
// (100 ns at the nominal 10 MHz clock).  `done` (the *_COMP signal of the
// state machines) is high in the state's last cycle, so the state lasts
// `value` cycles; a value of 0 gives the shortest possible state, one cycle.
//
// Interface: load/value sampled at the rising edge; done is combinational
// from the count.  Synchronous load, asynchronous active-low reset to 0
// (done high while idle).
module ccb_timer #(
  parameter int unsigned W = 16  // width of the interval register
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] value,
  output logic         done
);

  logic [W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               count <= '0;
    else if (load)            count <= (value == '0) ? '0 : value - 1'b1;
    else if (count != '0)     count <= count - 1'b1;
  end

  assign done = (count == '0);

endmodule
