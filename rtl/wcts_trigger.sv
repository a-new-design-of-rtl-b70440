// wcts_trigger: trigger for the Wire Chamber Test Stand (WCTS). It gives a
// pulse exactly one clock cycle wide each time the card goes from no active
// hit-bit to some active hit-bit, as the design description specifies
// ("a 1-clock-cycle-wide pulse when there are active hit-bits"). Taking the
// rising edge of activity, so that a hit held for many cycles still gives a
// single pulse, is this design's reading.
//
// Timing: if active is sampled high at clock edge t0 after being low at
// t0-1, trig is high from t0 to t0+1 (it is a flip-flop output).
// Synchronous active-low reset; the previous value of active resets high so
// that a hit already present when reset is released does not fire.
module wcts_trigger (
  input  logic clk,
  input  logic rst_n,
  input  logic active,  // synchronous: some enabled hit-bit is set
  output logic trig
);

  logic active_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b1;
      trig     <= 1'b0;
    end else begin
      active_q <= active;
      trig     <= active & ~active_q;
    end
  end

endmodule
