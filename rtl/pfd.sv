// pfd: phase-frequency detector of the low-voltage PLL.
//
// Two flip-flops with their data inputs tied high are clocked by the
// reference clock and by the divided feedback clock. The first to rise
// raises UP (reference leads) or DN (feedback leads); when both are high the
// AND of the two clears them together. The width of the UP or DN pulse is
// the phase error; a frequency error produces a train of pulses of one sign.
// The outputs drive the charge pump.
//
// Timing: asynchronous. UP and DN are both high only for the time it takes
// the reset to clear them; in simulation that is zero time.
//
// The path from the outputs through the AND gate back to the asynchronous
// clears is a combinational loop that a synthesis tool reports. It stands on
// purpose: the self-clearing reset is what makes this a phase-frequency
// detector, and the loop is broken by the flip-flops' clear-to-output delay.
//
// The detector, its inputs and its UP/DN outputs follow the design; the
// classic two-flip-flop circuit is this implementation's choice for its
// insides, which the design shows only as a block.
module pfd (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);

  logic clr;

  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end

endmodule
