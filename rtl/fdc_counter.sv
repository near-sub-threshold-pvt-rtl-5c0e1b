// fdc_counter: the counting half of a frequency-to-digital converter. It
// counts the rising edges of a sensing ring oscillator that fall inside a
// gating pulse, so the result is f_osc * W.
//
// In the circuit the oscillator and the pulse meet in a 2-input AND gate
// whose output clocks the counter. Here the counter is clocked by the
// oscillator itself and the pulse acts as a count enable, which counts the
// same edges without a gated clock. The first oscillator edge that sees the
// pulse high after it was low restarts the count at 1, so no separate clear
// is needed between conversions. The count saturates at all ones instead of
// wrapping. The gate is asynchronous to osc, exactly as at the AND gate of
// the original, so the count may differ by one edge at either end of the
// window; that is the converter's quantisation error.
//
// Interface: count is in the osc domain and stops changing at the first osc
// edge after gate falls; read it after that (see fdc_sensor).
module fdc_counter #(
  parameter int unsigned W = 10
) (
  input  logic         osc,
  input  logic         rst_n,
  input  logic         gate,
  output logic [W-1:0] count
);

  logic gate_q;

  always_ff @(posedge osc or negedge rst_n) begin
    if (!rst_n) begin
      gate_q <= 1'b0;
      count  <= '0;
    end else begin
      gate_q <= gate;
      if (gate) begin
        if (!gate_q)          count <= W'(1);
        else if (count != '1) count <= count + W'(1);
      end
    end
  end

endmodule
