// osc_model: behavioural model of a ring oscillator (not synthesizable).
// Its half period is half_ps picoseconds, taken fresh at every edge, so a
// testbench can move the frequency the way process, supply or temperature
// would. Oscillates while en is high; out is low otherwise.
module osc_model (
  input  logic     en,
  input  int       half_ps,
  output logic     out
);
  initial out = 1'b0;
  always begin
    if (!en) begin
      out = 1'b0;
      @(posedge en);
    end
    #(half_ps * 1ps);
    out = en ? ~out : 1'b0;
  end
endmodule
