// dlc_model: behavioural model of the delay-line comparator (not
// synthesizable). Two chains of stacked inverters, one starved by VREF and
// one by VOUT, are launched by the same clock edge; a stage delay in
// sub-threshold is tau(v) = T0 * exp(-v / S). VOP1 samples whether the VREF
// chain is still faster than the VOUT chain after N1 stages (VOUT below
// VREF); VOP2 compares a VREF chain with EXTRA more stages, so it is set
// only when VOUT is well below VREF. The result appears at the clock edge
// plus the chain delay (modelled as a fixed 1 ns).
module dlc_model #(
  parameter real S     = 0.05,
  parameter int  N2    = 8,
  parameter int  EXTRA = 2
) (
  input  logic clk,
  input  real  vref,
  input  real  vout,
  output logic vop1,
  output logic vop2
);
  initial begin vop1 = 1'b0; vop2 = 1'b0; end
  always @(posedge clk) begin
    real tr, to;
    tr = $exp(-vref / S);
    to = $exp(-vout / S);
    #1ns;
    vop1 = (to > tr);
    vop2 = (to * N2 > tr * (N2 + EXTRA));
  end
endmodule
