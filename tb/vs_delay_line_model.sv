// vs_delay_line_model: behavioural model of the current-starved delay line
// of the voltage sensor (not synthesizable). The edge reaches tap i when the
// effective supply is at least 300 mV + 50 mV * i. The process corner moves
// the effective supply by corner_mv; the control bit adds comp_mv to undo a
// slow corner.
module vs_delay_line_model #(
  parameter int COMP_MV = 30
) (
  input  int         vin_mv,
  input  int         corner_mv,
  input  logic       proc_ctrl,
  output logic [4:0] taps
);
  int eff;
  always_comb begin
    eff = vin_mv + corner_mv + (proc_ctrl ? COMP_MV : 0);
    for (int i = 0; i < 5; i++) taps[i] = (eff >= 300 + 50 * i);
  end
endmodule
