// ts_comp_encoder: temperature code for the PLL compensation.
//
// In the near/sub-threshold region the VCO's tuning range moves with
// temperature, far enough that at the corners it no longer covers the target
// frequency. The temperature sensor's reading is reduced to a 3-bit code that
// is fed to the charge pump and the VCO to shift their operating range; the
// divider ratio is left to the DVFS controller.
//
// The 10-bit temperature code is divided into eight equal bins of 2**SHIFT
// codes starting at T_LO: tc = (t - T_LO) >> SHIFT, clamped to 0..7. A new
// bin is adopted only after the reading has left the current bin by more
// than HYST codes, so a reading on a bin edge does not make the VCO hop.
//
// Timing: t is taken on the clk edge where t_valid is high; tc changes on
// that edge.
//
// The 3-bit code from the temperature sensor to the charge pump and VCO
// follows the design; the bin edges, the hysteresis and the handshake are
// this implementation's choices.
module ts_comp_encoder
  import pvt_pkg::*;
#(
  parameter logic [TEMP_W-1:0] T_LO  = 10'd320,
  parameter int unsigned       SHIFT = 6,
  parameter int unsigned       HYST  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TEMP_W-1:0] t,
  input  logic              t_valid,
  output logic [TC_W-1:0]   tc
);

  localparam int TC_MAX = (1 << TC_W) - 1;

  int bin;
  int lo_edge;
  int hi_edge;

  always_comb begin
    if (t < T_LO) bin = 0;
    else          bin = (int'(t) - int'(T_LO)) >>> SHIFT;
    if (bin > TC_MAX) bin = TC_MAX;
    lo_edge = int'(T_LO) + (int'(tc) << SHIFT) - int'(HYST);
    hi_edge = int'(T_LO) + ((int'(tc) + 1) << SHIFT) + int'(HYST);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tc <= '0;
    else if (t_valid) begin
      if ((tc != '0 && int'(t) < lo_edge) || (int'(tc) != TC_MAX && int'(t) >= hi_edge))
        tc <= TC_W'(bin);
    end
  end

endmodule
