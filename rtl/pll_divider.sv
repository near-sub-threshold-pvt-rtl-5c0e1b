// pll_divider: programmable feedback divider of the low-voltage PLL.
//
// Divides the VCO clock by n, so that the locked output runs at n times the
// reference (10 MHz x 20 = 200 MHz with the default n = 20). The output is
// high for the first floor(n/2) VCO periods of each cycle of n periods and
// low for the rest. A new n is taken only at the end of a complete output
// cycle, so changing the division ratio never produces a short pulse. The
// DVFS controller scales the clock frequency through n.
//
// Timing: fb_clk is a register output on vco_clk. Values of n below 2 are
// treated as 2.
//
// The divider and its ratio N follow the design; the duty cycle and the
// cycle-boundary update are this implementation's choices.
module pll_divider #(
  parameter int unsigned NW = 8
) (
  input  logic          vco_clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n,
  output logic          fb_clk
);

  logic [NW-1:0] cnt;
  logic [NW-1:0] n_q;
  logic [NW-1:0] n_eff;

  assign n_eff = (n < NW'(2)) ? NW'(2) : n;

  always_ff @(posedge vco_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      n_q    <= NW'(2);
      fb_clk <= 1'b0;
    end else begin
      if (cnt >= n_q - NW'(1)) begin
        cnt    <= '0;
        n_q    <= n_eff;
        fb_clk <= 1'b1;
      end else begin
        cnt    <= cnt + NW'(1);
        fb_clk <= ((cnt + NW'(1)) < (n_q >> 1));
      end
    end
  end

endmodule
