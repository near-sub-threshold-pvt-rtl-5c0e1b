// vref_dac_decoder: tap decoder of the resistor-string DAC that turns the
// fixed sub-threshold reference into a variable reference voltage for the
// DC-DC converter.
//
// A resistor string divides the reference into eight taps, nominally
// 0.3 V, 0.4 V, ..., 1.0 V (tap k = 0.3 V + k * 0.1 V). The decoder turns the
// 3-bit code into a one-hot select of exactly one tap switch, so the string
// output is never shorted between two taps. The new select is registered and
// changes break-before-make: for one clk period after a code change all tap
// switches are open, then the new tap closes.
//
// Timing: a code change is seen on the next clk edge (all taps open) and the
// new tap is selected one edge later. With en low all taps stay open.
//
// The resistor string, the decoder and the eight levels follow the design;
// the binary code, the registered output and the break-before-make gap are
// this implementation's choices.
module vref_dac_decoder
  import pvt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [LVL_W-1:0]   code,
  output logic [(1<<LVL_W)-1:0] tap_sel
);

  logic [LVL_W-1:0] code_q;
  logic             changing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_q   <= '0;
      changing <= 1'b1;
      tap_sel  <= '0;
    end else begin
      code_q   <= code;
      changing <= (code != code_q);
      if (!en || changing || code != code_q) tap_sel <= '0;
      else                                   tap_sel <= (1 << code_q);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(tap_sel));

endmodule
