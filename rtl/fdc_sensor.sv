// fdc_sensor: one frequency-to-digital sensor channel. A pulse generator on
// clk opens a window of n clk periods; a counter on the sensing oscillator
// osc counts its edges inside the window; the count is a digital code
// proportional to f_osc / f_clk.
//
// The same channel is used three ways in the system:
//   - process monitor: osc is the 21-stage ring oscillator biased at its
//     zero-temperature-coefficient supply, W = 4, clk is the reference clock;
//   - temperature sensor: osc is the temperature-sensitive oscillator, W = 10
//     (code T[9:0]), clk is the reference clock (fixed pulse width);
//   - temperature sensor with adaptive pulse width: clk is the pulse-width
//     ring oscillator, whose frequency follows process and supply, W = 11
//     (code T[10:0]). The width n / f_PW then cancels the process term of
//     f_osc, so T = n * f_osc / f_PW.
//
// Timing: start is asynchronous. The window opens 3 clk edges after start
// rises and lasts n clk periods. DONE_DLY clk periods after it closes, the
// oscillator count has settled; it is then copied into code and done pulses
// for one clk period. code holds its value until the next conversion ends.
// DONE_DLY must cover at least one osc period plus synchronisation margin.
// busy is high from the start of the window until done.
//
// The window, the AND of window and oscillator, and the counter follow the
// design; the settling delay, the output register and the busy/done flags
// are this implementation's choices.
module fdc_sensor #(
  parameter int unsigned W        = 10,  // output code width
  parameter int unsigned NW       = 10,  // pulse-length counter width
  parameter int unsigned DONE_DLY = 4    // clk periods from window end to done
) (
  input  logic          clk,
  input  logic          osc,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n,
  output logic [W-1:0]  code,
  output logic          done,
  output logic          busy
);

  localparam int unsigned DW = $clog2(DONE_DLY + 1);

  logic          pulse;
  logic          pulse_done;
  logic [W-1:0]  raw;
  logic [DW-1:0] settle;
  logic          settling;

  fixed_pulse_gen #(.NW(NW)) u_pulse (
    .clk  (clk),
    .rst_n(rst_n),
    .start(start),
    .n    (n),
    .pulse(pulse),
    .done (pulse_done)
  );

  fdc_counter #(.W(W)) u_count (
    .osc  (osc),
    .rst_n(rst_n),
    .gate (pulse),
    .count(raw)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      settle   <= '0;
      settling <= 1'b0;
      code     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (pulse_done) begin
        settling <= 1'b1;
        settle   <= DW'(DONE_DLY - 1);
      end else if (settling) begin
        if (settle == '0) begin
          settling <= 1'b0;
          code     <= raw;
          done     <= 1'b1;
        end else begin
          settle <= settle - DW'(1);
        end
      end
    end
  end

  assign busy = pulse | settling;

endmodule
