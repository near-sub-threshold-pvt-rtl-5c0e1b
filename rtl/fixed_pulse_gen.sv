// fixed_pulse_gen: pulse generator whose width is a whole number of periods of
// its clock, the time base of every frequency-to-digital sensor here.
//
// A rising edge on start sets the pulse flip-flop. While the pulse is high a
// counter counts clk edges and a comparator checks it against the programmed
// count n; on a match ("result") the flip-flop is cleared and the counter is
// held in reset until the next start. The pulse is therefore exactly n clk
// periods wide. Driven by a stable reference clock this is the fixed pulse
// width generator; driven by a ring oscillator whose frequency tracks process
// and supply, the same circuit is the adaptive pulse width generator, whose
// width W = n / f_PW shrinks and grows with that oscillator.
//
// Interface: start is asynchronous to clk and is brought in through a
// two-flop synchroniser, so the pulse rises 3 clk edges after start rises.
// done is a one-cycle strobe on the clk edge where the pulse falls. n = 0
// gives a pulse of 2**NW periods. A start edge that arrives while a pulse is
// running is ignored.
//
// Follows the design: flip-flop set by START, counter reset by the pulse,
// comparator against N clearing the flip-flop. This implementation's own
// choices: a fully synchronous flip-flop (the original is clocked by START),
// the start synchroniser and the done strobe.
module fixed_pulse_gen #(
  parameter int unsigned NW = 10   // width of the pulse-length counter
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] n,
  output logic          pulse,
  output logic          done
);

  logic [2:0]    start_sync;   // two synchroniser stages and one history stage
  logic [NW-1:0] cnt;
  logic          start_rise;
  logic          result;

  assign start_rise = start_sync[1] & ~start_sync[2];
  assign result     = pulse && (cnt + NW'(1) == n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_sync <= '0;
      pulse      <= 1'b0;
      cnt        <= '0;
      done       <= 1'b0;
    end else begin
      start_sync <= {start_sync[1:0], start};
      done       <= 1'b0;
      if (!pulse) begin
        cnt <= '0;                     // counter held in reset (reset2)
        if (start_rise) pulse <= 1'b1; // D = 1 latched on START
      end else if (result) begin
        pulse <= 1'b0;                 // comparator clears the flip-flop
        cnt   <= '0;
        done  <= 1'b1;
      end else begin
        cnt <= cnt + NW'(1);
      end
    end
  end

endmodule
