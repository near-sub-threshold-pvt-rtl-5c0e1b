// workload_filter: workload estimate of the DVFS loop.
//
// The load circuit reports how full its input FIFO is (fifo_util, 0..255 as
// a fraction of the FIFO depth) and raises stall for every cycle it stalls.
// Over a window of 2**WIN_LOG2 clk cycles the block counts stall cycles; at
// the end of the window it forms one workload sample
//     x = fifo_util + stall fraction (stall cycles scaled to 0..255)
// and passes it through two configurable filters:
//   - a 4-tap FIR: f = (c0*x[k] + c1*x[k-1] + c2*x[k-2] + c3*x[k-3]) >> 4,
//     with 4-bit coefficients (unity gain when they sum to 16);
//   - a first-order IIR: y += (f - y) >>> alpha_shift, alpha_shift 0..7
//     (0 passes the FIR output straight through).
// workload is y; wl_valid strobes for one cycle when a new value is out.
//
// Timing: the window counter runs freely from reset; the new workload value
// appears two clk edges after the window's last cycle.
//
// Follows the design: the workload estimate from FIFO utilisation and stall
// duration, and configurable FIR and IIR filters. This implementation's own
// choices: the window length, the sum of the two measures, the tap count,
// coefficient format and the first-order IIR form.
module workload_filter #(
  parameter int unsigned WIN_LOG2 = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  fifo_util,
  input  logic        stall,
  input  logic [3:0]  coef [4],
  input  logic [2:0]  alpha_shift,
  output logic [10:0] workload,
  output logic        wl_valid
);

  logic [WIN_LOG2-1:0] win_cnt;
  logic [WIN_LOG2:0]   stall_cnt;
  logic [WIN_LOG2:0]   stall_tot;
  logic [8:0]          x_hist [4];
  logic [8:0]          x_new;
  logic [7:0]          stall_frac;
  logic [2*WIN_LOG2+8:0] stall_scl;
  logic                fir_go;
  logic [15:0]         fir_sum;
  logic [10:0]         fir_out;
  logic signed [12:0]  iir_step;

  // Stall count of the window including the current cycle, scaled to 8 bits.
  assign stall_tot = stall_cnt + (WIN_LOG2+1)'(stall);
  assign stall_scl  = ((2*WIN_LOG2+9)'(stall_tot) << 8) >> WIN_LOG2;
  assign stall_frac = (stall_scl > (2*WIN_LOG2+9)'(255)) ? 8'd255 : 8'(stall_scl);
  assign x_new = {1'b0, fifo_util} + {1'b0, stall_frac};

  always_comb begin
    fir_sum = '0;
    for (int i = 0; i < 4; i++) fir_sum += 16'(x_hist[i]) * 16'(coef[i]);
    fir_out = (fir_sum >> 4) > 16'd2047 ? 11'd2047 : 11'(fir_sum >> 4);
    iir_step = (13'(signed'({2'b00, fir_out})) - 13'(signed'({2'b00, workload}))) >>> alpha_shift;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt   <= '0;
      stall_cnt <= '0;
      for (int i = 0; i < 4; i++) x_hist[i] <= '0;
      fir_go    <= 1'b0;
      workload  <= '0;
      wl_valid  <= 1'b0;
    end else begin
      win_cnt  <= win_cnt + 1'b1;
      fir_go   <= 1'b0;
      wl_valid <= 1'b0;
      if (win_cnt == '1) begin
        stall_cnt <= '0;
        x_hist[0] <= x_new;
        for (int i = 1; i < 4; i++) x_hist[i] <= x_hist[i-1];
        fir_go <= 1'b1;
      end else begin
        stall_cnt <= stall_tot;
      end
      if (fir_go) begin
        workload <= 11'(13'(signed'({2'b00, workload})) + iir_step);
        wl_valid <= 1'b1;
      end
    end
  end

endmodule
