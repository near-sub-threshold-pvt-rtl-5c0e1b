// sc_pfm_controller: pulse-frequency-modulation control of the switched
// capacitor DC-DC converter, with the non-overlapping phase generator and the
// switch-width control.
//
// The switch matrix rests in phase phi1. Every regulation cycle the
// controller clocks the delay-line comparator (cmp_clk). If the comparator
// reports VOUT below VREF (vop1 = 1) the controller fires one phi2 pulse,
// which moves charge from the flying capacitors to the output; otherwise it
// stays in phi1, so the switching rate follows the load. Dead times with both
// phases low on either side of phi2 keep the two phases from overlapping.
// The comparator's second output vop2 marks a large error (VREF well above
// VOUT); the pair {vop2, vop1} latched at the decision is driven to the
// matrix as sw_width, enabling the extra switch width for that phi2 pulse so
// the output recovers faster.
//
// Timing (clk cycles): PHI1 for IDLE_CYC cycles, one cycle with cmp_clk high,
// one decision cycle, then DEAD_CYC + PHI2_CYC + DEAD_CYC cycles when a pulse
// is fired. A regulation cycle thus lasts IDLE_CYC + 2 cycles without a pulse
// and IDLE_CYC + 2 + 2*DEAD_CYC + PHI2_CYC cycles with one. phi2_fire strobes
// for one cycle at the start of every phi2 pulse. When en is low the matrix
// stays in phi1.
//
// Follows the design: PFM regulation, phi1 at rest, a phi2 pulse when the
// comparator finds VOUT below VREF, non-overlapping phases, and width enables
// taken from VOP1 and VOP2. This implementation's own choices: a synchronous
// phase generator with dead times counted in clk cycles, and all cycle
// counts.
module sc_pfm_controller
  import pvt_pkg::*;
#(
  parameter int unsigned IDLE_CYC = 2,
  parameter int unsigned DEAD_CYC = 1,
  parameter int unsigned PHI2_CYC = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       vop1,
  input  logic       vop2,
  output logic       cmp_clk,
  output logic       phi1,
  output logic       phi2,
  output logic [1:0] sw_width,
  output logic       phi2_fire
);

  localparam int unsigned CW = 8;

  pfm_state_e    state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= PFM_PHI1;
      cnt      <= '0;
      sw_width <= '0;
    end else begin
      unique case (state)
        PFM_PHI1: begin
          if (!en) cnt <= '0;
          else if (cnt + CW'(1) >= CW'(IDLE_CYC)) begin
            cnt   <= '0;
            state <= PFM_SAMPLE;
          end else cnt <= cnt + CW'(1);
        end
        PFM_SAMPLE: state <= PFM_DECIDE;
        PFM_DECIDE: begin
          if (vop1) begin
            sw_width <= {vop2, vop1};
            state    <= PFM_DEAD1;
          end else begin
            state <= PFM_PHI1;
          end
        end
        PFM_DEAD1: begin
          if (cnt + CW'(1) >= CW'(DEAD_CYC)) begin
            cnt   <= '0;
            state <= PFM_PHI2;
          end else cnt <= cnt + CW'(1);
        end
        PFM_PHI2: begin
          if (cnt + CW'(1) >= CW'(PHI2_CYC)) begin
            cnt   <= '0;
            state <= PFM_DEAD2;
          end else cnt <= cnt + CW'(1);
        end
        PFM_DEAD2: begin
          if (cnt + CW'(1) >= CW'(DEAD_CYC)) begin
            cnt      <= '0;
            sw_width <= '0;
            state    <= PFM_PHI1;
          end else cnt <= cnt + CW'(1);
        end
        default: state <= PFM_PHI1;
      endcase
    end
  end

  assign cmp_clk   = (state == PFM_SAMPLE);
  assign phi1      = (state == PFM_PHI1) || (state == PFM_SAMPLE) || (state == PFM_DECIDE);
  assign phi2      = (state == PFM_PHI2);
  assign phi2_fire = (state == PFM_PHI2) && (cnt == '0);

  // The two phases must never be on together.
  a_nonoverlap: assert property (@(posedge clk) disable iff (!rst_n) !(phi1 && phi2));

endmodule
