// gate_ctrl: sets up the final IGBT gate signals of the three ANPC legs (the
// source design's gate entity).
//
// Each leg has six switches S1..S6: S1-S4 in series from P to N, S5
// from the mid-point to the S1/S2 node and S6 from the mid-point to the S3/S4
// node. Every phase state turns exactly two switches on:
//   PH_P : S1 S2    PH_OU : S2 S5    PH_OL : S3 S6    PH_N : S3 S4
// PWM_NPC[p][k] drives switch S(k+1) of phase p (0 = U, 1 = V, 2 = W).
// All gates are off while run is low and after the inverter reports a fault;
// the fault is latched until reset (the source design has the fault line but does not say
// what is done with it). syn_DSP is passed to the microcontroller, registered
// like the gates. Dead time is not inserted: the source design does not describe it.
// Outputs are registered: one clock of latency. An assertion checks that
// every leg shows either all switches off or one of the four legal pairs.
module gate_ctrl
  import svm_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  phase_t          U_phase,
  input  phase_t          V_phase,
  input  phase_t          W_phase,
  input  logic            syn_DSP_i,
  input  logic            run,
  input  logic            fault,
  output logic [2:0][5:0] PWM_NPC,
  output logic            syn_DSP,
  output logic            fault_latched
);

  function automatic logic [5:0] gates_of(input phase_t ph);
    unique case (ph)
      PH_P:    return 6'b00_0011;   // S1 S2
      PH_OU:   return 6'b01_0010;   // S2 S5
      PH_OL:   return 6'b10_0100;   // S3 S6
      default: return 6'b00_1100;   // S3 S4
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      PWM_NPC       <= '0;
      syn_DSP       <= 1'b0;
      fault_latched <= 1'b0;
    end else begin
      syn_DSP <= syn_DSP_i;
      if (fault)
        fault_latched <= 1'b1;
      if (fault || fault_latched || !run)
        PWM_NPC <= '0;
      else
        PWM_NPC <= {gates_of(W_phase), gates_of(V_phase), gates_of(U_phase)};
    end
  end

  // Each leg is either off or in one of the four two-switch states.
  for (genvar p = 0; p < 3; p++) begin : g_leg_check
    a_legal_pair: assert property (@(posedge clk) disable iff (!rst_n)
      PWM_NPC[p] inside {6'b00_0000, 6'b00_0011, 6'b01_0010, 6'b10_0100, 6'b00_1100});
  end

endmodule
