// tb_gate_ctrl: self-checking test of the gate-signal unit.
// All 64 combinations of the three leg states are applied; the switches that
// conduct are decoded back into the leg-to-mid-point connection of the
// circuit (P, mid-point through the upper or lower clamp, N) and checked,
// together with the rule that exactly two switches of a leg are on. Then the
// run input and the latched fault shut-down are checked.
module tb_gate_ctrl;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  phase_t U_phase, V_phase, W_phase;
  logic syn_DSP_i, run, fault;
  logic [2:0][5:0] PWM_NPC;
  logic syn_DSP, fault_latched;
  int checks = 0, failures = 0;

  gate_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Which path connects the leg output, from the six switch signals
  // {S6,S5,S4,S3,S2,S1}: S1+S2 -> P, S5+S2 -> mid-point via upper clamp,
  // S6+S3 -> mid-point via lower clamp, S3+S4 -> N.
  function automatic phase_t decode(input logic [5:0] g);
    if (g[0] && g[1]) return PH_P;
    if (g[4] && g[1]) return PH_OU;
    if (g[5] && g[2]) return PH_OL;
    return PH_N;
  endfunction

  initial begin
    phase_t ph [3];
    U_phase = PH_N; V_phase = PH_N; W_phase = PH_N;
    syn_DSP_i = 0; run = 0; fault = 0;
    repeat (2) @(negedge clk);
    check(PWM_NPC == 0 && !fault_latched, "reset: all gates off");
    rst_n = 1'b1;
    @(negedge clk);
    check(PWM_NPC == 0, "gates off while not running");
    run = 1;
    for (int c = 0; c < 64; c++) begin
      U_phase = phase_t'(c[1:0]); V_phase = phase_t'(c[3:2]); W_phase = phase_t'(c[5:4]);
      syn_DSP_i = c[0];
      @(negedge clk);
      ph = '{U_phase, V_phase, W_phase};
      for (int p = 0; p < 3; p++) begin
        check($countones(PWM_NPC[p]) == 2, "two switches on per leg");
        check(decode(PWM_NPC[p]) == ph[p], $sformatf("leg %0d state %s", p, ph[p].name()));
        // the outer switches never conduct together with the opposite clamp
        check(!(PWM_NPC[p][0] && PWM_NPC[p][3]), "S1 and S4 never both on");
      end
      check(syn_DSP == c[0], "syn_DSP passed through");
    end
    fault = 1;
    @(negedge clk);
    fault = 0;
    check(PWM_NPC == 0 && fault_latched, "fault turns all gates off");
    repeat (5) @(negedge clk);
    check(PWM_NPC == 0 && fault_latched, "fault stays latched");
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    @(negedge clk);
    check(PWM_NPC != 0 && !fault_latched, "reset clears the fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
