// tb_timings_anpc: self-checking test of the sequence timing and the active
// clamping. Random 14-interval tables (random times, some empty, adding up
// to at most the period, random leg levels) are presented and changed at
// random moments; the block must take a table over only at the period
// start. A reference model in this test follows the period counter and
// gives, cycle by cycle, the interval that must be active and the clamping
// path: a leg at level 0 uses the upper path if its last non-zero level was
// +1 and the lower path if it was -1. The period of syn is checked as well.
module tb_timings_anpc;
  import svm_pkg::*;

  localparam int unsigned P   = 300;
  localparam int unsigned T_W = $clog2(P + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [T_W-1:0] time_i [N_SLOTS];
  sw_state_t state_i [N_SLOTS];
  phase_t U_phase, V_phase, W_phase;
  logic syn, run;
  int checks = 0, failures = 0;
  int n_upper = 0, n_lower = 0, n_syn = 0, n_hold = 0;

  timings_anpc #(.PERIOD_CYC(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200 * P) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  int m_cnt = 0;
  bit m_run = 0;
  int m_t [14];
  int m_s [14][3];
  int last_nz [3] = '{-1, -1, -1};
  phase_t exp_ph [3];
  bit exp_valid = 0;
  int syn_gap = 0;

  function automatic phase_t ph_of(input int lvl, input int lnz);
    if (lvl > 0) return PH_P;
    if (lvl < 0) return PH_N;
    return (lnz > 0) ? PH_OU : PH_OL;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (m_run) begin
        int sel;
        // sel is the interval containing m_cnt, or the last non-empty one
        begin
          int a2, s2;
          a2 = 0; s2 = -1;
          for (int j = 0; j < 14; j++)
            if (m_t[j] > 0) begin
              if (s2 < 0 && m_cnt < a2 + m_t[j]) s2 = j;
              a2 += m_t[j];
            end
          if (s2 < 0) begin
            n_hold++;
            for (int j = 0; j < 14; j++) if (m_t[j] > 0) s2 = j;
          end
          sel = s2;
        end
        for (int p = 0; p < 3; p++) begin
          int lvl;
          lvl = (sel < 0) ? 0 : m_s[sel][p];
          if (lvl != 0) last_nz[p] = lvl;
          exp_ph[p] = ph_of(lvl, last_nz[p]);
        end
        exp_valid = 1;
      end
      checks++;
      if (syn !== (m_cnt == int'(P) - 1)) begin
        failures++;
        $display("FAIL: syn at count %0d", m_cnt);
      end
      if (m_cnt == int'(P) - 1) begin
        m_cnt = 0;
        m_run = 1;
        n_syn++;
        for (int j = 0; j < 14; j++) begin
          m_t[j] = int'(time_i[j]);
          m_s[j] = '{int'(state_i[j].u), int'(state_i[j].v), int'(state_i[j].w)};
        end
      end else m_cnt++;
    end
  end

  always @(negedge clk) begin
    if (rst_n && exp_valid) begin
      checks++;
      if (U_phase != exp_ph[0] || V_phase != exp_ph[1] || W_phase != exp_ph[2] || !run) begin
        failures++;
        $display("FAIL at count %0d: got %s %s %s expected %s %s %s", m_cnt,
                 U_phase.name(), V_phase.name(), W_phase.name(),
                 exp_ph[0].name(), exp_ph[1].name(), exp_ph[2].name());
      end
      if (U_phase == PH_OU) n_upper++;
      if (U_phase == PH_OL) n_lower++;
    end
  end

  task automatic new_table();
    int budget;
    budget = int'(P) - int'($urandom % 8);
    for (int j = 0; j < 14; j++) begin
      int t;
      t = ($urandom % 3 == 0) ? 0 : int'($urandom % (2 * P / 14));
      if (t > budget) t = budget;
      budget -= t;
      time_i[j]  = T_W'(t);
      state_i[j] = '{level_t'(int'($urandom % 3) - 1), level_t'(int'($urandom % 3) - 1),
                     level_t'(int'($urandom % 3) - 1)};
    end
  endtask

  initial begin
    new_table();
    repeat (3) @(negedge clk);
    checks++;
    if (run) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 120; n++) begin
      repeat (1 + $urandom % (P + P / 2)) @(negedge clk);
      new_table();
    end
    checks++;
    if (!(n_upper > 0 && n_lower > 0 && n_hold > 0 && n_syn > 50)) begin
      failures++;
      $display("FAIL: coverage upper=%0d lower=%0d hold=%0d syn=%0d", n_upper, n_lower, n_hold, n_syn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
