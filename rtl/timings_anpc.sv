// timings_anpc: plays the switching sequence over the PWM period and does the
// active clamping of the ANPC legs (the source design's timings_ANPC entity).
//
// A counter runs through PERIOD_CYC clocks. On the last clock of a period it
// raises syn (used as syn_SVM for en_reg_2 and as syn_DSP for the
// microcontroller) and, on the same edge, takes over the 14-interval table
// from time_table. During the period, interval j is active while the counter
// lies between the sum of the times before it and that sum plus its own time;
// intervals with time 0 are skipped. If rounding leaves the times a few cycles
// short of the period, the last non-empty interval is held to the end.
//
// Active clamping (as in the source design): a leg is only ever driven with two
// switches on. When a leg goes to level 0 from +1 the upper clamping path
// (S2, S5) conducts, and from -1 the lower path (S3, S6); a leg that stays at
// 0 keeps its path. A sequence that passes through zero combinations thus uses
// both clamping paths. Which path a leg uses before it has ever left level 0
// (lower) is this design's choice.
// Phase outputs are registered: they change one clock after the counter
// reaches an interval boundary. run goes high with the first table taken over.
module timings_anpc
  import svm_pkg::*;
#(
  parameter int unsigned PERIOD_CYC = 62500,   // 50 MHz clock / 800 Hz PWM
  localparam int unsigned T_W = $clog2(PERIOD_CYC + 1)
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [T_W-1:0]  time_i  [N_SLOTS],
  input  sw_state_t       state_i [N_SLOTS],
  output phase_t          U_phase,
  output phase_t          V_phase,
  output phase_t          W_phase,
  output logic            syn,
  output logic            run
);

  localparam int unsigned C_W = T_W + 4;

  logic [T_W-1:0] cnt;
  logic [T_W-1:0] tab_t [N_SLOTS];
  sw_state_t      tab_s [N_SLOTS];
  logic [C_W-1:0] bnd   [N_SLOTS];
  sw_state_t      cur;
  level_t         lvl_q [3];
  logic           up_q  [3];
  level_t         lvl_n [3];
  logic           up_n  [3];

  assign syn = (cnt == T_W'(PERIOD_CYC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      run <= 1'b0;
      for (int j = 0; j < int'(N_SLOTS); j++) begin
        tab_t[j] <= '0;
        tab_s[j] <= '0;
      end
    end else if (syn) begin
      cnt   <= '0;
      run   <= 1'b1;
      tab_t <= time_i;
      tab_s <= state_i;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  // Interval selection
  always_comb begin
    logic found;
    bnd[0] = C_W'(tab_t[0]);
    for (int j = 1; j < int'(N_SLOTS); j++)
      bnd[j] = bnd[j-1] + C_W'(tab_t[j]);
    cur   = '0;
    found = 1'b0;
    for (int j = 0; j < int'(N_SLOTS); j++) begin
      if (tab_t[j] != '0) begin
        if (!found)
          cur = tab_s[j];
        if (C_W'(cnt) < bnd[j])
          found = 1'b1;
      end
    end
  end

  // Clamping path of each leg
  always_comb begin
    lvl_n[0] = cur.u;
    lvl_n[1] = cur.v;
    lvl_n[2] = cur.w;
    for (int p = 0; p < 3; p++) begin
      if (lvl_n[p] == 0) begin
        if (lvl_q[p] > 0)
          up_n[p] = 1'b1;
        else if (lvl_q[p] < 0)
          up_n[p] = 1'b0;
        else
          up_n[p] = up_q[p];
      end else begin
        up_n[p] = up_q[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 3; p++) begin
        lvl_q[p] <= '0;
        up_q[p]  <= 1'b0;
      end
      U_phase <= PH_OL;
      V_phase <= PH_OL;
      W_phase <= PH_OL;
    end else if (run) begin
      lvl_q   <= lvl_n;
      up_q    <= up_n;
      U_phase <= level_to_phase(lvl_n[0], up_n[0]);
      V_phase <= level_to_phase(lvl_n[1], up_n[1]);
      W_phase <= level_to_phase(lvl_n[2], up_n[2]);
    end
  end

endmodule
