// time_table: builds the switching sequence of one PWM period.
//
// Inputs are the switching indexes and duty cycles of the three nearest
// vectors, the dc-link condition flag Udc (1 = U_C1 above U_d/2) and the
// direction bits of the three load currents (1 = current flows from the leg
// into the load). Outputs are the 14 intervals time01..time14 (clock cycles)
// and the real switching combination state01..state14 applied in each.
//
// As in the source design, the sequence steps through every real switching
// combination of the three vectors, one phase changing by one level at a time:
// ordered by the sum of the three phase levels, -3..+3 in the first half
// (intervals 1-7) and +3..-3 in the mirrored second half (intervals 8-14).
// The three vectors of a triangle fall in different classes of that sum
// modulo 3, so every sum value belongs to at most one vector; an interval
// whose sum no real combination of the triangle has gets time 0.
// Time split of a vector with duty d over the period T (per half period):
//   zero vector, three combinations : d*T/6 each
//   small vector, two combinations  : d*T/3 for the one that balances the
//                                     capacitors, d*T/6 for the other
//                                     (2/3 and 1/3 of the vector's time)
//   medium and large vectors        : d*T/2
// A small vector's combination balances when its mid-point current pulls the
// mid-point toward the low capacitor. The upper combination (levels 0 and +1)
// draws i_0 = -i_x from the mid-point when phase x alone is at +1, and
// i_0 = i_y when phase y alone is at 0; the lower one draws the opposite.
// i_0 > 0 discharges C2 and charges C1, so with U_C1 high the combination with
// i_0 < 0 is chosen, otherwise the one with i_0 > 0. (The circuit analysis is
// this design's; the source design states only the 2/3 / 1/3 rule.)
// Times are rounded to the nearest cycle, so the 14 times add up to
// PERIOD_CYC within a few cycles. Outputs are registered: one clock latency.
module time_table
  import svm_pkg::*;
#(
  parameter int unsigned PERIOD_CYC = 62500,   // 50 MHz clock / 800 Hz PWM
  localparam int unsigned T_W = $clog2(PERIOD_CYC + 1)
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 Udc,
  input  logic                 i_u,
  input  logic                 i_v,
  input  logic                 i_w,
  input  logic [IDX_W-1:0]     switch_V1_index,
  input  logic [IDX_W-1:0]     switch_V2_index,
  input  logic [IDX_W-1:0]     switch_V3_index,
  input  logic [D_W-1:0]       d_v1,
  input  logic [D_W-1:0]       d_v2,
  input  logic [D_W-1:0]       d_v3,
  output logic [T_W-1:0]       time_o  [N_SLOTS],   // time01..time14
  output sw_state_t            state_o [N_SLOTS]    // state01..state14
);

  localparam longint unsigned DEN = 6 * (longint'(1) << D_FRAC);

  logic [IDX_W-1:0] idx [3];
  logic [D_W-1:0]   dty [3];
  logic [T_W-1:0]   t_n [N_SLOTS];
  sw_state_t        s_n [N_SLOTS];

  assign idx = '{switch_V1_index, switch_V2_index, switch_V3_index};
  assign dty = '{d_v1, d_v2, d_v3};

  // Does the upper combination of small vector s draw a positive mid-point
  // current?
  function automatic logic upper_i0_pos(input sw_state_t up, input logic [2:0] idir);
    logic [2:0] at_p;
    at_p = {up.w > 0, up.v > 0, up.u > 0};
    if (at_p == 3'b001 || at_p == 3'b010 || at_p == 3'b100)
      return ~|(at_p & idir);          // i_0 = -i_x
    else
      return |(~at_p & idir);          // i_0 = +i_y
  endfunction

  function automatic logic [T_W-1:0] slot_time(input logic [D_W-1:0] d, input int unsigned m);
    longint unsigned p;
    p = longint'(d) * longint'(PERIOD_CYC) * longint'(m);
    return T_W'((p + DEN / 2) / DEN);
  endfunction

  always_comb begin
    int        s, lo, hi, m;
    svec_t     vk;
    sw_state_t st;
    logic      up_bal, is_up;
    s = 0; lo = 0; hi = 0; m = 0;
    vk = '0; st = '0; up_bal = 1'b0; is_up = 1'b0;
    for (int j = 0; j < int'(N_SLOTS); j++) begin
      t_n[j] = '0;
      s_n[j] = '0;
    end
    for (int h = 0; h < 7; h++) begin
      s = h - 3;
      for (int k = 0; k < 3; k++) begin
        if (idx[k] < IDX_W'(N_VEC)) begin
          vk = SVEC_ROW[idx[k]];
          lo = w_min(vk);
          hi = w_max(vk);
          for (int w = -1; w <= 1; w++) begin
            if (w >= lo && w <= hi && 3 * w + 2 * int'(vk.bc) + int'(vk.ab) == s) begin
              st = make_state(vk, w);
              if (hi - lo == 2)
                m = 1;
              else if (hi == lo)
                m = 3;
              else begin
                up_bal = Udc ? ~upper_i0_pos(make_state(vk, hi), {i_w, i_v, i_u})
                             :  upper_i0_pos(make_state(vk, hi), {i_w, i_v, i_u});
                is_up  = (w == hi);
                m = (is_up == up_bal) ? 2 : 1;
              end
              t_n[h]      = slot_time(dty[k], m);
              s_n[h]      = st;
              t_n[13 - h] = slot_time(dty[k], m);
              s_n[13 - h] = st;
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(N_SLOTS); j++) begin
        time_o[j]  <= '0;
        state_o[j] <= '0;
      end
    end else begin
      time_o  <= t_n;
      state_o <= s_n;
    end
  end

endmodule
