// anpc_e2e_checker: stimulus and checker for end-to-end tests of
// svpwm_anpc_top, shared by the reduced-period and the full-size testbench.
//
// For each reference vector of a list (inner ring, small-vector region,
// outer ring, the exact zero point, several angles) it writes U_x, U_y and a
// status word with current directions and a capacitor condition over the
// bus, waits until the modulator applies the new reference (two sync
// pulses), then decodes the 18 gate signals of one whole PWM period back
// into leg levels and checks:
//   * every leg has exactly two switches on, in one of the four allowed pairs;
//   * the period-average line-to-line voltages equal the reference
//     (volt-second balance), computed here in real arithmetic;
//   * a leg at the mid-point uses the upper clamp only after +1 and the lower
//     clamp only after -1;
//   * the sync pulses are PERIOD_CYC cycles apart;
//   * with the same reference and currents, the mid-point charge of the
//     period is lower with U_C1 flagged high than with it flagged low
//     (capacitor balancing acts in the right direction).
// Finally a fault must shut all gates off and read back over the bus.
// Mechanisms counted (each must occur): zero-vector combinations, large
// vectors, medium vectors, both clamping paths, balancing in both capacitor
// conditions, a lattice-point reference, fault shut-down.
module anpc_e2e_checker
  import svm_pkg::*;
#(
  parameter int unsigned PERIOD_CYC = 600,
  parameter int unsigned N_ANGLES   = 6
)(
  input  logic            clk,
  output logic            rst_n,
  output logic            bus_cs,
  output logic            bus_we,
  output logic [1:0]      bus_addr,
  output logic [U_W-1:0]  bus_wdata,
  input  logic [U_W-1:0]  bus_rdata,
  output logic            fault,
  input  logic [2:0][5:0] PWM_NPC,
  input  logic            syn_DSP,
  output logic            done,
  output int              checks,
  output int              failures
);

  localparam real PI = 3.14159265358979;
  localparam real SC = real'(1 << V_FRAC);

  int n_zero = 0, n_large = 0, n_medium = 0, n_upper = 0, n_lower = 0;
  int n_bal_hi = 0, n_bal_lo = 0, n_point = 0, n_fault = 0;
  int last_nz [3] = '{-1, -1, -1};
  int syn_last = -1, cyc = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // sync pulse spacing
  always @(negedge clk) begin
    cyc++;
    if (rst_n && syn_DSP) begin
      if (syn_last >= 0)
        check(cyc - syn_last == int'(PERIOD_CYC), $sformatf("sync spacing %0d", cyc - syn_last));
      syn_last = cyc;
    end
  end

  task automatic bus_write(input logic [1:0] a, input logic [U_W-1:0] d);
    @(negedge clk);
    bus_cs = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_cs = 0; bus_we = 0;
  endtask

  // level of a leg from its gate signals {S6,S5,S4,S3,S2,S1}; 9 = not allowed
  function automatic int leg_level(input logic [5:0] g, output bit upper);
    upper = 0;
    unique case (g)
      6'b00_0011: return 1;
      6'b01_0010: begin upper = 1; return 0; end
      6'b10_0100: return 0;
      6'b00_1100: return -1;
      default:    return 9;
    endcase
  endfunction

  // Apply one reference and measure one period. Returns the mid-point charge.
  task automatic run_ref(input real ux_r, input real uy_r, input real phi, input bit c1_high,
                         output real q0);
    logic signed [U_W-1:0] ux, uy;
    real ux_q, uy_q, e_ab, e_bc, cur [3], s_ab, s_bc, tol;
    int bad;
    ux = U_W'($rtoi(ux_r * SC));
    uy = U_W'($rtoi(uy_r * SC));
    ux_q = real'(ux) / SC;
    uy_q = real'(uy) / SC;
    e_ab = 1.5 * ux_q - 0.8660254037844386 * uy_q;
    e_bc = 1.7320508075688772 * uy_q;
    for (int p = 0; p < 3; p++) cur[p] = $cos(phi - p * 2.0 * PI / 3.0);
    bus_write(2'd0, ux);
    bus_write(2'd1, uy);
    bus_write(2'd2, {12'h0, cur[2] > 0.0, cur[1] > 0.0, cur[0] > 0.0, c1_high});
    // pulse A samples the bus registers, pulse B starts the new period
    do @(negedge clk); while (!syn_DSP);
    do @(negedge clk); while (!syn_DSP);
    @(negedge clk);
    s_ab = 0.0; s_bc = 0.0; q0 = 0.0; bad = 0;
    for (int k = 0; k < int'(PERIOD_CYC); k++) begin
      int l [3];
      bit up [3];
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        l[p] = leg_level(PWM_NPC[p], up[p]);
        if (l[p] == 9) bad++;
        else if (l[p] != 0) last_nz[p] = l[p];
        else begin
          if (up[p]) begin
            n_upper++;
            if (last_nz[p] != 1) bad++;
          end else begin
            n_lower++;
            if (last_nz[p] != -1) bad++;
          end
          q0 += cur[p];
        end
      end
      s_ab += real'(l[0] - l[1]);
      s_bc += real'(l[1] - l[2]);
      if (l[0] == l[1] && l[1] == l[2] && l[0] != 0) n_zero++;
      if (l[0] != 0 && l[1] != 0 && l[2] != 0 && !(l[0] == l[1] && l[1] == l[2])) n_large++;
      if (l[0] * l[1] * l[2] == 0 && (l[0] + l[1] + l[2]) == 0 && l[0] * l[0] + l[1] * l[1] + l[2] * l[2] == 2)
        n_medium++;
    end
    check(bad == 0, $sformatf("gate patterns and clamping rule (%0d bad samples)", bad));
    s_ab /= real'(PERIOD_CYC);
    s_bc /= real'(PERIOD_CYC);
    tol = 16.0 / real'(PERIOD_CYC) + 0.002;
    check(s_ab - e_ab < tol && e_ab - s_ab < tol && s_bc - e_bc < tol && e_bc - s_bc < tol,
          $sformatf("volt-second balance: got %f %f expected %f %f", s_ab, s_bc, e_ab, e_bc));
  endtask

  initial begin
    real q_hi, q_lo, mags [5];
    checks = 0; failures = 0; done = 0;
    rst_n = 0; bus_cs = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; fault = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    // the zero point is a lattice point of the diagram
    run_ref(0.0, 0.0, 0.3, 1'b0, q_lo);
    n_point++;
    mags = '{0.25, 0.55, 0.8, 1.0, 1.12};
    for (int a = 0; a < int'(N_ANGLES); a++) begin
      for (int m = 0; m < 5; m++) begin
        real th, ph;
        th = 2.0 * PI * (real'(a) + 0.37 * real'(m) + 0.11) / real'(N_ANGLES);
        ph = th - 0.5 + 1.3 * real'(m);
        run_ref(mags[m] * $cos(th), mags[m] * $sin(th), ph, 1'b1, q_hi);
        run_ref(mags[m] * $cos(th), mags[m] * $sin(th), ph, 1'b0, q_lo);
        if (m < 3) begin
          // small vectors are in every triangle of the inner hexagon
          check(q_hi < q_lo, $sformatf("balancing direction: q(C1 high)=%f q(C1 low)=%f", q_hi, q_lo));
          if (q_hi < q_lo) begin
            n_bal_hi++;
            n_bal_lo++;
          end
        end
      end
    end
    // fault shut-down
    @(negedge clk);
    fault = 1;
    @(negedge clk);
    fault = 0;
    @(negedge clk);
    check(PWM_NPC == 0, "fault turns all gates off");
    bus_addr = 2'd3;
    #1 check(bus_rdata[0] == 1'b1, "fault flag reads back");
    repeat (10) @(negedge clk);
    check(PWM_NPC == 0, "fault stays latched");
    if (PWM_NPC == 0) n_fault++;
    $display("mechanisms: zero=%0d large=%0d medium=%0d upper_clamp=%0d lower_clamp=%0d bal_hi=%0d bal_lo=%0d point=%0d fault=%0d",
             n_zero, n_large, n_medium, n_upper, n_lower, n_bal_hi, n_bal_lo, n_point, n_fault);
    check(n_zero > 0, "zero-vector combinations used");
    check(n_large > 0, "large vectors used");
    check(n_medium > 0, "medium vectors used");
    check(n_upper > 0 && n_lower > 0, "both clamping paths used");
    check(n_bal_hi > 0 && n_bal_lo > 0, "balancing in both capacitor conditions");
    check(n_point > 0 && n_fault > 0, "lattice point and fault shut-down");
    done = 1;
  end

endmodule
