// tb_workload_rl_load: closed-loop run of the modulator, at its default
// parameters, on a behavioural model of the three-level ANPC power stage
// feeding an RL load: V_dc = 700 V, R = 0.245 ohm, L = 1.1 mH, 800 Hz PWM,
// modulation index 0.95 (these are the source design's simulation values).
// The output frequency (50 Hz), the dc-link capacitors (4.7 mF each), the
// 50 MHz clock and the definition of the modulation index (fraction of the
// linear-range radius 2/sqrt(3) level steps) are this test's assumptions.
//
// The test plays the microcontroller: at every sync pulse it writes the next
// reference of a rotating vector, the load current directions and the
// capacitor flag (U_C1 > U_d/2) from the model. The model integrates, every
// clock, the load currents (star load, isolated neutral) and the mid-point
// voltage (ideal source across C1 + C2, mid-point current of the legs that
// sit at level 0). The capacitors start 40 V apart.
// Checks: the fundamental of the phase current matches |U|/|Z| within 8 %;
// the three fundamentals are balanced; with the true capacitor flag the
// mid-point error shrinks, and it ends well below a second run in which the
// flag given to the modulator is inverted; the upper and the lower clamping
// paths carry comparable charge (within a factor of two), which is what
// spreads the losses over the clamping switches.
module tb_workload_rl_load;
  import svm_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam real F_CLK = 50.0e6;
  localparam real DT    = 1.0 / F_CLK;
  localparam real VDC   = 700.0;
  localparam real R     = 0.245;
  localparam real L     = 1.1e-3;
  localparam real C     = 4.7e-3;
  localparam real F_OUT = 50.0;
  localparam real M_IDX = 0.95;
  localparam int  N_PER = 16;        // PWM periods per fundamental (800/50)
  localparam int  N_FUND = 3;

  logic clk = 1'b0;
  logic rst_n, bus_cs, bus_we, fault, syn_DSP;
  logic [1:0] bus_addr;
  logic [U_W-1:0] bus_wdata, bus_rdata;
  logic [2:0][5:0] PWM_NPC;
  int checks = 0, failures = 0;

  svpwm_anpc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(64'd2 * N_FUND * N_PER * 64'd70000 * 64'd10);
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

  // plant state
  real i_ph [3];
  real u_c1;
  real t_now;
  bit  model_on = 0;
  real q_up, q_lo;   // |i| dt through the upper and the lower clamping paths

  always @(posedge clk) begin
    if (model_on) begin
      real v [3], vn, i0;
      bit off;
      off = 0;
      i0 = 0.0;
      for (int p = 0; p < 3; p++) begin
        unique case (PWM_NPC[p])
          6'b00_0011: v[p] = u_c1;
          6'b01_0010: begin v[p] = 0.0; i0 += i_ph[p]; q_up += DT * (i_ph[p] < 0.0 ? -i_ph[p] : i_ph[p]); end
          6'b10_0100: begin v[p] = 0.0; i0 += i_ph[p]; q_lo += DT * (i_ph[p] < 0.0 ? -i_ph[p] : i_ph[p]); end
          6'b00_1100: v[p] = -(VDC - u_c1);
          default: begin v[p] = 0.0; off = 1; end
        endcase
      end
      if (!off) begin
        vn = (v[0] + v[1] + v[2]) / 3.0;
        for (int p = 0; p < 3; p++)
          i_ph[p] += DT * (v[p] - vn - R * i_ph[p]) / L;
        u_c1 += DT * i0 / (2.0 * C);
      end
      t_now += DT;
    end
  end

  task automatic bus_write(input logic [1:0] a, input logic [U_W-1:0] d);
    @(negedge clk);
    bus_cs = 1; bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_cs = 0; bus_we = 0;
  endtask

  // One closed-loop run; returns the fundamental amplitude of each phase
  // current over the last fundamental, and the mid-point error
  // (U_C1 - U_d/2) averaged over the first and the last fundamental.
  task automatic run(input bit invert_flag, output real amp [3], output real err_first,
                     output real err_last);
    real re [3], im [3], mag, th;
    int  n_first, n_last;
    rst_n = 0; bus_cs = 0; bus_we = 0; bus_addr = 0; bus_wdata = 0; fault = 0;
    for (int p = 0; p < 3; p++) begin
      i_ph[p] = 0.0; re[p] = 0.0; im[p] = 0.0;
    end
    u_c1 = VDC / 2.0 + 40.0;
    q_up = 0.0; q_lo = 0.0;
    t_now = 0.0;
    err_first = 0.0; err_last = 0.0; n_first = 0; n_last = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    model_on = 1;
    mag = M_IDX * 2.0 / $sqrt(3.0);
    for (int k = 0; k < N_FUND * N_PER + 2; k++) begin
      // reference for the period after next (one period of latency)
      th = 2.0 * PI * F_OUT * (t_now + 1.5 / (F_OUT * N_PER));
      bus_write(2'd0, U_W'($rtoi(mag * $cos(th) * real'(1 << V_FRAC))));
      bus_write(2'd1, U_W'($rtoi(mag * $sin(th) * real'(1 << V_FRAC))));
      bus_write(2'd2, {12'h0, i_ph[2] > 0.0, i_ph[1] > 0.0, i_ph[0] > 0.0,
                       (u_c1 > VDC / 2.0) ^ invert_flag});
      // wait for the next sync pulse while sampling
      do begin
        @(negedge clk);
        if (k >= 2 && k < 2 + N_PER) begin
          err_first += u_c1 - VDC / 2.0; n_first++;
        end
        if (k >= 2 + (N_FUND - 1) * N_PER) begin
          err_last += u_c1 - VDC / 2.0; n_last++;
          for (int p = 0; p < 3; p++) begin
            re[p] += i_ph[p] * $cos(2.0 * PI * F_OUT * t_now);
            im[p] += i_ph[p] * $sin(2.0 * PI * F_OUT * t_now);
          end
        end
      end while (!syn_DSP);
    end
    model_on = 0;
    for (int p = 0; p < 3; p++)
      amp[p] = 2.0 * $sqrt(re[p] * re[p] + im[p] * im[p]) / real'(n_last);
    err_first /= real'(n_first);
    err_last /= real'(n_last);
  endtask

  initial begin
    real amp [3], amp_x [3], e1, e2, e1x, e2x, z, i_exp;
    z = $sqrt(R * R + (2.0 * PI * F_OUT * L) * (2.0 * PI * F_OUT * L));
    i_exp = M_IDX * 2.0 / $sqrt(3.0) * (VDC / 2.0) / z;
    run(1'b0, amp, e1, e2);
    $display("true flag:     |I1| = %0.1f %0.1f %0.1f A (expected %0.1f), mid-point error %0.2f V -> %0.2f V",
             amp[0], amp[1], amp[2], i_exp, e1, e2);
    for (int p = 0; p < 3; p++)
      check(amp[p] > 0.92 * i_exp && amp[p] < 1.08 * i_exp, $sformatf("fundamental of phase %0d", p));
    check(e2 < 0.5 * e1 && e2 > -0.5 * e1, "mid-point error shrinks with balancing");
    $display("clamping paths: upper %0.3f As, lower %0.3f As", q_up, q_lo);
    check(q_up > 0.5 * q_lo && q_lo > 0.5 * q_up, "both clamping paths carry comparable current");
    run(1'b1, amp_x, e1x, e2x);
    $display("inverted flag: |I1| = %0.1f %0.1f %0.1f A, mid-point error %0.2f V -> %0.2f V",
             amp_x[0], amp_x[1], amp_x[2], e1x, e2x);
    check(e2x > e2 + 5.0, "inverted flag leaves a larger mid-point error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
