// svpwm_anpc_top: FPGA part of a three-level ANPC inverter controller - a
// space-vector PWM modulator with active dc-link voltage balancing and active
// loss balancing of the clamping switches.
//
// The microcontroller writes the reference vector (U_x, U_y), the dc-link
// capacitor condition and the load current directions into mlc_bus_if. The
// modulator chain follows the seven entities of the source design:
//   en_reg_2 -> transform -> svm_alg -> svm_maping (x3) -> time_table
//            -> timings_anpc -> gate_ctrl
// en_reg_2 samples the bus registers on the period-start pulse, the chain
// settles within four clocks and timings_anpc takes the new 14-interval table
// over at the next period start. A reference written before sync pulse n is
// therefore output during the period that starts with pulse n+1. The
// capacitor flag and current directions are read by time_table continuously
// and take effect at the next period start as well.
// Ports: a simple synchronous parallel bus (see mlc_bus_if), the 18 gate
// signals PWM_NPC[phase][switch], the sync pulse syn_DSP to the
// microcontroller and the fault input from the power stage.
// PERIOD_CYC is the PWM period in clock cycles; its default assumes a 50 MHz
// clock with the source design's 800 Hz switching frequency.
module svpwm_anpc_top
  import svm_pkg::*;
#(
  parameter int unsigned PERIOD_CYC = 62500
)(
  input  logic            clk,
  input  logic            rst_n,
  // parallel bus from the microcontroller
  input  logic            bus_cs,
  input  logic            bus_we,
  input  logic [1:0]      bus_addr,
  input  logic [U_W-1:0]  bus_wdata,
  output logic [U_W-1:0]  bus_rdata,
  // power stage
  input  logic            fault,
  output logic [2:0][5:0] PWM_NPC,
  output logic            syn_DSP
);

  localparam int unsigned T_W = $clog2(PERIOD_CYC + 1);

  logic signed [U_W-1:0] data_Ux, data_Uy, V_x_s, V_y_s;
  logic                  udc_c1_high;
  logic [2:0]            i_dir;
  logic signed [V_W-1:0] V_a, V_b, V_c;
  svec_t                 V1, V2, V3;
  logic [D_W-1:0]        d_v1, d_v2, d_v3;
  logic [IDX_W-1:0]      idx1, idx2, idx3;
  logic [T_W-1:0]        tt_time  [N_SLOTS];
  sw_state_t             tt_state [N_SLOTS];
  phase_t                U_phase, V_phase, W_phase;
  logic                  syn, run, fault_latched;

  mlc_bus_if u_bus (
    .clk, .rst_n,
    .cs(bus_cs), .we(bus_we), .addr(bus_addr), .wdata(bus_wdata), .rdata(bus_rdata),
    .fault_flag(fault_latched),
    .data_Ux, .data_Uy, .udc_c1_high, .i_dir
  );

  en_reg_2 u_en_reg_2 (
    .clk, .rst_n, .syn_SVM(syn),
    .V_x(data_Ux), .V_y(data_Uy), .V_x_s, .V_y_s
  );

  transform u_transform (
    .clk, .rst_n, .V_x(V_x_s), .V_y(V_y_s), .V_a, .V_b, .V_c
  );

  svm_alg u_svm_alg (
    .clk, .rst_n, .V_a, .V_b, .V_c, .V1, .V2, .V3, .d_v1, .d_v2, .d_v3
  );

  svm_maping u_map1 (.Vx_1(V1.ab), .Vx_2(V1.bc), .Vx_3(V1.ca), .switch_Vx_index(idx1));
  svm_maping u_map2 (.Vx_1(V2.ab), .Vx_2(V2.bc), .Vx_3(V2.ca), .switch_Vx_index(idx2));
  svm_maping u_map3 (.Vx_1(V3.ab), .Vx_2(V3.bc), .Vx_3(V3.ca), .switch_Vx_index(idx3));

  time_table #(.PERIOD_CYC(PERIOD_CYC)) u_time_table (
    .clk, .rst_n,
    .Udc(udc_c1_high), .i_u(i_dir[0]), .i_v(i_dir[1]), .i_w(i_dir[2]),
    .switch_V1_index(idx1), .switch_V2_index(idx2), .switch_V3_index(idx3),
    .d_v1, .d_v2, .d_v3,
    .time_o(tt_time), .state_o(tt_state)
  );

  timings_anpc #(.PERIOD_CYC(PERIOD_CYC)) u_timings (
    .clk, .rst_n, .time_i(tt_time), .state_i(tt_state),
    .U_phase, .V_phase, .W_phase, .syn, .run
  );

  gate_ctrl u_gate (
    .clk, .rst_n, .U_phase, .V_phase, .W_phase,
    .syn_DSP_i(syn), .run, .fault,
    .PWM_NPC, .syn_DSP, .fault_latched
  );

endmodule
