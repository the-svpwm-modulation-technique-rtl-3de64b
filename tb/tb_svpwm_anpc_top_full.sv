// tb_svpwm_anpc_top_full: end-to-end test of the modulator with every
// parameter at its default (PWM period of 62500 clocks, 800 Hz at a 50 MHz
// clock). The checks are those of anpc_e2e_checker (gate patterns,
// volt-second balance, clamping rule, sync spacing, balancing direction,
// fault shut-down), over 3 angles x 5 magnitudes x 2 capacitor conditions.
module tb_svpwm_anpc_top_full;
  import svm_pkg::*;

  localparam int unsigned P = 62500;

  logic clk = 1'b0;
  logic rst_n, bus_cs, bus_we, fault, syn_DSP, done;
  logic [1:0] bus_addr;
  logic [U_W-1:0] bus_wdata, bus_rdata;
  logic [2:0][5:0] PWM_NPC;
  int checks, failures;

  svpwm_anpc_top dut (.*);
  anpc_e2e_checker #(.PERIOD_CYC(P), .N_ANGLES(3)) chk (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200 * P) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
