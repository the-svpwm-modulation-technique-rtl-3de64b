// en_reg_2: synchronous input register for the reference vector (U_x, U_y).
//
// The source design names it the synchronous input register for the values sent by the
// microcontroller and shows a syn_SVM input. Here the pair is copied to the
// outputs V_x_s, V_y_s on the clock edge where syn_SVM is high, so both
// components always come from the same write cycle of the microcontroller and
// stay constant for a whole PWM period. syn_SVM is the one-cycle period-start
// pulse of the modulator (this design's reading of the figure). Reset clears
// both outputs to the zero vector. Latency: one clock after syn_SVM.
module en_reg_2
  import svm_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  syn_SVM,
  input  logic signed [U_W-1:0] V_x,
  input  logic signed [U_W-1:0] V_y,
  output logic signed [U_W-1:0] V_x_s,
  output logic signed [U_W-1:0] V_y_s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      V_x_s <= '0;
      V_y_s <= '0;
    end else if (syn_SVM) begin
      V_x_s <= V_x;
      V_y_s <= V_y;
    end
  end

endmodule
