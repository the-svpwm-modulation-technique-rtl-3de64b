// tb_en_reg_2: self-checking test of the synchronous input register.
// Random (U_x, U_y) pairs are presented every cycle; the outputs must change
// only on a clock edge with syn_SVM high, and then to the pair present at
// that edge.
module tb_en_reg_2;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic syn_SVM;
  logic signed [U_W-1:0] V_x, V_y, V_x_s, V_y_s;
  logic signed [U_W-1:0] ex, ey;
  int checks = 0, failures = 0, loads = 0;

  en_reg_2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syn_SVM = 0; V_x = 16'sd1234; V_y = -16'sd99;
    ex = 0; ey = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (V_x_s != 0 || V_y_s != 0) failures++;
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      V_x = U_W'($urandom);
      V_y = U_W'($urandom);
      syn_SVM = ($urandom % 7) == 0;
      if (syn_SVM) begin
        ex = V_x; ey = V_y; loads++;
      end
      @(posedge clk); #1;
      checks++;
      if (V_x_s !== ex || V_y_s !== ey) begin
        failures++;
        $display("FAIL cycle %0d: got %0d %0d expected %0d %0d", n, V_x_s, V_y_s, ex, ey);
      end
    end
    checks++;
    if (loads < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
