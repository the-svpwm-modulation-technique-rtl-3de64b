// tb_transform: self-checking test of the alpha-beta to line-to-line
// transform. Random references are compared with the transform worked out in
// real arithmetic (tolerance 3 LSB of 2^-14), and the three outputs must sum
// to exactly zero. Also checks the six small-vector points of the hexagon.
module tb_transform;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [U_W-1:0] V_x, V_y;
  logic signed [V_W-1:0] V_a, V_b, V_c;
  int checks = 0, failures = 0;

  transform dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_check(input real ux, input real uy);
    real eab, ebc, eca, sc;
    sc = real'(1 << V_FRAC);
    @(negedge clk);
    V_x = U_W'($rtoi(ux * sc));
    V_y = U_W'($rtoi(uy * sc));
    ux = real'(V_x) / sc;
    uy = real'(V_y) / sc;
    eab = 1.5 * ux - 0.8660254037844386 * uy;
    ebc = 1.7320508075688772 * uy;
    eca = -eab - ebc;
    @(negedge clk);
    checks++;
    if ((real'(V_a) / sc - eab) > 3.0 / sc || (eab - real'(V_a) / sc) > 3.0 / sc ||
        (real'(V_b) / sc - ebc) > 3.0 / sc || (ebc - real'(V_b) / sc) > 3.0 / sc ||
        (real'(V_c) / sc - eca) > 3.0 / sc || (eca - real'(V_c) / sc) > 3.0 / sc) begin
      failures++;
      $display("FAIL ux=%f uy=%f: got %f %f %f expected %f %f %f", ux, uy,
               real'(V_a) / sc, real'(V_b) / sc, real'(V_c) / sc, eab, ebc, eca);
    end
    checks++;
    if (V_a + V_b + V_c != 0) begin
      failures++;
      $display("FAIL: outputs do not sum to zero");
    end
  endtask

  initial begin
    V_x = 0; V_y = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // small-vector points: state 100 lies at U = 2/3 on the alpha axis
    for (int k = 0; k < 6; k++)
      apply_check(2.0 / 3.0 * $cos(k * 3.14159265358979 / 3.0),
                  2.0 / 3.0 * $sin(k * 3.14159265358979 / 3.0));
    for (int n = 0; n < 2000; n++)
      apply_check(($urandom % 40000) / 10000.0 - 2.0, ($urandom % 40000) / 10000.0 - 2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
