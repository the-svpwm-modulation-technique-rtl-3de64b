// tb_svm_alg: self-checking test of the simplified SVM algorithm.
// Random zero-sum line-to-line references (and exact lattice points) inside
// the outer hexagon are applied. For each, the test checks that the three vectors are distinct
// lattice points (zero coordinate sum), that every coordinate is the floor
// or the ceiling of the reference (floors taken with real arithmetic), that
// the duty cycles lie in 0..1 and add to exactly 1, that the weighted sum of
// the vectors reproduces the reference exactly, and the vector order and
// duty formulas of the triangle-selection table for both triangle shapes.
module tb_svm_alg;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [V_W-1:0] V_a, V_b, V_c;
  svec_t V1, V2, V3;
  logic [D_W-1:0] d_v1, d_v2, d_v3;
  int checks = 0, failures = 0, n_up = 0, n_down = 0, n_pts = 0;

  svm_alg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (V=%0d %0d %0d)", what, V_a, V_b, V_c);
    end
  endtask

  function automatic int flr(input int v);
    return int'($floor(real'(v) / real'(1 << V_FRAC)));
  endfunction

  task automatic apply(input int ab, input int bc);
    int fa, fb, fc, sum_d, fsum;
    longint ra, rb, rc;
    svec_t vv [3];
    int dd [3];
    @(negedge clk);
    V_a = V_W'(ab); V_b = V_W'(bc); V_c = V_W'(-ab - bc);
    @(negedge clk);
    vv = '{V1, V2, V3};
    dd = '{int'(d_v1), int'(d_v2), int'(d_v3)};
    fa = flr(ab); fb = flr(bc); fc = flr(-ab - bc);
    fsum = fa + fb + fc;
    sum_d = dd[0] + dd[1] + dd[2];
    check(sum_d == int'(D_ONE), "duties add to one");
    ra = 0; rb = 0; rc = 0;
    for (int k = 0; k < 3; k++) begin
      check(int'(vv[k].ab) + int'(vv[k].bc) + int'(vv[k].ca) == 0, "lattice point");
      check(dd[k] >= 0 && dd[k] <= int'(D_ONE), "duty range");
      ra += longint'(dd[k]) * int'(vv[k].ab);
      rb += longint'(dd[k]) * int'(vv[k].bc);
      rc += longint'(dd[k]) * int'(vv[k].ca);
      if (fsum != 0)
        check((vv[k].ab == fa || vv[k].ab == fa + 1) && (vv[k].bc == fb || vv[k].bc == fb + 1) &&
              (vv[k].ca == fc || vv[k].ca == fc + 1), "floor/ceil coordinates");
    end
    check(vv[0] != vv[1] && vv[1] != vv[2] && vv[0] != vv[2], "distinct vectors");
    // duty scale is 2^15, reference scale 2^14
    check(ra == 2 * longint'(ab) && rb == 2 * longint'(bc) && rc == 2 * longint'(-ab - bc),
          "weighted sum reproduces the reference");
    if (fsum == -1) begin
      n_up++;
      check(vv[0] == '{coord_t'(fa), coord_t'(fb), coord_t'(fc + 1)} &&
            vv[1] == '{coord_t'(fa + 1), coord_t'(fb), coord_t'(fc)} &&
            vv[2] == '{coord_t'(fa), coord_t'(fb + 1), coord_t'(fc)}, "table order, sum -1");
    end else if (fsum == -2) begin
      n_down++;
      check(vv[0] == '{coord_t'(fa), coord_t'(fb + 1), coord_t'(fc + 1)} &&
            vv[1] == '{coord_t'(fa + 1), coord_t'(fb + 1), coord_t'(fc)} &&
            vv[2] == '{coord_t'(fa + 1), coord_t'(fb), coord_t'(fc + 1)}, "table order, sum -2");
    end else begin
      n_pts++;
      check(vv[0] == '{coord_t'(fa), coord_t'(fb), coord_t'(fc)} && dd[0] == int'(D_ONE),
            "lattice point reference");
    end
  endtask

  initial begin
    V_a = 0; V_b = 0; V_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // references inside the outer hexagon: every line-to-line value within +-2
    for (int n = 0; n < 3000; n++) begin
      int ra, rb;
      ra = int'($urandom % (4 << V_FRAC)) - (2 << V_FRAC);
      rb = int'($urandom % (4 << V_FRAC)) - (2 << V_FRAC);
      if (ra + rb <= (2 << V_FRAC) && ra + rb >= -(2 << V_FRAC))
        apply(ra, rb);
    end
    for (int a = -2; a <= 2; a++)
      for (int b = -2; b <= 2; b++)
        if (a + b <= 2 && a + b >= -2)
          apply(a << V_FRAC, b << V_FRAC);
    check(n_up > 100 && n_down > 100 && n_pts > 10, "both triangle shapes and lattice points seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
