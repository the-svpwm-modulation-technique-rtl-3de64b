// tb_svm_maping: self-checking test of the vector-to-switching-index map.
// Every zero-sum triple with coordinates in -4..4 is applied. The 19 vectors
// of the three-level diagram must map to their row of the switching
// combination table (typed here from the table, in its order), every other
// triple to the invalid index.
module tb_svm_maping;
  import svm_pkg::*;

  coord_t Vx_1, Vx_2, Vx_3;
  logic [IDX_W-1:0] switch_Vx_index;
  int checks = 0, failures = 0;

  svm_maping dut (.*);

  // rows of the table: ab bc ca
  int rows [19][3] = '{
    '{0, 0, 0}, '{1, 0, -1}, '{0, 1, -1}, '{-1, 1, 0}, '{-1, 0, 1}, '{0, -1, 1}, '{1, -1, 0},
    '{2, 0, -2}, '{1, 1, -2}, '{0, 2, -2}, '{-1, 2, -1}, '{-2, 2, 0}, '{-2, 1, 1}, '{-2, 0, 2},
    '{-1, -1, 2}, '{0, -2, 2}, '{1, -2, 1}, '{2, -2, 0}, '{2, -1, -1}};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_idx;
    for (int a = -3; a <= 3; a++) begin
      for (int b = -3; b <= 3; b++) begin
        if (-a - b < -4 || -a - b > 3) continue;
        Vx_1 = coord_t'(a); Vx_2 = coord_t'(b); Vx_3 = coord_t'(-a - b);
        #1;
        exp_idx = int'(IDX_INVALID);
        for (int r = 0; r < 19; r++)
          if (rows[r][0] == a && rows[r][1] == b && rows[r][2] == -a - b) exp_idx = r;
        checks++;
        if (int'(switch_Vx_index) != exp_idx) begin
          failures++;
          $display("FAIL (%0d %0d %0d): index %0d expected %0d", a, b, -a - b, switch_Vx_index, exp_idx);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
